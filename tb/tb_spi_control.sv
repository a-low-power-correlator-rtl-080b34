// tb_spi_control: self-checking test of the SPI slave and the twelve control
// registers. CLKIN runs at 10 ns, SCLK at 120 ns (mode 0, MSB first,
// 25-bit frames). Checks the reset values by SPI reads, then writes random
// values to every register in random order, checks both the register
// outputs and SPI read-back, and that an access to address 12..15 changes
// nothing and reads 0.
`timescale 1ns / 1ps
module tb_spi_control;
  import corr_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic sclk, cs_n, mosi, miso;
  reg_t regs [NUM_REGS];
  reg_t model [NUM_REGS];
  int checks = 0, failures = 0;

  spi_control dut (.clk(clk), .rst_n(rst_n), .spi_sclk(sclk), .spi_cs_n(cs_n),
                   .spi_mosi(mosi), .spi_miso(miso), .regs(regs));

  always #5 clk = !clk;

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("%0t: %s", $time, what);
    end
  endtask

  task automatic xfer(bit wr, logic [3:0] a, reg_t d, output reg_t q);
    logic [24:0] f;
    f = {wr, a, d};
    q = '0;
    cs_n = 0;
    #60;
    for (int b = 24; b >= 0; b--) begin
      mosi = f[b];
      #60 sclk = 1;
      if (b < 20) q = {q[18:0], miso};
      #60 sclk = 0;
    end
    #60 cs_n = 1;
    #120;
  endtask

  initial begin
    reg_t q;
    int order [NUM_REGS];
    sclk = 0; cs_n = 1; mosi = 0;
    #30 rst_n = 1;
    #100;
    model[R_CTRL] = 0; model[R_NANT] = 32; model[R_TLEN] = 256;
    model[R_ROW_ADDR] = 0; model[R_COL_ADDR] = 0; model[R_WR_ADDR] = 0;
    model[R_PLL_REFDIV] = 1; model[R_PLL_FBDIV] = 1; model[R_PLL_SYSDIV] = 1;
    model[R_PLL_OUTDIV] = 1; model[R_SPARE0] = 0; model[R_SPARE1] = 0;
    for (int a = 0; a < NUM_REGS; a++) begin
      xfer(0, 4'(a), reg_t'($urandom), q);
      chk(q == model[a], $sformatf("reset value of reg %0d: %h", a, q));
    end
    for (int a = 0; a < NUM_REGS; a++) order[a] = a;
    for (int rep = 0; rep < 3; rep++) begin
      order.shuffle();
      foreach (order[k]) begin
        model[order[k]] = reg_t'($urandom);
        xfer(1, 4'(order[k]), model[order[k]], q);
      end
      for (int a = 0; a < NUM_REGS; a++) begin
        chk(regs[a] == model[a], $sformatf("reg %0d output %h exp %h", a, regs[a], model[a]));
        xfer(0, 4'(a), reg_t'($urandom), q);
        chk(q == model[a], $sformatf("reg %0d read %h exp %h", a, q, model[a]));
      end
    end
    xfer(1, 4'd13, 20'hABCDE, q);
    xfer(0, 4'd13, '0, q);
    chk(q == 0, "read of address 13 not 0");
    for (int a = 0; a < NUM_REGS; a++) chk(regs[a] == model[a], "write to address 13 changed a register");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
