// tb_corr_memory: self-checking test of the 64K x 1024 sample memory at its
// full size. Writes random words to random addresses (including the first
// and last word), keeps them in an associative array, and reads them back in
// a different order, checking the one-cycle read latency and that rdata
// holds when neither read nor write is active.
`timescale 1ns / 1ps
module tb_corr_memory;
  import corr_pkg::*;

  logic clk = 1'b0;
  logic we, re;
  logic [ADDR_W-1:0] addr;
  word_t wdata, rdata;
  int checks = 0, failures = 0;
  word_t model [int];
  int addrs [$];

  corr_memory dut (.clk(clk), .we(we), .re(re), .addr(addr), .wdata(wdata), .rdata(rdata));

  always #5 clk = !clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t rand_word();
    word_t w;
    for (int k = 0; k < WORD_W / 32; k++) w[k*32 +: 32] = $urandom;
    return w;
  endfunction

  initial begin
    we = 0; re = 0; addr = '0; wdata = '0;
    @(posedge clk);
    addrs.push_back(0);
    addrs.push_back(MEM_DEPTH - 1);
    for (int k = 0; k < 200; k++) addrs.push_back($urandom_range(0, MEM_DEPTH - 1));
    foreach (addrs[k]) begin
      we <= 1; re <= 0; addr <= ADDR_W'(addrs[k]);
      wdata <= rand_word();
      #1 model[addrs[k]] = wdata;
      @(posedge clk);
    end
    we <= 0;
    addrs.shuffle();
    foreach (addrs[k]) begin
      re <= 1; addr <= ADDR_W'(addrs[k]);
      @(posedge clk);
      re <= 0;
      #1;
      checks++;
      if (rdata !== model[addrs[k]]) begin
        failures++;
        if (failures < 5) $display("addr %0d mismatch", addrs[k]);
      end
      // hold with no access
      @(posedge clk);
      #1;
      checks++;
      if (rdata !== model[addrs[k]]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
