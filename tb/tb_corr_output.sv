// tb_corr_output: self-checking test of the result readout (reduced to 8
// results). sysclk (7 ns) and outclk (4 ns) are unrelated. For each dump the
// results are randomised, si_dump is pulsed, and the receiver side, sampling
// on falling outclk edges, checks that SYNCOUT marks the first of exactly
// 2*N_RES cycles, that the halves arrive real first in CMAC order, that the
// readout starts within 4 outclk cycles of the dump, and that DATAOUT returns
// to 0. A second dump during a readout must set the late flag.
`timescale 1ns / 1ps
module tb_corr_output;
  import corr_pkg::*;
  localparam int NR = 8;

  logic sysclk = 1'b0, outclk = 1'b0, rst_n = 1'b0;
  logic si_dump;
  result_t results [NR];
  logic [OUT_W-1:0] dataout;
  logic syncout, clkout, late;
  int checks = 0, failures = 0;

  corr_output #(.N_RES(NR)) dut (.sysclk(sysclk), .outclk(outclk), .rst_n(rst_n),
    .si_dump(si_dump), .results(results), .dataout(dataout), .syncout(syncout),
    .clkout(clkout), .late(late));

  always #3.5 sysclk = !sysclk;
  always #2 outclk = !outclk;

  initial begin
    #100us;
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

  task automatic dump_and_check();
    int wait_cyc = 0;
    for (int k = 0; k < NR; k++) results[k] = $urandom;
    @(posedge sysclk);
    si_dump <= 1;
    @(posedge sysclk);
    si_dump <= 0;
    @(negedge clkout);
    while (!syncout) begin
      chk(dataout == 0, "data while idle");
      wait_cyc++;
      @(negedge clkout);
    end
    chk(wait_cyc <= 4, $sformatf("readout started %0d cycles late", wait_cyc));
    for (int c = 0; c < 2 * NR; c++) begin
      chk(syncout == (c == 0), "syncout");
      chk(dataout == (c % 2 == 0 ? results[c/2][31:16] : results[c/2][15:0]),
          $sformatf("cycle %0d: %h", c, dataout));
      @(negedge clkout);
    end
    chk(dataout == 0 && !syncout, "readout longer than 2*N_RES cycles");
  endtask

  initial begin
    si_dump = 0;
    for (int k = 0; k < NR; k++) results[k] = '0;
    repeat (3) @(posedge sysclk);
    rst_n = 1;
    repeat (3) @(posedge sysclk);
    for (int d = 0; d < 5; d++) begin
      dump_and_check();
      repeat ($urandom_range(0, 5)) @(posedge sysclk);
    end
    chk(!late, "late flag without cause");
    chk(clkout === outclk, "clkout");
    // second dump in the middle of a readout
    @(posedge sysclk) si_dump <= 1;
    @(posedge sysclk) si_dump <= 0;
    repeat (6) @(posedge sysclk);
    @(posedge sysclk) si_dump <= 1;
    @(posedge sysclk) si_dump <= 0;
    repeat (10) @(posedge sysclk);
    chk(late, "late flag missing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
