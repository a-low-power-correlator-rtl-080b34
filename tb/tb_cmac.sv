// tb_cmac: self-checking test of one CMAC.
// Drives random sub-integrations of random length (with idle stall cycles
// mixed in), computes the expected row*conj(col) sums with saturation in
// plain integer arithmetic, and checks the readout register after each
// CM_LAST, and that it holds between SIs. One SI of maximal positive
// products checks saturation of both signs.
`timescale 1ns / 1ps
module tb_cmac;
  import corr_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  cmac_mode_e mode;
  sample_t row, col;
  result_t result;
  int checks = 0, failures = 0;

  cmac dut (.clk(clk), .rst_n(rst_n), .mode(mode), .row(row), .col(col), .result(result));

  always #5 clk = !clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sat16(int v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  function automatic int sx4(logic [3:0] v);
    return (v[3] ? int'(v) - 16 : int'(v));
  endfunction

  task automatic run_si(int t, bit big, bit neg);
    int er = 0, ei = 0;
    for (int k = 0; k < t; k++) begin
      int rr, ri, cr, ci;
      // random idle cycle
      if ($urandom_range(0, 3) == 0) begin
        mode <= CM_IDLE;
        row  <= sample_t'($urandom);
        col  <= sample_t'($urandom);
        @(posedge clk);
      end
      if (big) begin
        row <= neg ? 8'h87 : 8'h88;   // (-8,7) or (-8,-8)
        col <= 8'h88;
      end else begin
        row <= sample_t'($urandom);
        col <= sample_t'($urandom);
      end
      mode <= (k == 0) ? CM_FIRST : (k == t - 1) ? CM_LAST : CM_ACC;
      #1;
      rr = sx4(row[7:4]); ri = sx4(row[3:0]);
      cr = sx4(col[7:4]); ci = sx4(col[3:0]);
      if (k == 0) begin er = 0; ei = 0; end
      er = sat16(er + rr * cr + ri * ci);
      ei = sat16(ei + ri * cr - rr * ci);
      @(posedge clk);
    end
    mode <= CM_IDLE;
    @(posedge clk);
    #1;
    checks++;
    if (result !== {16'(er), 16'(ei)}) begin
      failures++;
      $display("SI t=%0d: got %h expected %h", t, result, {16'(er), 16'(ei)});
    end
    // readout holds while idle
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (result !== {16'(er), 16'(ei)}) begin
      failures++;
      $display("readout did not hold");
    end
  endtask

  initial begin
    mode = CM_IDLE;
    row = '0;
    col = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int s = 0; s < 40; s++) run_si($urandom_range(2, 40), 1'b0, 1'b0);
    // saturation: 300 x 128 exceeds 32767 on the real part
    run_si(300, 1'b1, 1'b0);
    checks++;
    if (result[31:16] !== 16'h7fff) begin
      failures++;
      $display("positive saturation missing: %h", result);
    end
    // (-8,7)*conj(-8,-8): im = 7*-8 - (-8*-8) = -120 per sample -> negative limit
    run_si(300, 1'b1, 1'b1);
    checks++;
    if (result[15:0] !== 16'h8000) begin
      failures++;
      $display("negative saturation missing: %h", result);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
