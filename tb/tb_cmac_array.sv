// tb_cmac_array: self-checking test of the CMAC array (reduced to 8 x 6).
// Presents random row and column sample vectors over random-length SIs with
// stall cycles, keeps the expected cross-products of every (row, column)
// pair, and checks all readout registers, in row-major order, one cycle
// after CM_LAST.
`timescale 1ns / 1ps
module tb_cmac_array;
  import corr_pkg::*;
  localparam int R = 8, C = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  cmac_mode_e mode;
  sample_t rows [R];
  sample_t cols [C];
  result_t results [R*C];
  int checks = 0, failures = 0;
  int er [R][C];
  int ei [R][C];

  cmac_array #(.N_ROWS(R), .N_COLS(C)) dut (
    .clk(clk), .rst_n(rst_n), .mode(mode), .rows(rows), .cols(cols), .results(results));

  always #5 clk = !clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sx4(logic [3:0] v);
    return (v[3] ? int'(v) - 16 : int'(v));
  endfunction

  task automatic run_si(int t);
    for (int k = 0; k < t; k++) begin
      if ($urandom_range(0, 4) == 0) begin
        mode <= CM_IDLE;
        @(posedge clk);
      end
      for (int i = 0; i < R; i++) rows[i] <= sample_t'($urandom);
      for (int j = 0; j < C; j++) cols[j] <= sample_t'($urandom);
      mode <= (k == 0) ? CM_FIRST : (k == t - 1) ? CM_LAST : CM_ACC;
      #1;
      for (int i = 0; i < R; i++)
        for (int j = 0; j < C; j++) begin
          if (k == 0) begin er[i][j] = 0; ei[i][j] = 0; end
          er[i][j] += sx4(rows[i][7:4]) * sx4(cols[j][7:4]) + sx4(rows[i][3:0]) * sx4(cols[j][3:0]);
          ei[i][j] += sx4(rows[i][3:0]) * sx4(cols[j][7:4]) - sx4(rows[i][7:4]) * sx4(cols[j][3:0]);
        end
      @(posedge clk);
    end
    mode <= CM_IDLE;
    @(posedge clk);
    #1;
    for (int i = 0; i < R; i++)
      for (int j = 0; j < C; j++) begin
        checks++;
        if (results[i*C+j] !== {16'(er[i][j]), 16'(ei[i][j])}) begin
          failures++;
          if (failures < 10)
            $display("CMAC(%0d,%0d): got %h expected %h", i, j, results[i*C+j],
                     {16'(er[i][j]), 16'(ei[i][j])});
        end
      end
  endtask

  initial begin
    mode = CM_IDLE;
    for (int i = 0; i < R; i++) rows[i] = '0;
    for (int j = 0; j < C; j++) cols[j] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int s = 0; s < 10; s++) run_si($urandom_range(2, 30));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
