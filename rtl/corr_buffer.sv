// corr_buffer: turns 1024-bit memory words into row and column samples.
//
// A memory word holds 64 signals at two consecutive sample times: samples
// 0..63 (bits 511:0) are signals 0..63 at the even time, samples 64..127 the
// same signals at the odd time. For each pair of sample times the address
// generator reads one row word and then one column word. The buffer keeps the
// row word; when the column word arrives (ld_col) it presents the even-time
// samples of both to the CMAC array, and in the next cycle the odd-time
// samples. So two memory reads feed two CMAC cycles.
//
// Timing: ld_row / ld_col are high in the cycle rdata carries a row / column
// word. rows/cols show the even time one cycle after ld_col and the odd time
// two cycles after it. The odd-time output uses the held copies, so a new row
// word may arrive in the cycle right after ld_col.
// The published design gives only the buffer's purpose; this word layout and
// schedule are this implementation's.
`timescale 1ns / 1ps
module corr_buffer
  import corr_pkg::*;
#(
  parameter int unsigned N = N_ARR
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [2*N*SAMPLE_W-1:0]  rdata,
  input  logic                     ld_row,
  input  logic                     ld_col,
  output sample_t                  rows [N],
  output sample_t                  cols [N]
);
  localparam int unsigned HALF = N * SAMPLE_W;

  logic [2*N*SAMPLE_W-1:0] row_hold, col_hold;
  logic                    odd_next;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_hold <= '0;
      col_hold <= '0;
      odd_next <= 1'b0;
      for (int k = 0; k < N; k++) begin
        rows[k] <= '0;
        cols[k] <= '0;
      end
    end else begin
      if (ld_row) row_hold <= rdata;
      if (ld_col) begin
        col_hold <= rdata;
        odd_next <= 1'b1;
        for (int k = 0; k < N; k++) begin
          rows[k] <= row_hold[k*SAMPLE_W +: SAMPLE_W];
          cols[k] <= rdata[k*SAMPLE_W +: SAMPLE_W];
        end
      end else if (odd_next) begin
        odd_next <= 1'b0;
        for (int k = 0; k < N; k++) begin
          rows[k] <= row_hold[HALF + k*SAMPLE_W +: SAMPLE_W];
          cols[k] <= col_hold[HALF + k*SAMPLE_W +: SAMPLE_W];
        end
      end
    end
  end

  always @(posedge clk) assert (!(ld_row && ld_col)) else $error("row and column load together");
endmodule
