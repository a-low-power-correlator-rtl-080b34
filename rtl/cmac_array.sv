// cmac_array: the n x n array of complex multiply-accumulate units.
//
// Row i of the array receives sample rows[i] and column j receives cols[j]
// every cycle; CMAC (i,j) accumulates rows[i] * conj(cols[j]) over one
// sub-integration (SI). All CMACs share one mode from the address generator
// (idle, first, accumulate, last), so the whole array starts and ends an SI
// together. After the CM_LAST cycle the n*n results sit in the CMACs' readout
// registers, flattened row-major: results[i*N_COLS + j] belongs to CMAC (i,j).
//
// The 64 x 64 size and the readout registers are the published design; the
// broadcast of one row sample per row and one column sample per column each
// cycle is how this implementation feeds it.
`timescale 1ns / 1ps
module cmac_array
  import corr_pkg::*;
#(
  parameter int unsigned N_ROWS = N_ARR,
  parameter int unsigned N_COLS = N_ARR
) (
  input  logic       clk,
  input  logic       rst_n,
  input  cmac_mode_e mode,
  input  sample_t    rows    [N_ROWS],
  input  sample_t    cols    [N_COLS],
  output result_t    results [N_ROWS*N_COLS]
);
  for (genvar i = 0; i < N_ROWS; i++) begin : g_row
    for (genvar j = 0; j < N_COLS; j++) begin : g_col
      cmac u_cmac (
        .clk    (clk),
        .rst_n  (rst_n),
        .mode   (mode),
        .row    (rows[i]),
        .col    (cols[j]),
        .result (results[i*N_COLS+j])
      );
    end
  end
endmodule
