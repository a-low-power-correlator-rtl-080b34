// cmac: one complex multiply-accumulate unit of the correlator array.
//
// Each cycle the unit is given one sample of its row signal r and one of its
// column signal c (4b+4b twos complement) and a mode from the address
// generator. It forms the cross product r * conj(c):
//   re = r.re*c.re + r.im*c.im,   im = r.im*c.re - r.re*c.im
// and accumulates it over the T samples of a sub-integration (SI) in a 16b+16b
// accumulator that saturates at the 16-bit limits. Modes: CM_FIRST starts a new
// sum with this product, CM_ACC adds it, CM_LAST adds it and copies the total
// into the readout register, where it stays until the next CM_LAST. CM_IDLE
// holds everything (a stall or no SI running).
//
// Timing: the readout register shows the SI's result the cycle after CM_LAST.
// Published: the CMAC function, 4b+4b inputs, 16b+16b results and the readout
// register. Own choices: conjugating the column sample, saturation, the
// packing of the result (real in 31:16, imaginary in 15:0).
`timescale 1ns / 1ps
module cmac
  import corr_pkg::*;
#(
  parameter int unsigned SAMP_W = COMP_W,  // bits per sample component
  parameter int unsigned ACC_BITS = ACC_W  // bits per accumulator component
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  cmac_mode_e              mode,
  input  logic [2*SAMP_W-1:0]     row,
  input  logic [2*SAMP_W-1:0]     col,
  output logic [2*ACC_BITS-1:0]   result
);
  localparam int unsigned PW = 2 * SAMP_W + 1;  // width of one product sum

  logic signed [SAMP_W-1:0] r_re, r_im, c_re, c_im;
  logic signed [PW-1:0]     p_re, p_im;
  logic signed [ACC_BITS-1:0] acc_re, acc_im, sum_re, sum_im, base_re, base_im;

  assign r_re = row[2*SAMP_W-1:SAMP_W];
  assign r_im = row[SAMP_W-1:0];
  assign c_re = col[2*SAMP_W-1:SAMP_W];
  assign c_im = col[SAMP_W-1:0];

  always_comb begin
    p_re = PW'(r_re * c_re) + PW'(r_im * c_im);
    p_im = PW'(r_im * c_re) - PW'(r_re * c_im);
  end

  // Saturating add of a product to an accumulator component.
  function automatic logic signed [ACC_BITS-1:0] sat_add(
      logic signed [ACC_BITS-1:0] a, logic signed [PW-1:0] p);
    logic signed [ACC_BITS:0] s;
    s = (ACC_BITS+1)'(a) + (ACC_BITS+1)'(p);
    if (s[ACC_BITS] != s[ACC_BITS-1])
      return s[ACC_BITS] ? {1'b1, {(ACC_BITS-1){1'b0}}} : {1'b0, {(ACC_BITS-1){1'b1}}};
    return s[ACC_BITS-1:0];
  endfunction

  always_comb begin
    base_re = (mode == CM_FIRST) ? '0 : acc_re;
    base_im = (mode == CM_FIRST) ? '0 : acc_im;
    sum_re  = sat_add(base_re, p_re);
    sum_im  = sat_add(base_im, p_im);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_re <= '0;
      acc_im <= '0;
      result <= '0;
    end else if (mode != CM_IDLE) begin
      acc_re <= sum_re;
      acc_im <= sum_im;
      if (mode == CM_LAST) result <= {sum_re, sum_im};
    end
  end

endmodule
