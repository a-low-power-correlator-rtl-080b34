// corr_output: sends the results of each sub-integration off chip.
//
// When the address generator reports a finished SI (si_dump, sysclk domain),
// the n*n 32-bit results in the CMAC readout registers are sent over OUT_W
// (16) pins in 2*n*n (8192) outclk cycles: for each CMAC in row-major order
// first the real half (bits 31:16), then the imaginary half (bits 15:0).
// syncout is high during the first of these cycles. Between SIs dataout is 0.
// clkout is outclk itself; dataout and syncout change just after its rising
// edge, so a receiver samples them on the falling edge.
//
// Clock crossing: si_dump flips a toggle in the sysclk domain; a two-flop
// synchroniser carries it into the outclk domain, where its change starts
// the readout two to three outclk cycles later. The readout registers are
// read directly: they change only at the end of the next SI, which is why
// outclk must be fast enough to send everything within one SI. A dump that
// arrives while a readout is still running restarts it and sets the sticky
// late flag.
// Published: 16 pins, 8192 cycles per SI, SYNCOUT in the first cycle. Word
// order, halves and edge timing are this implementation's choices.
`timescale 1ns / 1ps
module corr_output
  import corr_pkg::*;
#(
  parameter int unsigned N_RES  = N_ARR * N_ARR,
  parameter int unsigned OUT_BITS = OUT_W
) (
  input  logic                sysclk,
  input  logic                outclk,
  input  logic                rst_n,
  input  logic                si_dump,
  input  logic [2*OUT_BITS-1:0] results [N_RES],
  output logic [OUT_BITS-1:0] dataout,
  output logic                syncout,
  output logic                clkout,
  output logic                late
);
  localparam int unsigned NCYC = 2 * N_RES;
  localparam int unsigned CW   = $clog2(NCYC);

  logic dump_tog, tog_s, tog_d, start;
  logic active;
  logic [CW-1:0] cnt;
  logic [2*OUT_BITS-1:0] word;

  always_ff @(posedge sysclk or negedge rst_n) begin
    if (!rst_n) dump_tog <= 1'b0;
    else if (si_dump) dump_tog <= !dump_tog;
  end

  sync_2ff u_sync (.clk(outclk), .rst_n(rst_n), .d(dump_tog), .q(tog_s));

  assign start = (tog_s != tog_d);
  assign word  = results[cnt[CW-1:1]];

  always_ff @(posedge outclk or negedge rst_n) begin
    if (!rst_n) begin
      tog_d   <= 1'b0;
      active  <= 1'b0;
      cnt     <= '0;
      dataout <= '0;
      syncout <= 1'b0;
      late    <= 1'b0;
    end else begin
      tog_d <= tog_s;
      if (active) begin
        dataout <= cnt[0] ? word[OUT_BITS-1:0] : word[2*OUT_BITS-1:OUT_BITS];
        syncout <= (cnt == '0);
      end else begin
        dataout <= '0;
        syncout <= 1'b0;
      end
      if (start) begin
        if (active) late <= 1'b1;
        active <= 1'b1;
        cnt    <= '0;
      end else if (active) begin
        cnt <= cnt + 1'b1;
        if (cnt == CW'(NCYC - 1)) active <= 1'b0;
      end
    end
  end

  assign clkout = outclk;
endmodule
