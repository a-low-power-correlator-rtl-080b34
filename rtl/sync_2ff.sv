// sync_2ff: two-flop synchroniser for one level signal entering a clock
// domain. The output follows d two or three clk edges later. Reset clears it.
`timescale 1ns / 1ps
module sync_2ff (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  logic meta;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= 1'b0;
      q    <= 1'b0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
