// corr_memory: the on-chip sample memory, 64K words of 1024 bits.
//
// Each word holds 128 eight-bit complex samples. The memory is single ported:
// in any sysclk cycle it does one write (we) or one read (re), never both, as
// the address generator sequences them. Read data are registered and appear
// on rdata the cycle after re and hold until the next read.
//
// Size is the published one (1024b x 64K); single port and one-cycle read
// latency are this implementation's choices. In silicon this would be a set
// of SRAM macros; here it is an array that synthesis keeps as a memory.
`timescale 1ns / 1ps
module corr_memory
  import corr_pkg::*;
#(
  parameter int unsigned WIDTH = WORD_W,
  parameter int unsigned DEPTH = MEM_DEPTH,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic             re,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    else if (re) rdata <= mem[addr];
  end

  always @(posedge clk) assert (!(we && re)) else $error("read and write in one cycle");
endmodule
