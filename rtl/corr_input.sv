// corr_input: packs the 32-bit input stream into 1024-bit memory words.
//
// On every rising CLKIN edge DATAIN carries four 8-bit samples of different
// signals at one sample time. Thirty-two such words make one memory word:
// input word w (0..31) lands in bits 32w+31..32w, so words 0-15 carry 64
// signals at an even sample time and words 16-31 the same 64 signals at the
// next time (the layout corr_buffer expects). INTEGRATE high with a word marks
// the first data of a new integration: packing restarts at position 0 and the
// finished word is flagged wr_first. Nothing is packed before the first
// INTEGRATE.
//
// Clock crossing: a finished word is copied to a holding register in the CLKIN
// domain and a toggle is flipped. In the sysclk domain the toggle passes a
// two-flop synchroniser; its change raises wr_req, which stays high until the
// address generator writes the word (wr_ack). The holding register is stable
// for 32 CLKIN cycles, which bounds how late the write may be; a word
// completed while the previous one is still unwritten sets the sticky overrun
// flag (sysclk domain). wr_word and wr_first come straight from the holding
// register and are read only while wr_req is high.
// The published design gives the port widths and INTEGRATE's meaning; the
// sample order within a word and the handshake are this implementation's.
`timescale 1ns / 1ps
module corr_input
  import corr_pkg::*;
#(
  parameter int unsigned IN_BITS   = IN_W,
  parameter int unsigned WORD_BITS = WORD_W
) (
  input  logic                 clkin,
  input  logic                 sysclk,
  input  logic                 rst_n,
  input  logic [IN_BITS-1:0]   datain,
  input  logic                 integrate,
  output logic                 wr_req,
  output logic [WORD_BITS-1:0] wr_word,
  output logic                 wr_first,
  input  logic                 wr_ack,
  output logic                 overrun
);
  localparam int unsigned NW = WORD_BITS / IN_BITS;
  localparam int unsigned PW = $clog2(NW);

  // ---- CLKIN domain ----
  logic [IN_BITS-1:0]   acc [NW-1];
  logic [PW-1:0]        pos, idx;
  logic                 started, first_acc, toggle;
  logic [WORD_BITS-1:0] hold_word;
  logic                 hold_first;

  assign idx = integrate ? '0 : pos;

  always_ff @(posedge clkin or negedge rst_n) begin
    if (!rst_n) begin
      pos        <= '0;
      started    <= 1'b0;
      first_acc  <= 1'b0;
      toggle     <= 1'b0;
      hold_word  <= '0;
      hold_first <= 1'b0;
      for (int k = 0; k < NW - 1; k++) acc[k] <= '0;
    end else if (started || integrate) begin
      started <= 1'b1;
      pos     <= idx + 1'b1;
      if (idx == PW'(NW - 1)) begin
        for (int k = 0; k < NW - 1; k++) hold_word[k*IN_BITS +: IN_BITS] <= acc[k];
        hold_word[(NW-1)*IN_BITS +: IN_BITS] <= datain;
        hold_first <= first_acc;
        toggle     <= !toggle;
      end else begin
        acc[idx] <= datain;
        if (idx == '0) first_acc <= integrate;
      end
    end
  end

  // ---- sysclk domain ----
  logic tog_s, tog_d;

  sync_2ff u_sync (.clk(sysclk), .rst_n(rst_n), .d(toggle), .q(tog_s));

  always_ff @(posedge sysclk or negedge rst_n) begin
    if (!rst_n) begin
      tog_d   <= 1'b0;
      wr_req  <= 1'b0;
      overrun <= 1'b0;
    end else begin
      tog_d <= tog_s;
      if (tog_s != tog_d) begin
        wr_req <= 1'b1;
        if (wr_req && !wr_ack) overrun <= 1'b1;
      end else if (wr_ack) begin
        wr_req <= 1'b0;
      end
    end
  end

  assign wr_word  = hold_word;
  assign wr_first = hold_first;
endmodule
