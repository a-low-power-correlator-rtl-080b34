// addr_gen: sequences the memory and organises the work into sub-integrations.
//
// The memory has one port, so every sysclk cycle is either a write of a packed
// input word, a read of row data, a read of column data, or idle. Writes come
// first: input words arrive at a fixed rate and must never be lost, so a
// pending word (wr_req) is written at once and the array stalls that cycle.
//
// A sub-integration (SI) starts when run is high and no SI is active; with
// sync_int also high it waits for the first word of an integration (wr_req
// with wr_first), defers that word's write by one cycle and sends it to the
// newly latched write address, so each integration's data start exactly at
// wr_base while the previous integration is being correlated. At the
// start the three start-address registers are latched: row_base and col_base
// give the first memory word of the row and column data, wr_base the word
// where input data go during this SI. The SI then reads T/2 word pairs, a row
// word at row_base+p*G followed by a column word at col_base+p*G,
// p = 0..T/2-1, G = N/32 (at least 1); each pair carries two sample times
// for 64 row and 64 column signals. G is the number of 64-signal groups: the
// input arrives time-major (all groups of one time pair, then the next pair),
// so consecutive time pairs of one group lie G words apart. When
// no SI is active the write pointer is reloaded from wr_base on the first word
// of each integration (wr_first), so data can be loaded before the first SI.
//
// Sync outputs, all registered:
//   ld_row / ld_col  high in the cycle the memory's rdata holds that word
//                    (one cycle after the read);
//   cmac_mode        aligned with the buffer output: CM_FIRST / CM_ACC for
//                    the even time two cycles after a column read, CM_ACC /
//                    CM_LAST for the odd time three cycles after it, else
//                    CM_IDLE;
//   si_dump          one-cycle pulse when the array's readout registers hold
//                    a finished SI (the cycle after CM_LAST).
//   si_start, stall  observation pulses (SI started, read displaced by a
//                    write).
// The published design gives the module's duties and the three per-SI
// registers; the schedule, write priority and timing are this design's.
`timescale 1ns / 1ps
module addr_gen
  import corr_pkg::*;
#(
  parameter int unsigned AW = ADDR_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          run,
  input  logic          sync_int,
  input  reg_t          t_len,
  input  reg_t          n_ant,
  input  logic [AW-1:0] row_base,
  input  logic [AW-1:0] col_base,
  input  logic [AW-1:0] wr_base,
  input  logic          wr_req,
  input  logic          wr_first,
  output logic          wr_ack,
  output logic          mem_we,
  output logic          mem_re,
  output logic [AW-1:0] mem_addr,
  output logic          ld_row,
  output logic          ld_col,
  output cmac_mode_e    cmac_mode,
  output logic          si_start,
  output logic          si_dump,
  output logic          si_active,
  output logic          stall
);
  typedef struct packed {
    logic valid;
    logic first;
    logic last;
  } col_tag_t;

  logic [AW-1:0]    row_ptr, col_ptr, wr_ptr, wr_addr;
  logic [REG_W-2:0] pair_cnt, npairs;
  logic [AW-1:0]    stride;
  logic             col_phase;
  logic             start, do_write, do_read;
  col_tag_t         tag_now, tag1, tag2;
  logic             rd_col_q, rd_row_q;

  assign npairs   = (t_len[REG_W-1:1] == '0) ? (REG_W-1)'(1) : t_len[REG_W-1:1];
  assign stride   = (n_ant[REG_W-1:5] == '0) ? AW'(1) : AW'(n_ant[REG_W-1:5]);
  assign start    = run && !si_active && (!sync_int || (wr_req && wr_first));
  assign do_write = wr_req && !start;
  assign do_read  = si_active && !do_write;
  assign wr_addr  = (wr_first && !si_active) ? wr_base : wr_ptr;

  always_comb begin
    mem_we   = do_write;
    mem_re   = do_read;
    wr_ack   = do_write;
    mem_addr = do_write ? wr_addr : (col_phase ? col_ptr : row_ptr);
    tag_now.valid = do_read && col_phase;
    tag_now.first = (pair_cnt == '0);
    tag_now.last  = (pair_cnt == npairs - 1'b1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      si_active <= 1'b0;
      row_ptr   <= '0;
      col_ptr   <= '0;
      wr_ptr    <= '0;
      pair_cnt  <= '0;
      col_phase <= 1'b0;
      tag1      <= '0;
      tag2      <= '0;
      rd_row_q  <= 1'b0;
      rd_col_q  <= 1'b0;
      cmac_mode <= CM_IDLE;
      si_dump   <= 1'b0;
      si_start  <= 1'b0;
      stall     <= 1'b0;
    end else begin
      si_start <= start;
      stall    <= do_write && si_active;
      if (start) begin
        si_active <= 1'b1;
        row_ptr   <= row_base;
        col_ptr   <= col_base;
        wr_ptr    <= wr_base;
        pair_cnt  <= '0;
        col_phase <= 1'b0;
      end else if (do_write) begin
        wr_ptr <= wr_addr + 1'b1;
      end else if (do_read) begin
        col_phase <= !col_phase;
        if (col_phase) begin
          col_ptr  <= col_ptr + stride;
          pair_cnt <= pair_cnt + 1'b1;
          if (tag_now.last) si_active <= 1'b0;
        end else begin
          row_ptr <= row_ptr + stride;
        end
      end
      // Alignment pipeline: read -> rdata (ld_*) -> even time -> odd time.
      rd_row_q <= do_read && !col_phase;
      rd_col_q <= do_read && col_phase;
      tag1     <= tag_now;
      tag2     <= tag1;
      if (tag1.valid)      cmac_mode <= tag1.first ? CM_FIRST : CM_ACC;
      else if (tag2.valid) cmac_mode <= tag2.last ? CM_LAST : CM_ACC;
      else                 cmac_mode <= CM_IDLE;
      si_dump <= (cmac_mode == CM_LAST);
    end
  end

  assign ld_row = rd_row_q;
  assign ld_col = rd_col_q;

  always @(posedge clk) assert (!(mem_we && mem_re)) else $error("memory read and write together");
endmodule
