// tb_addr_gen: self-checking test of the address generator.
// A random writer raises wr_req (sometimes with wr_first) and drops it on
// wr_ack. A cycle-by-cycle reference model follows the expected schedule:
// row and column reads alternating from the start addresses latched at each
// SI start, stepping by N/32 words, T/2 pairs per SI, writes at consecutive addresses from the
// latched write address (or from wr_base on an integration's first word
// while no SI runs). It checks every memory access, the ld_row/ld_col
// strobes one cycle after the reads, cmac_mode two and three cycles after
// each column read, si_dump one cycle after CM_LAST, and that writes did
// stall reads. The start addresses change during every SI. A second phase
// sets sync_int and checks that each SI then starts with the deferred write
// of an integration's first word at the new write address.
`timescale 1ns / 1ps
module tb_addr_gen;
  import corr_pkg::*;
  localparam int T = 6;
  localparam int NA = 96;   // three signal groups: read stride 3

  logic clk = 1'b0, rst_n = 1'b0;
  logic run, sync_int;
  reg_t t_len, n_ant;
  logic [ADDR_W-1:0] row_base, col_base, wr_base;
  logic wr_req, wr_first, wr_ack;
  logic mem_we, mem_re, ld_row, ld_col, si_start, si_dump, si_active, stall;
  logic [ADDR_W-1:0] mem_addr;
  cmac_mode_e cmac_mode;
  int checks = 0, failures = 0;
  int n_stall = 0, n_si = 0, n_dump = 0, n_wfirst_idle = 0, n_si_sync = 0;

  addr_gen dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // random writer
  always @(posedge clk) begin
    if (rst_n) begin
      if (wr_req && wr_ack) begin
        wr_req   <= 1'b0;
        wr_first <= 1'b0;
      end else if (!wr_req && $urandom_range(0, 3) == 0) begin
        wr_req   <= 1'b1;
        wr_first <= ($urandom_range(0, 5) == 0);
      end
    end
  end

  // reference model, checked in the middle of each cycle
  int exp_row, exp_col, exp_wr, pair;
  bit rd_col_h [4];   // column read 0..3 cycles ago
  bit first_h [4], last_h [4];
  bit rd_any_q, rd_col_q;
  cmac_mode_e mode_q;
  bit started = 0;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("%0t: %s", $time, what);
    end
  endtask

  always @(negedge clk) if (rst_n) begin
    bit is_col, first, last;
    cmac_mode_e em;
    is_col = 0; first = 0; last = 0;
    if (si_start) begin
      // in sync mode an SI starts only on an integration's first word,
      // whose write was deferred to this cycle
      if (sync_int) begin
        n_si_sync++;
        chk(wr_req && wr_first && mem_we && int'(mem_addr) == int'(wr_base),
            "SI start not aligned with an integration's first word");
      end
      exp_row = int'(row_base);
      exp_col = int'(col_base);
      exp_wr  = int'(wr_base);
      pair = 0;
      started = 1;
      n_si++;
      // new addresses for the next SI
      row_base <= ADDR_W'($urandom);
      col_base <= ADDR_W'($urandom);
      wr_base  <= ADDR_W'($urandom);
    end
    chk(!(mem_we && mem_re), "read and write together");
    if (mem_we) begin
      chk(wr_ack && wr_req, "write without request");
      if (wr_first && !si_active) begin
        exp_wr = int'(wr_base);
        n_wfirst_idle++;
      end
      chk(int'(mem_addr) == exp_wr, $sformatf("write addr %0d exp %0d", mem_addr, exp_wr));
      exp_wr = (exp_wr + 1) % MEM_DEPTH;
      if (si_active) n_stall++;
    end else begin
      chk(!wr_ack, "ack without write");
    end
    if (mem_re) begin
      chk(started && pair < T/2, "read outside an SI");
      if (rd_any_q && !rd_col_q) begin
        is_col = 1;
        chk(int'(mem_addr) == exp_col, $sformatf("col addr %0d exp %0d", mem_addr, exp_col));
        first = (pair == 0);
        last = (pair == T/2 - 1);
        exp_col = (exp_col + NA / 32) % MEM_DEPTH;
        pair++;
      end else begin
        chk(int'(mem_addr) == exp_row, $sformatf("row addr %0d exp %0d", mem_addr, exp_row));
        exp_row = (exp_row + NA / 32) % MEM_DEPTH;
      end
      rd_any_q = 1;
      rd_col_q = is_col;
    end
    // strobes of last cycle's read
    chk(ld_col == rd_col_h[0], "ld_col timing");
    chk(ld_row == (rd_row_prev), "ld_row timing");
    // mode: even time 2 cycles after a column read, odd time 3 cycles after
    if (rd_col_h[1])      em = first_h[1] ? CM_FIRST : CM_ACC;
    else if (rd_col_h[2]) em = last_h[2] ? CM_LAST : CM_ACC;
    else                  em = CM_IDLE;
    chk(cmac_mode == em, $sformatf("mode %0d exp %0d", cmac_mode, em));
    chk(si_dump == (mode_q == CM_LAST), "si_dump timing");
    if (si_dump) n_dump++;
    mode_q = cmac_mode;
    rd_row_prev = mem_re && !is_col;
    for (int k = 3; k > 0; k--) begin
      rd_col_h[k] = rd_col_h[k-1];
      first_h[k] = first_h[k-1];
      last_h[k] = last_h[k-1];
    end
    rd_col_h[0] = is_col;
    first_h[0] = first;
    last_h[0] = last;
  end
  bit rd_row_prev = 0;

  initial begin
    run = 0; sync_int = 0; t_len = reg_t'(T); n_ant = reg_t'(NA);
    row_base = 16'h0100; col_base = 16'h0200; wr_base = 16'h0300;
    wr_req = 0; wr_first = 0;
    exp_wr = 0; exp_row = 0; exp_col = 0; pair = 0;
    rd_any_q = 0; rd_col_q = 0; mode_q = CM_IDLE;
    for (int k = 0; k < 4; k++) begin rd_col_h[k] = 0; first_h[k] = 0; last_h[k] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // idle period: writes only
    repeat (60) @(posedge clk);
    run <= 1;
    repeat (600) @(posedge clk);
    run <= 0;
    repeat (40) @(posedge clk);
    // SIs aligned with integration starts
    sync_int <= 1;
    run <= 1;
    repeat (600) @(posedge clk);
    run <= 0;
    repeat (40) @(posedge clk);
    chk(n_si_sync > 3, "no SIs in integration-sync mode");
    chk(n_si > 10, $sformatf("only %0d SIs", n_si));
    chk(n_dump == n_si, $sformatf("%0d dumps for %0d SIs", n_dump, n_si));
    chk(n_stall > 0, "no write stalled a read");
    chk(n_wfirst_idle > 0, "no integration start while idle");
    $display("SIs %0d (synced %0d), stalls %0d, idle integration starts %0d", n_si, n_si_sync, n_stall, n_wfirst_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
