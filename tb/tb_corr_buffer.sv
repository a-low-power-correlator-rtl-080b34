// tb_corr_buffer: self-checking test of the row/column buffer (64 signals).
// Sends row and column words with random gaps, sometimes a new row word in
// the cycle straight after a column word, and checks that one cycle after
// each column word the outputs hold the even-time samples (low half of the
// words) and one cycle later the odd-time samples (high half).
`timescale 1ns / 1ps
module tb_corr_buffer;
  import corr_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  word_t rdata;
  logic ld_row, ld_col;
  sample_t rows [N_ARR];
  sample_t cols [N_ARR];
  int checks = 0, failures = 0;
  word_t rw, cw;

  corr_buffer dut (.clk(clk), .rst_n(rst_n), .rdata(rdata), .ld_row(ld_row), .ld_col(ld_col),
                   .rows(rows), .cols(cols));

  always #5 clk = !clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t rand_word();
    word_t w;
    for (int k = 0; k < WORD_W / 32; k++) w[k*32 +: 32] = $urandom;
    return w;
  endfunction

  task automatic check_half(word_t r, word_t c, int half);
    checks++;
    for (int k = 0; k < N_ARR; k++) begin
      if (rows[k] !== r[(half*N_ARR + k)*8 +: 8] || cols[k] !== c[(half*N_ARR + k)*8 +: 8]) begin
        failures++;
        $display("half %0d sample %0d: rows %h/%h cols %h/%h", half, k, rows[k],
                 r[(half*N_ARR + k)*8 +: 8], cols[k], c[(half*N_ARR + k)*8 +: 8]);
        break;
      end
    end
  endtask

  initial begin
    ld_row = 0; ld_col = 0; rdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int p = 0; p < 50; p++) begin
      rw = rand_word();
      cw = rand_word();
      ld_row <= 1; rdata <= rw;
      @(posedge clk);
      ld_row <= 0; rdata <= rand_word();
      repeat ($urandom_range(0, 2)) @(posedge clk);
      ld_col <= 1; rdata <= cw;
      @(posedge clk);
      ld_col <= 0;
      #1 check_half(rw, cw, 0);
      // next row word may arrive in this very cycle
      if (p % 2 == 0) begin
        @(posedge clk);
        #1 check_half(rw, cw, 1);
      end else begin
        ld_row <= 1; rdata <= rand_word();
        @(posedge clk);
        ld_row <= 0;
        #1 check_half(rw, cw, 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
