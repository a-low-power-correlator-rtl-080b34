// tb_corr_input: self-checking test of the input packer and its clock
// crossing. CLKIN (10 ns) and sysclk (7 ns) are unrelated. A stream of random
// 32-bit words is sent, with INTEGRATE asserted at word 0, again in the
// middle of a word (which restarts packing) and at later integration starts.
// A model acknowledges each wr_req after a random delay; every word written
// is compared with the expected packing of the stream and its wr_first flag.
// The stream runs without pause, as on the chip. Finally acknowledgements are withheld to check the overrun flag.
`timescale 1ns / 1ps
module tb_corr_input;
  import corr_pkg::*;

  logic clkin = 1'b0, sysclk = 1'b0, rst_n = 1'b0;
  logic [IN_W-1:0] datain;
  logic integrate;
  logic wr_req, wr_first, wr_ack, overrun;
  word_t wr_word;
  int checks = 0, failures = 0;
  bit hold_ack = 0;

  word_t exp_q [$];
  bit    expf_q [$];

  corr_input dut (.clkin(clkin), .sysclk(sysclk), .rst_n(rst_n), .datain(datain),
                  .integrate(integrate), .wr_req(wr_req), .wr_word(wr_word),
                  .wr_first(wr_first), .wr_ack(wr_ack), .overrun(overrun));

  always #5 clkin = !clkin;
  always #3.5 sysclk = !sysclk;

  initial begin
    #200us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // acknowledging writer (sysclk)
  int delay = 0;
  always @(posedge sysclk) begin
    wr_ack <= 1'b0;
    if (rst_n && wr_req && !wr_ack && !hold_ack) begin
      if (delay == 0) begin
        wr_ack <= 1'b1;
        delay = $urandom_range(0, 6);
        checks++;
        if (exp_q.size() == 0) begin
          failures++;
          $display("%0t: unexpected word", $time);
        end else begin
          word_t e;
          bit f;
          e = exp_q.pop_front();
          f = expf_q.pop_front();
          if (wr_word !== e || wr_first !== f) begin
            failures++;
            if (failures < 5) $display("%0t: word mismatch first %0b/%0b", $time, wr_first, f);
          end
        end
      end else delay--;
    end
  end

  // stream source (CLKIN): builds the expected words alongside
  word_t cur;
  int pos;
  bit cur_first;
  task automatic send(bit integ);
    logic [IN_W-1:0] d;
    d = $urandom;
    datain <= d;
    integrate <= integ;
    if (integ) begin pos = 0; cur_first = 1; end
    cur[pos*IN_W +: IN_W] = d;
    if (pos == WORD_W / IN_W - 1) begin
      exp_q.push_back(cur);
      expf_q.push_back(cur_first);
      cur_first = 0;
      pos = 0;
    end else pos++;
    @(posedge clkin);
  endtask

  initial begin
    datain = '0; integrate = 0; wr_ack = 0; pos = 0; cur = '0; cur_first = 0;
    repeat (3) @(posedge clkin);
    rst_n = 1;
    @(posedge clkin);
    // data before the first INTEGRATE are ignored
    repeat (10) begin
      datain <= $urandom;
      integrate <= 0;
      @(posedge clkin);
    end
    send(1);
    for (int w = 0; w < 32 * 5 + 11; w++) send(0);
    send(1);   // restart in the middle of a word
    for (int w = 0; w < 32 * 6 - 1; w++) send(0);
    send(1);
    for (int w = 0; w < 32 * 4 - 1; w++) send(0);
    // the stream never stops; by now all but the word in flight are written
    repeat (10) send(0);
    checks++;
    if (exp_q.size() > 1 || overrun) begin
      failures++;
      $display("%0d words not written, overrun %0b", exp_q.size(), overrun);
    end
    // overrun: nobody acknowledges two words
    hold_ack = 1;
    for (int w = 0; w < 32 * 3; w++) send(0);
    checks++;
    if (!overrun) begin
      failures++;
      $display("overrun not flagged");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
