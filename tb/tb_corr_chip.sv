// tb_corr_chip: end-to-end test of the whole correlator chip at its default
// size (64 x 64 CMACs, 64K x 1024 memory, 4096 results per SI).
//
// Set-up: CLKIN 10 ns; through SPI the PLL is set to sysclk = 4/8 CLKIN
// (20 ns) and outclk = 4 CLKIN (2.5 ns); N = 64 antennas (128 signals, two
// 64-signal groups G0, G1), T = 2048 samples.
// 1. One integration of random samples is streamed in time-major order
//    (for each time pair: G0's 32 words, then G1's), INTEGRATE on its first
//    word, and lands at word 0x0100 onwards.
// 2. With run set, three SIs follow back to back: (G0,G0), (G0,G1),
//    (G1,G1). The host writes the next SI's row, column and write addresses
//    while the current SI runs. Input keeps streaming (a second integration)
//    into other memory areas, so writes displace reads during SIs.
// 3. outclk is switched to USROUTCLK (3 ns) and one more SI, (G1,G0), runs.
// Every readout is captured on falling CLKOUT edges: SYNCOUT must mark the
// first of exactly 8192 cycles, and all 4096 results must equal
// sum_t row(t) * conj(col(t)) computed here with 16-bit saturation. The
// diagonal SIs hold autocorrelations above 32767, so saturation occurs.
// Counted mechanisms (each must occur): write stalls during an SI,
// back-to-back SI starts, per-SI address reloads, saturated results, PLL
// relock, outclk source switch.
`timescale 1ns / 1ps
module tb_corr_chip;
  import corr_pkg::*;
  localparam int NANT = 64;
  localparam int NSIG = 2 * NANT;
  localparam int G = NSIG / 64;
  localparam int T = 2048;
  localparam int BASE = 'h0100;
  localparam int NRES = N_ARR * N_ARR;

  logic [IN_W-1:0] DATAIN;
  logic CLKIN = 1'b0, INTEGRATE, RESETN, USROUTCLK = 1'b0;
  logic SPI_SCLK, SPI_CS_N, SPI_MOSI, SPI_MISO;
  logic [OUT_W-1:0] DATAOUT;
  logic SYNCOUT, CLKOUT;

  corr_chip dut (.*);

  always #5 CLKIN = !CLKIN;
  always #1.5 USROUTCLK = !USROUTCLK;

  int checks = 0, failures = 0;
  int n_stall = 0, n_b2b = 0, n_reload = 0, n_sat = 0, n_relock = 0, n_switch = 0;
  int n_readouts = 0;

  initial begin
    #3ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("%0t: %s", $time, what);
    end
  endtask

  // ---------------- SPI master ----------------
  task automatic spi_write(logic [3:0] a, reg_t d);
    logic [24:0] f;
    f = {1'b1, a, d};
    SPI_CS_N = 0;
    #60;
    for (int b = 24; b >= 0; b--) begin
      SPI_MOSI = f[b];
      #60 SPI_SCLK = 1;
      #60 SPI_SCLK = 0;
    end
    #60 SPI_CS_N = 1;
    #120;
  endtask

  task automatic set_si(int r, int c, int w);
    spi_write(R_ROW_ADDR, reg_t'(BASE + r));
    spi_write(R_COL_ADDR, reg_t'(BASE + c));
    spi_write(R_WR_ADDR, reg_t'(w));
  endtask

  // ---------------- stimulus data ----------------
  logic [7:0] samp [NSIG][T];

  function automatic int sx4(logic [3:0] v);
    return v[3] ? int'(v) - 16 : int'(v);
  endfunction

  function automatic int sat16(int v);
    return v > 32767 ? 32767 : (v < -32768 ? -32768 : v);
  endfunction

  // Expected result of CMAC (i,j) for row group r, column group c.
  function automatic result_t expected(int r, int c, int i, int j);
    int er = 0, ei = 0;
    int a, b;
    a = r * 64 + i;
    b = c * 64 + j;
    for (int t = 0; t < T; t++) begin
      er = sat16(er + sx4(samp[a][t][7:4]) * sx4(samp[b][t][7:4])
                    + sx4(samp[a][t][3:0]) * sx4(samp[b][t][3:0]));
      ei = sat16(ei + sx4(samp[a][t][3:0]) * sx4(samp[b][t][7:4])
                    - sx4(samp[a][t][7:4]) * sx4(samp[b][t][3:0]));
    end
    return {16'(er), 16'(ei)};
  endfunction

  // ---------------- input stream (runs for the whole test) ----------------
  bit stream_on = 0;
  initial begin
    DATAIN = '0;
    INTEGRATE = 0;
    wait (stream_on);
    @(posedge CLKIN);
    // integration 1: checked data
    for (int p = 0; p < T / 2; p++)
      for (int g = 0; g < G; g++)
        for (int w = 0; w < 32; w++) begin
          int tt, s0;
          tt = 2 * p + w / 16;
          s0 = g * 64 + 4 * (w % 16);
          DATAIN <= {samp[s0+3][tt], samp[s0+2][tt], samp[s0+1][tt], samp[s0][tt]};
          INTEGRATE <= (p == 0 && g == 0 && w == 0);
          @(posedge CLKIN);
        end
    // following integrations: random, not checked
    forever begin
      for (int k = 0; k < NANT * T / 2; k++) begin
        DATAIN <= $urandom;
        INTEGRATE <= (k == 0);
        @(posedge CLKIN);
      end
    end
  end

  // ---------------- readout capture and check ----------------
  int si_r [$], si_c [$];
  result_t cap [NRES];
  initial begin
    forever begin
      int r, c, ncyc, errs;
      @(negedge CLKOUT);
      if (SYNCOUT) begin
        for (int k = 0; k < 2 * NRES; k++) begin
          if (k > 0) begin
            @(negedge CLKOUT);
            chk(!SYNCOUT, "SYNCOUT inside a readout");
          end
          if (k % 2 == 0) cap[k/2][31:16] = DATAOUT;
          else cap[k/2][15:0] = DATAOUT;
        end
        // the cycle after the last word: readout over
        @(negedge CLKOUT);
        chk(!SYNCOUT && DATAOUT == 0, "readout longer than 8192 CLKOUT cycles");
        r = si_r.pop_front();
        c = si_c.pop_front();
        errs = 0;
        for (int i = 0; i < N_ARR; i++)
          for (int j = 0; j < N_ARR; j++) begin
            result_t e;
            e = expected(r, c, i, j);
            checks++;
            if (cap[i*N_ARR+j] !== e) begin
              failures++;
              errs++;
              if (errs < 4) $display("SI (%0d,%0d) CMAC (%0d,%0d): got %h exp %h",
                                     r, c, i, j, cap[i*N_ARR+j], e);
            end
            if (e[31:16] == 16'h7fff) n_sat++;
          end
        n_readouts++;
        $display("%0t: readout %0d of SI (%0d,%0d) checked, %0d errors", $time, n_readouts, r, c, errs);
      end
    end
  end

  // ---------------- mechanism counters ----------------
  // back to back: an SI starts at most 3 cycles after the previous one
  // issued its last read
  int last_end = -100, cyc = 0;
  bit active_q = 0;
  always @(posedge dut.sysclk) begin
    cyc++;
    if (dut.u_addr_gen.stall) n_stall++;
    if (active_q && !dut.u_addr_gen.si_active) last_end = cyc;
    active_q = dut.u_addr_gen.si_active;
    if (dut.u_addr_gen.si_start) begin
      n_reload++;
      if (cyc - last_end <= 3) n_b2b++;
    end
  end
  always @(posedge dut.u_clkgen.locked) n_relock++;

  // ---------------- main sequence ----------------
  initial begin
    // a falling RESETN edge resets the sysclk and outclk domains even
    // though their clocks stop while the PLL is unlocked
    RESETN = 1;
    #1 RESETN = 0;
    SPI_SCLK = 0; SPI_CS_N = 1; SPI_MOSI = 0;
    for (int s = 0; s < NSIG; s++)
      for (int t = 0; t < T; t++) samp[s][t] = 8'($urandom);
    #45 RESETN = 1;
    #100;
    spi_write(R_PLL_REFDIV, 1);
    spi_write(R_PLL_FBDIV, 4);
    spi_write(R_PLL_SYSDIV, 8);
    spi_write(R_PLL_OUTDIV, 1);
    spi_write(R_NANT, NANT);
    spi_write(R_TLEN, T);
    set_si(0, 0, BASE);
    wait (dut.u_clkgen.locked);
    #200;
    stream_on = 1;
    // the first integration occupies BASE .. BASE + G*T/2 - 1; move the
    // write start for the first SI elsewhere while it streams in
    #1000;
    spi_write(R_WR_ADDR, 'h8000);
    wait (dut.u_addr_gen.wr_ptr == BASE + G * T / 2);
    #400;
    si_r.push_back(0); si_c.push_back(0);
    spi_write(R_CTRL, 1);                 // run: SI (0,0) starts
    #2000;
    set_si(0, 1, 'h9000);                 // for the next SI
    si_r.push_back(0); si_c.push_back(1);
    wait (n_readouts == 1);               // SI (0,1) has started
    set_si(1, 1, 'hA000);
    si_r.push_back(1); si_c.push_back(1);
    wait (n_readouts == 2);               // SI (1,1) has started
    spi_write(R_CTRL, 0);                 // it is the last of the run
    wait (n_readouts == 3);
    #2000;
    chk(!dut.u_addr_gen.si_active, "SI running after run was cleared");
    // switch outclk to USROUTCLK, one more SI
    spi_write(R_CTRL, 2);
    n_switch++;
    set_si(1, 0, 'hB000);
    si_r.push_back(1); si_c.push_back(0);
    spi_write(R_CTRL, 3);
    #5000;
    spi_write(R_CTRL, 2);
    wait (n_readouts == 4);
    #1000;
    chk(n_reload == 4, $sformatf("%0d SIs instead of 4", n_reload));
    chk(!dut.u_input.overrun, "input overrun");
    chk(!dut.u_output.late, "readout overrun");
    $display("stalls %0d, back-to-back SIs %0d, SI starts %0d, saturated results %0d, PLL locks %0d, outclk switches %0d",
             n_stall, n_b2b, n_reload, n_sat, n_relock, n_switch);
    chk(n_stall > 0, "no write stall");
    chk(n_b2b >= 2, "SIs not back to back");
    chk(n_sat > 0, "no saturation");
    chk(n_relock >= 2, "PLL did not relock");
    chk(n_switch > 0, "no outclk switch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
