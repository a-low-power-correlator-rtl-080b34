// tb_corr_n32: the N = 32 workload (64 signals, one SI per integration) in
// continuous operation, on the full-size chip.
//
// CLKIN runs at 500 MHz (2 ns), the published maximum pin rate, so the input
// carries the full 16 Gb/s without a pause. sysclk = CLKIN/4, outclk =
// CLKIN. T = 1024, so one integration is 512 memory words (16384 CLKIN
// cycles). The memory is double-buffered: integrations alternate between
// regions A (word 0x0000) and B (word 0x1000). With run and the
// integration-sync bit set, each SI starts with the first word of an
// integration, correlates the previous integration from one region while the
// new one is written into the other, and sends its 4096 results before the
// next integration ends. After each SYNCOUT the host writes the addresses for
// the next SI. Integrations 0..2 are checked through the SIs that start with
// integrations 1..3: every result against a software correlation with
// 16-bit saturation, 8192 CLKOUT cycles per readout. Also required: each SI
// started on an integration's first word, finished before the next
// integration began, no input overrun, no late readout, saturated
// autocorrelations, and writes interleaved with reads.
`timescale 1ns / 1ps
module tb_corr_n32;
  import corr_pkg::*;
  localparam int NANT = 32;
  localparam int NSIG = 64;
  localparam int T = 1024;
  localparam int NINT = 5;          // integrations streamed
  localparam int NCHK = 3;          // integrations checked
  localparam int REG_A = 'h0000, REG_B = 'h1000;
  localparam int NRES = N_ARR * N_ARR;

  logic [IN_W-1:0] DATAIN;
  logic CLKIN = 1'b0, INTEGRATE, RESETN, USROUTCLK = 1'b0;
  logic SPI_SCLK, SPI_CS_N, SPI_MOSI, SPI_MISO;
  logic [OUT_W-1:0] DATAOUT;
  logic SYNCOUT, CLKOUT;

  corr_chip dut (.*);

  always #1 CLKIN = !CLKIN;

  int checks = 0, failures = 0;
  int n_stall = 0, n_si = 0, n_sync_ok = 0, n_sat = 0, n_readouts = 0, n_done_in_time = 0;

  initial begin
    #2ms;
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

  logic [7:0] samp [NINT][NSIG][T];

  function automatic int sx4(logic [3:0] v);
    return v[3] ? int'(v) - 16 : int'(v);
  endfunction

  function automatic int sat16(int v);
    return v > 32767 ? 32767 : (v < -32768 ? -32768 : v);
  endfunction

  function automatic result_t expected(int n, int a, int b);
    int er = 0, ei = 0;
    for (int t = 0; t < T; t++) begin
      er = sat16(er + sx4(samp[n][a][t][7:4]) * sx4(samp[n][b][t][7:4])
                    + sx4(samp[n][a][t][3:0]) * sx4(samp[n][b][t][3:0]));
      ei = sat16(ei + sx4(samp[n][a][t][3:0]) * sx4(samp[n][b][t][7:4])
                    - sx4(samp[n][a][t][7:4]) * sx4(samp[n][b][t][3:0]));
    end
    return {16'(er), 16'(ei)};
  endfunction

  // continuous input stream, integration after integration
  bit stream_on = 0;
  int cur_int = -1;
  initial begin
    DATAIN = '0;
    INTEGRATE = 0;
    wait (stream_on);
    @(posedge CLKIN);
    for (int n = 0; n < NINT; n++)
      for (int p = 0; p < T / 2; p++)
        for (int w = 0; w < 32; w++) begin
          int tt, s0;
          tt = 2 * p + w / 16;
          s0 = 4 * (w % 16);
          DATAIN <= {samp[n][s0+3][tt], samp[n][s0+2][tt], samp[n][s0+1][tt], samp[n][s0][tt]};
          INTEGRATE <= (p == 0 && w == 0);
          if (p == 0 && w == 0) cur_int = n;
          @(posedge CLKIN);
        end
    forever begin
      DATAIN <= $urandom;
      INTEGRATE <= 0;
      @(posedge CLKIN);
    end
  end

  // readout capture: readout k holds integration k
  result_t cap [NRES];
  initial begin
    forever begin
      int errs;
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
        @(negedge CLKOUT);
        chk(!SYNCOUT && DATAOUT == 0, "readout longer than 8192 CLKOUT cycles");
        errs = 0;
        if (n_readouts < NCHK) begin
          for (int i = 0; i < N_ARR; i++)
            for (int j = 0; j < N_ARR; j++) begin
              result_t e;
              e = expected(n_readouts, i, j);
              checks++;
              if (cap[i*N_ARR+j] !== e) begin
                failures++;
                errs++;
                if (errs < 4) $display("integration %0d CMAC (%0d,%0d): got %h exp %h",
                                       n_readouts, i, j, cap[i*N_ARR+j], e);
              end
              if (e[31:16] == 16'h7fff) n_sat++;
            end
          $display("%0t: integration %0d correlated, %0d errors", $time, n_readouts, errs);
        end
        n_readouts++;
      end
    end
  end

  // SI bookkeeping in the sysclk domain
  int si_int;
  always @(posedge dut.sysclk) begin
    if (dut.u_addr_gen.stall) n_stall++;
    if (dut.u_addr_gen.si_start) begin
      n_si++;
      si_int = cur_int;
      // the deferred first word of the new integration is written now, at
      // the newly latched write address
      if (dut.u_addr_gen.mem_we && dut.u_input.wr_first) n_sync_ok++;
    end
    if (dut.u_addr_gen.si_dump && cur_int == si_int) n_done_in_time++;
  end

  initial begin
    RESETN = 1;
    #1 RESETN = 0;
    SPI_SCLK = 0; SPI_CS_N = 1; SPI_MOSI = 0;
    for (int n = 0; n < NINT; n++)
      for (int s = 0; s < NSIG; s++)
        for (int t = 0; t < T; t++) samp[n][s][t] = 8'($urandom);
    #45 RESETN = 1;
    #100;
    spi_write(R_PLL_REFDIV, 1);
    spi_write(R_PLL_FBDIV, 1);
    spi_write(R_PLL_SYSDIV, 4);
    spi_write(R_PLL_OUTDIV, 1);
    spi_write(R_NANT, NANT);
    spi_write(R_TLEN, T);
    spi_write(R_WR_ADDR, REG_A);        // integration 0 goes to A while idle
    wait (dut.u_clkgen.locked);
    #200;
    stream_on = 1;
    wait (cur_int == 0);
    // first SI (at integration 1): read A, write B
    spi_write(R_ROW_ADDR, REG_A);
    spi_write(R_COL_ADDR, REG_A);
    spi_write(R_WR_ADDR, REG_B);
    spi_write(R_CTRL, 5);               // run, SIs synchronised to integrations
    for (int k = 1; k <= NCHK; k++) begin
      int rd, wr;
      wait (n_readouts == k - 1 && SYNCOUT);
      rd = (k % 2 == 1) ? REG_B : REG_A;
      wr = (k % 2 == 1) ? REG_A : REG_B;
      spi_write(R_ROW_ADDR, reg_t'(rd));
      spi_write(R_COL_ADDR, reg_t'(rd));
      spi_write(R_WR_ADDR, reg_t'(wr));
      // the SI now running is the last one wanted
      if (k == NCHK) spi_write(R_CTRL, 0);
    end
    wait (n_readouts == NCHK);
    #1000;
    $display("SIs %0d, synced starts %0d, finished within their integration %0d, stalls %0d, saturated %0d",
             n_si, n_sync_ok, n_done_in_time, n_stall, n_sat);
    chk(n_si == NCHK, $sformatf("%0d SIs", n_si));
    chk(n_sync_ok == n_si, "SI start not on an integration's first word");
    chk(n_done_in_time == n_si, "an SI ran past the end of its integration");
    chk(!dut.u_input.overrun, "input overrun at 500 MHz CLKIN");
    chk(!dut.u_output.late, "readout did not finish within an SI");
    chk(n_stall > 0, "no write stall");
    chk(n_sat > 0, "no saturation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
