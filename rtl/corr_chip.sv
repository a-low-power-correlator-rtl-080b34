// corr_chip: the correlator chip, one X-unit of an FX radio-telescope
// correlator.
//
// An external filter bank splits the 2N signals of N dual-polarisation
// antennas into narrow frequency channels; this chip correlates all 2N
// signals of its share of the bandwidth. Samples enter on DATAIN (four 4b+4b
// complex samples per CLKIN edge), are packed into 1024-bit words and stored
// in a 64K-word memory. Sub-integrations (SIs) then read T samples of 64 row
// signals and 64 column signals and correlate every row signal with every
// column signal in a 64 x 64 CMAC array; for large N the host steers the
// array over all signal-group pairs by writing, for each SI, the row, column
// and write start addresses. After each SI the 4096 16b+16b results go out on
// DATAOUT (16 pins, 8192 CLKOUT cycles, SYNCOUT in the first).
//
// Blocks and clocks:
//   corr_input   CLKIN -> sysclk   packs DATAIN words, hands them over
//   addr_gen     sysclk            memory schedule, SI sequencing, CMAC mode
//   corr_memory  sysclk            64K x 1024 single-port sample store
//   corr_buffer  sysclk            row/column sample staging
//   cmac_array   sysclk            64 x 64 CMACs with readout registers
//   corr_output  sysclk -> outclk  result readout on DATAOUT/SYNCOUT/CLKOUT
//   clock_gen    CLKIN             PLL model making sysclk and outclk
//   spi_control  CLKIN             SPI slave, twelve 20-bit registers
// RESETN resets every block asynchronously. The run bit (register 0 bit 0)
// and the integration-sync bit (bit 2) are synchronised into sysclk; the address and T registers are read as
// quasi-static values and latched at each SI start.
// The block structure and all port names follow the published block
// diagram; the protocols between blocks are this implementation's.
`timescale 1ns / 1ps
module corr_chip
  import corr_pkg::*;
(
  input  logic [IN_W-1:0]  DATAIN,
  input  logic             CLKIN,
  input  logic             INTEGRATE,
  input  logic             RESETN,
  input  logic             USROUTCLK,
  input  logic             SPI_SCLK,
  input  logic             SPI_CS_N,
  input  logic             SPI_MOSI,
  output logic             SPI_MISO,
  output logic [OUT_W-1:0] DATAOUT,
  output logic             SYNCOUT,
  output logic             CLKOUT
);
  logic sysclk, outclk, pll_locked;
  reg_t regs [NUM_REGS];

  // Control registers (CLKIN domain).
  spi_control u_control (
    .clk      (CLKIN),
    .rst_n    (RESETN),
    .spi_sclk (SPI_SCLK),
    .spi_cs_n (SPI_CS_N),
    .spi_mosi (SPI_MOSI),
    .spi_miso (SPI_MISO),
    .regs     (regs)
  );

  clock_gen u_clkgen (
    .clkin      (CLKIN),
    .rst_n      (RESETN),
    .usroutclk  (USROUTCLK),
    .refdiv     (regs[R_PLL_REFDIV]),
    .fbdiv      (regs[R_PLL_FBDIV]),
    .sysdiv     (regs[R_PLL_SYSDIV]),
    .outdiv     (regs[R_PLL_OUTDIV]),
    .outclk_sel (regs[R_CTRL][1]),
    .sysclk     (sysclk),
    .outclk     (outclk),
    .locked     (pll_locked)
  );

  // Input packing and hand-over.
  logic  wr_req, wr_first, wr_ack, overrun;
  word_t wr_word;

  corr_input u_input (
    .clkin     (CLKIN),
    .sysclk    (sysclk),
    .rst_n     (RESETN),
    .datain    (DATAIN),
    .integrate (INTEGRATE),
    .wr_req    (wr_req),
    .wr_word   (wr_word),
    .wr_first  (wr_first),
    .wr_ack    (wr_ack),
    .overrun   (overrun)
  );

  // Memory schedule and SI sequencing.
  logic              run_s, sync_s;
  logic              mem_we, mem_re, ld_row, ld_col;
  logic [ADDR_W-1:0] mem_addr;
  cmac_mode_e        cmac_mode;
  logic              si_start, si_dump, si_active, stall;

  sync_2ff u_run_sync (.clk(sysclk), .rst_n(RESETN), .d(regs[R_CTRL][0]), .q(run_s));
  sync_2ff u_int_sync (.clk(sysclk), .rst_n(RESETN), .d(regs[R_CTRL][2]), .q(sync_s));

  addr_gen u_addr_gen (
    .clk       (sysclk),
    .rst_n     (RESETN),
    .run       (run_s),
    .sync_int  (sync_s),
    .t_len     (regs[R_TLEN]),
    .n_ant     (regs[R_NANT]),
    .row_base  (regs[R_ROW_ADDR][ADDR_W-1:0]),
    .col_base  (regs[R_COL_ADDR][ADDR_W-1:0]),
    .wr_base   (regs[R_WR_ADDR][ADDR_W-1:0]),
    .wr_req    (wr_req),
    .wr_first  (wr_first),
    .wr_ack    (wr_ack),
    .mem_we    (mem_we),
    .mem_re    (mem_re),
    .mem_addr  (mem_addr),
    .ld_row    (ld_row),
    .ld_col    (ld_col),
    .cmac_mode (cmac_mode),
    .si_start  (si_start),
    .si_dump   (si_dump),
    .si_active (si_active),
    .stall     (stall)
  );

  word_t rdata;

  corr_memory u_memory (
    .clk   (sysclk),
    .we    (mem_we),
    .re    (mem_re),
    .addr  (mem_addr),
    .wdata (wr_word),
    .rdata (rdata)
  );

  sample_t rows [N_ARR];
  sample_t cols [N_ARR];

  corr_buffer u_buffer (
    .clk    (sysclk),
    .rst_n  (RESETN),
    .rdata  (rdata),
    .ld_row (ld_row),
    .ld_col (ld_col),
    .rows   (rows),
    .cols   (cols)
  );

  result_t results [N_ARR*N_ARR];

  cmac_array u_array (
    .clk     (sysclk),
    .rst_n   (RESETN),
    .mode    (cmac_mode),
    .rows    (rows),
    .cols    (cols),
    .results (results)
  );

  logic out_late;

  corr_output u_output (
    .sysclk  (sysclk),
    .outclk  (outclk),
    .rst_n   (RESETN),
    .si_dump (si_dump),
    .results (results),
    .dataout (DATAOUT),
    .syncout (SYNCOUT),
    .clkout  (CLKOUT),
    .late    (out_late)
  );
endmodule
