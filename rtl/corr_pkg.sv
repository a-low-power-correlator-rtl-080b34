// corr_pkg: constants and types shared by the correlator chip.
//
// The correlator holds complex voltage samples of many antenna signals in
// 1024-bit memory words and correlates them in a 64 x 64 array of complex
// multiply-accumulate units (CMACs). This package fixes the sizes the blocks
// agree on (4b+4b samples, 16b+16b results, 128 samples per memory word,
// 64K memory words, twelve 20-bit control registers), the control register
// map and the CMAC mode code sent from the address generator to the array.
// Sizes follow the published design; the register map, the sample byte layout
// and the mode encoding are this implementation's choices.
`timescale 1ns / 1ps
package corr_pkg;

  // CMAC array side n: n*n = 4096 CMACs, n signals on rows and on columns.
  localparam int unsigned N_ARR      = 64;
  // One complex sample: real part in bits 7:4, imaginary part in bits 3:0,
  // both twos complement.
  localparam int unsigned COMP_W     = 4;
  localparam int unsigned SAMPLE_W   = 2 * COMP_W;
  // One result: real part in bits 31:16, imaginary in bits 15:0.
  localparam int unsigned ACC_W      = 16;
  localparam int unsigned RESULT_W   = 2 * ACC_W;
  // Memory: 64K words of 1024 bits = 128 samples (64 signals x 2 times).
  localparam int unsigned WORD_W     = 1024;
  localparam int unsigned WORD_SAMP  = WORD_W / SAMPLE_W;
  localparam int unsigned MEM_DEPTH  = 65536;
  localparam int unsigned ADDR_W     = 16;
  // Input port: four samples per CLKIN edge.
  localparam int unsigned IN_W       = 32;
  // Output port: 16 pins.
  localparam int unsigned OUT_W      = 16;
  // Control registers.
  localparam int unsigned NUM_REGS   = 12;
  localparam int unsigned REG_W      = 20;

  typedef logic [SAMPLE_W-1:0] sample_t;
  typedef logic [RESULT_W-1:0] result_t;
  typedef logic [WORD_W-1:0]   word_t;
  typedef logic [REG_W-1:0]    reg_t;

  // What each CMAC does with the sample pair presented in a cycle.
  typedef enum logic [1:0] {
    CM_IDLE  = 2'd0,  // no sample this cycle: hold
    CM_FIRST = 2'd1,  // first sample of an SI: accumulator := product
    CM_ACC   = 2'd2,  // accumulator += product
    CM_LAST  = 2'd3   // last sample: readout register := accumulator + product
  } cmac_mode_e;

  // Control register addresses.
  typedef enum logic [3:0] {
    R_CTRL       = 4'd0,   // bit 0 run (SIs back to back), bit 1 outclk from USROUTCLK,
                           // bit 2 start SIs only with an integration's first word
    R_NANT       = 4'd1,   // N, number of dual-polarisation antennas
    R_TLEN       = 4'd2,   // T, samples per signal per SI (even, >= 2)
    R_ROW_ADDR   = 4'd3,   // first memory word of row data for the next SI
    R_COL_ADDR   = 4'd4,   // first memory word of column data for the next SI
    R_WR_ADDR    = 4'd5,   // first memory word written during the next SI
    R_PLL_REFDIV = 4'd6,   // PLL reference divider
    R_PLL_FBDIV  = 4'd7,   // PLL feedback divider
    R_PLL_SYSDIV = 4'd8,   // PLL post divider for sysclk
    R_PLL_OUTDIV = 4'd9,   // PLL post divider for outclk
    R_SPARE0     = 4'd10,  // read/write, no function
    R_SPARE1     = 4'd11   // read/write, no function
  } reg_addr_e;

endpackage
