// spi_control: SPI slave port and the chip's twelve 20-bit control registers.
//
// The registers hold N, T, the PLL parameters, the run/clock-select bits and
// the three start addresses the address generator latches at each SI (map in
// corr_pkg::reg_addr_e). All twelve can be written and read.
//
// Frame (SPI mode 0, MSB first, cs_n low for exactly 25 SCLK cycles):
//   bit 24      1 = write, 0 = read
//   bits 23:20  register address (0..11; others are ignored, read as 0)
//   bits 19:0   write data; on a read, the register is shifted out on miso
//               during these 20 cycles (miso changes after falling SCLK
//               edges, the master samples on rising edges).
// A write takes effect after the 25th rising SCLK edge. miso is 0 outside a
// read's data bits.
//
// The SPI pins are sampled by clk (CLKIN, which runs before the PLL is set up)
// through two-flop synchronisers, so CLKIN must be at least 8x SCLK. The
// registers therefore live in the CLKIN domain; the other domains read them
// as quasi-static values (the address generator latches its three addresses
// at the start of each SI, so they must not be written right at that moment).
// Published: the twelve 20-bit registers, their purpose and the SPI slave.
// The frame, the register map, the reset values and the oversampling are
// this implementation's.
`timescale 1ns / 1ps
module spi_control
  import corr_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic spi_sclk,
  input  logic spi_cs_n,
  input  logic spi_mosi,
  output logic spi_miso,
  output reg_t regs [NUM_REGS]
);
  localparam int unsigned FRAME = 1 + 4 + REG_W;

  logic sclk_s, cs_n_s, mosi_s, sclk_d;
  logic rise, fall;
  logic [$clog2(FRAME+1)-1:0] bitcnt;
  logic [FRAME-2:0] shreg;   // bits received so far, newest in bit 0
  reg_t tx;
  logic [3:0] rd_addr;
  logic is_rd;

  sync_2ff u_s0 (.clk(clk), .rst_n(rst_n), .d(spi_sclk), .q(sclk_s));
  sync_2ff u_s2 (.clk(clk), .rst_n(rst_n), .d(spi_mosi), .q(mosi_s));

  // cs_n resets to "deselected".
  logic cs_meta;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cs_meta <= 1'b1;
      cs_n_s  <= 1'b1;
    end else begin
      cs_meta <= spi_cs_n;
      cs_n_s  <= cs_meta;
    end
  end

  assign rise    = sclk_s && !sclk_d;
  assign fall    = !sclk_s && sclk_d;
  assign rd_addr = {shreg[2:0], mosi_s};

  function automatic reg_t reset_value(logic [3:0] a);
    case (a)
      R_NANT:       return reg_t'(32);
      R_TLEN:       return reg_t'(256);
      R_PLL_REFDIV: return reg_t'(1);
      R_PLL_FBDIV:  return reg_t'(1);
      R_PLL_SYSDIV: return reg_t'(1);
      R_PLL_OUTDIV: return reg_t'(1);
      default:      return '0;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_d   <= 1'b0;
      bitcnt   <= '0;
      shreg    <= '0;
      tx       <= '0;
      is_rd    <= 1'b0;
      spi_miso <= 1'b0;
      for (int a = 0; a < NUM_REGS; a++) regs[a] <= reset_value(4'(a));
    end else begin
      sclk_d <= sclk_s;
      if (cs_n_s) begin
        bitcnt   <= '0;
        spi_miso <= 1'b0;
      end else begin
        if (rise) begin
          shreg  <= {shreg[FRAME-3:0], mosi_s};
          bitcnt <= bitcnt + 1'b1;
          // 5th bit completes the address: fetch the register for a read.
          if (bitcnt == 4) begin
            tx    <= (rd_addr < 4'(NUM_REGS)) ? regs[rd_addr] : '0;
            is_rd <= !shreg[3];
          end
          // 25th bit completes a write.
          if (bitcnt == $bits(bitcnt)'(FRAME - 1) && shreg[FRAME-2] && shreg[REG_W+2:REG_W-1] < 4'(NUM_REGS))
            regs[shreg[REG_W+2:REG_W-1]] <= {shreg[REG_W-2:0], mosi_s};
        end
        if (fall) begin
          if (bitcnt >= 5 && bitcnt < $bits(bitcnt)'(FRAME) && is_rd) begin
            spi_miso <= tx[REG_W-1];
            tx       <= {tx[REG_W-2:0], 1'b0};
          end else begin
            spi_miso <= 1'b0;
          end
        end
      end
    end
  end
endmodule
