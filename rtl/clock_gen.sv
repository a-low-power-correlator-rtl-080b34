// clock_gen: behavioural model of the clock generator (a PLL, analog in a real
// chip; this model is for simulation only and is not synthesizable).
//
// The PLL locks to CLKIN and synthesises the internal clock sysclk and the
// output clock outclk:
//   f_sysclk = f_clkin * fbdiv / (refdiv * sysdiv)
//   f_outclk = f_clkin * fbdiv / (refdiv * outdiv)
// outclk_sel = 1 takes outclk from the USROUTCLK pin instead. The model
// measures the CLKIN period on each rising edge and reports lock after four
// equal periods; a reset or a change of the divider values drops lock until
// it has measured again. While unlocked the PLL clocks stay low. A divider
// value of 0 is treated as 1.
// The published design says only that a PLL synthesises sysclk and outclk
// from CLKIN with register-set parameters and that outclk may come from
// USROUTCLK; the divider structure is this model's.
`timescale 1ns / 1ps
module clock_gen
  import corr_pkg::*;
(
  input  logic clkin,
  input  logic rst_n,
  input  logic usroutclk,
  input  reg_t refdiv,
  input  reg_t fbdiv,
  input  reg_t sysdiv,
  input  reg_t outdiv,
  input  logic outclk_sel,
  output logic sysclk,
  output logic outclk,
  output logic locked
);
  realtime t_last, period;
  realtime half_sys, half_out;
  int unsigned good;
  logic sys_pll, out_pll;
  reg_t refdiv_q, fbdiv_q, sysdiv_q, outdiv_q;

  function automatic real nz(reg_t v);
    return (v == '0) ? 1.0 : real'(v);
  endfunction

  initial begin
    t_last = 0.0;
    period = 0.0;
    good   = 0;
    locked = 1'b0;
    sys_pll = 1'b0;
    out_pll = 1'b0;
    refdiv_q = '0;
    fbdiv_q  = '0;
    sysdiv_q = '0;
    outdiv_q = '0;
    half_sys = 1.0;
    half_out = 1.0;
  end

  // Frequency measurement and lock detection.
  always @(posedge clkin or negedge rst_n) begin
    if (!rst_n) begin
      good   = 0;
      locked = 1'b0;
    end else begin
      if ({refdiv, fbdiv, sysdiv, outdiv} != {refdiv_q, fbdiv_q, sysdiv_q, outdiv_q}) begin
        good = 0;
        locked = 1'b0;
        refdiv_q = refdiv;
        fbdiv_q  = fbdiv;
        sysdiv_q = sysdiv;
        outdiv_q = outdiv;
      end else if (t_last > 0.0 && ($realtime - t_last) == period) begin
        if (good < 4) good = good + 1;
      end else begin
        good = 0;
      end
      period = $realtime - t_last;
      t_last = $realtime;
      half_sys = period * nz(refdiv_q) * nz(sysdiv_q) / nz(fbdiv_q) / 2.0;
      half_out = period * nz(refdiv_q) * nz(outdiv_q) / nz(fbdiv_q) / 2.0;
      locked = (good >= 4);
    end
  end

  // Oscillators.
  initial forever begin
    if (locked) begin
      #(half_sys) sys_pll = !sys_pll;
    end else begin
      sys_pll = 1'b0;
      @(posedge locked);
    end
  end

  initial forever begin
    if (locked) begin
      #(half_out) out_pll = !out_pll;
    end else begin
      out_pll = 1'b0;
      @(posedge locked);
    end
  end

  assign sysclk = sys_pll;
  assign outclk = outclk_sel ? usroutclk : out_pll;
endmodule
