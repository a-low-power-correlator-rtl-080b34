// tb_clock_gen: self-checking test of the clock generator model.
// With CLKIN at 10 ns it checks lock after reset, the sysclk and outclk
// periods for two divider settings (measured over 20 cycles, to 2 ps), the
// loss and regain of lock on a divider change, and that outclk follows
// USROUTCLK when selected.
`timescale 1ns / 1ps
module tb_clock_gen;
  import corr_pkg::*;

  logic clkin = 1'b0, usroutclk = 1'b0, rst_n = 1'b0;
  reg_t refdiv, fbdiv, sysdiv, outdiv;
  logic outclk_sel, sysclk, outclk, locked;
  int checks = 0, failures = 0;

  clock_gen dut (.*);

  always #5 clkin = !clkin;
  always #3.5 usroutclk = !usroutclk;

  initial begin
    #50us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("%0t: %s", $time, what);
    end
  endtask

  task automatic measure(ref logic c, input realtime exp, input string name);
    realtime t0, t1;
    @(posedge c) t0 = $realtime;
    repeat (20) @(posedge c);
    t1 = $realtime;
    chk((t1 - t0) / 20.0 > exp - 0.002 && (t1 - t0) / 20.0 < exp + 0.002,
        $sformatf("%s period %f exp %f", name, (t1 - t0) / 20.0, exp));
  endtask

  initial begin
    refdiv = 2; fbdiv = 6; sysdiv = 1; outdiv = 3; outclk_sel = 0;
    #22 rst_n = 1;
    chk(!locked, "locked during reset");
    wait (locked);
    chk($realtime < 100.0, "lock took too long");
    measure(sysclk, 10.0 * 2 / 6, "sysclk");
    measure(outclk, 10.0 * 2 * 3 / 6, "outclk");
    // new dividers: lock drops, then returns
    @(posedge clkin);
    fbdiv = 8; sysdiv = 2; outdiv = 1;
    @(posedge clkin); #1;
    chk(!locked, "lock kept through a divider change");
    wait (locked);
    measure(sysclk, 10.0 * 2 * 2 / 8, "sysclk");
    measure(outclk, 10.0 * 2 * 1 / 8, "outclk");
    outclk_sel = 1;
    measure(outclk, 7.0, "outclk from USROUTCLK");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
