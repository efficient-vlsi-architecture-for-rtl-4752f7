// tb_level_ctrl -- self-checking test of the level schedule.
// Without pipeline latches (PIPE = 0) the switching cycles must be those of
// the reference timing: level 1 load at 2k and reverse at 2k+1, level 2 at
// 4k+1 / 4k+3, level 3 at 8k+3 / 8k+7; the accumulator clear at
// T_j = Delta_j + 2^(j-1) k with Delta_j = 2^j - 1; lowpass valid at
// Delta_j + 2^j k and highpass valid 2^(j-1) later, from the first sample on.
// With PIPE = 1 the level offsets grow by one per upstream level and clear
// and valid come one cycle later. No reversal happens before the first load.
module tb_level_ctrl;
  logic clk = 0, rst_n = 0;
  logic [2:0] t = '0;
  int tc = 0;  // unwrapped cycle count
  int checks = 0, failures = 0;

  localparam int NL = 6;
  logic       load [NL], rev [NL], hi [NL], clr [NL], lv [NL], hv [NL];
  logic [1:0] slot [NL];

  // Levels 1..3 without latches (index 0..2) and with latches (3..5).
  for (genvar k = 0; k < NL; k++) begin : g_dut
    localparam int LV  = (k % 3) + 1;
    localparam bit PP  = (k >= 3);
    localparam int OFF = (1 << (LV - 1)) - 1 + (LV - 1) * int'(PP);
    localparam int SLW = (LV > 1) ? LV - 1 : 1;
    logic [SLW-1:0] s;
    level_ctrl #(.LEVEL(LV), .OFF(OFF), .PIPE(PP), .TW(3)) dut (
      .clk, .rst_n, .t, .load(load[k]), .rev(rev[k]), .slot(s), .hi(hi[k]),
      .clr(clr[k]), .l_valid(lv[k]), .h_valid(hv[k])
    );
    assign slot[k] = 2'(s);
  end

  always #5 clk = ~clk;

  function automatic int md(int a, int b);
    return ((a % b) + b) % b;
  endfunction

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int k, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("t=%0d inst %0d %s got %0b exp %0b", tc, k, what, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (tc = 0; tc < 200; tc++) begin
      t = 3'(tc);
      #1;
      for (int k = 0; k < NL; k++) begin
        int lvn, s2, off, dl, ph;
        bit pp;
        lvn = (k % 3) + 1;
        pp  = (k >= 3);
        s2  = 1 << (lvn - 1);
        off = s2 - 1 + (lvn - 1) * int'(pp);
        dl  = (1 << lvn) - 1 + lvn * int'(pp);  // Delta_j
        // switching times
        chk("load", k, load[k], md(tc - off, 2 * s2) == 0);
        chk("rev",  k, rev[k],  tc > off && md(tc - off, 2 * s2) == s2);
        // phase and slot, counted from the cycle after the load
        ph = md(tc - off - 1, 2 * s2);
        chk("hi", k, hi[k], ph >= s2);
        checks++;
        if (int'(slot[k]) != ph % s2) begin failures++; $display("t=%0d inst %0d slot", tc, k); end
        // clear at T_j, valid from the first output on
        chk("clr", k, clr[k], tc >= int'(pp) && md(tc - dl, s2) == 0);
        chk("l_valid", k, lv[k], tc >= dl && md(tc - dl, 2 * s2) == 0);
        chk("h_valid", k, hv[k], tc >= dl && md(tc - dl, 2 * s2) == s2);
      end
      // the reference switching cycles, spelled out for PIPE = 0
      chk("L2 load 4k+1", 1, load[1], md(tc, 4) == 1);
      chk("L2 rev 4k+3",  1, rev[1],  md(tc, 4) == 3);
      chk("L3 load 8k+3", 2, load[2], md(tc, 8) == 3);
      chk("L3 rev 8k+7",  2, rev[2],  md(tc, 8) == 7);
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
