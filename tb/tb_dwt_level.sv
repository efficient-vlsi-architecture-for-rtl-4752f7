// tb_dwt_level -- self-checking test of single DWT levels.
// Three levels run side by side on their own random sample streams:
//   A: level 1, M = 4, pipeline latch, one sample per cycle from t = 0
//   B: level 2, M = 6, pipeline latch, one sample every 2 cycles from t = 2
//   C: level 3, M = 4, no latch, one sample every 4 cycles from t = 3
// Every valid output is compared, in order, with the reference lowpass or
// highpass value, and its cycle with OFF + 2^j n + 2^(j-1) + PIPE (lowpass)
// and 2^(j-1) cycles later (highpass).
module tb_dwt_level;
  import dwt_ref_pkg::*;
  localparam int NA = 120;
  logic clk = 0, rst_n = 0;
  logic [2:0] t = '0;
  int tc;
  logic signed [15:0] dA = '0, dB = '0, dC = '0;
  logic signed [15:0] oA, oB, oC;
  logic lA, hA, lB, hB, lC, hC;
  int checks = 0, failures = 0;

  dwt_level #(.LEVEL(1), .M(4), .OFF(0), .PIPE(1), .TW(3)) uA (.clk, .rst_n, .t, .din(dA), .dout(oA), .l_valid(lA), .h_valid(hA));
  dwt_level #(.LEVEL(2), .M(6), .OFF(2), .PIPE(1), .TW(3)) uB (.clk, .rst_n, .t, .din(dB), .dout(oB), .l_valid(lB), .h_valid(hB));
  dwt_level #(.LEVEL(3), .M(4), .OFF(3), .PIPE(0), .TW(3)) uC (.clk, .rst_n, .t, .din(dC), .dout(oC), .l_valid(lC), .h_valid(hC));

  always #5 clk = ~clk;

  int xa [$], xb [$], xc [$];
  int loa [$], hia [$], lob [$], hib [$], loc [$], hic [$];
  int nl [3], nh [3];

  task automatic chk_out(int k, bit h, int got, int lvl, int off, int pp,
                         ref int lo [$], ref int hi [$]);
    int n, et, ev;
    n  = h ? nh[k] : nl[k];
    et = off + (1 << lvl) * n + (1 << (lvl - 1)) + pp + (h ? (1 << (lvl - 1)) : 0);
    if (n >= lo.size()) return;
    ev = h ? hi[n] : lo[n];
    checks += 2;
    if (tc != et) begin failures++; $display("inst %0d %s%0d at t=%0d exp t=%0d", k, h ? "H" : "L", n, tc, et); end
    if (got != ev) begin failures++; $display("inst %0d %s%0d = %0d exp %0d", k, h ? "H" : "L", n, got, ev); end
    if (h) nh[k]++; else nl[k]++;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NA; i++) begin
      xa.push_back(int'($urandom_range(8191)) - 4096);
      xb.push_back(int'($urandom_range(8191)) - 4096);
      xc.push_back(int'($urandom_range(8191)) - 4096);
    end
    dwt_step(4, xa, NA / 2 + 4, loa, hia);
    dwt_step(6, xb, NA / 2 + 4, lob, hib);
    dwt_step(4, xc, NA / 2 + 4, loc, hic);
    nl = '{0, 0, 0}; nh = '{0, 0, 0};
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (tc = 0; tc < 200; tc++) begin
      t  = 3'(tc);
      dA = (tc < NA) ? 16'(xa[tc]) : '0;
      dB = (tc >= 2 && (tc - 2) / 2 < NA) ? 16'(xb[(tc - 2) / 2]) : 16'($urandom);
      dC = (tc >= 3 && (tc - 3) / 4 < NA) ? 16'(xc[(tc - 3) / 4]) : 16'($urandom);
      // between its sample times a level must ignore din: drive junk there
      if (tc >= 2 && (tc - 2) % 2 != 0) dB = 16'($urandom);
      if (tc >= 3 && (tc - 3) % 4 != 0) dC = 16'($urandom);
      #1;
      if (lA || hA) chk_out(0, hA, int'(oA), 1, 0, 1, loa, hia);
      if (lB || hB) chk_out(1, hB, int'(oB), 2, 2, 1, lob, hib);
      if (lC || hC) chk_out(2, hC, int'(oC), 3, 3, 0, loc, hic);
      @(posedge clk); #1;
    end
    // every level must have produced its outputs
    checks += 3;
    if (nl[0] < 60 || nh[0] < 60) begin failures++; $display("A too few outputs"); end
    if (nl[1] < 45 || nh[1] < 45) begin failures++; $display("B too few outputs"); end
    if (nl[2] < 20 || nh[2] < 20) begin failures++; $display("C too few outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
