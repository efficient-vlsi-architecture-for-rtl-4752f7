// tb_dwt_top -- end-to-end test of the J-level DWT at its default size
// (Daubechies M = 4, J = 3 levels, pipeline latches on).
//
// A random stream of N samples (|x| < 128.0 in Q10.5), followed by zeros, is
// fed one sample per clock from the first cycle after reset. The reference
// model computes each level from the definition of the filter bank; every
// valid H^1..H^J and L^J output is compared, in order, with it, and its cycle
// with Delta_j + 2^j n (lowpass) or Delta_j + 2^j n + 2^(j-1) (highpass),
// where Delta_j = 2^j - 1 + j (one cycle per pipeline latch). The run also counts how often each mechanism
// of the design acted: DRU loads and reversals and accumulator clears per
// level, time-shared multiplier slots, highpass phases and outputs of every
// band; a mechanism that never acted is a failure.
module tb_dwt_top;
  import dwt_ref_pkg::*;
  import dwt_pkg::*;
  localparam int M  = 4;
  localparam int J  = 3;
  localparam bit PP = 1'b1;  // pipeline latches, as the design's default
  localparam int N  = 512;
  localparam int NC = N + 64;

  logic  clk = 0, rst_n = 0;
  data_t din = '0;
  data_t h_out [J];
  logic [J-1:0] h_valid;
  data_t l_out;
  logic  l_valid;
  int checks = 0, failures = 0;
  int tc;

  dwt_top dut (.*);

  always #5 clk = ~clk;

  int x [$];
  int lo [J+1][$];
  int hi [J+1][$];
  int nh [J+1];
  int nl;

  int cnt_load [J], cnt_rev [J], cnt_clr [J], cnt_slot [J], cnt_hi [J];

  initial begin
    repeat (NC + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int delta(int j);
    return (1 << j) - 1 + j * int'(PP);
  endfunction

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("t=%0d %s got %0d exp %0d", tc, what, got, exp); end
  endtask

  // mechanism counters, sampled from inside the design
  for (genvar g = 1; g <= J; g++) begin : g_cnt
    always @(posedge clk) if (rst_n) begin
      if (dut.g_lvl[g].u_lvl.load) cnt_load[g-1]++;
      if (dut.g_lvl[g].u_lvl.rev)  cnt_rev[g-1]++;
      if (dut.g_lvl[g].u_lvl.hi)   cnt_hi[g-1]++;
      if (dut.g_lvl[g].u_lvl.clr)  cnt_clr[g-1]++;
      if (dut.g_lvl[g].u_lvl.slot != 0) cnt_slot[g-1]++;
    end
  end

  initial begin
    // coefficients in the design against round(h * 128) of the real taps
    for (int m = 0; m < M; m++) chk($sformatf("h%0d", m), int'(daub_h(M, m)), qcoef(M, m));

    for (int i = 0; i < N; i++) x.push_back(int'($urandom_range(8191)) - 4096);
    for (int i = N; i < NC; i++) x.push_back(0);
    lo[0] = x;
    for (int j = 1; j <= J; j++) dwt_step(M, lo[j-1], lo[j-1].size() / 2, lo[j], hi[j]);
    for (int j = 0; j <= J; j++) nh[j] = 0;
    nl = 0;

    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (tc = 0; tc < NC; tc++) begin
      din = data_t'(x[tc]);
      #1;
      for (int j = 1; j <= J; j++) begin
        if (h_valid[j-1]) begin
          int n;
          n = nh[j];
          chk($sformatf("H%0d[%0d] time", j, n), tc, delta(j) + (1 << j) * n + (1 << (j - 1)));
          if (n < hi[j].size()) chk($sformatf("H%0d[%0d]", j, n), int'(h_out[j-1]), hi[j][n]);
          nh[j]++;
        end else begin
          chk($sformatf("H%0d idle", j), int'(h_out[j-1]), 0);
        end
      end
      if (l_valid) begin
        chk($sformatf("L%0d[%0d] time", J, nl), tc, delta(J) + (1 << J) * nl);
        if (nl < lo[J].size()) chk($sformatf("L%0d[%0d]", J, nl), int'(l_out), lo[J][nl]);
        nl++;
      end
      @(posedge clk); #1;
    end

    // every band produced its share of the stream
    for (int j = 1; j <= J; j++) begin
      checks++;
      if (nh[j] < (NC - delta(j)) / (1 << j)) begin
        failures++; $display("H%0d: only %0d outputs", j, nh[j]);
      end
    end
    checks++;
    if (nl < (NC - delta(J)) / (1 << J)) begin failures++; $display("L%0d: only %0d outputs", J, nl); end

    // every mechanism acted
    for (int j = 0; j < J; j++) begin
      $display("level %0d: loads %0d reversals %0d highpass cycles %0d accumulator clears %0d shared slots %0d",
               j + 1, cnt_load[j], cnt_rev[j], cnt_hi[j], (j > 0) ? cnt_clr[j] : 0, cnt_slot[j]);
      checks += 3;
      if (cnt_load[j] == 0) begin failures++; $display("level %0d never loaded", j + 1); end
      if (cnt_rev[j] == 0)  begin failures++; $display("level %0d never reversed", j + 1); end
      if (cnt_hi[j] == 0)   begin failures++; $display("level %0d never in highpass phase", j + 1); end
      if (j > 0) begin
        checks += 2;
        if (cnt_clr[j] == 0)  begin failures++; $display("level %0d accumulator never cleared", j + 1); end
        if (cnt_slot[j] == 0) begin failures++; $display("level %0d multipliers never time-shared", j + 1); end
      end
    end
    $display("outputs: H1 %0d H2 %0d H3 %0d L%0d %0d", nh[1], nh[2], nh[3], J, nl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
