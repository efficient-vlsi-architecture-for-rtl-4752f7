// tb_shared_filter -- self-checking test of the shared multiplier bank.
// Four instances: M = 4 with 1, 2 and 4 time slots (levels 1-3, with
// pipeline latches) and M = 6 with 4 slots and no latch (two multipliers,
// two idle tap positions). Random register contents, slot and phase are
// applied every cycle; psum must equal sum over the slot's taps i of
// r[i] * h_i, with h_i negated for odd i in the highpass phase, one cycle
// later when latched. Coefficients come from the real Daubechies taps.
module tb_shared_filter;
  import dwt_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic signed [15:0] r4 [4];
  logic signed [15:0] r6 [6];
  logic [1:0] slot = '0;
  logic       hi = 0;
  logic signed [26:0] ps1, ps2, ps4;
  logic signed [27:0] ps6;
  int checks = 0, failures = 0;

  shared_filter #(.M(4), .S(1), .PIPE(1)) d1 (.clk, .rst_n, .r(r4), .slot(1'b0),  .hi, .psum(ps1));
  shared_filter #(.M(4), .S(2), .PIPE(1)) d2 (.clk, .rst_n, .r(r4), .slot(slot[0]), .hi, .psum(ps2));
  shared_filter #(.M(4), .S(4), .PIPE(1)) d4 (.clk, .rst_n, .r(r4), .slot(slot),  .hi, .psum(ps4));
  shared_filter #(.M(6), .S(4), .PIPE(0)) d6 (.clk, .rst_n, .r(r6), .slot(slot),  .hi, .psum(ps6));

  always #5 clk = ~clk;

  function automatic longint expect_sum(int m_taps, int s, int sl, bit h, int rv [$]);
    longint acc;
    int c;
    acc = 0;
    for (int i = sl; i < m_taps; i += s) begin
      c = qcoef(m_taps, i);
      if (h && (i % 2 == 1)) c = -c;
      acc += longint'(rv[i]) * c;
    end
    return acc;
  endfunction

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("%s got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v4 [$], v6 [$];
    longint e1, e2, e4;
    for (int i = 0; i < 4; i++) r4[i] = '0;
    for (int i = 0; i < 6; i++) r6[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      v4 = {}; v6 = {};
      for (int i = 0; i < 4; i++) begin r4[i] = 16'($urandom); v4.push_back(int'(r4[i])); end
      for (int i = 0; i < 6; i++) begin r6[i] = 16'($urandom); v6.push_back(int'(r6[i])); end
      slot = 2'($urandom);
      hi   = 1'($urandom);
      #1;
      chk("M6 S4 comb", longint'(ps6), expect_sum(6, 4, int'(slot), hi, v6));
      e1 = expect_sum(4, 1, 0, hi, v4);
      e2 = expect_sum(4, 2, int'(slot[0]), hi, v4);
      e4 = expect_sum(4, 4, int'(slot), hi, v4);
      @(posedge clk); #1;
      chk("M4 S1", longint'(ps1), e1);
      chk("M4 S2", longint'(ps2), e2);
      chk("M4 S4", longint'(ps4), e4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
