// tb_dru -- self-checking test of the data reorder unit for M = 4 and M = 6.
// Runs the level-1 schedule (load in even cycles, reverse in odd cycles) on
// a random sample stream and checks the registers against the sample window:
// after the load of sample 2n, r[i] = x_{2n-i}; after the reversal,
// r[i] = x_{2n-(M-1-i)} (samples before x_0 are zero).
module tb_dru;
  logic clk = 0, rst_n = 0, load = 0, rev = 0;
  logic signed [15:0] ie = '0, io = '0;
  logic signed [15:0] r4 [4];
  logic signed [15:0] r6 [6];
  int x [$];
  int checks = 0, failures = 0;

  dru #(.M(4), .W(16)) dut4 (.clk, .rst_n, .load, .rev, .ie, .io, .r(r4));
  dru #(.M(6), .W(16)) dut6 (.clk, .rst_n, .load, .rev, .ie, .io, .r(r6));

  always #5 clk = ~clk;

  function automatic int xs(int k);
    return (k >= 0) ? x[k] : 0;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) x.push_back($signed(16'($urandom)));
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      // even cycle: x_{2n} on I_e, x_{2n-1} on I_o
      @(negedge clk);
      ie = 16'(xs(2 * n)); io = 16'(xs(2 * n - 1)); load = 1; rev = 0;
      @(posedge clk); #1;
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (r4[i] !== 16'(xs(2 * n - i))) begin failures++; $display("M4 load n=%0d r[%0d]=%0d", n, i, r4[i]); end
      end
      for (int i = 0; i < 6; i++) begin
        checks++;
        if (r6[i] !== 16'(xs(2 * n - i))) begin failures++; $display("M6 load n=%0d r[%0d]=%0d", n, i, r6[i]); end
      end
      // odd cycle: reverse
      @(negedge clk);
      ie = 16'($urandom); io = 16'($urandom); load = 0; rev = 1;
      @(posedge clk); #1;
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (r4[i] !== 16'(xs(2 * n - (3 - i)))) begin failures++; $display("M4 rev n=%0d r[%0d]", n, i); end
      end
      for (int i = 0; i < 6; i++) begin
        checks++;
        if (r6[i] !== 16'(xs(2 * n - (5 - i)))) begin failures++; $display("M6 rev n=%0d r[%0d]", n, i); end
      end
      // a cycle with neither strobe: registers hold
      if (n % 7 == 3) begin
        @(negedge clk);
        rev = 0; ie = 16'($urandom);
        @(posedge clk); #1;
        checks++;
        if (r4[3] !== 16'(xs(2 * n))) begin failures++; $display("hold failed"); end
      end
      @(negedge clk); rev = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
