// tb_psum_acc -- self-checking test of the partial-sum accumulator.
// Feeds random partial sums with a clear strobe every 4 cycles (as at
// level 3) and then at random, and checks sum = psum + (sum of the partial
// sums since the last clear).
module tb_psum_acc;
  logic clk = 0, rst_n = 0, clr = 0;
  logic signed [26:0] psum = '0, sum;
  longint run;
  int checks = 0, failures = 0;

  psum_acc #(.AW(27)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [26:0] e;
    run = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      psum = $signed(27'($urandom)) >>> 6;
      clr  = (n < 500) ? (n % 4 == 3) : (($urandom % 3) == 0);
      #1;
      e = 27'(run + psum);
      checks++;
      if (sum !== e) begin failures++; $display("n=%0d sum %0d exp %0d", n, sum, e); end
      run = clr ? 0 : run + psum;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
