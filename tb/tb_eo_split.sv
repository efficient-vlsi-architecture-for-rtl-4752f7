// tb_eo_split -- self-checking test of the even/odd splitter.
// Drives random samples with a random odd-load strobe and checks that I_e
// follows the input and I_o holds the last sample taken with ld_odd.
module tb_eo_split;
  logic clk = 0, rst_n = 0, ld_odd = 0;
  logic signed [15:0] din = '0, ie, io;
  logic signed [15:0] exp_io;
  int checks = 0, failures = 0;

  eo_split #(.W(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_io = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++; if (io !== 16'sd0) begin failures++; $display("reset value wrong"); end
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      din = 16'($urandom);
      ld_odd = ($urandom % 2) == 1;
      #1;
      checks++; if (ie !== din) begin failures++; $display("ie mismatch"); end
      if (ld_odd) exp_io = din;
      @(posedge clk); #1;
      checks++;
      if (io !== exp_io) begin failures++; $display("io %0d exp %0d", io, exp_io); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
