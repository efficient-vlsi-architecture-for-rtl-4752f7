// psum_acc -- partial-sum accumulator at the output of a time-shared level.
//
// From level 2 on, each multiplier of a level serves 2^(j-1) taps in
// successive cycles, so one output coefficient is the sum of 2^(j-1) partial
// sums. sum = psum + acc is the running total; acc takes sum at every clock
// edge except at the end of the cycle with clr high (the time T_j at which a
// complete coefficient leaves), where it is cleared so that the next
// coefficient starts from zero.
//
// Interface: psum and sum are full-precision two's complement of width AW;
// sum is combinational from psum and the register. Reset clears the register.
module psum_acc #(
  parameter int AW = 27
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clr,
  input  logic signed [AW-1:0] psum,
  output logic signed [AW-1:0] sum
);

  logic signed [AW-1:0] acc;

  assign sum = psum + acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   acc <= '0;
    else if (clr) acc <= '0;
    else          acc <= sum;
  end

endmodule
