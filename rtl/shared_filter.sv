// shared_filter -- the one set of multipliers that a level shares between its
// lowpass and highpass filters.
//
// A level with S = 2^(j-1) time slots has P = ceil(M/S) multipliers.
// Multiplier p works on tap i = p*S + slot: a multiplexer picks DRU register
// r[i] and the coefficient h_i. Because the DRU hands over the window in
// lowpass order and then, reversed, in highpass order, the highpass filter
// only needs the odd taps negated (g_{M-1-m} = (-1)^m h_m), so in the hi
// phase the coefficient of every odd tap is negated (the "+-h" inputs of the
// block diagrams). Taps past M-1 (when S does not divide M) multiply zero.
//
// With PIPE = 1 each product is held in a pipeline latch, and psum, the sum
// of the P latched products, appears one cycle after slot/hi. With PIPE = 0
// psum is combinational. psum is full precision (AW bits, no rounding).
//
// Structure and sign sharing follow the source design; the coefficient
// negation before the multiplier, full-precision sums and zero-filled unused
// slots are this design's choices.
module shared_filter
  import dwt_pkg::*;
#(
  parameter int M     = 4,
  parameter int S     = 1,
  parameter bit PIPE  = 1'b1,
  parameter int W     = DATA_W,
  parameter int CW    = COEF_W,
  localparam int SLW  = (S > 1) ? $clog2(S) : 1,
  localparam int AW   = W + CW + $clog2(M) + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [W-1:0]  r [M],
  input  logic [SLW-1:0]       slot,
  input  logic                 hi,
  output logic signed [AW-1:0] psum
);

  localparam int P  = (M + S - 1) / S;
  localparam int PW = W + CW;

  logic signed [W-1:0]  opnd [P];
  logic signed [CW-1:0] coef [P];
  logic signed [PW-1:0] prod [P];
  logic signed [PW-1:0] prod_q [P];

  always_comb begin
    for (int p = 0; p < P; p++) begin
      opnd[p] = '0;
      coef[p] = '0;
      for (int s = 0; s < S; s++) begin
        if (int'(slot) == s && p * S + s < M) begin
          opnd[p] = r[p*S+s];
          coef[p] = CW'(daub_h(M, p * S + s));
          if (hi && ((p * S + s) % 2 == 1)) coef[p] = -coef[p];
        end
      end
      prod[p] = PW'(opnd[p]) * PW'(coef[p]);
    end
  end

  generate
    if (PIPE) begin : g_latch
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) for (int p = 0; p < P; p++) prod_q[p] <= '0;
        else        for (int p = 0; p < P; p++) prod_q[p] <= prod[p];
      end
    end else begin : g_wire
      always_comb for (int p = 0; p < P; p++) prod_q[p] = prod[p];
    end
  endgenerate

  always_comb begin
    psum = '0;
    for (int p = 0; p < P; p++) psum = psum + AW'(prod_q[p]);
  end

endmodule
