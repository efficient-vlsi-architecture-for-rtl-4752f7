// dwt_level -- one decomposition level of the 1D DWT.
//
// Level j (LEVEL) takes one sample every 2^(j-1) cycles and, every 2^j
// cycles, puts out one lowpass and one highpass coefficient:
//   v_n = sum_m h_m x_{2n-m}          (lowpass)
//   u_n = sum_m (-1)^(M-1-m) h_{M-1-m} x_{2n-m}   (highpass)
// eo_split catches the odd samples, the dru keeps the last M samples in
// lowpass order and then, reversed, in highpass order, and shared_filter
// works through the taps with ceil(M/2^(j-1)) multipliers, 2^(j-1) taps per
// multiplier, one tap per cycle. From level 2 on, psum_acc adds the partial
// sums of those cycles. level_ctrl times it all from the global count t.
//
// Timing: the first input sample must be on din at t = OFF. Lowpass v_n is on
// dout with l_valid at t = OFF + 2^j*n + 2^(j-1) + PIPE, and highpass u_n with
// h_valid 2^(j-1) cycles later. din is sampled only at the two switching
// times of each period, so a preceding level's dout can be wired straight in.
//
// Output format: the full-precision sum shifted right by the coefficient
// fraction bits (truncation toward minus infinity) and cut to W bits, so dout
// has the same Q10.5 format as din; an overflowing sum wraps. The level
// structure follows the source design; the output rounding and overflow
// behaviour are this design's choices.
module dwt_level
  import dwt_pkg::*;
#(
  parameter int LEVEL = 1,
  parameter int M     = 4,
  parameter int OFF   = 0,
  parameter bit PIPE  = 1'b1,
  parameter int TW    = 3,
  parameter int W     = DATA_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [TW-1:0]       t,
  input  logic signed [W-1:0] din,
  output logic signed [W-1:0] dout,
  output logic                l_valid,
  output logic                h_valid
);

  localparam int S   = 1 << (LEVEL - 1);
  localparam int SLW = (LEVEL > 1) ? LEVEL - 1 : 1;
  localparam int AW  = W + COEF_W + $clog2(M) + 1;

  logic                load, rev, hi, clr;
  logic [SLW-1:0]      slot;
  logic signed [W-1:0] ie, io;
  logic signed [W-1:0] r [M];
  logic signed [AW-1:0] psum, sum;

  level_ctrl #(.LEVEL(LEVEL), .OFF(OFF), .PIPE(PIPE), .TW(TW)) u_ctrl (
    .clk, .rst_n, .t, .load, .rev, .slot, .hi, .clr, .l_valid, .h_valid
  );

  eo_split #(.W(W)) u_split (
    .clk, .rst_n, .ld_odd(rev), .din, .ie, .io
  );

  dru #(.M(M), .W(W)) u_dru (
    .clk, .rst_n, .load, .rev, .ie, .io, .r
  );

  shared_filter #(.M(M), .S(S), .PIPE(PIPE), .W(W), .CW(COEF_W)) u_filt (
    .clk, .rst_n, .r, .slot, .hi, .psum
  );

  generate
    if (LEVEL > 1) begin : g_acc
      psum_acc #(.AW(AW)) u_acc (.clk, .rst_n, .clr, .psum, .sum);
    end else begin : g_noacc
      assign sum = psum;
    end
  endgenerate

  assign dout = W'(sum >>> COEF_FRAC);

endmodule
