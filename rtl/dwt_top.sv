// dwt_top -- J-level one-dimensional discrete wavelet transform with a
// data reorder unit (DRU) per level.
//
// A cascade of J dwt_level blocks: level 1 filters the input stream, and the
// lowpass output L^j of level j is the input of level j+1. Because decimation
// halves the sample rate at each level, level j gets by with
// ceil(M/2^(j-1)) multipliers (4, 2, 1 for M = 4, J = 3), each busy every
// cycle. Outputs are the highpass bands H^1..H^J and the last lowpass band L^J.
//
// Timing: din takes one sample per clock; sample a_t is read in the t-th
// cycle after reset is released (t = 0, 1, ...). Samples before a_0 count as
// zero. A free-running J-bit counter times every level; level j starts at
// OFF_j = Delta_{j-1}, where Delta_j = 2^j - 1 + j*PIPE is the cycle in
// which the first lowpass coefficient of level j appears. Lowpass n of level
// j appears at Delta_j + 2^j*n and highpass n at Delta_j + 2^j*n + 2^(j-1),
// each for one cycle with its valid flag; outputs are 0 when not valid.
//
// The cascade, multiplier counts and switching times follow the source design
// (PIPE = 1 includes its pipeline latches after the multipliers); the
// counter-based timing, valid flags and zeroed idle outputs are this design's.
module dwt_top
  import dwt_pkg::*;
#(
  parameter int M    = 4,
  parameter int J    = 3,
  parameter bit PIPE = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  data_t             din,
  output data_t             h_out   [J],
  output logic  [J-1:0]     h_valid,
  output data_t             l_out,
  output logic              l_valid
);

  initial begin
    assert (daub_known(M)) else $error("dwt_top: no coefficients for this M");
    assert (J >= 1) else $error("dwt_top: J must be at least 1");
  end

  logic [J-1:0] t;
  data_t        lin  [J+1];
  data_t        dout [J];
  logic [J-1:0] lv, hv;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) t <= '0;
    else        t <= t + 1'b1;
  end

  assign lin[0] = din;

  for (genvar j = 1; j <= J; j++) begin : g_lvl
    localparam int OFF = (1 << (j - 1)) - 1 + (j - 1) * int'(PIPE);
    dwt_level #(.LEVEL(j), .M(M), .OFF(OFF), .PIPE(PIPE), .TW(J), .W(DATA_W)) u_lvl (
      .clk, .rst_n, .t,
      .din(lin[j-1]), .dout(dout[j-1]), .l_valid(lv[j-1]), .h_valid(hv[j-1])
    );
    assign lin[j]     = dout[j-1];
    assign h_out[j-1] = hv[j-1] ? dout[j-1] : '0;
  end

  assign h_valid = hv;
  assign l_valid = lv[J-1];
  assign l_out   = lv[J-1] ? dout[J-1] : '0;

endmodule
