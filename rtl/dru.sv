// dru -- data reorder unit of one DWT level.
//
// M registers r[0..M-1] (a, b, c, d, ... in the block diagrams) hold the
// window of the last M input samples, in the order a shared filter needs:
//   load (even-sample time): r[0] <- I_e, r[1] <- I_o, and r[2..M-1] reverse
//        among themselves (r[i] <- r[M+1-i]). Afterwards r[i] = x_{2n-i},
//        the lowpass order: sum_i h_i r[i] = v_n.
//   rev  (odd-sample time):  all M registers reverse (r[i] <- r[M-1-i]).
//        Afterwards r[i] = x_{2n-(M-1-i)}, the highpass order:
//        sum_i (-1)^i h_i r[i] = u_n.
// The next load again reverses r[2..M-1], which puts the older half of the
// window back into lowpass order, so each register only ever chooses between
// two sources. Between strobes the registers hold (needed at levels 2 and up,
// where the strobes are 2^j cycles apart).
//
// The register network follows the source design; the hold, the reset to zero
// and the restriction to even M (every Daubechies filter has even length) are
// this design's choices. load and rev must not be high together.
module dru #(
  parameter int M = 4,
  parameter int W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic                rev,
  input  logic signed [W-1:0] ie,
  input  logic signed [W-1:0] io,
  output logic signed [W-1:0] r [M]
);

  initial begin
    assert (M >= 2 && M % 2 == 0) else $error("dru: M must be even and at least 2");
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < M; i++) r[i] <= '0;
    end else if (load) begin
      r[0] <= ie;
      r[1] <= io;
      for (int i = 2; i < M; i++) r[i] <= r[M+1-i];
    end else if (rev) begin
      for (int i = 0; i < M; i++) r[i] <= r[M-1-i];
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(load && rev))
    else $error("dru: load and rev in the same cycle");

endmodule
