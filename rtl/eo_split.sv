// eo_split -- even/odd splitter in front of a DRU.
//
// The input stream of a level carries one sample every 2^(j-1) cycles. The
// even samples x_{2k} go straight on as I_e; the DRU only takes I_e at the
// even-sample time, so the demultiplexer of the block diagrams reduces to a
// wire here. The odd samples x_{2k+1} are caught in the I_o register when
// ld_odd is high (cycles 2k+1, 4k+3, 8k+7 at levels 1, 2, 3 of the
// reference timing) and held until the DRU takes them at the next even
// sample time.
//
// Interface: din is the level input, ie/io feed the DRU. I_o is loaded at the
// rising clock edge that ends a cycle with ld_odd high. Reset clears I_o to
// zero (samples before the first one count as zero); reset behaviour is this
// design's choice.
module eo_split #(
  parameter int W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ld_odd,
  input  logic signed [W-1:0] din,
  output logic signed [W-1:0] ie,
  output logic signed [W-1:0] io
);

  assign ie = din;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      io <= '0;
    else if (ld_odd) io <= din;
  end

endmodule
