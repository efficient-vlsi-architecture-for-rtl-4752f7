// level_ctrl -- schedule of one DWT level, decoded from a global cycle count.
//
// Level j (LEVEL) takes one input sample every S = 2^(j-1) cycles and has a
// period of 2S cycles: the even sample x_{2k} arrives at t = OFF + 2S*k and
// the odd one x_{2k+1} at t = OFF + 2S*k + S. With u = (t - OFF - 1) mod 2S:
//   load  u == 2S-1  even sample present: DRU takes I_e and I_o
//   rev   u == S-1   odd sample present: I_o is loaded, DRU reverses
//                    (only once the level has taken its first sample, so
//                    whatever is on din before then never reaches I_o)
//   hi    u >= S     the DRU holds the highpass order
//   slot  u mod S    which tap group the shared multipliers work on
// For the reference timing (OFF = 0, 1, 3 without pipeline latches) this
// gives the switching cycles 2k/2k+1, 4k+1/4k+3 and 8k+3/8k+7 of levels 1-3.
//
// With PIPE = 1 the products pass a pipeline latch, so hi, the last-slot flag
// and the primed flag are delayed by one cycle to line up with them:
//   clr      last slot of a half period (T_j): the accumulator is cleared
//   l_valid  clr in the lowpass half: the level output is a lowpass value
//   h_valid  clr in the highpass half: the level output is a highpass value
// The valid flags stay low until the level has taken its first sample
// (primed), so the zero-padded start produces no output.
//
// The switching times follow the source design; decoding them from one
// free-running counter and the valid/primed flags are this design's own.
// t must count modulo 2^TW with TW >= LEVEL.
module level_ctrl #(
  parameter int LEVEL = 1,
  parameter int OFF   = 0,
  parameter bit PIPE  = 1'b1,
  parameter int TW    = 3,
  localparam int SLW  = (LEVEL > 1) ? LEVEL - 1 : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [TW-1:0]  t,
  output logic           load,
  output logic           rev,
  output logic [SLW-1:0] slot,
  output logic           hi,
  output logic           clr,
  output logic           l_valid,
  output logic           h_valid
);

  localparam int S = 1 << (LEVEL - 1);

  initial begin
    assert (LEVEL >= 1 && TW >= LEVEL) else $error("level_ctrl: need 1 <= LEVEL <= TW");
  end

  logic [LEVEL-1:0] u;
  logic             last;
  logic             primed;
  logic             hi_d, last_d, primed_d;

  assign u      = LEVEL'(t - TW'(OFF + 1));
  assign load   = (u == LEVEL'(2 * S - 1));
  assign rev    = (u == LEVEL'(S - 1)) && primed;
  assign hi     = u[LEVEL-1];

  generate
    if (LEVEL > 1) begin : g_slot
      assign slot = u[SLW-1:0];
      assign last = (slot == SLW'(S - 1));
    end else begin : g_one
      assign slot = '0;
      assign last = 1'b1;
    end
  endgenerate

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    primed <= 1'b0;
    else if (load) primed <= 1'b1;
  end

  generate
    if (PIPE) begin : g_pipe
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          hi_d     <= 1'b0;
          last_d   <= 1'b0;
          primed_d <= 1'b0;
        end else begin
          hi_d     <= hi;
          last_d   <= last;
          primed_d <= primed;
        end
      end
    end else begin : g_nopipe
      assign hi_d     = hi;
      assign last_d   = last;
      assign primed_d = primed;
    end
  endgenerate

  assign clr     = last_d;
  assign l_valid = last_d & ~hi_d & primed_d;
  assign h_valid = last_d &  hi_d & primed_d;

endmodule
