// dwt_pkg -- word lengths, types and filter coefficients shared by the
// one-dimensional DWT datapath.
//
// Data samples are 16-bit two's complement with 5 fractional bits (Q10.5),
// and filter coefficients are 8-bit; both widths follow the source design.
// The coefficient binary point is this design's choice: every Daubechies
// coefficient has a magnitude below 1, so a signed Q1.7 format is used and
// each stored value is round(h * 2^7).
//
// Only the lowpass taps h_m are stored. The highpass taps follow from the
// mirror-filter relation g_{M-1-m} = (-1)^m h_m, which is what lets one set
// of multipliers serve both filters.
package dwt_pkg;

  localparam int DATA_W    = 16;  // sample width
  localparam int DATA_FRAC = 5;   // fractional bits of a sample
  localparam int COEF_W    = 8;   // coefficient width
  localparam int COEF_FRAC = 7;   // fractional bits of a coefficient

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [COEF_W-1:0] coef_t;

  // Daubechies lowpass taps, round(h_m * 128):
  //   M=4: 0.48296291314453, 0.83651630373781, 0.22414386804201, -0.12940952255126
  //   M=6: 0.33267055295008, 0.80689150931109, 0.45987750211849,
  //        -0.13501102001025, -0.08544127388203, 0.03522629188571
  // Other filter lengths have no stored taps and return 0.
  function automatic coef_t daub_h(int m_taps, int m);
    coef_t c;
    c = '0;
    if (m_taps == 4) begin
      case (m)
        0: c = 8'sd62;
        1: c = 8'sd107;
        2: c = 8'sd29;
        3: c = -8'sd17;
        default: c = '0;
      endcase
    end else if (m_taps == 6) begin
      case (m)
        0: c = 8'sd43;
        1: c = 8'sd103;
        2: c = 8'sd59;
        3: c = -8'sd17;
        4: c = -8'sd11;
        5: c = 8'sd5;
        default: c = '0;
      endcase
    end
    return c;
  endfunction

  // True when daub_h() has taps for this filter length.
  function automatic bit daub_known(int m_taps);
    return (m_taps == 4) || (m_taps == 6);
  endfunction

endpackage
