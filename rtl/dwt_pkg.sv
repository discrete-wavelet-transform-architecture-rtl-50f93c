// dwt_pkg: word widths, fixed-point format, Daubechies-4 filter coefficients
// and controller select bundles shared by the three-level folded DWT
// analysis and synthesis modules.
//
// Number format: samples and DWT coefficients are 8-bit two's complement.
// Filter coefficients are 25-bit two's complement with the binary point two
// bits below the MSB (one sign bit, one integer bit, 23 fraction bits), so
// their range is +/-(2 - 2^-23). The MAC accumulates 32 bits and the result
// is the accumulator shifted right by 23 (bits 30:23) with saturation.
//
// Coefficient sets. With h0..h3 the Daubechies length-4 low-pass taps
//   h0 = (1+sqrt3)/(4 sqrt2), h1 = (3+sqrt3)/(4 sqrt2),
//   h2 = (3-sqrt3)/(4 sqrt2), h3 = (1-sqrt3)/(4 sqrt2)
// the high-pass taps are the quadrature mirror g = {h3, -h2, h1, -h0}.
// The analysis set is divided by sum(h) = sqrt2 so the third low-pass stage
// of a full-scale DC input stays at unity gain and never overflows; the
// synthesis set is multiplied by sqrt2 to undo it. Each constant below is
// round(2^23 * tap * k) with k = 1/sqrt2 (analysis) or sqrt2 (synthesis).
package dwt_pkg;

  localparam int unsigned SW   = 8;   // sample / DWT coefficient width
  localparam int unsigned CW   = 25;  // filter coefficient width
  localparam int unsigned AW   = 32;  // accumulator width
  localparam int unsigned FRAC = 23;  // fraction bits of a filter coefficient
  localparam int unsigned NTAP = 4;   // filter taps (MACs per output sample)

  typedef logic signed [SW-1:0] sample_t;
  typedef logic signed [CW-1:0] coef_t;
  typedef logic        [AW-1:0] acc_t;
  typedef logic        [2:0]    phase_t;   // sample index modulo 8
  typedef logic        [1:0]    tap_t;     // MAC step within a sample (csel)

  // Four taps, element k is the coefficient applied at MAC step k.
  typedef logic [NTAP-1:0][CW-1:0] coef_set_t;

  // Analysis (normalized by 1/sqrt2)
  localparam coef_set_t H_ANA = {25'h1F44985, 25'h0144985, 25'h04BB67B, 25'h02BB67B};
  localparam coef_set_t G_ANA = {25'h1D44985, 25'h04BB67B, 25'h1EBB67B, 25'h1F44985};
  // Synthesis taps (de-normalized by sqrt2), indexed by tap number
  localparam coef_set_t H_SYN = {25'h1E8930A, 25'h028930A, 25'h0976CF6, 25'h0576CF6};
  localparam coef_set_t G_SYN = {25'h1A8930A, 25'h0976CF6, 25'h1D76CF6, 25'h1E8930A};

  // Synthesis processing elements. Each applies its four taps to the
  // operands (current high-pass, previous high-pass, current low-pass,
  // previous low-pass). The element whose register O_even is read in even
  // phases applies (g3, g1, h3, h1); the one behind O_odd applies
  // (g2, g0, h2, h0). With this pairing the final stage emits the two
  // samples of each pair in time order.
  localparam coef_set_t SYN_EVEN = {H_SYN[1], H_SYN[3], G_SYN[1], G_SYN[3]};
  localparam coef_set_t SYN_ODD  = {H_SYN[0], H_SYN[2], G_SYN[0], G_SYN[2]};

  // Analysis controller selects (names follow the cycle classes 8k+j)
  typedef struct packed {
    logic s2k;    // even sample phase: FPE operands come from the input line
    logic s4k;    // phase 0 or 4
    logic s4k1;   // phase 1 or 5
    logic s8k;    // phase 0
  } sel_a_t;

  // Synthesis controller selects
  typedef struct packed {
    logic s2k;    // even sample phase
    logic s4k3;   // phase 3 or 7
    logic s8k;    // phase 0
    logic s8k1;   // phase 1
    logic s8k2;   // phase 2
    logic s8k5;   // phase 5
    logic s8k6;   // phase 6
  } sel_s_t;

  // Sub-band carried by the analysis output stream in each sample phase:
  // odd phases the first-level high-pass o, phases 2 and 6 the second-level
  // high-pass r, phase 4 the third-level high-pass u, phase 0 the third-level
  // low-pass v.
  typedef enum logic [1:0] {BAND_HP1, BAND_HP2, BAND_HP3, BAND_LP3} band_t;

  function automatic band_t band_of_phase(phase_t ph);
    if (ph[0])                 return BAND_HP1;
    else if (ph[1])            return BAND_HP2;
    else if (ph[2])            return BAND_HP3;
    else                       return BAND_LP3;
  endfunction

endpackage
