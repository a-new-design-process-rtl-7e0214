// atb_pkg: word lengths and shared types of the fixed-point "Analyze Traffic
// Burst" receiver block.
//
// The receiver chain carries four word lengths, one per point of its signal
// flow graph:
//   P1  ADC samples, 12 bits (the radio front end's converter accuracy).
//   P2  CIC decimator output. Full precision would be 12 + 4*7 = 40 bits; it
//       is truncated to 24 bits, as the reference receiver does.
//   P3  correlator products, 24 x 24 -> 47 bits.
//   P4  everything after the correlator (correlation values, CORDIC
//       magnitudes, interpolated amplitudes, valley power) is held in the
//       minimised fixed-point format found by the word-length design process:
//       I_WL = 62 integer bits and F_WL = 4 fraction bits (66 bits).
//       The relaxed alternative of the same process is I_WL = 52, F_WL = 2.
// The P4 format is also a parameter (IWL, FWL) of the top and correlator.
// The sinc interpolation coefficients are 24-bit signed values with 22
// fraction bits (their largest value, 1.0, needs one integer bit plus sign).
package atb_pkg;

  // P1
  parameter int unsigned ADC_W    = 12;
  // P2: CIC decimator
  parameter int unsigned CIC_N    = 4;    // integrator/comb stages
  parameter int unsigned CIC_M    = 1;    // comb differential delay
  parameter int unsigned CIC_RMAX = 128;  // largest decimation rate, log2(M*R) = 7
  parameter int unsigned CIC_FULL_W = ADC_W + $clog2((CIC_M * CIC_RMAX) ** CIC_N); // 40
  parameter int unsigned SAMP_W   = 24;   // truncated P2 width
  // P3: correlator
  parameter int unsigned REF_W    = 24;   // training-sequence reference width
  parameter int unsigned PROD_W   = SAMP_W + REF_W - 1;  // 47
  // P4: minimised fixed-point format
  parameter int unsigned I_WL     = 62;
  parameter int unsigned F_WL     = 4;
  parameter int unsigned WL       = I_WL + F_WL;  // 66
  // interpolation coefficients
  parameter int unsigned SINC_W   = 24;
  parameter int unsigned SINC_FRAC = 22;
  // GSM burst handling
  parameter int unsigned BURST_LEN = 156;  // decimated samples per burst
  parameter int unsigned REF_LEN   = 16;   // training-sequence samples correlated
  parameter int unsigned CHAN_TAPS = 5;    // channel-estimate taps reported

  typedef struct packed {
    logic signed [SAMP_W-1:0] i;
    logic signed [SAMP_W-1:0] q;
  } iq_samp_t;

endpackage
