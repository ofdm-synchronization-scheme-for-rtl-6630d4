// hsm_pkg: constants and types shared by the blocks of the OFDM burst
// synchronizer (the "Hypersynch Module", HSM).
//
// The preamble layout follows the burst format of the design: section A is
// five 16-sample A fields followed by one inverted field (-A), section B is
// four identical 32-sample B fields, section C (channel estimation) follows.
// The auto-correlation delay (16), window (64), the B-section delay (32), the
// 96-product frequency average, the nine timing hypotheses (+/-4 samples) and
// the 0.55 detection threshold are the design's figures.
//
// Own choices: 16-bit signed I/Q samples, the sample values of the A and B
// fields (QPSK symbols +/-AMP +/-jAMP whose signs come from a 16-bit
// Fibonacci LFSR, x^16+x^14+x^13+x^11+1), the binary-angle format (2^20 units
// per turn) and the fixed-point coding of the threshold.
package hsm_pkg;

  // sample format
  parameter int unsigned DW = 16;                 // bits per I or Q component
  typedef logic signed [DW-1:0] samp_t;
  typedef struct packed {
    samp_t re;
    samp_t im;
  } cplx_t;

  // preamble layout (samples)
  parameter int unsigned A_LEN   = 16;            // one A field
  parameter int unsigned A_NUM   = 5;             // A fields before -A
  parameter int unsigned B_LEN   = 32;            // one B field
  parameter int unsigned B_NUM   = 4;             // B fields

  // section A auto-correlator
  parameter int unsigned D_A     = 16;            // correlation delay
  parameter int unsigned W_A     = 64;            // moving-average window

  // section B
  parameter int unsigned D_B      = 32;           // frequency-estimation delay
  parameter int unsigned F_AVG    = 96;           // products averaged
  parameter int unsigned N_HYP    = 9;            // timing hypotheses -4..+4
  parameter int unsigned MAX_ERR  = 4;            // coarse-timing error range
  parameter int unsigned N_MULT   = 3;            // matched-filter multipliers

  // threshold 0.55 on R = |X|/Y, applied squared: |X|^2 * 2^TH_FRAC >= TH2_Q * Y^2
  parameter int unsigned TH_FRAC = 10;
  parameter int unsigned TH2_Q   = 310;           // round(0.55^2 * 1024)

  // angles: binary angle, 2^ANG_W units per full turn
  parameter int unsigned ANG_W   = 20;
  typedef logic signed [ANG_W-1:0] ang_t;

  // sample index carried beside the data
  parameter int unsigned IDX_W   = 32;
  typedef logic [IDX_W-1:0] idx_t;

  // amplitude of the QPSK preamble symbols
  parameter int signed   AMP     = 4096;

  // one step of the 16-bit Fibonacci LFSR
  function automatic logic [15:0] lfsr_next(input logic [15:0] s);
    return {s[14:0], s[15] ^ s[13] ^ s[12] ^ s[10]};
  endfunction

  // QPSK symbol number k of a sequence started from seed
  function automatic cplx_t qpsk_seq(input logic [15:0] seed, input int unsigned k);
    logic [15:0] s;
    cplx_t c;
    s = seed;
    for (int unsigned i = 0; i < 2 * k; i++) s = lfsr_next(s);
    c.re = s[15] ? samp_t'(-AMP) : samp_t'(AMP);
    s = lfsr_next(s);
    c.im = s[15] ? samp_t'(-AMP) : samp_t'(AMP);
    return c;
  endfunction

  parameter logic [15:0] SEED_A = 16'hACE1;
  parameter logic [15:0] SEED_B = 16'h1D2F;

  // sample k (0..A_LEN-1) of an A field
  function automatic cplx_t a_field(input int unsigned k);
    return qpsk_seq(SEED_A, k);
  endfunction

  // sample k (0..B_LEN-1) of a B field; also the matched-filter coefficients
  function automatic cplx_t b_field(input int unsigned k);
    return qpsk_seq(SEED_B, k);
  endfunction

endpackage
