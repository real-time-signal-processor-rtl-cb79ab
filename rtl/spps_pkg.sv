// spps_pkg: types and constants shared by the pulsar signal processor.
//
// The front end delivers, for every frequency channel, one complex voltage per
// polarisation. Each real or imaginary part is a 9-bit sign-magnitude number
// (1 sign bit, 8 magnitude bits). The Stokes words that travel from the data
// input module to the processing nodes are 16-bit sign-magnitude numbers
// (1 sign bit, 15 magnitude bits). One sub-band carries 256 channels that are
// split over 8 nodes of 32 consecutive channels each.
//
// The widths and counts follow the instrument's description; the field order
// inside the structs is this design's choice.
package spps_pkg;

  localparam int unsigned N_CHAN       = 256;  // channels per spectrum
  localparam int unsigned N_NODES      = 8;    // DSP nodes per sub-band
  localparam int unsigned N_STOKES     = 4;    // I, Q, U, V

  // 9-bit sign-magnitude voltage component.
  typedef struct packed {
    logic       sign;
    logic [7:0] mag;
  } sm9_t;

  // One channel of the dual-polarisation input: left (e1) and right (e2)
  // circular polarisation, real and imaginary parts.
  typedef struct packed {
    sm9_t lr;
    sm9_t li;
    sm9_t rr;
    sm9_t ri;
  } pol_sample_t;

  // 16-bit sign-magnitude Stokes word.
  typedef struct packed {
    logic        sign;
    logic [14:0] mag;
  } sm16_t;

  // The four Stokes parameters of one channel, in the order they are sent.
  typedef struct packed {
    sm16_t i;
    sm16_t q;
    sm16_t u;
    sm16_t v;
  } stokes_t;

  // Outputs of the first (look-up table) stage.
  typedef struct packed {
    logic [15:0] sq_l;    // (LI^2 + LR^2) / 2
    logic [15:0] sq_r;    // (RI^2 + RR^2) / 2
    logic [15:0] p_liri;  // |LI|*|RI|
    logic [15:0] p_lirr;  // |LI|*|RR|
    logic [15:0] p_lrri;  // |LR|*|RI|
    logic [15:0] p_lrrr;  // |LR|*|RR|
    logic        s_liri;  // sign of LI*RI
    logic        s_lirr;  // sign of LI*RR
    logic        s_lrri;  // sign of LR*RI
    logic        s_lrrr;  // sign of LR*RR
  } lut_out_t;

  // Convert a 16-bit sign-magnitude word to a 32-bit two's complement value.
  function automatic logic signed [31:0] sm16_to_int(sm16_t w);
    logic signed [31:0] m;
    m = 32'(w.mag);
    return w.sign ? -m : m;
  endfunction

endpackage
