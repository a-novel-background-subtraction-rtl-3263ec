// bsps_pkg: types and constants shared by the background subtraction system.
//
// Every pixel location carries a Gaussian mixture model (GMM) of up to K_MAX
// components. Each component holds a weight, a mean and a standard deviation,
// the three parameters named for the model. The pixel and its model travel
// together in one 256-bit word, the width of the load/write-back FIFOs.
//
// Fixed-point formats (this design's choice; only the parameter set and the
// 256-bit word width come from the system description):
//   pixel  : unsigned integer, PIX_W = 8 bits
//   weight : unsigned Q1.15, W_ONE = 1.0; a weight of 0 marks an unused slot
//   mean   : unsigned Q8.8
//   sigma  : unsigned Q8.8
// Word layout (bit 255 down to 0): pad | fit | fg | pixel | gmm[K_MAX-1] .. gmm[0].
package bsps_pkg;

  localparam int PIX_W   = 8;
  localparam int K_MAX   = 4;
  localparam int WORD_W  = 256;
  localparam logic [15:0] W_ONE = 16'h8000;

  typedef logic [PIX_W-1:0] pixel_t;

  typedef struct packed {
    logic [15:0] w;      // Q1.15
    logic [15:0] mu;     // Q8.8
    logic [15:0] sigma;  // Q8.8
  } comp_t;

  typedef comp_t [K_MAX-1:0] gmm_t;

  localparam int PAD_W = WORD_W - 2 - PIX_W - K_MAX * $bits(comp_t);

  typedef struct packed {
    logic [PAD_W-1:0] pad;
    logic             fit;    // 1 = pixel fitted the model (result words only)
    logic             fg;     // 1 = foreground (result words only)
    pixel_t           pixel;
    gmm_t             gmm;
  } word_t;

  // exp(-z) for z >= 0 in Q8.8, result in Q0.16 (65536 = 1.0).
  // exp(-z) = 2^(-y) with y = z*log2(e); the integer part of y is a right
  // shift and 2^(-f) for the fraction f is approximated by 1 - f/2
  // (largest relative error about 6 %).
  function automatic logic [16:0] exp_neg_q(input logic [31:0] z_q8);
    logic [47:0] y;
    logic [31:0] n;
    logic [16:0] m;
    y = (48'(z_q8) * 48'd47274) >> 15;   // 47274 = log2(e) in Q1.15
    n = y[39:8];
    m = 17'd65536 - 17'({y[7:0], 7'b0});
    if (n >= 17) return '0;
    return m >> n[4:0];
  endfunction

endpackage
