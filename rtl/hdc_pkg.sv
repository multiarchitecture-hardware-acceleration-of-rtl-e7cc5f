// hdc_pkg: shared types and constants of the hyperdimensional-computing (HDC)
// accelerator. All vector elements (features, basis values, hypervector
// elements, class elements) are 32-bit signed fixed point with 16 fraction
// bits (Q16.16). Angles handed to the sine/cosine unit are unsigned 32-bit
// fractions of a full turn, so reduction modulo 2*pi is a plain wrap-around.
// The model size (2000 dimensions, 784 features, 10 classes) and the
// learning factor alpha = 0.037 are those of the MNIST model this design
// targets; the Q16.16 number format is this design's choice (the reference
// model uses 32-bit floating point).
package hdc_pkg;

  localparam int FRAC   = 16;                 // fraction bits of data_t
  localparam int DIM_W  = 16;                 // width of a dimension index
  localparam int FEAT_W = 16;                 // width of a feature index
  localparam int CLS_W  = 8;                  // width of a class label

  // Model defaults (MNIST model).
  localparam int D_DEF         = 2000;        // hyperdimensions
  localparam int N_FEAT_DEF    = 784;         // 28 x 28 pixels
  localparam int N_CLASSES_DEF = 10;          // digits 0..9

  typedef logic signed [31:0] data_t;         // Q16.16
  typedef logic signed [63:0] acc_t;          // Q32.32 sum of products
  typedef logic [31:0]        turn_t;         // angle, 2^32 = one turn

  // 1/(2*pi) in Q0.32: round(2^32 / (2*pi)).
  localparam logic [31:0] INV_2PI_Q32 = 32'd683565276;
  // alpha = 0.037 in Q16.16: round(0.037 * 2^16).
  localparam data_t ALPHA_Q16 = 32'sd2425;

  // One element of a (partial) hypervector travelling through a pipe.
  typedef struct packed {
    logic [DIM_W-1:0] dim;
    data_t            val;
  } hv_elem_t;

  // Load port of the basis memory: host load or regeneration write.
  typedef struct packed {
    logic [DIM_W-1:0]  dim;
    logic [FEAT_W-1:0] feat;
    data_t             val;
  } basis_wr_t;

  // Q16.16 x Q16.16 -> Q16.16, truncated toward minus infinity.
  function automatic data_t qmul(data_t a, data_t b);
    acc_t p;
    p = acc_t'(a) * acc_t'(b);
    return data_t'(p >>> FRAC);
  endfunction

  // Sum of products (Q32.32) -> angle in turns: frac(x / (2*pi)).
  function automatic turn_t acc_to_turn(acc_t x);
    logic signed [97:0] p;
    p = 98'(x) * $signed({1'b0, INV_2PI_Q32});
    return p[63:32];
  endfunction

endpackage
