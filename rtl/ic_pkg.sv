// ic_pkg: types and constants shared by the image classifier.
//
// Numbers are IEEE 754 single precision (sign bit 31, 8-bit exponent with
// bias 127 in bits 30..23, 23-bit fraction with an implicit leading one).
// The raw moments are unsigned integers named Mpq = sum x^p * y^q over the
// object pixels, with x the column and y the row, both counted from 0.
// Seven Hu invariants feed eight classification neurons; each neuron has
// seven weights and one identification tag in the weight memory.
// The sizes (seven invariants, eight words per neuron) and the
// 32-bit single-precision word follow the design description; the
// 32-bit moment width and the struct layouts are this design's own.
package ic_pkg;

  typedef logic [31:0] fp32_t;

  localparam int NUM_FEATURES  = 7;   // Hu invariants I1..I7
  localparam int WORDS_PER_NEURON = 8; // 7 weights + 1 tag
  localparam int MOM_W = 32;          // raw moment accumulator width

  localparam fp32_t FP_ZERO  = 32'h0000_0000;
  localparam fp32_t FP_TWO   = 32'h4000_0000;
  localparam fp32_t FP_THREE = 32'h4040_0000;
  localparam fp32_t FP_FOUR  = 32'h4080_0000;
  localparam fp32_t FP_ABS_MASK = 32'h7FFF_FFFF;

  // Raw (integer) moments of a binary image.
  typedef struct packed {
    logic [MOM_W-1:0] m00, m10, m01, m11, m20, m02, m21, m12, m30, m03;
  } raw_moments_t;

  // Central moments in floating point; mu00 equals M00.
  typedef struct packed {
    fp32_t mu00, mu11, mu20, mu02, mu21, mu12, mu30, mu03;
  } central_moments_t;

  // Normalised central moments eta_pq = mu_pq / mu00^2.
  typedef struct packed {
    fp32_t eta11, eta20, eta02, eta21, eta12, eta30, eta03;
  } eta_t;

  typedef fp32_t [NUM_FEATURES-1:0] feature_vec_t;

endpackage
