// ldpc_pkg: constants and types shared by the configurable QC-LDPC decoder.
//
// The decoder processes one block row (a "layer") of a quasi-cyclic parity check matrix at a
// time with LANES check-node units in parallel. LANES = 96 because 96 is the largest expansion
// factor Zf of IEEE 802.16e (802.11n tops out at 81). Channel messages are 6-bit two's
// complement integers with no fraction bits (CHW) and check messages keep a 5-bit magnitude, as in
// the document. The posterior (MS) values are kept with W = 8 bits: with a 6-bit posterior the
// subtraction of a stored check message (up to 23) from a saturated posterior loses so much that
// even an error-free codeword falls apart after a few iterations, so this is this design's
// deviation. The base matrices have NB = 24 block columns. Maximum iteration count 10 and
// normalisation 0.75 follow the document. Saturation ranges and the encoding of the configuration
// are this design's choices.
package ldpc_pkg;

  localparam int LANES     = 96;   // processing units / lanes per memory word
  localparam int HALF      = LANES / 2; // lanes per codeword in multi-codeword mode
  localparam int CHW       = 6;    // channel LLR width (6 integer bits, 0 fraction bits)
  localparam int W         = 8;    // posterior (MS) width inside the decoder
  localparam int MAGW      = 5;    // magnitude width of Beta1/Beta2
  localparam int NB        = 24;   // block columns of every base matrix
  localparam int COLW      = 5;    // block column address width
  localparam int ZW        = 7;    // width of Zf and of a shift amount (96 needs 7 bits)
  localparam int MAX_LAYERS= 12;   // 24*(1-R) layers, 12 for rate 1/2
  localparam int LAYW      = 4;
  localparam int IDXW      = 5;    // index of the first minimum inside a layer
  localparam int MAX_DEG   = 24;   // upper bound of the row degree (NB)
  localparam int EDGES     = 88;   // entries of the sign memory (non-zero blocks of one code)
  localparam int EDGEW     = 7;
  localparam int MAX_ITER  = 10;
  localparam int ITERW     = 4;

  typedef logic signed [W-1:0] llr_t;
  typedef logic [MAGW-1:0]     mag_t;
  typedef logic [LANES*W-1:0]  word_t;   // one block column: LANES messages, lane 0 in bits [W-1:0]

  localparam int   MAG_MAX = 31;   // largest check-message magnitude before scaling
  localparam llr_t LLR_MAX = llr_t'(127);
  localparam llr_t LLR_MIN = -llr_t'(127);

  // Codes held in the code ROM.
  typedef enum logic [0:0] {
    CODE_16E_R12 = 1'b0,   // IEEE 802.16e rate 1/2, Zf = 24..96 step 4, shifts scaled by eq. (2.3)
    CODE_11N_R56 = 1'b1    // IEEE 802.11n rate 5/6 Zf = 54 table, shifts reduced mod Zf by eq. (2.4)
  } code_e;

  typedef struct packed {
    code_e            code;
    logic [ZW-1:0]    zf;        // expansion factor
    logic             multi;     // two codewords side by side (zf <= 48)
    logic             et_en;     // hard-decision early termination on
  } cfg_t;

  // Saturate a wider signed value to the symmetric W-bit range.
  localparam logic signed [W+1:0] SAT_HI = (W+2)'(127);
  localparam logic signed [W+1:0] SAT_LO = -(W+2)'(127);

  function automatic llr_t sat(input logic signed [W+1:0] v);
    if (v > SAT_HI)      return LLR_MAX;
    else if (v < SAT_LO) return LLR_MIN;
    else                 return llr_t'(v);
  endfunction

endpackage
