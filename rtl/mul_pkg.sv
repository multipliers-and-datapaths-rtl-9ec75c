// mul_pkg: widths and types shared by the significand multiplier.
//
// The multiplier works on IEEE 754 double-precision significands: 52 stored
// fraction bits plus the hidden leading one give 53-bit operands, and the
// exact product is 106 bits wide. Radix-4 (modified) Booth recoding of a
// 53-bit unsigned multiplier needs 27 digit groups, so 27 partial-product
// rows are produced; one extra row carries the "+1" of every negated row,
// which makes 28 rows for the reduction network (matching the 6-6-8-8
// higher-order array). The correction row is this design's own choice.
package mul_pkg;

  localparam int unsigned SIG_W   = 53;             // significand width, hidden bit included
  localparam int unsigned PROD_W  = 2 * SIG_W;      // exact product width
  localparam int unsigned BOOTH_ROWS = (SIG_W + 2) / 2;  // 27 radix-4 digit groups
  localparam int unsigned PP_ROWS = BOOTH_ROWS + 1; // Booth rows plus the correction row

  // Which partial-product reduction network the datapath uses.
  typedef enum logic [0:0] {
    RED_HOA    = 1'b0,   // higher-order array (chains 6-6-8-8)
    RED_HYBRID = 1'b1    // ZM type-one tree plus linear array
  } reduction_e;

  // Which type-one tree the hybrid network puts beside its linear array.
  typedef enum logic [0:0] {
    TREE_ZM = 1'b0,      // ZM balanced-delay tree of linear chains
    TREE_OS = 1'b1       // overturned-stairs tree (body of 5-3 joins plus root)
  } tree_kind_e;

  // One radix-4 Booth digit as the encoder hands it to the muxes.
  typedef struct packed {
    logic one;  // |digit| == 1 : select X
    logic two;  // |digit| == 2 : select 2X
    logic neg;  // digit < 0    : invert the selected value
  } booth_sel_t;

endpackage
