// hybrid_tree: hybrid reduction, a ZM type-one tree beside a linear array.
//
// The document's hybrid scheme reduces part of the partial products with a
// ZM tree of type one and the rest, in the folded region of the multiplier,
// with a plain linear array that needs no wiring tracks; the longest linear
// array then sets the critical path. In this word-level version the first
// N - LIN_N rows go to a ZM type-one tree (an hoa_tree whose chain lengths
// are delay balanced: 3-3-5-7 reaches its result after 7 counter delays),
// the last LIN_N rows go to one linear array (10 rows: 8 counter delays),
// and a 4-2 counter (two 3-2 counters) joins the two carry-save pairs.
// With TREE = TREE_OS the 18 tree rows go instead to an overturned-stairs
// tree of type one (body height OS_K = 5: 18 rows, 6 counter levels), which
// needs one more wiring track between non-adjacent counters but one level
// fewer than the ZM tree. The default is the ZM tree.
// Lengthening the linear array by one row takes one row from the tree; this
// is the width against levels trade-off the document describes.
//
// The document places the split per column, at the fold of the product
// parallelogram; here it is by row, the same for every column, which is this
// design's simplification. The row split and chain lengths are assumed.
// Purely combinational; the result is a carry-save pair (s, co).
module hybrid_tree
  import mul_pkg::*;
#(
  parameter int unsigned W      = PROD_W,
  parameter tree_kind_e  TREE   = TREE_ZM,
  parameter int unsigned NZ     = 4,
  parameter int unsigned ZM_CHAIN [NZ] = '{3, 3, 5, 7},
  parameter int unsigned OS_K   = 5,    // OS body height; 3 + OS_K(OS_K+1)/2 = N - LIN_N
  parameter int unsigned LIN_N  = 10,
  parameter int unsigned N      = PP_ROWS
) (
  input  logic [W-1:0] rows [N],
  output logic [W-1:0] s,
  output logic [W-1:0] co
);

  localparam int unsigned TREE_N = N - LIN_N;

  logic [W-1:0] trow [TREE_N];
  logic [W-1:0] lrow [LIN_N];
  logic [W-1:0] ts, tc, ls, lc;

  for (genvar j = 0; j < TREE_N; j++) begin : g_tin
    assign trow[j] = rows[j];
  end
  for (genvar j = 0; j < LIN_N; j++) begin : g_lin
    assign lrow[j] = rows[TREE_N + j];
  end

  if (TREE == TREE_OS) begin : g_os
    os_tree #(.W(W), .K(OS_K), .N(TREE_N)) u_tree (.rows(trow), .s(ts), .co(tc));
  end else begin : g_zm
    hoa_tree #(.W(W), .NCH(NZ), .CHAIN(ZM_CHAIN), .N(TREE_N)) u_tree (
      .rows(trow), .s(ts), .co(tc)
    );
  end

  linear_array #(.W(W), .N(LIN_N)) u_lin (.rows(lrow), .s(ls), .co(lc));

  csa42 #(.W(W)) u_join (.a(ls), .b(lc), .c(ts), .d(tc), .s(s), .co(co));

endmodule
