// hoa_tree: higher-order array of linear-array chains.
//
// The rows are dealt out to NCH chains; chain k sums CHAIN[k] rows as a
// linear array of 3-2 counters. The chains are then joined in order: the
// sum and carry of everything above chain k enter chain k as two more rows,
// through two more 3-2 counters in series (one csa42). Only two wiring
// tracks link non-adjacent counters. When each chain's own delay equals the
// delay of the chains above it (lengths 4-4-6-8 or 3-3-5-7, for example)
// the structure is a ZM (balanced-delay) tree of type one. The default
// 6-6-8-8 is the document's example, ready after 10 counter delays (4, 6,
// 8, 10 as each chain joins): arrays of 6 and 6 rows are combined,
// then an array of 8 rows, then another array of 8 rows, 28 rows in all.
//
// The same word-wide structure serves every column of the product, which is
// the regularity the document claims for higher-order arrays. Which rows go
// to which chain (consecutive rows, chain 0 first) is this design's choice.
// Purely combinational; the result is a carry-save pair (s, co).
module hoa_tree #(
  parameter int unsigned W     = mul_pkg::PROD_W,
  parameter int unsigned NCH   = 4,
  parameter int unsigned CHAIN [NCH] = '{6, 6, 8, 8},
  parameter int unsigned N     = mul_pkg::PP_ROWS  // must equal the sum of CHAIN
) (
  input  logic [W-1:0] rows [N],
  output logic [W-1:0] s,
  output logic [W-1:0] co
);

  // First row of chain k.
  function automatic int unsigned chain_base(int unsigned k);
    int unsigned b = 0;
    for (int unsigned j = 0; j < k; j++) b += CHAIN[j];
    return b;
  endfunction

  if (chain_base(NCH) != N) begin : g_bad_size
    $error("hoa_tree: N must equal the sum of the chain lengths");
  end

  logic [W-1:0] acc_s [NCH];   // running carry-save result after chain k
  logic [W-1:0] acc_c [NCH];

  for (genvar k = 0; k < NCH; k++) begin : g_chain
    localparam int unsigned BASE = chain_base(k);
    localparam int unsigned LEN  = CHAIN[k];

    logic [W-1:0] crow [LEN];
    logic [W-1:0] ls, lc;

    for (genvar j = 0; j < LEN; j++) begin : g_in
      assign crow[j] = rows[BASE + j];
    end

    linear_array #(.W(W), .N(LEN)) u_arr (.rows(crow), .s(ls), .co(lc));

    if (k == 0) begin : g_top
      assign acc_s[k] = ls;
      assign acc_c[k] = lc;
    end else begin : g_join
      csa42 #(.W(W)) u_join (
        .a(ls), .b(lc), .c(acc_s[k-1]), .d(acc_c[k-1]),
        .s(acc_s[k]), .co(acc_c[k])
      );
    end
  end

  assign s  = acc_s[NCH-1];
  assign co = acc_c[NCH-1];

endmodule
