// os_tree: overturned-stairs (OS) tree of type one.
//
// The tree is a body followed by a root. The body of height k is built from
// the body of height k-1 and a linear array of height k-2 (k rows through
// k-2 counters), joined by a 5-3 counter; the root is one 3-2 counter that
// turns the body's three outputs into a sum and a carry. Each body hands on
// three vectors ready after k-1, k and k counter delays. The 5-3 join adds
// the linear array's two outputs (ready after k-2) to the early body output
// first, and the two late body outputs second, so the new body is ready
// after k + 1 delays without waiting on anything. Built here as a loop
// rather than a recursion: body(1) is one 3-2 counter plus one untouched
// row, and steps k = 2..K each add a linear array of k rows. A body of
// height K takes N = 3 + K(K+1)/2 rows (4, 6, 9, 13, 18, 24, ...) and the
// whole tree has K + 1 counter levels. Only three tracks link non-adjacent
// counters.
//
// The document gives the body/root split, the recursion and the 5-3
// counter; the base body(1) and the order in which rows are taken (body(1)
// first, then each linear array in turn) are this design's own.
// Purely combinational; the result is a carry-save pair (s, co).
module os_tree #(
  parameter int unsigned W = mul_pkg::PROD_W,
  parameter int unsigned K = 5,    // body height
  parameter int unsigned N = 18    // must equal 3 + K(K+1)/2
) (
  input  logic [W-1:0] rows [N],
  output logic [W-1:0] s,
  output logic [W-1:0] co
);

  // First row used by step k (k >= 2); body(1) uses rows 0..3.
  function automatic int unsigned step_base(int unsigned k);
    int unsigned b = 4;
    for (int unsigned j = 2; j < k; j++) b += j;
    return b;
  endfunction

  if (K < 1 || step_base(K + 1) != N) begin : g_bad_size
    $error("os_tree: N must equal 3 + K(K+1)/2");
  end

  // Body outputs after each height: early (one delay sooner) and two late.
  logic [W-1:0] b_early [K+1];
  logic [W-1:0] b_s     [K+1];
  logic [W-1:0] b_c     [K+1];

  // body(1): a 3-2 counter on rows 0-2, row 3 passed on as the early output.
  assign b_early[1] = rows[3];
  csa32 #(.W(W)) u_body1 (.a(rows[0]), .b(rows[1]), .c(rows[2]), .s(b_s[1]), .co(b_c[1]));

  for (genvar k = 2; k <= K; k++) begin : g_step
    localparam int unsigned BASE = step_base(k);
    logic [W-1:0] lrow [k];
    logic [W-1:0] ls, lc;

    for (genvar j = 0; j < k; j++) begin : g_in
      assign lrow[j] = rows[BASE + j];
    end

    linear_array #(.W(W), .N(k)) u_arr (.rows(lrow), .s(ls), .co(lc));

    csa53 #(.W(W)) u_join (
      .a(ls), .b(lc), .c(b_early[k-1]), .d(b_s[k-1]), .e(b_c[k-1]),
      .c_early(b_early[k]), .s(b_s[k]), .co(b_c[k])
    );
  end

  // Root.
  csa32 #(.W(W)) u_root (.a(b_early[K]), .b(b_s[K]), .c(b_c[K]), .s(s), .co(co));

endmodule
