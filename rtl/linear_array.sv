// linear_array: linear (serial) array of 3-2 counters.
//
// The first counter adds rows 0, 1 and 2; every further counter adds the
// sum and carry of the one before it to the next row. N rows thus pass
// through N-2 counters in series and leave as a sum and a carry vector; the
// critical path is N-2 counter delays. Only adjacent counters are connected,
// which is why an array needs no wiring tracks between non-adjacent cells.
// Two rows pass straight through; a single row leaves with a zero carry.
// Purely combinational.
module linear_array #(
  parameter int unsigned W = mul_pkg::PROD_W,
  parameter int unsigned N = 8    // number of rows summed
) (
  input  logic [W-1:0] rows [N],
  output logic [W-1:0] s,
  output logic [W-1:0] co
);

  if (N == 1) begin : g_one
    assign s  = rows[0];
    assign co = '0;
  end else if (N == 2) begin : g_two
    assign s  = rows[0];
    assign co = rows[1];
  end else begin : g_chain
    logic [W-1:0] cs [N-2];   // sum after each counter
    logic [W-1:0] cc [N-2];   // carry after each counter

    csa32 #(.W(W)) u_first (
      .a(rows[0]), .b(rows[1]), .c(rows[2]), .s(cs[0]), .co(cc[0])
    );
    for (genvar k = 1; k < N - 2; k++) begin : g_stage
      csa32 #(.W(W)) u_cnt (
        .a(cs[k-1]), .b(cc[k-1]), .c(rows[k+2]), .s(cs[k]), .co(cc[k])
      );
    end
    assign s  = cs[N-3];
    assign co = cc[N-3];
  end

endmodule
