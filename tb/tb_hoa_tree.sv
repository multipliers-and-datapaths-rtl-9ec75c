// tb_hoa_tree: checks the higher-order array at its default 6-6-8-8 shape
// (28 rows) and at the delay-balanced ZM type-one shape 4-4-6-8 (22 rows).
// For random and all-ones rows the carry-save result must add up to the sum
// of the rows modulo 2^W.
module tb_hoa_tree;
  localparam int W = 106;
  localparam int MAXN = 28;

  logic [W-1:0] src [MAXN];
  logic [W-1:0] rows_zm [22];
  logic [W-1:0] s0, c0, s1, c1;
  int checks = 0, failures = 0;

  hoa_tree dut (.rows(src), .s(s0), .co(c0));

  for (genvar j = 0; j < 22; j++) begin : g_in
    assign rows_zm[j] = src[j];
  end
  hoa_tree #(.W(W), .NCH(4), .CHAIN('{4, 4, 6, 8}), .N(22)) dut_zm (
    .rows(rows_zm), .s(s1), .co(c1)
  );

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      logic [W-1:0] want28, want22;
      for (int j = 0; j < MAXN; j++)
        src[j] = (t == 0) ? '1 : (t == 1) ? W'(j + 1) : {$urandom, $urandom, $urandom, $urandom};
      #1;
      want28 = '0;
      want22 = '0;
      for (int j = 0; j < MAXN; j++) begin
        want28 += src[j];
        if (j < 22) want22 += src[j];
      end
      checks += 2;
      if (W'(s0 + c0) !== want28) begin
        failures++;
        $display("FAIL 6-6-8-8 t=%0d", t);
      end
      if (W'(s1 + c1) !== want22) begin
        failures++;
        $display("FAIL 4-4-6-8 t=%0d", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
