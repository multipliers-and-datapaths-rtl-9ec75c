// tb_hybrid_tree: checks the hybrid reduction at its default split (18 rows
// in a 3-3-5-7 ZM type-one tree, 10 rows in a linear array). A one-hot row
// pattern shows that every row reaches the result; random and all-ones rows
// check the arithmetic modulo 2^W. A second instance uses the
// overturned-stairs tree for the 18 tree rows.
module tb_hybrid_tree;
  localparam int W = 106;
  localparam int N = 28;

  logic [W-1:0] rows [N];
  logic [W-1:0] s, co, s_os, co_os;
  int checks = 0, failures = 0;

  hybrid_tree dut (.rows(rows), .s(s), .co(co));
  hybrid_tree #(.TREE(mul_pkg::TREE_OS)) dut_os (.rows(rows), .s(s_os), .co(co_os));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500 + N; t++) begin
      logic [W-1:0] want;
      for (int j = 0; j < N; j++) begin
        if (t < N) rows[j] = (j == t) ? W'(1) << j : '0;
        else if (t == N) rows[j] = '1;
        else rows[j] = {$urandom, $urandom, $urandom, $urandom};
      end
      #1;
      want = '0;
      for (int j = 0; j < N; j++) want += rows[j];
      checks += 2;
      if (W'(s + co) !== want) begin
        failures++;
        $display("FAIL ZM t=%0d", t);
      end
      if (W'(s_os + co_os) !== want) begin
        failures++;
        $display("FAIL OS t=%0d", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
