// tb_os_tree: checks overturned-stairs trees of body height 1 to 6
// (4, 6, 9, 13, 18 and 24 rows). All instances read the first N rows of one
// source; one-hot rows show that each row reaches the result, random and
// all-ones rows check the carry-save total modulo 2^W.
module tb_os_tree;
  localparam int W  = 106;
  localparam int NI = 6;
  localparam int MAXN = 24;

  function automatic int rows_of(int k);
    return 3 + k * (k + 1) / 2;
  endfunction

  logic [W-1:0] src [MAXN];
  logic [W-1:0] s  [NI];
  logic [W-1:0] co [NI];
  int checks = 0, failures = 0;

  for (genvar i = 0; i < NI; i++) begin : g_inst
    localparam int N = rows_of(i + 1);
    logic [W-1:0] rows [N];
    for (genvar j = 0; j < N; j++) begin : g_in
      assign rows[j] = src[j];
    end
    os_tree #(.W(W), .K(i + 1), .N(N)) dut (.rows(rows), .s(s[i]), .co(co[i]));
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400 + MAXN; t++) begin
      for (int j = 0; j < MAXN; j++) begin
        if (t < MAXN) src[j] = (j == t) ? W'(3) << (2 * j) : '0;
        else if (t == MAXN) src[j] = '1;
        else src[j] = {$urandom, $urandom, $urandom, $urandom};
      end
      #1;
      for (int i = 0; i < NI; i++) begin
        logic [W-1:0] want;
        want = '0;
        for (int j = 0; j < rows_of(i + 1); j++) want += src[j];
        checks++;
        if (W'(s[i] + co[i]) !== want) begin
          failures++;
          $display("FAIL K=%0d t=%0d", i + 1, t);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
