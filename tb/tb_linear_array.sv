// tb_linear_array: checks linear arrays of 1, 2, 3, 8 and 13 rows.
// All instances read the first N rows of one random source; each one's
// sum and carry vectors must add up to the sum of its rows modulo 2^W.
module tb_linear_array;
  localparam int W  = 106;
  localparam int NI = 5;
  localparam int NS [NI] = '{1, 2, 3, 8, 13};
  localparam int MAXN = 13;

  logic [W-1:0] src [MAXN];
  logic [W-1:0] s  [NI];
  logic [W-1:0] co [NI];
  int checks = 0, failures = 0;

  for (genvar k = 0; k < NI; k++) begin : g_inst
    logic [W-1:0] rows [NS[k]];
    for (genvar j = 0; j < NS[k]; j++) begin : g_in
      assign rows[j] = src[j];
    end
    linear_array #(.W(W), .N(NS[k])) dut (.rows(rows), .s(s[k]), .co(co[k]));
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int j = 0; j < MAXN; j++)
        src[j] = (t == 0) ? '1 : {$urandom, $urandom, $urandom, $urandom};
      #1;
      for (int k = 0; k < NI; k++) begin
        logic [W-1:0] want;
        want = '0;
        for (int j = 0; j < NS[k]; j++) want += src[j];
        checks++;
        if (W'(s[k] + co[k]) !== want) begin
          failures++;
          $display("FAIL N=%0d t=%0d", NS[k], t);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
