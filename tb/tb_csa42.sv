// tb_csa42: checks the 4-2 counter: s + co equals a + b + c + d modulo 2^W
// for random and all-ones inputs.
module tb_csa42;
  localparam int W = 106;
  logic [W-1:0] a, b, c, d, s, co;
  int checks = 0, failures = 0;

  csa42 #(.W(W)) dut (.a(a), .b(b), .c(c), .d(d), .s(s), .co(co));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      if (t == 0) begin a = '1; b = '1; c = '1; d = '1; end
      else begin
        a = {$urandom, $urandom, $urandom, $urandom};
        b = {$urandom, $urandom, $urandom, $urandom};
        c = {$urandom, $urandom, $urandom, $urandom};
        d = {$urandom, $urandom, $urandom, $urandom};
      end
      #1;
      checks++;
      if (W'(s + co) !== W'(a + b + c + d)) begin
        failures++;
        $display("FAIL a=%h b=%h c=%h d=%h", a, b, c, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
