// tb_csa53: checks the 5-3 counter: the three outputs add up to
// a + b + c + d + e modulo 2^W, and the early carry depends on a, b, c only
// (it must equal the majority of a, b, c moved up one place).
module tb_csa53;
  localparam int W = 106;
  logic [W-1:0] a, b, c, d, e, ce, s, co;
  int checks = 0, failures = 0;

  csa53 #(.W(W)) dut (.a(a), .b(b), .c(c), .d(d), .e(e), .c_early(ce), .s(s), .co(co));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      logic [W-1:0] maj;
      if (t == 0) begin a = '1; b = '1; c = '1; d = '1; e = '1; end
      else begin
        a = {$urandom, $urandom, $urandom, $urandom};
        b = {$urandom, $urandom, $urandom, $urandom};
        c = {$urandom, $urandom, $urandom, $urandom};
        d = {$urandom, $urandom, $urandom, $urandom};
        e = {$urandom, $urandom, $urandom, $urandom};
      end
      #1;
      maj = (a & b) | (a & c) | (b & c);
      checks += 2;
      if (W'(ce + s + co) !== W'(a + b + c + d + e)) begin
        failures++;
        $display("FAIL total t=%0d", t);
      end
      if (ce !== (maj << 1)) begin
        failures++;
        $display("FAIL early carry t=%0d", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
