// tb_csa32: checks the 3-2 counter row on random and all-ones vectors:
// the sum vector is the bitwise parity and s + co equals a + b + c
// modulo 2^W.
module tb_csa32;
  localparam int W = 106;
  logic [W-1:0] a, b, c, s, co;
  int checks = 0, failures = 0;

  csa32 #(.W(W)) dut (.a(a), .b(b), .c(c), .s(s), .co(co));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      if (t == 0) begin a = '1; b = '1; c = '1; end
      else begin
        a = {$urandom, $urandom, $urandom, $urandom};
        b = {$urandom, $urandom, $urandom, $urandom};
        c = {$urandom, $urandom, $urandom, $urandom};
      end
      #1;
      checks += 2;
      if (W'(s + co) !== W'(a + b + c)) begin
        failures++;
        $display("FAIL total a=%h b=%h c=%h", a, b, c);
      end
      for (int i = 0; i < W; i++)
        if (s[i] !== (a[i] ^ b[i] ^ c[i])) begin
          failures++;
          $display("FAIL sum bit %0d", i);
          break;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
