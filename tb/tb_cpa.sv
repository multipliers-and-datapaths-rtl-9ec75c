// tb_cpa: checks the carry-propagate adder on random and carry-chain
// operands against the testbench's own sum.
module tb_cpa;
  localparam int W = 106;
  logic [W-1:0] a, b, sum;
  int checks = 0, failures = 0;

  cpa #(.W(W)) dut (.a(a), .b(b), .sum(sum));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      logic [W:0] want;
      case (t)
        0: begin a = '1; b = W'(1); end
        1: begin a = '1; b = '1; end
        default: begin
          a = {$urandom, $urandom, $urandom, $urandom};
          b = {$urandom, $urandom, $urandom, $urandom};
        end
      endcase
      #1;
      want = {1'b0, a} + {1'b0, b};
      checks++;
      if (sum !== want[W-1:0]) begin
        failures++;
        $display("FAIL a=%h b=%h sum=%h", a, b, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
