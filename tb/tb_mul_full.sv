// tb_mul_full: the significand multiplier at its default configuration
// (53-bit operands, higher-order array 6-6-8-8), taken through complete
// multiplications: a few corner operand pairs and random normalised
// significands, each result checked against the exact product and an
// integer-division rounding model, with the three-cycle latency checked.
module tb_mul_full;
  import mul_pkg::*;
  import tb_ref_pkg::*;

  localparam int NOPS = 500;

  logic clk = 1'b0;
  logic rst_n, in_valid, out_valid, inexact;
  logic [SIG_W-1:0]  a_sig, b_sig, sig;
  logic [PROD_W-1:0] product;
  logic [1:0]        exp_inc;
  int checks = 0, failures = 0;

  mul_datapath dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n    = 1'b0;
    in_valid = 1'b0;
    a_sig    = '0;
    b_sig    = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int t = 0; t < NOPS; t++) begin
      logic [PROD_W-1:0] p;
      round_t r;
      int lat;
      case (t)
        0: begin a_sig <= '1; b_sig <= '1; end
        1: begin a_sig <= {1'b1, 52'b0}; b_sig <= {1'b1, 52'b0}; end
        2: begin a_sig <= {1'b1, 51'b0, 1'b1}; b_sig <= {2'b11, 51'b0}; end
        default: begin
          a_sig <= {1'b1, 52'({$urandom, $urandom})};
          b_sig <= {1'b1, 52'({$urandom, $urandom})};
        end
      endcase
      in_valid <= 1'b1;
      @(posedge clk);       // end of issue cycle n
      #1;
      in_valid = 1'b0;
      p = PROD_W'(a_sig) * PROD_W'(b_sig);
      r = round_ref(p);
      lat = 1;              // now in cycle n+1; outputs are looked at after each edge
      while (!out_valid && lat < 10) begin
        @(posedge clk);
        #1;
        lat++;
      end
      checks += 2;
      if (lat != 3) begin
        failures++;
        $display("FAIL latency %0d", lat);
      end
      if (product !== p || sig !== r.sig || exp_inc !== r.exp_inc || inexact !== r.inexact) begin
        failures++;
        $display("FAIL a=%h b=%h product=%h want %h sig=%h want %h", a_sig, b_sig,
                 product, p, sig, r.sig);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
