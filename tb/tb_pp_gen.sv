// tb_pp_gen: checks the Booth partial-product generator.
// For corner and random operand pairs the 28 rows, added modulo 2^106,
// must give x*y; each Booth row i must have zeros below bit 2i, and the
// correction row must hold the sign of each row's Booth digit at bit 2i.
module tb_pp_gen;
  import mul_pkg::*;
  import tb_ref_pkg::*;

  logic [SIG_W-1:0]  x, y;
  logic [PROD_W-1:0] pp [PP_ROWS];
  int checks = 0, failures = 0;

  pp_gen dut (.x(x), .y(y), .pp(pp));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      logic [PROD_W-1:0] acc, want;
      logic [55:0]       yx;
      case (t)
        0: begin x = '0; y = '0; end
        1: begin x = '1; y = '1; end
        2: begin x = '1; y = {SIG_W/2{2'b10}}; end
        3: begin x = {1'b1, 52'b0}; y = {SIG_W{1'b1}}; end
        default: begin x = {$urandom, $urandom}; y = {$urandom, $urandom}; end
      endcase
      #1;
      acc = '0;
      for (int i = 0; i < PP_ROWS; i++) acc += pp[i];
      want = PROD_W'(x) * PROD_W'(y);
      checks++;
      if (acc !== want) begin
        failures++;
        $display("FAIL x=%h y=%h sum=%h want=%h", x, y, acc, want);
      end
      yx = {2'b00, y, 1'b0};
      for (int i = 1; i < BOOTH_ROWS; i++) begin
        checks++;
        if ((pp[i] & ((PROD_W'(1) << (2 * i)) - 1)) != 0) begin
          failures++;
          $display("FAIL row %0d has bits below its weight", i);
        end
      end
      for (int i = 0; i < BOOTH_ROWS; i++) begin
        checks++;
        if (pp[PP_ROWS-1][2*i] !== (booth_digit(yx[2*i +: 3]) < 0)) begin
          failures++;
          $display("FAIL correction bit %0d", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
