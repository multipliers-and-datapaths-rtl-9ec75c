// tb_booth_mux: checks one Booth mux row for every digit value.
// For random and corner multiplicands and each digit d in -2..2 the
// one's-complement row plus its "+1" must equal d*x as a signed number.
module tb_booth_mux;
  import mul_pkg::*;

  localparam int W = SIG_W;
  logic [W-1:0] x;
  booth_sel_t   sel;
  logic [W+1:0] row;
  int checks = 0, failures = 0;

  booth_mux #(.W(W)) dut (.x(x), .sel(sel), .row(row));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      case (t)
        0: x = '0;
        1: x = '1;
        2: x = W'(1) << (W - 1);
        default: x = {$urandom, $urandom};
      endcase
      for (int d = -2; d <= 2; d++) begin
        logic signed [W+2:0] want, got;
        sel.one = (d == 1 || d == -1);
        sel.two = (d == 2 || d == -2);
        sel.neg = (d < 0);
        #1;
        want = (W+3)'(d) * $signed({3'b000, x});
        got  = $signed({row[W+1], row}) + (W+3)'(sel.neg);
        checks++;
        if (got !== want) begin
          failures++;
          $display("FAIL x=%h d=%0d row=%h", x, d, row);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
