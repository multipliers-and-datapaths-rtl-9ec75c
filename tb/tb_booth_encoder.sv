// tb_booth_encoder: exhaustive check of the radix-4 Booth encoder.
// All eight groups are applied; the select lines are compared with the
// digit value -2*g2 + g1 + g0 worked out in the testbench.
module tb_booth_encoder;
  import mul_pkg::*;
  import tb_ref_pkg::*;

  logic [2:0] grp;
  booth_sel_t sel;
  int checks = 0, failures = 0;

  booth_encoder dut (.grp(grp), .sel(sel));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < 8; g++) begin
      int d;
      grp = 3'(g);
      #1;
      d = booth_digit(grp);
      checks++;
      if (sel.one !== (d == 1 || d == -1) || sel.two !== (d == 2 || d == -2) ||
          sel.neg !== (d < 0)) begin
        failures++;
        $display("FAIL grp=%b d=%0d one=%b two=%b neg=%b", grp, d, sel.one, sel.two, sel.neg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
