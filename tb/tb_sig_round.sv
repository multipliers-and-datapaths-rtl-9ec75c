// tb_sig_round: checks normalisation and round-to-nearest-even of the
// 106-bit significand product against an integer division model. Directed
// cases cover both normalisations, exact results, ties to even and odd,
// and the round-up that carries out to 2.0; the rest are random normalised
// products. Each case kind must occur at least once.
module tb_sig_round;
  import mul_pkg::*;
  import tb_ref_pkg::*;

  logic [PROD_W-1:0] p;
  logic [SIG_W-1:0]  sig;
  logic [1:0]        exp_inc;
  logic              inexact;
  int checks = 0, failures = 0;
  int n_hi = 0, n_lo = 0, n_up = 0, n_tie = 0, n_ovf = 0, n_exact = 0;

  sig_round dut (.p(p), .sig(sig), .exp_inc(exp_inc), .inexact(inexact));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      round_t r;
      case (t)
        0: p = {2'b01, 104'b0};                                   // exactly 1.0
        1: p = {2'b01, {52{1'b1}}, 1'b1, 51'b0};                  // lo, carries to 2.0
        2: p = {2'b01, 51'b0, 1'b1, 1'b1, 51'b0};                 // lo, tie, odd
        3: p = {2'b01, 51'b0, 1'b0, 1'b1, 51'b0};                 // lo, tie, even
        4: p = {1'b1, 51'b0, 1'b1, 1'b1, 52'b0};                  // hi, tie, odd
        5: p = {1'b1, 51'b0, 1'b0, 1'b1, 52'b0};                  // hi, tie, even
        6: p = {1'b1, {52{1'b1}}, 1'b1, 52'b0};                   // hi, carries out
        7: p = '1;                                                // hi, all ones
        default: begin
          p = {$urandom, $urandom, $urandom, $urandom};
          if ($urandom_range(1, 0) == 1) p[105] = 1'b1;
          else p[105:104] = 2'b01;
        end
      endcase
      #1;
      r = round_ref(p);
      checks++;
      if (sig !== r.sig || exp_inc !== r.exp_inc || inexact !== r.inexact) begin
        failures++;
        $display("FAIL p=%h sig=%h/%h exp=%0d/%0d inx=%b/%b", p, sig, r.sig,
                 exp_inc, r.exp_inc, inexact, r.inexact);
      end
      if (p[105]) n_hi++; else n_lo++;
      if (!r.inexact) n_exact++;
      if (r.sig != (p[105] ? p[105:53] : p[104:52])) n_up++;
      if (r.exp_inc == (p[105] ? 2'd2 : 2'd1)) n_ovf++;
      if (p[105] ? (p[52] && p[51:0] == 0) : (p[51] && p[50:0] == 0)) n_tie++;
    end
    if (n_hi == 0 || n_lo == 0 || n_up == 0 || n_tie < 2 || n_ovf == 0 || n_exact == 0) begin
      failures++;
      $display("FAIL a case kind never occurred");
    end
    $display("hi=%0d lo=%0d up=%0d tie=%0d carry_out=%0d exact=%0d",
             n_hi, n_lo, n_up, n_tie, n_ovf, n_exact);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
