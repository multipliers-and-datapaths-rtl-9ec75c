// tb_mul_datapath: end-to-end test of the significand multiplier.
//
// Three copies of the datapath, with the higher-order array, the hybrid
// reduction with a ZM tree and the hybrid with an overturned-stairs tree,
// receive the same stream of operand pairs: directed
// corner cases first (largest and smallest significands, a round-up that
// carries out to 2.0, a tie), then random normalised significands, with
// random idle cycles and runs of back-to-back operations. Every result is
// compared with the exact product and an integer-division rounding model,
// and must be valid three cycles after the cycle in which its operands
// were presented. The test counts
// how often each mechanism occurs (negative and +-2 Booth digits, both
// normalisations, round up, carry-out to 2.0, ties, exact results,
// back-to-back issue, idle cycles) and fails if one never does.
module tb_mul_datapath;
  import mul_pkg::*;
  import tb_ref_pkg::*;

  localparam int NOPS    = 3000;
  localparam int LATENCY = 3;

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid;
  logic [SIG_W-1:0] a_sig, b_sig;

  logic              ov   [3];
  logic [PROD_W-1:0] prod [3];
  logic [SIG_W-1:0]  sig  [3];
  logic [1:0]        expi [3];
  logic              inx  [3];

  mul_datapath dut_hoa (
    .clk, .rst_n, .in_valid, .a_sig, .b_sig,
    .out_valid(ov[0]), .product(prod[0]), .sig(sig[0]), .exp_inc(expi[0]), .inexact(inx[0])
  );
  mul_datapath #(.REDUCTION(RED_HYBRID)) dut_hyb (
    .clk, .rst_n, .in_valid, .a_sig, .b_sig,
    .out_valid(ov[1]), .product(prod[1]), .sig(sig[1]), .exp_inc(expi[1]), .inexact(inx[1])
  );
  mul_datapath #(.REDUCTION(RED_HYBRID), .HYBRID_TREE(TREE_OS)) dut_hyb_os (
    .clk, .rst_n, .in_valid, .a_sig, .b_sig,
    .out_valid(ov[2]), .product(prod[2]), .sig(sig[2]), .exp_inc(expi[2]), .inexact(inx[2])
  );

  always #5 clk = ~clk;

  typedef struct {
    logic [PROD_W-1:0] p;
    round_t            r;
    longint            cyc;
  } exp_t;

  exp_t   q [$];
  longint cycle = 0;
  int checks = 0, failures = 0, done = 0;
  int n_neg = 0, n_two = 0, n_hi = 0, n_lo = 0, n_up = 0, n_ovf = 0;
  int n_tie = 0, n_exact = 0, n_b2b = 0, n_idle = 0;

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Operand pair with a*b just below 2.0 that rounds up to 2.0.
  function automatic void near_two(output logic [SIG_W-1:0] a, output logic [SIG_W-1:0] b);
    logic [PROD_W-1:0] t, bb, aa;
    t = (PROD_W'(1) << 105) - (PROD_W'(1) << 51);
    forever begin
      bb = PROD_W'({1'b1, 52'($urandom_range(32'h6A09_E667, 32'h6A00_0000)) << 20 | 52'($urandom)});
      aa = (t + bb - 1) / bb;
      if (aa * bb < (PROD_W'(1) << 105) && aa < (PROD_W'(1) << 53)) break;
    end
    a = aa[SIG_W-1:0];
    b = bb[SIG_W-1:0];
  endfunction

  task automatic issue(input logic [SIG_W-1:0] a, input logic [SIG_W-1:0] b);
    exp_t e;
    logic [55:0] yx;
    a_sig    <= a;
    b_sig    <= b;
    in_valid <= 1'b1;
    e.p   = PROD_W'(a) * PROD_W'(b);
    e.r   = round_ref(e.p);
    e.cyc = cycle;
    q.push_back(e);
    yx = {2'b00, b, 1'b0};
    for (int i = 0; i < BOOTH_ROWS; i++) begin
      if (booth_digit(yx[2*i +: 3]) < 0) n_neg++;
      if (booth_digit(yx[2*i +: 3]) == 2 || booth_digit(yx[2*i +: 3]) == -2) n_two++;
    end
    if (e.p[105]) n_hi++; else n_lo++;
    if (e.r.sig != (e.p[105] ? e.p[105:53] : e.p[104:52])) n_up++;
    if (e.r.exp_inc == (e.p[105] ? 2'd2 : 2'd1)) n_ovf++;
    if (e.p[105] ? (e.p[52] && e.p[51:0] == 0) : (e.p[51] && e.p[50:0] == 0)) n_tie++;
    if (!e.r.inexact) n_exact++;
  endtask

  // Result checker.
  always @(posedge clk) begin
    if (rst_n) begin
      if (ov[0] !== ov[1] || ov[0] !== ov[2]) begin
        failures++;
        $display("FAIL out_valid differs between the reductions");
      end
      if (ov[0]) begin
        exp_t e;
        if (q.size() == 0) begin
          failures++;
          $display("FAIL result without operands");
        end else begin
          e = q.pop_front();
          checks++;
          // Issued in cycle e.cyc, the result is valid in cycle e.cyc + 3 and
          // is seen here at the edge that ends that cycle.
          if (cycle - e.cyc != LATENCY + 1) begin
            failures++;
            $display("FAIL latency %0d", cycle - e.cyc);
          end
          for (int k = 0; k < 3; k++) begin
            checks++;
            if (prod[k] !== e.p || sig[k] !== e.r.sig || expi[k] !== e.r.exp_inc ||
                inx[k] !== e.r.inexact) begin
              failures++;
              $display("FAIL dut %0d p=%h want %h sig=%h want %h exp=%0d want %0d",
                       k, prod[k], e.p, sig[k], e.r.sig, expi[k], e.r.exp_inc);
            end
          end
          done++;
        end
      end
    end
  end

  initial begin
    logic [SIG_W-1:0] a, b;
    logic             prev;
    rst_n    = 1'b0;
    in_valid = 1'b0;
    a_sig    = '0;
    b_sig    = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    prev = 1'b0;
    for (int t = 0; t < NOPS; t++) begin
      case (t)
        0: begin a = '1; b = '1; end                              // largest
        1: begin a = {1'b1, 52'b0}; b = {1'b1, 52'b0}; end        // 1.0 * 1.0
        2: begin a = {1'b1, 51'b0, 1'b1}; b = {2'b11, 51'b0}; end // tie
        3: near_two(a, b);                                        // rounds to 2.0
        4: begin a = {1'b1, 52'b0}; b = '1; end
        default: begin
          a = {1'b1, 52'({$urandom, $urandom})};
          b = {1'b1, 52'({$urandom, $urandom})};
        end
      endcase
      if (t > 5 && $urandom_range(3, 0) == 0) begin
        in_valid <= 1'b0;
        n_idle++;
        prev = 1'b0;
        @(posedge clk);
      end
      issue(a, b);
      if (prev) n_b2b++;
      prev = 1'b1;
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (LATENCY + 2) @(posedge clk);
    checks++;
    if (done != NOPS || q.size() != 0) begin
      failures++;
      $display("FAIL %0d of %0d results seen", done, NOPS);
    end
    $display("neg_digits=%0d two_digits=%0d hi=%0d lo=%0d round_up=%0d carry_to_2=%0d tie=%0d exact=%0d back_to_back=%0d idle=%0d",
             n_neg, n_two, n_hi, n_lo, n_up, n_ovf, n_tie, n_exact, n_b2b, n_idle);
    if (n_neg == 0 || n_two == 0 || n_hi == 0 || n_lo == 0 || n_up == 0 || n_ovf == 0 ||
        n_tie == 0 || n_exact == 0 || n_b2b == 0 || n_idle == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
