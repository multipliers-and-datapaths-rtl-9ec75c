// mul_datapath: 53 x 53-bit significand multiplier for an IEEE double
// precision datapath.
//
// Data flow, following the general layout of the document:
//   1. operand latches    - the two 53-bit significands (hidden bit
//                           included) are captured by the system clock;
//   2. Booth encoders and Booth muxes (pp_gen) turn operand 2 into 27
//      radix-4 digits and form 27 partial-product rows plus a correction row;
//   3. the reduction network sums the 28 rows to a carry-save pair:
//        REDUCTION = RED_HOA    higher-order array 6-6-8-8 (default)
//        REDUCTION = RED_HYBRID type-one tree beside a linear array, the
//                               tree being ZM (HYBRID_TREE = TREE_ZM,
//                               default) or overturned stairs (TREE_OS);
//   4. carry-save latches - the two 106-bit vectors are captured;
//   5. the 106-bit carry-propagate adder and the rounding logic produce the
//      exact product and the significand rounded to nearest even, which are
//      captured in the result register.
//
// Timing: one operation may enter every cycle. Operands presented with
// in_valid in clock cycle n give out_valid and the results in cycle n+3:
// the operand latch captures them at the end of cycle n, the carry-save
// latch at the end of cycle n+1 and the result register at the end of
// cycle n+2. There is no stall or back-pressure.
// rst_n is an active-low synchronous reset that clears every register.
//
// The document gives the operand width, the Booth recoding, the row count,
// the reduction topologies and the latch before the CPA. The register at the
// input follows its statement that inputs are latched by the system clock.
// The result register, the reset and the valid flags are this design's own,
// as are the rounding mode and the sign and exponent handling, which are
// left to the surrounding datapath (exp_inc reports the exponent step).
module mul_datapath
  import mul_pkg::*;
#(
  parameter reduction_e REDUCTION   = RED_HOA,
  parameter tree_kind_e HYBRID_TREE = TREE_ZM   // tree beside the array in the hybrid
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [SIG_W-1:0]  a_sig,      // operand 1, multiplicand
  input  logic [SIG_W-1:0]  b_sig,      // operand 2, multiplier (Booth encoded)
  output logic              out_valid,
  output logic [PROD_W-1:0] product,    // exact product a_sig * b_sig
  output logic [SIG_W-1:0]  sig,        // rounded, normalised significand
  output logic [1:0]        exp_inc,    // exponent adjustment of the result
  output logic              inexact
);

  // Stage 1: operand latches.
  logic             v1;
  logic [SIG_W-1:0] a_q, b_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1  <= 1'b0;
      a_q <= '0;
      b_q <= '0;
    end else begin
      v1  <= in_valid;
      a_q <= a_sig;
      b_q <= b_sig;
    end
  end

  // Booth encoding and partial products.
  logic [PROD_W-1:0] pp [PP_ROWS];

  pp_gen u_pp (.x(a_q), .y(b_q), .pp(pp));

  // Partial-product reduction.
  logic [PROD_W-1:0] red_s, red_c;

  if (REDUCTION == RED_HYBRID) begin : g_hybrid
    hybrid_tree #(.W(PROD_W), .TREE(HYBRID_TREE), .N(PP_ROWS)) u_red (
      .rows(pp), .s(red_s), .co(red_c)
    );
  end else begin : g_hoa
    hoa_tree #(.W(PROD_W), .N(PP_ROWS)) u_red (.rows(pp), .s(red_s), .co(red_c));
  end

  // Stage 2: carry-save latches in front of the CPA.
  logic              v2;
  logic [PROD_W-1:0] s_q, c_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v2  <= 1'b0;
      s_q <= '0;
      c_q <= '0;
    end else begin
      v2  <= v1;
      s_q <= red_s;
      c_q <= red_c;
    end
  end

  // CPA and rounding.
  logic [PROD_W-1:0] sum;
  logic [SIG_W-1:0]  r_sig;
  logic [1:0]        r_exp;
  logic              r_inx;

  cpa #(.W(PROD_W)) u_cpa (.a(s_q), .b(c_q), .sum(sum));
  sig_round u_rnd (.p(sum), .sig(r_sig), .exp_inc(r_exp), .inexact(r_inx));

  // Stage 3: result register.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      product   <= '0;
      sig       <= '0;
      exp_inc   <= '0;
      inexact   <= 1'b0;
    end else begin
      out_valid <= v2;
      product   <= sum;
      sig       <= r_sig;
      exp_inc   <= r_exp;
      inexact   <= r_inx;
    end
  end

endmodule
