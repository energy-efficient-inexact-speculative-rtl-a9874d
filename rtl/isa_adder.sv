// isa_adder -- N-bit Inexact Speculative Adder (ISA).
//
// The carry chain is cut into P = N/X paths of X bits that all add at the
// same time. Path i (i >= 1) does not wait for the carry of path i-1: its
// SPEC guesses it from the SPEC_W top operand bits of path i-1. The critical
// path is thus one X-bit sub-adder plus a SPEC_W-bit look-ahead. A COMP at
// every boundary compares the guess with the carry-out actually produced by
// the sub-adder of path i-1; on a mismatch it either corrects the CORR_W LSBs
// of path i's sum or, if that would overflow, balances the BAL_W MSBs of path
// i-1's sum (see isa_comp). Path 0 has no SPEC and a carry-in of 0.
//
// Interface: a, b (N bits, unsigned) in; s (N bits) and cout (carry-out of
// the top sub-adder) out. fault/corrected/balanced carry one bit per
// boundary: bit k describes the boundary between path k+1 and path k.
// Purely combinational.
//
// Follows the document: uniform paths, SPEC/ADD/COMP structure, 32-bit
// width, 4x8 split (one of the 2x16, 4x8, 8x4, 16x2 splits it studies) and
// the 2-bit SPEC, 1-bit correction and 2-bit balancing sizes of its worked
// example. This design's own choices: the default split is 4x8, the
// correction and balancing fields of one path may not overlap
// (CORR_W + BAL_W <= X), the status flags are brought out, and the sizes of
// the 32-bit variants' SPEC/COMP are not taken from the document.
module isa_adder #(
  parameter int unsigned N        = 32,
  parameter int unsigned X        = 8,
  parameter int unsigned SPEC_W   = 2,
  parameter int unsigned CORR_W   = 1,
  parameter int unsigned BAL_W    = 2,
  parameter logic        SPEC_CIN = 1'b0,
  localparam int unsigned P       = N / X
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s,
  output logic         cout,
  output logic [P-2:0] fault,
  output logic [P-2:0] corrected,
  output logic [P-2:0] balanced
);

  // Elaboration-time checks of the size parameters.
  if (N % X != 0 || P < 2) begin : g_chk_paths
    $error("isa_adder: N must be a multiple of X with at least two paths");
  end
  if (SPEC_W < 1 || SPEC_W > X) begin : g_chk_spec
    $error("isa_adder: SPEC_W must be 1..X");
  end
  if (CORR_W < 1 || BAL_W < 1 || CORR_W + BAL_W > X) begin : g_chk_comp
    $error("isa_adder: need CORR_W >= 1, BAL_W >= 1 and CORR_W + BAL_W <= X");
  end

  logic [P-1:0]        cin_spec;   // carry-in of each sub-adder
  logic [P-1:0]        add_cout;   // carry-out of each sub-adder
  logic [X-1:0]        psum [P];   // raw sub-adder sums
  logic [CORR_W-1:0]   lsb_fix [P];
  logic [BAL_W-1:0]    msb_fix [P];

  assign cin_spec[0] = 1'b0;

  for (genvar i = 0; i < int'(P); i++) begin : g_path
    if (i > 0) begin : g_spec
      isa_spec #(.SPEC_W(SPEC_W), .SPEC_CIN(SPEC_CIN)) u_spec (
        .a      (a[i*X-1 -: SPEC_W]),
        .b      (b[i*X-1 -: SPEC_W]),
        .c_spec (cin_spec[i])
      );
    end

    isa_add #(.W(X)) u_add (
      .a    (a[i*X +: X]),
      .b    (b[i*X +: X]),
      .cin  (cin_spec[i]),
      .sum  (psum[i]),
      .cout (add_cout[i])
    );

    if (i > 0) begin : g_comp
      isa_comp #(.CORR_W(CORR_W), .BAL_W(BAL_W)) u_comp (
        .c_spec        (cin_spec[i]),
        .prev_cout     (add_cout[i-1]),
        .lsbs          (psum[i][CORR_W-1:0]),
        .prev_msbs     (psum[i-1][X-1 -: BAL_W]),
        .lsbs_out      (lsb_fix[i]),
        .prev_msbs_out (msb_fix[i-1]),
        .fault         (fault[i-1]),
        .corrected     (corrected[i-1]),
        .balanced      (balanced[i-1])
      );
    end else begin : g_nocomp
      assign lsb_fix[i] = psum[i][CORR_W-1:0];
    end

    if (i == int'(P) - 1) begin : g_top
      assign msb_fix[i] = psum[i][X-1 -: BAL_W];
    end

    // Compensated path sum: balanced MSBs | untouched middle | corrected LSBs.
    if (X > CORR_W + BAL_W) begin : g_mid
      assign s[i*X +: X] = {msb_fix[i], psum[i][X-BAL_W-1:CORR_W], lsb_fix[i]};
    end else begin : g_nomid
      assign s[i*X +: X] = {msb_fix[i], lsb_fix[i]};
    end
  end

  assign cout = add_cout[P-1];

endmodule
