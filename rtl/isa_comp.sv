// isa_comp -- error compensation unit (COMP) between two adjacent paths.
//
// A speculation fault is flagged when the speculated carry used by the upper
// path differs from the carry-out of the lower path's sub-adder. The error
// then has the sign of the speculation: a guess of 0 (true carry 1) leaves
// the upper sum one unit too low, a guess of 1 leaves it one unit too high.
// COMP compensates in that direction in one of two ways:
//   * correction: the CORR_W least significant bits of the upper sum are
//     incremented (guess 0) or decremented (guess 1). This is only done when
//     it does not overflow the CORR_W-bit field (all ones for an increment,
//     all zeros for a decrement);
//   * balancing: when correction would overflow, the BAL_W most significant
//     bits of the lower sum are forced to all ones (guess 0) or all zeros
//     (guess 1), which shrinks the magnitude of the error.
// Without a fault both fields pass unchanged. The increment/decrement and its
// overflow test depend only on the sum bits and can be computed alongside the
// adders; the fault bit only steers the final multiplexers.
//
// Interface: c_spec (speculated carry of the upper path), prev_cout (carry-out
// of the lower sub-adder), lsbs (upper sum LSBs), prev_msbs (lower sum MSBs);
// outputs lsbs_out, prev_msbs_out and the status flags fault, corrected,
// balanced (at most one of the last two is set). Combinational.
//
// Follows the document: XOR fault detection, increment with carry-out
// selecting correction or balancing, constant all-ones balancing value, and
// dual-direction (increment/decrement) compensation. Forcing the MSBs to all
// zeros in the decrement direction is this design's mirror image of the
// all-ones case; the status flags are this design's addition.
module isa_comp #(
  parameter int unsigned CORR_W = 1,
  parameter int unsigned BAL_W  = 2
) (
  input  logic              c_spec,
  input  logic              prev_cout,
  input  logic [CORR_W-1:0] lsbs,
  input  logic [BAL_W-1:0]  prev_msbs,
  output logic [CORR_W-1:0] lsbs_out,
  output logic [BAL_W-1:0]  prev_msbs_out,
  output logic              fault,
  output logic              corrected,
  output logic              balanced
);

  logic              dir_up;     // guess was 0: sum too low, compensate upward
  logic [CORR_W-1:0] incr, decr;
  logic              incr_ovf, decr_ovf, ovf;

  // Precomputed in parallel with the sub-adders.
  assign {incr_ovf, incr} = {1'b0, lsbs} + {{CORR_W{1'b0}}, 1'b1};
  assign {decr_ovf, decr} = {1'b0, lsbs} - {{CORR_W{1'b0}}, 1'b1};

  assign fault     = c_spec ^ prev_cout;
  assign dir_up    = ~c_spec;
  assign ovf       = dir_up ? incr_ovf : decr_ovf;
  assign corrected = fault & ~ovf;
  assign balanced  = fault & ovf;

  always_comb begin
    lsbs_out      = lsbs;
    prev_msbs_out = prev_msbs;
    if (corrected) lsbs_out      = dir_up ? incr : decr;
    if (balanced)  prev_msbs_out = {BAL_W{dir_up}};
  end

endmodule
