// tb_isa_adder -- end-to-end test of the inexact speculative adder.
//
// Four instances run side by side:
//   dut_ex  16-bit, 4x4 paths, 2-bit SPEC, 1-bit correction, 2-bit balancing:
//           the worked example of the design description, whose operands and
//           compensated sum are checked bit for bit (a correction in one
//           boundary, a balancing in the next, none in the third).
//   dut     the 32-bit, 4x8 default configuration.
//   dut_dn  the default configuration with carry chains speculated at 1, so
//           that faults in the decrement direction occur.
//   dut_w   32-bit, 2x16 paths, 4-bit SPEC, 3-bit correction, 4-bit balancing.
// Each is driven with uniform random operands and with operands built to hold
// long propagate chains across path boundaries, and compared, result and
// per-boundary flags, with the integer reference model of isa_ref_pkg. The
// test also counts how often each mechanism was exercised (exact result,
// inexact result, fault, correction and balancing in each direction) and
// fails if any of them never happened.
module tb_isa_adder;
  import isa_ref_pkg::*;

  int checks = 0, failures = 0;

  // Worked example instance.
  logic [15:0] ex_a, ex_b, ex_s;
  logic        ex_co;
  logic [2:0]  ex_f, ex_c, ex_bl;
  isa_adder #(.N(16), .X(4), .SPEC_W(2), .CORR_W(1), .BAL_W(2)) dut_ex (
    .a(ex_a), .b(ex_b), .s(ex_s), .cout(ex_co), .fault(ex_f), .corrected(ex_c), .balanced(ex_bl));

  logic [31:0] a, b;
  logic [31:0] s0, s1, s2;
  logic        co0, co1, co2;
  logic [2:0]  f0, c0, b0, f1, c1, b1;
  logic [0:0]  f2, c2, b2;

  isa_adder dut (.a(a), .b(b), .s(s0), .cout(co0), .fault(f0), .corrected(c0), .balanced(b0));
  isa_adder #(.SPEC_CIN(1'b1)) dut_dn (
    .a(a), .b(b), .s(s1), .cout(co1), .fault(f1), .corrected(c1), .balanced(b1));
  isa_adder #(.X(16), .SPEC_W(4), .CORR_W(3), .BAL_W(4)) dut_w (
    .a(a), .b(b), .s(s2), .cout(co2), .fault(f2), .corrected(c2), .balanced(b2));

  // Mechanism counters.
  int n_exact = 0, n_inexact = 0, n_fault = 0;
  int n_corr_up = 0, n_corr_dn = 0, n_bal_up = 0, n_bal_dn = 0;

  task automatic compare(string tag, longint unsigned ga, gb,
                         int x, int sw, int cw, int bw, bit scin,
                         longint unsigned got, gf, gc, gbl);
    longint unsigned r, rf, rc, rb, exact;
    isa_ref_full(ga, gb, 32, x, sw, cw, bw, scin, 1'b1, r, rf, rc, rb);
    checks++;
    if (got != r || gf != rf || gc != rc || gbl != rb) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s a=%h b=%h got %h f%0h c%0h b%0h exp %h f%0h c%0h b%0h",
                 tag, ga, gb, got, gf, gc, gbl, r, rf, rc, rb);
    end
    exact = ga + gb;
    if (r == exact) n_exact++; else n_inexact++;
    if (rf != 0) n_fault++;
    if (rc != 0) begin if (scin) n_corr_dn++; else n_corr_up++; end
    if (rb != 0) begin if (scin) n_bal_dn++;  else n_bal_up++;  end
  endtask

  task automatic count(string what, int n);
    checks++;
    $display("%-22s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Worked example: 0001_1101_1111_1111 + 1000_0101_0010_0011.
    ex_a = 16'b0001_1101_1111_1111;
    ex_b = 16'b1000_0101_0010_0011;
    #1;
    checks++;
    if ({ex_co, ex_s} !== 17'b0_1010_0011_0001_1110 || ex_f !== 3'b011 ||
        ex_c !== 3'b010 || ex_bl !== 3'b001) begin
      failures++;
      $display("FAIL worked example: got %b_%b f=%b c=%b b=%b", ex_co, ex_s, ex_f, ex_c, ex_bl);
    end

    for (int i = 0; i < 40000; i++) begin
      a = $urandom;
      if (i % 2 == 0) b = $urandom;
      else            b = ~a ^ ($urandom & $urandom & $urandom);  // mostly propagate
      #1;
      compare("4x8",       64'(a), 64'(b),  8, 2, 1, 2, 1'b0, 64'({co0, s0}), 64'(f0), 64'(c0), 64'(b0));
      compare("4x8 spec1", 64'(a), 64'(b),  8, 2, 1, 2, 1'b1, 64'({co1, s1}), 64'(f1), 64'(c1), 64'(b1));
      compare("2x16",      64'(a), 64'(b), 16, 4, 3, 4, 1'b0, 64'({co2, s2}), 64'(f2), 64'(c2), 64'(b2));
    end

    count("exact results", n_exact);
    count("inexact results", n_inexact);
    count("faults", n_fault);
    count("corrections up", n_corr_up);
    count("corrections down", n_corr_dn);
    count("balancings up", n_bal_up);
    count("balancings down", n_bal_dn);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
