// tb_isa_comp -- exhaustive check of the compensation unit for the default
// sizes (1-bit correction, 2-bit balancing) and for 3-bit correction with
// 3-bit balancing. Expected outputs follow the rule directly: no fault when
// the two carries agree; otherwise add (guess 0) or subtract (guess 1) one
// on the LSB field if the result stays inside it, else force the preceding
// MSB field to all ones (guess 0) or all zeros (guess 1).
module tb_isa_comp;
  int checks = 0, failures = 0;

  logic       cs1, pc1, f1, c1, b1;
  logic [0:0] l1, lo1;
  logic [1:0] m1, mo1;
  logic       cs3, pc3, f3, c3, b3;
  logic [2:0] l3, lo3, m3, mo3;

  isa_comp dut1 (.c_spec(cs1), .prev_cout(pc1), .lsbs(l1), .prev_msbs(m1),
                 .lsbs_out(lo1), .prev_msbs_out(mo1), .fault(f1), .corrected(c1), .balanced(b1));
  isa_comp #(.CORR_W(3), .BAL_W(3)) dut3 (
                 .c_spec(cs3), .prev_cout(pc3), .lsbs(l3), .prev_msbs(m3),
                 .lsbs_out(lo3), .prev_msbs_out(mo3), .fault(f3), .corrected(c3), .balanced(b3));

  // Reference: returns {lsbs_out, msbs_out, fault, corrected, balanced} as integers.
  task automatic ref_comp(input bit cs, pc, input int l, m, cw, bw,
                          output int lo, mo, output bit f, c, b);
    int lmax = (1 << cw) - 1;
    int mmax = (1 << bw) - 1;
    lo = l; mo = m; f = (cs != pc); c = 0; b = 0;
    if (f && !cs) begin
      if (l < lmax) begin lo = l + 1; c = 1; end
      else          begin mo = mmax;  b = 1; end
    end else if (f && cs) begin
      if (l > 0)    begin lo = l - 1; c = 1; end
      else          begin mo = 0;     b = 1; end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lo, mo; bit f, c, b;
    int n_corr, n_bal;
    n_corr = 0; n_bal = 0;
    for (int i = 0; i < 32; i++) begin
      {cs1, pc1, l1, m1} = 5'(i); #1;
      ref_comp(cs1, pc1, int'(l1), int'(m1), 1, 2, lo, mo, f, c, b);
      checks++;
      if (lo1 !== 1'(lo) || mo1 !== 2'(mo) || f1 !== f || c1 !== c || b1 !== b) begin
        failures++;
        $display("FAIL c1b2 cs=%0b pc=%0b l=%0d m=%0d: got %0d %0d %0b%0b%0b exp %0d %0d %0b%0b%0b",
                 cs1, pc1, l1, m1, lo1, mo1, f1, c1, b1, lo, mo, f, c, b);
      end
      n_corr += int'(c); n_bal += int'(b);
    end
    for (int i = 0; i < 256; i++) begin
      {cs3, pc3, l3, m3} = 8'(i); #1;
      ref_comp(cs3, pc3, int'(l3), int'(m3), 3, 3, lo, mo, f, c, b);
      checks++;
      if (lo3 !== 3'(lo) || mo3 !== 3'(mo) || f3 !== f || c3 !== c || b3 !== b) begin
        failures++;
        $display("FAIL c3b3 cs=%0b pc=%0b l=%0d m=%0d: got %0d %0d %0b%0b%0b exp %0d %0d %0b%0b%0b",
                 cs3, pc3, l3, m3, lo3, mo3, f3, c3, b3, lo, mo, f, c, b);
      end
      n_corr += int'(c); n_bal += int'(b);
    end
    $display("corrections=%0d balancings=%0d", n_corr, n_bal);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
