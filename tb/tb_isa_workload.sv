// tb_isa_workload -- accuracy characterization of the default 32-bit, 4x8
// inexact speculative adder, with all parameters at their defaults.
//
// Two sets of unsigned random operand pairs are applied, as in the design's
// characterization: a uniform distribution (for the RMS of the relative
// error) and a logarithmically uniform one, whose bit length is uniform (for
// the maximum relative error). Every result is checked against the integer
// reference model of isa_ref_pkg. The testbench reports the error rate, the
// RMS and the maximum relative error |S - (A+B)| / (A+B), and also those of
// the same speculative sum without compensation; it checks that
// compensation lowers both the RMS relative error and the error rate.
// NSAMP is the size of each set (five million in the characterization).
module tb_isa_workload;
  import isa_ref_pkg::*;

  localparam int NSAMP = 5_000_000;

  int checks = 0, failures = 0;

  logic [31:0] a, b, s;
  logic        co;
  logic [2:0]  f, c, bl;

  isa_adder dut (.a(a), .b(b), .s(s), .cout(co), .fault(f), .corrected(c), .balanced(bl));

  initial begin
    #(64'd4 * NSAMP + 1000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_set(string name, bit logdist);
    real sq, sq_nc, mx, mx_nc, re, re_nc;
    int  nerr, nerr_nc, nfault, ncorr, nbal, bad;
    longint unsigned exact, r, r_nc, got;
    sq = 0; sq_nc = 0; mx = 0; mx_nc = 0;
    nerr = 0; nerr_nc = 0; nfault = 0; ncorr = 0; nbal = 0; bad = 0;
    for (int i = 0; i < NSAMP; i++) begin
      if (logdist) begin a = 32'(log_uniform(32)); b = 32'(log_uniform(32)); end
      else         begin a = $urandom;             b = $urandom;             end
      #1;
      got   = 64'({co, s});
      exact = 64'(a) + 64'(b);
      r     = isa_ref(64'(a), 64'(b), 32, 8, 2, 1, 2, 1'b0, 1'b1);
      r_nc  = isa_ref(64'(a), 64'(b), 32, 8, 2, 1, 2, 1'b0, 1'b0);
      checks++;
      if (got != r) begin
        failures++; bad++;
        if (bad < 5) $display("FAIL %s a=%h b=%h got %h exp %h", name, a, b, got, r);
      end
      re = rel_err(got, exact);  re_nc = rel_err(r_nc, exact);
      sq += re * re;             sq_nc += re_nc * re_nc;
      if (re > mx) mx = re;      if (re_nc > mx_nc) mx_nc = re_nc;
      if (got != exact) nerr++;  if (r_nc != exact) nerr_nc++;
      if (f != 0) nfault++;
      if (c != 0) ncorr++;
      if (bl != 0) nbal++;
    end
    $display("%s: %0d samples, with faults %0d, corrected %0d, balanced %0d", name, NSAMP, nfault, ncorr, nbal);
    $display("  compensated:   error rate %f %%, RE_RMS %e %%, RE_MAX %e %%",
             100.0 * nerr / NSAMP, 100.0 * $sqrt(sq / NSAMP), 100.0 * mx);
    $display("  uncompensated: error rate %f %%, RE_RMS %e %%, RE_MAX %e %%",
             100.0 * nerr_nc / NSAMP, 100.0 * $sqrt(sq_nc / NSAMP), 100.0 * mx_nc);
    checks++;
    if (!(sq < sq_nc)) begin failures++; $display("FAIL %s: compensation does not lower RE_RMS", name); end
    checks++;
    if (!(nerr < nerr_nc)) begin failures++; $display("FAIL %s: compensation does not lower the error rate", name); end
    checks++;
    if (ncorr == 0 || nbal == 0) begin failures++; $display("FAIL %s: correction or balancing never used", name); end
  endtask

  initial begin
    run_set("uniform", 1'b0);
    run_set("log-uniform", 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
