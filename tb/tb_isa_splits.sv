// tb_isa_splits -- accuracy of the four uniform 32-bit splits: 2x16, 4x8,
// 8x4 and 16x2 paths. All four adders see the same operands: one set of
// uniformly distributed unsigned pairs and one logarithmically uniform set
// (bit length uniform). Each result is checked against the integer reference
// model, and for every split the error rate, RMS and maximum relative error
// are reported, with and without compensation. The sizes of SPEC,
// correction and balancing per split are example choices (listed in CFG).
// Checks: the model agrees on every sample, and compensation lowers the RMS
// relative error and the error rate of every split.
module tb_isa_splits;
  import isa_ref_pkg::*;

  localparam int NSAMP = 5_000_000;
  localparam int NCFG  = 4;
  // {X, SPEC_W, CORR_W, BAL_W} of each split.
  localparam int CFG [NCFG][4] = '{'{16, 4, 3, 4}, '{8, 2, 1, 2}, '{4, 2, 1, 2}, '{2, 2, 1, 1}};

  int checks = 0, failures = 0;

  logic [31:0] a, b;
  logic [31:0] s [NCFG];
  logic        co [NCFG];

  isa_adder #(.X(16), .SPEC_W(4), .CORR_W(3), .BAL_W(4)) dut_2x16 (
    .a(a), .b(b), .s(s[0]), .cout(co[0]), .fault(), .corrected(), .balanced());
  isa_adder #(.X(8),  .SPEC_W(2), .CORR_W(1), .BAL_W(2)) dut_4x8 (
    .a(a), .b(b), .s(s[1]), .cout(co[1]), .fault(), .corrected(), .balanced());
  isa_adder #(.X(4),  .SPEC_W(2), .CORR_W(1), .BAL_W(2)) dut_8x4 (
    .a(a), .b(b), .s(s[2]), .cout(co[2]), .fault(), .corrected(), .balanced());
  isa_adder #(.X(2),  .SPEC_W(2), .CORR_W(1), .BAL_W(1)) dut_16x2 (
    .a(a), .b(b), .s(s[3]), .cout(co[3]), .fault(), .corrected(), .balanced());

  initial begin
    #(64'd4 * NSAMP + 1000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_set(string name, bit logdist);
    real sq [NCFG], sq_nc [NCFG], mx [NCFG], mx_nc [NCFG];
    int  nerr [NCFG], nerr_nc [NCFG];
    real re;
    longint unsigned exact, r, r_nc, got;
    for (int k = 0; k < NCFG; k++) begin
      sq[k] = 0; sq_nc[k] = 0; mx[k] = 0; mx_nc[k] = 0; nerr[k] = 0; nerr_nc[k] = 0;
    end
    for (int i = 0; i < NSAMP; i++) begin
      if (logdist) begin a = 32'(log_uniform(32)); b = 32'(log_uniform(32)); end
      else         begin a = $urandom;             b = $urandom;             end
      #1;
      exact = 64'(a) + 64'(b);
      for (int k = 0; k < NCFG; k++) begin
        got  = 64'({co[k], s[k]});
        r    = isa_ref(64'(a), 64'(b), 32, CFG[k][0], CFG[k][1], CFG[k][2], CFG[k][3], 1'b0, 1'b1);
        r_nc = isa_ref(64'(a), 64'(b), 32, CFG[k][0], CFG[k][1], CFG[k][2], CFG[k][3], 1'b0, 1'b0);
        checks++;
        if (got != r) begin
          failures++;
          if (failures < 5) $display("FAIL %s split %0d a=%h b=%h got %h exp %h", name, k, a, b, got, r);
        end
        re = rel_err(got, exact);
        sq[k] += re * re;
        if (re > mx[k]) mx[k] = re;
        if (got != exact) nerr[k]++;
        re = rel_err(r_nc, exact);
        sq_nc[k] += re * re;
        if (re > mx_nc[k]) mx_nc[k] = re;
        if (r_nc != exact) nerr_nc[k]++;
      end
    end
    for (int k = 0; k < NCFG; k++) begin
      $display("%s %0dx%0d (SPEC %0d, corr %0d, bal %0d): err rate %f %%, RE_RMS %e %%, RE_MAX %e %% | no comp: %f %%, %e %%, %e %%",
               name, 32 / CFG[k][0], CFG[k][0], CFG[k][1], CFG[k][2], CFG[k][3],
               100.0 * nerr[k] / NSAMP, 100.0 * $sqrt(sq[k] / NSAMP), 100.0 * mx[k],
               100.0 * nerr_nc[k] / NSAMP, 100.0 * $sqrt(sq_nc[k] / NSAMP), 100.0 * mx_nc[k]);
      checks++;
      if (!(sq[k] < sq_nc[k] && nerr[k] < nerr_nc[k])) begin
        failures++;
        $display("FAIL %s split %0d: compensation does not improve accuracy", name, k);
      end
    end
  endtask

  initial begin
    run_set("uniform", 1'b0);
    run_set("log-uniform", 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
