// isa_ref_pkg -- behavioural reference model of the inexact speculative adder
// for the testbenches. It recomputes the ISA result with whole-number
// arithmetic on 64-bit integers (window sums for the speculation, masked
// field updates for the compensation), independently of the RTL structure.
// isa_ref() returns the (N+1)-bit result {cout, sum}; with comp_en = 0 it
// returns the speculative sum without any compensation.
package isa_ref_pkg;

  function automatic longint unsigned mask(int w);
    return (w >= 64) ? '1 : ((64'd1 << w) - 64'd1);
  endfunction

  // Full model: also returns one bit per path boundary (bit k: boundary
  // between path k+1 and path k) for fault, correction and balancing.
  function automatic void isa_ref_full(
    input  longint unsigned a, input longint unsigned b,
    input  int n, input int x, input int spec_w, input int corr_w, input int bal_w,
    input  bit spec_cin, input bit comp_en,
    output longint unsigned res, output longint unsigned flt,
    output longint unsigned cor, output longint unsigned bal);
    longint unsigned raw [64];
    bit              co  [64];
    bit              ci  [64];
    longint unsigned wa, wb, t, l;
    int              p;
    p = n / x;
    flt = 0; cor = 0; bal = 0;
    for (int i = 0; i < p; i++) begin
      if (i == 0) ci[i] = 1'b0;
      else begin
        wa = (a >> (i*x - spec_w)) & mask(spec_w);
        wb = (b >> (i*x - spec_w)) & mask(spec_w);
        ci[i] = ((wa + wb + 64'(spec_cin)) >> spec_w) != 0;
      end
      t = ((a >> (i*x)) & mask(x)) + ((b >> (i*x)) & mask(x)) + 64'(ci[i]);
      raw[i] = t & mask(x);
      co[i]  = (t >> x) != 0;
    end
    if (comp_en) begin
      for (int i = 1; i < p; i++) begin
        if (ci[i] != co[i-1]) begin
          flt[i-1] = 1'b1;
          l = raw[i] & mask(corr_w);
          if (!ci[i]) begin
            if (l != mask(corr_w)) begin raw[i] = raw[i] + 1; cor[i-1] = 1'b1; end
            else begin raw[i-1] = raw[i-1] | (mask(bal_w) << (x - bal_w)); bal[i-1] = 1'b1; end
          end else begin
            if (l != 0) begin raw[i] = raw[i] - 1; cor[i-1] = 1'b1; end
            else begin raw[i-1] = raw[i-1] & ~(mask(bal_w) << (x - bal_w)); bal[i-1] = 1'b1; end
          end
        end
      end
    end
    res = 64'(co[p-1]);
    for (int i = p - 1; i >= 0; i--) res = (res << x) | raw[i];
  endfunction

  // Result {cout, sum} only.
  function automatic longint unsigned isa_ref(
    longint unsigned a, longint unsigned b,
    int n, int x, int spec_w, int corr_w, int bal_w, bit spec_cin, bit comp_en);
    longint unsigned res, flt, cor, bal;
    isa_ref_full(a, b, n, x, spec_w, corr_w, bal_w, spec_cin, comp_en, res, flt, cor, bal);
    return res;
  endfunction

  // Log-uniform unsigned n-bit value: bit length uniform in 0..n, then the
  // remaining bits uniform.
  function automatic longint unsigned log_uniform(int n);
    int len;
    longint unsigned v;
    len = int'($urandom_range(n, 0));
    if (len == 0) return 0;
    v = {$urandom, $urandom};
    v = v & mask(len - 1);
    return v | (64'd1 << (len - 1));
  endfunction

  // Relative error |approx - exact| / exact, 0 when both are 0.
  function automatic real rel_err(longint unsigned approx, longint unsigned exact);
    real d;
    d = (approx > exact) ? real'(approx - exact) : real'(exact - approx);
    return (exact == 0) ? ((approx == 0) ? 0.0 : 1.0) : d / real'(exact);
  endfunction

endpackage
