// tb_rs_ref_pkg: reference GF(16) and RS(15,11) arithmetic for testbenches.
//
// Written independently of the RTL: multiplication uses exponent and
// logarithm tables built by repeated doubling modulo x^4 + x + 1, the
// generator polynomial is built by multiplying out (x + a^i) for i = 1..4,
// and encoding is polynomial long division.  Syndromes evaluate a codeword
// at a^1..a^4 directly from powers.
package tb_rs_ref_pkg;

  int exp_t [30];
  int log_t [16];
  int gen   [5];     // gen[i] = coefficient of x^i
  bit ready = 0;

  function automatic void init();
    int v = 1;
    for (int i = 0; i < 30; i++) begin
      exp_t[i] = v;
      if (i < 15) log_t[v] = i;
      v = v << 1;
      if (v & 16) v = v ^ 19;
    end
    gen = '{1, 0, 0, 0, 0};
    for (int r = 1; r <= 4; r++) begin
      int ng [5] = '{0, 0, 0, 0, 0};
      for (int i = 0; i < 5; i++) begin
        if (i > 0) ng[i] ^= gen[i-1];          // x * gen
        ng[i] ^= mul(gen[i], exp_t[r]);        // a^r * gen
      end
      gen = ng;
    end
    ready = 1;
  endfunction

  function automatic int mul(int a, int b);
    if (a == 0 || b == 0) return 0;
    return exp_t[log_t[a] + log_t[b]];
  endfunction

  // Systematic codeword: message symbols msg[10] (top) .. msg[0] placed at
  // x^14 .. x^4, remainder of msg(x) x^4 / gen(x) at x^3 .. x^0.
  function automatic logic [59:0] encode(logic [43:0] m);
    int r [15];
    logic [59:0] c;
    if (!ready) init();
    for (int i = 0; i < 15; i++) r[i] = (i >= 4) ? int'(m[(i-4)*4 +: 4]) : 0;
    for (int i = 14; i >= 4; i--) begin
      int q = r[i];
      if (q != 0)
        for (int j = 0; j <= 4; j++) r[i-4+j] ^= mul(q, gen[j]);
    end
    c = {m, 16'h0};
    for (int i = 0; i < 4; i++) c[i*4 +: 4] = 4'(r[i]);
    return c;
  endfunction

  function automatic int syndrome(logic [59:0] c, int j);
    int s = 0;
    if (!ready) init();
    for (int i = 0; i < 15; i++)
      s ^= mul(int'(c[i*4 +: 4]), exp_t[(i * j) % 15]);
    return s;
  endfunction

endpackage
