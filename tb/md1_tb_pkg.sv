// md1_tb_pkg: testbench helpers for the MD-1 processor: conversion between
// real numbers and the 24-bit number format (computed with real arithmetic,
// independently of the design's integer arithmetic), tolerance checks and
// control-word builders.
package md1_tb_pkg;
  import md1_pkg::*;

  function automatic logic [23:0] to_fp(real v);
    logic s;
    int e;
    int m;
    s = v < 0.0;
    if (s) v = -v;
    if (v == 0.0) return 24'd0;
    e = 0;
    while (v >= 1.0) begin v = v / 2.0; e++; end
    while (v < 0.5)  begin v = v * 2.0; e--; end
    m = int'($floor(v * 65536.0));
    if (m > 65535) m = 65535;
    return {s, e < 0, 6'(e < 0 ? -e : e), 16'(m)};
  endfunction

  function automatic real from_fp(logic [23:0] w);
    real v;
    int e;
    e = w[22] ? -int'(w[21:16]) : int'(w[21:16]);
    v = real'(w[15:0]) / 65536.0 * (2.0 ** e);
    return w[23] ? -v : v;
  endfunction

  // |a - b| <= rel * max(|a|,|b|) + abs_tol
  function automatic bit near(real a, real b, real rel, real abs_tol);
    real d, m;
    d = a - b; if (d < 0) d = -d;
    m = (a < 0 ? -a : a);
    if ((b < 0 ? -b : b) > m) m = (b < 0 ? -b : b);
    return d <= rel * m + abs_tol;
  endfunction

  // A random number of moderate size (magnitude 2^-8 .. 2^8), sign random.
  function automatic real rnd_real();
    real v;
    int m, e, s;
    m = $urandom_range(65535, 1);
    e = $urandom_range(16, 0);
    s = $urandom_range(1, 0);
    v = (real'(m) / 65536.0) * (2.0 ** (e - 8));
    return (s == 1) ? -v : v;
  endfunction

  // Control words.
  function automatic logic [39:0] ci(md1_cuop_e op, int n, int target);
    md1_ci_t c;
    c = '0;
    c.ctrl = 1'b1;
    c.op = op;
    c.n = 16'(n);
    c.target = 14'(target);
    return c;
  endfunction

  // Data word with one source and an address; callers set the input lines.
  function automatic md1_cw_t dw(md1_src_e src = SRC_NONE, int addr = 0);
    md1_cw_t w;
    w = '0;
    w.src  = src;
    w.addr = 10'(addr);
    return w;
  endfunction

  // Minimal program assembler with labels for the control unit.
  class md1_asm;
    logic [39:0] words [$];
    int          label_at [string];
    string       fix_name [int];

    function void emit(logic [39:0] w);
      words.push_back(w);
    endfunction
    function void label(string name);
      label_at[name] = words.size();
    endfunction
    function void ctl(md1_cuop_e op, int n = 0, string target = "");
      if (target != "") fix_name[words.size()] = target;
      words.push_back(ci(op, n, 0));
    endfunction
    function void wait_steps(int n);
      words.push_back(ci(CU_WAIT, n, 0));
    endfunction
    // resolve labels, relocating to base
    function void link(int base);
      foreach (fix_name[i]) begin
        md1_ci_t c;
        c = md1_ci_t'(words[i]);
        c.target = 14'(base + label_at[fix_name[i]]);
        words[i] = c;
      end
    endfunction
  endclass
endpackage
