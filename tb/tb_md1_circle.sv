// tb_md1_circle: workload test of the processor at its default size: the
// core of a helix reconstruction. From three points in the bending plane
// the program computes the circle centre (xc, yc) and radius r. Then it finds
// the arc length from point 1 to point 3, 2r*arcsin(chord/2r), and from the
// z coordinates the dip slope dz/dL. Last, it tests with the interval unit
// whether a fourth point lies on the same circle (squared distance within a
// tolerance) and records the answer with a conditional jump. Square roots and
// arcsin come from the function table with linear interpolation; for arcsin
// the program picks the interval width with the comparator and two
// conditional jumps, and the three events use all three widths. The program is assembled here by a small scheduler that
// inserts WAIT instructions so every result is read exactly when its unit's
// dead time is over; the step count of each run must equal the scheduler's
// prediction for the path taken. Three events are run, one with the fourth
// point off the circle. Results are compared with real arithmetic.
//   a = x2-x1, b = y2-y1, c = x3-x1, d = y3-y1, u = x3-x2, v = y3-y2
//   e = a(x1+x2) + b(y1+y2), f = c(x1+x3) + d(y1+y3), g = av - bu
//   xc = (de - bf) / 2g, yc = (af - ce) / 2g, r = sqrt((x1-xc)^2 + (y1-yc)^2)
//   s = sqrt((c^2 + d^2) / 4r^2), L = 2r * arcsin(s), slope = (z3 - z1) / L
module tb_md1_circle;
  import md1_pkg::*;
  import md1_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic prog_we, ps_we, ws_we, start, running, done;
  logic [13:0] prog_addr, start_addr;
  logic [39:0] prog_wdata, cw;
  logic [9:0] ps_addr, ws_addr;
  md1_word_t ps_wdata, ws_wdata, ws_rdata, bus;
  logic [31:0] steps;
  logic [4:0] stack_count;
  int checks = 0, failures = 0;
  int arcsin_region [3] = '{0, 0, 0};

  md1_processor dut (.*);
  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ------------------------------------------------------------ scheduler
  localparam int BASE = 2000;
  md1_asm p;
  int t;                    // step of the next word, straight-line code
  int ready [md1_src_e];
  int mul_q [$];
  int mul_last;

  function automatic int max2(int a, int b);
    return a > b ? a : b;
  endfunction

  function automatic void op(md1_cw_t w);
    int need;
    need = t;
    if (w.src == SRC_MUL) need = max2(need, mul_q[0]);
    else if (w.src inside {SRC_SUM1, SRC_SUM2, SRC_DIV, SRC_FUNC, SRC_PS, SRC_WS})
      need = max2(need, ready[w.src]);
    if (w.mul_in2) need = max2(need, mul_last + 4);
    if (need > t) begin
      p.wait_steps(need - t);
      t = need;
    end
    p.emit(w);
    if (w.src == SRC_MUL) void'(mul_q.pop_front());
    if (w.s1_in2)  ready[SRC_SUM1] = t + 11;
    if (w.s2_in2)  ready[SRC_SUM2] = t + 11;
    if (w.div_in2) ready[SRC_DIV]  = t + 35;
    if (w.fn_ld)   ready[SRC_FUNC] = t + 6;
    if (w.ps_addr) ready[SRC_PS]   = t + 3;
    if (w.ws_addr) ready[SRC_WS]   = t + 8;
    if (w.mul_in2) begin mul_q.push_back(t + 11); mul_last = t; end
    t++;
  endfunction

  // put WS cell c_addr on the bus in the returned word (after starting the read)
  function automatic md1_cw_t from_ws(int c_addr);
    md1_cw_t w;
    w = dw(SRC_NONE, c_addr); w.ws_addr = 1; op(w);
    return dw(SRC_WS);
  endfunction

  // dst = A (+|-|*|/) B, operands and result in WS cells
  typedef enum {ADD, SUB, MUL, DIV} kind_e;
  function automatic void binop(kind_e k, int a, int b, int dst);
    md1_cw_t w;
    w = from_ws(a);
    case (k)
      ADD, SUB: w.s1_in1 = 1;
      MUL:      w.mul_in1 = 1;
      default:  w.div_in1 = 1;
    endcase
    op(w);
    w = from_ws(b);
    case (k)
      ADD:     w.s1_in2 = 1;
      SUB:     begin w.s1_in2 = 1; w.s1_sub = 1; end
      MUL:     w.mul_in2 = 1;
      default: w.div_in2 = 1;
    endcase
    op(w);
    w = dw(k == MUL ? SRC_MUL : k == DIV ? SRC_DIV : SRC_SUM1, dst);
    w.ws_in = 1;
    op(w);
  endfunction

  // dst = A*B + C*D using both summer inputs and two products in flight
  function automatic void dot2(int a, int b, int c, int d, bit sub, int dst);
    md1_cw_t w;
    w = from_ws(a); w.mul_in1 = 1; op(w);
    w = from_ws(b); w.mul_in2 = 1; op(w);
    w = from_ws(c); w.mul_in1 = 1; op(w);
    w = from_ws(d); w.mul_in2 = 1; op(w);
    w = dw(SRC_MUL); w.s2_in1 = 1; op(w);
    w = dw(SRC_MUL); w.s2_in2 = 1; w.s2_sub = sub; op(w);
    w = dw(SRC_SUM2, dst); w.ws_in = 1; op(w);
  endfunction

  // dst = f(arg) from the function table: f0 + (f1 - f0) * offset / h.
  // 1/h comes from PS0 (64, sqrt) or from superfast register 7.
  function automatic void interp(md1_fn_e fn, int arg, int dst, bit hinv_sf);
    md1_cw_t w;
    w = from_ws(arg); w.fn_ld = 1; w.fn_type = fn; op(w);
    w = dw(SRC_FUNC, 5); w.sf_in = 1; op(w);           // f0 -> R5
    w = dw(SRC_FUNC); w.s2_in1 = 1; op(w);             // f1
    w = dw(SRC_FUNC); w.mul_in1 = 1; op(w);            // offset
    w = dw(SRC_SF, 5); w.s2_in2 = 1; w.s2_sub = 1; op(w);
    w = dw(SRC_SUM2); w.mul_in2 = 1; op(w);
    if (!hinv_sf) begin w = dw(SRC_NONE, 0); w.ps_addr = 1; op(w); end
    w = dw(SRC_MUL); w.mul_in1 = 1; op(w);
    w = hinv_sf ? dw(SRC_SF, 7) : dw(SRC_PS); w.mul_in2 = 1; op(w);
    w = dw(SRC_MUL); w.s1_in1 = 1; op(w);
    w = dw(SRC_SF, 5); w.s1_in2 = 1; op(w);
    w = dw(SRC_SUM1, dst); w.ws_in = 1; op(w);
  endfunction

  // The arcsin table is finer near 1, so the program picks 1/h with two
  // comparisons and conditional jumps: 32 below 0.75 (PS5), 64 below 0.875
  // (PS6), 256 above (PS7). Paths 2 and 3 take the same number of steps;
  // path 1 is d_short steps shorter.
  int d_short;
  function automatic void arcsin_step(int arg);
    md1_cw_t w;
    int t_js;
    w = from_ws(arg); w.cmp_in1 = 1; op(w);
    w = dw(SRC_NONE, 3); w.ps_addr = 1; op(w);         // PS3 = 0.75
    w = dw(SRC_PS); w.cmp_in2 = 1; w.cmp_op = CMP_LT; op(w);
    w = dw(SRC_CMP); op(w);
    p.ctl(CU_JS, 0, "H32"); t++;
    t_js = t;
    w = dw(SRC_NONE, 4); w.ps_addr = 1; op(w);         // PS4 = 0.875
    w = dw(SRC_PS); w.cmp_in2 = 1; w.cmp_op = CMP_LT; op(w);
    w = dw(SRC_CMP); op(w);
    p.ctl(CU_JS, 0, "H64"); t++;
    d_short = t - t_js;
    w = dw(SRC_NONE, 7); w.ps_addr = 1; p.emit(w);
    p.ctl(CU_JMP, 0, "HJOIN");
    p.label("H64");
    w = dw(SRC_NONE, 6); w.ps_addr = 1; p.emit(w);
    p.ctl(CU_JMP, 0, "HJOIN");
    p.label("H32");
    w = dw(SRC_NONE, 5); w.ps_addr = 1; p.emit(w);
    p.ctl(CU_JMP, 0, "HJOIN");
    p.label("HJOIN");
    t += 2;
    ready[SRC_PS] = t + 1;                             // read started 2 steps ago
    w = dw(SRC_PS, 7); w.sf_in = 1; op(w);
  endfunction

  int t_branch;

  task automatic build();
    md1_cw_t w;
    p = new();
    t = 0; mul_last = -100;
    foreach (ready[s]) ready[s] = 0;
    ready[SRC_SUM1] = 0; ready[SRC_SUM2] = 0; ready[SRC_DIV] = 0; ready[SRC_FUNC] = 0;
    ready[SRC_PS] = 0; ready[SRC_WS] = 0;
    // points: WS 0..7 = x1 y1 x2 y2 x3 y3 x4 y4, WS 8..9 = z1 z3
    binop(SUB, 2, 0, 16);   // a
    binop(SUB, 3, 1, 17);   // b
    binop(SUB, 4, 0, 18);   // c
    binop(SUB, 5, 1, 19);   // d
    binop(SUB, 4, 2, 24);   // u
    binop(SUB, 5, 3, 25);   // v
    binop(ADD, 0, 2, 20);
    binop(ADD, 1, 3, 21);
    binop(ADD, 0, 4, 22);
    binop(ADD, 1, 5, 23);
    dot2(16, 20, 17, 21, 0, 26);    // e
    dot2(18, 22, 19, 23, 0, 27);    // f
    dot2(16, 25, 17, 24, 1, 28);    // g
    dot2(19, 26, 17, 27, 1, 29);    // de - bf
    dot2(16, 27, 18, 26, 1, 30);    // af - ce
    binop(ADD, 28, 28, 31);         // 2g
    binop(DIV, 29, 31, 32);         // xc
    binop(DIV, 30, 31, 33);         // yc
    binop(SUB, 0, 32, 40);          // x1 - xc
    binop(SUB, 1, 33, 41);
    dot2(40, 40, 41, 41, 0, 34);    // r^2
    binop(SUB, 6, 32, 42);          // x4 - xc
    binop(SUB, 7, 33, 43);
    dot2(42, 42, 43, 43, 0, 36);    // d4^2
    interp(FN_SQRT, 34, 35, 1'b0);  // r
    // arc from point 1 to point 3: half angle = arcsin(chord / 2r)
    dot2(18, 18, 19, 19, 0, 44);    // chord^2
    binop(ADD, 34, 34, 45);
    binop(ADD, 45, 45, 45);         // 4 r^2
    binop(DIV, 44, 45, 48);         // q = (chord / 2r)^2
    interp(FN_SQRT, 48, 49, 1'b0);  // s = chord / 2r
    arcsin_step(49);                // 1/h of the arcsin interval -> R7
    interp(FN_ARCSIN, 49, 50, 1'b1);
    binop(ADD, 35, 35, 46);         // 2r
    binop(MUL, 46, 50, 51);         // arc length L
    binop(SUB, 9, 8, 52);           // z3 - z1
    binop(DIV, 52, 51, 53);         // dip slope dz/dL
    // is the fourth point on the circle?  r^2 - tol <= d4^2 <= r^2 + tol
    w = dw(SRC_NONE, 1); w.ps_addr = 1; op(w);         // PS1 = tol
    w = dw(SRC_PS, 6); w.sf_in = 1; op(w);             // tol -> R6
    w = from_ws(34); w.s1_in1 = 1; w.s2_in1 = 1; op(w);
    w = dw(SRC_SF, 6); w.s1_in2 = 1; w.s2_in2 = 1; w.s2_sub = 1; op(w);
    w = dw(SRC_SUM1); w.iv_in = 1; op(w);
    w = dw(SRC_SUM2); w.iv_in = 1; op(w);
    w = from_ws(36); w.iv_in = 1; op(w);
    w = dw(SRC_NONE, 2); w.ps_addr = 1; op(w);         // PS2 = 1.0
    w = dw(SRC_NONE); op(w);
    w = dw(SRC_NONE); op(w);
    w = dw(SRC_INTV); op(w);
    t_branch = t;
    p.ctl(CU_JNS, 0, "OFF");
    w = dw(SRC_PS, 37); w.ws_in = 1; p.emit(w);
    p.ctl(CU_HALT);
    p.label("OFF");
    w = dw(SRC_NONE, 37); w.ws_in = 1; p.emit(w);
    p.ctl(CU_HALT);
    p.link(BASE);
  endtask

  // ------------------------------------------------------------ events
  task automatic run_event(real xc, real yc, real r, real ang[4], real off4, bit expect_on, real z1, real lam);
    real x[4], y[4], xq[4], yq[4];
    real ea, eb, ec, ed, eu, ev, ee, ef, eg, exc, eyc, er2, er;
    real z3, es, el, elam;
    int exp_steps;
    for (int i = 0; i < 4; i++) begin
      real rr;
      rr = (i == 3) ? r + off4 : r;
      x[i] = xc + rr * $cos(ang[i]);
      y[i] = yc + rr * $sin(ang[i]);
      xq[i] = from_fp(to_fp(x[i])); yq[i] = from_fp(to_fp(y[i]));
    end
    for (int i = 0; i < 4; i++) begin
      @(negedge clk); ws_we = 1; ws_addr = 10'(2*i);     ws_wdata = to_fp(x[i]);
      @(negedge clk); ws_we = 1; ws_addr = 10'(2*i + 1); ws_wdata = to_fp(y[i]);
    end
    z3 = z1 + lam * 2.0 * r * $asin($sqrt((x[2] - x[0]) ** 2 + (y[2] - y[0]) ** 2) / (2.0 * r));
    @(negedge clk); ws_we = 1; ws_addr = 8; ws_wdata = to_fp(z1);
    @(negedge clk); ws_we = 1; ws_addr = 9; ws_wdata = to_fp(z3);
    @(negedge clk); ws_we = 0;
    @(negedge clk); start = 1; start_addr = 14'(BASE);
    @(negedge clk); start = 0;
    wait (done);
    @(negedge clk);
    ea = xq[1] - xq[0]; eb = yq[1] - yq[0]; ec = xq[2] - xq[0]; ed = yq[2] - yq[0];
    eu = xq[2] - xq[1]; ev = yq[2] - yq[1];
    ee = ea * (xq[0] + xq[1]) + eb * (yq[0] + yq[1]);
    ef = ec * (xq[0] + xq[2]) + ed * (yq[0] + yq[2]);
    eg = ea * ev - eb * eu;
    exc = (ed * ee - eb * ef) / (2.0 * eg);
    eyc = (ea * ef - ec * ee) / (2.0 * eg);
    er2 = (xq[0] - exc) ** 2 + (yq[0] - eyc) ** 2;
    er = $sqrt(er2);
    es = $sqrt((ec * ec + ed * ed) / (4.0 * er2));
    el = 2.0 * er * $asin(es);
    elam = (from_fp(to_fp(z3)) - from_fp(to_fp(z1))) / el;
    exp_steps = t_branch + 3 - (es < 0.75 ? d_short : 0);
    check(steps == 32'(exp_steps), $sformatf("step count %0d, scheduled %0d", steps, exp_steps));
    ws_addr = 49; #1; check(near(from_fp(ws_rdata), es, 0, 1e-3), $sformatf("chord/2r %f expected %f", from_fp(ws_rdata), es));
    ws_addr = 51; #1; check(near(from_fp(ws_rdata), el, 3e-3, 1e-3), $sformatf("arc length %f expected %f", from_fp(ws_rdata), el));
    ws_addr = 53; #1; check(near(from_fp(ws_rdata), elam, 5e-3, 1e-3), $sformatf("dip slope %f expected %f (true %f)", from_fp(ws_rdata), elam, lam));
    arcsin_region[es < 0.75 ? 0 : es < 0.875 ? 1 : 2]++;
    ws_addr = 32; #1; check(near(from_fp(ws_rdata), exc, 0, 2e-3), $sformatf("xc %f expected %f (true %f)", from_fp(ws_rdata), exc, xc));
    ws_addr = 33; #1; check(near(from_fp(ws_rdata), eyc, 0, 2e-3), $sformatf("yc %f expected %f (true %f)", from_fp(ws_rdata), eyc, yc));
    ws_addr = 34; #1; check(near(from_fp(ws_rdata), er2, 0, 3e-3), $sformatf("r^2 %f expected %f", from_fp(ws_rdata), er2));
    ws_addr = 35; #1; check(near(from_fp(ws_rdata), er, 0, 3e-3), $sformatf("r %f expected %f (true %f)", from_fp(ws_rdata), er, r));
    ws_addr = 37; #1; check(from_fp(ws_rdata) == (expect_on ? 1.0 : 0.0), $sformatf("fourth point on circle: got %f expected %0d", from_fp(ws_rdata), expect_on));
    $display("event: centre (%f, %f) r %f, chord/2r %f, arc %f, slope %f, fourth point %s, %0d steps = %0.2f us at 30 ns",
             from_fp(dut.u_au.u_ws.mem[32]), from_fp(dut.u_au.u_ws.mem[33]), from_fp(dut.u_au.u_ws.mem[35]),
             from_fp(dut.u_au.u_ws.mem[49]), from_fp(dut.u_au.u_ws.mem[51]), from_fp(dut.u_au.u_ws.mem[53]),
             expect_on ? "on" : "off", steps, steps * 0.03);
  endtask

  initial begin
    real ang [4];
    prog_we = 0; ps_we = 0; ws_we = 0; start = 0;
    prog_addr = '0; prog_wdata = '0; ps_addr = '0; ps_wdata = '0; ws_addr = '0; ws_wdata = '0;
    start_addr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    build();
    foreach (p.words[i]) begin
      @(negedge clk); prog_we = 1; prog_addr = 14'(BASE + i); prog_wdata = p.words[i];
    end
    @(negedge clk); prog_we = 0; ps_we = 1; ps_addr = 0; ps_wdata = to_fp(64.0);
    @(negedge clk); ps_addr = 1; ps_wdata = to_fp(0.01);
    @(negedge clk); ps_addr = 2; ps_wdata = to_fp(1.0);
    @(negedge clk); ps_addr = 3; ps_wdata = to_fp(0.75);
    @(negedge clk); ps_addr = 4; ps_wdata = to_fp(0.875);
    @(negedge clk); ps_addr = 5; ps_wdata = to_fp(32.0);
    @(negedge clk); ps_addr = 6; ps_wdata = to_fp(64.0);
    @(negedge clk); ps_addr = 7; ps_wdata = to_fp(256.0);
    @(negedge clk); ps_we = 0;
    $display("circle program: %0d words", p.words.size());
    ang = '{0.3, 1.4, 2.6, 4.0};
    run_event(0.3, -0.2, 0.8, ang, 0.0, 1'b1, 0.1, 0.4);
    ang = '{-0.5, 0.4, 1.4, 3.3};
    run_event(-0.15, 0.25, 0.7, ang, 0.05, 1'b0, -0.2, -0.7);
    ang = '{0.2, 0.9, 1.5, 2.5};
    run_event(0.1, 0.1, 0.75, ang, 0.0, 1'b1, 0.05, 1.3);
    foreach (arcsin_region[i]) check(arcsin_region[i] == 1, $sformatf("arcsin region %0d used %0d times", i, arcsin_region[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
