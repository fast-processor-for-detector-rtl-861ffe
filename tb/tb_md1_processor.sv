// tb_md1_processor: end-to-end test of the processor at its default size.
//
// A program is assembled here, loaded through the host port together with
// constants (permanent storage) and an "event" (working storage), and run
// from its entry address until done. It exercises the mechanisms of the
// design and counts each one:
//   - a search over an array of unknown length: the numbers are pushed on the
//     stack and popped until the absence-of-number unit reports an empty
//     read; each one goes through the interval unit (conditional jump on the
//     sign line) and the comparison circuit's "keep the greater" search, and
//     numbers inside the interval are counted with a summer;
//   - r = sqrt(x^2 + y^2) with two products in flight in the conveyor
//     multiplier, the function table and a subroutine that interpolates
//     linearly with summer 2, the multiplier and summer 1, plus y / x on the
//     divider;
//   - a counted loop (step counter) using both summers at once.
// Results are read back from the working storage and compared with real
// arithmetic; the step count must equal issued words + control steps + wait
// steps, one word per step.
module tb_md1_processor;
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

  // ---------------------------------------------------------------- counters
  int n_js_taken, n_jns_taken, n_jns_fall, n_loop_back, n_call, n_ret, n_wait;
  int n_mul_queued, n_abs_empty, n_iv_in, n_iv_out, n_max_upd, n_both_sum, n_fn_rd;
  int n_div, n_data, n_ctrl;
  md1_cw_t cwd;
  assign cwd = md1_cw_t'(cw);
  always @(posedge clk) if (rst_n && dut.u_cu.st_q != 0) begin
    if (dut.u_cu.st_q == 2) n_wait++;
    if (dut.u_cu.st_q == 1 && dut.u_cu.ci.ctrl) begin
      n_ctrl++;
      case (dut.u_cu.ci.op)
        CU_JS:   if (dut.u_cu.sign_q) n_js_taken++;
        CU_JNS:  if (!dut.u_cu.sign_q) n_jns_taken++; else n_jns_fall++;
        CU_LOOP: if (dut.u_cu.cnt_q > 1) n_loop_back++;
        CU_CALL: n_call++;
        CU_RET:  n_ret++;
        default: ;
      endcase
    end
    if (dut.u_cu.st_q == 1 && !dut.u_cu.ci.ctrl) n_data++;
    if (dut.u_au.u_mul.cnt_q != 0) n_mul_queued++;
    if (cwd.src == SRC_ABSENT && bus[23]) n_abs_empty++;
    if (cwd.src == SRC_INTV) begin if (bus[23]) n_iv_in++; else n_iv_out++; end
    if (cwd.cmp_in2 && cwd.cmp_op == CMP_MAX && fp_lt(dut.u_au.u_cmp.a_q, bus)) n_max_upd++;
    if (dut.u_au.s1_busy && dut.u_au.s2_busy) n_both_sum++;
    if (cwd.src == SRC_FUNC) n_fn_rd++;
    if (cwd.div_in2) n_div++;
  end

  // ---------------------------------------------------------------- program
  localparam int BASE = 100;
  md1_asm p;

  function automatic void xfer(md1_cw_t w);
    p.emit(w);
  endfunction

  task automatic build();
    md1_cw_t w;
    // superfast registers: 0 = lo, 1 = hi, 4 = 1.0, 3 = count (0)
    int cells [4] = '{0, 1, 2, 4};
    int regs  [4] = '{0, 1, 4, 3};
    p = new();
    for (int k = 0; k < 4; k++) begin
      int src_cell, reg_no;
      src_cell = cells[k];
      reg_no   = regs[k];
      w = dw(SRC_NONE, src_cell); w.ps_addr = 1; xfer(w);
      p.wait_steps(2);
      w = dw(SRC_PS, reg_no); w.sf_in = 1; xfer(w);
    end
    w = dw(SRC_NONE, 3); w.ps_addr = 1; xfer(w);          // start of the search
    p.wait_steps(2);
    w = dw(SRC_PS); w.cmp_in1 = 1; w.cmp_op = CMP_MAX; w.stk_reset = 1; xfer(w);
    for (int i = 0; i < 8; i++) begin                      // push the event
      w = dw(SRC_NONE, i); w.ws_addr = 1; xfer(w);
      p.wait_steps(7);
      w = dw(SRC_WS); w.stk_in = 1; xfer(w);
    end
    p.label("L");
    w = dw(SRC_STACK, 2); w.cmp_in2 = 1; w.cmp_op = CMP_MAX; w.sf_in = 1; xfer(w);
    w = dw(SRC_ABSENT); xfer(w);
    p.ctl(CU_JS, 0, "END");
    w = dw(SRC_SF, 0); w.iv_in = 1; xfer(w);
    w = dw(SRC_SF, 1); w.iv_in = 1; xfer(w);
    w = dw(SRC_SF, 2); w.iv_in = 1; xfer(w);
    w = dw(SRC_INTV); xfer(w);
    p.ctl(CU_JNS, 0, "L");
    w = dw(SRC_SF, 3); w.s1_in1 = 1; xfer(w);
    w = dw(SRC_SF, 4); w.s1_in2 = 1; xfer(w);
    p.wait_steps(10);
    w = dw(SRC_SUM1, 3); w.sf_in = 1; xfer(w);
    p.ctl(CU_JMP, 0, "L");
    p.label("END");
    w = dw(SRC_CMP, 40); w.ws_in = 1; xfer(w);
    w = dw(SRC_SF, 43); w.ws_in = 1; xfer(w);             // register 3
    // r = sqrt(x^2 + y^2), y / x
    w = dw(SRC_NONE, 6); w.ps_addr = 1; xfer(w);
    p.wait_steps(2);
    w = dw(SRC_PS, 6); w.mul_in1 = 1; w.mul_in2 = 1; w.sf_in = 1; xfer(w);
    w = dw(SRC_NONE, 7); w.ps_addr = 1; xfer(w);
    p.wait_steps(2);
    w = dw(SRC_PS); w.mul_in1 = 1; w.mul_in2 = 1; w.div_in1 = 1; xfer(w);
    w = dw(SRC_SF, 6); w.div_in2 = 1; xfer(w);
    p.wait_steps(9);
    w = dw(SRC_MUL); w.s1_in1 = 1; xfer(w);
    w = dw(SRC_MUL); w.s1_in2 = 1; xfer(w);
    p.wait_steps(10);
    w = dw(SRC_SUM1, 44); w.ws_in = 1; w.fn_ld = 1; w.fn_type = FN_SQRT; xfer(w);
    p.wait_steps(5);
    p.ctl(CU_CALL, 0, "INTERP");
    w = dw(SRC_DIV, 46); w.ws_in = 1; xfer(w);
    p.ctl(CU_JMP, 0, "PARTC");
    // subroutine: f = f0 + (f1 - f0) * 64 * delta  -> WS[45]
    p.label("INTERP");
    w = dw(SRC_FUNC, 5); w.sf_in = 1; xfer(w);
    w = dw(SRC_FUNC); w.s2_in1 = 1; xfer(w);
    w = dw(SRC_FUNC, 7); w.sf_in = 1; xfer(w);
    w = dw(SRC_SF, 5); w.s2_in2 = 1; w.s2_sub = 1; xfer(w);
    w = dw(SRC_NONE, 5); w.ps_addr = 1; xfer(w);
    p.wait_steps(9);
    w = dw(SRC_SUM2); w.mul_in1 = 1; xfer(w);
    w = dw(SRC_PS); w.mul_in2 = 1; xfer(w);
    p.wait_steps(10);
    w = dw(SRC_MUL); w.mul_in1 = 1; xfer(w);
    w = dw(SRC_SF, 7); w.mul_in2 = 1; xfer(w);
    p.wait_steps(10);
    w = dw(SRC_MUL); w.s1_in1 = 1; xfer(w);
    w = dw(SRC_SF, 5); w.s1_in2 = 1; xfer(w);
    p.wait_steps(10);
    w = dw(SRC_SUM1, 45); w.ws_in = 1; xfer(w);
    p.ctl(CU_RET);
    // counted loop: v = 1, five times v = v + v while summer 2 forms v + 1
    p.label("PARTC");
    w = dw(SRC_SF, 6 + 8); w.ps_addr = 0; xfer(w);        // register 6 is 0 here
    w = dw(SRC_NONE, 2); w.ps_addr = 1; xfer(w);
    p.wait_steps(2);
    w = dw(SRC_PS, 6); w.sf_in = 1; xfer(w);
    p.ctl(CU_SETC, 5);
    p.label("L2");
    w = dw(SRC_SF, 6); w.s1_in1 = 1; w.s1_in2 = 1; w.s2_in1 = 1; xfer(w);
    w = dw(SRC_SF, 4); w.s2_in2 = 1; xfer(w);
    p.wait_steps(9);
    w = dw(SRC_SUM1, 6); w.sf_in = 1; xfer(w);
    w = dw(SRC_SUM2, 47); w.ws_in = 1; xfer(w);
    p.ctl(CU_LOOP, 0, "L2");
    w = dw(SRC_SF, 54); w.ws_in = 1; xfer(w);             // register 6
    p.ctl(CU_HALT);
    p.link(BASE);
  endtask

  real ev [8] = '{0.75, -0.5, 1.25, 0.3, 2.5, 0.9, -1.5, 1.1};
  real lo = 0.25, hi = 1.2, px = 0.6, py = 0.45;


  initial begin
    int n_in;
    real mx, r2;
    prog_we = 0; ps_we = 0; ws_we = 0; start = 0;
    prog_addr = '0; prog_wdata = '0; ps_addr = '0; ps_wdata = '0; ws_addr = '0; ws_wdata = '0;
    start_addr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    build();
    foreach (p.words[i]) begin
      @(negedge clk); prog_we = 1; prog_addr = 14'(BASE + i); prog_wdata = p.words[i];
    end
    @(negedge clk); prog_we = 0;
    begin
      real psv [9];
      psv = '{lo, hi, 1.0, -1.0e15, 0.0, 64.0, px, py, 0.0};
      foreach (psv[i]) begin
        @(negedge clk); ps_we = 1; ps_addr = 10'(i); ps_wdata = to_fp(psv[i]);
      end
    end
    foreach (ev[i]) begin
      @(negedge clk); ps_we = 0; ws_we = 1; ws_addr = 10'(i); ws_wdata = to_fp(ev[i]);
    end
    @(negedge clk); ws_we = 0;
    @(negedge clk); start = 1; start_addr = 14'(BASE);
    @(negedge clk); start = 0;
    wait (done);
    @(negedge clk);
    $display("program of %0d words ran %0d steps", p.words.size(), steps);

    n_in = 0; mx = -1.0e30;
    foreach (ev[i]) begin
      real v;
      v = from_fp(to_fp(ev[i]));
      if (v >= lo && v <= hi) n_in++;
      if (v > mx) mx = v;
    end
    r2 = from_fp(to_fp(px)) ** 2 + from_fp(to_fp(py)) ** 2;
    ws_addr = 40; #1; check(near(from_fp(ws_rdata), mx, 1e-4, 0), $sformatf("maximum %f expected %f", from_fp(ws_rdata), mx));
    ws_addr = 43; #1; check(from_fp(ws_rdata) == real'(n_in), $sformatf("count in interval %f expected %0d", from_fp(ws_rdata), n_in));
    ws_addr = 44; #1; check(near(from_fp(ws_rdata), r2, 1e-3, 0), $sformatf("x^2+y^2 %f expected %f", from_fp(ws_rdata), r2));
    ws_addr = 45; #1; check(near(from_fp(ws_rdata), $sqrt(r2), 0, 2e-3), $sformatf("r %f expected %f", from_fp(ws_rdata), $sqrt(r2)));
    ws_addr = 46; #1; check(near(from_fp(ws_rdata), py / px, 1e-3, 0), $sformatf("y/x %f expected %f", from_fp(ws_rdata), py / px));
    ws_addr = 47; #1; check(from_fp(ws_rdata) == 17.0, $sformatf("loop summer 2 %f expected 17", from_fp(ws_rdata)));
    ws_addr = 54; #1; check(from_fp(ws_rdata) == 32.0, $sformatf("loop summer 1 %f expected 32", from_fp(ws_rdata)));
    check(steps == 32'(n_data + n_ctrl + n_wait), $sformatf("one word per step: %0d steps, %0d+%0d+%0d", steps, n_data, n_ctrl, n_wait));

    $display("mechanisms: js_taken=%0d jns_taken=%0d jns_fall=%0d loop_back=%0d call=%0d ret=%0d wait_steps=%0d mul_queued=%0d abs_empty=%0d iv_in=%0d iv_out=%0d max_upd=%0d both_summers=%0d fn_reads=%0d div=%0d",
             n_js_taken, n_jns_taken, n_jns_fall, n_loop_back, n_call, n_ret, n_wait, n_mul_queued, n_abs_empty, n_iv_in, n_iv_out, n_max_upd, n_both_sum, n_fn_rd, n_div);
    check(n_js_taken > 0, "conditional jump on sign line taken");
    check(n_jns_taken > 0 && n_jns_fall > 0, "conditional jump both ways");
    check(n_loop_back == 4, "counted loop ran five times");
    check(n_call == 1 && n_ret == 1, "subroutine call and return");
    check(n_wait > 0, "wait instruction");
    check(n_mul_queued > 0, "product waiting behind the output register");
    check(n_abs_empty == 1, "absence of number detected once");
    check(n_iv_in == n_in && n_iv_out == 8 - n_in, "interval unit both outcomes");
    check(n_max_upd > 0, "keep-greater search updated");
    check(n_both_sum > 0, "both summers working at once");
    check(n_fn_rd == 3, "function table read three times");
    check(n_div == 1, "divider used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
