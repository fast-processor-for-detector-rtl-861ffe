// tb_md1_au: self-checking test of the arithmetic unit driven step by step
// with control words: one number fanned out from the working storage to
// several units in one step, sum, product, quotient, comparison, superfast
// register, stack and absence-of-number, permanent storage and the three
// function-table outputs, each result written back to the working storage
// and compared there with real arithmetic.
module tb_md1_au;
  import md1_pkg::*;
  import md1_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  md1_cw_t cw;
  md1_word_t bus, ps_wdata, ws_wdata, ws_rdata;
  logic bus_sign, ps_we, ws_we;
  logic [9:0] ps_addr, ws_addr;
  logic [4:0] stack_count;
  int checks = 0, failures = 0;

  md1_au dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(md1_asm p);
    foreach (p.words[i]) begin
      md1_ci_t c;
      c = md1_ci_t'(p.words[i]);
      if (c.ctrl) begin
        cw = '0;
        repeat (c.n) @(negedge clk);
      end else begin
        cw = md1_cw_t'(p.words[i]);
        @(negedge clk);
      end
    end
    cw = '0;
    @(negedge clk);
  endtask


  initial begin
    md1_asm p;
    md1_cw_t w;
    real a, b, c, r;
    a = 1.75; b = -0.3125; c = 0.3;
    cw = '0; ps_we = 0; ws_we = 0; ps_addr = '0; ws_addr = '0; ps_wdata = '0; ws_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); ws_we = 1; ws_addr = 0; ws_wdata = to_fp(a);
    @(negedge clk); ws_addr = 1; ws_wdata = to_fp(b);
    @(negedge clk); ws_we = 0; ps_we = 1; ps_addr = 0; ps_wdata = to_fp(c);
    @(negedge clk); ps_we = 0;

    p = new();
    w = dw(); w.ws_addr = 1; w.addr = 0; p.emit(w);
    p.wait_steps(7);
    w = dw(SRC_WS, 3); w.s1_in1 = 1; w.mul_in1 = 1; w.div_in1 = 1; w.cmp_in1 = 1; w.cmp_op = CMP_LT;
    w.sf_in = 1; w.stk_in = 1; p.emit(w);
    w = dw(); w.ws_addr = 1; w.addr = 1; p.emit(w);
    p.wait_steps(7);
    w = dw(SRC_WS, 1); w.s1_in2 = 1; w.s2_in1 = 1; w.mul_in2 = 1; w.div_in2 = 1; w.cmp_in2 = 1;
    w.cmp_op = CMP_LT; p.emit(w);
    p.wait_steps(10);
    w = dw(SRC_SUM1, 10); w.ws_in = 1; w.s2_in2 = 1; w.s2_sub = 1; p.emit(w);  // a+b; also b-(a+b)
    w = dw(SRC_MUL, 11);  w.ws_in = 1; p.emit(w);
    w = dw(SRC_CMP, 13);  w.ws_in = 1; p.emit(w);
    w = dw(SRC_SF, 19);   w.ws_in = 1; p.emit(w);                     // register 19 % 8 = 3
    w = dw(SRC_STACK, 20); w.ws_in = 1; p.emit(w);
    w = dw(SRC_STACK);    p.emit(w);                                  // empty: nothing on the bus
    w = dw(SRC_ABSENT, 21); w.ws_in = 1; p.emit(w);
    p.wait_steps(6);
    w = dw(SRC_SUM2, 15); w.ws_in = 1; p.emit(w);
    p.wait_steps(15);
    w = dw(SRC_DIV, 12);  w.ws_in = 1; p.emit(w);
    w = dw(); w.ps_addr = 1; w.addr = 0; p.emit(w);
    p.wait_steps(2);
    w = dw(SRC_PS, 22); w.ws_in = 1; w.fn_ld = 1; w.fn_type = FN_SQRT; p.emit(w);
    p.wait_steps(5);
    w = dw(SRC_FUNC, 23); w.ws_in = 1; p.emit(w);
    w = dw(SRC_FUNC, 24); w.ws_in = 1; p.emit(w);
    w = dw(SRC_FUNC, 25); w.ws_in = 1; p.emit(w);
    run(p);

    begin
      real ra, rb, rc;
      real expv [int];
      ra = from_fp(to_fp(a)); rb = from_fp(to_fp(b)); rc = from_fp(to_fp(c));
      expv[10] = ra + rb; expv[11] = ra * rb; expv[12] = ra / rb;
      expv[15] = rb - (ra + rb); expv[19] = ra; expv[20] = ra; expv[22] = rc;
      expv[23] = $sqrt(19.0 / 64.0); expv[24] = $sqrt(20.0 / 64.0); expv[25] = rc - 19.0 / 64.0;
      foreach (expv[k]) begin
        @(negedge clk); ws_addr = 10'(k); #1;
        check(near(from_fp(ws_rdata), expv[k], 1.0/8192.0, 1e-9),
              $sformatf("WS[%0d] = %f expected %f", k, from_fp(ws_rdata), expv[k]));
      end
      @(negedge clk); ws_addr = 13; #1;
      check(ws_rdata == 24'h000000, "comparison a < b is false");
      @(negedge clk); ws_addr = 21; #1;
      check(ws_rdata == 24'h800000, "absence reported after reading the empty stack");
      check(stack_count == 0, "stack empty");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
