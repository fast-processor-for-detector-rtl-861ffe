// tb_md1_functab: self-checking test of the function-table unit. For random
// arguments of each function the three output numbers (f at both interval
// ends and the offset into the interval) are compared with values computed
// here with real arithmetic from the interval layout, the linear
// interpolation a program would form is compared with the true function, and
// the result must appear exactly LAT steps after the load step.
module tb_md1_functab;
  import md1_pkg::*;
  import md1_tb_pkg::*;
  localparam int LAT = 5;
  logic clk = 0, rst_n = 0;
  md1_word_t bus_in, q;
  logic ld, rd, busy;
  md1_fn_e fn;
  int checks = 0, failures = 0;

  md1_functab #(.LAT(LAT)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic real fval(int f, real x);
    case (f)
      0: return $sqrt(x);
      1: return $sin(x);
      2: return $cos(x);
      default: return $asin(x > 1.0 ? 1.0 : x);
    endcase
  endfunction

  initial begin
    real x, xt, a, h, n0, n1, n2, interp, tol;
    int i;
    md1_word_t old;
    ld = 0; rd = 0; bus_in = '0; fn = FN_SQRT;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      int f;
      f = t % 4;
      x = real'($urandom_range(65535, 0)) / 65536.0 * ((f == 1 || f == 2) ? 2.0 : 1.0);
      if (t < 8) x = (t < 4) ? 0.0 : 0.99998;
      xt = from_fp(to_fp(x));
      // interval layout
      if (f == 0)      begin i = int'($floor(xt * 64.0)); h = 1.0/64.0; a = i * h; end
      else if (f < 3)  begin i = int'($floor(xt * 32.0)); h = 1.0/32.0; a = i * h; end
      else if (xt < 0.75)  begin i = int'($floor(xt * 32.0)); h = 1.0/32.0; a = i * h; end
      else if (xt < 0.875) begin i = 24 + int'($floor((xt - 0.75) * 64.0)); h = 1.0/64.0; a = 0.75 + (i - 24) * h; end
      else begin i = 32 + int'($floor((xt - 0.875) * 256.0)); h = 1.0/256.0; a = 0.875 + (i - 32) * h; end
      old = q;
      @(negedge clk); bus_in = to_fp(($urandom_range(1, 0) == 1) ? -x : x); fn = md1_fn_e'(f); ld = 1;
      @(negedge clk); ld = 0; bus_in = '0;
      for (int k = 1; k <= LAT; k++) begin
        check(busy && q == old, "held during dead time");
        @(negedge clk);
      end
      check(!busy, "ready");
      n0 = from_fp(q); rd = 1; @(negedge clk);
      n1 = from_fp(q); @(negedge clk);
      n2 = from_fp(q); @(negedge clk); rd = 0;
      check(near(n0, fval(f, a), 1.0/16384.0, 1e-9), $sformatf("f%0d(a_%0d=%f) = %f got %f", f, i, a, fval(f, a), n0));
      check(near(n1, fval(f, a + h), 1.0/16384.0, 1e-9), $sformatf("f%0d(a_%0d) end = %f got %f", f, i + 1, fval(f, a + h), n1));
      check(near(n2, xt - a, 1.0/16384.0, 1e-9), $sformatf("offset %f - %f got %f", xt, a, n2));
      interp = n0 + (n1 - n0) * n2 / h;
      tol = (f == 0) ? 0.04 : (f == 3) ? 0.02 : 0.001;
      check(near(interp, fval(f, xt), 0.0, tol), $sformatf("interpolated f%0d(%f) = %f, true %f", f, xt, interp, fval(f, xt)));
      check(q == dut.r0, "output sequence wraps to the first number");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
