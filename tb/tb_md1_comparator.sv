// tb_md1_comparator: self-checking test of the comparison circuit: signed and
// absolute-value comparison on the sign line, and searches for the minimum
// and maximum of random sets, all checked against real arithmetic.
module tb_md1_comparator;
  import md1_pkg::*;
  import md1_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  md1_word_t bus_in, q;
  logic in1, in2, lt;
  md1_cmp_e op;
  int checks = 0, failures = 0;

  md1_comparator dut (.*);
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

  initial begin
    real a, b, ra, rb, best;
    bit e;
    in1 = 0; in2 = 0; bus_in = '0; op = CMP_LT;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      a = rnd_real(); b = (t % 5 == 0) ? a : (t % 5 == 1) ? -a : rnd_real();
      if (t == 2) begin a = 0.0; b = -1.0; end
      ra = from_fp(to_fp(a)); rb = from_fp(to_fp(b));
      op = (t % 2 == 0) ? CMP_LT : CMP_ABS_LT;
      e  = (op == CMP_LT) ? (ra < rb) : ((ra < 0 ? -ra : ra) < (rb < 0 ? -rb : rb));
      @(negedge clk); bus_in = to_fp(a); in1 = 1;
      @(negedge clk); in1 = 0; bus_in = to_fp(b); in2 = 1;
      @(negedge clk); in2 = 0; bus_in = '0;
      check(lt == e && q == {e, 23'd0}, $sformatf("op %0d: %f < %f expected %0d got %0d", op, a, b, e, lt));
    end
    for (int t = 0; t < 100; t++) begin
      int n;
      op = (t % 2 == 0) ? CMP_MIN : CMP_MAX;
      n = $urandom_range(12, 1);
      a = rnd_real(); best = from_fp(to_fp(a));
      @(negedge clk); bus_in = to_fp(a); in1 = 1;
      @(negedge clk); in1 = 0;
      for (int k = 0; k < n; k++) begin
        b = rnd_real(); rb = from_fp(to_fp(b));
        if ((op == CMP_MIN && rb < best) || (op == CMP_MAX && rb > best)) best = rb;
        bus_in = to_fp(b); in2 = 1;
        @(negedge clk);
      end
      in2 = 0; bus_in = '0;
      check(from_fp(q) == best, $sformatf("search op %0d over %0d numbers: expected %f got %f", op, n + 1, best, from_fp(q)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
