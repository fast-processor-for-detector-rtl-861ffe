// tb_md1_divider: self-checking test of the divider. Random operand pairs are
// divided; each quotient is compared with real arithmetic, and the output
// register must change exactly LAT steps after the divisor loads. A zero
// divisor must give the largest magnitude.
module tb_md1_divider;
  import md1_pkg::*;
  import md1_tb_pkg::*;
  localparam int LAT = 34;
  logic clk = 0, rst_n = 0;
  md1_word_t bus_in, q;
  logic in1, in2, sub, busy;  // sub is unused by the divider
  int checks = 0, failures = 0;

  md1_divider #(.LAT(LAT)) dut (.clk, .rst_n, .bus_in, .in1, .in2, .q, .busy);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    real a, b, r;
    bit s;
    md1_word_t old;
    in1 = 0; in2 = 0; sub = 0; bus_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      a = rnd_real(); b = rnd_real(); s = $urandom_range(1, 0);
      if (t == 0) begin a = 1.5; b = 1.5; end
      if (t == 1) begin a = 0.0; b = -2.25; end
      if (t == 2) begin a = -3.0; b = 0.0; end
      old = q;
      @(negedge clk); bus_in = to_fp(a); in1 = 1;
      @(negedge clk); in1 = 0; bus_in = to_fp(b); in2 = 1; sub = s;
      @(negedge clk); in2 = 0; sub = 0; bus_in = '0;
      for (int k = 1; k <= LAT; k++) begin
        check(q == old && busy, "output held during dead time");
        @(negedge clk);
      end
      if (b == 0.0) r = -65535.0 / 65536.0 * (2.0 ** 63);
      else r = from_fp(to_fp(a)) / from_fp(to_fp(b));
      check(!busy, "ready after dead time");
      check(near(from_fp(q), r, 1.0/16384.0, 0.0), $sformatf("quotient %f / %f = %f got %f", a, b, r, from_fp(q)));
      if (r != 0.0) check(q[15] == 1'b1, "normalized");
      else          check(q == '0, "zero code");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
