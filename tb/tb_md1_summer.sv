// tb_md1_summer: self-checking test of the summer. Random operand pairs are
// added and subtracted; each result is compared with real arithmetic, and the
// output register must change exactly LAT steps after the 2nd number loads.
module tb_md1_summer;
  import md1_pkg::*;
  import md1_tb_pkg::*;
  localparam int LAT = 10;
  logic clk = 0, rst_n = 0;
  md1_word_t bus_in, q;
  logic in1, in2, sub, busy;
  int checks = 0, failures = 0;

  md1_summer #(.LAT(LAT)) dut (.*);
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
      if (t == 0) begin a = 1.5; b = 1.5; s = 1; end   // exact zero
      if (t == 1) begin a = 0.0; b = -2.25; s = 0; end
      old = q;
      @(negedge clk); bus_in = to_fp(a); in1 = 1;
      @(negedge clk); in1 = 0; bus_in = to_fp(b); in2 = 1; sub = s;
      @(negedge clk); in2 = 0; sub = 0; bus_in = '0;
      for (int k = 1; k <= LAT; k++) begin
        check(q == old && busy, "output held during dead time");
        @(negedge clk);
      end
      r = s ? from_fp(to_fp(a)) - from_fp(to_fp(b)) : from_fp(to_fp(a)) + from_fp(to_fp(b));
      check(!busy, "ready after dead time");
      check(near(from_fp(q), r, 1.0/16384.0, 0.0), $sformatf("sum %f %s %f = %f got %f", a, s ? "-" : "+", b, r, from_fp(q)));
      if (r != 0.0) check(q[15] == 1'b1, "normalized");
      else          check(q == '0, "zero code");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
