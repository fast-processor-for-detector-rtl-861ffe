// tb_md1_interval: self-checking test of the interval unit. Random bounds (in
// either order) and test numbers, including the bounds themselves, are loaded
// one after the other; the sign-line result one step later is compared with a
// real-arithmetic check of min <= x <= max.
module tb_md1_interval;
  import md1_pkg::*;
  import md1_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  md1_word_t bus_in, q;
  logic ld, in_range;
  int checks = 0, failures = 0;

  md1_interval dut (.*);
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
    real lo, hi, x, xl, xh, xx;
    bit expect_in;
    int n_in = 0;
    ld = 0; bus_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      lo = rnd_real(); hi = rnd_real();
      case (t % 4)
        0: x = lo;
        1: x = (lo + hi) / 2.0;
        default: x = rnd_real();
      endcase
      xl = from_fp(to_fp(lo)); xh = from_fp(to_fp(hi)); xx = from_fp(to_fp(x));
      expect_in = (xx >= (xl < xh ? xl : xh)) && (xx <= (xl < xh ? xh : xl));
      n_in += expect_in;
      @(negedge clk); bus_in = to_fp(lo); ld = 1;
      @(negedge clk); bus_in = to_fp(hi);
      @(negedge clk); bus_in = to_fp(x);
      @(negedge clk); ld = 0; bus_in = '0;
      check(in_range == expect_in && q == {expect_in, 23'd0},
            $sformatf("%f in [%f, %f]: expected %0d got %0d", x, lo, hi, expect_in, in_range));
    end
    check(n_in > 100 && n_in < 450, "both outcomes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
