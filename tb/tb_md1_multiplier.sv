// tb_md1_multiplier: self-checking test of the conveyor multiplier. Groups of
// three pairs are loaded 4 steps apart without waiting for results; the first
// product must reach the output register exactly LAT steps after its load
// step and stay there until read, and the reads must return the products in
// load order, each compared with real arithmetic.
module tb_md1_multiplier;
  import md1_pkg::*;
  import md1_tb_pkg::*;
  localparam int LAT = 10, ISSUE = 4;
  logic clk = 0, rst_n = 0;
  md1_word_t bus_in, q;
  logic in1, in2, rd, q_valid, busy;
  int checks = 0, failures = 0;

  md1_multiplier #(.LAT(LAT), .ISSUE(ISSUE)) dut (.*);
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
    real a[3], b[3], r;
    in1 = 0; in2 = 0; rd = 0; bus_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      for (int j = 0; j < 3; j++) begin a[j] = rnd_real(); b[j] = rnd_real(); end
      if (t == 0) b[1] = 0.0;
      // load three pairs, one every ISSUE steps (in1 and in2 on separate steps)
      for (int j = 0; j < 3; j++) begin
        @(negedge clk); bus_in = to_fp(a[j]); in1 = 1;
        @(negedge clk); in1 = 0; bus_in = to_fp(b[j]); in2 = 1;
        @(negedge clk); in2 = 0; bus_in = '0;
        if (j == 0) check(!q_valid, "register empty before first product");
        if (j < 2) @(negedge clk);
      end
      // first product: readable in the step LAT+1 steps after its load step
      repeat (LAT - 2*ISSUE) begin
        check(!q_valid, "no product before the dead time");
        @(negedge clk);
      end
      check(q_valid, "first product after the dead time");
      // wait until all three are done, then read them in order
      repeat (3*ISSUE) @(negedge clk);
      check(!busy, "conveyor empty");
      for (int j = 0; j < 3; j++) begin
        r = from_fp(to_fp(a[j])) * from_fp(to_fp(b[j]));
        check(q_valid, "product waiting");
        check(near(from_fp(q), r, 1.0/16384.0, 0.0), $sformatf("product %0d: %f * %f = %f got %f", j, a[j], b[j], r, from_fp(q)));
        rd = 1; @(negedge clk); rd = 0;
      end
      check(!q_valid, "all products read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
