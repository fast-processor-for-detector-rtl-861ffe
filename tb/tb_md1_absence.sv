// tb_md1_absence: self-checking test of the absence-of-number unit: after
// each step it must report on the sign line whether that step's unibus word
// was all low.
module tb_md1_absence;
  import md1_pkg::*;
  logic clk = 0, rst_n = 0;
  md1_word_t bus_in, q;
  logic absent;
  int checks = 0, failures = 0;

  md1_absence dut (.*);
  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    md1_word_t prev;
    int n_abs = 0;
    bus_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      prev = bus_in;
      bus_in = ($urandom_range(2, 0) == 0) ? 24'd0 : (24'd1 << $urandom_range(23, 0));
      if (t > 0) begin
        checks++;
        if (absent != (prev == 0) || q != {prev == 0, 23'd0}) begin
          failures++; $display("FAIL step %0d", t);
        end
        n_abs += (prev == 0);
      end
    end
    checks++;
    if (n_abs < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
