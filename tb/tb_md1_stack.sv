// tb_md1_stack: self-checking test of the 20-number stack: random pushes and
// pops against a model, reads of an empty stack (all lines low), a full
// stack refusing a 21st number, and reset.
module tb_md1_stack;
  import md1_pkg::*;
  logic clk = 0, rst_n = 0;
  md1_word_t bus_in, q;
  logic push, pop, clr;
  logic [4:0] count;
  int checks = 0, failures = 0;
  md1_word_t model [$];

  md1_stack dut (.*);
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
    push = 0; pop = 0; clr = 0; bus_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(count == 0 && q == '0, "empty after reset");
    // fill to capacity
    for (int i = 0; i < 20; i++) begin
      bus_in = 24'($urandom) | 24'h8000; push = 1; model.push_back(bus_in);
      @(negedge clk);
    end
    push = 0;
    check(count == 20 && q == model[$], "full");
    for (int t = 0; t < 2000; t++) begin
      push = 0; pop = 0; clr = 0;
      if (t % 500 == 499) clr = 1;
      else if ($urandom_range(1, 0) == 1 && model.size() < 20) push = 1;
      else pop = 1;
      bus_in = 24'($urandom) | 24'h8000;
      #1;
      check(q == (model.size() ? model[$] : 24'd0), "top / empty read");
      check(count == 5'(model.size()), "count");
      @(negedge clk);
      if (clr) model.delete();
      else if (pop) begin if (model.size()) void'(model.pop_back()); end
      else if (push) model.push_back(bus_in);
    end
    push = 0; pop = 0; clr = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
