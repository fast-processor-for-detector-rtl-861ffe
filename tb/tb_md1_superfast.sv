// tb_md1_superfast: self-checking test of the 8-register superfast storage:
// random writes and same-step reads against a model array.
module tb_md1_superfast;
  import md1_pkg::*;
  logic clk = 0, rst_n = 0;
  md1_word_t bus_in, q;
  logic [2:0] addr;
  logic wr;
  int checks = 0, failures = 0;
  md1_word_t model [8];

  md1_superfast dut (.*);
  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr = 0; bus_in = '0; addr = '0;
    for (int i = 0; i < 8; i++) model[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      addr = 3'($urandom);
      wr = $urandom_range(1, 0);
      bus_in = 24'($urandom);
      #1;
      checks++;
      if (q !== model[addr]) begin failures++; $display("FAIL reg %0d", addr); end
      @(posedge clk);
      if (wr) model[addr] = bus_in;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
