// tb_md1_unibus: self-checking test of the unibus: for every source code the
// bus must carry exactly that unit's output register, the sign line its bit
// 23, and no source must give an all-low bus.
module tb_md1_unibus;
  import md1_pkg::*;
  md1_src_e  src;
  md1_word_t unit_q [N_SRC];
  md1_word_t bus;
  logic sign, driven;
  int checks = 0, failures = 0;

  md1_unibus dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < N_SRC; i++) unit_q[i] = 24'($urandom);
      src = md1_src_e'($urandom_range(N_SRC - 1, 0));
      #1;
      checks++;
      if (src == SRC_NONE) begin
        if (bus != '0 || driven) begin failures++; $display("FAIL idle bus"); end
      end else if (bus != unit_q[src] || sign != unit_q[src][23] || !driven) begin
        failures++; $display("FAIL source %0d", src);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
