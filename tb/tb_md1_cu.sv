// tb_md1_cu: self-checking test of the control unit. A small program with a
// counted loop, a wait, a subroutine call and a conditional jump on the sign
// line is loaded through the host port and run twice (sign line low, then
// high); the drive lines must carry the expected word in every step, control
// steps must issue nothing, and done and the step count must match.
module tb_md1_cu;
  import md1_pkg::*;
  import md1_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic prog_we, start, bus_sign, running, done;
  logic [13:0] prog_addr, start_addr;
  logic [39:0] prog_wdata, cw;
  logic [31:0] steps;
  int checks = 0, failures = 0;

  md1_cu #(.PROG_DEPTH(16000)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [39:0] dword(int k);
    md1_cw_t w;
    w = '0;
    w.src  = md1_src_e'(k % 12 + 1);
    w.addr = 10'(k * 37);
    w.s1_in1 = 1'b1;
    return w;
  endfunction

  task automatic wr(int a, logic [39:0] d);
    @(negedge clk); prog_we = 1; prog_addr = 14'(a); prog_wdata = d;
    @(negedge clk); prog_we = 0;
  endtask

  initial begin
    localparam int BASE = 15000;
    logic [39:0] exp_q [$];
    prog_we = 0; start = 0; bus_sign = 0; prog_addr = '0; prog_wdata = '0; start_addr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wr(BASE + 0,  dword(0));
    wr(BASE + 1,  ci(CU_SETC, 3, 0));
    wr(BASE + 2,  dword(1));
    wr(BASE + 3,  ci(CU_LOOP, 0, BASE + 2));
    wr(BASE + 4,  ci(CU_WAIT, 5, 0));
    wr(BASE + 5,  dword(2));
    wr(BASE + 6,  ci(CU_CALL, 0, BASE + 10));
    wr(BASE + 7,  ci(CU_JS, 0, BASE + 9));
    wr(BASE + 8,  dword(3));
    wr(BASE + 9,  ci(CU_HALT, 0, 0));
    wr(BASE + 10, dword(4));
    wr(BASE + 11, ci(CU_RET, 0, 0));
    for (int run = 0; run < 2; run++) begin
      exp_q = {dword(0), 40'd0, dword(1), 40'd0, dword(1), 40'd0, dword(1), 40'd0,
               40'd0, 40'd0, 40'd0, 40'd0, 40'd0,   // WAIT 5: five steps
               dword(2), 40'd0, dword(4), 40'd0, 40'd0};
      if (run == 0) exp_q.push_back(dword(3));
      exp_q.push_back(40'd0);                     // HALT
      bus_sign = run[0];
      @(negedge clk); start = 1; start_addr = 14'(BASE);
      @(negedge clk); start = 0;
      foreach (exp_q[i]) begin
        check(running, "running");
        check(cw == exp_q[i], $sformatf("run %0d step %0d: cw %h expected %h", run, i, cw, exp_q[i]));
        @(negedge clk);
      end
      check(done && !running, "done after HALT");
      check(steps == 32'(exp_q.size()), $sformatf("step count %0d expected %0d", steps, exp_q.size()));
      repeat (3) begin
        check(cw == '0, "idle after HALT");
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
