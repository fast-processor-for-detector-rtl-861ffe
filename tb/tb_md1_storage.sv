// tb_md1_storage: self-checking test of the storage unit (working-storage
// configuration, 1K words, 7-step access): host writes, unibus writes, reads
// started by the address line that must deliver the cell exactly LAT steps
// later, host read-back, and the permanent-storage configuration ignoring
// unibus writes.
module tb_md1_storage;
  import md1_pkg::*;
  import md1_tb_pkg::*;
  localparam int LAT = 7;
  logic clk = 0, rst_n = 0;
  md1_word_t bus_in, q, host_wdata, host_rdata, q_ps, host_rdata_ps;
  logic [9:0] addr, host_addr;
  logic rd_start, wr, busy, host_we, busy_ps;
  int checks = 0, failures = 0;
  md1_word_t model [1024];
  md1_word_t model_ps [1024];

  md1_storage #(.DEPTH(1024), .LAT(LAT), .WRITABLE(1'b1)) dut (.*);
  md1_storage #(.DEPTH(1024), .LAT(2), .WRITABLE(1'b0)) dut_ps (
    .clk, .rst_n, .bus_in, .addr, .rd_start, .wr, .q(q_ps), .busy(busy_ps),
    .host_we, .host_addr, .host_wdata, .host_rdata(host_rdata_ps));
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
    md1_word_t old;
    rd_start = 0; wr = 0; host_we = 0; bus_in = '0; addr = '0; host_addr = '0; host_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); host_we = 1; host_addr = 10'(i); host_wdata = 24'($urandom); model[i] = host_wdata; model_ps[i] = host_wdata;
    end
    @(negedge clk); host_we = 0;
    for (int t = 0; t < 300; t++) begin
      int c;
      c = $urandom_range(1023, 0);
      if ($urandom_range(2, 0) == 0) begin
        @(negedge clk); wr = 1; addr = 10'(c); bus_in = 24'($urandom); model[c] = bus_in;
        @(negedge clk); wr = 0; bus_in = '0;
      end
      c = $urandom_range(1023, 0);
      old = q;
      @(negedge clk); rd_start = 1; addr = 10'(c);
      @(negedge clk); rd_start = 0; addr = 10'($urandom);
      for (int k = 1; k <= LAT; k++) begin
        check(busy && q == old, "output held during access");
        @(negedge clk);
      end
      check(!busy && q == model[c], $sformatf("cell %0d", c));
      host_addr = 10'(c); #1;
      check(host_rdata == model[c], "host read-back");
      check(host_rdata_ps == model_ps[c], "permanent storage unchanged by unibus writes");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
