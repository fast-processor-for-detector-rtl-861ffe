// md1_storage: 1K-word storage unit, used both as the permanent storage (PS,
// constants, written only from the host side) and as the working storage (WS,
// arrays and intermediate results, also written from the unibus).
//
// A read starts on the address line with the cell address from the control
// word; LAT steps later (access time 50 ns for PS = 2 steps, 200 ns for WS =
// 7 steps) the cell is in the output register, which the output line puts on
// the unibus. The number input line writes the unibus word into the cell
// named by the same step's address field (only when WRITABLE). A host port
// loads constants and event data and reads results back. Size, access times,
// and addressing from the control word follow the original design; the host port and
// the single-step write are this design's choices.
//
// Interface: bus_in = unibus; addr = cell address from the control word;
// rd_start = address line; wr = number input line; q = output register;
// host_* = host access, host_rdata is combinational.
module md1_storage
  import md1_pkg::*;
#(
  parameter int unsigned DEPTH    = 1024,
  parameter int unsigned LAT      = 7,
  parameter bit          WRITABLE = 1'b1,
  localparam int unsigned AW      = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  md1_word_t     bus_in,
  input  logic [AW-1:0] addr,
  input  logic          rd_start,
  input  logic          wr,
  output md1_word_t     q,
  output logic          busy,
  input  logic          host_we,
  input  logic [AW-1:0] host_addr,
  input  md1_word_t     host_wdata,
  output md1_word_t     host_rdata
);
  md1_word_t mem [DEPTH];
  md1_word_t rd_q;
  logic [$clog2(LAT+1)-1:0] cnt_q;

  always_ff @(posedge clk) begin
    if (host_we) mem[host_addr] <= host_wdata;
    else if (WRITABLE && wr) mem[addr] <= bus_in;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q  <= FP_ZERO;
      q     <= FP_ZERO;
      cnt_q <= '0;
    end else if (rd_start) begin
      rd_q  <= mem[addr];
      cnt_q <= ($bits(cnt_q))'(LAT);
    end else if (cnt_q != 0) begin
      cnt_q <= cnt_q - 1'b1;
      if (cnt_q == 1) q <= rd_q;
    end
  end

  assign busy       = cnt_q != 0;
  assign host_rdata = mem[host_addr];
endmodule
