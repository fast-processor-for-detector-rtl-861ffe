// md1_processor: the MD-1 fast event processor, the control unit driving the
// arithmetic unit over 40 parallel drive lines.
//
// The control unit steps through a program at one 40-bit word per 30 ns
// (3*10^7 instructions per second); each word moves one number over the
// unibus from one unit's output to the inputs of any number of units and
// gives the units their operation modes, so several units compute at once.
// Control words with bit 39 set change the flow (jumps on the unibus sign
// line, counted loops, calls, waits). The host loads programs, the permanent
// storage (constants) and the working storage (event data), starts a program
// at an entry address and reads the results from the working storage when
// done rises. This structure is the original design's; the host ports are this
// design's stand-in for the link to the experiment computer and the
// front-end data input, which the original design does not detail.
//
// Timing: one clock per 30 ns step.
module md1_processor
  import md1_pkg::*;
#(
  parameter int unsigned PROG_DEPTH = 16000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        prog_we,
  input  logic [13:0] prog_addr,
  input  logic [39:0] prog_wdata,
  input  logic        ps_we,
  input  logic [9:0]  ps_addr,
  input  md1_word_t   ps_wdata,
  input  logic        ws_we,
  input  logic [9:0]  ws_addr,
  input  md1_word_t   ws_wdata,
  output md1_word_t   ws_rdata,
  input  logic        start,
  input  logic [13:0] start_addr,
  output logic        running,
  output logic        done,
  output logic [31:0] steps,
  output md1_word_t   bus,
  output logic [39:0] cw,
  output logic [4:0]  stack_count
);
  logic bus_sign;

  md1_cu #(.PROG_DEPTH(PROG_DEPTH)) u_cu (
    .clk, .rst_n, .prog_we, .prog_addr, .prog_wdata, .start, .start_addr,
    .bus_sign, .cw, .running, .done, .steps);

  md1_au u_au (
    .clk, .rst_n, .cw(md1_cw_t'(cw)), .bus, .bus_sign,
    .ps_we, .ps_addr, .ps_wdata, .ws_we, .ws_addr, .ws_wdata, .ws_rdata, .stack_count);
endmodule
