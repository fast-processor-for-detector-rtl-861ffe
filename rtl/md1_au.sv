// md1_au: arithmetic unit. All units sit on the unibus; in each 30 ns step
// the control word opens the output gate of one unit and strobes the input
// registers of any number of units, which latch the bus word at the end of
// the step.
//
// Units: two summers, the conveyor multiplier, the divider, the function
// table, the interval unit, the comparison circuit, the permanent storage
// (PS) and the working storage (WS) of 1K words each, the superfast storage
// of 8 registers, the 20-number stack and the absence-of-number unit. The set
// of units, the unibus and the control-word driven transfers are the
// original design's; the drive-line allocation (md1_pkg::md1_cw_t) is this design's.
// Loading the stack and reading it in one step is not used; the stack has
// its own reset line.
//
// Interface: cw = drive lines from the control unit (all low = no
// operation); bus/bus_sign = the unibus; ps_*/ws_* = host ports to load
// constants, event data and read results; stack_count for monitoring.
// Assertions flag a program that reads a unit before its dead time is over.
module md1_au
  import md1_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  md1_cw_t    cw,
  output md1_word_t  bus,
  output logic       bus_sign,
  input  logic       ps_we,
  input  logic [9:0] ps_addr,
  input  md1_word_t  ps_wdata,
  input  logic       ws_we,
  input  logic [9:0] ws_addr,
  input  md1_word_t  ws_wdata,
  output md1_word_t  ws_rdata,
  output logic [4:0] stack_count
);
  md1_word_t unit_q [N_SRC];
  logic s1_busy, s2_busy, mul_busy, mul_valid, div_busy, fn_busy, ps_busy, ws_busy;
  logic iv_flag, cmp_flag, absent_flag, driven;
  md1_word_t ps_host_rdata;

  assign unit_q[SRC_NONE] = FP_ZERO;

  md1_summer u_sum1 (
    .clk, .rst_n, .bus_in(bus), .in1(cw.s1_in1), .in2(cw.s1_in2), .sub(cw.s1_sub),
    .q(unit_q[SRC_SUM1]), .busy(s1_busy));

  md1_summer u_sum2 (
    .clk, .rst_n, .bus_in(bus), .in1(cw.s2_in1), .in2(cw.s2_in2), .sub(cw.s2_sub),
    .q(unit_q[SRC_SUM2]), .busy(s2_busy));

  md1_multiplier u_mul (
    .clk, .rst_n, .bus_in(bus), .in1(cw.mul_in1), .in2(cw.mul_in2),
    .rd(cw.src == SRC_MUL), .q(unit_q[SRC_MUL]), .q_valid(mul_valid), .busy(mul_busy));

  md1_divider u_div (
    .clk, .rst_n, .bus_in(bus), .in1(cw.div_in1), .in2(cw.div_in2),
    .q(unit_q[SRC_DIV]), .busy(div_busy));

  md1_functab u_fn (
    .clk, .rst_n, .bus_in(bus), .ld(cw.fn_ld), .fn(cw.fn_type),
    .rd(cw.src == SRC_FUNC), .q(unit_q[SRC_FUNC]), .busy(fn_busy));

  md1_interval u_iv (
    .clk, .rst_n, .bus_in(bus), .ld(cw.iv_in), .q(unit_q[SRC_INTV]), .in_range(iv_flag));

  md1_comparator u_cmp (
    .clk, .rst_n, .bus_in(bus), .in1(cw.cmp_in1), .in2(cw.cmp_in2), .op(cw.cmp_op),
    .q(unit_q[SRC_CMP]), .lt(cmp_flag));

  md1_storage #(.DEPTH(1024), .LAT(2), .WRITABLE(1'b0)) u_ps (
    .clk, .rst_n, .bus_in(bus), .addr(cw.addr), .rd_start(cw.ps_addr), .wr(1'b0),
    .q(unit_q[SRC_PS]), .busy(ps_busy),
    .host_we(ps_we), .host_addr(ps_addr), .host_wdata(ps_wdata), .host_rdata(ps_host_rdata));

  md1_storage #(.DEPTH(1024), .LAT(7), .WRITABLE(1'b1)) u_ws (
    .clk, .rst_n, .bus_in(bus), .addr(cw.addr), .rd_start(cw.ws_addr), .wr(cw.ws_in),
    .q(unit_q[SRC_WS]), .busy(ws_busy),
    .host_we(ws_we), .host_addr(ws_addr), .host_wdata(ws_wdata), .host_rdata(ws_rdata));

  md1_superfast u_sf (
    .clk, .rst_n, .bus_in(bus), .addr(cw.addr[2:0]), .wr(cw.sf_in), .q(unit_q[SRC_SF]));

  md1_stack u_stk (
    .clk, .rst_n, .bus_in(bus), .push(cw.stk_in), .pop(cw.src == SRC_STACK),
    .clr(cw.stk_reset), .q(unit_q[SRC_STACK]), .count(stack_count));

  md1_absence u_abs (
    .clk, .rst_n, .bus_in(bus), .q(unit_q[SRC_ABSENT]), .absent(absent_flag));

  md1_unibus u_bus (
    .src(cw.src), .unit_q, .bus, .sign(bus_sign), .driven);

  // Programming rules: a result is read only after the unit's dead time.
  a_sum1_ready : assert property (@(posedge clk) disable iff (!rst_n) cw.src == SRC_SUM1 |-> !s1_busy);
  a_sum2_ready : assert property (@(posedge clk) disable iff (!rst_n) cw.src == SRC_SUM2 |-> !s2_busy);
  a_mul_ready  : assert property (@(posedge clk) disable iff (!rst_n) cw.src == SRC_MUL  |-> mul_valid);
  a_div_ready  : assert property (@(posedge clk) disable iff (!rst_n) cw.src == SRC_DIV  |-> !div_busy);
  a_fn_ready   : assert property (@(posedge clk) disable iff (!rst_n) cw.src == SRC_FUNC |-> !fn_busy);
  a_ps_ready   : assert property (@(posedge clk) disable iff (!rst_n) cw.src == SRC_PS   |-> !ps_busy);
  a_ws_ready   : assert property (@(posedge clk) disable iff (!rst_n) cw.src == SRC_WS   |-> !ws_busy);
endmodule
