// md1_cu: control unit. It holds the complete set of programs (16,000 steps
// of 40 bits) and issues one control word to the arithmetic unit every 30 ns
// step.
//
// A word with bit 39 clear is an AU instruction and goes out unchanged on the
// 40 drive lines. A word with bit 39 set is a control instruction (md1_ci_t):
// the decoder recognises it, nothing is issued in that step (the drive lines
// are low) and the sequence changes:
//   JMP / JS / JNS  jump always / when the sign line was 1 / was 0
//   CALL / RET      subroutine call and return (return stack of RDEPTH)
//   WAIT n          stop issuing for n steps in all (the WAIT step included)
//   SETC n, LOOP    load the step counter; decrement it and jump while it is
//                   not zero
//   HALT            end of the program
// The sign line is sampled at the end of every step in which a unit drives
// the unibus, so a conditional jump tests the last result placed on the bus.
// The original design gives the 40 lines, the 16,000-step program store, the
// decoder, jumps on the sign line, subroutine calls, counted jumps and the
// wait instruction that saves program memory; the instruction encoding, the
// one-step cost of a control instruction, the return-stack depth and the host
// load port are this design's choices.
//
// Timing: the program store is read synchronously; the word for a step is
// fetched at the end of the step before, so a jump costs only its own step.
// start with start_addr begins a program; done rises at HALT.
//
// Interface: prog_* = host write port of the program store; cw = drive lines;
// bus_sign = unibus sign line; steps = steps since start.
module md1_cu
  import md1_pkg::*;
#(
  parameter int unsigned PROG_DEPTH = 16000,
  parameter int unsigned RDEPTH     = 8,
  localparam int unsigned PAW       = 14
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            prog_we,
  input  logic [PAW-1:0]  prog_addr,
  input  logic [CW_W-1:0] prog_wdata,
  input  logic            start,
  input  logic [PAW-1:0]  start_addr,
  input  logic            bus_sign,
  output logic [CW_W-1:0] cw,
  output logic            running,
  output logic            done,
  output logic [31:0]     steps
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_WAIT} state_e;

  logic [CW_W-1:0] prog [PROG_DEPTH];
  logic [CW_W-1:0] ir_q;
  logic [PAW-1:0]  pc_q, next_pc;
  state_e          st_q, st_d;
  logic            sign_q;
  logic [15:0]     cnt_q, wait_q;
  logic [PAW-1:0]  rstk [RDEPTH];
  logic [$clog2(RDEPTH+1)-1:0] rsp_q;
  md1_ci_t         ci;
  md1_cw_t         dw;
  logic            fetch;

  assign ci = md1_ci_t'(ir_q);
  assign dw = md1_cw_t'(ir_q);

  always_ff @(posedge clk) begin
    if (prog_we) prog[prog_addr] <= prog_wdata;
  end

  // next-address logic
  always_comb begin
    next_pc = pc_q + 1'b1;
    st_d    = st_q;
    fetch   = 1'b0;
    unique case (st_q)
      S_IDLE: begin
        if (start) begin
          next_pc = start_addr;
          st_d    = S_RUN;
          fetch   = 1'b1;
        end
      end
      S_RUN: begin
        fetch = 1'b1;
        if (ci.ctrl) begin
          unique case (ci.op)
            CU_JMP, CU_CALL: next_pc = ci.target;
            CU_JS:   if (sign_q)  next_pc = ci.target;
            CU_JNS:  if (!sign_q) next_pc = ci.target;
            CU_RET:  if (rsp_q != 0) next_pc = rstk[($clog2(RDEPTH))'(rsp_q - 1'b1)];
            CU_LOOP: if (cnt_q != 16'd1 && cnt_q != 16'd0) next_pc = ci.target;
            CU_WAIT: if (ci.n > 16'd1) st_d = S_WAIT;
            CU_HALT: begin
              st_d  = S_IDLE;
              fetch = 1'b0;
            end
            default: ;
          endcase
        end
      end
      S_WAIT: begin
        next_pc = pc_q;
        if (wait_q == 16'd1) st_d = S_RUN;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q   <= S_IDLE;
      pc_q   <= '0;
      ir_q   <= '0;
      sign_q <= 1'b0;
      cnt_q  <= '0;
      wait_q <= '0;
      rsp_q  <= '0;
      done   <= 1'b0;
      steps  <= '0;
      for (int i = 0; i < int'(RDEPTH); i++) rstk[i] <= '0;
    end else begin
      st_q <= st_d;
      if (fetch) begin
        pc_q <= next_pc;
        ir_q <= prog[next_pc];
      end
      if (st_q == S_IDLE && start) begin
        done  <= 1'b0;
        steps <= '0;
        rsp_q <= '0;
      end
      if (st_q != S_IDLE) steps <= steps + 1'b1;
      // sign line sampled in every step in which a unit drives the bus
      if (st_q == S_RUN && !ci.ctrl && dw.src != SRC_NONE)
        sign_q <= bus_sign;
      if (st_q == S_RUN && ci.ctrl) begin
        unique case (ci.op)
          CU_CALL: if (rsp_q < ($bits(rsp_q))'(RDEPTH)) begin
            rstk[($clog2(RDEPTH))'(rsp_q)] <= pc_q + 1'b1;
            rsp_q       <= rsp_q + 1'b1;
          end
          CU_RET:  if (rsp_q != 0) rsp_q <= rsp_q - 1'b1;
          CU_SETC: cnt_q <= ci.n;
          CU_LOOP: if (cnt_q != 0) cnt_q <= cnt_q - 1'b1;
          CU_WAIT: wait_q <= ci.n - 16'd1;
          CU_HALT: done <= 1'b1;
          default: ;
        endcase
      end
      if (st_q == S_WAIT) wait_q <= wait_q - 1'b1;
    end
  end

  assign running = st_q != S_IDLE;
  assign cw      = (st_q == S_RUN && !ci.ctrl) ? ir_q : '0;

  a_rstack : assert property (@(posedge clk) disable iff (!rst_n)
    (st_q == S_RUN && ci.ctrl && ci.op == CU_CALL) |-> rsp_q < ($bits(rsp_q))'(RDEPTH));
endmodule
