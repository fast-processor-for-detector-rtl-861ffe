// md1_summer: floating-point summer (adder/subtractor) of the arithmetic unit.
//
// The unit latches the 1st and 2nd numbers from the unibus on its two input
// drive lines. Loading the 2nd number starts the operation; the "+ or -" line,
// asserted in that same step, selects subtraction (first - second). The sum
// appears in the output register LAT steps later (dead time 300 ns = 10 steps
// of 30 ns); until then the output register keeps the previous sum, and the
// program must not read it earlier. The input registers are free again as soon
// as the operands are latched, so the program can reload them while the sum
// is being formed. Inputs, outputs and the dead time follow the original design; the
// start-on-2nd-number rule and the meaning of the "+ or -" line are this
// design's reading of it.
//
// Interface: bus_in is the unibus; in1/in2/sub are drive lines valid for one
// step; q is the output register, placed on the unibus by the bus logic;
// busy is high while a sum is being formed.
module md1_summer
  import md1_pkg::*;
#(
  parameter int unsigned LAT = 10
) (
  input  logic      clk,
  input  logic      rst_n,
  input  md1_word_t bus_in,
  input  logic      in1,
  input  logic      in2,
  input  logic      sub,
  output md1_word_t q,
  output logic      busy
);
  md1_word_t a_q, res_q;
  logic [$clog2(LAT+1)-1:0] cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q   <= FP_ZERO;
      res_q <= FP_ZERO;
      q     <= FP_ZERO;
      cnt_q <= '0;
    end else begin
      if (in1) a_q <= bus_in;
      if (in2) begin
        res_q <= fp_add(in1 ? bus_in : a_q, bus_in, sub);
        cnt_q <= ($bits(cnt_q))'(LAT);
      end else if (cnt_q != 0) begin
        cnt_q <= cnt_q - 1'b1;
        if (cnt_q == 1) q <= res_q;
      end
    end
  end

  assign busy = cnt_q != 0;
endmodule
