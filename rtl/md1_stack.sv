// md1_stack: "stack" memory for 20 numbers, used for arrays of unknown
// length together with the absence-of-number unit.
//
// The number input line pushes the unibus word; the output line puts the top
// number on the unibus and removes it in the same step; the reset line empties
// the stack. Reading an empty stack places nothing on the unibus (all lines
// low), which the absence-of-number unit then reports. Capacity, the three
// operations and the 30 ns timing follow the original design; last-in first-out order
// and ignoring a push onto a full stack are this design's choices.
//
// Interface: bus_in = unibus; push/pop/clr = drive lines; q = top word (zero
// when empty); count = number of entries.
module md1_stack
  import md1_pkg::*;
#(
  parameter int unsigned DEPTH = 20,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  md1_word_t     bus_in,
  input  logic          push,
  input  logic          pop,
  input  logic          clr,
  output md1_word_t     q,
  output logic [CW-1:0] count
);
  md1_word_t mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= FP_ZERO;
    end else if (clr) begin
      count <= '0;
    end else if (pop && count != 0) begin
      count <= count - 1'b1;
    end else if (push && count < CW'(DEPTH)) begin
      mem[count] <= bus_in;
      count      <= count + 1'b1;
    end
  end

  assign q = (count != 0) ? mem[count - 1'b1] : FP_ZERO;

  a_no_overflow : assert property (@(posedge clk) disable iff (!rst_n)
    (push && !pop && !clr) |-> count < CW'(DEPTH));
endmodule
