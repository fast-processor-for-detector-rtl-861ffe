// md1_comparator: comparison circuit.
//
// Four operation types, taken from the control word with each input line:
//   CMP_LT     sign line = 1 when the 1st number is below the 2nd
//   CMP_ABS_LT sign line = 1 when |1st| < |2nd|
//   CMP_MIN    keep the smaller number
//   CMP_MAX    keep the greater number
// For the two comparisons the output line places the result on the mantissa
// sign line (other lines low), ready for a conditional jump. For "keep
// smaller/greater" the 1st input line starts a search with the number on the
// unibus, every 2nd-number load keeps the better of the held number and the
// new one, and the output line places the held number on the unibus after the
// search. The operation types, the sign-line result and the 30 ns timing are
// the original design's; the sign-line polarity and the start-of-search rule are this
// design's choices.
//
// Interface: bus_in = unibus; in1/in2 = number input lines; op = operation
// type; q = output word; lt = comparison result as a plain flag.
module md1_comparator
  import md1_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  md1_word_t bus_in,
  input  logic      in1,
  input  logic      in2,
  input  md1_cmp_e  op,
  output md1_word_t q,
  output logic      lt
);
  md1_word_t a_q, b_q;
  md1_cmp_e  op_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q  <= FP_ZERO;
      b_q  <= FP_ZERO;
      op_q <= CMP_LT;
    end else begin
      if (in1) begin
        a_q  <= bus_in;
        op_q <= op;
      end
      if (in2) begin
        op_q <= op;
        unique case (op)
          CMP_MIN: if (fp_lt(bus_in, a_q)) a_q <= bus_in;
          CMP_MAX: if (fp_lt(a_q, bus_in)) a_q <= bus_in;
          default: b_q <= bus_in;
        endcase
      end
    end
  end

  assign lt = (op_q == CMP_ABS_LT) ? fp_abs_lt(a_q, b_q) : fp_lt(a_q, b_q);
  assign q  = (op_q == CMP_MIN || op_q == CMP_MAX) ? a_q : {lt, 23'd0};
endmodule
