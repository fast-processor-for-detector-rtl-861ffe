// md1_absence: "absence of number" unit.
//
// Its inputs watch the unibus lines in every step. On the enquiry (its output
// line) it places on the mantissa sign line whether the preceding step carried
// a number: a step with all 24 lines low counts as "no number", for instance a
// read from an empty stack. The permanent connection to the bus and the
// sign-line answer are the original design's; the polarity (sign line high = no
// number) and the all-low test are this design's choices, and they mean that
// the number zero also reads as absent.
//
// Interface: bus_in = unibus; q = word placed on the unibus on enquiry;
// absent = the same answer as a flag.
module md1_absence
  import md1_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  md1_word_t bus_in,
  output md1_word_t q,
  output logic      absent
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) absent <= 1'b1;
    else        absent <= bus_in == '0;
  end

  assign q = {absent, 23'd0};
endmodule
