// md1_divider: floating-point divider of the arithmetic unit.
//
// The dividend and the divisor are latched from the unibus on their input
// drive lines; loading the divisor starts the division. The quotient reaches
// the output register LAT steps later (dead time 1000 ns, rounded up to 34
// steps of 30 ns) and stays there until the next quotient. A zero divisor
// gives the largest magnitude with the sign of the quotient. The original design
// gives the inputs, outputs and dead time; the quotient is formed here in one
// piece and held for the dead time, which is this design's simplification of
// whatever divider circuit the unit used.
//
// Interface: bus_in is the unibus, in1 = dividend input, in2 = divisor input,
// q = output register, busy high while a division is in progress.
module md1_divider
  import md1_pkg::*;
#(
  parameter int unsigned LAT = 34
) (
  input  logic      clk,
  input  logic      rst_n,
  input  md1_word_t bus_in,
  input  logic      in1,
  input  logic      in2,
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
        res_q <= fp_div(in1 ? bus_in : a_q, bus_in);
        cnt_q <= ($bits(cnt_q))'(LAT);
      end else if (cnt_q != 0) begin
        cnt_q <= cnt_q - 1'b1;
        if (cnt_q == 1) q <= res_q;
      end
    end
  end

  assign busy = cnt_q != 0;
endmodule
