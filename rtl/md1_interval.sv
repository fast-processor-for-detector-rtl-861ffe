// md1_interval: "interval" unit, tests whether a number lies between two
// others.
//
// The three numbers are loaded one after the other on the same input line:
// the two bounds first, in either order, then the number to test. One step
// (30 ns dead time) after the third number the result is ready; on the output
// line the unit places it on the mantissa sign line of the unibus (all other
// lines low). The loading sequence, the sign-line result and the timing follow
// the original design; the load order, the closed interval [min, max] and the
// polarity (sign line high = inside the interval) are this design's choices.
//
// Interface: bus_in = unibus; ld = number input line; q = output word (only
// bit 23 can be set); in_range = the result as a plain flag.
module md1_interval
  import md1_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  md1_word_t bus_in,
  input  logic      ld,
  output md1_word_t q,
  output logic      in_range
);
  md1_word_t b0_q, b1_q;
  logic [1:0] n_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b0_q   <= FP_ZERO;
      b1_q   <= FP_ZERO;
      n_q    <= '0;
      in_range <= 1'b0;
    end else if (ld) begin
      unique case (n_q)
        2'd0: begin b0_q <= bus_in; n_q <= 2'd1; end
        2'd1: begin b1_q <= bus_in; n_q <= 2'd2; end
        default: begin
          if (fp_lt(b1_q, b0_q))
            in_range <= !fp_lt(bus_in, b1_q) && !fp_lt(b0_q, bus_in);
          else
            in_range <= !fp_lt(bus_in, b0_q) && !fp_lt(b1_q, bus_in);
          n_q <= 2'd0;
        end
      endcase
    end
  end

  assign q = {in_range, 23'd0};
endmodule
