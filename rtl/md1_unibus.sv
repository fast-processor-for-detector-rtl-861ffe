// md1_unibus: the 24-line unibus joining the units of the arithmetic unit.
//
// Each unit's output register reaches the bus through its output gate; the
// control word's source field opens one gate per step, and any number of
// units may latch the bus in the same step. The bus is modelled as the OR of
// the gated outputs, as a line driven by open output gates behaves; the one
// source per step is guaranteed by the encoded source field. The 24 lines,
// one transfer per 30 ns step and any-to-many transfers follow the original design;
// the encoded source field is this design's choice (it saves drive lines).
//
// Interface: src = source code from the control word; unit_q = the output
// registers indexed by md1_src_e; bus = the bus word; sign = bus line 23, the
// mantissa sign line used for conditional jumps; driven = a gate is open.
module md1_unibus
  import md1_pkg::*;
(
  input  md1_src_e  src,
  input  md1_word_t unit_q [N_SRC],
  output md1_word_t bus,
  output logic      sign,
  output logic      driven
);
  always_comb begin
    bus = '0;
    for (int i = 1; i < N_SRC; i++)
      if (src == md1_src_e'(i)) bus |= unit_q[i];
  end

  assign sign   = bus[SIGN_BIT];
  assign driven = src != SRC_NONE;
endmodule
