// md1_superfast: superfast storage of 8 registers.
//
// The number input line writes the unibus word into the register named by the
// control word's address bits 2..0; the output line puts the named register
// on the unibus in the same step (30 ns access). The register count, the
// 3-bit register address and the timing follow the original design; reset to zero is
// this design's choice.
//
// Interface: bus_in = unibus; addr = register address; wr = number input
// line; q = the addressed register (combinational).
module md1_superfast
  import md1_pkg::*;
#(
  parameter int unsigned NREG = 8,
  localparam int unsigned AW  = $clog2(NREG)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  md1_word_t     bus_in,
  input  logic [AW-1:0] addr,
  input  logic          wr,
  output md1_word_t     q
);
  md1_word_t regs [NREG];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NREG); i++) regs[i] <= FP_ZERO;
    end else if (wr) begin
      regs[addr] <= bus_in;
    end
  end

  assign q = regs[addr];
endmodule
