// md1_multiplier: conveyor (pipelined) floating-point multiplier.
//
// Loading the 2nd number starts a multiplication; a new pair may be loaded
// every ISSUE steps (100 ns, rounded up to 4 steps of 30 ns) without waiting
// for earlier products, and each product leaves the conveyor LAT steps after
// its start (dead time 300 ns = 10 steps). The output register holds the
// oldest product not yet read; when the program reads it (rd, the product
// output line) the next finished product moves into the register. Products
// that finish while the register is occupied wait in a small queue of QDEPTH
// entries. The conveyor, the 100 ns loading cycle and the output-register
// behaviour are the original design's; the queue and its depth are this design's.
//
// Interface: bus_in = unibus; in1/in2 = number input lines; rd = product
// output line (advances the register); q = output register; q_valid = the
// register holds an unread product; busy = a product is in the conveyor.
module md1_multiplier
  import md1_pkg::*;
#(
  parameter int unsigned LAT    = 10,
  parameter int unsigned ISSUE  = 4,
  parameter int unsigned QDEPTH = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  md1_word_t bus_in,
  input  logic      in1,
  input  logic      in2,
  input  logic      rd,
  output md1_word_t q,
  output logic      q_valid,
  output logic      busy
);
  md1_word_t a_q;
  md1_word_t pipe_d [LAT];
  logic      pipe_v [LAT];
  md1_word_t fifo   [QDEPTH];
  logic [$clog2(QDEPTH+1)-1:0] cnt_q;
  logic [$clog2(ISSUE+1)-1:0]  since_q;

  logic      done;
  md1_word_t done_d;
  assign done   = pipe_v[LAT-1];
  assign done_d = pipe_d[LAT-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q     <= FP_ZERO;
      q       <= FP_ZERO;
      q_valid <= 1'b0;
      cnt_q   <= '0;
      since_q <= ($bits(since_q))'(ISSUE);
      for (int i = 0; i < int'(LAT); i++) begin
        pipe_v[i] <= 1'b0;
        pipe_d[i] <= FP_ZERO;
      end
      for (int i = 0; i < int'(QDEPTH); i++) fifo[i] <= FP_ZERO;
    end else begin
      if (in1) a_q <= bus_in;
      // conveyor
      pipe_v[0] <= in2;
      pipe_d[0] <= fp_mul(in1 ? bus_in : a_q, bus_in);
      for (int i = 1; i < int'(LAT); i++) begin
        pipe_v[i] <= pipe_v[i-1];
        pipe_d[i] <= pipe_d[i-1];
      end
      if (in2) since_q <= 1;
      else if (since_q < ($bits(since_q))'(ISSUE)) since_q <= since_q + 1'b1;
      // output register and waiting queue
      if (rd && q_valid) begin
        if (cnt_q != 0) begin
          q <= fifo[0];
          for (int i = 0; i < int'(QDEPTH) - 1; i++) fifo[i] <= fifo[i+1];
          if (done) fifo[($clog2(QDEPTH))'(cnt_q - 1'b1)] <= done_d;
          else      cnt_q <= cnt_q - 1'b1;
        end else if (done) begin
          q <= done_d;
        end else begin
          q_valid <= 1'b0;
        end
      end else if (done) begin
        if (!q_valid) begin
          q       <= done_d;
          q_valid <= 1'b1;
        end else if (cnt_q < ($bits(cnt_q))'(QDEPTH)) begin
          fifo[($clog2(QDEPTH))'(cnt_q)] <= done_d;
          cnt_q       <= cnt_q + 1'b1;
        end
      end
    end
  end

  always_comb begin
    busy = 1'b0;
    for (int i = 0; i < int'(LAT); i++) busy |= pipe_v[i];
  end

  // Programming rules: loading cycle of the conveyor, no lost products.
  a_issue : assert property (@(posedge clk) disable iff (!rst_n)
    in2 |-> since_q >= ($bits(since_q))'(ISSUE));
  a_queue : assert property (@(posedge clk) disable iff (!rst_n)
    (done && q_valid && !rd) |-> cnt_q < ($bits(cnt_q))'(QDEPTH));
endmodule
