// md1_functab: function-table unit for sqrt(x), sin(x), cos(x) and arcsin(x).
//
// The range of each function is cut into 64 intervals and a permanent store
// holds the function at the 65 interval ends. On the load line the unit takes
// the argument from the unibus and the function type from the control word.
// After the dead time (150 ns = 5 steps) its output register presents, one
// after the other on three reads of the output line, three normalized
// numbers: f at the start of the interval, f at its end, and the argument
// minus the interval start. The program then forms the exact value by linear
// interpolation with a summer and the multiplier. All of this, and the finer
// steps of arcsin near x = 1, follow the original design.
//
// This design's choices: the unit works on |x|; the ranges and steps are
//   sqrt   : [0, 1],  step 1/64
//   sin,cos: [0, 2],  step 1/32 (covers 0..pi/2 rad)
//   arcsin : [0, 0.75) step 1/32, [0.75, 0.875) step 1/64, [0.875, 1] step 1/256
// and an argument past the range uses the last interval (the offset then
// exceeds the step). Table entry k*128 + i is f_k(a_i), the value of function
// k (0 sqrt, 1 sin, 2 cos, 3 arcsin) at the i-th interval end a_i above,
// truncated to the 24-bit format; entries 65..127 of each function are unused.
//
// Interface: bus_in = unibus; ld = argument input (with fn); rd = output line,
// steps through the three numbers; q = output register; busy during the dead
// time.
module md1_functab
  import md1_pkg::*;
#(
  parameter int unsigned LAT = 5
) (
  input  logic      clk,
  input  logic      rst_n,
  input  md1_word_t bus_in,
  input  logic      ld,
  input  md1_fn_e   fn,
  input  logic      rd,
  output md1_word_t q,
  output logic      busy
);
  md1_word_t rom [512];
  initial $readmemh("rtl/md1_functab.hex", rom);

  // |x| as fixed point with 2 integer and 24 fraction bits (exact for the
  // 16-bit mantissa whenever |x| >= 2^-8)
  logic [25:0] fx;
  logic [5:0]  idx;
  logic [25:0] a_start;
  always_comb begin
    int e;
    e  = fp_exp(bus_in);
    if (fp_is_zero(bus_in) || e < -24) fx = '0;
    else if (e > 2)                    fx = '1;
    else if (e >= -8)                  fx = 26'(bus_in[15:0]) << (e + 8);
    else                               fx = 26'(bus_in[15:0]) >> (-e - 8);
    idx     = '0;
    a_start = '0;
    unique case (fn)
      FN_SQRT: begin
        idx     = (fx >= 26'h1000000) ? 6'd63 : fx[23:18];
        a_start = {2'b00, idx, 18'd0};
      end
      FN_SIN, FN_COS: begin
        idx     = (fx >= 26'h2000000) ? 6'd63 : fx[24:19];
        a_start = {1'b0, idx, 19'd0};
      end
      FN_ARCSIN: begin
        if (fx < 26'h0C00000) begin
          idx     = 6'(fx[23:19]);
          a_start = {2'b00, fx[23:19], 19'd0};
        end else if (fx < 26'h0E00000) begin
          idx     = 6'd24 + 6'(fx[20:18]);
          a_start = 26'h0C00000 + {5'd0, fx[20:18], 18'd0};
        end else if (fx < 26'h1000000) begin
          idx     = 6'd32 + 6'(fx[20:16]);
          a_start = 26'h0E00000 + {5'd0, fx[20:16], 16'd0};
        end else begin
          idx     = 6'd63;
          a_start = 26'h0FF0000;
        end
      end
      default: ;
    endcase
  end

  md1_word_t r0, r1, r2;
  logic [1:0] ptr_q;
  logic [$clog2(LAT+1)-1:0] cnt_q;
  md1_word_t n0_q, n1_q, n2_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n0_q <= FP_ZERO; n1_q <= FP_ZERO; n2_q <= FP_ZERO;
      r0 <= FP_ZERO; r1 <= FP_ZERO; r2 <= FP_ZERO;
      ptr_q <= '0;
      cnt_q <= '0;
    end else begin
      if (ld) begin
        n0_q  <= rom[{fn, 1'b0, idx}];
        n1_q  <= rom[{fn, 1'b0, idx} + 9'd1];
        n2_q  <= fp_pack(1'b0, 8, {22'd0, fx - a_start});
        cnt_q <= ($bits(cnt_q))'(LAT);
      end else if (cnt_q != 0) begin
        cnt_q <= cnt_q - 1'b1;
        if (cnt_q == 1) begin
          r0 <= n0_q; r1 <= n1_q; r2 <= n2_q;
          ptr_q <= '0;
        end
      end
      if (rd && !(cnt_q == 1 && !ld)) ptr_q <= (ptr_q == 2'd2) ? 2'd0 : ptr_q + 1'b1;
    end
  end

  always_comb begin
    unique case (ptr_q)
      2'd0:    q = r0;
      2'd1:    q = r1;
      default: q = r2;
    endcase
  end

  assign busy = cnt_q != 0;
endmodule
