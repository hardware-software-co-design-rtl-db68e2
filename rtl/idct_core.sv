// idct_core: one-dimensional 8-point inverse DCT, the datapath of the IDCT
// instruction.
//
// Eight signed 16-bit inputs arrive packed in four 32-bit words (word i
// holds element 2i in its high half and 2i+1 in its low half, i.e. the
// contents of Ri..Ri+3); eight 16-bit outputs leave in the same packing
// and are written back to the same registers.
// The transform is the Arai-Agui-Nakajima (AAN) flow graph: butterflies
// of additions, and five multiplications by the constants sqrt(2),
// 1.847759, 1.082392 and 2.613126. Each constant multiplication is a sum
// of shifted copies of its input, one adder input per set bit of an 8-bit
// fraction constant (362, 473, 277, 669 / 256), so the core has no
// multiplier. Internal values are IW (24) bits wide with FRAC (3)
// fraction bits; outputs are rounded to integers and saturated to 16 bits.
// As in all AAN implementations the inputs are expected pre-scaled: input
// k is the DCT coefficient F(k) times cos(k*pi/16)*sqrt(2) (times 1 for
// k = 0), a factor normally merged into dequantisation. Then output n is
//   x(n) = F(0) + sqrt(2) * sum_{k=1..7} F(k) cos((2n+1) k pi / 16).
// Timing: fully pipelined, one transform accepted per cycle, result out
// STAGES = 6 cycles after in_valid, with the destination tag alongside.
// The AAN choice, shift-add constants, 24-bit internals, in-place register
// use and six stages follow the source text; the packing, the fraction
// bits, the constant precision, rounding, saturation and the placement of
// the stage registers are this design's choices.
module idct_core
  import risc_pkg::*;
#(
  parameter int unsigned IW   = 24,
  parameter int unsigned FRAC = 3
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  word_t     in_data [4],
  input  reg_addr_t in_rd,
  output logic      out_valid,
  output reg_addr_t out_rd,
  output word_t     out_data [4]
);

  localparam int unsigned STAGES = 6;
  typedef logic signed [IW-1:0] iw_t;

  // x * C / 256 for a constant C, built as one shifted addend per set bit of C
  function automatic iw_t cmul(input iw_t x, input logic [9:0] c);
    logic signed [IW+9:0] acc;
    acc = '0;
    for (int b = 0; b < 10; b++)
      if (c[b]) acc = acc + ((IW+10)'(x) <<< b);
    return iw_t'(acc >>> 8);
  endfunction

  function automatic logic [15:0] sat16(input iw_t y);
    iw_t r;
    r = (y + iw_t'(1 << (FRAC-1))) >>> FRAC;
    if (r > iw_t'(32767))       return 16'h7fff;
    else if (r < -iw_t'(32768)) return 16'h8000;
    else                        return r[15:0];
  endfunction

  localparam logic [9:0] C_1_414 = 10'd362;
  localparam logic [9:0] C_1_848 = 10'd473;
  localparam logic [9:0] C_1_082 = 10'd277;
  localparam logic [9:0] C_2_613 = 10'd669;

  typedef struct packed { iw_t e10, e11, e13, e1m3, z10, z11, z12, z13; } st1_t;
  typedef struct packed { iw_t e10, e11, e13, e12a, t7, t11, z5, m12, m10; } st2_t;
  typedef struct packed { iw_t e10, e11, e13, e12, t7, t11, t10, t12; } st3_t;
  typedef struct packed { iw_t o0, o1, o2, o3, t7, t6, t11, t10; } st4_t;
  typedef struct packed { iw_t o0, o1, o2, o3, t7, t6, t5, t10; } st5_t;

  st1_t s1; st2_t s2; st3_t s3; st4_t s4; st5_t s5;
  logic      v [STAGES];
  reg_addr_t rd [STAGES];
  logic [15:0] y [8];

  iw_t x [8];
  always_comb
    for (int i = 0; i < 4; i++) begin
      x[2*i]   = iw_t'($signed(in_data[i][31:16])) <<< FRAC;
      x[2*i+1] = iw_t'($signed(in_data[i][15:0]))  <<< FRAC;
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0; s2 <= '0; s3 <= '0; s4 <= '0; s5 <= '0;
      for (int i = 0; i < int'(STAGES); i++) begin v[i] <= 1'b0; rd[i] <= '0; end
      for (int i = 0; i < 8; i++) y[i] <= '0;
    end else begin
      v[0]  <= in_valid;
      rd[0] <= in_rd;
      for (int i = 1; i < int'(STAGES); i++) begin v[i] <= v[i-1]; rd[i] <= rd[i-1]; end
      // stage 1: input butterflies
      s1.e10  <= x[0] + x[4];
      s1.e11  <= x[0] - x[4];
      s1.e13  <= x[2] + x[6];
      s1.e1m3 <= x[2] - x[6];
      s1.z13  <= x[5] + x[3];
      s1.z10  <= x[5] - x[3];
      s1.z11  <= x[1] + x[7];
      s1.z12  <= x[1] - x[7];
      // stage 2: shift-add constant multiplications
      s2.e10  <= s1.e10;
      s2.e11  <= s1.e11;
      s2.e13  <= s1.e13;
      s2.e12a <= cmul(s1.e1m3, C_1_414);
      s2.t7   <= s1.z11 + s1.z13;
      s2.t11  <= cmul(s1.z11 - s1.z13, C_1_414);
      s2.z5   <= cmul(s1.z10 + s1.z12, C_1_848);
      s2.m12  <= cmul(s1.z12, C_1_082);
      s2.m10  <= cmul(s1.z10, C_2_613);
      // stage 3
      s3.e10 <= s2.e10;
      s3.e11 <= s2.e11;
      s3.e13 <= s2.e13;
      s3.e12 <= s2.e12a - s2.e13;
      s3.t7  <= s2.t7;
      s3.t11 <= s2.t11;
      s3.t10 <= s2.m12 - s2.z5;
      s3.t12 <= s2.z5 - s2.m10;
      // stage 4: even part complete, first odd butterfly
      s4.o0  <= s3.e10 + s3.e13;
      s4.o3  <= s3.e10 - s3.e13;
      s4.o1  <= s3.e11 + s3.e12;
      s4.o2  <= s3.e11 - s3.e12;
      s4.t7  <= s3.t7;
      s4.t6  <= s3.t12 - s3.t7;
      s4.t11 <= s3.t11;
      s4.t10 <= s3.t10;
      // stage 5
      s5.o0  <= s4.o0;
      s5.o1  <= s4.o1;
      s5.o2  <= s4.o2;
      s5.o3  <= s4.o3;
      s5.t7  <= s4.t7;
      s5.t6  <= s4.t6;
      s5.t5  <= s4.t11 - s4.t6;
      s5.t10 <= s4.t10;
      // stage 6: output butterflies, rounding and saturation
      y[0] <= sat16(s5.o0 + s5.t7);
      y[7] <= sat16(s5.o0 - s5.t7);
      y[1] <= sat16(s5.o1 + s5.t6);
      y[6] <= sat16(s5.o1 - s5.t6);
      y[2] <= sat16(s5.o2 + s5.t5);
      y[5] <= sat16(s5.o2 - s5.t5);
      y[4] <= sat16(s5.o3 + (s5.t10 + s5.t5));
      y[3] <= sat16(s5.o3 - (s5.t10 + s5.t5));
    end
  end

  assign out_valid = v[STAGES-1];
  assign out_rd    = rd[STAGES-1];
  always_comb
    for (int i = 0; i < 4; i++) out_data[i] = {y[2*i], y[2*i+1]};

endmodule
