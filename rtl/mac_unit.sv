// mac_unit: the dual 16 x 16 multiply-accumulate unit behind MAC, MACL,
// MACK and MACKL.
//
// Operand j holds two signed 16-bit samples; k holds two signed Q15
// coefficients (a register Rk, or a constant Kk for MACK/MACKL, selected
// before this unit); acc is the old value of the destination Ri. Per lane
//   MAC / MACK   : Ri.x = Ri.x + ((j.x * k.x) >>> 15)
//   MACL / MACKL : Ri.x = (j.x * k.x) >>> 15
// The 32-bit product is brought back to the Q15 scale of the coefficient
// by an arithmetic right shift of 15 (truncation), and the lane sum wraps
// at 16 bits. Both lanes work in parallel.
// Timing: the operands are registered, the two products are formed in the
// next stage, shifted and accumulated in the one after, and the result
// then passes through the remaining registers, so that it leaves STAGES
// cycles after in_valid (STAGES >= 3).
// The four operations and the 8-stage default follow the source text; the
// Q15 shift, the wrap-around and the split of work across the stages are
// this design's choices.
module mac_unit
  import risc_pkg::*;
#(
  parameter int unsigned STAGES = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  media_op_e in_op,
  input  word_t     in_j,
  input  word_t     in_k,
  input  word_t     in_acc,
  input  reg_addr_t in_rd,
  output wb_t       out
);

  typedef struct packed {
    logic      valid;
    logic      clear;
    reg_addr_t rd;
    word_t     j, k, acc;
  } opnd_t;

  typedef struct packed {
    logic               valid;
    reg_addr_t          rd;
    logic signed [31:0] ph, pl;
    word_t              acc;
  } prod_t;

  opnd_t s1;
  prod_t s2;
  wb_t   tail [STAGES-2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0;
      s2 <= '0;
      for (int i = 0; i < int'(STAGES) - 2; i++) tail[i] <= '0;
    end else begin
      // stage 1: operand registers
      s1.valid <= in_valid && (in_op inside {MD_MAC, MD_MACL, MD_MACK, MD_MACKL});
      s1.clear <= (in_op == MD_MACL) || (in_op == MD_MACKL);
      s1.rd    <= in_rd;
      s1.j     <= in_j;
      s1.k     <= in_k;
      s1.acc   <= in_acc;
      // stage 2: the two 16 x 16 products
      s2.valid <= s1.valid;
      s2.rd    <= s1.rd;
      s2.ph    <= $signed(s1.j[31:16]) * $signed(s1.k[31:16]);
      s2.pl    <= $signed(s1.j[15:0])  * $signed(s1.k[15:0]);
      s2.acc   <= s1.clear ? '0 : s1.acc;
      // stage 3: scale back to Q0 and accumulate per lane
      tail[0].valid <= s2.valid;
      tail[0].rd    <= s2.rd;
      tail[0].data  <= {s2.acc[31:16] + 16'(s2.ph >>> 15),
                        s2.acc[15:0]  + 16'(s2.pl >>> 15)};
      for (int i = 1; i < int'(STAGES) - 2; i++) tail[i] <= tail[i-1];
    end
  end

  assign out = tail[STAGES-3];

endmodule
