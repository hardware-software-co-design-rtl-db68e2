// simd_adder: the half-word adder unit behind HADD, HADDAC, HADDF and
// HADDFAC.
//
// Operands j and k each hold two signed 16-bit samples (high and low
// half); acc is the old value of the destination Ri.
//   HADD    : Ri.h = j.h + k.h            Ri.l = j.l + k.l
//   HADDAC  : Ri.h = Ri.h + j.h + k.h     Ri.l = Ri.l + j.l + k.l
//   HADDF   : Ri = (j.h + k.h) + (j.l + k.l)        (32-bit sum)
//   HADDFAC : Ri = Ri + (j.h + k.h) + (j.l + k.l)   (32-bit sum)
// Lane sums wrap at 16 bits; in the F forms the two lane sums are kept
// at full precision (17 bits, sign-extended) before the 32-bit addition.
// Timing: HADD leaves on the short output SHORT_STAGES cycles after
// in_valid; the other three leave on the long output LONG_STAGES cycles
// after in_valid. The two outputs are separate write-back sources.
// The operations and the 3- and 5-stage depths of HADD and HADDAC follow
// the source text; giving HADDF and HADDFAC the 5-stage depth, and the
// 17-bit lane sums of the F forms, are this design's choices.
module simd_adder
  import risc_pkg::*;
#(
  parameter int unsigned SHORT_STAGES = 3,
  parameter int unsigned LONG_STAGES  = 5
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  media_op_e in_op,
  input  word_t     in_j,
  input  word_t     in_k,
  input  word_t     in_acc,
  input  reg_addr_t in_rd,
  output wb_t       out_short,
  output wb_t       out_long
);

  wb_t s_comb, l_comb;
  wb_t s_pipe [SHORT_STAGES];
  wb_t l_pipe [LONG_STAGES];

  always_comb begin
    logic [15:0] hs, ls;
    logic signed [16:0] hf, lf;
    word_t fsum;
    hs   = in_j[31:16] + in_k[31:16];
    ls   = in_j[15:0]  + in_k[15:0];
    hf   = 17'($signed(in_j[31:16])) + 17'($signed(in_k[31:16]));
    lf   = 17'($signed(in_j[15:0]))  + 17'($signed(in_k[15:0]));
    fsum = word_t'(32'(hf) + 32'(lf));
    s_comb = '{valid: in_valid && in_op == MD_HADD, rd: in_rd, data: {hs, ls}};
    l_comb.valid = in_valid && (in_op inside {MD_HADDAC, MD_HADDF, MD_HADDFAC});
    l_comb.rd    = in_rd;
    unique case (in_op)
      MD_HADDAC:  l_comb.data = {in_acc[31:16] + hs, in_acc[15:0] + ls};
      MD_HADDF:   l_comb.data = fsum;
      MD_HADDFAC: l_comb.data = in_acc + fsum;
      default:    l_comb.data = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(SHORT_STAGES); i++) s_pipe[i] <= '0;
      for (int i = 0; i < int'(LONG_STAGES); i++)  l_pipe[i] <= '0;
    end else begin
      s_pipe[0] <= s_comb;
      l_pipe[0] <= l_comb;
      for (int i = 1; i < int'(SHORT_STAGES); i++) s_pipe[i] <= s_pipe[i-1];
      for (int i = 1; i < int'(LONG_STAGES); i++)  l_pipe[i] <= l_pipe[i-1];
    end
  end

  assign out_short = s_pipe[SHORT_STAGES-1];
  assign out_long  = l_pipe[LONG_STAGES-1];

endmodule
