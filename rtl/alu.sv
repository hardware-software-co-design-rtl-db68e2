// alu: the integer arithmetic and logic unit of the core, pipelined.
//
// Computes ADD, SUB, ADDU, SUBU, AND, OR, XOR, the three shifts, SLT, SEQ
// and SNE on two 32-bit operands, and the ZERO and NEGATIVE flags of the
// result. Signed and unsigned add/subtract give the same sum; the signed
// forms also report two's-complement overflow on `ovf` (the unsigned forms
// never do). Shift amounts are the low five bits of operand b.
// Timing: a result enters at `in_valid` and leaves STAGES clock cycles
// later on `out_valid`, with the destination tag `in_rd` carried alongside.
// The operation is computed in the first stage and then travels through
// STAGES-1 further registers, leaving synthesis free to retime the adder.
// The three stages of the default follow the source text, where the add
// path was split in three to reach the target clock; the register
// placement inside the unit is this design's choice.
module alu
  import risc_pkg::*;
#(
  parameter int unsigned STAGES = 3
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  alu_op_e   in_op,
  input  word_t     in_a,
  input  word_t     in_b,
  input  reg_addr_t in_rd,
  output logic      out_valid,
  output reg_addr_t out_rd,
  output word_t     out_result,
  output logic      out_zero,
  output logic      out_negative,
  output logic      out_ovf
);

  typedef struct packed {
    logic      valid;
    reg_addr_t rd;
    word_t     res;
    logic      ovf;
  } stage_t;

  stage_t comb_s;
  stage_t pipe [STAGES];

  always_comb begin
    word_t sum, dif;
    logic  [4:0] sh;
    sum = in_a + in_b;
    dif = in_a - in_b;
    sh  = in_b[4:0];
    comb_s.valid = in_valid;
    comb_s.rd    = in_rd;
    comb_s.ovf   = 1'b0;
    unique case (in_op)
      ALU_ADD:  begin comb_s.res = sum; comb_s.ovf = (in_a[31] == in_b[31]) && (sum[31] != in_a[31]); end
      ALU_SUB:  begin comb_s.res = dif; comb_s.ovf = (in_a[31] != in_b[31]) && (dif[31] != in_a[31]); end
      ALU_ADDU: comb_s.res = sum;
      ALU_SUBU: comb_s.res = dif;
      ALU_AND:  comb_s.res = in_a & in_b;
      ALU_OR:   comb_s.res = in_a | in_b;
      ALU_XOR:  comb_s.res = in_a ^ in_b;
      ALU_SRA:  comb_s.res = word_t'($signed(in_a) >>> sh);
      ALU_SRL:  comb_s.res = in_a >> sh;
      ALU_SLL:  comb_s.res = in_a << sh;
      ALU_SLT:  comb_s.res = {31'd0, $signed(in_a) < $signed(in_b)};
      ALU_SEQ:  comb_s.res = {31'd0, in_a == in_b};
      ALU_SNE:  comb_s.res = {31'd0, in_a != in_b};
      default:  comb_s.res = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(STAGES); i++) pipe[i] <= '0;
    end else begin
      pipe[0] <= comb_s;
      for (int i = 1; i < int'(STAGES); i++) pipe[i] <= pipe[i-1];
    end
  end

  assign out_valid    = pipe[STAGES-1].valid;
  assign out_rd       = pipe[STAGES-1].rd;
  assign out_result   = pipe[STAGES-1].res;
  assign out_ovf      = pipe[STAGES-1].ovf;
  assign out_zero     = (pipe[STAGES-1].res == '0);
  assign out_negative = pipe[STAGES-1].res[31];

endmodule
