// risc_core: 32-bit RISC processor core with multimedia instructions for
// software MPEG-2 iDCT.
//
// Pipeline: IF (fetch) - ID (decode, register and constant read, branch)
// - EX (one execution unit per instruction class, each with its own
// depth) - WB (register write). With a one-stage execute this is the
// four-stage pipeline of the basic core; deeper units stretch EX:
//   integer ALU and loads ALU_STAGES (3)   -> result usable 2 slots late
//   HADD                  HADD_STAGES (3)
//   HADDAC/HADDF/HADDFAC  HADDAC_STAGES (5)
//   MAC/MACL/MACK/MACKL   MAC_STAGES (8)   -> 11 cycles fetch to write
//   IDCT                  6
// There are no interlocks and no stall logic: as in the original design
// the program (compiler or assembly writer) must space dependent
// instructions by the producer's depth, and must not let two results
// reach write-back in the same cycle. If they do, one write port decides
// by fixed priority (IDCT, MAC, long HADD, HADD, load, ALU), the losers are
// dropped and `wb_conflict` pulses.
// Bypass: the result being written back is forwarded to the operands of
// the instruction entering EX (the BUS1/BUS2 bypass of the original core),
// and the register bank is write-through for the instruction in ID.
// Branches (BEQZ, BNEZ, J, JAL, JR, JALR) resolve in ID from the register
// bank (no EX bypass) and have one delay slot; JAL/JALR write PC+8 to R31
// through the ALU. Memories are outside: the instruction memory and the
// data memory are both read combinationally; stores write at the end of
// the first EX stage, loads return after ALU_STAGES like an ALU result.
// The instruction set, register and constant banks, unit depths,
// the absence of hazard control and the bypass follow the source text and
// its simulation trace; the encoding beyond the traced instructions, the
// delay slot, branch timing, memory timing and write-back priority are
// this design's choices.
module risc_core
  import risc_pkg::*;
#(
  parameter word_t       RESET_PC      = '0,
  parameter int unsigned ALU_STAGES    = 3,
  parameter int unsigned HADD_STAGES   = 3,
  parameter int unsigned HADDAC_STAGES = 5,
  parameter int unsigned MAC_STAGES    = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  // instruction memory
  output word_t imem_addr,
  input  word_t imem_rdata,
  // data memory
  output word_t dmem_addr,
  output logic  dmem_we,
  output word_t dmem_wdata,
  input  word_t dmem_rdata,
  // status
  output word_t pc,
  output logic  flag_zero,
  output logic  flag_negative,
  output logic  wb_conflict,
  output logic  [2:0] bypass_hit,
  output logic  branch_taken
);

  typedef enum logic [2:0] {U_NONE, U_ALU, U_LOAD, U_STORE, U_MEDIA} unit_e;

  typedef struct packed {
    logic      valid;
    unit_e     unit;
    alu_op_e   alu_op;
    media_op_e md_op;
    reg_addr_t rd;
    logic      u1, u2, u3;
    reg_addr_t s1, s2, s3;
    word_t     v1, v2, v3;
    word_t     imm;
  } idex_t;

  // ---------------------------------------------------------------- IF
  word_t pc_q, id_pc, id_ir;
  word_t br_target;

  assign imem_addr = pc_q;
  assign pc        = pc_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q  <= RESET_PC;
      id_pc <= '0;
      id_ir <= '0;          // all-zero word decodes as a no-operation
    end else begin
      pc_q  <= branch_taken ? br_target : pc_q + 32'd4;
      id_pc <= pc_q;
      id_ir <= imem_rdata;
    end
  end

  // ---------------------------------------------------------------- ID
  opcode_e     op;
  reg_addr_t   fa, fb, fc;
  logic [12:0] func;
  word_t       imm16_s, imm16_z, imm28_s;
  word_t       ra_data, rb_data, rc_data, k_data;
  word_t       q_rdata [4];
  idex_t       dec;

  // write-back signals, driven below
  logic      rf_we, rf_qwe;
  reg_addr_t rf_waddr, rf_qaddr;
  word_t     rf_wdata;
  word_t     rf_qdata [4];

  assign op      = opcode_e'(id_ir[31:28]);
  assign fa      = id_ir[27:23];
  assign fb      = id_ir[22:18];
  assign fc      = id_ir[17:13];
  assign func    = id_ir[12:0];
  assign imm16_s = {{16{id_ir[15]}}, id_ir[15:0]};
  assign imm16_z = {16'd0, id_ir[15:0]};
  assign imm28_s = {{4{id_ir[27]}}, id_ir[27:0]};

  regfile u_regfile (
    .clk, .rst_n,
    .ra_addr(fa), .rb_addr(fb), .rc_addr(fc),
    .ra_data, .rb_data, .rc_data,
    .q_addr(fc), .q_data(q_rdata),
    .we(rf_we), .w_addr(rf_waddr), .w_data(rf_wdata),
    .qwe(rf_qwe), .qw_addr(rf_qaddr), .qw_data(rf_qdata)
  );

  const_bank u_const_bank (.k_addr(fb[3:0]), .k_data);

  always_comb begin
    dec        = '0;
    dec.rd     = fc;
    dec.s1     = fa;
    dec.s2     = fb;
    dec.s3     = fc;
    dec.v1     = ra_data;
    dec.v2     = rb_data;
    dec.v3     = rc_data;
    dec.imm    = imm16_s;
    dec.alu_op = ALU_NOP;
    dec.md_op  = MD_NONE;
    branch_taken = 1'b0;
    br_target    = id_pc + 32'd4 + imm16_s;
    unique case (op)
      OP_RTYPE: if (func >= 13'd1 && func <= 13'd13) begin
        dec.valid  = 1'b1;
        dec.unit   = U_ALU;
        dec.alu_op = alu_op_e'(func[3:0]);
        dec.u1     = 1'b1;
        dec.u2     = 1'b1;
      end
      OP_MEDIA: if (func >= 13'd1 && func <= 13'd9) begin
        dec.valid = 1'b1;
        dec.unit  = U_MEDIA;
        dec.md_op = media_op_e'(func[3:0]);
        dec.u1    = 1'b1;
        dec.u2    = !(dec.md_op inside {MD_MACK, MD_MACKL});
        dec.u3    = dec.md_op inside {MD_MAC, MD_MACK, MD_HADDAC, MD_HADDFAC};
        if (dec.md_op inside {MD_MACK, MD_MACKL}) dec.v2 = k_data;
        if (dec.md_op == MD_IDCT) begin
          dec.u1 = 1'b0;
          dec.u2 = 1'b0;
        end
      end
      OP_ADDI, OP_ANDI, OP_ORI, OP_XORI, OP_SLLI: begin
        dec.valid = 1'b1;
        dec.unit  = U_ALU;
        dec.rd    = fa;
        dec.s1    = fb;
        dec.v1    = rb_data;
        dec.u1    = 1'b1;
        dec.v2    = (op == OP_ADDI) ? imm16_s : imm16_z;
        unique case (op)
          OP_ADDI: dec.alu_op = ALU_ADD;
          OP_ANDI: dec.alu_op = ALU_AND;
          OP_ORI:  dec.alu_op = ALU_OR;
          OP_XORI: dec.alu_op = ALU_XOR;
          default: dec.alu_op = ALU_SLL;
        endcase
      end
      OP_LHI: begin
        dec.valid  = 1'b1;
        dec.unit   = U_ALU;
        dec.alu_op = ALU_SLL;
        dec.rd     = fa;
        dec.v1     = imm16_z;
        dec.v2     = 32'd16;
      end
      OP_LW: begin
        dec.valid = 1'b1;
        dec.unit  = U_LOAD;
        dec.rd    = fa;
        dec.s1    = fb;
        dec.v1    = rb_data;
        dec.u1    = 1'b1;
      end
      OP_SW: begin
        dec.valid = 1'b1;
        dec.unit  = U_STORE;
        dec.rd    = '0;
        dec.s1    = fb;
        dec.v1    = rb_data;
        dec.u1    = 1'b1;
        dec.s2    = fa;
        dec.v2    = ra_data;
        dec.u2    = 1'b1;
      end
      OP_BEQZ: branch_taken = (ra_data == '0);
      OP_BNEZ: branch_taken = (ra_data != '0);
      OP_J, OP_JAL: begin
        branch_taken = 1'b1;
        br_target    = id_pc + 32'd4 + imm28_s;
      end
      OP_JR, OP_JALR: begin
        branch_taken = 1'b1;
        br_target    = ra_data;
      end
      default: ;
    endcase
    if (op == OP_JAL || op == OP_JALR) begin
      dec.valid  = 1'b1;
      dec.unit   = U_ALU;
      dec.alu_op = ALU_ADD;
      dec.rd     = 5'd31;
      dec.v1     = id_pc + 32'd8;
      dec.v2     = '0;
    end
  end

  idex_t ex;
  word_t ex_q [4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex <= '0;
      for (int i = 0; i < 4; i++) ex_q[i] <= '0;
    end else begin
      ex <= dec;
      for (int i = 0; i < 4; i++) ex_q[i] <= q_rdata[i];
    end
  end

  // ---------------------------------------------------------------- EX
  wb_t   wb;          // single-word result written back this cycle
  word_t o1, o2, o3;

  always_comb begin
    bypass_hit[0] = ex.u1 && wb.valid && ex.s1 != '0 && wb.rd == ex.s1;
    bypass_hit[1] = ex.u2 && wb.valid && ex.s2 != '0 && wb.rd == ex.s2;
    bypass_hit[2] = ex.u3 && wb.valid && ex.s3 != '0 && wb.rd == ex.s3;
    o1 = bypass_hit[0] ? wb.data : ex.v1;
    o2 = bypass_hit[1] ? wb.data : ex.v2;
    o3 = bypass_hit[2] ? wb.data : ex.v3;
  end

  // integer ALU
  logic      alu_v, alu_z, alu_n, alu_ovf;
  reg_addr_t alu_rd;
  word_t     alu_res;

  alu #(.STAGES(ALU_STAGES)) u_alu (
    .clk, .rst_n,
    .in_valid(ex.valid && ex.unit == U_ALU), .in_op(ex.alu_op),
    .in_a(o1), .in_b(o2), .in_rd(ex.rd),
    .out_valid(alu_v), .out_rd(alu_rd), .out_result(alu_res),
    .out_zero(alu_z), .out_negative(alu_n), .out_ovf(alu_ovf)
  );

  // loads and stores: address in the first EX stage, load data then
  // travels to write-back with the ALU's depth
  wb_t ld_pipe [ALU_STAGES];

  assign dmem_addr  = o1 + ex.imm;
  assign dmem_we    = ex.valid && ex.unit == U_STORE;
  assign dmem_wdata = o2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(ALU_STAGES); i++) ld_pipe[i] <= '0;
    end else begin
      ld_pipe[0] <= '{valid: ex.valid && ex.unit == U_LOAD, rd: ex.rd, data: dmem_rdata};
      for (int i = 1; i < int'(ALU_STAGES); i++) ld_pipe[i] <= ld_pipe[i-1];
    end
  end

  // half-word adders
  wb_t hadd_s, hadd_l;
  simd_adder #(.SHORT_STAGES(HADD_STAGES), .LONG_STAGES(HADDAC_STAGES)) u_simd_adder (
    .clk, .rst_n,
    .in_valid(ex.valid && ex.unit == U_MEDIA), .in_op(ex.md_op),
    .in_j(o1), .in_k(o2), .in_acc(o3), .in_rd(ex.rd),
    .out_short(hadd_s), .out_long(hadd_l)
  );

  // multiply-accumulate
  wb_t mac_o;
  mac_unit #(.STAGES(MAC_STAGES)) u_mac_unit (
    .clk, .rst_n,
    .in_valid(ex.valid && ex.unit == U_MEDIA), .in_op(ex.md_op),
    .in_j(o1), .in_k(o2), .in_acc(o3), .in_rd(ex.rd),
    .out(mac_o)
  );

  // 1-D iDCT
  logic      idct_v;
  reg_addr_t idct_rd;
  word_t     idct_d [4];
  idct_core u_idct_core (
    .clk, .rst_n,
    .in_valid(ex.valid && ex.unit == U_MEDIA && ex.md_op == MD_IDCT),
    .in_data(ex_q), .in_rd(ex.rd),
    .out_valid(idct_v), .out_rd(idct_rd), .out_data(idct_d)
  );

  // ---------------------------------------------------------------- WB
  wb_t alu_wb, ld_wb;
  assign alu_wb = '{valid: alu_v, rd: alu_rd, data: alu_res};
  assign ld_wb  = ld_pipe[ALU_STAGES-1];

  always_comb begin
    int unsigned n;
    n = 32'(idct_v) + 32'(mac_o.valid) + 32'(hadd_l.valid) + 32'(hadd_s.valid)
      + 32'(ld_wb.valid) + 32'(alu_wb.valid);
    wb_conflict = (n > 1);
    if      (idct_v)        wb = '0;
    else if (mac_o.valid)   wb = mac_o;
    else if (hadd_l.valid)  wb = hadd_l;
    else if (hadd_s.valid)  wb = hadd_s;
    else if (ld_wb.valid)   wb = ld_wb;
    else                    wb = alu_wb;
    rf_we    = wb.valid;
    rf_waddr = wb.rd;
    rf_wdata = wb.data;
    rf_qwe   = idct_v;
    rf_qaddr = idct_rd;
    rf_qdata = idct_d;
  end

  // ZERO / NEGATIVE status of the last ALU result written back
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flag_zero     <= 1'b0;
      flag_negative <= 1'b0;
    end else if (alu_v && !(idct_v || mac_o.valid || hadd_l.valid || hadd_s.valid || ld_wb.valid)) begin
      flag_zero     <= alu_z;
      flag_negative <= alu_n;
    end
  end

  // the program is responsible for avoiding write-back collisions
  property p_no_wb_collision;
    @(posedge clk) disable iff (!rst_n) !wb_conflict;
  endproperty
  a_no_wb_collision: assert property (p_no_wb_collision)
    else $warning("two results reached write-back in one cycle; lower priority dropped");

  logic unused_ok;
  assign unused_ok = alu_ovf;

endmodule
