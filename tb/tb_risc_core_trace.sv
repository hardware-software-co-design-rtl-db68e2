// tb_risc_core_trace: replays the instruction words of the original basic
// core's simulation trace, back to back, on a core built with a one-stage
// ALU (ALU_STAGES = 1), the configuration of that basic core.
//
// Words (from address 0x9CC): LHI r2,1; ADD r3,r1,r2; SUB r4,r2,r3;
// ADDU r6,r3,r2; SUBU r1,r6,r2; AND r7,r3,r4; OR r8,r1,r2; SRA r0,r2,r4.
// r1 is set to 0x00010000 by an LHI a few slots earlier. Every ALU
// instruction depends on an earlier one, several on the one right before,
// so the sequence only works because of the bypass and the write-through
// register bank. Checked:
//   * the results, in the order they are written and one per cycle:
//     00010000 00020000 FFFF0000 00030000 00020000 00020000 00030000;
//   * the fetch-to-write latency of 4 cycles (IF, ID, EX, WB);
//   * where the bypass is taken: operand B for ADD and SUB, operand A for
//     SUBU, and nowhere else;
//   * NEGATIVE is high for exactly one cycle (the SUB result) and ZERO
//     never;
//   * the final register contents.
module tb_risc_core_trace;
  import risc_pkg::*;

  localparam word_t BASE = 32'h000009C0;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  word_t imem_addr, imem_rdata, dmem_addr, dmem_wdata, dmem_rdata, pc;
  logic  dmem_we, flag_zero, flag_negative, wb_conflict, branch_taken;
  logic  [2:0] bypass_hit;

  risc_core #(.RESET_PC(BASE), .ALU_STAGES(1)) dut (.*);

  word_t prog [32];
  int idx;
  assign idx = int'((imem_addr - BASE) >> 2);
  assign imem_rdata = (idx >= 0 && idx < 32) ? prog[idx] : '0;
  assign dmem_rdata = '0;

  int checks = 0, failures = 0, cycle = 0;
  int n_byp [3], n_neg = 0, n_zero = 0, add_fetch = -1, add_lat = -1;
  word_t wr_data [$];
  int    wr_cycle [$];

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      for (int i = 0; i < 3; i++) if (bypass_hit[i]) n_byp[i]++;
      if (flag_negative) n_neg++;
      if (flag_zero) n_zero++;
      if (add_fetch < 0 && imem_addr == 32'h9D0) add_fetch = cycle;
      if (dut.rf_we && dut.rf_waddr != '0) begin
        wr_data.push_back(dut.rf_wdata);
        wr_cycle.push_back(cycle);
        if (add_fetch >= 0 && add_lat < 0 && dut.rf_waddr == 5'd3) add_lat = cycle - add_fetch + 1;
      end
    end
  end

  initial begin
    word_t exp_wr [9];
    for (int i = 0; i < 32; i++) prog[i] = '0;
    for (int i = 0; i < 3; i++) n_byp[i] = 0;
    prog[0]  = 32'h40800001;   // LHI r1, 1
    prog[3]  = 32'h41000001;   // LHI r2, 1           (0x9CC)
    prog[4]  = 32'h00886001;   // ADD  r3 = r1 + r2   (0x9D0)
    prog[5]  = 32'h010C8002;   // SUB  r4 = r2 - r3
    prog[6]  = 32'h0188C003;   // ADDU r6 = r3 + r2
    prog[7]  = 32'h03082004;   // SUBU r1 = r6 - r2
    prog[8]  = 32'h0190E005;   // AND  r7 = r3 & r4
    prog[9]  = 32'h00890006;   // OR   r8 = r1 | r2
    prog[10] = 32'h01100007;   // SRA  r0 = r2 >>> r4 (result discarded)
    prog[20] = encode_j(OP_J, -28'sd4);   // halt: jump to itself (0xA10)

    repeat (3) @(posedge clk);
    rst_n = 1;
    while (pc != 32'hA10) @(posedge clk);
    repeat (10) @(posedge clk);

    exp_wr = '{32'h00010000, 32'h00010000, 32'h00020000, 32'hFFFF0000, 32'h00030000,
               32'h00020000, 32'h00020000, 32'h00030000, 32'h0};
    chk("writes", wr_data.size(), 8);
    for (int i = 0; i < 8 && i < wr_data.size(); i++)
      chk($sformatf("write %0d", i), int'(wr_data[i]), int'(exp_wr[i]));
    for (int i = 2; i < 8 && i < wr_cycle.size(); i++)
      chk($sformatf("write %0d back to back", i), wr_cycle[i] - wr_cycle[i-1], 1);
    chk("fetch-to-write latency", add_lat, 4);
    chk("bypass A", n_byp[0], 1);
    chk("bypass B", n_byp[1], 2);
    chk("bypass C", n_byp[2], 0);
    chk("NEGATIVE cycles", n_neg, 1);
    chk("ZERO cycles", n_zero, 0);
    chk("r1", int'(dut.u_regfile.regs[1]), 32'h00020000);
    chk("r2", int'(dut.u_regfile.regs[2]), 32'h00010000);
    chk("r3", int'(dut.u_regfile.regs[3]), 32'h00020000);
    chk("r4", int'(dut.u_regfile.regs[4]), 32'hFFFF0000);
    chk("r6", int'(dut.u_regfile.regs[6]), 32'h00030000);
    chk("r7", int'(dut.u_regfile.regs[7]), 32'h00020000);
    chk("r8", int'(dut.u_regfile.regs[8]), 32'h00030000);
    chk("r0", int'(dut.u_regfile.regs[0]), 0);
    chk("collisions", int'(wb_conflict), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
