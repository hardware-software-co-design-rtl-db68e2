// tb_risc_core: program-level test of the processor core.
//
// A program is generated (tb_prog_pkg schedules it as the core's compiler
// must) that exercises every instruction class: the ALU sequence of the
// original core's simulation trace (LHI, ADD, SUB, ADDU, SUBU, AND, OR,
// SRA), the remaining ALU and immediate operations, loads and stores, the
// four MAC forms with constants and registers, the four HADD forms, IDCT,
// a counted BNEZ loop with its delay slot, JAL/JR, and one deliberate
// write-back collision (MAC and ADDI finishing in the same cycle).
// Memories are modelled here. After the program halts, every register and
// every data word written is compared with a sequential reference model;
// IDCT outputs are allowed 2 units of rounding difference. Also checked:
// fetch-to-write latencies of 6 cycles (ALU) and 11 cycles (MAC), that the
// bypass was used, that exactly one collision was flagged, and the
// ZERO/NEGATIVE flags of the last ALU result.
module tb_risc_core;
  import risc_pkg::*;
  import tb_prog_pkg::*;

  localparam word_t BASE = 32'h000009D0;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  word_t imem_addr, imem_rdata, dmem_addr, dmem_wdata, dmem_rdata, pc;
  logic  dmem_we, flag_zero, flag_negative, wb_conflict, branch_taken;
  logic  [2:0] bypass_hit;

  risc_core #(.RESET_PC(BASE)) dut (.*);

  word_t dmem [int];
  int idx;
  assign idx = int'((imem_addr - BASE) >> 2);
  assign imem_rdata = (idx >= 0 && idx < prog.size()) ? prog[idx] : '0;
  assign dmem_rdata = dmem.exists(int'(dmem_addr[31:2])) ? dmem[int'(dmem_addr[31:2])] : '0;
  always @(posedge clk) if (dmem_we) dmem[int'(dmem_addr[31:2])] = dmem_wdata;

  int checks = 0, failures = 0, cycle = 0;
  int n_bypass = 0, n_conflict = 0, n_branch = 0;
  int mac_slot, alu_slot, mac_fetch = -1, alu_fetch = -1, mac_lat = -1, alu_lat = -1;
  bit approx [32];

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (|bypass_hit) n_bypass++;
      if (wb_conflict) n_conflict++;
      if (branch_taken) n_branch++;
      if (mac_fetch < 0 && idx == mac_slot) mac_fetch = cycle;
      if (alu_fetch < 0 && idx == alu_slot) alu_fetch = cycle;
      if (mac_fetch >= 0 && mac_lat < 0 && dut.rf_we && dut.rf_waddr == 5'd24) mac_lat = cycle - mac_fetch + 1;
      if (alu_fetch >= 0 && alu_lat < 0 && dut.rf_we && dut.rf_waddr == 5'd25) alu_lat = cycle - alu_fetch + 1;
    end
  end

  task automatic chk(string what, int got, int exp, int tol = 0);
    int d; d = got - exp; if (d < 0) d = -d;
    checks++;
    if (d > tol) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  word_t halt_pc;
  int loop_top, br_slot, jal_slot, sub_slot, end_slot, coll;

  initial begin
    prog_reset();
    // --- trace of the original core (values printed in its waveform)
    li(1, 32'h00010000);
    lhi(2, 16'h0001);
    alu_r(ALU_ADD, 3, 1, 2);
    alu_r(ALU_SUB, 4, 2, 3);
    alu_r(ALU_ADDU, 6, 3, 2);
    alu_r(ALU_SUBU, 1, 6, 2);
    alu_r(ALU_AND, 7, 3, 4);
    alu_r(ALU_OR, 8, 1, 2);
    alu_r(ALU_SRA, 9, 4, 2);
    // --- other integer operations
    li(10, 32'h8000_00f0);
    alu_i(OP_ADDI, 11, 10, 16'hfff0);
    alu_i(OP_ANDI, 12, 10, 16'h00ff);
    alu_i(OP_XORI, 13, 10, 16'hffff);
    alu_i(OP_SLLI, 14, 2, 16'd3);
    alu_r(ALU_SRL, 15, 10, 14);
    alu_r(ALU_SLL, 16, 10, 14);
    alu_r(ALU_XOR, 17, 10, 4);
    alu_r(ALU_SLT, 18, 10, 2);
    alu_r(ALU_SEQ, 19, 3, 3);
    alu_r(ALU_SNE, 20, 3, 3);
    // --- memory
    li(21, 32'h00000100);
    sw(4, 21, 16'd0);
    sw(8, 21, 16'd4);
    sw(10, 21, 16'hfffc);
    lw(22, 21, 16'd4);
    lw(23, 21, 16'hfffc);
    // --- multimedia: MAC family (fetch-to-write latency measured on r24)
    li(5, 32'h4000_c000);          // 0.5, -0.5 in Q15 ...
    li(26, 32'h1234_8001);
    mac_slot = slot();
    media(MD_MACKL, 24, 5, 2);  // K2
    media(MD_MACL, 27, 5, 26);
    media(MD_MACK, 24, 26, 9);  // K9 (negative cosine)
    media(MD_MAC, 27, 26, 5);
    // --- HADD family
    media(MD_HADD, 28, 5, 26);
    media(MD_HADDAC, 28, 26, 26);
    media(MD_HADDF, 29, 5, 26);
    media(MD_HADDFAC, 29, 26, 10);
    alu_slot = slot();
    alu_r(ALU_ADD, 25, 1, 1);
    // --- IDCT on r16..r19 (filled with small packed samples)
    li(16, 32'h0040_0010);
    li(17, 32'hfff0_0008);
    li(18, 32'h0004_fffc);
    li(19, 32'h0002_0001);
    idct(16);
    approx[16] = 1; approx[17] = 1; approx[18] = 1; approx[19] = 1;
    // --- counted loop: r11 += r2 three times, delay slot counts r13 up
    alu_i(OP_ADDI, 30, 0, 16'd3);
    alu_i(OP_ADDI, 13, 0, 16'd0);
    nop(4);
    loop_top = slot();
    alu_r(ALU_ADD, 11, 11, 2);
    alu_i(OP_ADDI, 30, 30, 16'hffff);
    nop(3);
    br_slot = slot();
    sched(encode_i(OP_BNEZ, 30, 0, 16'(4 * (loop_top - br_slot - 1))), '{}, '{30}, '{}, 0);
    emit_raw(encode_i(OP_ADDI, 13, 13, 16'd1));   // delay slot
    nop(4);
    // --- JAL / JR
    jal_slot = slot();
    emit_raw(encode_j(OP_JAL, 28'(4 * 3)));       // to jal_slot + 4
    emit_raw(encode_i(OP_ADDI, 12, 12, 16'd1));   // delay slot
    emit_raw(encode_j(OP_J, 28'(4 * 7)));         // over the subroutine
    nop(1);
    sub_slot = slot();
    emit_raw(encode_i(OP_ADDI, 14, 0, 16'd77));
    nop(3);
    emit_raw(encode_i(OP_JR, 31, 0, 16'd0));
    nop(1);
    end_slot = slot();
    nop(4);
    // --- deliberate collision: MAC (8) and ADDI (3) five slots later
    coll = slot();
    emit_raw(encode_r(OP_MEDIA, 5'd5, 5'd26, 5'd20, 13'(MD_MACL)));
    nop(4);
    dropped[slot()] = 1;
    emit_raw(encode_i(OP_ADDI, 15, 0, 16'd5));
    nop(12);
    alu_r(ALU_SUB, 3, 0, 1);       // last ALU result is negative
    halt_pc = halt(BASE);
    if (end_slot != jal_slot + 10 || sub_slot != jal_slot + 4) $fatal(1, "layout");

    iss_run(BASE, halt_pc, 10000);
    chk("trace SUB r4", R[4], 32'hffff0000);
    chk("trace OR r8", R[8], 32'h00030000);
    chk("loop count", R[13], 3);
    chk("loop sum", R[11], R[10] - 32'd16 + 3 * 32'h10000);

    repeat (3) @(posedge clk);
    rst_n = 1;
    while (pc != halt_pc) @(posedge clk);
    repeat (30) @(posedge clk);

    for (int r = 0; r < 32; r++) begin
      word_t g; g = dut.u_regfile.regs[r];
      if (approx[r]) begin
        chk($sformatf("r%0d.h", r), sx16(g[31:16]), sx16(R[r][31:16]), 2);
        chk($sformatf("r%0d.l", r), sx16(g[15:0]), sx16(R[r][15:0]), 2);
      end else chk($sformatf("r%0d", r), int'(g), int'(R[r]));
    end
    foreach (M[a]) chk($sformatf("mem[%0d]", a), int'(dmem.exists(a) ? dmem[a] : 0), int'(M[a]));
    chk("ALU latency", alu_lat, 6);
    chk("MAC latency", mac_lat, 11);
    chk("collisions", n_conflict, 1);
    checks++; if (n_bypass == 0) begin failures++; $display("bypass never used"); end
    checks++; if (n_branch < 6) begin failures++; $display("branches taken %0d", n_branch); end
    chk("NEGATIVE", int'(flag_negative), 1);
    chk("ZERO", int'(flag_zero), 0);
    $display("program %0d words, %0d instructions executed, %0d nops inserted, bypass %0d",
             prog.size(), executed, nops_inserted, n_bypass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
