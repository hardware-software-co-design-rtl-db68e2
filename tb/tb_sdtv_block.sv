// tb_sdtv_block: the standard-definition workload, one complete 8 x 8
// inverse DCT in software with the MAC and HADD instructions, on the
// processor at its default parameters.
//
// Data layout: each word packs two rows (or two columns) of one element,
// so every instruction works on two transforms at once.
//   IN  + 32p + 4k : {X[2p][k],   X[2p+1][k]}      input coefficients
//   ROW + 32p + 4n : {y[2p][n],   y[2p+1][n]}      after the row pass
//   COL + 32q + 4k : {y[k][2q],   y[k][2q+1]}      transposed
//   OUT + 32q + 4n : {z[n][2q],   z[n][2q+1]}      result
// The 1-D pass is a loop run four times per direction. Its body loads
// eight words, forms x(n) = sum_k X(k) cos((2n+1)k pi/16) with 64
// MACKL/MACK on the constant bank (even k and odd k into separate
// accumulators), joins them with 8 HADD and stores eight words. Between
// the two loops a straight-line transpose swaps the halves of 2 x 2 blocks
// with AND, shifts and OR.
// Checks: every result word against a sequential model of the instruction
// set, exactly (this covers the scheduling of the loop); every result
// against the 2-D transform in real arithmetic, within 56 (Q15 truncation
// in both passes, amplified by the column sums); 512 MAC and 64 HADD
// results; 6 taken branches; no write-back collision. The cycle count of
// the block is printed with the clock it would need for the 1.736 us
// per-block budget of 640 x 480 video at 30 frames/s.
module tb_sdtv_block;
  import risc_pkg::*;
  import tb_prog_pkg::*;

  localparam int IN = 32'h000, ROW = 32'h080, COL = 32'h100, OUT = 32'h180;
  localparam int TOL = 56;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  host_sel, host_we;
  word_t host_addr, host_wdata, host_rdata, pc;
  logic  flag_zero, flag_negative, wb_conflict, branch_taken;
  logic  [2:0] bypass_hit;

  stb_risc_top dut (.*);

  int checks = 0, failures = 0, cycles = 0;
  int n_mac = 0, n_hadd = 0, n_branch = 0, n_conflict = 0;

  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (dut.u_core.mac_o.valid) n_mac++;
    if (dut.u_core.hadd_s.valid) n_hadd++;
    if (branch_taken) n_branch++;
    if (wb_conflict) n_conflict++;
  end

  task automatic host_write(bit sel, int addr, word_t d);
    @(negedge clk); host_sel = sel; host_addr = word_t'(addr); host_wdata = d; host_we = 1;
    @(negedge clk); host_we = 0;
  endtask
  task automatic host_read(int addr, output word_t d);
    @(negedge clk); host_sel = 1; host_addr = word_t'(addr); host_we = 0;
    #1 d = host_rdata;
  endtask
  task automatic chk(string what, int got, int exp, int tol = 0);
    int d; d = got - exp; if (d < 0) d = -d;
    checks++;
    if (d > tol) begin failures++; $display("FAIL %s got %0d exp %0d", what, got, exp); end
  endtask

  function automatic int kidx(int n, int k);
    int m; m = ((2*n+1)*k) % 32;
    return (m <= 16) ? m : 32 - m;
  endfunction

  // one loop of four two-lane 1-D passes; r25 walks the input, outputs
  // go 0x80 bytes further on
  function automatic void pass_loop(int base);
    int top, br;
    alu_i(OP_ADDI, 25, 0, 16'(base));
    alu_i(OP_ADDI, 26, 0, 16'd4);
    nop(4);
    top = slot();
    for (int k = 0; k < 8; k++) lw(1 + k, 25, 16'(4*k));
    for (int k = 0; k < 8; k++)
      for (int n = 0; n < 8; n++)
        media((k < 2) ? MD_MACKL : MD_MACK, (k % 2 == 0) ? 9 + n : 17 + n, 1 + k, kidx(n, k));
    alu_i(OP_ADDI, 26, 26, 16'hffff);
    for (int n = 0; n < 8; n++) media(MD_HADD, 9 + n, 9 + n, 17 + n);
    for (int n = 0; n < 8; n++) sw(9 + n, 25, 16'(32'h80 + 4*n));
    alu_i(OP_ADDI, 25, 25, 16'd32);
    nop(1);
    br = slot();
    sched(encode_i(OP_BNEZ, 26, 0, 16'(4 * (top - br - 1))), '{}, '{26}, '{}, 0);
    emit_raw('0);                       // delay slot
    nop(4);
  endfunction

  int    blk [8][8];
  word_t halt_pc, d;
  int    branches;

  initial begin
    int md;
    host_sel = 0; host_we = 0; host_addr = 0; host_wdata = 0;
    md = 0;
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++)
        blk[r][c] = (r == 0 && c == 0) ? int'($urandom % 301) - 150 : int'($urandom % 41) - 20;

    // ---------------------------------------------------------- program
    prog_reset();
    alu_i(OP_ADDI, 31, 0, 16'd16);
    lhi(30, 16'hffff);
    pass_loop(IN);
    // transpose 2 x 2 blocks: A = {y[2p][2q], y[2p+1][2q]}, B = {y[2p][2q+1], y[2p+1][2q+1]}
    for (int p = 0; p < 4; p++)
      for (int q = 0; q < 4; q++) begin
        int b; b = 1 + 6 * ((4*p + q) % 4);
        lw(b, 0, 16'(ROW + 32*p + 8*q));
        lw(b + 1, 0, 16'(ROW + 32*p + 8*q + 4));
        alu_r(ALU_AND, b + 2, b, 30);
        alu_r(ALU_SRL, b + 3, b + 1, 31);
        alu_r(ALU_OR, b + 2, b + 2, b + 3);
        sw(b + 2, 0, 16'(COL + 32*q + 4*(2*p)));
        alu_r(ALU_SLL, b + 4, b, 31);
        alu_i(OP_ANDI, b + 5, b + 1, 16'hffff);
        alu_r(ALU_OR, b + 4, b + 4, b + 5);
        sw(b + 4, 0, 16'(COL + 32*q + 4*(2*p+1)));
      end
    pass_loop(COL);
    halt_pc = halt(32'h0);

    // ---------------------------------------------------------- reference models
    M.delete();
    for (int p = 0; p < 4; p++)
      for (int k = 0; k < 8; k++)
        M[(IN + 32*p + 4*k) / 4] = {16'(blk[2*p][k]), 16'(blk[2*p+1][k])};
    iss_run(32'h0, halt_pc, 100000);

    // ---------------------------------------------------------- load and run
    for (int i = 0; i < prog.size(); i++) host_write(0, 4*i, prog[i]);
    for (int p = 0; p < 4; p++)
      for (int k = 0; k < 8; k++)
        host_write(1, IN + 32*p + 4*k, {16'(blk[2*p][k]), 16'(blk[2*p+1][k])});
    @(negedge clk); rst_n = 1;
    while (pc != halt_pc) @(posedge clk);
    branches = n_branch;     // the halt jump keeps branching afterwards
    $display("program %0d words, %0d instructions executed, block done in %0d cycles",
             prog.size(), executed, cycles);
    $display("for 1.736 us per block this needs a %0d MHz clock", (cycles * 1000 + 1735) / 1736);
    repeat (30) @(posedge clk);

    // ---------------------------------------------------------- check
    for (int q = 0; q < 4; q++)
      for (int n = 0; n < 8; n++) begin
        word_t m;
        host_read(OUT + 32*q + 4*n, d);
        m = M[(OUT + 32*q + 4*n) / 4];
        chk($sformatf("model word q%0d n%0d", q, n), int'(d), int'(m));
        for (int h = 0; h < 2; h++) begin
          real s; int c, got, dv;
          c = 2*q + h;
          s = 0.0;
          for (int k = 0; k < 8; k++)
            for (int l = 0; l < 8; l++)
              s += blk[k][l] * $cos((2*c+1) * l * 3.14159265358979 / 16.0)
                             * $cos((2*n+1) * k * 3.14159265358979 / 16.0);
          got = (h == 0) ? sx16(d[31:16]) : sx16(d[15:0]);
          dv = got - int'($floor(s + 0.5)); if (dv < 0) dv = -dv;
          if (dv > md) md = dv;
          chk($sformatf("z[%0d][%0d]", n, c), got, int'($floor(s + 0.5)), TOL);
        end
      end
    $display("largest deviation from real arithmetic: %0d", md);
    chk("MAC results", n_mac, 512);
    chk("HADD results", n_hadd, 64);
    chk("taken branches", branches, 6);
    chk("collisions", n_conflict, 0);
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
