// tb_stb_risc_top: end-to-end test of the processor with its memories, at
// the default parameters, running the two ways of doing the iDCT.
//
// Program and data are loaded through the system-side port while the core
// is in reset; results are read back through it after the core halts.
// 1. Software path: one 8-point inverse DCT of two vectors at once (one
//    per 16-bit lane), written directly from the cosine definition with
//    MACKL/MACK on the constant bank, even and odd partial sums kept
//    apart and joined with HADD. Checked against real arithmetic with
//    a tolerance of 9 for the eight Q15 truncations.
// 2. IDCT-instruction path: a full 8 x 8 two-dimensional inverse DCT: eight
//    row transforms (IDCT on four registers at a time), a transpose in
//    software with shifts, masks and OR, eight column transforms. Checked
//    against the two-dimensional transform in real arithmetic (tolerance
//    4 for intermediate rounding).
// The run must make each mechanism happen at least once: bypass, taken
// branch and delay slot, load, store, MAC, HADD, IDCT, and one deliberate
// write-back collision; their counts are printed.
module tb_stb_risc_top;
  import risc_pkg::*;
  import tb_prog_pkg::*;

  localparam int SW_IN = 32'h200, SW_OUT = 32'h240, BLK = 32'h000, TRN = 32'h080;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  host_sel, host_we;
  word_t host_addr, host_wdata, host_rdata, pc;
  logic  flag_zero, flag_negative, wb_conflict, branch_taken;
  logic  [2:0] bypass_hit;

  stb_risc_top dut (.*);

  int checks = 0, failures = 0, cycles = 0;
  int n_bypass = 0, n_conflict = 0, n_branch = 0, n_mac = 0, n_hadd = 0, n_idct = 0, n_ld = 0, n_st = 0;

  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (|bypass_hit) n_bypass++;
    if (wb_conflict) n_conflict++;
    if (branch_taken) n_branch++;
    if (dut.u_core.mac_o.valid) n_mac++;
    if (dut.u_core.hadd_s.valid || dut.u_core.hadd_l.valid) n_hadd++;
    if (dut.u_core.idct_v) n_idct++;
    if (dut.u_core.ld_wb.valid) n_ld++;
    if (dut.dmem_we) n_st++;
  end

  task automatic host_write(bit sel, int addr, word_t d);
    @(negedge clk); host_sel = sel; host_addr = word_t'(addr); host_wdata = d; host_we = 1;
    @(negedge clk); host_we = 0;
  endtask
  task automatic host_read(int addr, output word_t d);
    @(negedge clk); host_sel = 1; host_addr = word_t'(addr); host_we = 0;
    #1 d = host_rdata;
  endtask
  task automatic chk(string what, int got, int exp, int tol, inout int maxd);
    int d; d = got - exp; if (d < 0) d = -d;
    if (d > maxd) maxd = d;
    checks++;
    if (d > tol) begin failures++; $display("FAIL %s got %0d exp %0d", what, got, exp); end
  endtask
  task automatic count(string what, int n);
    checks++;
    $display("  %-10s %0d", what, n);
    if (n == 0) begin failures++; $display("FAIL %s never happened", what); end
  endtask

  // cosine index m of cos(m*pi/16) folded into the constant bank 0..15
  function automatic int kidx(int n, int k);
    int m; m = ((2*n+1)*k) % 32;
    return (m <= 16) ? m : 32 - m;
  endfunction

  int    xa [8], xb [8];
  int    blk [8][8];
  real   y [8][8];
  word_t halt_pc, d;

  initial begin
    int md1, md2;
    host_sel = 0; host_we = 0; host_addr = 0; host_wdata = 0;
    md1 = 0; md2 = 0;

    // ---------------------------------------------------------- data
    for (int k = 0; k < 8; k++) begin
      xa[k] = int'($urandom % 1601) - 800;
      xb[k] = int'($urandom % 1601) - 800;
    end
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++)
        blk[r][c] = (r == 0 && c == 0) ? int'($urandom % 301) - 150 : int'($urandom % 41) - 20;

    // ---------------------------------------------------------- program
    prog_reset();
    alu_i(OP_ADDI, 31, 0, 16'd16);    // shift distance used by the transpose
    // software path: inputs r1..r8, even sums r9..r16, odd sums r17..r24
    for (int k = 0; k < 8; k++) lw((1 + k), 0, 16'(SW_IN + 4*k));
    for (int k = 0; k < 8; k++)
      for (int n = 0; n < 8; n++) begin
        int acc; acc = (k % 2 == 0) ? 9 + n : 17 + n;
        media((k < 2) ? MD_MACKL : MD_MACK, acc, (1 + k), (kidx(n, k)));
      end
    for (int n = 0; n < 8; n++) media(MD_HADD, (9 + n), (9 + n), (17 + n));
    for (int n = 0; n < 8; n++) sw((9 + n), 0, 16'(SW_OUT + 4*n));

    // IDCT path, rows: two groups of four rows in r4..r19
    for (int g = 0; g < 2; g++) begin
      for (int w = 0; w < 16; w++) lw((4 + w), 0, 16'(BLK + 64*g + 4*w));
      for (int r = 0; r < 4; r++) idct((4 + 4*r));
      for (int w = 0; w < 16; w++) sw((4 + w), 0, 16'(BLK + 64*g + 4*w));
    end
    // transpose: T[c][i] = {a[2i][c], a[2i+1][c]}
    lhi(30, 16'hffff);
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        int b; b = 4 + 6 * ((4*i + j) % 4);
        lw(b, 0, 16'(BLK + 32*i + 4*j));              // W[2i][j]
        lw((b + 1), 0, 16'(BLK + 32*i + 16 + 4*j)); // W[2i+1][j]
        alu_r(ALU_AND, (b + 2), b, 30);
        alu_r(ALU_SRL, (b + 3), (b + 1), 31);     // r31 holds 16
        alu_r(ALU_OR, (b + 2), (b + 2), (b + 3));
        sw((b + 2), 0, 16'(TRN + 32*j + 4*i));      // column 2j
        alu_r(ALU_SLL, (b + 4), b, 31);
        alu_i(OP_ANDI, (b + 5), (b + 1), 16'hffff);
        alu_r(ALU_OR, (b + 4), (b + 4), (b + 5));
        sw((b + 4), 0, 16'(TRN + 32*j + 16 + 4*i)); // column 2j+1
      end
    // columns
    for (int g = 0; g < 2; g++) begin
      for (int w = 0; w < 16; w++) lw((4 + w), 0, 16'(TRN + 64*g + 4*w));
      for (int r = 0; r < 4; r++) idct((4 + 4*r));
      for (int w = 0; w < 16; w++) sw((4 + w), 0, 16'(TRN + 64*g + 4*w));
    end
    // a short counted loop and one deliberate write-back collision
    alu_i(OP_ADDI, 29, 0, 16'd2);
    nop(4);
    begin
      int top, br;
      top = slot();
      alu_i(OP_ADDI, 29, 29, 16'hffff);
      nop(3);
      br = slot();
      sched(encode_i(OP_BNEZ, 29, 0, 16'(4 * (top - br - 1))), '{}, '{29}, '{}, 0);
      emit_raw('0);
    end
    nop(12);
    emit_raw(encode_r(OP_MEDIA, 5'd1, 5'd2, 5'd28, 13'(MD_MACL)));
    nop(4);
    emit_raw(encode_i(OP_ADDI, 27, 0, 16'd5));
    halt_pc = halt(32'h0);

    // ---------------------------------------------------------- load
    for (int i = 0; i < prog.size(); i++) host_write(0, 4*i, prog[i]);
    for (int k = 0; k < 8; k++) host_write(1, SW_IN + 4*k, {16'(xa[k]), 16'(xb[k])});
    for (int r = 0; r < 8; r++)
      for (int j = 0; j < 4; j++) host_write(1, BLK + 16*r + 4*j, {16'(blk[r][2*j]), 16'(blk[r][2*j+1])});

    // ---------------------------------------------------------- run
    @(negedge clk); rst_n = 1;
    while (pc != halt_pc) @(posedge clk);
    repeat (30) @(posedge clk);
    $display("program %0d words, ran %0d cycles, %0d nops inserted by the scheduler",
             prog.size(), cycles, nops_inserted);

    // ---------------------------------------------------------- check 1
    for (int n = 0; n < 8; n++) begin
      real sa, sb;
      sa = 0.0; sb = 0.0;
      for (int k = 0; k < 8; k++) begin
        sa += xa[k] * $cos((2*n+1) * k * 3.14159265358979 / 16.0);
        sb += xb[k] * $cos((2*n+1) * k * 3.14159265358979 / 16.0);
      end
      host_read(SW_OUT + 4*n, d);
      chk($sformatf("sw x%0d.h", n), sx16(d[31:16]), int'($floor(sa + 0.5)), 9, md1);
      chk($sformatf("sw x%0d.l", n), sx16(d[15:0]),  int'($floor(sb + 0.5)), 9, md1);
    end
    // ---------------------------------------------------------- check 2
    for (int r = 0; r < 8; r++)          // row pass
      for (int n = 0; n < 8; n++) begin
        y[r][n] = blk[r][0];
        for (int k = 1; k < 8; k++)
          y[r][n] += blk[r][k] * $cos((2*n+1) * k * 3.14159265358979 / 16.0) / $cos(k * 3.14159265358979 / 16.0);
      end
    for (int c = 0; c < 8; c++)          // column pass, stored as column c
      for (int m = 0; m < 8; m++) begin
        real s; int got;
        s = y[0][c];
        for (int k = 1; k < 8; k++)
          s += y[k][c] * $cos((2*m+1) * k * 3.14159265358979 / 16.0) / $cos(k * 3.14159265358979 / 16.0);
        host_read(TRN + 16*c + 4*(m/2), d);
        got = (m % 2 == 0) ? sx16(d[31:16]) : sx16(d[15:0]);
        chk($sformatf("2d [%0d][%0d]", m, c), got, int'($floor(s + 0.5)), 4, md2);
      end
    $display("largest deviation: software path %0d, IDCT path %0d", md1, md2);
    $display("mechanisms:");
    count("bypass", n_bypass);
    count("branch", n_branch);
    count("load", n_ld);
    count("store", n_st);
    count("mac", n_mac);
    count("hadd", n_hadd);
    count("idct", n_idct);
    count("collision", n_conflict);
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
