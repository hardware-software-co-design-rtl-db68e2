// tb_prog_pkg: program generation and reference model shared by the
// processor-level testbenches.
//
// Program builder: emit_* functions append instructions to `prog`. Since
// the core has no interlocks, the builder schedules like the compiler the
// core expects: before each instruction it inserts NOPs until every source
// register is ready (a result of latency L issued at slot i is usable by
// the operands of slot i+L through the bypass; branches, JR and the quad
// read of IDCT read the register bank in decode and need slot i+L+1; a
// register written by IDCT is usable from slot i+7) and until the
// instruction's write-back slot is free. `emit_raw` skips all of this, for
// tests that place instructions deliberately.
//
// Reference model: `iss_run` executes the program one instruction at a
// time with plain sequential semantics (including the branch delay slot)
// until the PC reaches `halt_pc`. Instructions marked in `dropped` are
// executed without writing their result (a deliberate write-back
// collision that the core resolves by dropping the lower priority write).
package tb_prog_pkg;
  import risc_pkg::*;

  localparam int unsigned LAT_ALU = 3, LAT_HADD = 3, LAT_HADDAC = 5, LAT_MAC = 8, LAT_IDCT = 6;

  word_t prog [$];
  bit    dropped [int];
  int    ready [32];      // first slot whose EX-stage operands may read the register
  int    ready_id [32];   // first slot whose decode may read the register
  bit    wb_busy [int];
  int    nops_inserted = 0;

  function automatic void prog_reset();
    prog.delete(); dropped.delete(); wb_busy.delete();
    for (int i = 0; i < 32; i++) begin ready[i] = 0; ready_id[i] = 0; end
    nops_inserted = 0;
  endfunction

  function automatic int slot(); return prog.size(); endfunction

  function automatic void emit_raw(word_t w); prog.push_back(w); endfunction

  function automatic void nop(int n = 1);
    repeat (n) prog.push_back('0);
  endfunction

  // srcs_ex: registers read in EX; srcs_id: read in decode; lat 0 = no write
  function automatic void sched(word_t w, int srcs_ex [$], int srcs_id [$],
                                int dsts [$], int lat);
    int s;
    forever begin
      bit ok; s = slot(); ok = 1;
      foreach (srcs_ex[i]) if (srcs_ex[i] != 0 && ready[srcs_ex[i]] > s) ok = 0;
      foreach (srcs_id[i]) if (srcs_id[i] != 0 && ready_id[srcs_id[i]] > s) ok = 0;
      if (lat > 0 && wb_busy.exists(s + lat)) ok = 0;
      if (ok) break;
      nop(); nops_inserted++;
    end
    if (lat > 0) wb_busy[s + lat] = 1;
    foreach (dsts[i]) begin
      ready[dsts[i]]    = (lat == LAT_IDCT) ? s + lat + 1 : s + lat;
      ready_id[dsts[i]] = s + lat + 1;
    end
    prog.push_back(w);
  endfunction

  function automatic void alu_r(alu_op_e f, int rd, int a, int b);
    sched(encode_r(OP_RTYPE, 5'(a), 5'(b), 5'(rd), 13'(f)), '{a, b}, '{}, '{rd}, LAT_ALU);
  endfunction
  function automatic void alu_i(opcode_e op, int rt, int rs, logic [15:0] imm);
    sched(encode_i(op, 5'(rt), 5'(rs), imm), '{rs}, '{}, '{rt}, LAT_ALU);
  endfunction
  function automatic void lhi(int rt, logic [15:0] imm);
    sched(encode_i(OP_LHI, 5'(rt), 5'd0, imm), '{}, '{}, '{rt}, LAT_ALU);
  endfunction
  function automatic void li(int rt, word_t v);  // two instructions
    lhi(rt, v[31:16]);
    alu_i(OP_ORI, rt, rt, v[15:0]);
  endfunction
  function automatic void lw(int rt, int rs, logic [15:0] off);
    sched(encode_i(OP_LW, 5'(rt), 5'(rs), off), '{rs}, '{}, '{rt}, LAT_ALU);
  endfunction
  function automatic void sw(int rt, int rs, logic [15:0] off);
    sched(encode_i(OP_SW, 5'(rt), 5'(rs), off), '{rs, rt}, '{}, '{}, 0);
  endfunction
  function automatic void media(media_op_e f, int ri, int rj, int rk);
    int lat;
    int ex [$];
    case (f)
      MD_MAC, MD_MACL, MD_MACK, MD_MACKL: lat = LAT_MAC;
      MD_HADD: lat = LAT_HADD;
      default: lat = LAT_HADDAC;
    endcase
    ex = '{rj};
    if (!(f inside {MD_MACK, MD_MACKL})) ex.push_back(rk);
    if (f inside {MD_MAC, MD_MACK, MD_HADDAC, MD_HADDFAC}) ex.push_back(ri);
    sched(encode_r(OP_MEDIA, 5'(rj), 5'(rk), 5'(ri), 13'(f)), ex, '{}, '{ri}, lat);
  endfunction
  function automatic void idct(int ri);
    int q [$];
    for (int i = 0; i < 4; i++) q.push_back((ri + i) % 32);
    sched(encode_r(OP_MEDIA, 5'd0, 5'd0, 5'(ri), 13'(MD_IDCT)), '{}, q, q, LAT_IDCT);
  endfunction
  // halt: a jump to itself; returns its address
  function automatic word_t halt(word_t base);
    word_t a;
    nop(12);
    a = base + word_t'(4 * slot());
    emit_raw(encode_j(OP_J, -28'sd4));
    nop(2);
    return a;
  endfunction

  // ------------------------------------------------------------ model
  word_t R [32];
  word_t M [int];   // data memory, word index
  int    executed;

  function automatic int sx16(logic [15:0] v); return int'($signed(v)); endfunction
  function automatic int q15(int a, int b);
    longint p; p = longint'(a) * longint'(b);
    return (p >= 0) ? int'(p / 32768) : -int'((-p + 32767) / 32768);
  endfunction
  function automatic word_t kconst(int k);
    real c; int e;
    c = $cos(k * 3.14159265358979 / 16.0) * 32768.0;
    e = (c >= 0.0) ? int'($floor(c + 0.5)) : -int'($floor(-c + 0.5));
    if (e > 32767) e = 32767;
    return {16'(e), 16'(e)};
  endfunction
  function automatic word_t mread(word_t a);
    return M.exists(int'(a[31:2])) ? M[int'(a[31:2])] : '0;
  endfunction

  function automatic void iss_run(word_t base, word_t halt_pc, int max_steps);
    word_t pc, npc;
    pc = base; npc = base + 4;
    for (int i = 0; i < 32; i++) R[i] = '0;
    executed = 0;
    while (pc != halt_pc && executed < max_steps) begin
      word_t ir, nn, res;
      int idx;
      reg_addr_t fa, fb, fc, wr;
      logic wen;
      word_t imm_s, imm_z, a, b, c;
      idx = int'((pc - base) >> 2);
      ir = (idx >= 0 && idx < prog.size()) ? prog[idx] : '0;
      fa = ir[27:23]; fb = ir[22:18]; fc = ir[17:13];
      imm_s = word_t'(sx16(ir[15:0])); imm_z = {16'd0, ir[15:0]};
      a = R[fa]; b = R[fb]; c = R[fc];
      nn = npc + 4; wen = 0; wr = 0; res = '0;
      case (ir[31:28])
        4'h0: begin
          wr = fc; wen = 1;
          case (ir[12:0])
            1, 3: res = a + b;
            2, 4: res = a - b;
            5: res = a & b;
            6: res = a | b;
            7: res = word_t'($signed(a) >>> b[4:0]);
            8: res = a >> b[4:0];
            9: res = a << b[4:0];
            10: res = a ^ b;
            11: res = ($signed(a) < $signed(b)) ? 1 : 0;
            12: res = (a == b) ? 1 : 0;
            13: res = (a != b) ? 1 : 0;
            default: wen = 0;
          endcase
        end
        4'h1: begin
          int h, l, f;
          word_t k;
          wr = fc; wen = 1;
          k = (ir[12:0] inside {3, 4}) ? kconst(int'(fb[3:0])) : b;
          case (ir[12:0])
            1, 2, 3, 4: begin
              h = q15(sx16(a[31:16]), sx16(k[31:16]));
              l = q15(sx16(a[15:0]), sx16(k[15:0]));
              if (ir[12:0] inside {1, 3}) begin h += sx16(c[31:16]); l += sx16(c[15:0]); end
              res = {16'(h), 16'(l)};
            end
            5, 6: begin
              h = sx16(a[31:16]) + sx16(b[31:16]);
              l = sx16(a[15:0]) + sx16(b[15:0]);
              if (ir[12:0] == 6) begin h += sx16(c[31:16]); l += sx16(c[15:0]); end
              res = {16'(h), 16'(l)};
            end
            7, 8: begin
              f = sx16(a[31:16]) + sx16(b[31:16]) + sx16(a[15:0]) + sx16(b[15:0]);
              res = (ir[12:0] == 8) ? c + word_t'(f) : word_t'(f);
            end
            9: begin
              int x [8];
              wen = 0;
              for (int i = 0; i < 4; i++) begin
                x[2*i] = sx16(R[5'(fc + 5'(i))][31:16]);
                x[2*i+1] = sx16(R[5'(fc + 5'(i))][15:0]);
              end
              if (!dropped.exists(idx))
                for (int i = 0; i < 4; i++)
                  if (5'(fc + 5'(i)) != 0)
                    R[5'(fc + 5'(i))] = {16'(idct_ref(x, 2*i)), 16'(idct_ref(x, 2*i+1))};
            end
            default: wen = 0;
          endcase
        end
        4'h2: begin wr = fa; wen = 1; res = b + imm_s; end
        4'h3: begin wr = fa; wen = 1; res = b & imm_z; end
        4'h4: begin wr = fa; wen = 1; res = {ir[15:0], 16'd0}; end
        4'h5: begin wr = fa; wen = 1; res = b | imm_z; end
        4'h6: begin wr = fa; wen = 1; res = b ^ imm_z; end
        4'h7: begin wr = fa; wen = 1; res = b << imm_z[4:0]; end
        4'h8: begin wr = fa; wen = 1; res = mread(b + imm_s); end
        4'h9: M[int'(((b + imm_s) >> 2))] = a;
        4'hA: if (a == 0) nn = npc + imm_s;
        4'hB: if (a != 0) nn = npc + imm_s;
        4'hC: nn = npc + {{4{ir[27]}}, ir[27:0]};
        4'hD: begin nn = npc + {{4{ir[27]}}, ir[27:0]}; wr = 31; wen = 1; res = pc + 8; end
        4'hE: nn = a;
        4'hF: begin nn = a; wr = 31; wen = 1; res = pc + 8; end
        default: ;
      endcase
      if (wen && wr != 0 && !dropped.exists(idx)) R[wr] = res;
      pc = npc; npc = nn;
      executed++;
    end
  endfunction

  // one output of the 1-D transform, from its definition, rounded and saturated
  function automatic int idct_ref(int x [8], int n);
    real s; int r;
    s = x[0];
    for (int k = 1; k < 8; k++)
      s += x[k] * $cos((2*n+1) * k * 3.14159265358979 / 16.0) / $cos(k * 3.14159265358979 / 16.0);
    r = int'($floor(s + 0.5));
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

endpackage
