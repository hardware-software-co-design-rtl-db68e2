// tb_simd_adder: self-checking test of the half-word adder unit.
// Random HADD, HADDAC, HADDF and HADDFAC operations, one per cycle; the
// expected values are computed lane by lane with integer arithmetic, and
// HADD results must appear exactly SHORT_STAGES cycles after issue, the
// others exactly LONG_STAGES cycles after issue.
module tb_simd_adder;
  import risc_pkg::*;
  localparam int unsigned SHORT_STAGES = 3, LONG_STAGES = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid; media_op_e in_op; word_t in_j, in_k, in_acc; reg_addr_t in_rd;
  wb_t out_short, out_long;

  simd_adder #(.SHORT_STAGES(SHORT_STAGES), .LONG_STAGES(LONG_STAGES)) dut (.*);

  typedef struct { int t; reg_addr_t rd; word_t d; } exp_t;
  exp_t qs[$], ql[$];
  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic int sx(logic [15:0] v); return int'($signed(v)); endfunction

  function automatic word_t model(media_op_e op, word_t j, word_t k, word_t acc);
    int h, l;
    h = sx(j[31:16]) + sx(k[31:16]);
    l = sx(j[15:0]) + sx(k[15:0]);
    case (op)
      MD_HADD:    return {16'(h), 16'(l)};
      MD_HADDAC:  return {16'(h + sx(acc[31:16])), 16'(l + sx(acc[15:0]))};
      MD_HADDF:   return word_t'(h + l);
      default:    return word_t'(int'(acc) + h + l);
    endcase
  endfunction

  task automatic take(ref exp_t q[$], input wb_t o, input int lat, input string nm);
    if (o.valid) begin
      checks++;
      if (q.size() == 0) begin failures++; $display("unexpected %s", nm); end
      else begin
        exp_t e; e = q.pop_front();
        if (cycle - e.t != lat || o.rd != e.rd || o.data != e.d) begin
          failures++; $display("FAIL %s lat %0d got %h exp %h", nm, cycle - e.t, o.data, e.d);
        end
      end
    end
  endtask

  always @(negedge clk) if (rst_n) begin
    take(qs, out_short, SHORT_STAGES, "short");
    take(ql, out_long, LONG_STAGES, "long");
  end

  initial begin
    in_valid = 0; in_op = MD_NONE; in_j = 0; in_k = 0; in_acc = 0; in_rd = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      in_op = media_op_e'(5 + $urandom % 4);
      if (n % 50 == 0) in_op = MD_MAC;   // not for this unit: must be ignored
      in_j = $urandom; in_k = $urandom; in_acc = $urandom; in_rd = 5'($urandom);
      if (n == 0) begin in_valid = 1; in_op = MD_HADD; in_j = 32'h7fff0001; in_k = 32'h0001ffff; end
      if (in_valid && in_op != MD_MAC) begin
        exp_t e; e.t = cycle; e.rd = in_rd; e.d = model(in_op, in_j, in_k, in_acc);
        if (n == 0 && e.d != 32'h80000000) begin failures++; $display("model self-check"); end
        if (in_op == MD_HADD) qs.push_back(e); else ql.push_back(e);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (LONG_STAGES + 2) @(negedge clk);
    checks++;
    if (qs.size() + ql.size() != 0) begin failures++; $display("results missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
