// tb_mac_unit: self-checking test of the dual multiply-accumulate unit.
// Random MAC, MACL, MACK and MACKL operations (the unit treats the K forms
// like the register forms, the constant being selected outside), with
// Q15 coefficients including -1.0 and the cosine constants; expected lane
// values are computed with integer arithmetic; each result must leave
// exactly STAGES (8) cycles after issue, giving the 11-cycle instruction
// latency together with fetch, decode and write-back.
module tb_mac_unit;
  import risc_pkg::*;
  localparam int unsigned STAGES = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid; media_op_e in_op; word_t in_j, in_k, in_acc; reg_addr_t in_rd;
  wb_t out;

  mac_unit #(.STAGES(STAGES)) dut (.*);

  typedef struct { int t; reg_addr_t rd; word_t d; } exp_t;
  exp_t q[$];
  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic int sx(logic [15:0] v); return int'($signed(v)); endfunction
  // floor(a*b / 2^15) for signed a, b
  function automatic int q15(int a, int b);
    longint p; p = longint'(a) * longint'(b);
    return (p >= 0) ? int'(p / 32768) : -int'((-p + 32767) / 32768);
  endfunction

  function automatic word_t model(media_op_e op, word_t j, word_t k, word_t acc);
    int h, l;
    h = q15(sx(j[31:16]), sx(k[31:16]));
    l = q15(sx(j[15:0]), sx(k[15:0]));
    if (op == MD_MAC || op == MD_MACK) begin h += sx(acc[31:16]); l += sx(acc[15:0]); end
    return {16'(h), 16'(l)};
  endfunction

  always @(negedge clk) if (rst_n && out.valid) begin
    checks++;
    if (q.size() == 0) begin failures++; $display("unexpected result"); end
    else begin
      exp_t e; e = q.pop_front();
      if (cycle - e.t != int'(STAGES) || out.rd != e.rd || out.data != e.d) begin
        failures++; $display("FAIL lat %0d got %h exp %h", cycle - e.t, out.data, e.d);
      end
    end
  end

  initial begin
    in_valid = 0; in_op = MD_NONE; in_j = 0; in_k = 0; in_acc = 0; in_rd = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      in_valid = ($urandom % 3) != 0;
      in_op = media_op_e'(1 + $urandom % 4);
      if (n % 40 == 0) in_op = MD_HADD;   // not for this unit: must be ignored
      in_j = $urandom; in_acc = $urandom; in_rd = 5'($urandom);
      case ($urandom % 3)
        0: in_k = {KCOS[$urandom % 16], KCOS[$urandom % 16]};
        1: in_k = 32'h80008000;
        default: in_k = $urandom;
      endcase
      if (n == 0) begin in_valid = 1; in_op = MD_MACKL; in_j = 32'h4000c000; in_k = 32'h40004000; end
      if (in_valid && in_op != MD_HADD) begin
        exp_t e; e.t = cycle; e.rd = in_rd; e.d = model(in_op, in_j, in_k, in_acc);
        if (n == 0 && e.d != 32'h2000e000) begin failures++; $display("model self-check %h", e.d); end
        q.push_back(e);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (STAGES + 2) @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("results missing"); end
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
