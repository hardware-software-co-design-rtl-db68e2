// tb_alu: self-checking test of the pipelined integer ALU.
// Issues one random operation per cycle (all thirteen operations plus
// corner operands), computes the expected result and flags independently,
// and checks each result comes out exactly STAGES cycles after issue.
module tb_alu;
  import risc_pkg::*;
  localparam int unsigned STAGES = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid; alu_op_e in_op; word_t in_a, in_b; reg_addr_t in_rd;
  logic out_valid, out_zero, out_negative, out_ovf; reg_addr_t out_rd; word_t out_result;

  alu #(.STAGES(STAGES)) dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  typedef struct { int t; reg_addr_t rd; word_t res; logic ovf; } exp_t;
  exp_t q[$];

  function automatic exp_t model(alu_op_e op, word_t a, word_t b);
    exp_t e; longint sa, sb, s;
    sa = longint'($signed(a)); sb = longint'($signed(b));
    e.ovf = 1'b0;
    case (op)
      ALU_ADD:  begin s = sa + sb; e.res = word_t'(s); e.ovf = (s > 64'sd2147483647) || (s < -64'sd2147483648); end
      ALU_SUB:  begin s = sa - sb; e.res = word_t'(s); e.ovf = (s > 64'sd2147483647) || (s < -64'sd2147483648); end
      ALU_ADDU: e.res = word_t'(longint'(a) + longint'(b));
      ALU_SUBU: e.res = word_t'(longint'(a) - longint'(b));
      ALU_AND:  e.res = a & b;
      ALU_OR:   e.res = a | b;
      ALU_XOR:  e.res = a ^ b;
      ALU_SRA:  e.res = word_t'(sa / (64'sd1 << b[4:0]) - ((sa < 0 && (sa % (64'sd1 << b[4:0])) != 0) ? 1 : 0));
      ALU_SRL:  e.res = word_t'(longint'(a) / (64'sd1 << b[4:0]));
      ALU_SLL:  e.res = word_t'(longint'(a) * (64'sd1 << b[4:0]));
      ALU_SLT:  e.res = (sa < sb) ? 32'd1 : 32'd0;
      ALU_SEQ:  e.res = (a == b) ? 32'd1 : 32'd0;
      ALU_SNE:  e.res = (a != b) ? 32'd1 : 32'd0;
      default:  e.res = '0;
    endcase
    return e;
  endfunction

  always @(posedge clk) cycle <= cycle + 1;

  // checker
  always @(negedge clk) if (rst_n) begin
    if (out_valid) begin
      checks++;
      if (q.size() == 0) begin failures++; $display("unexpected result"); end
      else begin
        exp_t e; e = q.pop_front();
        if (cycle - e.t != int'(STAGES) || out_rd != e.rd || out_result != e.res || out_ovf != e.ovf ||
            out_zero != (e.res == 0) || out_negative != e.res[31]) begin
          failures++;
          $display("FAIL t=%0d lat=%0d rd=%0d got %h exp %h ovf %b/%b", cycle, cycle - e.t, out_rd, out_result, e.res, out_ovf, e.ovf);
        end
      end
    end
  end

  initial begin
    in_valid = 0; in_op = ALU_NOP; in_a = 0; in_b = 0; in_rd = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // the traced sequence of the original core: r1=r2=0x10000
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      in_op    = alu_op_e'(1 + $urandom % 13);
      case ($urandom % 4)
        0: begin in_a = 32'h7fffffff; in_b = $urandom % 3; end
        1: begin in_a = 32'h80000000; in_b = 32'hffffffff - ($urandom % 2); end
        default: begin in_a = $urandom; in_b = $urandom; end
      endcase
      if (i == 0) begin in_valid = 1; in_op = ALU_SUB; in_a = 32'h10000; in_b = 32'h20000; end
      if (i == 1) begin in_valid = 1; in_op = ALU_AND; in_a = 32'h20000; in_b = 32'hffff0000; end
      in_rd = 5'($urandom);
      if (in_valid) begin
        exp_t e; e = model(in_op, in_a, in_b); e.t = cycle; e.rd = in_rd;
        if (i == 0 && e.res != 32'hffff0000) begin failures++; $display("model self-check"); end
        q.push_back(e);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (STAGES + 2) @(negedge clk);
    checks++; if (q.size() != 0) begin failures++; $display("%0d results missing", q.size()); end
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
