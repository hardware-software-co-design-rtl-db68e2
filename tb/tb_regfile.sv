// tb_regfile: self-checking test of the register bank. Random single and
// quad writes against a reference array; every cycle all three read ports
// and the quad port are compared with the reference, including
// write-through of the word being written and R0 reading as zero.
module tb_regfile;
  import risc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  reg_addr_t ra_addr, rb_addr, rc_addr, q_addr, w_addr, qw_addr;
  word_t ra_data, rb_data, rc_data, w_data;
  word_t q_data [4], qw_data [4];
  logic we, qwe;

  regfile dut (.*);

  word_t model [32];
  int checks = 0, failures = 0;

  function automatic word_t peek(reg_addr_t a);
    word_t v; v = model[a];
    if (we && w_addr == a) v = w_data;
    for (int i = 0; i < 4; i++) if (qwe && reg_addr_t'(qw_addr + reg_addr_t'(i)) == a) v = qw_data[i];
    return (a == 0) ? '0 : v;
  endfunction

  task automatic chk(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    for (int i = 0; i < 32; i++) model[i] = '0;
    we = 0; qwe = 0; w_addr = 0; w_data = 0; qw_addr = 0;
    ra_addr = 0; rb_addr = 0; rc_addr = 0; q_addr = 0;
    for (int i = 0; i < 4; i++) qw_data[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we = ($urandom % 2) == 1;  w_addr = 5'($urandom); w_data = $urandom;
      qwe = ($urandom % 6) == 0; qw_addr = 5'($urandom);
      for (int i = 0; i < 4; i++) qw_data[i] = $urandom;
      if (qwe && we) we = 0;
      ra_addr = (n % 3 == 0) ? w_addr : 5'($urandom);
      rb_addr = 5'($urandom); rc_addr = (n % 5 == 0) ? 5'd0 : 5'($urandom);
      q_addr = (n % 4 == 0) ? qw_addr : 5'($urandom);
      #1;
      chk("A", ra_data, peek(ra_addr));
      chk("B", rb_data, peek(rb_addr));
      chk("C", rc_data, peek(rc_addr));
      for (int i = 0; i < 4; i++) chk("Q", q_data[i], peek(reg_addr_t'(q_addr + reg_addr_t'(i))));
      @(posedge clk);
      if (we && w_addr != 0) model[w_addr] = w_data;
      if (qwe) for (int i = 0; i < 4; i++)
        if (reg_addr_t'(qw_addr + reg_addr_t'(i)) != 0) model[reg_addr_t'(qw_addr + reg_addr_t'(i))] = qw_data[i];
    end
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
