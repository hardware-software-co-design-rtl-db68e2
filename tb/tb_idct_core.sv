// tb_idct_core: self-checking test of the 1-D 8-point AAN inverse DCT.
// Random pre-scaled coefficient vectors (one per cycle, back to back) are
// compared with the transform written directly from its definition in
// real arithmetic,
//   x(n) = X(0) + sum_{k=1..7} X(k) cos((2n+1) k pi/16) / cos(k pi/16),
// allowing TOL units for the 8-bit shift-add constants and the 3 fraction
// bits. Also checks saturation on an overflowing vector and that every
// result leaves exactly 6 cycles after issue with its destination tag.
module tb_idct_core;
  import risc_pkg::*;
  localparam int TOL = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid, out_valid; reg_addr_t in_rd, out_rd;
  word_t in_data [4], out_data [4];

  idct_core dut (.*);

  typedef struct { int t; reg_addr_t rd; int y [8]; } exp_t;
  exp_t q[$];
  int checks = 0, failures = 0, cycle = 0, maxerr = 0;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic exp_t model(int x [8]);
    exp_t e;
    for (int n = 0; n < 8; n++) begin
      real s; int r;
      s = x[0];
      for (int k = 1; k < 8; k++)
        s += x[k] * $cos((2*n+1) * k * 3.14159265358979 / 16.0) / $cos(k * 3.14159265358979 / 16.0);
      r = int'($floor(s + 0.5));
      if (r > 32767) r = 32767;
      if (r < -32768) r = -32768;
      e.y[n] = r;
    end
    return e;
  endfunction

  always @(negedge clk) if (rst_n && out_valid) begin
    exp_t e; int d;
    checks++;
    if (q.size() == 0) begin failures++; $display("unexpected result"); end
    else begin
      e = q.pop_front();
      if (cycle - e.t != 6 || out_rd != e.rd) begin failures++; $display("FAIL latency %0d", cycle - e.t); end
      for (int n = 0; n < 8; n++) begin
        int got;
        got = (n % 2 == 0) ? int'($signed(out_data[n/2][31:16])) : int'($signed(out_data[n/2][15:0]));
        d = got - e.y[n]; if (d < 0) d = -d;
        if (d > maxerr) maxerr = d;
        checks++;
        if (d > TOL) begin failures++; $display("FAIL y%0d got %0d exp %0d", n, got, e.y[n]); end
      end
    end
  end

  initial begin
    int x [8];
    in_valid = 0; in_rd = 0;
    for (int i = 0; i < 4; i++) in_data[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      @(negedge clk);
      in_valid = (n % 7) != 3;
      for (int i = 0; i < 8; i++) x[i] = int'($urandom % 2048) - 1024;
      if (n % 5 == 0) for (int i = 1; i < 8; i++) x[i] = int'($urandom % 64) - 32;
      if (n == 10) begin x = '{32767, 0, 0, 0, 32767, 0, 0, 0}; in_valid = 1; end
      if (n == 11) begin x = '{-32768, 0, 0, 0, 0, 0, 0, 0}; in_valid = 1; end
      if (n == 12) begin x = '{64, 0, 0, 0, 0, 0, 0, 0}; in_valid = 1; end
      for (int i = 0; i < 4; i++) in_data[i] = {16'(x[2*i]), 16'(x[2*i+1])};
      in_rd = 5'($urandom);
      if (in_valid) begin
        exp_t e; e = model(x); e.t = cycle; e.rd = in_rd;
        if (n == 12 && e.y[5] != 64) begin failures++; $display("model self-check"); end
        if (n == 10 && e.y[0] != 32767) begin failures++; $display("model self-check sat"); end
        q.push_back(e);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (8) @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("results missing"); end
    $display("largest deviation %0d", maxerr);
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
