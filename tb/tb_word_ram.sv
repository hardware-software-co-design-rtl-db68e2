// tb_word_ram: self-checking test of the two-port word memory. Random
// writes through both ports against a reference array, combinational
// reads on both ports, byte addresses with the low two bits ignored, and
// port 1 winning a same-word write collision.
module tb_word_ram;
  import risc_pkg::*;
  localparam int unsigned DEPTH = 64;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  word_t addr1, rdata1, wdata1, addr2, rdata2, wdata2;
  logic we1, we2;

  word_ram #(.DEPTH(DEPTH)) dut (.*);

  word_t model [DEPTH];
  int checks = 0, failures = 0;

  initial begin
    we1 = 0; we2 = 0; addr1 = 0; addr2 = 0; wdata1 = 0; wdata2 = 0;
    // initialise through port 2
    for (int i = 0; i < int'(DEPTH); i++) begin
      @(negedge clk); we2 = 1; addr2 = word_t'(i * 4); wdata2 = word_t'(i * 32'h01010101); model[i] = wdata2;
    end
    @(negedge clk); we2 = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      addr1 = word_t'(($urandom % DEPTH) * 4 + $urandom % 4);
      addr2 = (n % 9 == 0) ? addr1 : word_t'(($urandom % DEPTH) * 4 + $urandom % 4);
      we1 = ($urandom % 3) == 0; we2 = ($urandom % 3) == 0;
      wdata1 = $urandom; wdata2 = $urandom;
      #1;
      checks += 2;
      if (rdata1 != model[addr1[7:2]]) begin failures++; $display("FAIL port1 read"); end
      if (rdata2 != model[addr2[7:2]]) begin failures++; $display("FAIL port2 read"); end
      @(posedge clk);
      if (we2) model[addr2[7:2]] = wdata2;
      if (we1) model[addr1[7:2]] = wdata1;
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
