// tb_const_bank: checks every constant K0..K15 against cos(k*pi/16)*2^15,
// computed here in real arithmetic, rounded and limited to 16 bits, and
// that both halves of each constant carry the same coefficient.
module tb_const_bank;
  import risc_pkg::*;
  logic [3:0] k_addr;
  word_t      k_data;
  int checks = 0, failures = 0;

  const_bank dut (.*);

  initial begin
    for (int k = 0; k < 16; k++) begin
      real c; int e;
      c = $cos(k * 3.14159265358979 / 16.0) * 32768.0;
      e = (c >= 0.0) ? int'($floor(c + 0.5)) : -int'($floor(-c + 0.5));
      if (e > 32767) e = 32767;
      k_addr = 4'(k);
      #1;
      checks++;
      if (int'($signed(k_data[31:16])) != e || k_data[15:0] != k_data[31:16]) begin
        failures++;
        $display("FAIL K%0d = %h expected %0d", k, k_data, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
