// const_bank: the bank of sixteen constant registers K0..K15 read by the
// MACK and MACKL instructions.
//
// Each constant is 32 bits wide, one 16-bit Q15 coefficient in both the
// high and the low half, so that a dual-lane multiply applies the same
// coefficient to both packed samples. The contents are the iDCT cosines
// scaled by 2^15, K[k] = round(cos(k*pi/16) * 2^15) limited to 16 bits,
// which covers every cosine of the 8-point transform with both signs.
// The bank is a read-only table with a combinational read; the read
// address is the low four bits of the Rk field of the instruction.
// The source text gives the bank size and that it holds cosines times
// 2^15; which sixteen cosines, and the duplicated halves, are this
// design's choice.
module const_bank
  import risc_pkg::*;
(
  input  logic [3:0] k_addr,
  output word_t      k_data
);

  always_comb k_data = {KCOS[k_addr], KCOS[k_addr]};

endmodule
