// regfile: the 32 x 32-bit general register bank R0..R31 of the core.
//
// Three read ports (A, B, C) serve the two sources of an ordinary
// instruction plus the accumulator Ri read by the MAC and HADD-accumulate
// instructions. A fourth, quad-wide read port returns R[q..q+3] for the
// IDCT instruction, which reads and rewrites four registers at once.
// Writes: one 32-bit port and one quad port, both taking effect at the
// rising clock edge. Reads are combinational and write-through: a register
// written in the same cycle reads as its new value, which lets an
// instruction in decode see a result that is being written back.
// R0 always reads zero and ignores writes (DLX convention).
// The number of registers follows the source text; the port count, the
// write-through and the reset to zero are choices of this design.
module regfile
  import risc_pkg::*;
#(
  parameter int unsigned N = NREGS
) (
  input  logic      clk,
  input  logic      rst_n,
  input  reg_addr_t ra_addr, rb_addr, rc_addr,
  output word_t     ra_data, rb_data, rc_data,
  input  reg_addr_t q_addr,
  output word_t     q_data [4],
  input  logic      we,
  input  reg_addr_t w_addr,
  input  word_t     w_data,
  input  logic      qwe,
  input  reg_addr_t qw_addr,
  input  word_t     qw_data [4]
);

  word_t regs [N];

  // value a register will hold after this cycle's writes
  function automatic word_t rd_thru(input reg_addr_t a);
    word_t v;
    v = regs[a];
    if (we && w_addr == a) v = w_data;
    for (int i = 0; i < 4; i++)
      if (qwe && reg_addr_t'(qw_addr + reg_addr_t'(i)) == a) v = qw_data[i];
    if (a == '0) v = '0;
    return v;
  endfunction

  always_comb begin
    ra_data = rd_thru(ra_addr);
    rb_data = rd_thru(rb_addr);
    rc_data = rd_thru(rc_addr);
    for (int i = 0; i < 4; i++) q_data[i] = rd_thru(reg_addr_t'(q_addr + reg_addr_t'(i)));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N); i++) regs[i] <= '0;
    end else begin
      if (we && w_addr != '0) regs[w_addr] <= w_data;
      if (qwe)
        for (int i = 0; i < 4; i++)
          if (reg_addr_t'(qw_addr + reg_addr_t'(i)) != '0)
            regs[reg_addr_t'(qw_addr + reg_addr_t'(i))] <= qw_data[i];
    end
  end

endmodule
