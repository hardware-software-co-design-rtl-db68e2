// word_ram: word-organised memory used as the instruction memory and as
// the data memory of the processor.
//
// DEPTH words of 32 bits, addressed by byte address (the two low address
// bits are ignored, only aligned words are accessed). Port 1 is the
// processor's port: combinational read and a synchronous write on
// we1. Port 2 is a second read/write port for the system side (loading a
// program, depositing picture blocks and reading results back), with the
// same timing. If both ports write the same word in one cycle, port 1
// wins. Addresses beyond DEPTH wrap around. The memory is not reset.
// The source text only names the memories (the program address of the
// fetch stage, the block data read and written by loads and stores);
// size, port count and read timing are this design's choices.
module word_ram
  import risc_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic  clk,
  input  word_t addr1,
  output word_t rdata1,
  input  logic  we1,
  input  word_t wdata1,
  input  word_t addr2,
  output word_t rdata2,
  input  logic  we2,
  input  word_t wdata2
);

  localparam int unsigned AW = $clog2(DEPTH);

  word_t mem [DEPTH];

  logic [AW-1:0] a1, a2;
  assign a1 = addr1[AW+1:2];
  assign a2 = addr2[AW+1:2];

  assign rdata1 = mem[a1];
  assign rdata2 = mem[a2];

  always_ff @(posedge clk) begin
    if (we2) mem[a2] <= wdata2;
    if (we1) mem[a1] <= wdata1;
  end

endmodule
