// stb_risc_top: the set-top-box processor: RISC core with its instruction
// memory and data memory.
//
// The core fetches from the instruction memory and loads/stores picture
// blocks in the data memory, both read combinationally. Each memory has a
// second port brought out to the system side (`host_*`), through which a
// program is loaded and blocks of coefficients are deposited and read
// back while the core is held in reset or running. host_sel chooses the
// memory: 0 = instruction memory, 1 = data memory.
// Status outputs expose the program counter, the ZERO/NEGATIVE flags,
// write-back collisions, bypass use and taken branches.
// Memory sizes are this design's choice (the traced program runs at byte
// address 0x9D0, inside the 4 KiB instruction memory of the default).
module stb_risc_top
  import risc_pkg::*;
#(
  parameter int unsigned IMEM_WORDS    = 1024,
  parameter int unsigned DMEM_WORDS    = 1024,
  parameter int unsigned ALU_STAGES    = 3,
  parameter int unsigned HADD_STAGES   = 3,
  parameter int unsigned HADDAC_STAGES = 5,
  parameter int unsigned MAC_STAGES    = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  // system-side memory port
  input  logic  host_sel,
  input  word_t host_addr,
  input  logic  host_we,
  input  word_t host_wdata,
  output word_t host_rdata,
  // status
  output word_t pc,
  output logic  flag_zero,
  output logic  flag_negative,
  output logic  wb_conflict,
  output logic  [2:0] bypass_hit,
  output logic  branch_taken
);

  word_t imem_addr, imem_rdata, dmem_addr, dmem_wdata, dmem_rdata;
  logic  dmem_we;
  word_t host_irdata, host_drdata;

  risc_core #(
    .ALU_STAGES(ALU_STAGES), .HADD_STAGES(HADD_STAGES),
    .HADDAC_STAGES(HADDAC_STAGES), .MAC_STAGES(MAC_STAGES)
  ) u_core (
    .clk, .rst_n,
    .imem_addr, .imem_rdata,
    .dmem_addr, .dmem_we, .dmem_wdata, .dmem_rdata,
    .pc, .flag_zero, .flag_negative, .wb_conflict, .bypass_hit, .branch_taken
  );

  word_ram #(.DEPTH(IMEM_WORDS)) u_imem (
    .clk,
    .addr1(imem_addr), .rdata1(imem_rdata), .we1(1'b0), .wdata1('0),
    .addr2(host_addr), .rdata2(host_irdata), .we2(host_we && !host_sel), .wdata2(host_wdata)
  );

  word_ram #(.DEPTH(DMEM_WORDS)) u_dmem (
    .clk,
    .addr1(dmem_addr), .rdata1(dmem_rdata), .we1(dmem_we), .wdata1(dmem_wdata),
    .addr2(host_addr), .rdata2(host_drdata), .we2(host_we && host_sel), .wdata2(host_wdata)
  );

  assign host_rdata = host_sel ? host_drdata : host_irdata;

endmodule
