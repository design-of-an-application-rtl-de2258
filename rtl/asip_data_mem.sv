// asip_data_mem: data memory of the FIR ASIP.
//
// DEPTH words of 32 bits, holding filter coefficients, input samples and
// results. The EX stage uses one port: a combinational read (ldr) and a
// synchronous write at the rising edge (ldm, mvm), never both in the same
// cycle. A second combinational read port lets a host or testbench look at
// the results. Addresses beyond DEPTH read as zero and writes to them are
// dropped. The default depth of 67 words covers addresses 0x0000 to 0x0042,
// the upper end of the reduced data range of the FIR processor; the port
// timing is this design's own choice.
module asip_data_mem
  import asip_pkg::*;
#(
  parameter int unsigned DEPTH = 67
) (
  input  logic  clk,
  // EX-stage port
  input  word_t addr,
  input  logic  we,
  input  word_t wdata,
  output word_t rdata,
  // inspection port
  input  word_t dbg_addr,
  output word_t dbg_rdata
);

  word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && (addr < DEPTH)) mem[addr[$clog2(DEPTH)-1:0]] <= wdata;
  end

  assign rdata     = (addr < DEPTH)     ? mem[addr[$clog2(DEPTH)-1:0]]     : '0;
  assign dbg_rdata = (dbg_addr < DEPTH) ? mem[dbg_addr[$clog2(DEPTH)-1:0]] : '0;

endmodule
