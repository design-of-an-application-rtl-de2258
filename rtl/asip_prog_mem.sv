// asip_prog_mem: program memory of the FIR ASIP.
//
// DEPTH words of 32 bits. The fetch stage reads it combinationally through
// rd_addr/rd_data (the word is captured in the FE/DC register at the next
// clock edge). A separate synchronous write port loads the program from
// outside before the core is enabled. Addresses beyond DEPTH read as 0,
// which is the encoding of nop, and writes to them are dropped. The memory
// is separate from the data memory (a Harvard arrangement), as the two
// distinct memories of the processor's resource description imply. The
// asynchronous read and the load port are this design's own choices.
module asip_prog_mem
  import asip_pkg::*;
#(
  parameter int unsigned DEPTH = 32
) (
  input  logic  clk,
  // fetch port
  input  pc_t   rd_addr,
  output word_t rd_data,
  // load port
  input  logic  we,
  input  pc_t   wr_addr,
  input  word_t wr_data
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && (32'(wr_addr) < DEPTH)) mem[wr_addr[AW-1:0]] <= wr_data;
  end

  assign rd_data = (32'(rd_addr) < DEPTH) ? mem[rd_addr[AW-1:0]] : '0;

endmodule
