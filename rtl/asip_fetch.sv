// asip_fetch: FE stage of the FIR ASIP - program counter and fetch address.
//
// The program counter drives the program-memory address directly; the word
// read back is captured by the FE/DC register. Each cycle the PC advances by
// one word, unless the EX stage reports a taken jne, in which case it loads
// the 16-bit jump target. Because jne resolves in the third stage, the two
// instructions fetched after it (the one in DC and the one in FE) still
// execute: the processor has two branch delay slots, which is why a loop's
// jne is followed by two nops in the FIR program. The PC holds while the
// pipeline controller stalls. Reset sets the PC to 0, this design's own
// choice. Timing: target and taken are sampled at the rising edge.
module asip_fetch
  import asip_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic stall,
  input  logic br_taken,
  input  pc_t  br_target,
  output pc_t  pc,
  output pc_t  pm_addr
);

  always_ff @(posedge clk) begin
    if (!rst_n)         pc <= '0;
    else if (stall)     pc <= pc;
    else if (br_taken)  pc <= br_target;
    else                pc <= pc + pc_t'(1);
  end

  assign pm_addr = pc;

endmodule
