// microprogram_memory -- microprogram ROM of the Gator uProcessor.
//
// A DEPTH x WIDTH read-only memory (256 words of 56 bits) with a registered
// address, in the style of an FPGA block ROM: q shows the word at the address
// presented before the last rising clock edge. The microsequencer presents
// the address of the next micro-operation during the clock that commits the
// current one, so q always holds the word of the micro-operation being
// executed.
//
// Interface: address[7:0], clock, q[55:0]; one clock read latency.
// The size, the port names and the registered address follow the original
// design; the contents come from ucode_word() in gup_ucode_pkg (the original
// loads them from a memory initialisation file). The ROM has no reset: its
// output is defined one clock after the first clock edge.
module microprogram_memory
  import gup_pkg::*;
  import gup_ucode_pkg::*;
#(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = UWORD_BITS
) (
  input  logic [$clog2(DEPTH)-1:0] address,
  input  logic                     clock,
  output logic [WIDTH-1:0]         q
);
  logic [WIDTH-1:0] rom [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) rom[i] = WIDTH'(ucode_word(uaddr_t'(i)));
  end

  always_ff @(posedge clock) q <= rom[address];
endmodule
