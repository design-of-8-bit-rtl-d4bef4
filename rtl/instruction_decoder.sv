// Instruction decoder: two 3-to-8 Fredkin decoders.
// Both decoders see the 3-bit device ID k. The LOAD decoder has chip select l
// and drives ctrl1, one LOAD strobe per bus component. The ENABLE decoder has
// chip select e and drives ctrl2, one ENABLE strobe per component. Bit n of
// each output belongs to device ID n: 0 accumulator, 1 ALU result registers,
// 2 data bus buffer, 3 program counter, 4 instruction register, 5 status
// register, 6 register file, 7 temporary register. This structure follows the
// processor description. Combinational.
module instruction_decoder (
  input  logic       l,
  input  logic       e,
  input  logic [2:0] k,
  output logic [7:0] ctrl1,
  output logic [7:0] ctrl2
);
  rev_decoder #(.N(3)) u_dec_load   (.cs(l), .sel(k), .y(ctrl1));
  rev_decoder #(.N(3)) u_dec_enable (.cs(e), .sel(k), .y(ctrl2));
endmodule
