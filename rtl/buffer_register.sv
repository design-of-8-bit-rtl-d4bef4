// Controlled buffer register: the memory component that sits on the bus.
// When load is high at a rising clock edge, the register takes din. While
// enable is high, dout carries the stored value; otherwise dout is zero. A
// shared bus can therefore be the OR of all dout outputs, with at most one
// register enabled. q always shows the stored value, for units wired to the
// register directly, such as the ALU operands. rst is synchronous and clears
// the register.
// The load/enable behaviour follows the processor description. The
// zero-when-disabled output, used in place of a tri-state driver, and the
// reset are this design's choices.
module buffer_register #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic         enable,
  input  logic [W-1:0] din,
  output logic [W-1:0] q,
  output logic [W-1:0] dout
);
  always_ff @(posedge clk) begin
    if (rst)       q <= '0;
    else if (load) q <= din;
  end

  assign dout = enable ? q : '0;
endmodule
