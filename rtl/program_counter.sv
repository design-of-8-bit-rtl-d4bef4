// Program counter. It holds the address of the next instruction word.
// It behaves like a controlled buffer register: load takes din from the bus
// (a jump), and enable puts the count on dout (zero otherwise). inc adds one,
// after each instruction fetch. load has priority over inc. Synchronous reset
// to address 0. The width, reset value and increment rule are this design's
// choices; the processor description only lists the program counter as a bus
// component.
module program_counter #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         inc,
  input  logic         load,
  input  logic         enable,
  input  logic [W-1:0] din,
  output logic [W-1:0] q,
  output logic [W-1:0] dout
);
  always_ff @(posedge clk) begin
    if (rst)       q <= '0;
    else if (load) q <= din;
    else if (inc)  q <= q + 1'b1;
  end

  assign dout = enable ? q : '0;
endmodule
