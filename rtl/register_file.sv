// Register file: 16 controlled buffer registers of 8 bits.
// The 4-bit address s goes through one Feynman gate per bit (B = 0), which
// gives two copies of the address, one for each decoder. The load decoder is a
// 4-to-16 Fredkin decoder with chip select l. The enable decoder is the same,
// with chip select e. ctrl1 and ctrl2 are the decoder outputs. Load decoder
// bit k writes din into register k at the rising clock edge. Enable decoder
// bit k puts register k on dout. With e low, dout is zero. A read and a write
// of the same register in one cycle return the old value. rst clears all
// registers.
// The 16 registers, the two Fredkin decoders and the Feynman fan-out follow the
// processor description. The zero-when-disabled output and the reset are this
// design's choices.
// The registers' direct q outputs are not used; every read goes through the
// enable decoder and dout.
module register_file #(
  parameter int unsigned W = 8,
  parameter int unsigned N = 4
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            l,
  input  logic            e,
  input  logic [N-1:0]    s,
  input  logic [W-1:0]    din,
  output logic [W-1:0]    dout,
  output logic [2**N-1:0] ctrl1,
  output logic [2**N-1:0] ctrl2
);
  localparam int unsigned NR = 2**N;

  // Feynman fan-out of the address into the two decoders.
  logic [N-1:0] s_load, s_en;
  for (genvar i = 0; i < N; i++) begin : g_fanout
    feynman_gate u_fg (.a(s[i]), .b(1'b0), .p(s_load[i]), .q(s_en[i]));
  end

  rev_decoder #(.N(N)) u_dec_load   (.cs(l), .sel(s_load), .y(ctrl1));
  rev_decoder #(.N(N)) u_dec_enable (.cs(e), .sel(s_en),   .y(ctrl2));

  logic [W-1:0] rq   [NR];
  logic [W-1:0] rout [NR];
  for (genvar k = 0; k < NR; k++) begin : g_reg
    buffer_register #(.W(W)) u_reg (
      .clk(clk), .rst(rst), .load(ctrl1[k]), .enable(ctrl2[k]),
      .din(din), .q(rq[k]), .dout(rout[k])
    );
  end

  // Shared output line: OR of the register outputs, at most one enabled.
  always_comb begin
    dout = '0;
    for (int k = 0; k < NR; k++) dout |= rout[k];
  end
endmodule
