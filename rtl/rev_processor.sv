// 8-bit bus-oriented processor whose blocks are built from reversible gates.
//
// Eight components share one 10-bit data bus. Each has a 3-bit device ID:
//   000 accumulator (ACC)           100 instruction register (IR, 10 bits)
//   001 ALU result registers (x,y)  101 status register (SR, 4 flags)
//   010 data bus buffer (DBB)       110 register file (16 x 8)
//   011 program counter (PC)        111 temporary register (TMP)
// An instruction is 10 bits: {LOAD, ENABLE, device ID[2:0], cin, arg[3:0]}.
// ENABLE puts the chosen component on the bus. LOAD makes the chosen
// component take its input. A move between two components takes two
// instructions: one with ENABLE for the source, then one with LOAD for the
// destination. A bus holder keeps the last value driven onto the bus, so the
// destination still sees it one instruction later.
//
// What each component takes on LOAD:
//   ACC, TMP, PC, IR, RF[arg] - the bus (8-bit ones its low byte)
//   SR                        - bus[3:0]
//   DBB                       - mem_din, the data word from external memory
//   ALU result registers      - the ALU result for operation arg, with
//                               A = ACC, B = TMP and carry-in ir[4]; the
//                               status register takes the ALU flags at the
//                               same time
// On ENABLE, the ALU result registers drive x when arg[0] = 0 and y when
// arg[0] = 1. The register file drives RF[arg]. The others drive their
// content, zero-extended to 10 bits.
//
// Timing: every instruction takes two clock cycles. In the fetch cycle, IR
// takes imem_data (the word at imem_addr = PC) and PC increments. In the
// execute cycle, the strobes act and loads happen at the closing clock edge.
// A LOAD into the IR is overwritten by the next fetch, so it has no lasting
// effect. rst is synchronous and clears every register.
//
// The component list, device IDs, instruction fields, ALU operations and
// register-file structure follow the processor description. The two-cycle
// sequence, the bus holder, the separate instruction port, the byte select
// for the ALU result and the SR update on an ALU load are this design's own.
// Some direct register outputs (DBB, ALU result, SR) and the ALU carry-out are
// left unused: these registers are read only over the bus, and the carry is
// also held in the status register.
module rev_processor
  import rev_proc_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  output logic [DATA_W-1:0]   imem_addr,   // program counter
  input  logic [INSTR_W-1:0]  imem_data,   // instruction word at imem_addr
  input  logic [DATA_W-1:0]   mem_din,     // data word from memory for the DBB
  output logic                mem_rd,      // DBB takes mem_din at this clock edge
  output logic [BUS_W-1:0]    data_bus,    // data bus, also towards memory
  output logic                bus_driven,  // a component drives the bus this cycle
  output logic                fetch        // fetch cycle
);
  // ---------------- control ----------------
  instr_t     ir;
  logic [7:0] ls, es;        // LOAD / ENABLE strobes, indexed by device ID
  logic [3:0] arg;
  logic       cin;

  control_unit u_cu (
    .clk(clk), .rst(rst), .ir(ir), .fetch(fetch),
    .load_strobe(ls), .enable_strobe(es), .arg(arg), .cin(cin)
  );

  // ---------------- bus ----------------
  logic [BUS_W-1:0] bus, bus_hold;
  logic [DATA_W-1:0] acc_q, acc_o, tmp_q, tmp_o, dbb_q, dbb_o, pc_o, rf_o;
  logic [DATA_W-1:0] alux_d, aluy_d, alux_q, aluy_q, alux_o, aluy_o;
  logic [INSTR_W-1:0] ir_q, ir_o, ir_d;
  logic [3:0] sr_q, sr_o, sr_d;
  flags_t     alu_flags;
  logic       alu_cout;

  assign bus_driven = |es;

  always_ff @(posedge clk) begin
    if (rst)             bus_hold <= '0;
    else if (bus_driven) bus_hold <= bus;
  end

  always_comb begin
    if (bus_driven)
      bus = {2'b00, acc_o | alux_o | aluy_o | dbb_o | pc_o | {4'b0000, sr_o} | rf_o | tmp_o} | ir_o;
    else
      bus = bus_hold;
  end

  assign data_bus = bus;
  assign mem_rd   = ls[DEV_DBB];

  // ---------------- components ----------------
  buffer_register #(.W(DATA_W)) u_acc (
    .clk(clk), .rst(rst), .load(ls[DEV_ACC]), .enable(es[DEV_ACC]),
    .din(bus[DATA_W-1:0]), .q(acc_q), .dout(acc_o));

  buffer_register #(.W(DATA_W)) u_tmp (
    .clk(clk), .rst(rst), .load(ls[DEV_TMP]), .enable(es[DEV_TMP]),
    .din(bus[DATA_W-1:0]), .q(tmp_q), .dout(tmp_o));

  buffer_register #(.W(DATA_W)) u_dbb (
    .clk(clk), .rst(rst), .load(ls[DEV_DBB]), .enable(es[DEV_DBB]),
    .din(mem_din), .q(dbb_q), .dout(dbb_o));

  alu #(.W(DATA_W)) u_alu (
    .a(acc_q), .b(tmp_q), .cin(cin), .sel(arg),
    .x(alux_d), .y(aluy_d), .cout(alu_cout), .flags(alu_flags));

  buffer_register #(.W(DATA_W)) u_alux (
    .clk(clk), .rst(rst), .load(ls[DEV_ALUR]), .enable(es[DEV_ALUR] & ~arg[0]),
    .din(alux_d), .q(alux_q), .dout(alux_o));

  buffer_register #(.W(DATA_W)) u_aluy (
    .clk(clk), .rst(rst), .load(ls[DEV_ALUR]), .enable(es[DEV_ALUR] & arg[0]),
    .din(aluy_d), .q(aluy_q), .dout(aluy_o));

  assign sr_d = ls[DEV_ALUR] ? alu_flags : bus[3:0];
  buffer_register #(.W(4)) u_sr (
    .clk(clk), .rst(rst), .load(ls[DEV_SR] | ls[DEV_ALUR]), .enable(es[DEV_SR]),
    .din(sr_d), .q(sr_q), .dout(sr_o));

  program_counter #(.W(DATA_W)) u_pc (
    .clk(clk), .rst(rst), .inc(fetch), .load(ls[DEV_PC]), .enable(es[DEV_PC]),
    .din(bus[DATA_W-1:0]), .q(imem_addr), .dout(pc_o));

  assign ir_d = fetch ? imem_data : bus;
  buffer_register #(.W(INSTR_W)) u_ir (
    .clk(clk), .rst(rst), .load(fetch | ls[DEV_IR]), .enable(es[DEV_IR]),
    .din(ir_d), .q(ir_q), .dout(ir_o));
  assign ir = instr_t'(ir_q);

  logic [15:0] rf_ctrl1, rf_ctrl2;
  register_file #(.W(DATA_W), .N(4)) u_rf (
    .clk(clk), .rst(rst), .l(ls[DEV_RF]), .e(es[DEV_RF]), .s(arg),
    .din(bus[DATA_W-1:0]), .dout(rf_o), .ctrl1(rf_ctrl1), .ctrl2(rf_ctrl2));

endmodule
