// End-to-end test of the processor at its default size.
// The testbench holds a 256-word program memory and supplies a fresh random
// data word on mem_din every cycle. It also runs its own instruction-level
// model of the processor: registers, bus holder, ALU and register file,
// written independently of the RTL. At every execute cycle it compares the
// data bus, bus_driven and mem_rd with the model; at every fetch cycle it
// compares the instruction address. Each instruction must take exactly two
// cycles.
// The program starts with a directed sequence. That sequence loads 4 and 3
// from memory into ACC and TMP through the data bus buffer, multiplies them,
// reads both result bytes, and moves values through the register file. The
// rest of the memory is random instructions, which cover jumps (PC loads), all
// 16 ALU operations, all loads and enables, and bus-holder transfers. The
// test fails if any of these mechanisms never happened.
module tb_rev_processor;
  import rev_proc_pkg::*;

  localparam int NINSTR = 6000;

  int checks = 0, failures = 0;
  logic clk = 0, rst;
  logic [7:0] imem_addr, mem_din;
  logic [9:0] imem_data, data_bus;
  logic mem_rd, bus_driven, fetch;

  rev_processor dut (.clk(clk), .rst(rst), .imem_addr(imem_addr), .imem_data(imem_data),
                     .mem_din(mem_din), .mem_rd(mem_rd), .data_bus(data_bus),
                     .bus_driven(bus_driven), .fetch(fetch));

  always #5 clk = ~clk;

  logic [9:0] imem [256];
  assign imem_data = imem[imem_addr];

  // ---------------- reference model state ----------------
  logic [7:0] m_acc, m_tmp, m_dbb, m_x, m_y, m_pc;
  logic [9:0] m_ir, m_hold, m_bus;
  logic [3:0] m_sr;
  logic [7:0] m_rf [16];

  // coverage
  int cov_load [8], cov_en [8], cov_op [16];
  int cov_hold = 0, cov_jump = 0, cov_carry = 0, cov_ovf = 0, cov_mul_hi = 0;

  function automatic void alu_ref(input logic [3:0] op, input logic [7:0] a, b, input logic ci,
                                  output logic [7:0] x, y, output logic [3:0] f);
    logic [8:0] t; logic c, v; int s;
    x = 0; y = 0; c = 0; v = 0;
    case (op)
      4'h0: x = 0;
      4'h1: begin t = a + b + ci; x = t[7:0]; c = t[8]; s = $signed(a) + $signed(b) + int'(ci); v = s > 127 || s < -128; end
      4'h2: begin t = {1'b0, a} + {1'b0, ~b} + 9'd1; x = t[7:0]; c = t[8]; s = $signed(a) - $signed(b); v = s > 127 || s < -128; end
      4'h3: {y, x} = 16'(a * b);
      4'h4: begin t = a + 9'd1; x = t[7:0]; c = t[8]; v = (a == 8'h7F); end
      4'h5: x = a;
      4'h6: x = a << 1;
      4'h7: x = a >> 1;
      4'h8: x = a | b;
      4'h9: x = a & b;
      4'hA: x = ~a;
      4'hB: x = a ^ b;
      4'hC: x = ~(a | b);
      4'hD: x = ~(a & b);
      4'hE: x = ~(a ^ b);
      default: begin x = 8'hFF; y = 8'hFF; end
    endcase
    f = {c, v, x[7], x == 0};
  endfunction

  function automatic logic [9:0] ins(input bit l, e, input logic [2:0] dev, input logic [3:0] arg, input bit ci = 0);
    return {l, e, dev, ci, arg};
  endfunction

  initial begin
    repeat (4 * NINSTR + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Directed program; its result checks are in the main loop (by address).
  int directed_len;
  initial begin
    int i = 0;
    foreach (imem[k]) imem[k] = 10'($urandom);
    imem[i++] = ins(1, 0, DEV_DBB, 0);     // 0  DBB <- memory (4)
    imem[i++] = ins(0, 1, DEV_DBB, 0);     // 1  bus <- DBB
    imem[i++] = ins(1, 0, DEV_ACC, 0);     // 2  ACC <- bus (held)
    imem[i++] = ins(1, 0, DEV_DBB, 0);     // 3  DBB <- memory (3)
    imem[i++] = ins(0, 1, DEV_DBB, 0);     // 4  bus <- DBB
    imem[i++] = ins(1, 0, DEV_TMP, 0);     // 5  TMP <- bus
    imem[i++] = ins(1, 0, DEV_ALUR, 4'b0011); // 6  x,y <- ACC*TMP
    imem[i++] = ins(0, 1, DEV_ALUR, 0);    // 7  bus <- x (expect 12)
    imem[i++] = ins(1, 0, DEV_RF, 4'd5);   // 8  R5 <- bus
    imem[i++] = ins(0, 1, DEV_ALUR, 1);    // 9  bus <- y (expect 0)
    imem[i++] = ins(1, 0, DEV_ALUR, 4'b0001, 1); // 10 x <- ACC+TMP+1 = 8
    imem[i++] = ins(0, 1, DEV_ALUR, 0);    // 11 bus <- x (expect 8)
    imem[i++] = ins(0, 1, DEV_RF, 4'd5);   // 12 bus <- R5 (expect 12)
    imem[i++] = ins(0, 1, DEV_SR, 0);      // 13 bus <- flags of ADD
    imem[i++] = ins(0, 1, DEV_PC, 0);      // 14 bus <- PC (expect 15)
    directed_len = i;
  end

  task automatic expect_bus(int addr, logic [9:0] val);
    checks++;
    if (data_bus !== val) begin
      failures++;
      $display("FAIL directed step %0d bus=%0d expected %0d", addr, data_bus, val);
    end
  endtask

  initial begin
    logic [9:0] w;
    logic [3:0] f;
    logic [7:0] ax, ay;
    bit l, e; logic [2:0] dev; logic [3:0] arg; bit ci;
    int cyc0;

    rst = 1; mem_din = 0;
    m_acc = 0; m_tmp = 0; m_dbb = 0; m_x = 0; m_y = 0; m_pc = 0; m_ir = 0; m_hold = 0; m_sr = 0;
    foreach (m_rf[k]) m_rf[k] = 0;
    foreach (cov_load[k]) begin cov_load[k] = 0; cov_en[k] = 0; end
    foreach (cov_op[k]) cov_op[k] = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;

    for (int n = 0; n < NINSTR; n++) begin
      // ---- fetch cycle ----
      mem_din = (n == 0) ? 8'd4 : (n == 3) ? 8'd3 : 8'($urandom);
      checks++;
      if (!fetch || imem_addr !== m_pc || bus_driven) begin
        failures++;
        $display("FAIL fetch n=%0d fetch=%b addr=%0d exp %0d", n, fetch, imem_addr, m_pc);
      end
      m_ir = imem[m_pc];
      m_pc = m_pc + 1;
      @(posedge clk); #1;
      // Past the directed part, the memory replaces each fetched word with a
      // new random one, so the random program keeps changing. Jumps are made
      // rarer so that the program does not spend its time in short loops.
      if (n >= directed_len) begin
        w = 10'($urandom);
        if (w[9] && w[7:5] == DEV_PC && ($urandom % 8) != 0) w[7:5] = DEV_ALUR;
        imem[8'(m_pc - 1)] = w;
      end

      // ---- execute cycle ----
      {l, e, dev, ci, arg} = m_ir;
      alu_ref(arg, m_acc, m_tmp, ci, ax, ay, f);
      if (e) begin
        case (dev)
          DEV_ACC:  m_bus = {2'b0, m_acc};
          DEV_ALUR: m_bus = {2'b0, arg[0] ? m_y : m_x};
          DEV_DBB:  m_bus = {2'b0, m_dbb};
          DEV_PC:   m_bus = {2'b0, m_pc};
          DEV_IR:   m_bus = m_ir;
          DEV_SR:   m_bus = {6'b0, m_sr};
          DEV_RF:   m_bus = {2'b0, m_rf[arg]};
          default:  m_bus = {2'b0, m_tmp};
        endcase
      end else begin
        m_bus = m_hold;
      end
      checks++;
      if (fetch || data_bus !== m_bus || bus_driven !== e || mem_rd !== (l && dev == DEV_DBB)) begin
        failures++;
        if (failures < 20)
          $display("FAIL exec n=%0d ir=%b bus=%h exp %h driven=%b", n, m_ir, data_bus, m_bus, bus_driven);
      end
      // directed result checks
      if (n < directed_len) begin
        case (n)
          7:  expect_bus(n, 10'd12);
          9:  expect_bus(n, 10'd0);
          11: expect_bus(n, 10'd8);
          12: expect_bus(n, 10'd12);
          13: expect_bus(n, 10'b0000000000);  // 4+3+1 = 8: no carry/ovf/sign/zero
          14: expect_bus(n, 10'd15);
          default: ;
        endcase
      end
      // coverage
      if (l) cov_load[dev]++;
      if (e) cov_en[dev]++;
      if (l && !e) cov_hold++;
      if (l && dev == DEV_PC) cov_jump++;
      if (l && dev == DEV_ALUR) begin
        cov_op[arg]++;
        if (f[3]) cov_carry++;
        if (f[2]) cov_ovf++;
        if (arg == 4'h3 && ay != 0) cov_mul_hi++;
      end
      // state update at the end of the execute cycle
      if (l) begin
        case (dev)
          DEV_ACC:  m_acc = m_bus[7:0];
          DEV_ALUR: begin m_x = ax; m_y = ay; m_sr = f; end
          DEV_DBB:  m_dbb = mem_din;
          DEV_PC:   m_pc = m_bus[7:0];
          DEV_IR:   m_ir = m_bus;
          DEV_SR:   m_sr = m_bus[3:0];
          DEV_RF:   m_rf[arg] = m_bus[7:0];
          default:  m_tmp = m_bus[7:0];
        endcase
      end
      if (e) m_hold = m_bus;
      @(posedge clk); #1;
    end

    // every mechanism must have happened
    for (int k = 0; k < 8; k++) begin
      checks += 2;
      if (cov_load[k] == 0) begin failures++; $display("FAIL never loaded device %0d", k); end
      if (cov_en[k] == 0)   begin failures++; $display("FAIL never enabled device %0d", k); end
    end
    for (int k = 0; k < 16; k++) begin
      checks++;
      if (cov_op[k] == 0) begin failures++; $display("FAIL ALU op %0d never used", k); end
    end
    checks += 5;
    if (cov_hold == 0)   begin failures++; $display("FAIL no bus-holder transfer"); end
    if (cov_jump == 0)   begin failures++; $display("FAIL no jump"); end
    if (cov_carry == 0)  begin failures++; $display("FAIL no carry"); end
    if (cov_ovf == 0)    begin failures++; $display("FAIL no overflow"); end
    if (cov_mul_hi == 0) begin failures++; $display("FAIL no product above 255"); end
    $display("coverage: jumps=%0d holder=%0d carry=%0d overflow=%0d mul_hi=%0d",
             cov_jump, cov_hold, cov_carry, cov_ovf, cov_mul_hi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
