// Shared types and constants of the reversible 8-bit processor.
// These are the instruction word layout, the device IDs of the eight bus
// components, the ALU operation codes and the status flags. The device IDs and
// ALU codes follow the processor description. Using instruction bit 4 as the
// ALU carry-in is this design's own choice.
package rev_proc_pkg;

  localparam int unsigned DATA_W  = 8;   // data path width
  localparam int unsigned BUS_W   = 10;  // width of the shared data bus
  localparam int unsigned INSTR_W = 10;  // instruction word width

  // Device IDs of the components on the bus.
  typedef enum logic [2:0] {
    DEV_ACC   = 3'b000,  // accumulator
    DEV_ALUR  = 3'b001,  // ALU result registers
    DEV_DBB   = 3'b010,  // data bus buffer register
    DEV_PC    = 3'b011,  // program counter
    DEV_IR    = 3'b100,  // instruction register
    DEV_SR    = 3'b101,  // status register
    DEV_RF    = 3'b110,  // register file
    DEV_TMP   = 3'b111   // temporary register
  } dev_id_e;

  // ALU operation select, I3..I0.
  typedef enum logic [3:0] {
    OP_CLR   = 4'b0000,
    OP_ADD   = 4'b0001,
    OP_SUB   = 4'b0010,
    OP_MUL   = 4'b0011,
    OP_INC   = 4'b0100,
    OP_PASSA = 4'b0101,
    OP_SHL   = 4'b0110,
    OP_SHR   = 4'b0111,
    OP_OR    = 4'b1000,
    OP_AND   = 4'b1001,
    OP_NOT   = 4'b1010,
    OP_XOR   = 4'b1011,
    OP_NOR   = 4'b1100,
    OP_NAND  = 4'b1101,
    OP_XNOR  = 4'b1110,
    OP_PRESET= 4'b1111
  } alu_op_e;

  // Status register contents, from bit 3 down to bit 0.
  typedef struct packed {
    logic carry;
    logic overflow;
    logic sign;
    logic zero;
  } flags_t;

  // 10-bit instruction: LOAD, ENABLE, device ID, carry-in, argument S3..S0.
  typedef struct packed {
    logic       load;
    logic       enable;
    dev_id_e    dev;
    logic       cin;
    logic [3:0] arg;
  } instr_t;

endpackage
