// Timing and control unit: a fetch/execute sequencer and the instruction decoder.
// The unit alternates between two states, one clock cycle each:
//   FETCH   - fetch is high. The processor loads the instruction word from
//             program memory into the instruction register and increments the
//             program counter. No LOAD or ENABLE strobe is active.
//   EXECUTE - the instruction register ir is decoded. Its LOAD bit and ENABLE
//             bit are the chip selects of the two 3-to-8 decoders. Its device
//             ID picks the component, giving at most one LOAD strobe and one
//             ENABLE strobe.
// Each instruction therefore takes two cycles. The argument field (ir[3:0]) is
// passed to the ALU select and the register-file address. ir[4] is passed on
// as the ALU carry-in. Reset enters FETCH.
// The instruction fields and the decoders follow the processor description.
// The two-cycle sequence and the use of bit 4 are this design's choices.
module control_unit
  import rev_proc_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  instr_t     ir,
  output logic       fetch,
  output logic [7:0] load_strobe,
  output logic [7:0] enable_strobe,
  output logic [3:0] arg,
  output logic       cin
);
  typedef enum logic {S_FETCH = 1'b0, S_EXEC = 1'b1} state_e;
  state_e state;

  always_ff @(posedge clk) begin
    if (rst) state <= S_FETCH;
    else     state <= (state == S_FETCH) ? S_EXEC : S_FETCH;
  end

  assign fetch = (state == S_FETCH);

  instruction_decoder u_idec (
    .l    (ir.load   & (state == S_EXEC)),
    .e    (ir.enable & (state == S_EXEC)),
    .k    (ir.dev),
    .ctrl1(load_strobe),
    .ctrl2(enable_strobe)
  );

  assign arg = ir.arg;
  assign cin = ir.cin;

  // At most one component loads and at most one drives the bus.
  a_onehot_load:   assert property (@(posedge clk) disable iff (rst) $onehot0(load_strobe));
  a_onehot_enable: assert property (@(posedge clk) disable iff (rst) $onehot0(enable_strobe));
  a_idle_in_fetch: assert property (@(posedge clk) disable iff (rst)
                                    fetch |-> (load_strobe == '0 && enable_strobe == '0));
endmodule
