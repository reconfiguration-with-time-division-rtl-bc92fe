// tdm_switch_ctrl - control cell of one 2x2 switch of the TDM-MIN.
//
// Each switch owns a K-bit circular shift register whose bit p holds the
// state (0 straight, 1 cross) the switch must take p time slots from now, so
// that bit 0 (the serial output) is the state for the current slot. The
// switch is driven by
//     to_switch = control_enable ? control_set : serial_out
// and to_switch is also the serial input: at the end of every time slot
// (step = 1) the register shifts by one and the value that drove the switch
// is written back behind the others. With control_enable low the register
// just rotates its sequence of states; with control_enable high the external
// control_set both drives the switch at once and replaces the stored state of
// the current slot, which is how a dynamic reconfiguration rewrites one slot.
// The blocks and connections (register with shift/load select and serial
// output, a selection between serial output and control-set under
// control-enable, the switch drive fed back into the serial input) follow
// the design's control-circuit drawing; the selection is written here as a
// plain multiplexer.
//
// Own choices: the register recirculates into position mcl-1 rather than
// K-1, so that a K-bit register acts as an mcl-slot sequence for any
// 1 <= mcl <= K; shift_nload = 0 loads all K bits in parallel from load_bits
// (bit p = state of slot p) on the next clock, regardless of step; reset
// clears the register (all switches straight).
//
// Timing: to_switch is combinational from the register and the control
// inputs; the register changes on the rising clock edge when step or a load
// is requested.
module tdm_switch_ctrl #(
  parameter int unsigned K = 8   // shift register length, slots per cycle
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 step,            // last clock of a time slot
  input  logic                 shift_nload,     // 1 shift, 0 parallel load
  input  logic [K-1:0]         load_bits,       // bit p: state in slot p
  input  logic [$clog2(K+1)-1:0] mcl,           // multiplexing cycle length
  input  logic                 control_enable,
  input  logic                 control_set,
  output logic                 to_switch
);

  logic [K-1:0] sreg;

  always_comb begin
    to_switch = (sreg[0] & ~control_enable) | (control_set & control_enable);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sreg <= '0;
    end else if (!shift_nload) begin
      sreg <= load_bits;
    end else if (step) begin
      for (int unsigned p = 0; p < K; p++) begin
        if (p + 1 == int'(mcl))
          sreg[p] <= to_switch;
        else if (p + 1 < K)
          sreg[p] <= sreg[p+1];
        else
          sreg[p] <= 1'b0;
      end
    end
  end

endmodule
