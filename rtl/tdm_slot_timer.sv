// tdm_slot_timer - global time-slot clock of the TDM-MIN.
//
// All switches and all input and output ports follow one global slot
// counter, so that a port knows which mapping of the configuration sequence
// is realized at any moment. A time slot lasts SLOT_CYCLES clock cycles and
// the slots 0 .. mcl-1 repeat round robin. slot_last is high in the last
// clock of every slot; it is the shift strobe of the switch registers, so the
// registers advance exactly when the counter moves to the next slot.
// restart (one cycle) loads a new cycle length from mcl_in and starts again
// at slot 0 in the next cycle; it is used together with a parallel reload of
// the switch registers. The slot length and the restart input are this
// design's choices; the design fixes only that slots have a fixed length and
// are visited round robin. Reset: slot 0, cycle length K.
module tdm_slot_timer #(
  parameter int unsigned K           = 8,
  parameter int unsigned SLOT_CYCLES = 4,
  localparam int unsigned SW = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned MW = $clog2(K + 1),
  localparam int unsigned CW = (SLOT_CYCLES > 1) ? $clog2(SLOT_CYCLES) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          restart,
  input  logic [MW-1:0] mcl_in,
  output logic [SW-1:0] cur_slot,
  output logic [MW-1:0] mcl,
  output logic          slot_first,
  output logic          slot_last
);

  logic [CW-1:0] cyc;

  assign slot_first = (cyc == '0);
  assign slot_last  = (cyc == CW'(SLOT_CYCLES - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc      <= '0;
      cur_slot <= '0;
      mcl      <= MW'(K);
    end else if (restart) begin
      cyc      <= '0;
      cur_slot <= '0;
      mcl      <= (mcl_in == '0) ? MW'(1) : mcl_in;
    end else if (slot_last) begin
      cyc      <= '0;
      cur_slot <= (32'(cur_slot) + 1 >= 32'(mcl)) ? '0 : cur_slot + 1'b1;
    end else begin
      cyc <= cyc + 1'b1;
    end
  end

endmodule
