// tdm_switch2x2 - the 2x2 switching element of the TDM-MIN.
//
// In the straight state (xstate = 0) input 0 goes to output 0 and input 1 to
// output 1; in the cross state (xstate = 1) the two are exchanged. These are
// the only two states the design uses for its switches. The element holds no
// data: it is purely combinational, since a circuit-switched TDM network
// needs no buffering or address decoding in its switches. The link width W
// is this design's own choice (the design works with any width).
module tdm_switch2x2 #(
  parameter int unsigned W = 9
) (
  input  logic         xstate,
  input  logic [W-1:0] in0,
  input  logic [W-1:0] in1,
  output logic [W-1:0] out0,
  output logic [W-1:0] out1
);

  always_comb begin
    out0 = xstate ? in1 : in0;
    out1 = xstate ? in0 : in1;
  end

endmodule
