// tdm_min - N x N time-division multiplexed multistage interconnection
// network with the generalized cube topology.
//
// The network has n = log2(N) stages of N/2 2x2 switches. Stage st (1..n,
// counted from the inputs) pairs the two lines whose addresses differ only in
// bit n-st: the line with that bit 0 enters the switch's upper input, the
// other its lower input, and a straight switch keeps each on its own line
// while a cross switch swaps them. Switch w of a stage sits on the two lines
// obtained by inserting bit n-st into w. A path s->d therefore has exactly
// one route, and its switch at stage st must be set to s[n-st] xor d[n-st].
// This is the recursive construction of an N x N network from two N/2 x N/2
// networks plus a front stage.
//
// Every switch has its own tdm_switch_ctrl cell, a shift register holding
// the switch's state for each of the mcl time slots of the multiplexing
// cycle. All cells share step (the last clock of each time slot), the
// parallel-load strobe and the cycle length; control_enable/control_set are
// per switch so that a controller can rewrite single switches in the
// current slot.
//
// Array indices: [g][w] is switch w of stage g+1. Data passes the network
// combinationally from in_link to out_link; switch states change only on
// the clock edge that ends a slot (or on a control_enable override).
module tdm_min #(
  parameter int unsigned N = 8,    // ports
  parameter int unsigned K = 8,    // shift register length
  parameter int unsigned W = 9,    // link width
  localparam int unsigned NS  = $clog2(N),
  localparam int unsigned NSW = N / 2,
  localparam int unsigned MW  = $clog2(K + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          step,
  input  logic          shift_nload,
  input  logic [K-1:0]  load_bits [NS][NSW],
  input  logic [MW-1:0] mcl,
  input  logic          ctrl_en   [NS][NSW],
  input  logic          ctrl_set  [NS][NSW],
  input  logic [W-1:0]  in_link   [N],
  output logic [W-1:0]  out_link  [N],
  output logic          sw_state  [NS][NSW]
);

  for (genvar g = 0; g < NS; g++) begin : g_stage
    localparam int unsigned B = NS - 1 - g;   // address bit of this stage
    logic [W-1:0] sin  [N];                   // lines in front of the stage
    logic [W-1:0] sout [N];                   // lines behind the stage

    if (g == 0) begin : g_first
      assign sin = in_link;
    end else begin : g_next
      assign sin = g_stage[g-1].sout;
    end
    for (genvar w = 0; w < NSW; w++) begin : g_sw
      localparam int unsigned A0 = ((w >> B) << (B + 1)) | (w & ((1 << B) - 1));
      localparam int unsigned A1 = A0 | (1 << B);

      tdm_switch_ctrl #(.K(K)) u_ctrl (
        .clk            (clk),
        .rst_n          (rst_n),
        .step           (step),
        .shift_nload    (shift_nload),
        .load_bits      (load_bits[g][w]),
        .mcl            (mcl),
        .control_enable (ctrl_en[g][w]),
        .control_set    (ctrl_set[g][w]),
        .to_switch      (sw_state[g][w])
      );

      tdm_switch2x2 #(.W(W)) u_sw (
        .xstate(sw_state[g][w]),
        .in0   (sin[A0]),
        .in1   (sin[A1]),
        .out0  (sout[A0]),
        .out1  (sout[A1])
      );
    end
  end

  assign out_link = g_stage[NS-1].sout;

endmodule
