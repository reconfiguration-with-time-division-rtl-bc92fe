// tdm_src_port - network interface of a source processor (one MIN input).
//
// The port holds, for every time slot of the multiplexing cycle, whether a
// path from this input is established in that slot and to which destination
// (its row of the configuration sequence). Routing is thereby reduced to
// choosing the slot: a pending message for destination msg_dst is put on the
// input link during any clock of a slot whose path leads to msg_dst, and is
// held back otherwise. No address travels with the data; the network
// delivers it because the switches are set for that path in that slot.
//
// Interface: valid/ready message input (one word per accepted cycle), link
// output {valid, data} to the network input. has_path says whether any slot
// of the current sequence reaches msg_dst, so a sender can tell a message
// that only waits from one that never leaves. Nothing is sent while
// net_ready is low (table and switches being reconfigured). Timing: the
// link output and msg_ready are combinational from the slot counter, the
// table and the message input; the port keeps no state of its own.
module tdm_src_port #(
  parameter int unsigned N  = 8,
  parameter int unsigned K  = 8,
  parameter int unsigned DW = 8,
  localparam int unsigned IW = $clog2(N),
  localparam int unsigned SW = (K > 1) ? $clog2(K) : 1
) (
  input  logic          net_ready,
  input  logic [SW-1:0] cur_slot,
  input  logic          tab_v    [K],
  input  logic [IW-1:0] tab_dst  [K],
  input  logic          msg_valid,
  input  logic [IW-1:0] msg_dst,
  input  logic [DW-1:0] msg_data,
  output logic          msg_ready,
  output logic          has_path,
  output logic [DW:0]   link_out
);

  logic send;

  always_comb begin
    send      = msg_valid && net_ready && tab_v[cur_slot] &&
                (tab_dst[cur_slot] == msg_dst);
    msg_ready = send;
    link_out  = {send, send ? msg_data : '0};
    has_path  = 1'b0;
    for (int unsigned k = 0; k < K; k++) begin
      if (tab_v[k] && tab_dst[k] == msg_dst) has_path = 1'b1;
    end
  end

endmodule
