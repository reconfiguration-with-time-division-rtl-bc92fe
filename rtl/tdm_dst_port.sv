// tdm_dst_port - network interface of a destination processor (one MIN
// output).
//
// The port knows, for every time slot, which source (if any) has a path to
// it in that slot, so a word arriving on its link is attributed to a sender
// by the slot alone; the data carries no source address. Received words are
// registered and presented as {rx_valid, rx_src, rx_data} one clock after
// they arrive. A word that arrives in a slot in which no path leads to this
// output is flagged with rx_stray (it cannot occur while the switch registers
// agree with the table) and is not delivered.
module tdm_dst_port #(
  parameter int unsigned N  = 8,
  parameter int unsigned K  = 8,
  parameter int unsigned DW = 8,
  localparam int unsigned IW = $clog2(N),
  localparam int unsigned SW = (K > 1) ? $clog2(K) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [SW-1:0] cur_slot,
  input  logic          tab_v    [K],
  input  logic [IW-1:0] tab_src  [K],
  input  logic [DW:0]   link_in,
  output logic          rx_valid,
  output logic [IW-1:0] rx_src,
  output logic [DW-1:0] rx_data,
  output logic          rx_stray
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_valid <= 1'b0;
      rx_src   <= '0;
      rx_data  <= '0;
      rx_stray <= 1'b0;
    end else begin
      rx_valid <= link_in[DW] && tab_v[cur_slot];
      rx_stray <= link_in[DW] && !tab_v[cur_slot];
      rx_src   <= tab_src[cur_slot];
      rx_data  <= link_in[DW-1:0];
    end
  end

endmodule
