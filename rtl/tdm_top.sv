// tdm_top - a complete time-division multiplexed MIN (TDM-MIN) for
// processor-to-processor communication.
//
// An N x N generalized cube network is cycled through a configuration
// sequence of mappings, one mapping per time slot, round robin. Every switch
// reads its state for the current slot from its own shift register, so the
// network changes configuration every slot without any control traffic, and
// a processor reaches a destination simply by sending in the slot whose
// mapping holds its path. The blocks:
//   tdm_slot_timer    global slot counter (SLOT_CYCLES clocks per slot)
//   tdm_min           the network with one tdm_switch_ctrl shift register per
//                     tdm_switch2x2 switch
//   tdm_central_ctrl  centralized reconfiguration: static composition of the
//                     sequence (variable cycle length, applied by a parallel
//                     reload) or incremental per-request updates (fixed
//                     cycle length, applied through control-set)
//   tdm_resv_net      distributed reconfiguration by reservation and
//                     cancellation packets over per-port slot lists (fixed
//                     cycle length K)
//   tdm_src_port x N  senders: hold a message until a slot reaches its
//                     destination
//   tdm_dst_port x N  receivers: name the sender of each word from the slot
// ctrl_mode selects which controller sets the switches and whose slot tables
// the ports use. The distributed controller assumes the cycle length K, i.e.
// no APPLY with a shorter sequence has been issued to the central one; the
// central controller's table is not updated by the distributed one, so the
// mode is meant to be chosen once after reset. The processors themselves
// are outside the design: their message and receive interfaces are ports.
module tdm_top
  import tdm_pkg::*;
#(
  parameter int unsigned N           = 8,
  parameter int unsigned K           = 8,
  parameter int unsigned DW          = 8,
  parameter int unsigned SLOT_CYCLES = 4,
  localparam int unsigned NS  = $clog2(N),
  localparam int unsigned NSW = N / 2,
  localparam int unsigned IW  = $clog2(N),
  localparam int unsigned SW  = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned MW  = $clog2(K + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  ctrl_mode_e    ctrl_mode,
  // centralized controller
  input  logic          c_req_valid,
  output logic          c_req_ready,
  input  ctrl_op_e      c_req_op,
  input  logic          c_req_var_mcl,
  input  logic [IW-1:0] c_req_src,
  input  logic [IW-1:0] c_req_dst,
  output logic          c_rsp_valid,
  output ctrl_status_e  c_rsp_status,
  output logic [SW-1:0] c_rsp_slot,
  output logic [MW-1:0] c_rsp_mcl,
  // distributed controller
  input  logic          d_req_valid,
  output logic          d_req_ready,
  input  logic          d_req_cancel,
  input  logic [IW-1:0] d_req_src,
  input  logic [IW-1:0] d_req_dst,
  input  logic [SW-1:0] d_req_ts,
  output logic          d_rsp_valid,
  output logic [IW-1:0] d_rsp_src,
  output ctrl_status_e  d_rsp_status,
  output logic [SW-1:0] d_rsp_slot,
  output logic          d_lock_wait,
  output logic [K-1:0]  d_aval    [NS+1][N],   // free slots of every port
  // processors: sending side
  input  logic          msg_valid [N],
  input  logic [IW-1:0] msg_dst   [N],
  input  logic [DW-1:0] msg_data  [N],
  output logic          msg_ready [N],
  output logic          has_path  [N],
  // processors: receiving side
  output logic          rx_valid  [N],
  output logic [IW-1:0] rx_src    [N],
  output logic [DW-1:0] rx_data   [N],
  output logic          rx_stray  [N],
  // status
  output logic [SW-1:0] cur_slot,
  output logic          slot_start,
  output logic [MW-1:0] mcl,
  output logic          net_ready,
  output logic          sw_state  [NS][NSW]
);

  logic          slot_last;
  logic          timer_restart;
  logic [MW-1:0] timer_mcl;

  tdm_slot_timer #(.K(K), .SLOT_CYCLES(SLOT_CYCLES)) u_timer (
    .clk        (clk),
    .rst_n      (rst_n),
    .restart    (timer_restart),
    .mcl_in     (timer_mcl),
    .cur_slot   (cur_slot),
    .mcl        (mcl),
    .slot_first (slot_start),
    .slot_last  (slot_last)
  );

  // ------------------------------------------------------------ controllers
  logic          c_ctrl_en  [NS][NSW];
  logic          c_ctrl_set [NS][NSW];
  logic          c_shift_nload;
  logic [K-1:0]  c_load_bits [NS][NSW];
  logic          c_src_v   [N][K];
  logic [IW-1:0] c_src_dst [N][K];
  logic          c_dst_v   [N][K];
  logic [IW-1:0] c_dst_src [N][K];
  logic          c_net_ready;

  tdm_central_ctrl #(.N(N), .K(K)) u_central (
    .clk           (clk),
    .rst_n         (rst_n),
    .req_valid     (c_req_valid && ctrl_mode == CTRL_CENTRAL),
    .req_ready     (c_req_ready),
    .req_op        (c_req_op),
    .req_var_mcl   (c_req_var_mcl),
    .req_src       (c_req_src),
    .req_dst       (c_req_dst),
    .rsp_valid     (c_rsp_valid),
    .rsp_status    (c_rsp_status),
    .rsp_slot      (c_rsp_slot),
    .rsp_mcl       (c_rsp_mcl),
    .cur_slot      (cur_slot),
    .slot_last     (slot_last),
    .mcl           (mcl),
    .timer_restart (timer_restart),
    .timer_mcl     (timer_mcl),
    .ctrl_en       (c_ctrl_en),
    .ctrl_set      (c_ctrl_set),
    .shift_nload   (c_shift_nload),
    .load_bits     (c_load_bits),
    .src_v         (c_src_v),
    .src_dst       (c_src_dst),
    .dst_v         (c_dst_v),
    .dst_src       (c_dst_src),
    .net_ready     (c_net_ready)
  );

  logic          d_ctrl_en  [NS][NSW];
  logic          d_ctrl_set [NS][NSW];
  logic          d_src_v   [N][K];
  logic [IW-1:0] d_src_dst [N][K];
  logic          d_dst_v   [N][K];
  logic [IW-1:0] d_dst_src [N][K];

  tdm_resv_net #(.N(N), .K(K)) u_dist (
    .clk        (clk),
    .rst_n      (rst_n),
    .req_valid  (d_req_valid && ctrl_mode == CTRL_DISTRIBUTED),
    .req_ready  (d_req_ready),
    .req_cancel (d_req_cancel),
    .req_src    (d_req_src),
    .req_dst    (d_req_dst),
    .req_ts     (d_req_ts),
    .rsp_valid  (d_rsp_valid),
    .rsp_src    (d_rsp_src),
    .rsp_status (d_rsp_status),
    .rsp_slot   (d_rsp_slot),
    .cur_slot   (cur_slot),
    .slot_last  (slot_last),
    .ctrl_en    (d_ctrl_en),
    .ctrl_set   (d_ctrl_set),
    .src_v      (d_src_v),
    .src_dst    (d_src_dst),
    .dst_v      (d_dst_v),
    .dst_src    (d_dst_src),
    .lock_wait  (d_lock_wait),
    .aval       (d_aval)
  );

  // ---------------------------------------------------------------- network
  logic ctrl_en  [NS][NSW];
  logic ctrl_set [NS][NSW];

  always_comb begin
    for (int unsigned g = 0; g < NS; g++)
      for (int unsigned w = 0; w < NSW; w++) begin
        ctrl_en[g][w]  = (ctrl_mode == CTRL_DISTRIBUTED) ? d_ctrl_en[g][w]
                                                         : c_ctrl_en[g][w];
        ctrl_set[g][w] = (ctrl_mode == CTRL_DISTRIBUTED) ? d_ctrl_set[g][w]
                                                         : c_ctrl_set[g][w];
      end
  end

  assign net_ready = (ctrl_mode == CTRL_DISTRIBUTED) ? 1'b1 : c_net_ready;

  logic [DW:0] in_link  [N];
  logic [DW:0] out_link [N];

  tdm_min #(.N(N), .K(K), .W(DW + 1)) u_min (
    .clk         (clk),
    .rst_n       (rst_n),
    .step        (slot_last),
    .shift_nload (c_shift_nload),
    .load_bits   (c_load_bits),
    .mcl         (timer_restart ? timer_mcl : mcl),
    .ctrl_en     (ctrl_en),
    .ctrl_set    (ctrl_set),
    .in_link     (in_link),
    .out_link    (out_link),
    .sw_state    (sw_state)
  );

  // ------------------------------------------------------------------ ports
  for (genvar i = 0; i < N; i++) begin : g_port
    logic          tv_s [K];
    logic [IW-1:0] td_s [K];
    logic          tv_d [K];
    logic [IW-1:0] ts_d [K];

    always_comb begin
      for (int unsigned k = 0; k < K; k++) begin
        tv_s[k] = (ctrl_mode == CTRL_DISTRIBUTED) ? d_src_v[i][k]   : c_src_v[i][k];
        td_s[k] = (ctrl_mode == CTRL_DISTRIBUTED) ? d_src_dst[i][k] : c_src_dst[i][k];
        tv_d[k] = (ctrl_mode == CTRL_DISTRIBUTED) ? d_dst_v[i][k]   : c_dst_v[i][k];
        ts_d[k] = (ctrl_mode == CTRL_DISTRIBUTED) ? d_dst_src[i][k] : c_dst_src[i][k];
      end
    end

    tdm_src_port #(.N(N), .K(K), .DW(DW)) u_src (
      .net_ready (net_ready),
      .cur_slot  (cur_slot),
      .tab_v     (tv_s),
      .tab_dst   (td_s),
      .msg_valid (msg_valid[i]),
      .msg_dst   (msg_dst[i]),
      .msg_data  (msg_data[i]),
      .msg_ready (msg_ready[i]),
      .has_path  (has_path[i]),
      .link_out  (in_link[i])
    );

    tdm_dst_port #(.N(N), .K(K), .DW(DW)) u_dst (
      .clk      (clk),
      .rst_n    (rst_n),
      .cur_slot (cur_slot),
      .tab_v    (tv_d),
      .tab_src  (ts_d),
      .link_in  (out_link[i]),
      .rx_valid (rx_valid[i]),
      .rx_src   (rx_src[i]),
      .rx_data  (rx_data[i]),
      .rx_stray (rx_stray[i])
    );
  end

endmodule
