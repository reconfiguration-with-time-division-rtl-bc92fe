// tb_tdm_top - end-to-end test of the TDM-MIN at its default size (8 x 8,
// 8-slot registers, 4 clocks per slot), with processors modelled by
// per-source message queues and a scoreboard on every output.
//
// Central control:
//  * composes the worked example's request set (12 paths) into two mappings,
//    APPLYs it (parallel reload of all switch registers) and sends messages
//    on every path; each word must reach its destination, named with the
//    right sender, and only in the slot of its path;
//  * checks the bandwidth of a single path: words of 6->7 leave only in
//    slot 0, SLOT_CYCLES per multiplexing cycle, gaps (mcl-1)*SLOT_CYCLES+1;
//  * adds (0,2) incrementally at fixed cycle length (programmed through
//    control-set), has (1,2) BLOCKED, releases (7,5);
//  * duplicates (0,1) (non-uniform bandwidth): after APPLY the cycle length
//    is 3 and 0->1 is served in two slots of it.
// Distributed control (after a reset):
//  * seven sources reserve paths to destination 2 at once (lock waits), a
//    duplicate that finds no slot left at the output is BLOCKED, traffic is
//    delivered, one path is cancelled and then has no slot.
// Every mechanism is counted and must have happened at least once.
module tb_tdm_top
  import tdm_pkg::*;
;
  localparam int unsigned N = 8, K = 8, DW = 8, SLOT_CYCLES = 4;
  localparam int unsigned NS = 3, NSW = 4, IW = 3, SW = 3, MW = 4;

  logic          clk = 0, rst_n = 0;
  ctrl_mode_e    ctrl_mode = CTRL_CENTRAL;
  logic          c_req_valid = 0, c_req_ready, c_req_var_mcl = 0;
  ctrl_op_e      c_req_op = OP_ESTABLISH;
  logic [IW-1:0] c_req_src = 0, c_req_dst = 0;
  logic          c_rsp_valid;
  ctrl_status_e  c_rsp_status;
  logic [SW-1:0] c_rsp_slot;
  logic [MW-1:0] c_rsp_mcl;
  logic          d_req_valid = 0, d_req_ready, d_req_cancel = 0;
  logic [IW-1:0] d_req_src = 0, d_req_dst = 0;
  logic [SW-1:0] d_req_ts = 0;
  logic          d_rsp_valid;
  logic [IW-1:0] d_rsp_src;
  ctrl_status_e  d_rsp_status;
  logic [SW-1:0] d_rsp_slot;
  logic          d_lock_wait;
  logic [K-1:0]  d_aval [NS+1][N];
  logic          msg_valid [N];
  logic [IW-1:0] msg_dst   [N];
  logic [DW-1:0] msg_data  [N];
  logic          msg_ready [N];
  logic          has_path  [N];
  logic          rx_valid  [N];
  logic [IW-1:0] rx_src    [N];
  logic [DW-1:0] rx_data   [N];
  logic          rx_stray  [N];
  logic [SW-1:0] cur_slot;
  logic          slot_start;
  logic [MW-1:0] mcl;
  logic          net_ready;
  logic          sw_state [NS][NSW];

  tdm_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // ------------------------------------------------------ mechanism counts
  int n_compose = 0, n_apply = 0, n_incr_prog = 0, n_c_blocked = 0,
      n_release = 0, n_wait_slot = 0, n_dup = 0, n_d_reserve = 0,
      n_lock_wait = 0, n_d_blocked = 0, n_d_cancel = 0, n_delivered = 0;

  // ---------------------------------------------------- processors, queues
  int unsigned q_dst  [N][$];
  int unsigned q_data [N][$];
  int unsigned sb     [N][N][$];     // expected words per (src, dst)
  logic [7:0]  data_ctr = 0;
  // sends of one watched path
  int watch_src = -1, watch_dst = -1;
  longint watch_t [$];
  int unsigned watch_slot [$];
  longint now = 0;

  always @(negedge clk) begin
    for (int i = 0; i < N; i++) begin
      msg_valid[i] = q_dst[i].size() > 0;
      msg_dst[i]   = msg_valid[i] ? IW'(q_dst[i][0]) : '0;
      msg_data[i]  = msg_valid[i] ? DW'(q_data[i][0]) : '0;
    end
  end

  always @(posedge clk) begin
    now++;
    if (rst_n) begin
      if (d_lock_wait) n_lock_wait++;
      // receivers: words registered at the previous edge
      for (int j = 0; j < N; j++) begin
        check(!rx_stray[j], $sformatf("stray word at output %0d", j));
        if (rx_valid[j]) begin
          automatic int s = int'(rx_src[j]);
          if (sb[s][j].size() == 0) begin
            check(0, $sformatf("unexpected word %h at %0d from %0d", rx_data[j], j, s));
          end else begin
            check(rx_data[j] == DW'(sb[s][j][0]),
                  $sformatf("word %0d->%0d: got %h expected %h", s, j, rx_data[j], sb[s][j][0]));
            void'(sb[s][j].pop_front());
            n_delivered++;
          end
        end
      end
      // senders
      for (int i = 0; i < N; i++) begin
        if (msg_valid[i] && msg_ready[i]) begin
          sb[i][msg_dst[i]].push_back(int'(msg_data[i]));
          if (i == watch_src && int'(msg_dst[i]) == watch_dst) begin
            watch_t.push_back(now);
            watch_slot.push_back(int'(cur_slot));
          end
          void'(q_dst[i].pop_front());
          void'(q_data[i].pop_front());
        end else if (msg_valid[i] && has_path[i]) begin
          n_wait_slot++;
        end
      end
    end
  end

  task automatic post(int s, int d, int count);
    for (int c = 0; c < count; c++) begin
      q_dst[s].push_back(d);
      q_data[s].push_back(int'(data_ctr));
      data_ctr++;
    end
  endtask

  task automatic drain(int max_clocks);
    int t = 0;
    bit busy = 1;
    while (busy && t < max_clocks) begin
      @(posedge clk); t++;
      busy = 0;
      for (int i = 0; i < N; i++) if (q_dst[i].size() > 0) busy = 1;
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) if (sb[i][j].size() > 0) busy = 1;
    end
    check(!busy, "all messages delivered");
  endtask

  // ------------------------------------------------------ controller access
  task automatic c_request(ctrl_op_e op, bit var_mcl, int s, int d,
                           output ctrl_status_e st, output int slot);
    @(negedge clk);
    while (!c_req_ready) @(negedge clk);
    c_req_valid = 1; c_req_op = op; c_req_var_mcl = var_mcl;
    c_req_src = IW'(s); c_req_dst = IW'(d);
    @(negedge clk);
    c_req_valid = 0;
    while (!c_rsp_valid) @(negedge clk);
    st = c_rsp_status; slot = int'(c_rsp_slot);
  endtask

  // Called at a falling edge; back-to-back calls inject one packet a clock.
  task automatic d_request(bit cancel, int s, int d, int ts);
    d_req_src = IW'(s);
    #1;
    while (!d_req_ready) begin @(negedge clk); #1; end
    d_req_valid = 1; d_req_cancel = cancel; d_req_dst = IW'(d); d_req_ts = SW'(ts);
    @(negedge clk);
    d_req_valid = 0;
  endtask

  int e [12][2] = '{'{0,1},'{1,0},'{1,3},'{2,1},'{2,3},'{3,2},
                    '{4,5},'{5,4},'{5,6},'{6,7},'{7,5},'{7,6}};
  int e_slot [12] = '{0,0,1,1,0,0,0,0,1,0,1,0};

  ctrl_status_e st;
  int slot;
  int d_ok [N];

  initial begin
    for (int i = 0; i < N; i++) begin msg_valid[i] = 0; msg_dst[i] = 0; msg_data[i] = 0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // ================================================= central control
    foreach (e[p]) begin
      c_request(OP_ESTABLISH, 1, e[p][0], e[p][1], st, slot);
      check(st == ST_OK && slot == e_slot[p], $sformatf("compose (%0d,%0d): slot %0d", e[p][0], e[p][1], slot));
      n_compose++;
    end
    c_request(OP_APPLY, 1, 0, 0, st, slot);
    check(st == ST_OK && c_rsp_mcl == 2, "APPLY: cycle length 2");
    n_apply++;
    @(negedge clk);
    check(mcl == 2 && net_ready, "network running with two mappings");

    foreach (e[p]) post(e[p][0], e[p][1], 5);
    drain(400);

    // bandwidth of one path: 6->7 lives in slot 0 only
    watch_src = 6; watch_dst = 7;
    post(6, 7, 16);
    drain(400);
    check(watch_t.size() == 16, "16 words of 6->7 sent");
    foreach (watch_t[p]) begin
      check(watch_slot[p] == 0, "6->7 sent in slot 0 only");
      if (p > 0)
        check(watch_t[p] - watch_t[p-1] == 1 ||
              watch_t[p] - watch_t[p-1] == longint'((2 - 1) * SLOT_CYCLES + 1),
              $sformatf("6->7 gap %0d clocks", watch_t[p] - watch_t[p-1]));
    end
    watch_src = -1;

    // incremental, fixed cycle length: (0,2) joins M2 through control-set
    c_request(OP_ESTABLISH, 0, 0, 2, st, slot);
    check(st == ST_OK && slot == 1, "(0,2) added to M2");
    if (st == ST_OK) n_incr_prog++;
    post(0, 2, 6);
    post(2, 3, 3);
    post(1, 3, 3);
    drain(400);
    c_request(OP_ESTABLISH, 0, 1, 2, st, slot);
    check(st == ST_BLOCKED, "(1,2) blocked at cycle length 2");
    if (st == ST_BLOCKED) n_c_blocked++;
    c_request(OP_RELEASE, 0, 7, 5, st, slot);
    check(st == ST_OK && slot == 1, "release (7,5)");
    if (st == ST_OK) n_release++;
    q_dst[7].push_back(5); q_data[7].push_back(32'hEE);
    @(negedge clk);
    @(negedge clk); #1;
    check(!has_path[7], "7->5 has no slot after release");
    void'(q_dst[7].pop_front()); void'(q_data[7].pop_front());

    // duplicate (0,1): second copy of the path for double bandwidth
    c_request(OP_ESTABLISH, 1, 0, 1, st, slot);
    check(st == ST_OK && slot == 2, $sformatf("duplicate (0,1) in mapping %0d", slot));
    c_request(OP_APPLY, 1, 0, 0, st, slot);
    check(c_rsp_mcl == 3, "cycle length 3 after duplicate");
    n_dup++; n_apply++;
    watch_src = 0; watch_dst = 1;
    watch_t.delete(); watch_slot.delete();
    post(0, 1, 24);
    foreach (e[p]) if (e[p][0] != 0 && !(e[p][0] == 7 && e[p][1] == 5)) post(e[p][0], e[p][1], 2);
    drain(600);
    begin
      automatic bit s0 = 0, s2 = 0;
      foreach (watch_slot[p]) begin
        if (watch_slot[p] == 0) s0 = 1;
        if (watch_slot[p] == 2) s2 = 1;
        check(watch_slot[p] == 0 || watch_slot[p] == 2, "0->1 only in its two slots");
      end
      check(s0 && s2, "0->1 served in both of its slots");
    end
    watch_src = -1;

    // ============================================= distributed control
    @(negedge clk);
    rst_n = 0;
    ctrl_mode = CTRL_DISTRIBUTED;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < N; s++) d_ok[s] = -1;
    fork
      for (int s = 1; s < N; s++) d_request(0, s, 2, 0);
      begin
        automatic int got = 0;
        while (got < N - 1) begin
          @(negedge clk);
          if (d_rsp_valid) begin
            got++;
            check(d_rsp_status == ST_OK, $sformatf("reservation %0d->2", d_rsp_src));
            if (d_rsp_status == ST_OK) begin d_ok[d_rsp_src] = int'(d_rsp_slot); n_d_reserve++; end
          end
        end
      end
    join
    check(n_lock_wait > 0, "reservations waited at a lock");
    d_request(0, 0, 2, 0);
    while (!d_rsp_valid) @(negedge clk);
    check(d_rsp_status == ST_OK, "eighth reservation at output 2");
    d_request(0, 3, 2, 0);
    while (!d_rsp_valid) @(negedge clk);
    check(d_rsp_status == ST_BLOCKED, "ninth reservation at output 2 blocked");
    if (d_rsp_status == ST_BLOCKED) n_d_blocked++;
    for (int s = 0; s < N; s++) post(s, 2, 3);
    drain(800);
    @(negedge clk);
    d_request(1, 4, 2, d_ok[4]);
    while (!d_rsp_valid) @(negedge clk);
    check(d_rsp_status == ST_OK, "cancel 4->2");
    if (d_rsp_status == ST_OK) n_d_cancel++;
    q_dst[4].push_back(2); q_data[4].push_back(32'hEE);
    @(negedge clk); #1;
    check(!has_path[4], "4->2 has no slot after cancellation");
    void'(q_dst[4].pop_front()); void'(q_data[4].pop_front());
    check(d_aval[0][4][d_ok[4]] && d_aval[NS][2][d_ok[4]], "slot returned to the ports");

    // ================================================== mechanisms seen
    check(n_compose > 0,   "mechanism: composition");
    check(n_apply > 1,     "mechanism: parallel reload");
    check(n_incr_prog > 0, "mechanism: incremental control-set programming");
    check(n_c_blocked > 0, "mechanism: blocked request (fixed cycle length)");
    check(n_release > 0,   "mechanism: release");
    check(n_wait_slot > 0, "mechanism: message held until its slot");
    check(n_dup > 0,       "mechanism: duplicated request");
    check(n_d_reserve > 0, "mechanism: distributed reservation");
    check(n_lock_wait > 0, "mechanism: port lock wait");
    check(n_d_blocked > 0, "mechanism: distributed reservation blocked");
    check(n_d_cancel > 0,  "mechanism: cancellation");
    check(n_delivered > 0, "mechanism: delivery");
    $display("compose=%0d apply=%0d incr=%0d blocked=%0d release=%0d wait_slot=%0d dup=%0d",
             n_compose, n_apply, n_incr_prog, n_c_blocked, n_release, n_wait_slot, n_dup);
    $display("d_reserve=%0d lock_wait=%0d d_blocked=%0d d_cancel=%0d delivered=%0d",
             n_d_reserve, n_lock_wait, n_d_blocked, n_d_cancel, n_delivered);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
