// tb_tdm_embed - embeds regular interconnection patterns in the TDM-MIN at
// its default size (8 x 8, 8-slot registers) and runs traffic on them.
//
// For each pattern the paths are handed to the central controller in a
// fixed order with variable cycle length (static composition), the result is
// APPLYed, and every path then carries two words, which must arrive at the
// right output with the right sender. The cycle lengths expected are the
// known embedding results for these patterns:
//   ring (i -> i+1 and i -> i-1 mod 8)        2 mappings
//   binary 3-cube (i -> i xor 2**k, k=0..2)   3 mappings
//   completely connected, self paths included 8 mappings (= N)
// The expected mapping of each path is worked out independently here (paths
// are listed so that each group of 8 forms one conflict-free permutation).
// A controller reset separates the patterns.
module tb_tdm_embed
  import tdm_pkg::*;
;
  localparam int unsigned N = 8, K = 8, DW = 8;
  localparam int unsigned NS = 3, NSW = 4, IW = 3, SW = 3, MW = 4;

  logic          clk = 0, rst_n = 0;
  ctrl_mode_e    ctrl_mode = CTRL_CENTRAL;
  logic          c_req_valid = 0, c_req_ready, c_req_var_mcl = 1;
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

  int unsigned q_dst  [N][$];
  int unsigned q_data [N][$];
  int unsigned sb     [N][N][$];
  logic [7:0]  data_ctr = 0;
  int          delivered = 0;

  always @(negedge clk) begin
    for (int i = 0; i < N; i++) begin
      msg_valid[i] = q_dst[i].size() > 0;
      msg_dst[i]   = msg_valid[i] ? IW'(q_dst[i][0]) : '0;
      msg_data[i]  = msg_valid[i] ? DW'(q_data[i][0]) : '0;
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      for (int j = 0; j < N; j++) begin
        check(!rx_stray[j], $sformatf("stray word at output %0d", j));
        if (rx_valid[j]) begin
          automatic int s = int'(rx_src[j]);
          if (sb[s][j].size() == 0) begin
            check(0, $sformatf("unexpected word %h at %0d from %0d", rx_data[j], j, s));
          end else begin
            check(rx_data[j] == DW'(sb[s][j][0]), $sformatf("word %0d->%0d", s, j));
            void'(sb[s][j].pop_front());
            delivered++;
          end
        end
      end
      for (int i = 0; i < N; i++) begin
        if (msg_valid[i] && msg_ready[i]) begin
          sb[i][msg_dst[i]].push_back(int'(msg_data[i]));
          void'(q_dst[i].pop_front());
          void'(q_data[i].pop_front());
        end
      end
    end
  end

  task automatic c_request(ctrl_op_e op, int s, int d,
                           output ctrl_status_e st, output int slot);
    @(negedge clk);
    while (!c_req_ready) @(negedge clk);
    c_req_valid = 1; c_req_op = op;
    c_req_src = IW'(s); c_req_dst = IW'(d);
    @(negedge clk);
    c_req_valid = 0;
    while (!c_rsp_valid) @(negedge clk);
    st = c_rsp_status; slot = int'(c_rsp_slot);
  endtask

  task automatic drain(int max_clocks);
    int t;
    bit busy;
    t = 0;
    busy = 1;
    while (busy && t < max_clocks) begin
      @(posedge clk); t++;
      busy = 0;
      for (int i = 0; i < N; i++) if (q_dst[i].size() > 0) busy = 1;
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) if (sb[i][j].size() > 0) busy = 1;
    end
    check(!busy, "all messages delivered");
  endtask

  // Composes paths (groups of 8 = one permutation each), applies, runs.
  task automatic embed(string name, int src[$], int dst[$], int groups);
    ctrl_status_e st;
    int slot, base_cnt;
    @(negedge clk);
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (src[p]) begin
      c_request(OP_ESTABLISH, src[p], dst[p], st, slot);
      check(st == ST_OK && slot == p / 8,
            $sformatf("%s: path %0d->%0d in mapping %0d", name, src[p], dst[p], slot));
    end
    c_request(OP_APPLY, 0, 0, st, slot);
    check(c_rsp_mcl == MW'(groups), $sformatf("%s: cycle length %0d", name, c_rsp_mcl));
    @(negedge clk);
    check(mcl == MW'(groups) && net_ready, $sformatf("%s: network running", name));
    base_cnt = delivered;
    foreach (src[p])
      for (int c = 0; c < 2; c++) begin
        q_dst[src[p]].push_back(dst[p]);
        q_data[src[p]].push_back(int'(data_ctr));
        data_ctr++;
      end
    drain(2000);
    check(delivered - base_cnt == 2 * src.size(), $sformatf("%s: %0d words delivered", name,
                                                          delivered - base_cnt));
    $display("%s: %0d paths in %0d mappings, %0d words delivered", name, src.size(),
             groups, delivered - base_cnt);
  endtask

  int src [$], dst [$];

  initial begin
    for (int i = 0; i < N; i++) begin msg_valid[i] = 0; msg_dst[i] = 0; msg_data[i] = 0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // ring, both directions
    src.delete(); dst.delete();
    for (int i = 0; i < N; i++) begin src.push_back(i); dst.push_back((i + 1) % N); end
    for (int i = 0; i < N; i++) begin src.push_back(i); dst.push_back((i + N - 1) % N); end
    embed("ring", src, dst, 2);

    // binary 3-cube: one dimension per mapping
    src.delete(); dst.delete();
    for (int k = 0; k < NS; k++)
      for (int i = 0; i < N; i++) begin src.push_back(i); dst.push_back(i ^ (1 << k)); end
    embed("hypercube", src, dst, 3);

    // completely connected: i -> i xor k for k = 1..7, then i -> i
    src.delete(); dst.delete();
    for (int k = 1; k <= N; k++)
      for (int i = 0; i < N; i++) begin src.push_back(i); dst.push_back(i ^ (k % N)); end
    embed("complete", src, dst, N);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
