// tb_tdm_resv_net - checks the distributed reservation/cancellation network.
//  1. Sequential reservations from source 0 to every destination get slots
//     0..7 in order (lowest slot free on the whole path); the ninth is
//     BLOCKED because the input port has no free slot left, and leaves every
//     list unchanged (its locks are released: later packets pass).
//  2. Cancellation with a wrong slot is NOT_FOUND; with the right one it
//     returns the slot to every port on the path, and a new reservation gets
//     it back.
//  3. Seven packets from sources 1..7 to destination 2, injected back to
//     back, compete for the same ports: some must wait at a lock. Afterwards no two paths reserved for the same slot
//     share a port, each port's list is exactly the complement of the slots
//     reserved through it, the port tables list every path, and the switch
//     states recorded through control_enable route every path.
// Paths are traced by the testbench itself.
module tb_tdm_resv_net
  import tdm_pkg::*;
;
  localparam int unsigned N = 8, K = 8, NS = 3, NSW = 4, IW = 3, SW = 3, SLOT = 2;

  logic          clk = 0, rst_n = 0;
  logic          req_valid = 0, req_ready, req_cancel = 0;
  logic [IW-1:0] req_src = 0, req_dst = 0;
  logic [SW-1:0] req_ts = 0;
  logic          rsp_valid;
  logic [IW-1:0] rsp_src;
  ctrl_status_e  rsp_status;
  logic [SW-1:0] rsp_slot;
  logic [SW-1:0] cur_slot = 0;
  logic          slot_last;
  logic          ctrl_en  [NS][NSW];
  logic          ctrl_set [NS][NSW];
  logic          src_v   [N][K];
  logic [IW-1:0] src_dst [N][K];
  logic          dst_v   [N][K];
  logic [IW-1:0] dst_src [N][K];
  logic          lock_wait;
  logic [K-1:0]  aval [NS+1][N];

  int checks = 0, failures = 0;
  int cyc = 0;
  int lock_waits = 0;

  tdm_resv_net #(.N(N), .K(K)) dut (.*);

  always #5 clk = ~clk;

  assign slot_last = (cyc == SLOT - 1);
  always @(posedge clk) begin
    if (cyc == SLOT - 1) begin cyc <= 0; cur_slot <= cur_slot + 1'b1; end
    else cyc <= cyc + 1;
  end

  // switch states recorded through control_enable: [slot][stage][switch]
  int rec [K][NS][NSW];
  always @(posedge clk) begin
    if (rst_n) begin
      if (lock_wait) lock_waits++;
      for (int g = 0; g < NS; g++)
        for (int w = 0; w < NSW; w++)
          if (ctrl_en[g][w]) begin
            checks++;
            if (!slot_last) begin failures++; $display("FAIL programming outside last clock"); end
            rec[cur_slot][g][w] = ctrl_set[g][w];
          end
    end
  end

  // port lines of path s->d: level 0 = s, level t = after stage t
  function automatic int port_line(int s, int d, int h);
    int line = s;
    for (int t = 1; t <= h; t++) begin
      int b = NS - t;
      line = (line & ~(1 << b)) | (d & (1 << b));
    end
    return line;
  endfunction

  function automatic int sw_of(int s, int d, int st, output int state);
    int line = port_line(s, d, st - 1);
    int b = NS - st;
    state = ((line >> b) & 1) ^ ((d >> b) & 1);
    return ((line >> (b + 1)) << b) | (line & ((1 << b) - 1));
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // established paths: est[s][k] = destination or -1
  int est [N][K];

  task automatic send(bit cancel, int s, int d, int ts);
    @(negedge clk);
    while (!req_ready || req_src != IW'(s)) begin
      req_src = IW'(s);
      #1;
      if (!req_ready) @(negedge clk);
    end
    req_valid = 1; req_cancel = cancel; req_src = IW'(s); req_dst = IW'(d); req_ts = SW'(ts);
    @(posedge clk); #1;
    req_valid = 0;
  endtask

  task automatic wait_rsp(int s, output ctrl_status_e st, output int slot);
    while (!(rsp_valid && rsp_src == IW'(s))) begin @(posedge clk); #1; end
    st = rsp_status; slot = rsp_slot;
    @(posedge clk); #1;
  endtask

  task automatic check_invariants(string tag);
    for (int h = 0; h <= NS; h++)
      for (int a = 0; a < N; a++)
        for (int k = 0; k < K; k++) begin
          int users = 0;
          for (int s = 0; s < N; s++)
            if (est[s][k] >= 0 && port_line(s, est[s][k], h) == a) users++;
          check(users <= 1, $sformatf("%s: port %0d/%0d shared in slot %0d", tag, h, a, k));
          check(aval[h][a][k] == (users == 0), $sformatf("%s: AVAL of port %0d/%0d slot %0d", tag, h, a, k));
        end
    for (int s = 0; s < N; s++)
      for (int k = 0; k < K; k++) begin
        check(src_v[s][k] == (est[s][k] >= 0) && (est[s][k] < 0 || src_dst[s][k] == IW'(est[s][k])),
              $sformatf("%s: source table %0d slot %0d", tag, s, k));
        if (est[s][k] >= 0) begin
          check(dst_v[est[s][k]][k] && dst_src[est[s][k]][k] == IW'(s),
                $sformatf("%s: destination table %0d slot %0d", tag, est[s][k], k));
          for (int st = 1; st <= NS; st++) begin
            int x, w;
            w = sw_of(s, est[s][k], st, x);
            check(rec[k][st - 1][w] == x, $sformatf("%s: switch state of %0d->%0d slot %0d stage %0d",
                                                     tag, s, est[s][k], k, st));
          end
        end
      end
  endtask

  ctrl_status_e st;
  int slot;
  int dsts [8] = '{1, 0, 2, 3, 4, 5, 6, 7};

  initial begin
    for (int s = 0; s < N; s++) for (int k = 0; k < K; k++) est[s][k] = -1;
    for (int k = 0; k < K; k++) for (int g = 0; g < NS; g++) for (int w = 0; w < NSW; w++) rec[k][g][w] = -1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // 1. sequential reservations from source 0
    foreach (dsts[p]) begin
      send(0, 0, dsts[p], 0);
      wait_rsp(0, st, slot);
      check(st == ST_OK && slot == p, $sformatf("reserve 0->%0d got slot %0d status %0d", dsts[p], slot, st));
      if (st == ST_OK) est[0][slot] = dsts[p];
    end
    send(0, 0, 3, 0);
    wait_rsp(0, st, slot);
    check(st == ST_BLOCKED, "ninth reservation from source 0 blocked");
    check_invariants("sequential");

    // 2. cancellation
    send(1, 0, 3, 2);
    wait_rsp(0, st, slot);
    check(st == ST_NOT_FOUND, "cancel with wrong slot");
    send(1, 0, 3, 3);
    wait_rsp(0, st, slot);
    check(st == ST_OK, "cancel 0->3 slot 3");
    est[0][3] = -1;
    check_invariants("after cancel");
    send(0, 0, 6, 0);
    wait_rsp(0, st, slot);
    check(st == ST_OK && slot == 3, $sformatf("slot 3 reused, got %0d", slot));
    if (st == ST_OK) est[0][slot] = 6;

    // 3. concurrent packets from sources 1..7
    fork
      begin
        for (int s = 1; s < N; s++) send(0, s, 2, 0);
      end
      begin
        for (int n = 0; n < N - 1; n++) begin
          while (!rsp_valid) begin @(posedge clk); #1; end
          if (rsp_status == ST_OK) est[rsp_src][rsp_slot] = 2;
          else check(0, $sformatf("concurrent reservation of %0d failed", rsp_src));
          @(posedge clk); #1;
        end
      end
    join
    check(lock_waits > 0, "some packet waited at a lock");
    check_invariants("concurrent");
    $display("lock waits: %0d", lock_waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
