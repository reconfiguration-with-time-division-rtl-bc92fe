// tb_tdm_central_ctrl - checks the centralized reconfiguration controller.
//  1. Composition of the 12 requests of the worked example (variable cycle
//     length) must give the two mappings of the example, in request order:
//     M1 = {(0,1),(1,0),(2,3),(3,2),(4,5),(5,4),(6,7),(7,6)},
//     M2 = {(1,3),(2,1),(5,6),(7,5)}; APPLY must load the example's
//     switch-setting arrays (every specified entry) and a cycle length of 2.
//  2. A duplicated request lands in a further mapping.
//  3. Fixed cycle length: a request compatible with an existing mapping is
//     programmed with control_enable in the last clock of that slot, within
//     one multiplexing cycle; one compatible with none is BLOCKED.
//  4. RELEASE of an existing and of a missing path.
// Conflicts are judged by the testbench's own route tracer.
module tb_tdm_central_ctrl
  import tdm_pkg::*;
;
  localparam int unsigned N = 8, K = 8, NS = 3, NSW = 4;
  localparam int unsigned IW = 3, SW = 3, MW = 4, SLOT = 3;

  logic          clk = 0, rst_n = 0;
  logic          req_valid = 0, req_ready, req_var_mcl = 0;
  ctrl_op_e      req_op = OP_ESTABLISH;
  logic [IW-1:0] req_src = 0, req_dst = 0;
  logic          rsp_valid;
  ctrl_status_e  rsp_status;
  logic [SW-1:0] rsp_slot;
  logic [MW-1:0] rsp_mcl;
  logic [SW-1:0] cur_slot = 0;
  logic          slot_last;
  logic [MW-1:0] mcl = MW'(K);
  logic          timer_restart;
  logic [MW-1:0] timer_mcl;
  logic          ctrl_en  [NS][NSW];
  logic          ctrl_set [NS][NSW];
  logic          shift_nload;
  logic [K-1:0]  load_bits [NS][NSW];
  logic          src_v   [N][K];
  logic [IW-1:0] src_dst [N][K];
  logic          dst_v   [N][K];
  logic [IW-1:0] dst_src [N][K];
  logic          net_ready;

  int checks = 0, failures = 0;
  int cyc = 0;

  tdm_central_ctrl #(.N(N), .K(K)) dut (.*);

  always #5 clk = ~clk;

  // slot timer model
  assign slot_last = (cyc == SLOT - 1);
  always @(posedge clk) begin
    if (timer_restart) begin
      cyc <= 0; cur_slot <= 0; mcl <= timer_mcl;
    end else if (cyc == SLOT - 1) begin
      cyc <= 0;
      cur_slot <= (int'(cur_slot) + 1 >= int'(mcl)) ? '0 : cur_slot + 1'b1;
    end else cyc <= cyc + 1;
  end

  // route tracer: switch and state of path s->d at stage st
  function automatic void trace(int s, int d, int st, output int sw, output int state);
    int line = s;
    for (int t = 1; t <= st; t++) begin
      int b = NS - t;
      int lo = line & ((1 << b) - 1);
      sw = ((line >> (b + 1)) << b) | lo;
      state = ((line >> b) & 1) ^ ((d >> b) & 1);
      line = (line & ~(1 << b)) | (d & (1 << b));
    end
  endfunction

  function automatic bit conflict(int s1, int d1, int s2, int d2);
    int w1, x1, w2, x2;
    if (s1 == s2) return 1;
    for (int st = 1; st <= NS; st++) begin
      trace(s1, d1, st, w1, x1);
      trace(s2, d2, st, w2, x2);
      if (w1 == w2 && x1 != x2) return 1;
    end
    return 0;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  task automatic request(ctrl_op_e op, bit var_mcl, int s, int d,
                         output ctrl_status_e st, output int slot, output int cycles);
    @(negedge clk);
    req_valid = 1; req_op = op; req_var_mcl = var_mcl;
    req_src = IW'(s); req_dst = IW'(d);
    @(posedge clk); #1;
    req_valid = 0;
    cycles = 0;
    while (!rsp_valid) begin @(posedge clk); #1; cycles++; end
    st = rsp_status; slot = rsp_slot;
  endtask

  int e [12][2] = '{'{0,1},'{1,0},'{1,3},'{2,1},'{2,3},'{3,2},
                    '{4,5},'{5,4},'{5,6},'{6,7},'{7,5},'{7,6}};
  int e_slot [12] = '{0,0,1,1,0,0,0,0,1,0,1,0};
  int ss1 [4][3] = '{'{0,0,1}, '{0,0,1}, '{0,0,1}, '{0,0,1}};
  int ss2 [4][3] = '{'{2,1,1}, '{0,1,0}, '{0,2,0}, '{0,1,1}};

  ctrl_status_e st;
  int slot, cycles, w, x;
  bit seen_prog;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(net_ready && req_ready, "ready after reset");

    // 1. composition of the example
    foreach (e[p]) begin
      request(OP_ESTABLISH, 1, e[p][0], e[p][1], st, slot, cycles);
      check(st == ST_OK && slot == e_slot[p],
            $sformatf("compose (%0d,%0d) -> slot %0d, expected %0d", e[p][0], e[p][1], slot, e_slot[p]));
    end
    check(!net_ready, "net_ready low before APPLY");
    foreach (e[p])
      check(src_v[e[p][0]][e_slot[p]] && src_dst[e[p][0]][e_slot[p]] == IW'(e[p][1]) &&
            dst_v[e[p][1]][e_slot[p]] && dst_src[e[p][1]][e_slot[p]] == IW'(e[p][0]),
            "port tables after composition");
    // apply: check the parallel load bits in the load cycle
    @(negedge clk);
    req_valid = 1; req_op = OP_APPLY; req_var_mcl = 1;
    @(posedge clk); #1;
    req_valid = 0;
    check(!shift_nload && timer_restart && timer_mcl == 2, "APPLY loads with cycle length 2");
    for (int sw = 0; sw < 4; sw++)
      for (int g = 0; g < 3; g++) begin
        if (ss1[sw][g] != 2) check(load_bits[g][sw][0] == ss1[sw][g][0], $sformatf("SS_M1[%0d,%0d]", sw, g + 1));
        if (ss2[sw][g] != 2) check(load_bits[g][sw][1] == ss2[sw][g][0], $sformatf("SS_M2[%0d,%0d]", sw, g + 1));
      end
    @(posedge clk); #1;
    check(rsp_valid && rsp_status == ST_OK && rsp_mcl == 2 && net_ready, "APPLY response");
    repeat (2) @(posedge clk);

    // 2. duplicate of (0,1): source 0 busy in M1 and M2? M2 has no source 0
    request(OP_ESTABLISH, 1, 0, 1, st, slot, cycles);
    check(st == ST_OK && slot == (conflict(0, 1, 1, 3) || conflict(0, 1, 2, 1) ||
                                  conflict(0, 1, 5, 6) || conflict(0, 1, 7, 5) ? 2 : 1),
          $sformatf("duplicate (0,1) in a further mapping, got %0d", slot));
    request(OP_RELEASE, 1, 0, 1, st, slot, cycles);
    check(st == ST_OK && slot == 0, "release removes the lowest copy");
    request(OP_RELEASE, 1, 0, 1, st, slot, cycles);
    check(st == ST_OK && slot != 0, "release second copy");
    request(OP_ESTABLISH, 1, 0, 1, st, slot, cycles);
    check(st == ST_OK && slot == 0, "re-establish (0,1) in M1");
    @(negedge clk);
    req_valid = 1; req_op = OP_APPLY;
    @(posedge clk); #1; req_valid = 0;
    @(posedge clk); #1;
    check(rsp_valid && rsp_mcl == 2, "second APPLY, cycle length 2");

    // 3. fixed cycle length 2: (0,2) and (6,4)
    begin
      int exp;
      exp = -1;
      if (!conflict(0, 2, 1, 3) && !conflict(0, 2, 2, 1) && !conflict(0, 2, 5, 6) && !conflict(0, 2, 7, 5))
        exp = 1;
      fork
        request(OP_ESTABLISH, 0, 0, 2, st, slot, cycles);
        begin
          seen_prog = 0;
          repeat (3 * 2 * SLOT + 6) begin
            @(posedge clk); #1;
            for (int g = 0; g < NS; g++)
              for (int sw2 = 0; sw2 < NSW; sw2++)
                if (ctrl_en[g][sw2]) begin
                  trace(0, 2, g + 1, w, x);
                  if (!seen_prog) seen_prog = 1;
                  check(sw2 == w && ctrl_set[g][sw2] == x[0] && slot_last && cur_slot == 1,
                        "control_enable on the path's switch in the last clock of slot 1");
                end
          end
        end
      join
      if (exp == 1) begin
        check(st == ST_OK && slot == 1, "(0,2) joins M2");
        check(seen_prog, "switches programmed");
        check(cycles <= 2 * SLOT + 2, $sformatf("programmed within one cycle (%0d clocks)", cycles));
      end else begin
        check(st == ST_BLOCKED, "(0,2) blocked");
      end
    end
    // (1,2): source 1 is busy in M1 and M2 -> blocked with cycle length 2
    request(OP_ESTABLISH, 0, 1, 2, st, slot, cycles);
    check(st == ST_BLOCKED, "(1,2) blocked at fixed cycle length");
    // 4. release
    request(OP_RELEASE, 0, 3, 0, st, slot, cycles);
    check(st == ST_NOT_FOUND, "release of a missing path");
    request(OP_RELEASE, 0, 7, 5, st, slot, cycles);
    check(st == ST_OK && slot == 1 && !src_v[7][1], "release (7,5)");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
