// tdm_resv_net - distributed reservation/cancellation control of the TDM-MIN
// (fixed cycle length K).
//
// Every port of the network (the N input ports, and the output side of every
// switch, i.e. the N lines behind each of the n stages) keeps AVAL, a K-bit
// mask of the time slots not yet reserved on it, and a lock. A path s->d
// passes one port per level h = 0..n (line_after(n, h, s, d)).
//
// Reservation packet (one per source, all sources run concurrently):
//   forward:  level by level, lock the port and intersect the packet's list
//             with the port's AVAL; a port locked by another packet makes the
//             packet wait there (it stays buffered, keeping its own locks).
//             Same-cycle contention for a free port goes to the lowest source
//             number. Ports are always locked in increasing level order, so
//             waiting packets cannot deadlock.
//   fail:     if the list becomes empty, walk back and unlock every port
//             locked so far (the input port included); status BLOCKED.
//   success:  at the output port the lowest slot left in the list is chosen;
//             walking back from level n to 0 the slot is removed from each
//             port's AVAL and the port unlocked.
//   program:  in the last clock of slot ts the packet drives control_enable/
//             control_set of the n switches of the path, which records their
//             states for slot ts in the switch shift registers, updates the
//             port slot tables and reports OK with ts to the source.
// Cancellation packet: walks forward level by level; at each port it takes
// the lock for one cycle, adds ts back to AVAL and unlocks; at the end the
// slot tables are cleared and OK is reported (NOT_FOUND if the source's table
// does not hold that path in slot ts).
//
// One packet is taken per cycle through the valid/ready request port (ready
// when the source's packet engine is idle); one report leaves per cycle
// (lowest source first). The per-port lists, the lock/unlock discipline, the
// intersection and the removal/return of slots follow the design's
// algorithm; packet movement of one level per clock, the lowest-slot choice
// and the arbitration order are this design's choices. The control network
// is modelled as a separate (physically separate) network: no data link
// bandwidth is used by packets.
module tdm_resv_net
  import tdm_pkg::*;
#(
  parameter int unsigned N = 8,
  parameter int unsigned K = 8,
  localparam int unsigned NS  = $clog2(N),
  localparam int unsigned NSW = N / 2,
  localparam int unsigned IW  = $clog2(N),
  localparam int unsigned SW  = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned HW  = $clog2(NS + 2)
) (
  input  logic          clk,
  input  logic          rst_n,
  // packet injection
  input  logic          req_valid,
  output logic          req_ready,
  input  logic          req_cancel,     // 0 reservation, 1 cancellation
  input  logic [IW-1:0] req_src,
  input  logic [IW-1:0] req_dst,
  input  logic [SW-1:0] req_ts,         // slot to release (cancellation)
  // reports to the sources
  output logic          rsp_valid,
  output logic [IW-1:0] rsp_src,
  output ctrl_status_e  rsp_status,
  output logic [SW-1:0] rsp_slot,
  // slot timer
  input  logic [SW-1:0] cur_slot,
  input  logic          slot_last,
  // switch control of the network
  output logic          ctrl_en   [NS][NSW],
  output logic          ctrl_set  [NS][NSW],
  // slot tables of the ports
  output logic          src_v     [N][K],
  output logic [IW-1:0] src_dst   [N][K],
  output logic          dst_v     [N][K],
  output logic [IW-1:0] dst_src   [N][K],
  // observation
  output logic          lock_wait,      // some packet is held at a lock
  output logic [K-1:0]  aval      [NS+1][N]
);

  typedef enum logic [2:0] {
    E_IDLE, E_FWD, E_BACK_FAIL, E_BACK_COMMIT, E_PROGRAM, E_CANCEL, E_DONE
  } eng_state_e;

  eng_state_e     st    [N];
  logic [IW-1:0]  dst   [N];
  logic [HW-1:0]  lvl   [N];
  logic [K-1:0]   list  [N];
  logic [SW-1:0]  ts    [N];
  ctrl_status_e   res   [N];

  logic           lck   [NS+1][N];
  logic [IW-1:0]  owner [NS+1][N];

  // Port a packet of source e occupies at level h.
  function automatic int unsigned port_of(int unsigned e, int unsigned h,
                                          int unsigned d);
    return line_after(NS, h, e, d);
  endfunction

  // ----------------------------------------------------------- arbitration
  // grant[e]: the packet of source e wins the port it asks for this cycle.
  logic grant [N];

  always_comb begin
    logic taken [NS+1][N];
    for (int unsigned h = 0; h <= NS; h++)
      for (int unsigned a = 0; a < N; a++)
        taken[h][a] = lck[h][a];
    lock_wait = 1'b0;
    for (int unsigned e = 0; e < N; e++) begin
      automatic int unsigned h = 32'(lvl[e]);
      automatic logic [IW-1:0] a = IW'(port_of(e, h, 32'(dst[e])));
      grant[e] = 1'b0;
      if (st[e] == E_FWD || st[e] == E_CANCEL) begin
        if (!taken[h][a]) begin
          grant[e] = 1'b1;
          taken[h][a] = 1'b1;
        end else if (st[e] == E_FWD) begin
          lock_wait = 1'b1;
        end
      end
    end
  end

  // ---------------------------------------------------------- reporting
  logic          done_any;
  logic [IW-1:0] done_src;

  always_comb begin
    done_any = 1'b0;
    done_src = '0;
    for (int unsigned e = 0; e < N; e++) begin
      if (!done_any && st[e] == E_DONE) begin
        done_any = 1'b1;
        done_src = IW'(e);
      end
    end
    rsp_valid  = done_any;
    rsp_src    = done_src;
    rsp_status = res[done_src];
    rsp_slot   = ts[done_src];
    req_ready  = (st[req_src] == E_IDLE);
  end

  // ------------------------------------------------- switch programming
  logic prog [N];

  always_comb begin
    for (int unsigned e = 0; e < N; e++)
      prog[e] = (st[e] == E_PROGRAM) && (cur_slot == ts[e]) && slot_last;
    for (int unsigned g = 0; g < NS; g++) begin
      for (int unsigned w = 0; w < NSW; w++) begin
        ctrl_en[g][w]  = 1'b0;
        ctrl_set[g][w] = 1'b0;
        for (int unsigned e = 0; e < N; e++) begin
          if (prog[e] && switch_index(NS, g + 1, e, 32'(dst[e])) == w) begin
            ctrl_en[g][w]  = 1'b1;
            ctrl_set[g][w] = switch_state(NS, g + 1, e, 32'(dst[e]));
          end
        end
      end
    end
  end

  // -------------------------------------------------------------- state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned e = 0; e < N; e++) begin
        st[e]   <= E_IDLE;
        dst[e]  <= '0;
        lvl[e]  <= '0;
        list[e] <= '0;
        ts[e]   <= '0;
        res[e]  <= ST_OK;
      end
      for (int unsigned h = 0; h <= NS; h++)
        for (int unsigned a = 0; a < N; a++) begin
          aval[h][a]  <= '1;
          lck[h][a]   <= 1'b0;
          owner[h][a] <= '0;
        end
      for (int unsigned i = 0; i < N; i++)
        for (int unsigned k = 0; k < K; k++) begin
          src_v[i][k]   <= 1'b0;
          src_dst[i][k] <= '0;
          dst_v[i][k]   <= 1'b0;
          dst_src[i][k] <= '0;
        end
    end else begin
      // new packet
      if (req_valid && req_ready) begin
        dst[req_src] <= req_dst;
        lvl[req_src] <= '0;
        list[req_src] <= '1;
        ts[req_src]  <= req_ts;
        if (!req_cancel) begin
          st[req_src] <= E_FWD;
        end else if (src_v[req_src][req_ts] &&
                     src_dst[req_src][req_ts] == req_dst) begin
          st[req_src] <= E_CANCEL;
        end else begin
          res[req_src] <= ST_NOT_FOUND;
          st[req_src]  <= E_DONE;
        end
      end
      if (done_any) st[done_src] <= E_IDLE;

      for (int unsigned e = 0; e < N; e++) begin
        automatic int unsigned h = 32'(lvl[e]);
        automatic logic [IW-1:0] a = IW'(port_of(e, h, 32'(dst[e])));
        automatic logic [K-1:0] nl = list[e] & aval[h][a];
        automatic logic [K-1:0] pick = nl & (~nl + 1'b1);   // lowest set bit
        case (st[e])
          E_FWD: if (grant[e]) begin
            lck[h][a]   <= 1'b1;
            owner[h][a] <= IW'(e);
            list[e]     <= nl;
            if (nl == '0) begin
              st[e] <= E_BACK_FAIL;           // unlock from this level down
            end else if (h == NS) begin
              st[e] <= E_BACK_COMMIT;
              for (int unsigned k = 0; k < K; k++)
                if (pick[k]) ts[e] <= SW'(k);
            end else begin
              lvl[e] <= lvl[e] + 1'b1;
            end
          end
          E_BACK_FAIL: begin
            assert (lck[h][a] && owner[h][a] == IW'(e))
              else $error("packet %0d unlocks a port it does not hold", e);
            lck[h][a] <= 1'b0;
            if (h == 0) begin
              res[e] <= ST_BLOCKED;
              st[e]  <= E_DONE;
            end else begin
              lvl[e] <= lvl[e] - 1'b1;
            end
          end
          E_BACK_COMMIT: begin
            assert (lck[h][a] && owner[h][a] == IW'(e))
              else $error("packet %0d unlocks a port it does not hold", e);
            lck[h][a]       <= 1'b0;
            aval[h][a][ts[e]] <= 1'b0;
            if (h == 0) st[e] <= E_PROGRAM;
            else        lvl[e] <= lvl[e] - 1'b1;
          end
          E_PROGRAM: if (prog[e]) begin
            src_v[e][ts[e]]        <= 1'b1;
            src_dst[e][ts[e]]      <= dst[e];
            dst_v[dst[e]][ts[e]]   <= 1'b1;
            dst_src[dst[e]][ts[e]] <= IW'(e);
            res[e] <= ST_OK;
            st[e]  <= E_DONE;
          end
          E_CANCEL: if (grant[e]) begin
            aval[h][a][ts[e]] <= 1'b1;
            if (h == NS) begin
              src_v[e][ts[e]]      <= 1'b0;
              dst_v[dst[e]][ts[e]] <= 1'b0;
              res[e] <= ST_OK;
              st[e]  <= E_DONE;
            end else begin
              lvl[e] <= lvl[e] + 1'b1;
            end
          end
          default: ;
        endcase
      end
    end
  end

endmodule
