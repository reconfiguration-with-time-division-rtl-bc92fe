// tdm_central_ctrl - centralized reconfiguration controller of the TDM-MIN.
//
// The controller keeps the configuration sequence [M_0 .. M_{K-1}] as a
// table: for every mapping k and source i, whether i has a path in M_k and
// to which destination. From that table it derives everything else: the
// switch-setting array of every mapping, the per-port slot tables that tell
// each source when to send and each destination from whom it receives, and
// the bits loaded into the switch shift registers.
//
// ESTABLISH src->dst places the path in the first mapping it is compatible
// with (first fit, k = 0, 1, ...). A path is compatible with a mapping when
// its source is not already used there and, at every stage, the switch it
// passes is either unused by the mapping or already set to the state the
// path needs. Applied to a list of requests in order, first fit over an
// unbounded number of mappings builds exactly the mappings of the greedy
// Composition algorithm (the first mapping collects every request compatible
// with it, the second the compatible ones among the rest, and so on), so the
// same operation serves static composition and incremental requests. Because
// a source can have only one path per mapping, a duplicated request (used to
// give a connection more bandwidth) lands in a further mapping.
//
// Two modes, chosen per request with var_mcl:
//  * var_mcl = 1 (static or periodic reconfiguration, variable cycle length):
//    the search covers all K mappings and only the table changes; net_ready
//    drops until an APPLY, which reloads every switch register in parallel
//    from the table and restarts the slot timer with the cycle length set to
//    the highest used mapping + 1.
//  * var_mcl = 0 (incremental reconfiguration, fixed cycle length): the
//    search covers the mcl mappings in use; if none is compatible the request
//    is BLOCKED. Otherwise the controller waits for slot k and, in its last
//    clock, drives control_enable/control_set of the n switches on the path,
//    which rewrites just those bits of mapping k in the registers; the table
//    is updated on the same edge, so ports use the path from the next
//    occurrence of slot k on. Latency is at most mcl slots.
// RELEASE src->dst removes the path from the lowest mapping holding it; no
// switch needs changing, since switches a mapping does not use are don't
// cares. Preemption of existing paths and migration of paths between mappings
// are not done.
//
// Interface: valid/ready request, one-cycle response pulse with status, the
// mapping used (slot) and the cycle length. Reset: empty table, switches
// straight, cycle length K, net_ready high.
module tdm_central_ctrl
  import tdm_pkg::*;
#(
  parameter int unsigned N = 8,
  parameter int unsigned K = 8,
  localparam int unsigned NS  = $clog2(N),
  localparam int unsigned NSW = N / 2,
  localparam int unsigned IW  = $clog2(N),
  localparam int unsigned SW  = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned MW  = $clog2(K + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // requests
  input  logic          req_valid,
  output logic          req_ready,
  input  ctrl_op_e      req_op,
  input  logic          req_var_mcl,
  input  logic [IW-1:0] req_src,
  input  logic [IW-1:0] req_dst,
  output logic          rsp_valid,
  output ctrl_status_e  rsp_status,
  output logic [SW-1:0] rsp_slot,
  output logic [MW-1:0] rsp_mcl,
  // slot timer
  input  logic [SW-1:0] cur_slot,
  input  logic          slot_last,
  input  logic [MW-1:0] mcl,
  output logic          timer_restart,
  output logic [MW-1:0] timer_mcl,
  // switch control of the network
  output logic          ctrl_en     [NS][NSW],
  output logic          ctrl_set    [NS][NSW],
  output logic          shift_nload,
  output logic [K-1:0]  load_bits   [NS][NSW],
  // slot tables of the ports
  output logic          src_v       [N][K],
  output logic [IW-1:0] src_dst     [N][K],
  output logic          dst_v       [N][K],
  output logic [IW-1:0] dst_src     [N][K],
  output logic          net_ready
);

  typedef enum logic [1:0] {S_IDLE, S_DECIDE, S_PROGRAM} state_e;

  state_e        state;
  ctrl_op_e      op_q;
  logic          var_q;
  logic [IW-1:0] src_q, dst_q;
  logic [SW-1:0] slot_q;
  logic          dirty;

  logic          tab_v [K][N];
  logic [IW-1:0] tab_d [K][N];

  // ---------------------------------------------------------------- search
  logic          compat [K];
  logic          fit_found, rel_found;
  logic [SW-1:0] fit_slot, rel_slot;
  logic [MW-1:0] used_mcl;

  always_comb begin
    for (int unsigned k = 0; k < K; k++) begin
      compat[k] = !tab_v[k][src_q];
      for (int unsigned i = 0; i < N; i++) begin
        if (tab_v[k][i] && paths_conflict(NS, i, 32'(tab_d[k][i]),
                                          32'(src_q), 32'(dst_q)))
          compat[k] = 1'b0;
      end
    end
    fit_found = 1'b0;
    fit_slot  = '0;
    for (int unsigned k = 0; k < K; k++) begin
      if (!fit_found && compat[k] && (var_q || k < 32'(mcl))) begin
        fit_found = 1'b1;
        fit_slot  = SW'(k);
      end
    end
    rel_found = 1'b0;
    rel_slot  = '0;
    for (int unsigned k = 0; k < K; k++) begin
      if (!rel_found && tab_v[k][src_q] && tab_d[k][src_q] == dst_q) begin
        rel_found = 1'b1;
        rel_slot  = SW'(k);
      end
    end
    used_mcl = MW'(1);
    for (int unsigned k = 0; k < K; k++) begin
      for (int unsigned i = 0; i < N; i++) begin
        if (tab_v[k][i]) used_mcl = MW'(k + 1);
      end
    end
  end

  // ------------------------------------------- switch settings from table
  always_comb begin
    for (int unsigned g = 0; g < NS; g++) begin
      for (int unsigned w = 0; w < NSW; w++) begin
        load_bits[g][w] = '0;
        for (int unsigned k = 0; k < K; k++) begin
          for (int unsigned i = 0; i < N; i++) begin
            if (tab_v[k][i] &&
                switch_index(NS, g + 1, i, 32'(tab_d[k][i])) == w &&
                switch_state(NS, g + 1, i, 32'(tab_d[k][i])))
              load_bits[g][w][k] = 1'b1;
          end
        end
        ctrl_en[g][w]  = (state == S_PROGRAM) && (cur_slot == slot_q) &&
                         slot_last &&
                         (switch_index(NS, g + 1, 32'(src_q), 32'(dst_q)) == w);
        ctrl_set[g][w] = switch_state(NS, g + 1, 32'(src_q), 32'(dst_q));
      end
    end
  end

  // ------------------------------------------------------- port slot tables
  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      for (int unsigned k = 0; k < K; k++) begin
        src_v[i][k]   = tab_v[k][i];
        src_dst[i][k] = tab_d[k][i];
        dst_v[i][k]   = 1'b0;
        dst_src[i][k] = '0;
      end
    end
    for (int unsigned k = 0; k < K; k++) begin
      for (int unsigned i = 0; i < N; i++) begin
        if (tab_v[k][i]) begin
          dst_v[tab_d[k][i]][k]   = 1'b1;
          dst_src[tab_d[k][i]][k] = IW'(i);
        end
      end
    end
  end

  // ------------------------------------------------------------ sequencing
  wire program_edge = (state == S_PROGRAM) && (cur_slot == slot_q) && slot_last;

  assign req_ready     = (state == S_IDLE);
  assign net_ready     = !dirty;
  assign shift_nload   = !((state == S_DECIDE) && (op_q == OP_APPLY));
  assign timer_restart = (state == S_DECIDE) && (op_q == OP_APPLY);
  assign timer_mcl     = used_mcl;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      op_q       <= OP_ESTABLISH;
      var_q      <= 1'b0;
      src_q      <= '0;
      dst_q      <= '0;
      slot_q     <= '0;
      dirty      <= 1'b0;
      rsp_valid  <= 1'b0;
      rsp_status <= ST_OK;
      rsp_slot   <= '0;
      rsp_mcl    <= '0;
      for (int unsigned k = 0; k < K; k++)
        for (int unsigned i = 0; i < N; i++) begin
          tab_v[k][i] <= 1'b0;
          tab_d[k][i] <= '0;
        end
    end else begin
      rsp_valid <= 1'b0;
      case (state)
        S_IDLE: begin
          if (req_valid) begin
            op_q  <= req_op;
            var_q <= req_var_mcl;
            src_q <= req_src;
            dst_q <= req_dst;
            state <= S_DECIDE;
          end
        end
        S_DECIDE: begin
          rsp_mcl <= mcl;
          case (op_q)
            OP_ESTABLISH: begin
              if (!fit_found) begin
                rsp_valid  <= 1'b1;
                rsp_status <= ST_BLOCKED;
                rsp_slot   <= '0;
                state      <= S_IDLE;
              end else if (var_q) begin
                tab_v[fit_slot][src_q] <= 1'b1;
                tab_d[fit_slot][src_q] <= dst_q;
                dirty      <= 1'b1;
                rsp_valid  <= 1'b1;
                rsp_status <= ST_OK;
                rsp_slot   <= fit_slot;
                state      <= S_IDLE;
              end else begin
                slot_q <= fit_slot;
                state  <= S_PROGRAM;
              end
            end
            OP_RELEASE: begin
              if (rel_found) begin
                tab_v[rel_slot][src_q] <= 1'b0;
                dirty <= dirty | var_q;
              end
              rsp_valid  <= 1'b1;
              rsp_status <= rel_found ? ST_OK : ST_NOT_FOUND;
              rsp_slot   <= rel_slot;
              state      <= S_IDLE;
            end
            default: begin   // OP_APPLY: parallel load happens this cycle
              dirty      <= 1'b0;
              rsp_valid  <= 1'b1;
              rsp_status <= ST_OK;
              rsp_slot   <= '0;
              rsp_mcl    <= used_mcl;
              state      <= S_IDLE;
            end
          endcase
        end
        S_PROGRAM: begin
          if (program_edge) begin
            tab_v[slot_q][src_q] <= 1'b1;
            tab_d[slot_q][src_q] <= dst_q;
            rsp_valid  <= 1'b1;
            rsp_status <= ST_OK;
            rsp_slot   <= slot_q;
            state      <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
