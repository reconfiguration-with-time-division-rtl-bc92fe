// tdm_pkg - shared types and routing functions of the time-division
// multiplexed generalized cube MIN (TDM-MIN).
//
// Topology (generalized cube, N = 2**n ports, stages numbered 1..n from the
// inputs): stage st acts on address bit b = n-st. The line that a path from
// source s to destination d occupies in front of stage st carries the
// destination's bits above b already and the source's bits b..0 still:
//     line(st) = { d[n-1 : b+1], s[b : 0] }
// The switch of stage st that holds a line is numbered by the line address
// with bit b deleted, and the state the path needs is s[b] xor d[b]
// (0 = straight, 1 = cross). This numbering reproduces the switch-setting
// arrays worked out in the design's example (8 x 8 MIN, paths (1,3), (2,1),
// (5,6), (7,5)) and the fact that inputs 1 and 5 share a first-stage switch.
//
// Two paths conflict when, at some stage, they pass the same switch and need
// different states; a path can join a mapping only if it conflicts with none
// of the mapping's paths. These functions take n as an argument so that one
// package serves every network size.
package tdm_pkg;

  // Data travelling on one link of the network.
  typedef struct packed {
    logic       valid;
    logic [7:0] data;
  } link8_t;

  // Operations accepted by the central reconfiguration controller.
  typedef enum logic [1:0] {
    OP_ESTABLISH = 2'd0,   // add path src->dst to the configuration sequence
    OP_RELEASE   = 2'd1,   // remove path src->dst
    OP_APPLY     = 2'd2    // reload every switch register from the sequence
  } ctrl_op_e;

  // Which controller drives the switches and the port tables.
  typedef enum logic {
    CTRL_CENTRAL     = 1'b0,
    CTRL_DISTRIBUTED = 1'b1
  } ctrl_mode_e;

  // Outcome of a controller operation.
  typedef enum logic [1:0] {
    ST_OK        = 2'd0,
    ST_BLOCKED   = 2'd1,   // no compatible mapping in the allowed range
    ST_NOT_FOUND = 2'd2    // release of a path that is not established
  } ctrl_status_e;

  // Line address a path occupies in front of stage st (1..n).
  function automatic int unsigned line_before(int unsigned n, int unsigned st,
                                              int unsigned s, int unsigned d);
    int unsigned b = n - st;
    int unsigned lo_mask = (1 << (b + 1)) - 1;
    return (d & ~lo_mask & ((1 << n) - 1)) | (s & lo_mask);
  endfunction

  // Line address a path occupies behind stage h (h = 0: the input port
  // itself, h = n: the output port).
  function automatic int unsigned line_after(int unsigned n, int unsigned h,
                                             int unsigned s, int unsigned d);
    int unsigned lo_mask = (1 << (n - h)) - 1;
    return (d & ~lo_mask & ((1 << n) - 1)) | (s & lo_mask);
  endfunction

  // Number of the stage-st switch used by the path s->d.
  function automatic int unsigned switch_index(int unsigned n, int unsigned st,
                                               int unsigned s, int unsigned d);
    int unsigned b = n - st;
    int unsigned l = line_before(n, st, s, d);
    return ((l >> (b + 1)) << b) | (l & ((1 << b) - 1));
  endfunction

  // State (0 straight, 1 cross) the stage-st switch must take for s->d.
  function automatic logic switch_state(int unsigned n, int unsigned st,
                                        int unsigned s, int unsigned d);
    int unsigned b = n - st;
    return logic'(((s ^ d) >> b) & 1);
  endfunction

  // True when paths s1->d1 and s2->d2 cannot share one mapping.
  function automatic logic paths_conflict(int unsigned n,
                                          int unsigned s1, int unsigned d1,
                                          int unsigned s2, int unsigned d2);
    logic c = 1'b0;
    for (int unsigned st = 1; st <= n; st++) begin
      if (switch_index(n, st, s1, d1) == switch_index(n, st, s2, d2) &&
          switch_state(n, st, s1, d1) != switch_state(n, st, s2, d2))
        c = 1'b1;
    end
    return c;
  endfunction

endpackage
