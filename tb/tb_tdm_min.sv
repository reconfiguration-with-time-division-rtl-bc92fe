// tb_tdm_min - drives the 8 x 8 network through configuration sequences and
// checks where every input word comes out.
//  1. The two-mapping sequence of the worked example: switch-setting arrays
//     SS_M1 (every switch straight except stage 3 crossed) and SS_M2 (rows
//     x11, 010, 0x0, 011; x loaded as 0), realizing
//     M1 = {(0,1),(1,0),(2,3),(3,2),(4,5),(5,4),(6,7),(7,6)} and
//     M2 = {(1,3),(2,1),(5,6),(7,5)}.
//  2. The completely connected flip-k sequence, k = 0..7: in slot k every
//     switch of stage st is set to bit n-st of k, and input i must reach
//     output i xor k.
//  3. A control_enable override of all last-stage switches in one slot,
//     which must act at once and be remembered for the next cycle.
// Expected outputs come from the mapping definitions, not from the RTL's
// routing functions.
module tb_tdm_min;
  localparam int unsigned N = 8, K = 8, W = 9;
  localparam int unsigned NS = 3, NSW = 4, MW = $clog2(K + 1);

  logic          clk = 0, rst_n = 0;
  logic          step = 0, shift_nload = 1;
  logic [K-1:0]  load_bits [NS][NSW];
  logic [MW-1:0] mcl = MW'(K);
  logic          ctrl_en  [NS][NSW];
  logic          ctrl_set [NS][NSW];
  logic [W-1:0]  in_link  [N];
  logic [W-1:0]  out_link [N];
  logic          sw_state [NS][NSW];

  int checks = 0, failures = 0;

  tdm_min #(.N(N), .K(K), .W(W)) dut (.*);

  always #5 clk = ~clk;

  // paper example arrays, [switch][stage], 2 = don't care
  int ss1 [4][3] = '{'{0,0,1}, '{0,0,1}, '{0,0,1}, '{0,0,1}};
  int ss2 [4][3] = '{'{2,1,1}, '{0,1,0}, '{0,2,0}, '{0,1,1}};
  int m1 [8][2]  = '{'{0,1},'{1,0},'{2,3},'{3,2},'{4,5},'{5,4},'{6,7},'{7,6}};
  int m2 [4][2]  = '{'{1,3},'{2,1},'{5,6},'{7,5}};

  task automatic drive_inputs();
    for (int i = 0; i < N; i++) in_link[i] = {1'b1, 3'(i), 5'($urandom)};
    #1;
  endtask

  task automatic check_path(int s, int d, string what);
    checks++;
    if (out_link[d] !== in_link[s]) begin
      failures++;
      $display("FAIL %s: %0d->%0d out=%h in=%h", what, s, d, out_link[d], in_link[s]);
    end
  endtask

  task automatic load(int len);
    mcl = MW'(len);
    shift_nload = 0;
    @(posedge clk); #1;
    shift_nload = 1;
  endtask

  task automatic next_slot();
    step = 1;
    @(posedge clk); #1;
    step = 0;
  endtask

  initial begin
    for (int g = 0; g < NS; g++)
      for (int w = 0; w < NSW; w++) begin
        ctrl_en[g][w] = 0; ctrl_set[g][w] = 0; load_bits[g][w] = '0;
      end
    for (int i = 0; i < N; i++) in_link[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // 1. worked example, cycle length 2
    for (int w = 0; w < NSW; w++)
      for (int g = 0; g < NS; g++) begin
        load_bits[g][w] = '0;
        load_bits[g][w][0] = (ss1[w][g] == 1);
        load_bits[g][w][1] = (ss2[w][g] == 1);
      end
    load(2);
    for (int cyc = 0; cyc < 3; cyc++) begin
      drive_inputs();
      foreach (m1[p]) check_path(m1[p][0], m1[p][1], "M1");
      next_slot();
      drive_inputs();
      foreach (m2[p]) check_path(m2[p][0], m2[p][1], "M2");
      next_slot();
    end

    // 2. flip-k completely connected sequence, cycle length 8
    for (int w = 0; w < NSW; w++)
      for (int g = 0; g < NS; g++)
        for (int k = 0; k < K; k++)
          load_bits[g][w][k] = k[NS - 1 - g];
    load(8);
    for (int cyc = 0; cyc < 2; cyc++)
      for (int k = 0; k < K; k++) begin
        drive_inputs();
        for (int i = 0; i < N; i++) check_path(i, i ^ k, "flip-k");
        next_slot();
      end

    // 3. slot 0 (flip-0): force all stage-3 switches to cross -> flip-1
    drive_inputs();
    for (int w = 0; w < NSW; w++) begin ctrl_en[2][w] = 1; ctrl_set[2][w] = 1; end
    #1;
    for (int i = 0; i < N; i++) check_path(i, i ^ 1, "override now");
    next_slot();
    for (int w = 0; w < NSW; w++) ctrl_en[2][w] = 0;
    for (int k = 1; k < K; k++) begin
      drive_inputs();
      for (int i = 0; i < N; i++) check_path(i, i ^ k, "after override");
      next_slot();
    end
    drive_inputs();
    for (int i = 0; i < N; i++) check_path(i, i ^ 1, "override kept");

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
