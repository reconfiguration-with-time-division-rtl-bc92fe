// tb_tdm_switch_ctrl - checks the per-switch shift register against a
// behavioural model: parallel load, round-robin rotation over mcl slots
// (both mcl = K and a shorter cycle), holding between slot strobes, and the
// control_enable/control_set override that both drives the switch at once
// and replaces the stored state of the current slot.
module tb_tdm_switch_ctrl;
  localparam int unsigned K  = 8;
  localparam int unsigned MW = $clog2(K + 1);

  logic          clk = 0, rst_n = 0;
  logic          step = 0, shift_nload = 1;
  logic [K-1:0]  load_bits = '0;
  logic [MW-1:0] mcl = MW'(K);
  logic          control_enable = 0, control_set = 0;
  logic          to_switch;

  int checks = 0, failures = 0;
  logic model [K];          // model[k]: state of slot k
  int   slot;               // current slot of the model

  tdm_switch_ctrl #(.K(K)) dut (.*);

  always #5 clk = ~clk;

  task automatic expect_out(logic exp, string what);
    checks++;
    if (to_switch !== exp) begin
      failures++;
      $display("FAIL %s: slot %0d to_switch=%0b expected %0b", what, slot, to_switch, exp);
    end
  endtask

  // one time slot lasting `len` clocks, optional override in slot
  task automatic run_slot(int len, logic en, logic val);
    for (int c = 0; c < len; c++) begin
      control_enable = en;
      control_set    = val;
      step           = (c == len - 1);
      #1;
      expect_out(en ? val : model[slot], "slot output");
      @(posedge clk); #1;
    end
    if (en) model[slot] = val;
    control_enable = 0;
    step = 0;
    slot = (slot + 1) % int'(mcl);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    #1;
    slot = 0;
    expect_out(1'b0, "reset state straight");
    // parallel load
    load_bits   = 8'b1011_0010;
    shift_nload = 0;
    @(posedge clk); #1;
    shift_nload = 1;
    for (int k = 0; k < K; k++) model[k] = load_bits[k];
    // two full cycles at mcl = K, slots of 1..3 clocks
    for (int s = 0; s < 2 * K; s++) run_slot(1 + (s % 3), 0, 0);
    // override slot 3 with its complement, then check it persists
    while (slot != 3) run_slot(2, 0, 0);
    run_slot(2, 1, ~model[3]);
    for (int s = 0; s < 2 * K; s++) run_slot(1, 0, 0);
    // shorter cycle: load, mcl = 3
    load_bits   = 8'b0000_0101;
    mcl         = 3;
    shift_nload = 0;
    @(posedge clk); #1;
    shift_nload = 1;
    slot = 0;
    for (int k = 0; k < K; k++) model[k] = load_bits[k];
    for (int s = 0; s < 9; s++) run_slot(2, 0, 0);
    run_slot(1, 1, 1'b1);              // slot 0 overridden to 1
    for (int s = 0; s < 9; s++) run_slot(1, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
