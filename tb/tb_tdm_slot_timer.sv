// tb_tdm_slot_timer - checks the global slot counter: slots of SLOT_CYCLES
// clocks visited round robin over the cycle length (K after reset), the
// first/last-clock strobes, and a restart with a new cycle length.
module tb_tdm_slot_timer;
  localparam int unsigned K = 8, SLOT_CYCLES = 3;
  localparam int unsigned SW = $clog2(K), MW = $clog2(K + 1);

  logic          clk = 0, rst_n = 0, restart = 0;
  logic [MW-1:0] mcl_in = '0;
  logic [SW-1:0] cur_slot;
  logic [MW-1:0] mcl;
  logic          slot_first, slot_last;
  int checks = 0, failures = 0;
  int exp_slot, exp_cyc, exp_mcl;

  tdm_slot_timer #(.K(K), .SLOT_CYCLES(SLOT_CYCLES)) dut (.*);

  always #5 clk = ~clk;

  task automatic check_cycle();
    checks++;
    if (cur_slot != SW'(exp_slot) || mcl != MW'(exp_mcl) ||
        slot_first != (exp_cyc == 0) || slot_last != (exp_cyc == SLOT_CYCLES - 1)) begin
      failures++;
      $display("FAIL slot=%0d/%0d mcl=%0d/%0d first=%0b last=%0b cyc=%0d",
               cur_slot, exp_slot, mcl, exp_mcl, slot_first, slot_last, exp_cyc);
    end
  endtask

  task automatic advance();
    @(posedge clk); #1;
    exp_cyc++;
    if (exp_cyc == SLOT_CYCLES) begin
      exp_cyc = 0;
      exp_slot = (exp_slot + 1) % exp_mcl;
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    exp_slot = 0; exp_cyc = 0; exp_mcl = K;
    for (int c = 0; c < 3 * K * SLOT_CYCLES + 2; c++) begin
      check_cycle();
      advance();
    end
    // restart with cycle length 3 in the middle of a slot
    restart = 1; mcl_in = 3;
    @(posedge clk); #1;
    restart = 0;
    exp_slot = 0; exp_cyc = 0; exp_mcl = 3;
    for (int c = 0; c < 4 * 3 * SLOT_CYCLES; c++) begin
      check_cycle();
      advance();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
