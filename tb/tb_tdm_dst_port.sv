// tb_tdm_dst_port - checks that a destination port registers each arriving
// word with the sender named by the slot table, one clock later, and flags a
// word arriving in a slot without a path instead of delivering it.
module tb_tdm_dst_port;
  localparam int unsigned N = 8, K = 8, DW = 8, IW = 3, SW = 3;

  logic          clk = 0, rst_n = 0;
  logic [SW-1:0] cur_slot = 0;
  logic          tab_v   [K];
  logic [IW-1:0] tab_src [K];
  logic [DW:0]   link_in = '0;
  logic          rx_valid, rx_stray;
  logic [IW-1:0] rx_src;
  logic [DW-1:0] rx_data;
  int checks = 0, failures = 0;

  tdm_dst_port #(.N(N), .K(K), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    for (int k = 0; k < K; k++) begin tab_v[k] = 0; tab_src[k] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      bit ev, es;
      logic [IW-1:0] esrc;
      logic [DW-1:0] edata;
      @(negedge clk);
      for (int k = 0; k < K; k++) begin
        tab_v[k]   = ($urandom % 3) != 0;
        tab_src[k] = IW'($urandom);
      end
      cur_slot = SW'($urandom);
      link_in  = {1'($urandom), DW'($urandom)};
      ev    = link_in[DW] && tab_v[cur_slot];
      es    = link_in[DW] && !tab_v[cur_slot];
      esrc  = tab_src[cur_slot];
      edata = link_in[DW-1:0];
      @(posedge clk); #1;
      // inputs change after the edge; the outputs hold what was sampled
      link_in = '0;
      checks++;
      if (rx_valid !== ev || rx_stray !== es || (ev && (rx_src !== esrc || rx_data !== edata))) begin
        failures++;
        $display("FAIL t=%0d valid=%0b/%0b stray=%0b/%0b src=%0d/%0d", t, rx_valid, ev,
                 rx_stray, es, rx_src, esrc);
      end
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
