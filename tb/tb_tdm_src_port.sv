// tb_tdm_src_port - checks that a source port sends a message only in the
// slots whose path leads to the message's destination, only while the
// network is ready, and reports whether any slot reaches the destination.
module tb_tdm_src_port;
  localparam int unsigned N = 8, K = 8, DW = 8, IW = 3, SW = 3;

  logic          net_ready = 1;
  logic [SW-1:0] cur_slot = 0;
  logic          tab_v   [K];
  logic [IW-1:0] tab_dst [K];
  logic          msg_valid = 0;
  logic [IW-1:0] msg_dst = 0;
  logic [DW-1:0] msg_data = 0;
  logic          msg_ready, has_path;
  logic [DW:0]   link_out;
  int checks = 0, failures = 0;

  tdm_src_port #(.N(N), .K(K), .DW(DW)) dut (.*);

  initial begin
    for (int t = 0; t < 400; t++) begin
      bit exp_send, exp_path;
      for (int k = 0; k < K; k++) begin
        tab_v[k]   = ($urandom % 3) != 0;
        tab_dst[k] = IW'($urandom);
      end
      cur_slot  = SW'($urandom);
      msg_valid = ($urandom % 4) != 0;
      msg_dst   = IW'($urandom);
      msg_data  = DW'($urandom);
      net_ready = ($urandom % 5) != 0;
      #1;
      exp_send = msg_valid && net_ready && tab_v[cur_slot] && tab_dst[cur_slot] == msg_dst;
      exp_path = 0;
      for (int k = 0; k < K; k++) if (tab_v[k] && tab_dst[k] == msg_dst) exp_path = 1;
      checks++;
      if (msg_ready !== exp_send || link_out[DW] !== exp_send ||
          (exp_send && link_out[DW-1:0] !== msg_data) || has_path !== exp_path) begin
        failures++;
        $display("FAIL t=%0d ready=%0b exp=%0b link=%h path=%0b/%0b", t, msg_ready, exp_send,
                 link_out, has_path, exp_path);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
