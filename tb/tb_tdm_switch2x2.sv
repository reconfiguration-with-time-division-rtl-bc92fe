// tb_tdm_switch2x2 - checks both states of the 2x2 switch on random data:
// straight keeps each input on its own output, cross exchanges them.
module tb_tdm_switch2x2;
  localparam int unsigned W = 9;
  logic         xstate;
  logic [W-1:0] in0, in1, out0, out1;
  int checks = 0, failures = 0;

  tdm_switch2x2 #(.W(W)) dut (.*);

  initial begin
    for (int t = 0; t < 200; t++) begin
      in0    = W'($urandom);
      in1    = W'($urandom);
      xstate = t[0];
      #1;
      checks++;
      if (xstate == 1'b0 ? (out0 !== in0 || out1 !== in1)
                         : (out0 !== in1 || out1 !== in0)) begin
        failures++;
        $display("FAIL t=%0d state=%0b in=%h,%h out=%h,%h", t, xstate, in0, in1, out0, out1);
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
