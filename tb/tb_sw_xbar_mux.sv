// tb_sw_xbar_mux: self-checking test of one crossbar multiplexer.
//
// A 3-leg multiplexer (the largest in the example switch) and a 1-leg one
// get random data with every one-hot select and with no select; the output
// must be the selected leg, or zero when nothing is selected.
module tb_sw_xbar_mux;
  localparam int W = 34;

  logic [2:0][W-1:0] din3;
  logic [2:0]        sel3;
  logic [W-1:0]      dout3;
  logic [0:0][W-1:0] din1;
  logic [0:0]        sel1;
  logic [W-1:0]      dout1;

  int checks = 0, failures = 0;

  sw_xbar_mux #(.N(3), .W(W)) dut3 (.din(din3), .sel(sel3), .dout(dout3));
  sw_xbar_mux #(.N(1), .W(W)) dut1 (.din(din1), .sel(sel1), .dout(dout1));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int n = 0; n < 500; n++) begin
      for (int s = -1; s < 3; s++) begin
        for (int k = 0; k < 3; k++) din3[k] = W'({$urandom, $urandom});
        din1[0] = W'({$urandom, $urandom});
        sel3 = (s < 0) ? 3'b000 : 3'(1 << s);
        sel1 = (s < 0) ? 1'b0 : 1'b1;
        #1;
        check(dout3 == ((s < 0) ? '0 : din3[s]), "3-leg mux");
        check(dout1 == ((s < 0) ? '0 : din1[0]), "1-leg mux");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
