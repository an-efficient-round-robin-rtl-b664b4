// weight_decoder_tb: self-checking test of the one-hot weight decoder.
//
// For every one-hot select value and many random weight buses it checks the
// index and the selected weight against values worked out here bit by bit;
// it also checks the all-zero select (index 0) and the worked example of a
// grant of 4'b0010 giving index 1 and 4'b0100 giving index 2. A watchdog ends
// the run with a failure if it hangs.
module weight_decoder_tb;
  localparam int CH = 4;
  localparam int WW = 8;

  logic [CH*WW-1:0] bus;
  logic [CH-1:0]    sel;
  logic [1:0]       idx;
  logic [WW-1:0]    w;
  int checks = 0, failures = 0;

  weight_decoder #(.CHANNELS(CH), .WEIGHT_W(WW)) dut (
    .dataInBus(bus), .selOneHot(sel), .index(idx), .dataOut(w));

  task automatic check(input int exp_idx, input logic [WW-1:0] exp_w);
    #1;
    checks++;
    if (int'(idx) != exp_idx || w != exp_w) begin
      failures++;
      $display("FAIL sel=%b bus=%h idx=%0d/%0d w=%h/%h", sel, bus, idx, exp_idx, w, exp_w);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // worked examples
    bus = {8'h44, 8'h33, 8'h22, 8'h11};
    sel = 4'b0010; check(1, 8'h22);
    sel = 4'b0100; check(2, 8'h33);
    sel = 4'b0000; check(0, 8'h11);
    for (int n = 0; n < 200; n++) begin
      bus = $urandom;
      for (int m = 0; m < CH; m++) begin
        logic [WW-1:0] e;
        for (int b = 0; b < WW; b++) e[b] = bus[m*WW + b];
        sel = 4'b0001 << m;
        check(m, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
