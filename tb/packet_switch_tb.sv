// packet_switch_tb: end-to-end test of the switch output port at its default
// size (four input ports, 8-bit weights, 32-bit packets).
//
// Each input port holds a queue of numbered packets, tagged with the port
// number in the top byte, and requests while its queue is not empty; it moves
// to its next packet whenever it is granted, ReqDnStr is high and FullDnStr is
// low. The downstream sink raises FullDnStr at random. The test checks:
//   - GntInt against rr_ref_model every cycle (FullDnStr acting as hold);
//   - every packet that leaves came from the granted port, in order, and none
//     is lost or duplicated;
//   - the throughput of a saturated port pair with weights 20 and 10: the
//     port with twice the weight gets twice the transfers;
//   - that each mechanism occurred: round-robin wrap-round, skipping an idle
//     port, a slot capped by MaxWeight, a slot running past MaxWeight for a
//     lone port, a downstream-full stall, and a packet transfer.
module packet_switch_tb;
  localparam int CH = 4;
  localparam int WW = 8;
  localparam int PW = 32;

  logic clk = 0, rst = 1;
  logic [CH-1:0]         ReqInt, GntInt, exp_gnt;
  logic [CH-1:0][PW-1:0] Packet;
  logic [CH*WW-1:0]      Weights = '0;
  logic [WW-1:0]         MaxWeight = 8'd255;
  logic [PW-1:0]         PacketOut;
  logic                  ReqDnStr, FullDnStr = 0;
  int checks = 0, failures = 0, cyc = 0;
  int owner;
  logic ev_decide, ev_wrap, ev_skip, ev_capped, ev_long, ev_stall;

  int pending[CH];   // packets still to send per port
  int seq[CH];       // number of the packet at the head of each port
  int rx_seq[CH];    // next packet number expected from each port
  int tx_total = 0, tx_port[CH];

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  packet_switch dut (
    .clk(clk), .rst(rst), .ReqInt(ReqInt), .GntInt(GntInt), .Packet(Packet),
    .Weights(Weights), .MaxWeight(MaxWeight), .PacketOut(PacketOut),
    .ReqDnStr(ReqDnStr), .FullDnStr(FullDnStr));

  rr_ref_model #(.CHANNELS(CH), .WEIGHT_W(WW)) ref_m (
    .clk(clk), .rst(rst), .hold(FullDnStr), .req(ReqInt), .weights(Weights),
    .max_weight(MaxWeight), .exp_gnt(exp_gnt), .owner(owner),
    .ev_decide(ev_decide), .ev_wrap(ev_wrap), .ev_skip(ev_skip),
    .ev_capped(ev_capped), .ev_long(ev_long), .ev_stall(ev_stall));

  always_comb begin
    for (int i = 0; i < CH; i++) begin
      ReqInt[i] = pending[i] > 0;
      Packet[i] = {8'(i), 24'(seq[i])};
    end
  end

  // checks and the transfer itself, just before the rising edge
  always @(negedge clk) if (!rst) begin
    checks++;
    if (GntInt !== exp_gnt) begin
      failures++;
      if (failures < 10) $display("FAIL cyc=%0d ReqInt=%b GntInt=%b exp=%b", cyc, ReqInt, GntInt, exp_gnt);
    end
    checks++;
    if (ReqDnStr !== (owner >= 0 && ReqInt[owner])) begin
      failures++;
      if (failures < 10) $display("FAIL cyc=%0d ReqDnStr=%b", cyc, ReqDnStr);
    end
  end

  always @(posedge clk) if (!rst && ReqDnStr && !FullDnStr) begin
    int p;
    p = int'(PacketOut[31:24]);
    checks++;
    if (p != owner || int'(PacketOut[23:0]) != rx_seq[p]) begin
      failures++;
      if (failures < 10) $display("FAIL cyc=%0d PacketOut=%h owner=%0d", cyc, PacketOut, owner);
    end
    if (p < CH) begin
      rx_seq[p]++;
      tx_port[p]++;
    end
    tx_total++;
    for (int i = 0; i < CH; i++) if (GntInt[i]) begin
      pending[i] <= pending[i] - 1;
      seq[i]     <= seq[i] + 1;
    end
  end

  int n_wrap = 0, n_skip = 0, n_cap = 0, n_long = 0, n_stall = 0;
  always @(posedge clk) if (!rst) begin
    n_wrap  += int'(ev_wrap);
    n_skip  += int'(ev_skip);
    n_cap   += int'(ev_capped);
    n_long  += int'(ev_long);
    n_stall += int'(ev_stall);
  end

  task automatic expect_true(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (cyc=%0d)", what, cyc); end
  endtask

  function automatic logic [CH*WW-1:0] wbus(int w0, int w1, int w2, int w3);
    return {WW'(w3), WW'(w2), WW'(w1), WW'(w0)};
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sent;
    for (int i = 0; i < CH; i++) begin
      pending[i] = 0; seq[i] = 0; rx_seq[i] = 0; tx_port[i] = 0;
    end
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (2) @(negedge clk);

    // Weighted share: ports 0 and 1 saturated, weights 20 and 10.
    Weights = wbus(20, 10, 1, 1);
    pending[0] = 100000;
    pending[1] = 100000;
    repeat (3 * (20 + 2 + 10 + 2) + 4) @(negedge clk);
    for (int i = 0; i < CH; i++) tx_port[i] = 0;
    repeat (10 * (20 + 2 + 10 + 2)) @(negedge clk);
    expect_true(tx_port[0] + tx_port[1] == 10 * 30 || tx_port[0] + tx_port[1] == 10 * 30 + 1 ||
                tx_port[0] + tx_port[1] == 10 * 30 - 1, "30 transfers per 34-cycle round");
    expect_true(tx_port[0] >= 2 * tx_port[1] - 20 && tx_port[0] <= 2 * tx_port[1] + 20,
                "weight 20 gets twice the bus time of weight 10");
    $display("weighted share: port0=%0d port1=%0d", tx_port[0], tx_port[1]);
    pending[0] = 0;
    pending[1] = 0;
    repeat (30) @(negedge clk);

    // Random traffic with a random downstream-full signal.
    Weights = wbus(3, 1, 5, 2);
    MaxWeight = 8'd2;
    for (int n = 0; n < 6000; n++) begin
      if ($urandom_range(0, 9) == 0) begin
        automatic int i = $urandom_range(0, CH - 1);
        if (pending[i] == 0) pending[i] = $urandom_range(1, 8);
      end
      if ($urandom_range(0, 999) == 0) MaxWeight = WW'($urandom_range(0, 6));
      FullDnStr = ($urandom_range(0, 9) == 0);
      @(negedge clk);
    end
    // drain
    FullDnStr = 0;
    sent = 0;
    while ((pending[0] | pending[1] | pending[2] | pending[3]) != 0 && sent < 1000) begin
      sent++;
      @(negedge clk);
    end
    repeat (4) @(negedge clk);
    for (int i = 0; i < CH; i++)
      expect_true(rx_seq[i] == seq[i], $sformatf("port %0d: every packet delivered once", i));

    expect_true(n_wrap  > 0, "a wrap-round happened");
    expect_true(n_skip  > 0, "an idle port was skipped");
    expect_true(n_cap   > 0, "a slot was capped by MaxWeight");
    expect_true(n_long  > 0, "a lone port ran past MaxWeight");
    expect_true(n_stall > 0, "a downstream-full stall happened");
    expect_true(tx_total > 0, "packets were transferred");
    $display("events: wrap=%0d skip=%0d capped=%0d long=%0d stall=%0d transfers=%0d",
             n_wrap, n_skip, n_cap, n_long, n_stall, tx_total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
