// grant_fsm_tb: self-checking test of the grant state machine on its own.
//
// The next-grant mask and the weight look-up, normally supplied by the
// precalculator and the weight decoder, are computed here from the state
// machine's grant_q. The grant output is compared every cycle with
// rr_ref_model. A directed part checks the latency (a lone request is
// granted two clocks after it is first sampled), the slot length (weight 5
// gives five cycles of grant), strict round-robin order with all four masters
// requesting, the max_weight cap with a competitor and the full weight
// without one, and that hold freezes the slot. A random part follows.
module grant_fsm_tb;
  localparam int CH = 4;
  localparam int WW = 8;

  logic clk = 0, rst = 1, hold = 0;
  logic [CH-1:0]    req = '0, mask, grant_q, gnt, exp_gnt;
  logic [CH*WW-1:0] weights = '0;
  logic [WW-1:0]    weight, max_weight = 8'd255;
  int checks = 0, failures = 0, cyc = 0;
  int owner;
  logic ev_decide, ev_wrap, ev_skip, ev_capped, ev_long, ev_stall;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  grant_fsm #(.CHANNELS(CH), .WEIGHT_W(WW)) dut (
    .clk(clk), .rst(rst), .hold(hold), .req(req), .mask(mask), .weight(weight),
    .max_weight(max_weight), .grant_q(grant_q), .gnt(gnt));

  rr_ref_model #(.CHANNELS(CH), .WEIGHT_W(WW)) ref_m (
    .clk(clk), .rst(rst), .hold(hold), .req(req), .weights(weights),
    .max_weight(max_weight), .exp_gnt(exp_gnt), .owner(owner),
    .ev_decide(ev_decide), .ev_wrap(ev_wrap), .ev_skip(ev_skip),
    .ev_capped(ev_capped), .ev_long(ev_long), .ev_stall(ev_stall));

  // mask and weight from the last grant
  always_comb begin
    int k;
    k = -1;
    for (int j = 0; j < CH; j++) if (grant_q[j]) k = j;
    for (int j = 0; j < CH; j++) mask[j] = (k < 0) ? 1'b0 : (k == CH - 1) ? 1'b1 : (j > k);
    weight = (k < 0) ? weights[WW-1:0] : weights[k*WW +: WW];
  end

  // cycle-by-cycle comparison with the reference model
  always @(negedge clk) if (!rst) begin
    checks++;
    if (gnt !== exp_gnt) begin
      failures++;
      if (failures < 10) $display("FAIL cyc=%0d req=%b gnt=%b exp=%b", cyc, req, gnt, exp_gnt);
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
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, len;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (3) @(negedge clk);

    // latency and slot length: master 2 alone, weight 5
    weights = wbus(1, 1, 5, 1);
    req = 4'b0100;
    t0 = cyc;
    while (gnt == 0) @(negedge clk);
    expect_true(cyc - t0 == 2, "lone request granted after two clocks");
    expect_true(gnt == 4'b0100, "grant goes to master 2");
    len = 0;
    while (gnt != 0) begin len++; @(negedge clk); end
    expect_true(len == 5, "weight 5 gives a five-cycle slot");
    req = '0;
    repeat (4) @(negedge clk);

    // strict round robin, all requesting; previous grant was master 2
    weights = wbus(2, 3, 1, 4);
    req = 4'b1111;
    begin
      automatic int order[$];
      automatic int lens[$];
      automatic int exp_order[6] = '{3, 0, 1, 2, 3, 0};
      automatic int exp_len[6]   = '{4, 2, 3, 1, 4, 2};
      for (int s = 0; s < 6; s++) begin
        while (gnt == 0) @(negedge clk);
        for (int j = 0; j < CH; j++) if (gnt[j]) order.push_back(j);
        len = 0;
        while (gnt != 0) begin len++; @(negedge clk); end
        lens.push_back(len);
      end
      for (int s = 0; s < 6; s++) begin
        expect_true(order[s] == exp_order[s], $sformatf("round-robin slot %0d", s));
        expect_true(lens[s] == exp_len[s], $sformatf("slot %0d length", s));
      end
    end
    req = '0;
    repeat (4) @(negedge clk);

    // max_weight: master 1 has weight 9, max is 3
    weights = wbus(1, 9, 1, 1);
    max_weight = 8'd3;
    req = 4'b0010;
    while (gnt == 0) @(negedge clk);
    len = 0;
    while (gnt != 0) begin len++; @(negedge clk); end
    expect_true(len == 9, "alone, the full weight is used");
    req = 4'b0011;  // master 0 now competes
    while (gnt != 4'b0010) @(negedge clk);
    len = 0;
    while (gnt == 4'b0010) begin len++; @(negedge clk); end
    expect_true(len == 3, "with a competitor the slot is capped at max_weight");
    req = '0;
    max_weight = 8'd255;
    repeat (6) @(negedge clk);

    // hold freezes a slot
    weights = wbus(2, 2, 2, 2);
    req = 4'b0001;
    while (gnt == 0) @(negedge clk);
    hold = 1;
    repeat (5) @(negedge clk);
    expect_true(gnt == 4'b0001, "grant kept while held");
    hold = 0;
    len = 0;
    while (gnt != 0) begin len++; @(negedge clk); end
    expect_true(len == 2, "no slot cycle is used up while held");
    req = '0;
    repeat (4) @(negedge clk);

    // random traffic against the reference model
    for (int n = 0; n < 4000; n++) begin
      if ($urandom_range(0, 7) == 0) req = CH'($urandom);
      if ($urandom_range(0, 199) == 0) weights = CH*WW'({$urandom_range(0, 6), $urandom_range(0, 6),
                                                          $urandom_range(0, 6), $urandom_range(0, 6)});
      if ($urandom_range(0, 299) == 0) max_weight = WW'($urandom_range(0, 4));
      hold = ($urandom_range(0, 19) == 0);
      if ($urandom_range(0, 1999) == 0) rst = 1; else rst = 0;
      @(negedge clk);
    end
    rst = 0;
    hold = 0;
    repeat (4) @(negedge clk);

    expect_true(n_wrap  > 0, "a wrap-round happened");
    expect_true(n_skip  > 0, "an idle master was skipped");
    expect_true(n_cap   > 0, "a slot was capped");
    expect_true(n_long  > 0, "a slot ran past max_weight alone");
    expect_true(n_stall > 0, "a hold happened");
    $display("events: wrap=%0d skip=%0d capped=%0d long=%0d stall=%0d",
             n_wrap, n_skip, n_cap, n_long, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
