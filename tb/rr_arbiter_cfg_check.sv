// rr_arbiter_cfg_check: random-traffic check of one rr_arbiter configuration.
//
// Instantiates rr_arbiter with the given CHANNELS and WEIGHT_W, drives random
// requests, weights, max_weight, hold and occasional resets for CYCLES clock
// cycles, and compares the grant with rr_ref_model every cycle and gnt_idx
// with the grant. It raises done when finished and reports its counts, plus
// how many wrap-rounds and capped slots it saw, on its outputs.
module rr_arbiter_cfg_check #(
  parameter int CHANNELS = 8,
  parameter int WEIGHT_W = 4,
  parameter int CYCLES   = 3000
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output int   n_wrap,
  output int   n_cap,
  output logic done
);
  localparam int IDX_W = (CHANNELS > 1) ? $clog2(CHANNELS) : 1;

  logic rst = 1, hold = 0;
  logic [CHANNELS-1:0]          req = '0, gnt, exp_gnt;
  logic [CHANNELS*WEIGHT_W-1:0] weights = '0;
  logic [WEIGHT_W-1:0]          max_weight = '1;
  logic [IDX_W-1:0]             gnt_idx;
  int owner;
  logic ev_decide, ev_wrap, ev_skip, ev_capped, ev_long, ev_stall;

  rr_arbiter #(.CHANNELS(CHANNELS), .WEIGHT_W(WEIGHT_W)) dut (
    .clk(clk), .rst(rst), .hold(hold), .req(req), .weights(weights),
    .max_weight(max_weight), .gnt(gnt), .gnt_idx(gnt_idx));

  rr_ref_model #(.CHANNELS(CHANNELS), .WEIGHT_W(WEIGHT_W)) ref_m (
    .clk(clk), .rst(rst), .hold(hold), .req(req), .weights(weights),
    .max_weight(max_weight), .exp_gnt(exp_gnt), .owner(owner),
    .ev_decide(ev_decide), .ev_wrap(ev_wrap), .ev_skip(ev_skip),
    .ev_capped(ev_capped), .ev_long(ev_long), .ev_stall(ev_stall));

  initial begin
    checks = 0; failures = 0; n_wrap = 0; n_cap = 0; done = 0;
  end

  always @(negedge clk) if (!rst && !done) begin
    checks++;
    if (gnt !== exp_gnt) begin
      failures++;
      if (failures < 5) $display("FAIL CH=%0d gnt=%b exp=%b", CHANNELS, gnt, exp_gnt);
    end
    if (gnt != 0) begin
      checks++;
      if (gnt != (CHANNELS'(1) << gnt_idx)) failures++;
    end
  end

  always @(posedge clk) if (!rst && !done) begin
    n_wrap += int'(ev_wrap);
    n_cap  += int'(ev_capped);
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < CYCLES; n++) begin
      if ($urandom_range(0, 5) == 0)
        for (int i = 0; i < CHANNELS; i++) req[i] = $urandom_range(0, 2) != 0;
      if ($urandom_range(0, 99) == 0)
        for (int i = 0; i < CHANNELS; i++) weights[i*WEIGHT_W +: WEIGHT_W] = WEIGHT_W'($urandom);
      if ($urandom_range(0, 199) == 0) max_weight = WEIGHT_W'($urandom_range(0, 3));
      hold = ($urandom_range(0, 15) == 0);
      rst  = ($urandom_range(0, 1499) == 0);
      @(negedge clk);
    end
    done = 1;
  end
endmodule
