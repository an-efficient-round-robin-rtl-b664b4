// rr_arbiter: weighted round-robin arbiter.
//
// Each of CHANNELS masters raises req[i] and has its own weight, the number
// of clock cycles it keeps the grant once it gets it; the weights arrive
// concatenated on weights (master 0 in the low WEIGHT_W bits). Masters are
// served in strict round-robin order: after master k, the next grant goes to
// the first requester among k+1 .. CHANNELS-1, then 0 .. k. A global
// max_weight limits a slot while any other master is waiting.
//
// Three parts, as published: the next grant precalculator (ngprc) derives a
// priority mask from the last grant, the grant state machine (grant_fsm)
// picks the next master under that mask and times its slot, and the weight
// decoder (weight_decoder) looks up the granted master's weight and index.
// The hold input and the index output (gnt_idx) are additions of this design
// that let the arbiter sit in a packet switch output port: hold freezes the
// arbiter while the downstream side is full, gnt_idx selects the packet.
//
// Timing: see grant_fsm. gnt is high for max(weight,1) cycles, capped at
// max(max_weight,1) when others wait, with two arbitration cycles between
// slots. gnt_idx is valid while gnt is non-zero. Synchronous active-high rst.
module rr_arbiter #(
  parameter int unsigned CHANNELS = 4,
  parameter int unsigned WEIGHT_W = 8,
  localparam int unsigned IDX_W   = (CHANNELS > 1) ? $clog2(CHANNELS) : 1
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         hold,
  input  logic [CHANNELS-1:0]          req,
  input  logic [CHANNELS*WEIGHT_W-1:0] weights,
  input  logic [WEIGHT_W-1:0]          max_weight,
  output logic [CHANNELS-1:0]          gnt,
  output logic [IDX_W-1:0]             gnt_idx
);

  logic [CHANNELS-1:0] grant_q, mask;
  logic [WEIGHT_W-1:0] weight;

  ngprc #(.CHANNELS(CHANNELS)) u_ngprc (
    .grant (grant_q),
    .mask  (mask)
  );

  weight_decoder #(.CHANNELS(CHANNELS), .WEIGHT_W(WEIGHT_W)) u_wdec (
    .dataInBus (weights),
    .selOneHot (grant_q),
    .index     (gnt_idx),
    .dataOut   (weight)
  );

  grant_fsm #(.CHANNELS(CHANNELS), .WEIGHT_W(WEIGHT_W)) u_fsm (
    .clk        (clk),
    .rst        (rst),
    .hold       (hold),
    .req        (req),
    .mask       (mask),
    .weight     (weight),
    .max_weight (max_weight),
    .grant_q    (grant_q),
    .gnt        (gnt)
  );

endmodule
