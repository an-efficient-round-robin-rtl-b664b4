// grant_fsm: grant state machine of the weighted round-robin arbiter.
//
// Four states, as in the published state diagram:
//   Reset          entered whenever rst is 1; left for Grant Process once rst is 0.
//   Grant Process  masks the requests with the next-grant mask from the
//                  precalculator and grants the lowest-numbered requesting
//                  master inside the mask; if no masked master requests it
//                  takes the lowest-numbered requester overall (the wrap-round).
//                  It stays here while no master requests.
//   Get Weight     latches the granted master's weight from the weight decoder.
//   Count          drives the grant out and counts clock cycles until the
//                  counter reaches the weight, then returns to Grant Process.
//
// Global maximum weight: while any other master is requesting, the slot ends
// once the counter reaches max_weight even if the master's own weight is
// larger; a master alone may use its whole weight. The comparison is made
// every Count cycle, so a competitor that arrives mid-slot shortens it.
//
// Timing (this design's choices): the decision registers at the end of the
// Grant Process cycle, Get Weight takes one cycle, and gnt is high for exactly
// max(weight,1) cycles (capped as above) in Count. A slot therefore costs
// weight + 2 cycles, and a request seen in Grant Process at cycle t is
// served from cycle t+2. The slot runs its full length even if the master
// drops its request. hold (downstream full) stops both the counter and new
// decisions; the grant stays with its master meanwhile. grant_q keeps the last
// decided grant after the slot ends, so the next mask is computed from it.
// Reset is synchronous and active high, as the diagram's Reset == 1 arcs show.
module grant_fsm #(
  parameter int unsigned CHANNELS = 4,
  parameter int unsigned WEIGHT_W = 8
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                hold,        // downstream cannot take data: freeze
  input  logic [CHANNELS-1:0] req,         // one request line per master
  input  logic [CHANNELS-1:0] mask,        // next-grant mask from the precalculator
  input  logic [WEIGHT_W-1:0] weight,      // decoded weight of grant_q
  input  logic [WEIGHT_W-1:0] max_weight,  // global maximum while others wait
  output logic [CHANNELS-1:0] grant_q,     // last decided grant (one-hot or 0)
  output logic [CHANNELS-1:0] gnt          // grant output, high during Count
);

  import rr_pkg::*;

  grant_state_e        state_q, state_d;
  logic [WEIGHT_W-1:0] weight_q;
  logic [WEIGHT_W-1:0] count_q;
  logic [CHANNELS-1:0] masked_req, cand, pick;
  logic                others_waiting;
  logic [WEIGHT_W-1:0] limit;

  // Grant Process: masked requests first, all requests when none is masked in.
  assign masked_req = req & mask;
  assign cand       = (|masked_req) ? masked_req : req;
  assign pick       = cand & (~cand + CHANNELS'(1));  // lowest set bit

  // Count: the slot length, capped by max_weight while another master waits.
  assign others_waiting = |(req & ~grant_q);
  always_comb begin
    limit = weight_q;
    if (others_waiting && (weight_q > max_weight)) limit = max_weight;
  end

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      ST_RESET:         state_d = ST_GRANT_PROCESS;
      ST_GRANT_PROCESS: if (!hold && |pick) state_d = ST_GET_WEIGHT;
      ST_GET_WEIGHT:    state_d = ST_COUNT;
      ST_COUNT:         if (!hold && count_q >= limit) state_d = ST_GRANT_PROCESS;
      default:          state_d = ST_RESET;
    endcase
    if (rst) state_d = ST_RESET;
  end

  always_ff @(posedge clk) begin
    state_q <= state_d;
    if (rst) begin
      grant_q  <= '0;
      weight_q <= '0;
      count_q  <= '0;
    end else begin
      unique case (state_q)
        ST_GRANT_PROCESS: if (!hold && |pick) grant_q <= pick;
        ST_GET_WEIGHT: begin
          weight_q <= weight;
          count_q  <= WEIGHT_W'(1);
        end
        ST_COUNT: if (!hold && count_q < limit) count_q <= count_q + WEIGHT_W'(1);
        default: ;
      endcase
    end
  end

  assign gnt = (state_q == ST_COUNT) ? grant_q : '0;

  // The grant is never given to more than one master.
  a_gnt_onehot : assert property (@(posedge clk) disable iff (rst) $onehot0(grant_q));
  // A new grant only goes to a master that was requesting.
  a_gnt_to_req : assert property (@(posedge clk) disable iff (rst)
      (state_q == ST_GRANT_PROCESS && state_d == ST_GET_WEIGHT) |-> |(pick & req));

endmodule
