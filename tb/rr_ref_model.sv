// rr_ref_model: cycle-level reference model of the weighted round-robin
// arbiter, used by the testbenches to predict the grant output.
//
// It keeps the last served master, the slot owner, its weight and the number
// of cycles it has held the grant, and follows the arbitration rules
// directly: search circularly for a requester starting just after the last
// served master, spend one cycle latching the weight, then grant for
// max(weight,1) cycles, or max(max_weight,1) once any other master requests
// while the weight exceeds max_weight. hold freezes decisions and the cycle
// count. Outputs are the predicted grant for the current cycle plus event
// flags the testbenches use to count what happened.
module rr_ref_model #(
  parameter int CHANNELS = 4,
  parameter int WEIGHT_W = 8
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         hold,
  input  logic [CHANNELS-1:0]          req,
  input  logic [CHANNELS*WEIGHT_W-1:0] weights,
  input  logic [WEIGHT_W-1:0]          max_weight,
  output logic [CHANNELS-1:0]          exp_gnt,
  output int                           owner,      // master holding the grant, -1 if none
  output logic                         ev_decide,  // a new master is chosen this cycle
  output logic                         ev_wrap,    // ... and its index is not above the last one
  output logic                         ev_skip,    // ... and a non-requesting master was passed over
  output logic                         ev_capped,  // a slot ends early because of max_weight
  output logic                         ev_long,    // a slot runs past max_weight (no competitor)
  output logic                         ev_stall    // hold is high during a slot or a decision
);

  typedef enum int {IDLE, FETCH, SLOT, DOWN} st_t;
  st_t st;
  int  last, cur, wt, held;
  int  next_m;

  function automatic int wof(int m);
    return int'(weights[m*WEIGHT_W +: WEIGHT_W]);
  endfunction

  function automatic int search();
    int start = (last < 0) ? 0 : (last + 1) % CHANNELS;
    for (int k = 0; k < CHANNELS; k++) begin
      int j = (start + k) % CHANNELS;
      if (req[j]) return j;
    end
    return -1;
  endfunction

  function automatic bit competitor();
    for (int j = 0; j < CHANNELS; j++) if (j != cur && req[j]) return 1;
    return 0;
  endfunction

  function automatic int slot_len();
    int w = wt;
    if (competitor() && wt > int'(max_weight)) w = int'(max_weight);
    return (w < 1) ? 1 : w;
  endfunction

  always_comb begin
    exp_gnt   = '0;
    owner     = -1;
    ev_decide = 0; ev_wrap = 0; ev_skip = 0; ev_capped = 0; ev_long = 0; ev_stall = 0;
    next_m    = search();
    if (st == SLOT) begin
      exp_gnt[cur] = 1'b1;
      owner        = cur;
      ev_stall     = hold;
      if (!hold && held + 1 >= slot_len() && competitor() && wt > int'(max_weight)
          && held + 1 < wt)
        ev_capped = 1;
      if (!hold && held + 1 > int'(max_weight) && wt > int'(max_weight) && !competitor())
        ev_long = 1;
    end
    if (st == IDLE && next_m >= 0) begin
      ev_stall  = hold;
      ev_decide = !hold;
      ev_wrap   = !hold && last >= 0 && next_m <= last;
      ev_skip   = !hold && last >= 0 && next_m != (last + 1) % CHANNELS;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st   <= DOWN;
      last <= -1;
      cur  <= -1;
      wt   <= 0;
      held <= 0;
    end else begin
      case (st)
        DOWN: st <= IDLE;
        IDLE: if (!hold && next_m >= 0) begin
          cur  <= next_m;
          last <= next_m;
          st   <= FETCH;
        end
        FETCH: begin
          wt   <= wof(cur);
          held <= 0;
          st   <= SLOT;
        end
        SLOT: if (!hold) begin
          if (held + 1 >= slot_len()) st <= IDLE;
          else held <= held + 1;
        end
        default: st <= IDLE;
      endcase
    end
  end

endmodule
