// packet_switch: one output port of a packet switch, arbitrated round robin.
//
// CHANNELS input ports compete for one output. Input port i raises
// ReqInt[i] while it has a packet on Packet[i]; the weighted round-robin
// arbiter answers with GntInt (one-hot) for as many cycles as that port's
// weight allows, and the multiplexer forwards the granted port's packet to
// PacketOut. ReqDnStr tells the downstream stage that PacketOut holds a packet
// (a port is granted and still requesting); FullDnStr from downstream says it
// cannot take one, and freezes the arbiter: the slot counter stops and no
// new grant is made, so a full downstream stage does not eat into a port's
// time slice. A packet moves in every cycle with ReqDnStr high and FullDnStr
// low; the granted port advances to its next packet in such cycles.
//
// The block diagram (four ports, ReqInt/GntInt, ReqDnStr/FullDnStr, the mux
// and its select) is the published one; the meaning given here to
// ReqDnStr/FullDnStr, the packet width and the weight width are this
// design's choices. Weights and max_weight are configuration inputs.
module packet_switch #(
  parameter int unsigned CHANNELS = 4,
  parameter int unsigned WEIGHT_W = 8,
  parameter int unsigned PKT_W    = 32
) (
  input  logic                           clk,
  input  logic                           rst,
  input  logic [CHANNELS-1:0]            ReqInt,
  output logic [CHANNELS-1:0]            GntInt,
  input  logic [CHANNELS-1:0][PKT_W-1:0] Packet,
  input  logic [CHANNELS*WEIGHT_W-1:0]   Weights,
  input  logic [WEIGHT_W-1:0]            MaxWeight,
  output logic [PKT_W-1:0]               PacketOut,
  output logic                           ReqDnStr,
  input  logic                           FullDnStr
);

  localparam int unsigned IDX_W = (CHANNELS > 1) ? $clog2(CHANNELS) : 1;

  logic [IDX_W-1:0] sel;

  rr_arbiter #(.CHANNELS(CHANNELS), .WEIGHT_W(WEIGHT_W)) u_arb (
    .clk        (clk),
    .rst        (rst),
    .hold       (FullDnStr),
    .req        (ReqInt),
    .weights    (Weights),
    .max_weight (MaxWeight),
    .gnt        (GntInt),
    .gnt_idx    (sel)
  );

  packet_mux #(.CHANNELS(CHANNELS), .PKT_W(PKT_W)) u_mux (
    .packet_in  (Packet),
    .sel        (sel),
    .packet_out (PacketOut)
  );

  assign ReqDnStr = |(GntInt & ReqInt);

endmodule
