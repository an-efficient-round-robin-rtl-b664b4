// packet_mux: N-to-1 packet multiplexer of a switch output port.
//
// Forwards the packet of input port sel to packet_out. Purely combinational.
// The published packet switch shows this multiplexer with four packet inputs
// and a select from the arbiter; the packet width (32 bits by default) and
// the binary select encoding are this design's choices.
module packet_mux #(
  parameter int unsigned CHANNELS = 4,
  parameter int unsigned PKT_W    = 32,
  localparam int unsigned IDX_W   = (CHANNELS > 1) ? $clog2(CHANNELS) : 1
) (
  input  logic [CHANNELS-1:0][PKT_W-1:0] packet_in,
  input  logic [IDX_W-1:0]               sel,
  output logic [PKT_W-1:0]               packet_out
);

  always_comb begin
    packet_out = '0;
    for (int unsigned i = 0; i < CHANNELS; i++) begin
      if (sel == IDX_W'(i)) packet_out = packet_in[i];
    end
  end

endmodule
