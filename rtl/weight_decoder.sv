// weight_decoder: one-hot grant to weight.
//
// The weights of all masters are concatenated into one bus, dataInBus,
// master 0 in the least significant WEIGHT_W bits, so the bus is
// CHANNELS*WEIGHT_W bits wide. The one-hot grant selOneHot is first turned
// into a binary index by scanning i = 0 .. CHANNELS-1 and taking i wherever
// selOneHot[i] is set; the index then selects the slice
// dataInBus[index*WEIGHT_W +: WEIGHT_W] onto dataOut. Both the scan and the
// bus layout follow the published description; the index is also brought out
// because the packet multiplexer downstream needs it as its select.
//
// Purely combinational, no clock. With more than one bit set the highest set
// bit wins (the scan overwrites); with none set the index is 0 and master 0's
// weight is shown. The caller only ever drives a one-hot or all-zero grant.
// WEIGHT_W is not given by the published design: 8 bits is this design's
// choice.
module weight_decoder #(
  parameter int unsigned CHANNELS = 4,
  parameter int unsigned WEIGHT_W = 8,
  localparam int unsigned IDX_W   = (CHANNELS > 1) ? $clog2(CHANNELS) : 1
) (
  input  logic [CHANNELS*WEIGHT_W-1:0] dataInBus,
  input  logic [CHANNELS-1:0]          selOneHot,
  output logic [IDX_W-1:0]             index,
  output logic [WEIGHT_W-1:0]          dataOut
);

  always_comb begin
    index = '0;
    for (int unsigned i = 0; i < CHANNELS; i++) begin
      if (selOneHot[i]) index = IDX_W'(i);
    end
  end

  assign dataOut = dataInBus[index*WEIGHT_W +: WEIGHT_W];

endmodule
