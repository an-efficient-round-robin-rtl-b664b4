// ngprc: next grant precalculator.
//
// From the current one-hot grant it computes the mask of the masters that are
// next in round-robin order: rotate the grant left by one, invert it, add one.
// The result has every bit set from the position just above the current grant
// up to the top, e.g. grant 4'b0010 -> 4'b0100 -> 4'b1011 -> mask 4'b1100, so
// masters 2 and 3 come before the search wraps round to master 0. A grant on
// the top master rotates into bit 0 and gives an all-ones mask (wrap to
// master 0); an all-zero grant gives an all-zero mask, which makes the grant
// logic fall back to the unmasked requests. The three steps are the published
// ones; the all-zero case is a consequence of the arithmetic.
//
// Purely combinational, no clock.
module ngprc #(
  parameter int unsigned CHANNELS = 4
) (
  input  logic [CHANNELS-1:0] grant,
  output logic [CHANNELS-1:0] mask
);

  logic [CHANNELS-1:0] rotated;

  if (CHANNELS > 1) begin : g_rot
    assign rotated = {grant[CHANNELS-2:0], grant[CHANNELS-1]};
  end else begin : g_one
    assign rotated = grant;
  end

  assign mask = ~rotated + CHANNELS'(1);

endmodule
