// ngprc_tb: self-checking test of the next grant precalculator.
//
// For each one-hot grant and for the all-zero grant the expected mask is
// built here from its meaning: every master above the current one, all
// masters when the current one is the highest, none when nothing was granted.
// The worked example 4'b0010 -> 4'b1100 is checked explicitly. Runs at the
// default four masters and at eight.
module ngprc_tb;
  int checks = 0, failures = 0;

  logic [3:0] g4, m4;
  logic [7:0] g8, m8;
  ngprc #(.CHANNELS(4)) dut4 (.grant(g4), .mask(m4));
  ngprc #(.CHANNELS(8)) dut8 (.grant(g8), .mask(m8));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    g4 = 4'b0010; g8 = '0; #1;
    checks++;
    if (m4 !== 4'b1100) begin failures++; $display("FAIL example: %b", m4); end
    for (int k = -1; k < 4; k++) begin
      logic [3:0] e;
      g4 = (k < 0) ? '0 : 4'(1 << k);
      for (int j = 0; j < 4; j++) e[j] = (k < 0) ? 1'b0 : (k == 3) ? 1'b1 : (j > k);
      #1; checks++;
      if (m4 !== e) begin failures++; $display("FAIL4 g=%b m=%b exp=%b", g4, m4, e); end
    end
    for (int k = -1; k < 8; k++) begin
      logic [7:0] e;
      g8 = (k < 0) ? '0 : 8'(1 << k);
      for (int j = 0; j < 8; j++) e[j] = (k < 0) ? 1'b0 : (k == 7) ? 1'b1 : (j > k);
      #1; checks++;
      if (m8 !== e) begin failures++; $display("FAIL8 g=%b m=%b exp=%b", g8, m8, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
