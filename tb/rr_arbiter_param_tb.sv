// rr_arbiter_param_tb: the arbiter at sizes other than the default.
//
// The number of masters and the weight width are synthesis-time parameters.
// This testbench runs three configurations side by side (8 masters with
// 4-bit weights, 3 masters with 8-bit weights, 5 masters with 3-bit weights)
// under random traffic, each compared cycle by cycle with the reference
// model, and requires each to have wrapped round and capped a slot.
module rr_arbiter_param_tb;
  logic clk = 0;
  always #5 clk = ~clk;

  int c[3], f[3], w[3], k[3];
  logic d[3];
  int checks, failures;

  rr_arbiter_cfg_check #(.CHANNELS(8), .WEIGHT_W(4), .CYCLES(4000)) u8 (
    .clk(clk), .checks(c[0]), .failures(f[0]), .n_wrap(w[0]), .n_cap(k[0]), .done(d[0]));
  rr_arbiter_cfg_check #(.CHANNELS(3), .WEIGHT_W(8), .CYCLES(4000)) u3 (
    .clk(clk), .checks(c[1]), .failures(f[1]), .n_wrap(w[1]), .n_cap(k[1]), .done(d[1]));
  rr_arbiter_cfg_check #(.CHANNELS(5), .WEIGHT_W(3), .CYCLES(4000)) u5 (
    .clk(clk), .checks(c[2]), .failures(f[2]), .n_wrap(w[2]), .n_cap(k[2]), .done(d[2]));

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2], f[0] + f[1] + f[2] + 1);
    $finish;
  end

  initial begin
    wait (d[0] && d[1] && d[2]);
    checks = 0;
    failures = 0;
    for (int i = 0; i < 3; i++) begin
      checks += c[i] + 2;
      failures += f[i];
      if (w[i] == 0) begin failures++; $display("FAIL config %0d: no wrap-round", i); end
      if (k[i] == 0) begin failures++; $display("FAIL config %0d: no capped slot", i); end
      $display("config %0d: checks=%0d failures=%0d wraps=%0d capped=%0d", i, c[i], f[i], w[i], k[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
