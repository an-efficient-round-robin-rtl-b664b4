// packet_mux_tb: self-checking test of the packet multiplexer.
//
// Random packets on all four inputs; for every select value the output must
// equal the packet of that input.
module packet_mux_tb;
  localparam int CH = 4;
  localparam int PW = 32;

  logic [CH-1:0][PW-1:0] pin;
  logic [1:0]            sel;
  logic [PW-1:0]         pout;
  int checks = 0, failures = 0;

  packet_mux #(.CHANNELS(CH), .PKT_W(PW)) dut (.packet_in(pin), .sel(sel), .packet_out(pout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 100; n++) begin
      logic [PW-1:0] p[CH];
      for (int i = 0; i < CH; i++) begin
        p[i] = $urandom;
        pin[i] = p[i];
      end
      for (int s = 0; s < CH; s++) begin
        sel = 2'(s);
        #1;
        checks++;
        if (pout !== p[s]) begin
          failures++;
          $display("FAIL sel=%0d out=%h exp=%h", s, pout, p[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
