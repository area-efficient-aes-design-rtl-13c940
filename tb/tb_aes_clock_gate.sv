// tb_aes_clock_gate: drives the clock gate with an enable that changes at
// random times, in both clock phases. Expected behaviour, derived from the
// clock alone: gclk stays low while clk is low; at each rising clk edge it
// rises if and only if en was high just before the edge; it then holds for
// the whole high phase whatever en does, and never pulses twice per
// period. Checked at the edge, mid-high-phase and mid-low-phase of every
// cycle.
module tb_aes_clock_gate;
  logic clk = 0, en = 0, gclk;
  int checks = 0, failures = 0;

  aes_clock_gate dut (.*);

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%0t %s: gclk=%b expected %b", $time, what, got, exp);
    end
  endtask

  initial begin
    logic en_at_edge;
    #5;
    for (int n = 0; n < 500; n++) begin
      // Low phase (10 units): en may change anywhere in it.
      #($urandom_range(1, 4)) en = 1'($urandom);
      #1 chk(gclk, 1'b0, "low phase");
      #($urandom_range(1, 4));
      en_at_edge = en;
      #5;
      clk = 1;
      #1 chk(gclk, en_at_edge, "after rising edge");
      // High phase: en toggles, gclk must not follow.
      en = ~en;
      #2 chk(gclk, en_at_edge, "en changed in high phase");
      en = 1'($urandom);
      #2 chk(gclk, en_at_edge, "high phase");
      #5 clk = 0;
      #1 chk(gclk, 1'b0, "after falling edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
