// tb_aes_rcon: steps the round-constant generator through ten rounds and
// compares with the published sequence 01 02 04 08 10 20 40 80 1b 36; checks
// that `apply` low gives zero, that a cycle without `step` holds, and that
// `init` restarts the sequence.
module tb_aes_rcon;
  logic clk = 0, rst_n = 0, init = 0, step = 0, apply = 0;
  logic [7:0] rcon;
  int checks = 0, failures = 0;
  localparam logic [7:0] RC [10] = '{8'h01, 8'h02, 8'h04, 8'h08, 8'h10,
                                     8'h20, 8'h40, 8'h80, 8'h1b, 8'h36};

  aes_rcon dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [7:0] exp, input string what);
    checks++;
    if (rcon !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, rcon, exp);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      init = 1;
      @(negedge clk);
      init = 0;
      for (int r = 0; r < 10; r++) begin
        apply = 0; #1 check(8'h00, "gated");
        apply = 1; #1 check(RC[r], $sformatf("round %0d", r + 1));
        @(negedge clk);  // no step: value holds
        check(RC[r], "hold");
        step = 1;
        @(negedge clk);
        step = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
