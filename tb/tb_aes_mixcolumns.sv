// tb_aes_mixcolumns: collects random columns into RM0..RM3 (4 cycles), then
// rotates four times and compares each output byte with the reference
// Mix-Columns of the column, row 0 first. Also checks rm0 after collection,
// that an idle cycle holds the registers, and the published column
// db 13 53 45 -> 8e 4d a1 bc.
module tb_aes_mixcolumns;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0, collect = 0, rotate = 0;
  logic [7:0] din = 0, mc_out, rm0;
  int checks = 0, failures = 0;

  aes_mixcolumns dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic run_column(input logic [31:0] col);
    logic [31:0] exp;
    exp = ref_mix_column(col);
    for (int r = 0; r < 4; r++) begin
      @(negedge clk);
      collect = 1;
      din = col[31 - 8 * r -: 8];
    end
    @(negedge clk);
    collect = 0;
    din = $urandom;
    check(rm0, col[31:24], "rm0 after collect");
    @(negedge clk);  // idle cycle: nothing moves
    check(mc_out, exp[31:24], "hold");
    for (int r = 0; r < 4; r++) begin
      rotate = 1;
      check(mc_out, exp[31 - 8 * r -: 8], $sformatf("row %0d", r));
      @(negedge clk);
    end
    rotate = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_column(32'hdb135345);
    check(mc_out, 8'h8e ^ 8'h00, "rotation returns to row 0");
    for (int n = 0; n < 40; n++) run_column($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
