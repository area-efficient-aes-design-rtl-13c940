// aes_rcon: round-constant generator for the AES-128 key expansion.
//
// An 8-bit register starts at {01} on `init` and is multiplied by x in
// GF(2^8) on every `step`, giving 01 02 04 08 10 20 40 80 1b 36 for rounds
// 1..10. The output is gated by `apply`, so it is non-zero only in the one
// cycle per round in which the control unit adds it to key byte 0; elsewhere
// it contributes nothing to the key XOR. Asynchronous active-low reset to
// {01}; init has priority over step.
module aes_rcon
  import aes_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  init,
  input  logic  step,
  input  logic  apply,
  output byte_t rcon
);
  byte_t rc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    rc <= 8'h01;
    else if (init) rc <= 8'h01;
    else if (step) rc <= xtime(rc);
  end

  assign rcon = apply ? rc : 8'h00;
endmodule
