// nano_aes: top level of the area-efficient AES-128 encryption core.
//
// The core (aes_composite_enc) processes one byte per cycle; this wrapper
// gives it a 128-bit handshake interface. A 128-bit key-holding register,
// cleared by reset, captures Kin when Krdy is high and the core is idle, and
// Kvld pulses in the next cycle. The held key is what the core reloads at the
// start of every encryption, so one Krdy serves any number of blocks.
// Drdy with Din starts an encryption; Din must stay stable for the 16 cycles
// after Drdy (the core reads it byte by byte), BSY is high for 334 cycles,
// then Dvld pulses once and Dout holds the ciphertext until the next Drdy.
// The port names are those of the design's entity; the exact Krdy/Kvld
// timing and the idle-only key capture are this implementation's choices.
// EN low freezes the core. Asynchronous active-low reset RSTn.
module nano_aes (
  input  logic         CLK,
  input  logic         RSTn,
  input  logic         EN,
  input  logic [127:0] Kin,
  input  logic         Krdy,
  input  logic [127:0] Din,
  input  logic         Drdy,
  output logic [127:0] Dout,
  output logic         BSY,
  output logic         Dvld,
  output logic         Kvld,
  output logic         sel
);
  logic [127:0] key_hold;
  logic         key_take;

  assign key_take = Krdy && !BSY;

  always_ff @(posedge CLK or negedge RSTn) begin
    if (!RSTn) begin
      key_hold <= '0;
      Kvld     <= 1'b0;
    end else begin
      Kvld <= key_take;
      if (key_take) key_hold <= Kin;
    end
  end

  aes_composite_enc u_core (
    .CLK, .RSTn, .EN, .Din, .Kin(key_hold), .Drdy, .Dout, .BSY, .Dvld, .sel
  );

endmodule
