// aes_composite_enc: 8-bit datapath AES-128 encryption core.
//
// Everything moves one byte per cycle. The state register (RS0..RS15) and
// the key register (K0..K15) are byte shift registers; a single
// composite-field S-box is shared between the state path (byte RS0) and the
// key expansion (byte out2 of the key register); Mix-Columns works on one
// column collected in RM0..RM3. The byte written into RS15 is always
// "something XOR a round-key byte", where the something is the plaintext
// byte (first round key, during loading), the Mix-Columns byte (rounds 1..9)
// or the S-box byte (round 10). The round key is expanded on the fly, one
// byte per cycle in step with its use:
//   new_i = K0 ^ (i < 4 ? SubWord(RotWord(w3))_i ^ (i == 0 ? rcon : 0) : K12)
// and the new byte is written back into K15, so the key register always
// holds the round key in use. Because the key register ends an encryption
// holding round key 10, every encryption reloads the cipher key from Kin.
//
// Interface: Drdy starts an encryption when BSY is low. Din and Kin are
// read one byte per cycle during the first 16 busy cycles (byte 0 in bits
// 127:120) and must stay stable until then. After 334 busy cycles Dvld
// pulses for one cycle and Dout (the state register, byte 0 in bits
// 127:120) holds the ciphertext until the next start. `sel` is the S-box
// input select (1 while the key register uses the S-box). EN low freezes
// the core. Asynchronous active-low reset RSTn.
module aes_composite_enc
  import aes_pkg::*;
(
  input  logic         CLK,
  input  logic         RSTn,
  input  logic         EN,
  input  logic [127:0] Din,
  input  logic [127:0] Kin,
  input  logic         Drdy,
  output logic [127:0] Dout,
  output logic         BSY,
  output logic         Dvld,
  output logic         sel
);
  cs_t        cs;
  din_sel_e   din_sel;
  logic [3:0] byte_idx;
  logic       key_shift, key_load, sbox_key, ksub_from_rm, key_first_word;
  logic       rcon_init, rcon_step, rcon_apply, mc_collect, mc_rotate;
  key_tap_e   key_tap;

  byte_t din_byte, kin_byte, rs0, sbox_in, sbox_out, mc_out, rm0, rcon;
  byte_t key_out1, key_k12, key_out2, sub_term, new_key, key_din, ark_a;

  aes_control u_ctrl (
    .clk(CLK), .rst_n(RSTn), .en(EN), .start(Drdy),
    .cs, .din_sel, .byte_idx, .key_shift, .key_load, .key_tap, .sbox_key,
    .ksub_from_rm, .key_first_word, .rcon_init, .rcon_step, .rcon_apply,
    .mc_collect, .mc_rotate, .busy(BSY), .done(Dvld)
  );

  // Byte i of the 128-bit inputs.
  assign din_byte = Din[127 - 8 * byte_idx -: 8];
  assign kin_byte = Kin[127 - 8 * byte_idx -: 8];

  // Shared S-box.
  assign sbox_in = sbox_key ? key_out2 : rs0;
  aes_sbox u_sbox (.a(sbox_in), .s(sbox_out));
  assign sel = sbox_key;

  // Key expansion byte and key-register input.
  assign sub_term = (ksub_from_rm ? rm0 : sbox_out) ^ rcon;
  assign new_key  = key_out1 ^ (key_first_word ? sub_term : key_k12);
  assign key_din  = key_load ? kin_byte : new_key;

  aes_key_register u_key (
    .clk(CLK), .rst_n(RSTn), .shift(key_shift), .din(key_din), .tap(key_tap),
    .out1(key_out1), .k12(key_k12), .out2(key_out2)
  );

  aes_rcon u_rcon (
    .clk(CLK), .rst_n(RSTn), .init(rcon_init), .step(rcon_step),
    .apply(rcon_apply), .rcon
  );

  aes_mixcolumns u_mix (
    .clk(CLK), .rst_n(RSTn), .collect(mc_collect), .rotate(mc_rotate),
    .din(sbox_out), .mc_out, .rm0
  );

  // Add-Round-Key: the only XOR in front of the state register.
  always_comb begin
    unique case (din_sel)
      DSEL_LOAD: ark_a = din_byte;
      DSEL_MIX:  ark_a = mc_out;
      DSEL_SBOX: ark_a = sbox_out;
      default:   ark_a = din_byte;
    endcase
  end

  aes_state_register u_state (
    .clk(CLK), .rst_n(RSTn), .cs, .din(ark_a ^ key_din), .rs0, .state(Dout)
  );
endmodule
