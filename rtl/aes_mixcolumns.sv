// aes_mixcolumns: byte-serial Mix-Columns for one state column.
//
// Four byte registers RM0..RM3 form a small shift register. While `collect`
// is high the S-box output enters at RM3 and the others move down, so after
// four cycles RM0..RM3 hold rows 0..3 of the column. While `rotate` is high
// the registers rotate (RM0 <- RM1 <- RM2 <- RM3 <- RM0); in every cycle
// mc_out = {02}*RM0 ^ {03}*RM1 ^ RM2 ^ RM3, so four rotate cycles produce
// output rows 0, 1, 2, 3 in order. Collecting a column and then emitting it
// takes the 4 + 4 cycles per column of the design's schedule. `rm0` exposes
// the raw RM0 register, which the last round (no Mix-Columns) uses to hold
// the four S-box bytes of the key word. Registers reset to zero
// (asynchronous, active low); collect has priority over rotate.
module aes_mixcolumns
  import aes_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  collect,
  input  logic  rotate,
  input  byte_t din,
  output byte_t mc_out,
  output byte_t rm0
);
  byte_t rm [4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) rm[i] <= '0;
    end else if (collect) begin
      rm[0] <= rm[1];
      rm[1] <= rm[2];
      rm[2] <= rm[3];
      rm[3] <= din;
    end else if (rotate) begin
      rm[0] <= rm[1];
      rm[1] <= rm[2];
      rm[2] <= rm[3];
      rm[3] <= rm[0];
    end
  end

  assign mc_out = xtime(rm[0]) ^ (xtime(rm[1]) ^ rm[1]) ^ rm[2] ^ rm[3];
  assign rm0    = rm[0];
endmodule
