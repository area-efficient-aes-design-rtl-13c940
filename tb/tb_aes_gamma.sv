// tb_aes_gamma: exhaustive check of the gamma network. The expected value is
// formed from the two matrices gamma replaces: the inverse isomorphic map
// delta^-1 and the AES affine matrix AT, followed by XOR with 63h, each
// applied as a matrix-vector product over GF(2). Combinational, 256 checks.
module tb_aes_gamma;
  logic [7:0] x, g;
  int checks = 0, failures = 0;

  // Row i gives output bit 7-i; column j multiplies input bit 7-j.
  localparam logic [7:0] DINV [8] = '{8'b11100010, 8'b01000100, 8'b01100010, 8'b01110110,
                                      8'b00111110, 8'b10011110, 8'b00110000, 8'b01110101};
  localparam logic [7:0] AT   [8] = '{8'b11111000, 8'b01111100, 8'b00111110, 8'b00011111,
                                      8'b10001111, 8'b11000111, 8'b11100011, 8'b11110001};

  function automatic logic [7:0] matvec(input logic [7:0] m [8], input logic [7:0] v);
    logic [7:0] r;
    for (int i = 0; i < 8; i++) r[7 - i] = ^(m[i] & v);
    return r;
  endfunction

  aes_gamma dut (.x, .g);

  initial begin
    for (int v = 0; v < 256; v++) begin
      logic [7:0] exp;
      x = 8'(v);
      #1;
      exp = matvec(AT, matvec(DINV, x)) ^ 8'h63;
      checks++;
      if (g !== exp) begin
        failures++;
        $display("gamma(%h) = %h, expected %h", x, g, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
