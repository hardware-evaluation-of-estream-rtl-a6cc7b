// aes_sbox: one AES S-box built as logic rather than a stored table: the
// multiplicative inverse in GF(2^8) modulo x^8+x^4+x^3+x+1 (0 maps to 0),
// computed as a^254 by square-and-multiply, followed by the AES affine map
// y = b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63.
// Purely combinational: one 8-bit input, one 8-bit output.
//
// Building the table as logic follows the published rule that no ROM macros
// were used for look-up tables; the inversion method is this design's choice.
module aes_sbox (
  input  logic [7:0] a,
  output logic [7:0] y
);

  function automatic logic [7:0] gmul(logic [7:0] x, logic [7:0] m);
    logic [7:0] p;
    logic [7:0] xx;
    p  = '0;
    xx = x;
    for (int i = 0; i < 8; i++) begin
      if (m[i]) p = p ^ xx;
      xx = {xx[6:0], 1'b0} ^ (xx[7] ? 8'h1b : 8'h00);
    end
    return p;
  endfunction

  logic [7:0] inv;

  // a^254 = a^(2+4+8+16+32+64+128)
  always_comb begin
    logic [7:0] sq;
    sq  = gmul(a, a);        // a^2
    inv = sq;
    for (int k = 2; k < 8; k++) begin
      sq  = gmul(sq, sq);    // a^(2^k)
      inv = gmul(inv, sq);
    end
  end

  assign y = inv ^ {inv[6:0], inv[7]} ^ {inv[5:0], inv[7:6]}
           ^ {inv[4:0], inv[7:5]} ^ {inv[3:0], inv[7:4]} ^ 8'h63;

endmodule
