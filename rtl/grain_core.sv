// grain_core: Grain (version 1: 80-bit key, 64-bit IV) producing RADIX keystream
// bits per clock (radix-16 is the default), XORed onto din to give dout.
//
// Algorithm (the public Grain v1 definition): an 80-bit LFSR s and an 80-bit
// NFSR b. Per bit
//   z  = b1^b2^b4^b10^b31^b43^b56 ^ h(s3, s25, s46, s64, b63)
//   h(x0..x4) = x1^x4^x0x3^x2x3^x3x4^x0x1x2^x0x2x3^x0x2x4^x1x2x4^x2x3x4
//   s80 = s62^s51^s38^s23^s13^s0
//   b80 = s0 ^ b62^b60^b52^b45^b37^b33^b28^b21^b14^b9^b0 ^ b63b60 ^ b37b33
//         ^ b15b9 ^ b60b52b45 ^ b33b28b21 ^ b63b45b28b9 ^ b60b52b37b33
//         ^ b63b60b21b15 ^ b63b60b52b45b37 ^ b33b28b21b15b9 ^ b52b45b37b33b28b21
// and both registers shift by one towards index 0. During the 160 setup clocks z
// is also XORed into s80 and b80. The RADIX-bit step applies the update RADIX
// times in one clock; for RADIX <= 16 all taps of one step still read register
// bits, so the unrolled logic is a flat XOR/AND network.
//
// Interface/timing: `init` loads b = key[79:0], s[63:0] = iv[63:0],
// s[79:64] = 1, then runs the setup in 160/RADIX further clocks on its own;
// `ready` is high from the edge 1+160/RADIX clocks after the init edge. While ready, dout = din ^ keystream (bit j = j-th keystream
// bit) combinationally and `step` advances the state. RADIX must divide 160.
// Of the 128-bit key and IV buses Grain uses key[79:0] and iv[63:0]; lint
// reports the rest as unused.
//
// The radix-16 configuration is the published one; which Grain version, the
// bit order and the handshake are this design's choices.
module grain_core #(
  parameter int unsigned RADIX = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [127:0]      key,
  input  logic [127:0]      iv,
  input  logic              init,
  input  logic              step,
  input  logic [RADIX-1:0]  din,
  output logic [RADIX-1:0]  dout,
  output logic              ready
);

  localparam int unsigned INIT_ROUNDS = 160;
  localparam int unsigned INIT_STEPS  = INIT_ROUNDS / RADIX;
  localparam int unsigned CW          = $clog2(INIT_STEPS + 1);

  initial assert (INIT_ROUNDS % RADIX == 0) else $error("RADIX must divide 160");

  logic [79:0]      s_q, b_q, s_nxt, b_nxt;
  logic [RADIX-1:0] ks;
  logic [CW-1:0]    cnt_q;
  logic             ready_q;
  logic             setup;

  assign setup = (cnt_q != '0);

  always_comb begin
    logic [79:0] s, b;
    logic x0, x1, x2, x3, x4, h, z, fs, fb;
    s = s_q;
    b = b_q;
    ks = '0;
    for (int j = 0; j < RADIX; j++) begin
      x0 = s[3]; x1 = s[25]; x2 = s[46]; x3 = s[64]; x4 = b[63];
      h  = x1 ^ x4 ^ (x0 & x3) ^ (x2 & x3) ^ (x3 & x4) ^ (x0 & x1 & x2)
         ^ (x0 & x2 & x3) ^ (x0 & x2 & x4) ^ (x1 & x2 & x4) ^ (x2 & x3 & x4);
      z  = b[1] ^ b[2] ^ b[4] ^ b[10] ^ b[31] ^ b[43] ^ b[56] ^ h;
      ks[j] = z;
      fs = s[62] ^ s[51] ^ s[38] ^ s[23] ^ s[13] ^ s[0];
      fb = s[0] ^ b[62] ^ b[60] ^ b[52] ^ b[45] ^ b[37] ^ b[33] ^ b[28] ^ b[21]
         ^ b[14] ^ b[9] ^ b[0]
         ^ (b[63] & b[60]) ^ (b[37] & b[33]) ^ (b[15] & b[9])
         ^ (b[60] & b[52] & b[45]) ^ (b[33] & b[28] & b[21])
         ^ (b[63] & b[45] & b[28] & b[9]) ^ (b[60] & b[52] & b[37] & b[33])
         ^ (b[63] & b[60] & b[21] & b[15])
         ^ (b[63] & b[60] & b[52] & b[45] & b[37])
         ^ (b[33] & b[28] & b[21] & b[15] & b[9])
         ^ (b[52] & b[45] & b[37] & b[33] & b[28] & b[21]);
      if (setup) begin
        fs = fs ^ z;
        fb = fb ^ z;
      end
      s = {fs, s[79:1]};
      b = {fb, b[79:1]};
    end
    s_nxt = s;
    b_nxt = b;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q     <= '0;
      b_q     <= '0;
      cnt_q   <= '0;
      ready_q <= 1'b0;
    end else if (init) begin
      b_q     <= key[79:0];
      s_q     <= {16'hFFFF, iv[63:0]};
      cnt_q   <= CW'(INIT_STEPS);
      ready_q <= 1'b0;
    end else if (setup) begin
      s_q   <= s_nxt;
      b_q   <= b_nxt;
      cnt_q <= cnt_q - 1'b1;
      if (cnt_q == CW'(1)) ready_q <= 1'b1;
    end else if (step && ready_q) begin
      s_q <= s_nxt;
      b_q <= b_nxt;
    end
  end

  assign ready = ready_q;
  assign dout  = din ^ ks;

endmodule
