// trivium_core: Trivium stream cipher producing RADIX keystream bits per clock
// (radix-64 is the default), XORed onto din to give dout.
//
// Algorithm (the public Trivium definition): a 288-bit state s1..s288 in three
// shift registers of 93, 84 and 111 bits. Per keystream bit
//   t1 = s66^s93, t2 = s162^s177, t3 = s243^s288, z = t1^t2^t3,
//   t1 ^= s91&s92 ^ s171, t2 ^= s175&s176 ^ s264, t3 ^= s286&s287 ^ s69,
//   shift t3 into s1, t1 into s94, t2 into s178.
// Here s_i is state bit i-1. The RADIX-bit step applies this update RADIX times
// in one clock (an unrolled loop), so radix-64 needs no extra registers.
// Keystream bit j of a step (j = 0 first) goes to dout[j].
//
// Interface/timing: `init` loads s1..s80 = key[79:0] (K1 = key[0]),
// s94..s173 = iv[79:0], s286..s288 = 1 and everything else 0, then runs the
// 1152 blank rounds on its own in 1152/RADIX further clocks; `ready` is high
// from the edge 1+1152/RADIX clocks after the init edge.
// While ready, dout = din ^ keystream combinationally and `step` advances the
// state at the clock edge. RADIX must divide 1152.
// The key and IV buses are 128 bits wide for all cores; Trivium uses the low
// 80 bits of each, and lint reports the rest as unused.
//
// The radix-64 configuration is the published one; key/IV bit order and the
// ready/step handshake are this design's choices.
module trivium_core #(
  parameter int unsigned RADIX = 64
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

  localparam int unsigned INIT_ROUNDS = 4 * 288;
  localparam int unsigned INIT_STEPS  = INIT_ROUNDS / RADIX;
  localparam int unsigned CW          = $clog2(INIT_STEPS + 1);

  initial assert (INIT_ROUNDS % RADIX == 0) else $error("RADIX must divide 1152");

  logic [287:0]   s_q, s_nxt, s_load;
  logic [RADIX-1:0] ks;
  logic [CW-1:0]  cnt_q;
  logic           ready_q;

  always_comb begin
    logic [287:0] st;
    logic t1, t2, t3;
    st = s_q;
    ks = '0;
    for (int j = 0; j < RADIX; j++) begin
      t1 = st[65]  ^ st[92];
      t2 = st[161] ^ st[176];
      t3 = st[242] ^ st[287];
      ks[j] = t1 ^ t2 ^ t3;
      t1 = t1 ^ (st[90]  & st[91])  ^ st[170];
      t2 = t2 ^ (st[174] & st[175]) ^ st[263];
      t3 = t3 ^ (st[285] & st[286]) ^ st[68];
      st = {st[286:177], t2, st[175:93], t1, st[91:0], t3};
    end
    s_nxt = st;
  end

  always_comb begin
    s_load = '0;
    s_load[79:0]    = key[79:0];
    s_load[172:93]  = iv[79:0];
    s_load[287:285] = 3'b111;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q     <= '0;
      cnt_q   <= '0;
      ready_q <= 1'b0;
    end else if (init) begin
      s_q     <= s_load;
      cnt_q   <= CW'(INIT_STEPS);
      ready_q <= 1'b0;
    end else if (cnt_q != '0) begin
      s_q   <= s_nxt;
      cnt_q <= cnt_q - 1'b1;
      if (cnt_q == CW'(1)) ready_q <= 1'b1;
    end else if (step && ready_q) begin
      s_q <= s_nxt;
    end
  end

  assign ready = ready_q;
  assign dout  = din ^ ks;

endmodule
