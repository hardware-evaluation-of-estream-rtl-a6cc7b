// aes_ofb_core: AES-128 run in output-feedback (OFB) mode as a stream cipher,
// the reference the stream-cipher candidates are compared against.
//
// OFB: keystream block 0 = AES_K(IV), block n = AES_K(block n-1); the
// ciphertext is plaintext XOR keystream. The engine is column-serial: it has
// four S-boxes for SubBytes and handles one 32-bit column per clock, so a round
// takes four clocks. In the clock for column c it gathers the four
// ShiftRows-displaced bytes of that column from the old state, substitutes
// them, applies MixColumns (not in round 10) and XORs round-key word c. Round
// keys are expanded on the fly, one word per clock in place
// (w0 ^= SubWord(RotWord(w3)) ^ Rcon, then wc ^= wc-1), with a separate set of
// four S-boxes for SubWord. The cipher key is not kept here: every block
// restarts the expansion from the key held in the interface.
// Timing: one clock for the initial AddRoundKey plus 10 x 4 round clocks =
// 41 clocks per 128-bit block; the next block starts right away, so the
// keystream rate is 128/41 = 3.12 bits per clock.
//
// Byte order: byte j of a 128-bit block, key or IV is bits [8j+7:8j]; byte j is
// row j%4 of column j/4, as in the AES standard. The finished block waits in a
// 128-bit keystream register and is handed out in two 64-bit halves, bytes
// 0..7 first: while `ready`, dout = din ^ current half combinationally and
// `step` moves to the next half. When the register is still occupied as a new
// block finishes, the engine holds that block until the register frees.
// `init` restarts from the IV (the init clock edge takes in the IV, so the first
// block is ready 1+41 clocks after it); `key` must stay stable while the core
// runs.
//
// The 41-clock schedule, four SubBytes S-boxes, on-the-fly round keys and the
// key kept in the interface are as published; the column-serial organisation,
// the separate key-schedule S-boxes and the 64-bit hand-out are this design's.
module aes_ofb_core (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [127:0]  key,
  input  logic [127:0]  iv,
  input  logic          init,
  input  logic          step,
  input  logic [63:0]   din,
  output logic [63:0]   dout,
  output logic          ready
);

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_ROUND, S_HOLD} phase_e;

  phase_e        phase_q;
  logic [127:0]  st_q;       // cipher state
  logic [95:0]   nst_q;      // columns 0..2 of the next state
  logic [127:0]  rk_q;       // round key being expanded
  logic [7:0]    rcon_q;
  logic [3:0]    round_q;    // 1..10
  logic [1:0]    col_q;      // 0..3
  logic [127:0]  ks_q;       // finished keystream block
  logic          ks_valid_q;
  logic          half_q;     // 0: bytes 0..7 next, 1: bytes 8..15 next

  function automatic logic [7:0] xtime(logic [7:0] x);
    return {x[6:0], 1'b0} ^ (x[7] ? 8'h1b : 8'h00);
  endfunction

  // ---- data column: ShiftRows selection, SubBytes, MixColumns, AddRoundKey
  logic [3:0][7:0] sb_in, sb_out, kb_in, kb_out, mix;
  logic [31:0]     kw, col_out;
  logic [127:0]    result;

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      sb_in[i] = st_q[8 * (4 * ((int'(col_q) + i) % 4) + i) +: 8];
      kb_in[i] = rk_q[96 + 8 * ((i + 1) % 4) +: 8];   // RotWord(w3)
    end
  end

  for (genvar g = 0; g < 4; g++) begin : g_sbox
    aes_sbox u_data_sbox (.a(sb_in[g]), .y(sb_out[g]));
    aes_sbox u_key_sbox  (.a(kb_in[g]), .y(kb_out[g]));
  end

  always_comb begin
    logic [7:0] s0, s1, s2, s3;
    s0 = sb_out[0]; s1 = sb_out[1]; s2 = sb_out[2]; s3 = sb_out[3];
    if (round_q == 4'd10) begin
      mix = sb_out;
    end else begin
      mix[0] = xtime(s0) ^ xtime(s1) ^ s1 ^ s2 ^ s3;
      mix[1] = s0 ^ xtime(s1) ^ xtime(s2) ^ s2 ^ s3;
      mix[2] = s0 ^ s1 ^ xtime(s2) ^ xtime(s3) ^ s3;
      mix[3] = xtime(s0) ^ s0 ^ s1 ^ s2 ^ xtime(s3);
    end
  end

  // ---- on-the-fly key expansion, one word per clock
  logic [1:0] col_prev;
  assign col_prev = col_q - 2'd1;

  always_comb begin
    if (col_q == 2'd0)
      kw = rk_q[31:0] ^ kb_out ^ {24'h0, rcon_q};
    else
      kw = rk_q[32 * col_q +: 32] ^ rk_q[32 * col_prev +: 32];
  end

  assign col_out = mix ^ kw;
  assign result  = {col_out, nst_q};

  // ---- keystream register and hand-out
  logic ks_free;
  assign ks_free = !ks_valid_q || (step && half_q);
  assign ready   = ks_valid_q;
  assign dout    = din ^ (half_q ? ks_q[127:64] : ks_q[63:0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q    <= S_IDLE;
      st_q       <= '0;
      nst_q      <= '0;
      rk_q       <= '0;
      rcon_q     <= 8'h01;
      round_q    <= 4'd1;
      col_q      <= 2'd0;
      ks_q       <= '0;
      ks_valid_q <= 1'b0;
      half_q     <= 1'b0;
    end else if (init) begin
      phase_q    <= S_LOAD;
      st_q       <= iv;
      ks_valid_q <= 1'b0;
      half_q     <= 1'b0;
    end else begin
      // consumer side
      if (step && ks_valid_q) begin
        half_q <= !half_q;
        if (half_q) ks_valid_q <= 1'b0;
      end
      // engine side
      unique case (phase_q)
        S_IDLE: ;
        S_LOAD: begin
          st_q    <= st_q ^ key;
          rk_q    <= key;
          rcon_q  <= 8'h01;
          round_q <= 4'd1;
          col_q   <= 2'd0;
          phase_q <= S_ROUND;
        end
        S_ROUND: begin
          rk_q[32 * col_q +: 32] <= kw;
          col_q <= col_q + 2'd1;
          if (col_q != 2'd3) begin
            nst_q[32 * col_q +: 32] <= col_out;
          end else if (round_q != 4'd10) begin
            st_q    <= result;
            round_q <= round_q + 4'd1;
            rcon_q  <= xtime(rcon_q);
          end else begin
            st_q <= result;
            if (ks_free) begin
              ks_q       <= result;
              ks_valid_q <= 1'b1;
              half_q     <= 1'b0;
              phase_q    <= S_LOAD;
            end else begin
              phase_q <= S_HOLD;
            end
          end
        end
        S_HOLD: begin
          if (ks_free) begin
            ks_q       <= st_q;
            ks_valid_q <= 1'b1;
            half_q     <= 1'b0;
            phase_q    <= S_LOAD;
          end
        end
        default: phase_q <= S_IDLE;
      endcase
    end
  end

endmodule
