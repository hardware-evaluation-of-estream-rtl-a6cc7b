// tb_aes_ofb_core: checks the AES-OFB core.
//  * Known answers: the FIPS-197 AES-128 example and the first two OFB blocks
//    of the NIST SP 800-38A AES-128 OFB example (plaintext in, ciphertext out).
//  * Random keys and IVs against a block-at-a-time AES model in this testbench
//    (whole-state SubBytes/ShiftRows/MixColumns, full key schedule computed up
//    front, S-box table built by brute-force inversion).
//  * Timing: the first keystream block is ready 1+41 clocks after the init edge
//    (one clock takes in the IV, then 41 clocks of AES) and, with
//    a consumer that keeps up, each further block 41 clocks after the previous.
//  * A slow consumer: the finished block is held until the keystream register
//    frees, and no keystream is lost or repeated.
// Byte j of every 128-bit value on the ports is bits [8j+7:8j]; the constants
// below are written in the usual byte-0-first notation and converted.
module tb_aes_ofb_core;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [127:0] key, iv;
  logic init, step;
  logic [63:0] din, dout;
  logic ready;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  aes_ofb_core dut (.clk, .rst_n, .key, .iv, .init, .step, .din, .dout, .ready);

  // ---- reference model
  logic [7:0] sbox_t [256];

  function automatic logic [7:0] pmul(logic [7:0] x, logic [7:0] z);
    logic [15:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) if (z[i]) p ^= 16'(x) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h11B << (i - 8);
    return p[7:0];
  endfunction

  task automatic build_sbox();
    for (int x = 0; x < 256; x++) begin
      logic [7:0] b, r;
      b = 8'h00;
      for (int c = 1; c < 256; c++) if (pmul(8'(x), 8'(c)) == 8'h01) b = 8'(c);
      for (int i = 0; i < 8; i++)
        r[i] = b[i] ^ b[(i + 4) % 8] ^ b[(i + 5) % 8] ^ b[(i + 6) % 8] ^ b[(i + 7) % 8] ^ ((8'h63 >> i) & 1);
      sbox_t[x] = r;
    end
  endtask

  function automatic logic [127:0] bswap(logic [127:0] x);
    logic [127:0] y;
    for (int j = 0; j < 16; j++) y[8*j +: 8] = x[127 - 8*j -: 8];
    return y;
  endfunction

  // AES-128 encryption; in/out/key in port byte order
  function automatic logic [127:0] ref_aes(logic [127:0] k, logic [127:0] pt);
    logic [7:0] st [16];
    logic [7:0] t [16];
    logic [7:0] w [176];
    logic [7:0] rc;
    for (int j = 0; j < 16; j++) w[j] = k[8*j +: 8];
    rc = 8'h01;
    for (int i = 4; i < 44; i++) begin
      logic [7:0] tmp [4];
      for (int r = 0; r < 4; r++) tmp[r] = w[4*(i-1) + r];
      if (i % 4 == 0) begin
        logic [7:0] t0;
        t0 = tmp[0];
        tmp[0] = sbox_t[tmp[1]] ^ rc; tmp[1] = sbox_t[tmp[2]];
        tmp[2] = sbox_t[tmp[3]];      tmp[3] = sbox_t[t0];
        rc = pmul(rc, 8'h02);
      end
      for (int r = 0; r < 4; r++) w[4*i + r] = w[4*(i-4) + r] ^ tmp[r];
    end
    for (int j = 0; j < 16; j++) st[j] = pt[8*j +: 8] ^ w[j];
    for (int rnd = 1; rnd <= 10; rnd++) begin
      for (int j = 0; j < 16; j++) st[j] = sbox_t[st[j]];
      for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) t[4*c + r] = st[4*((c + r) % 4) + r];
      for (int j = 0; j < 16; j++) st[j] = t[j];
      if (rnd != 10) begin
        for (int c = 0; c < 4; c++) begin
          logic [7:0] a0, a1, a2, a3;
          a0 = st[4*c]; a1 = st[4*c+1]; a2 = st[4*c+2]; a3 = st[4*c+3];
          st[4*c]   = pmul(a0, 2) ^ pmul(a1, 3) ^ a2 ^ a3;
          st[4*c+1] = a0 ^ pmul(a1, 2) ^ pmul(a2, 3) ^ a3;
          st[4*c+2] = a0 ^ a1 ^ pmul(a2, 2) ^ pmul(a3, 3);
          st[4*c+3] = pmul(a0, 3) ^ a1 ^ a2 ^ pmul(a3, 2);
        end
      end
      for (int j = 0; j < 16; j++) st[j] ^= w[16*rnd + j];
    end
    for (int j = 0; j < 16; j++) ref_aes[8*j +: 8] = st[j];
  endfunction

  task automatic expect128(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // start OFB; returns number of clocks from the init edge until ready
  task automatic start(output int cyc);
    @(negedge clk); init = 1'b1;
    @(negedge clk); init = 1'b0;
    cyc = 1;
    while (!ready) begin @(negedge clk); cyc++; end
  endtask

  // encrypt one 128-bit block through the two 64-bit halves
  task automatic xfer(input logic [127:0] pt, output logic [127:0] ct);
    while (!ready) @(negedge clk);
    din = pt[63:0]; step = 1'b1; #1; ct[63:0] = dout;
    @(negedge clk);
    while (!ready) begin step = 1'b0; @(negedge clk); end
    din = pt[127:64]; step = 1'b1; #1; ct[127:64] = dout;
    @(negedge clk);
    step = 1'b0;
  endtask

  initial begin
    logic [127:0] ct, fb, pt;
    int cyc, t_prev, t_now, nblk;
    init = 0; step = 0; din = '0; key = '0; iv = '0;
    build_sbox();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // model sanity: FIPS-197 example
    expect128(ref_aes(bswap(128'h000102030405060708090a0b0c0d0e0f), bswap(128'h00112233445566778899aabbccddeeff)),
              bswap(128'h69c4e0d86a7b0430d8cdb78070b4c55a), "reference model FIPS-197");

    // FIPS-197 example through the core: first OFB block = AES_K(IV)
    key = bswap(128'h000102030405060708090a0b0c0d0e0f);
    iv  = bswap(128'h00112233445566778899aabbccddeeff);
    start(cyc);
    checks++;
    if (cyc != 1 + 41) begin failures++; $display("FAIL first block after %0d clocks, expected 42", cyc); end
    xfer('0, ct);
    expect128(ct, bswap(128'h69c4e0d86a7b0430d8cdb78070b4c55a), "FIPS-197 block");

    // SP 800-38A OFB example
    key = bswap(128'h2b7e151628aed2a6abf7158809cf4f3c);
    iv  = bswap(128'h000102030405060708090a0b0c0d0e0f);
    start(cyc);
    xfer(bswap(128'h6bc1bee22e409f96e93d7e117393172a), ct);
    expect128(ct, bswap(128'h3b3fd92eb72dad20333449f8e83cfb4a), "SP800-38A OFB block 1");
    xfer(bswap(128'hae2d8a571e03ac9c9eb76fac45af8e51), ct);
    expect128(ct, bswap(128'h7789508d16918f03f53c52dac54ed825), "SP800-38A OFB block 2");

    // random keys and IVs, fast consumer: 41-clock block period
    for (int k = 0; k < 6; k++) begin
      key = {$urandom, $urandom, $urandom, $urandom};
      iv  = {$urandom, $urandom, $urandom, $urandom};
      fb = iv;
      start(cyc);
      t_prev = 0;
      nblk = 0;
      for (int n = 0; n < 5; n++) begin
        pt = {$urandom, $urandom, $urandom, $urandom};
        fb = ref_aes(key, fb);
        // slow consumer on some blocks: keystream must wait, not be lost
        if (k % 2 == 1 && n == 2) repeat (100) @(negedge clk);
        t_now = $time / 10;
        xfer(pt, ct);
        expect128(ct, pt ^ fb, $sformatf("random key %0d block %0d", k, n));
        if (k % 2 == 0 && n >= 2) begin
          // block n was ready at most 41 clocks after block n-1 (consumer took 2)
          checks++;
          if (t_now - t_prev != 41) begin
            failures++;
            $display("FAIL block period %0d clocks, expected 41", t_now - t_prev);
          end
        end
        t_prev = t_now;
        nblk++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
