// tb_estream_asic: end-to-end test of the whole chip through its pins only
// (DataIn, Ctrl, DataOut), at the default configuration. The host sequence:
//  1. write an all-zero key/IV, initialise Trivium, encrypt in slow mode and
//     compare with the published all-zero keystream, then keep going in fast
//     mode against a bit-serial Trivium model (one 64-bit step per RUN clock);
//  2. initialise Grain on random key/IV and encrypt in slow mode (one word per
//     step) and fast mode against a sequence model of Grain;
//  3. load the NIST SP 800-38A key and IV, initialise AES-OFB, encrypt two
//     blocks in slow mode against the published ciphertext, then measure the
//     fast-mode rate: two 64-bit steps per 41 clocks;
//  4. drive an external slot through the ext_* ports.
// Status is polled with STATUS until the selected core reports ready.
// Mechanisms counted (each must occur): key writes, init, slow steps, halts
// with unread output, input waiting for a not-ready core, fast steps, AES
// blocks held for a busy keystream register, status reads, external steps.
module tb_estream_asic;
  import estream_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [15:0] data_in, data_out;
  logic [7:0] ctrl;
  logic [127:0] ext_key, ext_iv;
  logic [63:0] ext_din;
  logic [N_EXT-1:0] ext_init, ext_step, ext_ready;
  logic [N_EXT-1:0][63:0] ext_dout;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  estream_asic dut (.clk, .rst_n, .data_in, .ctrl, .data_out, .ext_key, .ext_iv, .ext_din,
    .ext_init, .ext_step, .ext_dout, .ext_ready);

  // ---- external slot stand-in: ready after init, dout = din ^ constant
  logic [N_EXT-1:0] ext_rdy_q;
  int n_ext_step = 0;
  assign ext_ready = ext_rdy_q;
  for (genvar k = 0; k < N_EXT; k++) begin : g_ext
    assign ext_dout[k] = ext_din ^ {16{4'(k)}};
  end
  always_ff @(posedge clk) begin
    if (!rst_n) ext_rdy_q <= '0;
    else ext_rdy_q <= ext_rdy_q | ext_init;
    if (rst_n && ext_step != '0) n_ext_step++;
  end

  // ---- mechanism counters (observed inside the design)
  int n_kwr = 0, n_init = 0, n_slow = 0, n_halt = 0, n_wait = 0, n_fast = 0, n_hold = 0, n_stat = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_if.u_ctrl.kiv_we) n_kwr++;
    if (dut.u_if.u_ctrl.alg_init != '0) n_init++;
    if (dut.u_if.u_ctrl.out_load) n_slow++;
    if (dut.u_if.u_ctrl.fast_step) n_fast++;
    if (!dut.u_if.fast && dut.u_if.in_full && !dut.u_if.out_empty) n_halt++;
    if (!dut.u_if.fast && dut.u_if.in_full && dut.u_if.out_empty && !dut.u_if.sel_ready) n_wait++;
    if (dut.u_aes.phase_q == dut.u_aes.S_HOLD) n_hold++;
    if (dut.u_if.status_rd) n_stat++;
  end

  // ---- Trivium model
  bit ts [1:288];
  function automatic bit triv_clk();
    bit t1, t2, t3, z;
    t1 = ts[66] ^ ts[93]; t2 = ts[162] ^ ts[177]; t3 = ts[243] ^ ts[288];
    z = t1 ^ t2 ^ t3;
    t1 ^= (ts[91] & ts[92]) ^ ts[171]; t2 ^= (ts[175] & ts[176]) ^ ts[264]; t3 ^= (ts[286] & ts[287]) ^ ts[69];
    for (int i = 288; i >= 2; i--) ts[i] = ts[i-1];
    ts[1] = t3; ts[94] = t1; ts[178] = t2;
    return z;
  endfunction
  task automatic triv_init(logic [79:0] k, logic [79:0] v);
    for (int i = 1; i <= 288; i++) ts[i] = 0;
    for (int i = 1; i <= 80; i++) begin ts[i] = k[i-1]; ts[93+i] = v[i-1]; end
    ts[286] = 1; ts[287] = 1; ts[288] = 1;
    repeat (1152) void'(triv_clk());
  endtask
  function automatic logic [63:0] triv_word();
    for (int j = 0; j < 64; j++) triv_word[j] = triv_clk();
  endfunction

  // ---- Grain model (registers as arrays, shifted)
  bit gs [80];
  bit gb [80];
  function automatic bit grain_clk(bit setup);
    bit x0, x1, x2, x3, x4, h, z, fs, fb;
    x0 = gs[3]; x1 = gs[25]; x2 = gs[46]; x3 = gs[64]; x4 = gb[63];
    h = x1 ^ x4 ^ (x0 & x3) ^ (x2 & x3) ^ (x3 & x4) ^ (x0 & x1 & x2) ^ (x0 & x2 & x3)
      ^ (x0 & x2 & x4) ^ (x1 & x2 & x4) ^ (x2 & x3 & x4);
    z = gb[1] ^ gb[2] ^ gb[4] ^ gb[10] ^ gb[31] ^ gb[43] ^ gb[56] ^ h;
    fs = gs[62] ^ gs[51] ^ gs[38] ^ gs[23] ^ gs[13] ^ gs[0];
    fb = gs[0] ^ gb[62] ^ gb[60] ^ gb[52] ^ gb[45] ^ gb[37] ^ gb[33] ^ gb[28] ^ gb[21] ^ gb[14] ^ gb[9] ^ gb[0]
       ^ (gb[63] & gb[60]) ^ (gb[37] & gb[33]) ^ (gb[15] & gb[9]) ^ (gb[60] & gb[52] & gb[45])
       ^ (gb[33] & gb[28] & gb[21]) ^ (gb[63] & gb[45] & gb[28] & gb[9]) ^ (gb[60] & gb[52] & gb[37] & gb[33])
       ^ (gb[63] & gb[60] & gb[21] & gb[15]) ^ (gb[63] & gb[60] & gb[52] & gb[45] & gb[37])
       ^ (gb[33] & gb[28] & gb[21] & gb[15] & gb[9]) ^ (gb[52] & gb[45] & gb[37] & gb[33] & gb[28] & gb[21]);
    if (setup) begin fs ^= z; fb ^= z; end
    for (int i = 0; i < 79; i++) begin gs[i] = gs[i+1]; gb[i] = gb[i+1]; end
    gs[79] = fs; gb[79] = fb;
    return z;
  endfunction
  task automatic grain_init(logic [79:0] k, logic [63:0] v);
    for (int i = 0; i < 80; i++) begin gb[i] = k[i]; gs[i] = (i < 64) ? v[i] : 1'b1; end
    repeat (160) void'(grain_clk(1'b1));
  endtask
  function automatic logic [15:0] grain_word();
    for (int j = 0; j < 16; j++) grain_word[j] = grain_clk(1'b0);
  endfunction

  // ---- host helpers
  task automatic cmp(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 12) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic cmd(op_e op, logic [3:0] arg, logic [15:0] d = '0);
    ctrl = {op, arg}; data_in = d;
    @(negedge clk);
    ctrl = {OP_NOP, 4'h0};
  endtask

  task automatic write_kiv(logic [255:0] kiv);
    for (int i = 0; i < 16; i++) cmd(OP_KEY_WR, 4'(i), kiv[16*i +: 16]);
  endtask

  task automatic wait_ready();
    int n;
    n = 0;
    forever begin
      ctrl = {OP_STATUS, 4'h0};
      #1;
      if (data_out[8]) break;
      @(negedge clk);
      n++;
      if (n > 5000) begin failures++; $display("FAIL core never ready"); break; end
    end
    @(negedge clk);
    ctrl = {OP_NOP, 4'h0};
  endtask

  // slow mode: write w words, wait for the step, read w words back
  task automatic slow_xfer(int w, input logic [63:0] din, output logic [63:0] dout);
    for (int i = 0; i < w; i++) cmd(OP_DATA_WR, 4'h0, din[16*i +: 16]);
    // wait until the output buffer holds data
    do begin
      ctrl = {OP_STATUS, 4'h0}; #1;
      @(negedge clk);
    end while (data_out[5] == 1'b1);
    ctrl = {OP_NOP, 4'h0};
    dout = '0;
    for (int i = 0; i < w; i++) begin
      ctrl = {OP_DATA_RD, 4'h0}; #1;
      dout[16*i +: 16] = data_out;
      @(negedge clk);
    end
    ctrl = {OP_NOP, 4'h0};
  endtask

  function automatic logic [127:0] bswap(logic [127:0] x);
    for (int j = 0; j < 16; j++) bswap[8*j +: 8] = x[127 - 8*j -: 8];
  endfunction

  initial begin
    logic [63:0] d, q, k64;
    logic [255:0] kiv;
    logic [127:0] ct;
    logic [15:0] w;
    int n_steps0;
    ctrl = '0; data_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // 1. Trivium
    write_kiv('0);
    cmd(OP_SELECT, 4'(ALG_TRIVIUM));
    cmd(OP_INIT, 4'h0);
    wait_ready();
    triv_init('0, '0);
    d = {$urandom, $urandom};
    slow_xfer(4, d, q);
    cmp(q, d ^ 64'h1b05595826bfe0fb, "Trivium known answer word 0");
    void'(triv_word());
    // second step: write next input while output unread -> halt
    d = {$urandom, $urandom};
    for (int i = 0; i < 4; i++) cmd(OP_DATA_WR, 4'h0, d[16*i +: 16]);
    repeat (2) @(negedge clk);
    k64 = {$urandom, $urandom};
    for (int i = 0; i < 4; i++) cmd(OP_DATA_WR, 4'h0, k64[16*i +: 16]);   // held: output unread
    for (int i = 0; i < 4; i++) begin
      ctrl = {OP_DATA_RD, 4'h0}; #1; q[16*i +: 16] = data_out; @(negedge clk);
    end
    ctrl = {OP_NOP, 4'h0};
    cmp(q, d ^ 64'h7fc99f234e2e7a51, "Trivium known answer word 1");
    void'(triv_word());
    repeat (2) @(negedge clk);
    for (int i = 0; i < 4; i++) begin
      ctrl = {OP_DATA_RD, 4'h0}; #1; q[16*i +: 16] = data_out; @(negedge clk);
    end
    ctrl = {OP_NOP, 4'h0};
    cmp(q, k64 ^ triv_word(), "Trivium word after halt");
    for (int n = 0; n < 6; n++) begin
      d = {$urandom, $urandom};
      slow_xfer(4, d, q);
      cmp(q, d ^ triv_word(), $sformatf("Trivium slow step %0d", n));
    end
    cmd(OP_MODE, 4'h1);
    for (int n = 0; n < 50; n++) begin
      w = 16'($urandom);
      ctrl = {OP_RUN, 4'h0}; data_in = w; #1;
      k64 = triv_word();
      cmp(64'(data_out), 64'(w ^ k64[15:0]), $sformatf("Trivium fast step %0d", n));
      @(negedge clk);
    end
    ctrl = {OP_NOP, 4'h0};
    cmd(OP_MODE, 4'h0);

    // 2. Grain
    kiv = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    write_kiv(kiv);
    cmd(OP_SELECT, 4'(ALG_GRAIN));
    cmd(OP_INIT, 4'h0);
    wait_ready();
    grain_init(kiv[79:0], kiv[191:128]);
    for (int n = 0; n < 10; n++) begin
      d = 64'($urandom);
      slow_xfer(1, d, q);
      cmp(q, 64'(d[15:0] ^ grain_word()), $sformatf("Grain slow step %0d", n));
    end
    cmd(OP_MODE, 4'h1);
    for (int n = 0; n < 30; n++) begin
      w = 16'($urandom);
      ctrl = {OP_RUN, 4'h0}; data_in = w; #1;
      cmp(64'(data_out), 64'(w ^ grain_word()), $sformatf("Grain fast step %0d", n));
      @(negedge clk);
    end
    ctrl = {OP_NOP, 4'h0};
    cmd(OP_MODE, 4'h0);

    // 3. AES-OFB, NIST SP 800-38A example
    kiv = {bswap(128'h000102030405060708090a0b0c0d0e0f), bswap(128'h2b7e151628aed2a6abf7158809cf4f3c)};
    write_kiv(kiv);
    cmd(OP_SELECT, 4'(ALG_AES));
    cmd(OP_INIT, 4'h0);
    // input written before the core is ready: it must wait
    d = 64'(bswap(128'h6bc1bee22e409f96e93d7e117393172a));
    slow_xfer(4, d, q);
    ct[63:0] = q;
    d = 64'(bswap(128'h6bc1bee22e409f96e93d7e117393172a) >> 64);
    slow_xfer(4, d, q);
    ct[127:64] = q;
    cmp(ct, bswap(128'h3b3fd92eb72dad20333449f8e83cfb4a), "AES-OFB block 1");
    // let the engine finish block 2 and block 3 while nobody reads (held)
    repeat (100) @(negedge clk);
    slow_xfer(4, 64'(bswap(128'hae2d8a571e03ac9c9eb76fac45af8e51)), q);
    ct[63:0] = q;
    slow_xfer(4, 64'(bswap(128'hae2d8a571e03ac9c9eb76fac45af8e51) >> 64), q);
    ct[127:64] = q;
    cmp(ct, bswap(128'h7789508d16918f03f53c52dac54ed825), "AES-OFB block 2");
    // fast mode rate: 2 steps per 41 clocks
    cmd(OP_MODE, 4'h1);
    repeat (200) @(negedge clk);        // let the held block drain below
    n_steps0 = n_fast;
    ctrl = {OP_RUN, 4'h0};
    repeat (41 * 20) @(negedge clk);
    ctrl = {OP_NOP, 4'h0};
    checks++;
    if ((n_fast - n_steps0) < 39 || (n_fast - n_steps0) > 42) begin
      failures++;
      $display("FAIL AES fast-mode steps in 820 clocks: %0d, expected 40", n_fast - n_steps0);
    end
    cmd(OP_MODE, 4'h0);

    // 4. external slot (MICKEY's slot) through the ext_* ports
    cmd(OP_SELECT, 4'(ALG_MICKEY));
    cmd(OP_INIT, 4'h0);
    cmp(ext_key, kiv[127:0], "ext_key");
    cmp(ext_iv, kiv[255:128], "ext_iv");
    wait_ready();
    d = 64'($urandom);
    slow_xfer(1, d, q);
    cmp(q, 64'(d[15:0] ^ {4{4'd1}}), "external slot");

    // every mechanism must have happened
    checks++;
    if (n_kwr == 0 || n_init == 0 || n_slow == 0 || n_halt == 0 || n_wait == 0 || n_fast == 0
        || n_hold == 0 || n_stat == 0 || n_ext_step == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("key writes %0d, inits %0d, slow steps %0d, halt clocks %0d, wait clocks %0d, fast steps %0d, AES hold clocks %0d, status reads %0d, external steps %0d",
             n_kwr, n_init, n_slow, n_halt, n_wait, n_fast, n_hold, n_stat, n_ext_step);
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
