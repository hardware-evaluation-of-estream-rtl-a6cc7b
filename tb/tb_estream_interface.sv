// tb_estream_interface: runs the common interface against simple stand-in
// algorithms modelled here (one per slot: ready one clock after init, a step
// counter, dout = din XOR a keystream word derived from slot and counter). It
// drives the Ctrl protocol as a host would and checks:
//  * key/IV word writes appear on the key and iv buses;
//  * slow mode for every slot: the input buffer collects the slot's number of
//    words, exactly one step follows, the output words read back equal
//    din XOR keystream, lowest word first;
//  * the halt rule: with unread output a full input buffer does not step;
//  * a slot that was never initialised is never stepped;
//  * fast mode: one step per RUN cycle, DataOut = low 16 bits of
//    ({4{DataIn}} XOR keystream) in the same cycle;
//  * the STATUS word.
module tb_estream_interface;
  import estream_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [15:0] data_in, data_out;
  logic [7:0] ctrl;
  logic [127:0] key, iv;
  logic [63:0] alg_din;
  logic [N_ALG-1:0] alg_init, alg_step, alg_ready;
  logic [N_ALG-1:0][63:0] alg_dout;
  int checks = 0, failures = 0;
  int n_slow = 0, n_fast = 0, n_stall = 0;

  always #5 clk = ~clk;

  estream_interface dut (.clk, .rst_n, .data_in, .ctrl, .data_out, .key, .iv,
    .alg_din, .alg_init, .alg_step, .alg_dout, .alg_ready);

  // ---- stand-in algorithms
  int unsigned cnt [N_ALG];
  logic [N_ALG-1:0] rdy_q;

  function automatic logic [63:0] ks(int k, int unsigned c);
    return (64'h9E3779B97F4A7C15 * 64'(c + 1)) ^ (64'(k) << 56);
  endfunction

  for (genvar k = 0; k < N_ALG; k++) begin : g_alg
    assign alg_dout[k] = alg_din ^ ks(k, cnt[k]);
  end
  assign alg_ready = rdy_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rdy_q <= '0;
      for (int k = 0; k < N_ALG; k++) cnt[k] <= 0;
    end else begin
      for (int k = 0; k < N_ALG; k++) begin
        if (alg_init[k]) begin
          rdy_q[k] <= 1'b1;
          cnt[k] <= 0;
        end else if (alg_step[k]) begin
          cnt[k] <= cnt[k] + 1;
        end
      end
    end
  end

  task automatic cmp(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 12) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic cmd(op_e op, logic [3:0] arg, logic [15:0] d = '0);
    ctrl = {op, arg};
    data_in = d;
    @(negedge clk);
    ctrl = {OP_NOP, 4'h0};
  endtask

  // one slow-mode step on the selected slot k
  task automatic slow_step(int k, logic check_stall);
    int w;
    int unsigned c0;
    logic [63:0] din, exp;
    w = alg_words(4'(k));
    din = '0;
    for (int i = 0; i < w; i++) din[16*i +: 16] = 16'($urandom);
    c0 = cnt[k];
    exp = din ^ ks(k, c0);
    for (int i = 0; i < w; i++) cmd(OP_DATA_WR, 4'h0, din[16*i +: 16]);
    // the step happens in the clock after the buffer became full
    @(negedge clk);
    cmp(64'(cnt[k]), 64'(c0 + 1), $sformatf("slot %0d stepped once", k));
    if (cnt[k] == c0 + 1) n_slow++;
    if (check_stall) begin
      // fill the input buffer again without reading: the slot must halt
      for (int i = 0; i < w; i++) cmd(OP_DATA_WR, 4'h0, 16'($urandom));
      repeat (3) @(negedge clk);
      cmp(64'(cnt[k]), 64'(c0 + 1), $sformatf("slot %0d halted with unread output", k));
      if (cnt[k] == c0 + 1) n_stall++;
    end
    for (int i = 0; i < w; i++) begin
      ctrl = {OP_DATA_RD, 4'h0};
      #1;
      cmp(64'(data_out), 64'(exp[16*i +: 16]), $sformatf("slot %0d word %0d", k, i));
      @(negedge clk);
    end
    ctrl = {OP_NOP, 4'h0};
    if (check_stall) begin
      // output read out: the held input now steps
      @(negedge clk);
      cmp(64'(cnt[k]), 64'(c0 + 2), $sformatf("slot %0d resumed", k));
      for (int i = 0; i < w; i++) cmd(OP_DATA_RD, 4'h0);
    end
  endtask

  initial begin
    logic [255:0] kiv;
    logic [15:0] d;
    int unsigned c0;
    ctrl = '0; data_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // key / IV
    for (int i = 0; i < 16; i++) begin
      kiv[16*i +: 16] = 16'($urandom);
      cmd(OP_KEY_WR, 4'(i), kiv[16*i +: 16]);
    end
    cmp(key[63:0], kiv[63:0], "key low");   cmp(key[127:64], kiv[127:64], "key high");
    cmp(iv[63:0], kiv[191:128], "iv low");  cmp(iv[127:64], kiv[255:192], "iv high");

    // slot 3 never initialised: no step
    cmd(OP_SELECT, 4'd3);
    cmd(OP_DATA_WR, 4'h0, 16'h1234);
    repeat (3) @(negedge clk);
    cmp(64'(cnt[3]), 64'd0, "uninitialised slot not stepped");
    cmd(OP_INIT, 4'h0);

    // slow mode on every slot
    for (int k = 0; k < N_ALG; k++) begin
      cmd(OP_SELECT, 4'(k));
      cmd(OP_INIT, 4'h0);
      ctrl = {OP_STATUS, 4'h0};
      #1;
      cmp(64'(data_out), 64'({7'b0, 1'b1, 1'b0, 1'b0, 1'b1, 1'b0, 4'(k)}), "status word");
      @(negedge clk);
      ctrl = {OP_NOP, 4'h0};
      for (int n = 0; n < 4; n++) slow_step(k, n == 1);
    end

    // fast mode on Trivium's and Grain's slots
    cmd(OP_MODE, 4'h1);
    for (int s = 0; s < 2; s++) begin
      int k;
      k = (s == 0) ? int'(ALG_TRIVIUM) : int'(ALG_GRAIN);
      cmd(OP_SELECT, 4'(k));
      for (int n = 0; n < 20; n++) begin
        d = 16'($urandom);
        c0 = cnt[k];
        ctrl = {OP_RUN, 4'h0};
        data_in = d;
        #1;
        cmp(64'(data_out), 64'(d ^ 16'(ks(k, c0))), "fast mode DataOut");
        @(negedge clk);
        cmp(64'(cnt[k]), 64'(c0 + 1), "fast mode step per RUN");
        if (cnt[k] == c0 + 1) n_fast++;
      end
      ctrl = {OP_NOP, 4'h0};
      c0 = cnt[k];
      repeat (3) @(negedge clk);
      cmp(64'(cnt[k]), 64'(c0), "fast mode holds without RUN");
    end
    cmd(OP_MODE, 4'h0);

    checks++;
    if (n_slow == 0 || n_fast == 0 || n_stall == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("slow steps %0d, fast steps %0d, halts %0d", n_slow, n_fast, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // at most one slot steps at a time, and only a ready one
  always @(posedge clk) if (rst_n) begin
    assert ($onehot0(alg_step)) else begin failures++; $display("FAIL several slots stepped"); end
    assert ((alg_step & ~alg_ready) == '0) else begin failures++; $display("FAIL step while not ready"); end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
