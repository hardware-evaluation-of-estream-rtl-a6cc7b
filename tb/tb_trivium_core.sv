// tb_trivium_core: checks the Trivium core against a bit-serial model of the
// cipher kept in this testbench (state as s[1..288], one bit per update,
// written straight from the cipher definition). Two instances are run: the
// default radix-64 core and a radix-16 one. For each, several random key/IV
// pairs are loaded; the testbench checks that ready rises exactly 1+1152/RADIX
// clocks after init (one load clock, then the setup), that every output bit
// equals din XOR the model's keystream, and that the core holds its state
// while step is low. The published keystream for an all-zero key and IV is
// checked as well.
module tb_trivium_core;
  localparam int unsigned R0 = 64;
  localparam int unsigned R1 = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [127:0] key, iv;
  logic init0, step0, init1, step1;
  logic [R0-1:0] din0, dout0;
  logic [R1-1:0] din1, dout1;
  logic ready0, ready1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  trivium_core dut0 (.clk, .rst_n, .key, .iv, .init(init0), .step(step0), .din(din0), .dout(dout0), .ready(ready0));
  trivium_core #(.RADIX(R1)) dut1 (.clk, .rst_n, .key, .iv, .init(init1), .step(step1), .din(din1), .dout(dout1), .ready(ready1));

  // ---- bit-serial reference
  bit s [1:288];

  function automatic bit ref_clock();
    bit t1, t2, t3, z;
    t1 = s[66] ^ s[93];
    t2 = s[162] ^ s[177];
    t3 = s[243] ^ s[288];
    z  = t1 ^ t2 ^ t3;
    t1 = t1 ^ (s[91] & s[92]) ^ s[171];
    t2 = t2 ^ (s[175] & s[176]) ^ s[264];
    t3 = t3 ^ (s[286] & s[287]) ^ s[69];
    for (int i = 93; i >= 2; i--)   s[i] = s[i-1];
    s[1] = t3;
    for (int i = 177; i >= 95; i--) s[i] = s[i-1];
    s[94] = t1;
    for (int i = 288; i >= 179; i--) s[i] = s[i-1];
    s[178] = t2;
    return z;
  endfunction

  task automatic ref_init();
    for (int i = 1; i <= 288; i++) s[i] = 1'b0;
    for (int i = 1; i <= 80; i++) begin
      s[i]      = key[i-1];
      s[93 + i] = iv[i-1];
    end
    s[286] = 1'b1; s[287] = 1'b1; s[288] = 1'b1;
    for (int i = 0; i < 4 * 288; i++) void'(ref_clock());
  endtask

  task automatic check_bit(bit got, bit exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // run one key/IV through instance `which` (0: radix R0, 1: radix R1)
  task automatic run(int which, int nsteps);
    int cyc;
    int radix;
    logic [63:0] d;
    radix = (which == 0) ? R0 : R1;
    ref_init();
    @(negedge clk);
    if (which == 0) init0 = 1'b1; else init1 = 1'b1;
    @(negedge clk);
    init0 = 1'b0; init1 = 1'b0;
    cyc = 1;
    while (!((which == 0) ? ready0 : ready1)) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != 1 + 1152 / radix) begin
      failures++;
      $display("FAIL radix-%0d setup took %0d clocks, expected %0d", radix, cyc, 1 + 1152 / radix);
    end
    for (int n = 0; n < nsteps; n++) begin
      d = {$urandom, $urandom};
      din0 = d[R0-1:0];
      din1 = d[R1-1:0];
      // every few steps keep step low for a cycle: output must not move
      if (n % 5 == 3) begin
        step0 = 1'b0; step1 = 1'b0;
        @(negedge clk);
      end
      #1;
      for (int j = 0; j < radix; j++)
        check_bit((which == 0) ? dout0[j] : dout1[j], d[j] ^ ref_clock(), $sformatf("radix-%0d step %0d bit %0d", radix, n, j));
      if (which == 0) step0 = 1'b1; else step1 = 1'b1;
      @(negedge clk);
      step0 = 1'b0; step1 = 1'b0;
    end
  endtask

  // Known answer: all-zero key and IV give the keystream bytes
  // FB E0 BF 26 58 59 05 1B 51 7A 2E 4E 23 9F C9 7F (first byte in dout[7:0],
  // first bit of each byte in its LSB).
  task automatic known_answer();
    key = '0; iv = '0;
    @(negedge clk); init0 = 1'b1;
    @(negedge clk); init0 = 1'b0;
    while (!ready0) @(negedge clk);
    din0 = '0;
    #1;
    checks++;
    if (dout0 !== 64'h1b05595826bfe0fb) begin failures++; $display("FAIL known answer word 0: %h", dout0); end
    step0 = 1'b1;
    @(negedge clk);
    step0 = 1'b0;
    #1;
    checks++;
    if (dout0 !== 64'h7fc99f234e2e7a51) begin failures++; $display("FAIL known answer word 1: %h", dout0); end
  endtask

  initial begin
    init0 = 0; init1 = 0; step0 = 0; step1 = 0; din0 = '0; din1 = '0;
    key = '0; iv = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    known_answer();
    for (int t = 0; t < 4; t++) begin
      key = {$urandom, $urandom, $urandom, $urandom};
      iv  = {$urandom, $urandom, $urandom, $urandom};
      if (t == 0) begin key = '0; iv = '0; end
      run(0, 40);
      run(1, 40);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
