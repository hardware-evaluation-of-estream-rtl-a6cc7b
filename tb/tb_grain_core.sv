// tb_grain_core: checks the Grain core against a sequence model kept in this
// testbench: the LFSR and NFSR are written as sequences s[t], b[t] that grow by
// one element per keystream bit (s[t+80], b[t+80] computed from earlier
// elements), so no register shifting is modelled. The default radix-16 core and
// a radix-4 core are run with several random key/IV pairs; the testbench checks
// the setup time (one load clock plus 160/RADIX clocks), every output bit
// against din XOR the model keystream, and that the core holds while step is
// low.
module tb_grain_core;
  localparam int unsigned R0 = 16;
  localparam int unsigned R1 = 4;
  localparam int unsigned NSTEPS = 40;
  localparam int unsigned LEN = 80 + 160 + NSTEPS * R0 + 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [127:0] key, iv;
  logic init0, step0, init1, step1;
  logic [R0-1:0] din0, dout0;
  logic [R1-1:0] din1, dout1;
  logic ready0, ready1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  grain_core dut0 (.clk, .rst_n, .key, .iv, .init(init0), .step(step0), .din(din0), .dout(dout0), .ready(ready0));
  grain_core #(.RADIX(R1)) dut1 (.clk, .rst_n, .key, .iv, .init(init1), .step(step1), .din(din1), .dout(dout1), .ready(ready1));

  bit s [LEN];
  bit b [LEN];
  int t;   // current time index

  function automatic bit zbit(int i);
    bit x0, x1, x2, x3, x4, h;
    x0 = s[i+3]; x1 = s[i+25]; x2 = s[i+46]; x3 = s[i+64]; x4 = b[i+63];
    h = x1 ^ x4 ^ (x0 & x3) ^ (x2 & x3) ^ (x3 & x4) ^ (x0 & x1 & x2) ^ (x0 & x2 & x3)
      ^ (x0 & x2 & x4) ^ (x1 & x2 & x4) ^ (x2 & x3 & x4);
    return b[i+1] ^ b[i+2] ^ b[i+4] ^ b[i+10] ^ b[i+31] ^ b[i+43] ^ b[i+56] ^ h;
  endfunction

  function automatic bit advance(bit setup);
    bit z, ns, nb;
    int i;
    i = t;
    z = zbit(i);
    ns = s[i+62] ^ s[i+51] ^ s[i+38] ^ s[i+23] ^ s[i+13] ^ s[i];
    nb = s[i] ^ b[i+62] ^ b[i+60] ^ b[i+52] ^ b[i+45] ^ b[i+37] ^ b[i+33] ^ b[i+28]
       ^ b[i+21] ^ b[i+14] ^ b[i+9] ^ b[i]
       ^ (b[i+63] & b[i+60]) ^ (b[i+37] & b[i+33]) ^ (b[i+15] & b[i+9])
       ^ (b[i+60] & b[i+52] & b[i+45]) ^ (b[i+33] & b[i+28] & b[i+21])
       ^ (b[i+63] & b[i+45] & b[i+28] & b[i+9]) ^ (b[i+60] & b[i+52] & b[i+37] & b[i+33])
       ^ (b[i+63] & b[i+60] & b[i+21] & b[i+15]) ^ (b[i+63] & b[i+60] & b[i+52] & b[i+45] & b[i+37])
       ^ (b[i+33] & b[i+28] & b[i+21] & b[i+15] & b[i+9])
       ^ (b[i+52] & b[i+45] & b[i+37] & b[i+33] & b[i+28] & b[i+21]);
    if (setup) begin ns ^= z; nb ^= z; end
    s[i+80] = ns;
    b[i+80] = nb;
    t++;
    return z;
  endfunction

  task automatic ref_init();
    t = 0;
    for (int i = 0; i < 80; i++) begin
      b[i] = key[i];
      s[i] = (i < 64) ? iv[i] : 1'b1;
    end
    for (int n = 0; n < 160; n++) void'(advance(1'b1));
  endtask

  task automatic run(int which);
    int cyc, radix;
    logic [15:0] d;
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
    if (cyc != 1 + 160 / radix) begin
      failures++;
      $display("FAIL radix-%0d setup took %0d clocks, expected %0d", radix, cyc, 1 + 160 / radix);
    end
    for (int n = 0; n < NSTEPS; n++) begin
      d = 16'($urandom);
      din0 = d[R0-1:0];
      din1 = d[R1-1:0];
      if (n % 7 == 2) @(negedge clk);   // idle cycle: the core must hold
      #1;
      for (int j = 0; j < radix; j++) begin
        checks++;
        if (((which == 0) ? dout0[j] : dout1[j]) !== (d[j] ^ advance(1'b0))) begin
          failures++;
          if (failures < 10) $display("FAIL radix-%0d step %0d bit %0d", radix, n, j);
        end
      end
      if (which == 0) step0 = 1'b1; else step1 = 1'b1;
      @(negedge clk);
      step0 = 1'b0; step1 = 1'b0;
    end
  endtask

  initial begin
    init0 = 0; init1 = 0; step0 = 0; step1 = 0; din0 = '0; din1 = '0;
    key = '0; iv = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 4; k++) begin
      key = {$urandom, $urandom, $urandom, $urandom};
      iv  = {$urandom, $urandom, $urandom, $urandom};
      if (k == 0) begin key = '0; iv = '0; end
      run(0);
      run(1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
