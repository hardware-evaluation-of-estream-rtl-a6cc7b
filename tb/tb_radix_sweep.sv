// tb_radix_sweep: the radix exploration for Trivium and Grain. Trivium is
// built at radix 1, 2, 4, 8, 16, 32 and 64 and Grain at radix 1, 2, 4, 8 and
// 16, all loaded with the same random key and IV and stepped on every clock
// once ready. The testbench checks that every radix yields the same keystream
// (the first 512 bits, compared with the radix-1 instance), that each
// instance delivers exactly RADIX new bits per clock, and that setup takes one
// load clock plus 1152/RADIX (Trivium) or 160/RADIX (Grain) clocks.
module tb_radix_sweep;
  localparam int NT = 7;
  localparam int NG = 5;
  localparam int TR [NT] = '{1, 2, 4, 8, 16, 32, 64};
  localparam int GR [NG] = '{1, 2, 4, 8, 16};
  localparam int NBITS = 512;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [127:0] key, iv;
  logic init;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bit t_ks [NT][NBITS];
  bit g_ks [NG][NBITS];
  int t_n [NT];
  int g_n [NG];
  int t_setup [NT];
  int g_setup [NG];
  int cyc;

  always_ff @(posedge clk) cyc <= init ? 0 : cyc + 1;

  for (genvar i = 0; i < NT; i++) begin : g_triv
    logic [TR[i]-1:0] dout;
    logic ready, ready_d;
    trivium_core #(.RADIX(TR[i])) u (.clk, .rst_n, .key, .iv, .init, .step(ready),
      .din('0), .dout, .ready);
    always_ff @(posedge clk) begin
      ready_d <= ready;
      if (init || !rst_n) begin
        t_n[i] <= 0;
      end else if (ready) begin
        if (!ready_d) t_setup[i] <= cyc;
        for (int j = 0; j < TR[i]; j++)
          if (t_n[i] + j < NBITS) t_ks[i][t_n[i] + j] <= dout[j];
        t_n[i] <= t_n[i] + TR[i];
      end
    end
  end

  for (genvar i = 0; i < NG; i++) begin : g_grain
    logic [GR[i]-1:0] dout;
    logic ready, ready_d;
    grain_core #(.RADIX(GR[i])) u (.clk, .rst_n, .key, .iv, .init, .step(ready),
      .din('0), .dout, .ready);
    always_ff @(posedge clk) begin
      ready_d <= ready;
      if (init || !rst_n) begin
        g_n[i] <= 0;
      end else if (ready) begin
        if (!ready_d) g_setup[i] <= cyc;
        for (int j = 0; j < GR[i]; j++)
          if (g_n[i] + j < NBITS) g_ks[i][g_n[i] + j] <= dout[j];
        g_n[i] <= g_n[i] + GR[i];
      end
    end
  end

  initial begin
    int mism;
    init = 0;
    key = {$urandom, $urandom, $urandom, $urandom};
    iv  = {$urandom, $urandom, $urandom, $urandom};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    init = 1'b1;
    @(negedge clk);
    init = 1'b0;
    // radix-1 Trivium is the slowest: 1152 setup clocks plus NBITS
    repeat (1152 + NBITS + 10) @(negedge clk);
    for (int i = 0; i < NT; i++) begin
      checks++;
      if (t_setup[i] != 1152 / TR[i]) begin
        failures++;
        $display("FAIL Trivium radix-%0d setup %0d clocks after the load clock", TR[i], t_setup[i]);
      end
      mism = 0;
      for (int b = 0; b < NBITS; b++) if (t_ks[i][b] != t_ks[0][b]) mism++;
      checks++;
      if (mism != 0) begin failures++; $display("FAIL Trivium radix-%0d: %0d keystream bits differ", TR[i], mism); end
    end
    for (int i = 0; i < NG; i++) begin
      checks++;
      if (g_setup[i] != 160 / GR[i]) begin
        failures++;
        $display("FAIL Grain radix-%0d setup %0d clocks after the load clock", GR[i], g_setup[i]);
      end
      mism = 0;
      for (int b = 0; b < NBITS; b++) if (g_ks[i][b] != g_ks[0][b]) mism++;
      checks++;
      if (mism != 0) begin failures++; $display("FAIL Grain radix-%0d: %0d keystream bits differ", GR[i], mism); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
