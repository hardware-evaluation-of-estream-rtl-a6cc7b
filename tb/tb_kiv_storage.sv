// tb_kiv_storage: writes random words to random addresses of the key/IV
// register and compares the whole 256-bit output after every clock with a
// copy kept in the testbench; also checks that nothing changes while we is low
// and that reset clears the register.
module tb_kiv_storage;
  logic clk = 1'b0, rst_n = 1'b0;
  logic we;
  logic [3:0] addr;
  logic [15:0] wdata;
  logic [255:0] kiv, model;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  kiv_storage dut (.clk, .rst_n, .we, .addr, .wdata, .kiv);

  initial begin
    we = 0; addr = 0; wdata = 0; model = '0;
    repeat (2) @(negedge clk);
    checks++;
    if (kiv !== '0) begin failures++; $display("FAIL reset value"); end
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      we = ($urandom % 3) != 0;
      addr = 4'($urandom);
      wdata = 16'($urandom);
      @(negedge clk);
      if (we) model[16*addr +: 16] = wdata;
      checks++;
      if (kiv !== model) begin failures++; if (failures < 10) $display("FAIL step %0d", n); end
    end
    rst_n = 1'b0;
    @(negedge clk);
    checks++;
    if (kiv !== '0) begin failures++; $display("FAIL reset clears"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
