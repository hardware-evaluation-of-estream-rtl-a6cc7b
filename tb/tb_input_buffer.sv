// tb_input_buffer: drives random clear/write traffic with a random number of
// needed words (1 to 4) and compares data and full with a queue model kept in
// the testbench: words land in order from bits [15:0] up, full rises when
// `need` words are held, writes to a full buffer are dropped and clear wins.
module tb_input_buffer;
  logic clk = 1'b0, rst_n = 1'b0;
  logic clear, wr, full;
  logic [15:0] wdata;
  logic [2:0] need;
  logic [63:0] data, m_data;
  int m_cnt;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  input_buffer dut (.clk, .rst_n, .clear, .wr, .wdata, .need, .data, .full);

  initial begin
    clear = 0; wr = 0; wdata = 0; need = 3'd4; m_data = '0; m_cnt = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      if (n % 50 == 0) need = 3'(1 + $urandom % 4);
      clear = ($urandom % 9) == 0;
      wr = ($urandom % 3) != 0;
      wdata = 16'($urandom);
      #1;
      checks++;
      if (full !== (m_cnt >= need)) begin failures++; if (failures < 10) $display("FAIL full at %0d", n); end
      @(negedge clk);
      if (clear) begin m_data = '0; m_cnt = 0; end
      else if (wr && m_cnt < need) begin m_data[16*m_cnt +: 16] = wdata; m_cnt++; end
      checks++;
      if (data !== m_data) begin failures++; if (failures < 10) $display("FAIL data at %0d", n); end
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
