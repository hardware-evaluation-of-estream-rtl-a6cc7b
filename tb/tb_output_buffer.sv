// tb_output_buffer: loads random 64-bit values with 1 to 4 valid words and
// reads them back under random rd/clear traffic, comparing word and empty
// with a model kept in the testbench (lowest word first, empty after the last
// valid word, clear and load take priority over rd).
module tb_output_buffer;
  logic clk = 1'b0, rst_n = 1'b0;
  logic clear, load, rd, empty;
  logic [63:0] ldata, m_data;
  logic [2:0] nwords;
  logic [15:0] word;
  int m_left, m_ptr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  output_buffer dut (.clk, .rst_n, .clear, .load, .ldata, .nwords, .rd, .word, .empty);

  initial begin
    clear = 0; load = 0; rd = 0; ldata = '0; nwords = 3'd4;
    m_data = '0; m_left = 0; m_ptr = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      clear = ($urandom % 23) == 0;
      load = (m_left == 0) ? (($urandom % 3) == 0) : (($urandom % 17) == 0);
      rd = ($urandom % 2) == 0;
      ldata = {$urandom, $urandom};
      nwords = 3'(1 + $urandom % 4);
      #1;
      checks++;
      if (empty !== (m_left == 0)) begin failures++; if (failures < 10) $display("FAIL empty at %0d", n); end
      if (m_left != 0) begin
        checks++;
        if (word !== m_data[16*m_ptr +: 16]) begin failures++; if (failures < 10) $display("FAIL word at %0d", n); end
      end
      @(negedge clk);
      if (clear) begin m_left = 0; m_ptr = 0; end
      else if (load) begin m_data = ldata; m_left = nwords; m_ptr = 0; end
      else if (rd && m_left != 0) begin m_left--; m_ptr++; end
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
