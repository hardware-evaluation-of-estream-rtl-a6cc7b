// tb_aes_sbox: exhaustive check of the AES S-box. The expected value of every
// input is computed here a different way: the inverse is found by searching
// for b with a*b = 1 (carry-less product reduced modulo 0x11B) and the affine
// map is applied bit by bit. A few well-known table entries are also checked.
module tb_aes_sbox;
  logic clk = 1'b0;
  logic [7:0] a, y;
  int checks = 0, failures = 0;

  aes_sbox dut (.a, .y);

  always #5 clk = ~clk;

  function automatic logic [7:0] pmul(logic [7:0] x, logic [7:0] z);
    logic [15:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) if (z[i]) p ^= 16'(x) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h11B << (i - 8);
    return p[7:0];
  endfunction

  function automatic logic [7:0] ref_sbox(logic [7:0] x);
    logic [7:0] b, r;
    b = 8'h00;
    for (int c = 1; c < 256; c++) if (pmul(x, 8'(c)) == 8'h01) b = 8'(c);
    for (int i = 0; i < 8; i++)
      r[i] = b[i] ^ b[(i + 4) % 8] ^ b[(i + 5) % 8] ^ b[(i + 6) % 8] ^ b[(i + 7) % 8] ^ ((8'h63 >> i) & 1);
    return r;
  endfunction

  task automatic check(logic [7:0] in, logic [7:0] exp);
    a = in;
    #1;
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL S(%02h) = %02h, expected %02h", in, y, exp);
    end
  endtask

  initial begin
    check(8'h00, 8'h63); check(8'h01, 8'h7c); check(8'h53, 8'hed);
    check(8'hff, 8'h16); check(8'h10, 8'hca); check(8'h8c, 8'h64);
    for (int v = 0; v < 256; v++) check(8'(v), ref_sbox(8'(v)));
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
