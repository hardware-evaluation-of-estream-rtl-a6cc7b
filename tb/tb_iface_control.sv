// tb_iface_control: applies random Ctrl words and random ready / buffer-state
// inputs to the control unit and compares every output in every cycle with a
// decode model written here from the Ctrl encoding of estream_pkg: selected
// slot and mode registers, one-hot init and step, slow-mode step only with a
// full input buffer, an empty output buffer, a ready algorithm and no
// reconfiguration, fast-mode step on RUN. Counts of slow steps, fast steps and
// slow-mode stalls are checked to be non-zero.
module tb_iface_control;
  import estream_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] ctrl;
  logic [N_ALG-1:0] alg_ready, alg_init, alg_step;
  logic in_full, out_empty;
  logic [3:0] alg_sel, kiv_addr;
  logic fast;
  logic [2:0] need;
  logic kiv_we, in_wr, in_clear, out_rd, out_clear, out_load, status_rd;
  int checks = 0, failures = 0;
  int n_slow = 0, n_fast = 0, n_stall = 0;

  always #5 clk = ~clk;

  iface_control dut (.clk, .rst_n, .ctrl, .alg_ready, .in_full, .out_empty,
    .alg_sel, .fast, .need, .alg_init, .alg_step, .kiv_we, .kiv_addr, .in_wr, .in_clear,
    .out_rd, .out_clear, .out_load, .status_rd);

  logic [3:0] m_sel;
  logic m_fast;

  task automatic cmp(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    logic [3:0] op, arg;
    logic rdy, reconf, sstep, fstep;
    logic [N_ALG-1:0] e_init, e_step;
    int words [9] = '{4, 1, 1, 1, 1, 1, 4, 1, 2};
    ctrl = '0; alg_ready = '0; in_full = 0; out_empty = 1;
    m_sel = 4'd0; m_fast = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      op  = 4'($urandom % 10);
      arg = 4'($urandom % 11);
      if (op == 4'h3) arg = 4'($urandom % 2);
      ctrl = {op, arg};
      alg_ready = N_ALG'($urandom);
      in_full = $urandom % 2;
      out_empty = $urandom % 2;
      #1;
      rdy = (m_sel < 9) ? alg_ready[m_sel] : 1'b0;
      reconf = (op == 4'h2) || (op == 4'h3) || (op == 4'h4);
      sstep = !m_fast && in_full && out_empty && rdy && !reconf;
      fstep = m_fast && (op == 4'h7) && rdy;
      e_init = '0; e_step = '0;
      if (m_sel < 9) begin e_init[m_sel] = (op == 4'h4); e_step[m_sel] = sstep || fstep; end
      if (sstep) n_slow++;
      if (fstep) n_fast++;
      if (!m_fast && in_full && !out_empty && rdy) n_stall++;
      cmp(alg_sel == m_sel, 1, "alg_sel");
      cmp(fast, m_fast, "fast");
      cmp(need == 3'((m_sel < 9) ? words[m_sel] : 1), 1, "need");
      cmp(alg_init == e_init, 1, "alg_init");
      cmp(alg_step == e_step, 1, $sformatf("alg_step op=%h sel=%0d", op, m_sel));
      cmp(kiv_we, op == 4'h1, "kiv_we");
      cmp(kiv_addr == arg, 1, "kiv_addr");
      cmp(in_wr, !m_fast && op == 4'h5, "in_wr");
      cmp(in_clear, reconf || sstep, "in_clear");
      cmp(out_rd, !m_fast && op == 4'h6, "out_rd");
      cmp(out_clear, reconf, "out_clear");
      cmp(out_load, sstep, "out_load");
      cmp(status_rd, op == 4'h8, "status_rd");
      @(negedge clk);
      if (op == 4'h2) m_sel = arg;
      if (op == 4'h3) m_fast = arg[0];
    end
    checks++;
    if (n_slow == 0 || n_fast == 0 || n_stall == 0) begin
      failures++;
      $display("FAIL a mechanism never happened: slow %0d fast %0d stall %0d", n_slow, n_fast, n_stall);
    end
    $display("slow steps %0d, fast steps %0d, slow-mode stalls %0d", n_slow, n_fast, n_stall);
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
