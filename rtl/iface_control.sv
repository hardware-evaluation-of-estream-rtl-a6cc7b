// iface_control: the control unit of the common interface. It decodes the 8-bit
// Ctrl bus (operation in Ctrl[7:4], argument in Ctrl[3:0], see estream_pkg),
// keeps the selected algorithm slot and the operating mode, and sequences the
// algorithms:
//   * slow mode: the selected algorithm takes one step only when the input
//     buffer holds all the words it consumes, its output buffer has been read
//     out and the algorithm is ready; the step loads the output buffer and
//     empties the input buffer in the same clock edge. Otherwise the algorithm
//     is halted.
//   * fast mode: while Ctrl carries RUN, the selected algorithm steps on every
//     cycle in which it is ready; its input comes straight from DataIn
//     (replicated) and the low 16 bits of its output go straight to DataOut.
// Assertions state the handshake rules (one slot steps at a time, only when
// ready, never over unread output). All strobes are combinational decodes of
// Ctrl and of the registered state; slot and mode change at the clock edge
// after SELECT / MODE. Selecting a slot, changing mode or INIT clears both
// buffers.
//
// The two modes and the hold-until-read rule are as published; the Ctrl
// encoding and the status word are this design's own.
module iface_control
  import estream_pkg::*;
#(
  parameter int unsigned NA = N_ALG
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [7:0]                   ctrl,
  input  logic [NA-1:0]                alg_ready,
  input  logic                         in_full,
  input  logic                         out_empty,
  output logic [3:0]                   alg_sel,
  output logic                         fast,
  output logic [2:0]                   need,
  output logic [NA-1:0]                alg_init,
  output logic [NA-1:0]                alg_step,
  output logic                         kiv_we,
  output logic [3:0]                   kiv_addr,
  output logic                         in_wr,
  output logic                         in_clear,
  output logic                         out_rd,
  output logic                         out_clear,
  output logic                         out_load,
  output logic                         status_rd
);

  ctrl_t      c;
  logic [3:0] sel_q;
  logic       fast_q;
  logic       sel_ready;
  logic       reconf;
  logic       slow_step;
  logic       fast_step;

  assign c = ctrl_t'(ctrl);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_q  <= 4'(ALG_AES);
      fast_q <= 1'b0;
    end else begin
      if (c.op == OP_SELECT) sel_q  <= c.arg;
      if (c.op == OP_MODE)   fast_q <= c.arg[0];
    end
  end

  assign alg_sel   = sel_q;
  assign fast      = fast_q;
  assign need      = alg_words(sel_q);
  assign sel_ready = (sel_q < 4'(NA)) ? alg_ready[sel_q] : 1'b0;
  assign reconf    = (c.op == OP_SELECT) || (c.op == OP_MODE) || (c.op == OP_INIT);

  assign slow_step = !fast_q && in_full && out_empty && sel_ready && !reconf;
  assign fast_step = fast_q && (c.op == OP_RUN) && sel_ready;

  always_comb begin
    alg_init = '0;
    alg_step = '0;
    if (sel_q < 4'(NA)) begin
      alg_init[sel_q] = (c.op == OP_INIT);
      alg_step[sel_q] = slow_step || fast_step;
    end
  end

  assign kiv_we    = (c.op == OP_KEY_WR);
  assign kiv_addr  = c.arg;
  assign in_wr     = !fast_q && (c.op == OP_DATA_WR);
  assign in_clear  = reconf || slow_step;
  assign out_rd    = !fast_q && (c.op == OP_DATA_RD);
  assign out_clear = reconf;
  assign out_load  = slow_step;
  assign status_rd = (c.op == OP_STATUS);

  // handshake rules: at most one slot steps, and only a ready one; a slow-mode
  // step never overwrites unread output
  a_one_step:   assert property (@(posedge clk) disable iff (!rst_n) $onehot0(alg_step));
  a_step_ready: assert property (@(posedge clk) disable iff (!rst_n) (alg_step & ~alg_ready) == '0);
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) out_load |-> out_empty);

endmodule
