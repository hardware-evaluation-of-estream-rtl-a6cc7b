// estream_interface: the common interface through which every algorithm core of
// the chip is reached over 16-bit DataIn/DataOut buses and an 8-bit Ctrl bus.
// It contains the 256-bit key/IV storage (read by all cores in parallel), a
// 64-bit input buffer with the input multiplexer, the multiplexer that picks
// the selected core's output, a 64-bit output buffer with its word multiplexer,
// the DataOut multiplexer and the control unit.
//
// Data path per mode:
//   slow: DataIn words -> input buffer -> alg_din; one step; alg_dout -> output
//         buffer -> DataOut word by word (DATA_RD). All input bits are used.
//   fast: {4{DataIn}} -> alg_din; step every RUN cycle; alg_dout[15:0] ->
//         DataOut in the same cycle (combinational), the rest is not observed.
// STATUS puts {7'b0, ready, fast, in_full, out_empty, 1'b0, alg_sel} on
// DataOut. Cores see key = kiv[127:0], iv = kiv[255:128].
//
// The block structure follows the published interface diagram; the Ctrl
// encoding, word order, status word and reset values are this design's own.
module estream_interface
  import estream_pkg::*;
#(
  parameter int unsigned NA = N_ALG
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [IO_W-1:0]            data_in,
  input  logic [7:0]                 ctrl,
  output logic [IO_W-1:0]            data_out,
  output logic [127:0]               key,
  output logic [127:0]               iv,
  output logic [BUS_W-1:0]           alg_din,
  output logic [NA-1:0]              alg_init,
  output logic [NA-1:0]              alg_step,
  input  logic [NA-1:0][BUS_W-1:0]   alg_dout,
  input  logic [NA-1:0]              alg_ready
);

  logic [KIV_W-1:0] kiv;
  logic [3:0]       alg_sel;
  logic             fast;
  logic [2:0]       need;
  logic             kiv_we, in_wr, in_clear, out_rd, out_clear, out_load, status_rd;
  logic [3:0]       kiv_addr;
  logic             in_full, out_empty;
  logic [BUS_W-1:0] in_data;
  logic [BUS_W-1:0] sel_dout;
  logic [IO_W-1:0]  out_word;
  logic             sel_ready;

  iface_control #(.NA(NA)) u_ctrl (
    .clk, .rst_n, .ctrl, .alg_ready, .in_full, .out_empty,
    .alg_sel, .fast, .need, .alg_init, .alg_step,
    .kiv_we, .kiv_addr, .in_wr, .in_clear, .out_rd, .out_clear, .out_load, .status_rd
  );

  kiv_storage u_kiv (
    .clk, .rst_n, .we(kiv_we), .addr(kiv_addr), .wdata(data_in), .kiv
  );

  input_buffer u_ibuf (
    .clk, .rst_n, .clear(in_clear), .wr(in_wr), .wdata(data_in), .need,
    .data(in_data), .full(in_full)
  );

  output_buffer u_obuf (
    .clk, .rst_n, .clear(out_clear), .load(out_load), .ldata(sel_dout), .nwords(need),
    .rd(out_rd), .word(out_word), .empty(out_empty)
  );

  assign key = kiv[127:0];
  assign iv  = kiv[255:128];

  // input multiplexer: buffered words (slow) or replicated DataIn (fast)
  assign alg_din = fast ? {(BUS_W/IO_W){data_in}} : in_data;

  // algorithm output multiplexer
  assign sel_dout  = (alg_sel < 4'(NA)) ? alg_dout[alg_sel]  : '0;
  assign sel_ready = (alg_sel < 4'(NA)) ? alg_ready[alg_sel] : 1'b0;

  // DataOut multiplexer
  always_comb begin
    if (status_rd)
      data_out = {7'b0, sel_ready, fast, in_full, out_empty, 1'b0, alg_sel};
    else if (fast)
      data_out = sel_dout[IO_W-1:0];
    else
      data_out = out_word;
  end

endmodule
