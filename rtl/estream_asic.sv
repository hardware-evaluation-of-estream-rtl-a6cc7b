// estream_asic: top level of a multi-algorithm stream-cipher test chip. Several
// hardware-oriented stream ciphers and an AES-OFB reference share one pin
// interface (16-bit DataIn, 16-bit DataOut, 8-bit Ctrl), a 256-bit key/IV
// register and 64-bit input/output buffers, so that every core can be loaded,
// run and measured the same way.
//
// Slots (estream_pkg::alg_e): AES-OFB (64 bits per step, 128 bits per 41
// clocks), Grain radix-16 and Trivium radix-64 are built here. The other six
// slots (Achterbahn, MICKEY, MOSQUITO, SFINKS+, VEST, ZK-Crypt) are wired to
// ports: ext_key/ext_iv/ext_din/ext_init/ext_step go out, ext_dout/ext_ready
// come back, in the order of estream_pkg::ext_slot. Each core XORs its
// keystream onto the data bus, so every slot turns plaintext into ciphertext.
// See estream_interface for the Ctrl protocol and the slow and fast modes.
//
// The slot set, radices and shared interface are as published; the port order
// of the external slots is this design's.
module estream_asic
  import estream_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [IO_W-1:0]             data_in,
  input  logic [7:0]                  ctrl,
  output logic [IO_W-1:0]             data_out,
  output logic [127:0]                ext_key,
  output logic [127:0]                ext_iv,
  output logic [BUS_W-1:0]            ext_din,
  output logic [N_EXT-1:0]            ext_init,
  output logic [N_EXT-1:0]            ext_step,
  input  logic [N_EXT-1:0][BUS_W-1:0] ext_dout,
  input  logic [N_EXT-1:0]            ext_ready
);

  logic [127:0]                key, iv;
  logic [BUS_W-1:0]            alg_din;
  logic [N_ALG-1:0]            alg_init, alg_step, alg_ready;
  logic [N_ALG-1:0][BUS_W-1:0] alg_dout;

  estream_interface #(.NA(N_ALG)) u_if (
    .clk, .rst_n, .data_in, .ctrl, .data_out,
    .key, .iv, .alg_din, .alg_init, .alg_step, .alg_dout, .alg_ready
  );

  aes_ofb_core u_aes (
    .clk, .rst_n, .key, .iv,
    .init(alg_init[ALG_AES]), .step(alg_step[ALG_AES]),
    .din(alg_din), .dout(alg_dout[ALG_AES]), .ready(alg_ready[ALG_AES])
  );

  // radices come from the slot table, so buffers and cores always agree
  localparam int unsigned GRAIN_R   = alg_radix(ALG_GRAIN);
  localparam int unsigned TRIVIUM_R = alg_radix(ALG_TRIVIUM);

  logic [GRAIN_R-1:0] grain_dout;
  grain_core #(.RADIX(GRAIN_R)) u_grain (
    .clk, .rst_n, .key, .iv,
    .init(alg_init[ALG_GRAIN]), .step(alg_step[ALG_GRAIN]),
    .din(alg_din[GRAIN_R-1:0]), .dout(grain_dout), .ready(alg_ready[ALG_GRAIN])
  );
  assign alg_dout[ALG_GRAIN] = BUS_W'(grain_dout);

  logic [TRIVIUM_R-1:0] trivium_dout;
  trivium_core #(.RADIX(TRIVIUM_R)) u_trivium (
    .clk, .rst_n, .key, .iv,
    .init(alg_init[ALG_TRIVIUM]), .step(alg_step[ALG_TRIVIUM]),
    .din(alg_din[TRIVIUM_R-1:0]), .dout(trivium_dout), .ready(alg_ready[ALG_TRIVIUM])
  );
  assign alg_dout[ALG_TRIVIUM] = BUS_W'(trivium_dout);

  for (genvar k = 0; k < N_EXT; k++) begin : g_ext
    assign ext_init[k]            = alg_init[ext_slot(k)];
    assign ext_step[k]            = alg_step[ext_slot(k)];
    assign alg_dout[ext_slot(k)]  = ext_dout[k];
    assign alg_ready[ext_slot(k)] = ext_ready[k];
  end

  assign ext_key = key;
  assign ext_iv  = iv;
  assign ext_din = alg_din;

endmodule
