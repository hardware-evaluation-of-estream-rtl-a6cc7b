// estream_pkg: types and constants shared by the multi-algorithm stream-cipher
// test chip. It holds the slot numbering of the algorithms behind the common
// interface, the encoding of the 8-bit Ctrl bus and the number of 16-bit words
// each algorithm consumes and produces per step.
//
// The slot list (eight candidates plus the AES-OFB reference) and the radix of
// each slot follow the published summary table; the Ctrl encoding, the slot
// numbering and the word packing are this design's own choices.
package estream_pkg;

  localparam int unsigned N_ALG     = 9;   // algorithm slots behind the interface
  localparam int unsigned N_EXT     = 6;   // slots whose cores live outside this RTL
  localparam int unsigned BUS_W     = 64;  // algorithm data bus and buffer width
  localparam int unsigned IO_W      = 16;  // DataIn / DataOut width
  localparam int unsigned KIV_W     = 256; // key + IV storage
  localparam int unsigned KIV_WORDS = KIV_W / IO_W;

  typedef enum logic [3:0] {
    ALG_AES        = 4'd0,
    ALG_ACHTERBAHN = 4'd1,
    ALG_GRAIN      = 4'd2,
    ALG_MICKEY     = 4'd3,
    ALG_MOSQUITO   = 4'd4,
    ALG_SFINKS     = 4'd5,
    ALG_TRIVIUM    = 4'd6,
    ALG_VEST       = 4'd7,
    ALG_ZKCRYPT    = 4'd8
  } alg_e;

  // Ctrl[7:4] is the operation, Ctrl[3:0] its argument.
  typedef enum logic [3:0] {
    OP_NOP     = 4'h0,  // nothing
    OP_KEY_WR  = 4'h1,  // key/IV word [arg] <= DataIn
    OP_SELECT  = 4'h2,  // select algorithm slot [arg], clears the buffers
    OP_MODE    = 4'h3,  // arg[0]: 0 = slow mode, 1 = fast mode; clears the buffers
    OP_INIT    = 4'h4,  // load key/IV into the selected algorithm and start its setup
    OP_DATA_WR = 4'h5,  // slow mode: append DataIn to the input buffer
    OP_DATA_RD = 4'h6,  // slow mode: DataOut holds the current word; advance past it
    OP_RUN     = 4'h7,  // fast mode: run the selected algorithm this cycle
    OP_STATUS  = 4'h8   // DataOut shows the status word
  } op_e;

  typedef struct packed {
    op_e        op;
    logic [3:0] arg;
  } ctrl_t;

  // Number of algorithm output bits per step (radix); AES-OFB is handed out
  // 64 bits at a time from its 128-bit keystream block.
  function automatic int unsigned alg_radix(logic [3:0] alg);
    case (alg)
      ALG_AES:        return 64;
      ALG_ACHTERBAHN: return 2;
      ALG_GRAIN:      return 16;
      ALG_MICKEY:     return 1;
      ALG_MOSQUITO:   return 3;
      ALG_SFINKS:     return 8;
      ALG_TRIVIUM:    return 64;
      ALG_VEST:       return 16;
      ALG_ZKCRYPT:    return 32;
      default:        return 16;
    endcase
  endfunction

  // 16-bit words moved through the buffers per step: ceil(radix / 16).
  function automatic logic [2:0] alg_words(logic [3:0] alg);
    int unsigned r;
    r = alg_radix(alg);
    return 3'((r + IO_W - 1) / IO_W);
  endfunction

  // Slot number of external slot k (the cores not in this RTL).
  function automatic logic [3:0] ext_slot(int unsigned k);
    case (k)
      0:       return ALG_ACHTERBAHN;
      1:       return ALG_MICKEY;
      2:       return ALG_MOSQUITO;
      3:       return ALG_SFINKS;
      4:       return ALG_VEST;
      default: return ALG_ZKCRYPT;
    endcase
  endfunction

endpackage
