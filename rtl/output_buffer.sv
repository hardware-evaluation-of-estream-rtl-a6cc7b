// output_buffer: the 64-bit output buffer of the common interface. In slow mode
// it captures one algorithm output word (load) together with the number of
// 16-bit words it carries, and presents them one at a time on `word`, lowest
// word first; rd advances to the next one. empty is high when nothing is left to
// read, and the control unit holds the algorithm until then. clear discards the
// contents; clear wins over load, load over rd.
//
// The 64-bit width and the hold-until-read behaviour are as published; the
// word order is this design's choice.
module output_buffer
  import estream_pkg::*;
#(
  parameter int unsigned WIDTH = BUS_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              load,
  input  logic [WIDTH-1:0]  ldata,
  input  logic [2:0]        nwords,
  input  logic              rd,
  output logic [IO_W-1:0]   word,
  output logic              empty
);

  localparam int unsigned NW = WIDTH / IO_W;

  logic [NW-1:0][IO_W-1:0] buf_q;
  logic [2:0]              left_q;   // words still to be read
  logic [2:0]              ptr_q;    // index of the word on `word`

  assign empty = (left_q == 3'd0);
  assign word  = buf_q[ptr_q[$clog2(NW)-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q  <= '0;
      left_q <= '0;
      ptr_q  <= '0;
    end else if (clear) begin
      left_q <= '0;
      ptr_q  <= '0;
    end else if (load) begin
      buf_q  <= ldata;
      left_q <= nwords;
      ptr_q  <= '0;
    end else if (rd && !empty) begin
      left_q <= left_q - 3'd1;
      ptr_q  <= ptr_q + 3'd1;
    end
  end

endmodule
