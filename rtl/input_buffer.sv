// input_buffer: the 64-bit input buffer of the common interface. In slow mode
// the host appends 16-bit DataIn words (wr); word k of a step lands at bits
// [16k+15:16k]. The buffer reports full once it holds `need` words, the number
// the selected algorithm consumes per step (1 to 4). Writes to a full buffer are
// dropped. clear empties it (after a step, or when the algorithm or mode
// changes); clear wins over wr. Unused upper words read as zero.
//
// The 64-bit width and the collect-then-run use are as published; the word
// order and the dropping of writes to a full buffer are this design's choices.
module input_buffer
  import estream_pkg::*;
#(
  parameter int unsigned WIDTH = BUS_W
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         clear,
  input  logic                         wr,
  input  logic [IO_W-1:0]              wdata,
  input  logic [2:0]                   need,
  output logic [WIDTH-1:0]             data,
  output logic                         full
);

  localparam int unsigned NW = WIDTH / IO_W;

  logic [NW-1:0][IO_W-1:0] buf_q;
  logic [2:0]              cnt_q;

  assign full = (cnt_q >= need);
  assign data = buf_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q <= '0;
      cnt_q <= '0;
    end else if (clear) begin
      buf_q <= '0;
      cnt_q <= '0;
    end else if (wr && !full) begin
      buf_q[cnt_q[$clog2(NW)-1:0]] <= wdata;
      cnt_q <= cnt_q + 3'd1;
    end
  end

endmodule
