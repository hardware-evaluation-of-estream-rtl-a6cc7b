// kiv_storage: the 256-bit key and initialisation-vector register of the common
// interface. The host writes it one 16-bit DataIn word at a time; word i sits at
// bits [16i+15:16i]. All algorithm cores read it in parallel: bits [127:0] are
// the key half, bits [255:128] the IV half. A write takes effect at the next
// rising clock edge; reset clears the register.
//
// A 256-bit register shared by all algorithms and fed from DataIn is as
// published; the addressed word write and the key/IV split are choices of this
// design.
module kiv_storage
  import estream_pkg::*;
#(
  parameter int unsigned WORDS = KIV_WORDS
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        we,
  input  logic [$clog2(WORDS)-1:0]    addr,
  input  logic [IO_W-1:0]             wdata,
  output logic [WORDS*IO_W-1:0]       kiv
);

  logic [WORDS-1:0][IO_W-1:0] mem_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem_q <= '0;
    end else if (we) begin
      mem_q[addr] <= wdata;
    end
  end

  assign kiv = mem_q;

endmodule
