// local_mem: local memory of one processing element.
//
// 256 words of 32 bits (1 KByte) holding the single-precision values of the
// PE's partial grid block and its intermediate results. Two asynchronous read
// ports feed the MAC inputs in the memory-read (MR) stage; one synchronous
// write port is driven by the write-back (WB) stage. Size and port count
// follow the design; asynchronous reads (so that MR reads the array and the
// MR/EX1 pipeline register captures the data) and read-before-write on an
// address collision are this implementation's choices.
module local_mem #(
  parameter int unsigned WORDS = 256,
  parameter int unsigned AW    = $clog2(WORDS),
  parameter int unsigned DW    = 32
) (
  input  logic          clk,
  input  logic [AW-1:0] raddr1,
  output logic [DW-1:0] rdata1,
  input  logic [AW-1:0] raddr2,
  output logic [DW-1:0] rdata2,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata
);

  logic [DW-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata1 = mem[raddr1];
  assign rdata2 = mem[raddr2];

endmodule
