// comm_fifo: communication FIFO between adjacent processing elements.
//
// Each PE has an N-, S-, W- and E-FIFO, each written by one neighbour's
// write-back stage and read by the PE's memory-read stage. Depth 32 and width
// 32 follow the design. The read side is first-word fall-through (dout shows
// the oldest entry while empty is low). A push when full or a pop when empty
// is ignored and reported on overflow/underflow for one cycle; the design
// does not say what happens then, so this behaviour is this implementation's.
module comm_fifo #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned DW    = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  logic [DW-1:0] din,
  input  logic          pop,
  output logic [DW-1:0] dout,
  output logic          empty,
  output logic          full,
  output logic          overflow,
  output logic          underflow
);

  localparam int unsigned PW = $clog2(DEPTH);

  logic [DW-1:0] mem [DEPTH];
  logic [PW-1:0] rptr, wptr;
  logic [PW:0]   count;
  logic          do_push, do_pop;

  assign empty     = (count == 0);
  assign full      = (count == (PW+1)'(DEPTH));
  assign do_push   = push && !full;
  assign do_pop    = pop && !empty;
  assign overflow  = push && full;
  assign underflow = pop && empty;
  assign dout      = mem[rptr];

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rptr  <= '0;
      wptr  <= '0;
      count <= '0;
    end else begin
      if (do_push) wptr <= (wptr == PW'(DEPTH - 1)) ? '0 : wptr + 1'b1;
      if (do_pop)  rptr <= (rptr == PW'(DEPTH - 1)) ? '0 : rptr + 1'b1;
      count <= count + (PW+1)'(do_push) - (PW+1)'(do_pop);
    end
  end

endmodule
