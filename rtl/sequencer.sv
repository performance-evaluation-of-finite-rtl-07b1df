// sequencer: shared microoperation sequencer with nested loop control.
//
// Holds a sequence memory of 8192 64-bit words (64 KByte) and a program
// counter. Each cycle in which it runs and is not stalled it issues the
// microoperation of the word at the program counter to the PEs of its group
// and moves to the next word. Control words (see sca_pkg::seq_word_t):
//
//   lset Num, Addr  push a loop level: loop counter := Num, jump register :=
//                   Addr (Num is carried in bits 15:0 of the word); issues nop
//   bne             if the innermost loop counter is not zero, decrement it
//                   and jump to its jump register, otherwise leave the loop
//                   (pop the level) and fall through. If the word's
//                   microoperation is not a nop, it is issued in the same
//                   cycle (accpbne).
//   halt            stop; halted goes high; issues nop
//
// A body followed by bne therefore runs Num+1 times. The microprogram format
// with no comparison and no conditional branch other than the loop branch,
// the lset/bne/accpbne/halt semantics and the memory size follow the design;
// the word layout, the loop stack of LOOP_DEPTH levels (the design's programs
// use two nested loops) and popping on loop exit are this implementation's.
//
// Host access (idle mode): 32-bit halves of a word are written with
// host_we/host_half and read combinationally on host_rdata.
// Timing: start (one cycle) sets PC = 0; the first word is issued in the
// next cycle. The microoperation output is combinational from the PC.
module sequencer
  import sca_pkg::*;
#(
  parameter int unsigned WORDS = sca_pkg::SEQ_WORDS,
  parameter int unsigned AW    = $clog2(WORDS),
  parameter int unsigned DEPTH = sca_pkg::LOOP_DEPTH
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          stall,
  output uop_t          uop,
  output logic          running,
  output logic          halted,
  output logic          loop_taken,   // a bne branched back this cycle
  // host port
  input  logic          host_we,
  input  logic [AW-1:0] host_addr,
  input  logic          host_half,    // 0: bits 31:0, 1: bits 63:32
  input  logic [31:0]   host_wdata,
  output logic [31:0]   host_rdata
);

  localparam int unsigned SW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [63:0]   mem [WORDS];
  logic [AW-1:0] pc;
  seq_word_t     w;
  logic [15:0]   cnt  [DEPTH];
  logic [AW-1:0] jreg [DEPTH];
  logic [SW:0]   sp;          // number of active loop levels
  logic [SW-1:0] top;
  logic          adv;

  always_ff @(posedge clk) begin
    if (host_we) begin
      if (host_half) mem[host_addr][63:32] <= host_wdata;
      else           mem[host_addr][31:0]  <= host_wdata;
    end
  end
  assign host_rdata = host_half ? mem[host_addr][63:32] : mem[host_addr][31:0];

  assign w   = seq_word_t'(mem[pc]);
  assign top = SW'(sp - 1'b1);
  assign adv = running && !stall;

  always_comb begin
    uop = UOP_NOP;
    if (running && (w.ctl == SQ_NONE || w.ctl == SQ_BNE)) uop = w.uop;
  end

  assign loop_taken = adv && w.ctl == SQ_BNE && sp != 0 && cnt[top] != 16'd0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc      <= '0;
      sp      <= '0;
      running <= 1'b0;
      halted  <= 1'b0;
      for (int i = 0; i < DEPTH; i++) begin
        cnt[i]  <= '0;
        jreg[i] <= '0;
      end
    end else if (start) begin
      pc      <= '0;
      sp      <= '0;
      running <= 1'b1;
      halted  <= 1'b0;
    end else if (adv) begin
      unique case (w.ctl)
        SQ_LSET: begin
          cnt[SW'(sp)]  <= w.uop[15:0];
          jreg[SW'(sp)] <= AW'(w.addr);
          if (sp < (SW+1)'(DEPTH)) sp <= sp + 1'b1;
          pc <= pc + 1'b1;
        end
        SQ_BNE: begin
          if (sp != 0 && cnt[top] != 16'd0) begin
            cnt[top] <= cnt[top] - 1'b1;
            pc       <= jreg[top];
          end else begin
            if (sp != 0) sp <= sp - 1'b1;
            pc <= pc + 1'b1;
          end
        end
        SQ_HALT: begin
          running <= 1'b0;
          halted  <= 1'b1;
        end
        default: pc <= pc + 1'b1;
      endcase
    end
  end

  // A program must not nest loops deeper than the loop stack.
  a_loop_depth: assert property (@(posedge clk) disable iff (!rst_n)
    (adv && w.ctl == SQ_LSET) |-> (sp < (SW+1)'(DEPTH)));

endmodule
