// sca_pkg: types and constants shared by the systolic computational-memory
// array processor.
//
// The array is a 12 x 8 mesh of processing elements (PEs). Each PE runs a
// 41-bit microoperation per clock that it receives from one of nine shared
// sequencers. There is no instruction decoder: the microoperation fields drive
// the multiplexers, the memory ports, the MAC unit and the FIFO write enables
// directly. The field list follows the data-path figure of the design
// (read addresses, source selects, active-register controls, sign,
// accumulate select, memory write enable, write address and four FIFO write
// enables). Their order inside the word, and the 64-bit sequence-memory word
// that wraps a microoperation with the loop-control fields, are this
// implementation's own encoding.
package sca_pkg;

  // Array geometry and memory sizes (defaults are the implemented prototype).
  localparam int unsigned NX          = 12;    // PE columns (x direction)
  localparam int unsigned NY          = 8;     // PE rows (y direction)
  localparam int unsigned NSEQ        = 9;     // shared sequencers
  localparam int unsigned MEM_WORDS   = 256;   // 1 KByte local memory
  localparam int unsigned MEM_AW      = 8;
  localparam int unsigned FIFO_DEPTH  = 32;    // entries per communication FIFO
  localparam int unsigned SEQ_WORDS   = 8192;  // 64 KByte sequence memory
  localparam int unsigned SEQ_AW      = 13;
  localparam int unsigned LOOP_DEPTH  = 2;     // nested loop levels
  localparam int unsigned PIPE_DEPTH  = 8;     // MS, MR, EX1..EX5, WB

  // Sequencer groups: the nine sorts of partial grid blocks.
  typedef enum logic [3:0] {
    G_UPPER       = 4'd0,
    G_LOWER       = 4'd1,
    G_LEFT        = 4'd2,
    G_RIGHT       = 4'd3,
    G_UPPER_LEFT  = 4'd4,
    G_UPPER_RIGHT = 4'd5,
    G_LOWER_LEFT  = 4'd6,
    G_LOWER_RIGHT = 4'd7,
    G_INTERNAL    = 4'd8
  } group_e;

  // Group of the PE at column x, row y (row 0 is the lower border).
  function automatic int unsigned group_of(int unsigned x, int unsigned y,
                                           int unsigned nx, int unsigned ny);
    bit l, r, lo, up;
    l  = (x == 0);
    r  = (x == nx - 1);
    lo = (y == 0);
    up = (y == ny - 1);
    if (up && l)  return 4;
    if (up && r)  return 5;
    if (lo && l)  return 6;
    if (lo && r)  return 7;
    if (up)       return 0;
    if (lo)       return 1;
    if (l)        return 2;
    if (r)        return 3;
    return 8;
  endfunction

  // Control bits that travel with an operation through EX1..EX5 to WB (13).
  typedef struct packed {
    logic              mem_w;   // write the MAC result to local memory
    logic [MEM_AW-1:0] waddr;   // local memory write address (dst2)
    logic              nffw;    // push into the N-FIFO of the south neighbour
    logic              sffw;    // push into the S-FIFO of the north neighbour
    logic              wffw;    // push into the W-FIFO of the east neighbour
    logic              effw;    // push into the E-FIFO of the west neighbour
  } wb_ctl_t;

  // One 41-bit microoperation.
  typedef struct packed {
    logic [MEM_AW-1:0] ra1;     // read address 1 (src1)
    logic [MEM_AW-1:0] ra2;     // read address 2 (src2)
    logic              vsrc;    // vertical FIFO select: 0 N-FIFO, 1 S-FIFO
    logic              hsrc;    // horizontal FIFO select: 0 W-FIFO, 1 E-FIFO
    logic              asrc;    // MAC input a: 0 read data 1, 1 vertical FIFO
    logic              bsrc;    // MAC input b: 0 read data 2, 1 horizontal FIFO
    logic              vchg;    // value loaded into the v-active register
    logic              hchg;    // value loaded into the h-active register
    logic              vdep;    // operation waits for the v-active register
    logic              hdep;    // operation waits for the h-active register
    logic              vprp;    // propagate to the north neighbour
    logic              hprp;    // propagate to the east neighbour
    logic              sign;    // 1: v2 + a*b, 0: v2 - a*b
    logic              acc_sel; // 1: v2 = forwarded MAC output, 0: v2 = 0
    wb_ctl_t           wb;
  } uop_t;

  localparam uop_t UOP_NOP = '0;

  // Sequence-memory word: 64 bits.
  typedef enum logic [1:0] {
    SQ_NONE = 2'd0,   // computing instruction or nop
    SQ_LSET = 2'd1,   // push loop counter (Num) and jump register (Addr)
    SQ_BNE  = 2'd2,   // branch if loop counter /= 0; with a uop it is accpbne
    SQ_HALT = 2'd3    // stop the sequencer
  } seq_ctl_e;

  typedef struct packed {
    logic [7:0]        rsvd;
    seq_ctl_e          ctl;
    logic [SEQ_AW-1:0] addr;
    uop_t              uop;     // for lset, uop[15:0] carries Num
  } seq_word_t;

  // Host address map (word addresses), decoded by the array controller.
  localparam logic [1:0] RG_LMEM = 2'd0;  // [14:8] PE index, [7:0] word
  localparam logic [1:0] RG_SEQ  = 2'd1;  // [17:14] seq, [13:1] word, [0] half
  localparam logic [1:0] RG_CTRL = 2'd2;  // 0: start/status, 1: cycle count
  localparam int unsigned HOST_AW = 22;

  typedef enum logic [1:0] {
    M_IDLE  = 2'd0,
    M_RUN   = 2'd1,
    M_DRAIN = 2'd2
  } mode_e;

endpackage
