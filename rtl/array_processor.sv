// array_processor: top of the systolic computational-memory array processor.
//
// A custom computing machine for difference-scheme computations such as the
// 2D FDTD method. A 12 x 8 mesh of programmable PEs, each with its own
// local memory and floating-point MAC unit, computes on a grid divided into
// one partial block per PE; neighbours exchange border values through FIFOs.
// Nine shared sequencers drive the nine kinds of partial block (interior,
// four borders, four corners) so that each kind runs its own boundary
// computation. The array controller gives the host access to all memories
// in idle mode and runs the sequencers in computing mode.
//
// The host bus (host_we, host_addr, host_wdata, host_rdata; map in
// array_controller) is the bus that the board's PCI controller drives; the
// PCI controller itself is outside this design. host_rdata follows the
// address by one cycle. idle is high while the array is in idle mode.
module array_processor
  import sca_pkg::*;
#(
  parameter int unsigned NX_P         = sca_pkg::NX,
  parameter int unsigned NY_P         = sca_pkg::NY,
  parameter int unsigned MEM_WORDS_P  = sca_pkg::MEM_WORDS,
  parameter int unsigned FIFO_DEPTH_P = sca_pkg::FIFO_DEPTH,
  parameter int unsigned SEQ_WORDS_P  = sca_pkg::SEQ_WORDS
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               host_we,
  input  logic [HOST_AW-1:0] host_addr,
  input  logic [31:0]        host_wdata,
  output logic [31:0]        host_rdata,
  output logic               idle
);

  localparam int unsigned NPE = NX_P * NY_P;
  localparam int unsigned PW  = $clog2(NPE);
  localparam int unsigned SAW = $clog2(SEQ_WORDS_P);

  logic              pe_we, stall, fifo_err, seq_start, seq_half;
  logic [PW-1:0]     pe_sel;
  logic [MEM_AW-1:0] pe_addr;
  logic [31:0]       pe_rdata, wdata;
  logic [NPE-1:0]    mac_mul_v, mac_acc_v;
  logic [NSEQ-1:0]   seq_we, seq_halted;
  logic [SEQ_AW-1:0] seq_addr;
  logic [31:0]       seq_rdata [NSEQ];
  uop_t              uop_g [NSEQ];

  array_controller #(.NPE(NPE), .PW(PW)) u_ctrl (
    .clk, .rst_n,
    .host_we, .host_addr, .host_wdata, .host_rdata,
    .idle, .pe_we, .pe_sel, .pe_addr, .pe_rdata,
    .stall, .fifo_err, .mac_mul_v, .mac_acc_v,
    .seq_start, .seq_we, .seq_addr, .seq_half, .seq_rdata, .seq_halted,
    .wdata);

  for (genvar s = 0; s < NSEQ; s++) begin : g_seq
    sequencer #(.WORDS(SEQ_WORDS_P), .AW(SAW)) u_seq (
      .clk, .rst_n,
      .start     (seq_start),
      .stall     (stall),
      .uop       (uop_g[s]),
      .running   (),
      .halted    (seq_halted[s]),
      .loop_taken(),
      .host_we   (seq_we[s]),
      .host_addr (seq_addr[SAW-1:0]),
      .host_half (seq_half),
      .host_wdata(wdata),
      .host_rdata(seq_rdata[s]));
  end

  systolic_array #(
    .NX_P(NX_P), .NY_P(NY_P), .MEM_WORDS_P(MEM_WORDS_P),
    .FIFO_DEPTH_P(FIFO_DEPTH_P), .NPE(NPE), .PW(PW)
  ) u_array (
    .clk, .rst_n,
    .uop_g, .stall, .idle,
    .host_we(pe_we), .host_pe(pe_sel), .host_addr(pe_addr),
    .host_wdata(wdata), .host_rdata(pe_rdata),
    .fifo_err, .mac_mul_v, .mac_acc_v);

endmodule
