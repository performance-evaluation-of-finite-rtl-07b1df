// pe: processing element of the systolic computational-memory array.
//
// A PE is a computational-memory component (local memory + floating-point
// MAC unit, no instruction decoder) and four communication FIFOs, one per
// neighbour. It executes the microoperation stream of its group's sequencer
// in an eight-stage pipeline:
//
//   MS   the sequencer presents the microoperation (outside this module);
//        it is captured in the MS/MR register
//   MR   read the local memory at ra1/ra2, pop FIFOs; select MAC inputs:
//        a = asrc ? (vsrc ? S-FIFO : N-FIFO) : M[ra1]
//        b = bsrc ? (hsrc ? E-FIFO : W-FIFO) : M[ra2]
//   EX1..EX5  fp_mac (v2 +/- a*b, accumulate via the forwarding path)
//   WB   write M[waddr] (mem_w) and push the result into the selected
//        FIFOs of the adjacent PEs (nffw/sffw/wffw/effw)
//
// An operation whose MS stage is cycle t writes its result at the end of
// cycle t+7; a later operation reading that word must have its MS stage at
// t+7 or later. Scheduling is the program's responsibility.
//
// Active registers and stall: the v-active register loads vchg when the
// south neighbour asserts vprp (vprp_i), the h-active register loads hchg
// when the west neighbour asserts hprp (hprp_i). An operation in MS/MR with
// vdep (hdep) set requests a stall while the v-active (h-active) register is
// clear. The request goes out on stall_req; the array combines all requests
// into stall_in, which freezes every pipeline stage of every PE and the
// sequencers. The registers, their inputs and the stall output follow the
// data-path figure of the design; the exact condition and the array-wide
// freeze are this implementation's reading, since the design only names the
// signals.
//
// Directions: the N-FIFO holds data from the north neighbour (row j+1), and
// so on. nffw pushes the result into the N-FIFO of the south neighbour,
// sffw into the S-FIFO of the north one, wffw into the W-FIFO of the east one
// and effw into the E-FIFO of the west one.
//
// In idle mode (idle = 1) the host reads the local memory through read port 1
// and writes it through the write port.
module pe
  import sca_pkg::*;
#(
  parameter int unsigned MEM_WORDS_P  = sca_pkg::MEM_WORDS,
  parameter int unsigned FIFO_DEPTH_P = sca_pkg::FIFO_DEPTH
) (
  input  logic              clk,
  input  logic              rst_n,
  input  uop_t              uop_in,
  input  logic              stall_in,
  output logic              stall_req,
  // host access in idle mode
  input  logic              idle,
  input  logic              host_we,
  input  logic [MEM_AW-1:0] host_addr,
  input  logic [31:0]       host_wdata,
  output logic [31:0]       host_rdata,
  // result to neighbours
  output logic [31:0]       out_data,
  output logic              push_n_o,   // to the south neighbour's N-FIFO
  output logic              push_s_o,   // to the north neighbour's S-FIFO
  output logic              push_w_o,   // to the east neighbour's W-FIFO
  output logic              push_e_o,   // to the west neighbour's E-FIFO
  // data from neighbours into this PE's FIFOs
  input  logic              n_push_i,
  input  logic [31:0]       n_data_i,
  input  logic              s_push_i,
  input  logic [31:0]       s_data_i,
  input  logic              w_push_i,
  input  logic [31:0]       w_data_i,
  input  logic              e_push_i,
  input  logic [31:0]       e_data_i,
  // active-register propagation
  output logic              vprp_o,     // to the north neighbour
  output logic              hprp_o,     // to the east neighbour
  input  logic              vprp_i,     // from the south neighbour
  input  logic              hprp_i,     // from the west neighbour
  // status
  output logic              fifo_err,   // sticky: FIFO overflow or underflow
  output logic              mac_mul,    // a useful multiplication left EX5
  output logic              mac_acc     // an accumulation left EX5
);

  localparam int unsigned AW = $clog2(MEM_WORDS_P);

  logic run;
  assign run = !stall_in;

  // ---------------- MS/MR ----------------
  uop_t msmr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   msmr <= UOP_NOP;
    else if (run) msmr <= uop_in;
  end

  logic vact, hact;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vact <= 1'b0;
      hact <= 1'b0;
    end else begin
      if (vprp_i) vact <= msmr.vchg;
      if (hprp_i) hact <= msmr.hchg;
    end
  end
  assign stall_req = (msmr.vdep && !vact) || (msmr.hdep && !hact);
  assign vprp_o    = msmr.vprp;
  assign hprp_o    = msmr.hprp;

  // ---------------- MR: memory and FIFO read ----------------
  logic [31:0] rd1, rd2, n_q, s_q, w_q, e_q;
  logic        pop_n, pop_s, pop_w, pop_e;
  logic [3:0]  ovf, udf;
  logic        n_empty, s_empty, w_empty, e_empty;
  logic        n_full, s_full, w_full, e_full;

  assign pop_n = run && msmr.asrc && !msmr.vsrc;
  assign pop_s = run && msmr.asrc &&  msmr.vsrc;
  assign pop_w = run && msmr.bsrc && !msmr.hsrc;
  assign pop_e = run && msmr.bsrc &&  msmr.hsrc;

  comm_fifo #(.DEPTH(FIFO_DEPTH_P), .DW(32)) u_nfifo (
    .clk, .rst_n, .push(n_push_i), .din(n_data_i), .pop(pop_n), .dout(n_q),
    .empty(n_empty), .full(n_full), .overflow(ovf[0]), .underflow(udf[0]));
  comm_fifo #(.DEPTH(FIFO_DEPTH_P), .DW(32)) u_sfifo (
    .clk, .rst_n, .push(s_push_i), .din(s_data_i), .pop(pop_s), .dout(s_q),
    .empty(s_empty), .full(s_full), .overflow(ovf[1]), .underflow(udf[1]));
  comm_fifo #(.DEPTH(FIFO_DEPTH_P), .DW(32)) u_wfifo (
    .clk, .rst_n, .push(w_push_i), .din(w_data_i), .pop(pop_w), .dout(w_q),
    .empty(w_empty), .full(w_full), .overflow(ovf[2]), .underflow(udf[2]));
  comm_fifo #(.DEPTH(FIFO_DEPTH_P), .DW(32)) u_efifo (
    .clk, .rst_n, .push(e_push_i), .din(e_data_i), .pop(pop_e), .dout(e_q),
    .empty(e_empty), .full(e_full), .overflow(ovf[3]), .underflow(udf[3]));

  // ---------------- WB signals (declared for the memory write port) -------
  wb_ctl_t     wb_ctl;
  logic [31:0] mac_out;

  logic          mem_we;
  logic [AW-1:0] mem_waddr, mem_raddr1;
  logic [31:0]   mem_wdata;

  always_comb begin
    if (idle) begin
      mem_we     = host_we;
      mem_waddr  = host_addr[AW-1:0];
      mem_wdata  = host_wdata;
      mem_raddr1 = host_addr[AW-1:0];
    end else begin
      mem_we     = run && wb_ctl.mem_w;
      mem_waddr  = wb_ctl.waddr[AW-1:0];
      mem_wdata  = mac_out;
      mem_raddr1 = msmr.ra1[AW-1:0];
    end
  end

  local_mem #(.WORDS(MEM_WORDS_P), .AW(AW), .DW(32)) u_mem (
    .clk,
    .raddr1(mem_raddr1), .rdata1(rd1),
    .raddr2(msmr.ra2[AW-1:0]), .rdata2(rd2),
    .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata));

  assign host_rdata = rd1;

  // ---------------- MR/EX1 ----------------
  logic [31:0] in_a, in_b;
  logic        ex_sign, ex_acc;
  wb_ctl_t     ex_ctl [1:5];   // ex_ctl[k]: control of the operation in EXk
  logic        ex_use [1:5];   // operation has a destination or accumulates
  logic        ex_accf [1:5];  // operation accumulates

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_a    <= '0;
      in_b    <= '0;
      ex_sign <= 1'b0;
      ex_acc  <= 1'b0;
      for (int k = 1; k <= 5; k++) begin
        ex_ctl[k]  <= '0;
        ex_use[k]  <= 1'b0;
        ex_accf[k] <= 1'b0;
      end
    end else if (run) begin
      in_a    <= msmr.asrc ? (msmr.vsrc ? s_q : n_q) : rd1;
      in_b    <= msmr.bsrc ? (msmr.hsrc ? e_q : w_q) : rd2;
      ex_sign <= msmr.sign;
      ex_acc  <= msmr.acc_sel;
      ex_ctl[1]  <= msmr.wb;
      ex_use[1]  <= msmr.wb.mem_w | msmr.wb.nffw | msmr.wb.sffw |
                    msmr.wb.wffw | msmr.wb.effw | msmr.acc_sel;
      ex_accf[1] <= msmr.acc_sel;
      for (int k = 2; k <= 5; k++) begin
        ex_ctl[k]  <= ex_ctl[k-1];
        ex_use[k]  <= ex_use[k-1];
        ex_accf[k] <= ex_accf[k-1];
      end
    end
  end

  // ---------------- EX1..EX5: MAC ----------------
  fp_mac u_mac (
    .clk, .rst_n, .ce(run),
    .a(in_a), .b(in_b), .sign(ex_sign), .acc_sel(ex_acc),
    .out(mac_out));

  // EX5/WB: the MAC output register and the control of the same operation
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   wb_ctl <= '0;
    else if (run) wb_ctl <= ex_ctl[5];
  end

  // ---------------- WB: results to neighbours ----------------
  assign out_data = mac_out;
  assign push_n_o = run && !idle && wb_ctl.nffw;
  assign push_s_o = run && !idle && wb_ctl.sffw;
  assign push_w_o = run && !idle && wb_ctl.wffw;
  assign push_e_o = run && !idle && wb_ctl.effw;

  // Utilisation events, counted when an operation leaves EX5. Its product
  // was useful if it has a destination, accumulates, or is picked up by the
  // accumulating operation now in EX2 (the start of a chain). Its adder did
  // real work if it accumulated.
  assign mac_mul = run && (ex_use[5] || ex_accf[2]);
  assign mac_acc = run && ex_accf[5];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                fifo_err <= 1'b0;
    else if (|ovf || |udf)     fifo_err <= 1'b1;
  end

  // The full/empty flags are visible to assertions only: the program must
  // never read an empty FIFO or fill one.
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    !(pop_n && n_empty) && !(pop_s && s_empty) &&
    !(pop_w && w_empty) && !(pop_e && e_empty));
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    !(n_push_i && n_full) && !(s_push_i && s_full) &&
    !(w_push_i && w_full) && !(e_push_i && e_full));

endmodule
