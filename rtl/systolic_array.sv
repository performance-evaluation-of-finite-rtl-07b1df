// systolic_array: NX x NY mesh of processing elements in nine sequencer groups.
//
// PE (x, y) sits at column x (west to east) and row y (south to north); its
// index is y*NX + x. Each PE is connected to its four neighbours: its result
// and FIFO push enables go to the adjacent PEs' FIFOs, and vprp/hprp go to
// the north/east neighbours. At the border the missing neighbours' inputs
// are tied low and pushes towards them are dropped.
//
// Every PE receives the microoperation of its group's sequencer (SIMD within
// a group). The group is given by the PE's place: the four borders, the four
// corners and the interior (sca_pkg::group_of), matching the nine kinds of
// partial grid block with their different boundary computations. The stall
// requests of all PEs are ORed into one stall that freezes every PE and every
// sequencer.
//
// In idle mode the host reaches the local memory of the PE selected by
// host_pe; the read data is combinational. Default size 12 x 8 = 96 PEs
// follows the design.
module systolic_array
  import sca_pkg::*;
#(
  parameter int unsigned NX_P         = sca_pkg::NX,
  parameter int unsigned NY_P         = sca_pkg::NY,
  parameter int unsigned MEM_WORDS_P  = sca_pkg::MEM_WORDS,
  parameter int unsigned FIFO_DEPTH_P = sca_pkg::FIFO_DEPTH,
  parameter int unsigned NPE          = NX_P * NY_P,
  parameter int unsigned PW           = $clog2(NPE)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  uop_t              uop_g [NSEQ],
  output logic              stall,
  input  logic              idle,
  input  logic              host_we,
  input  logic [PW-1:0]     host_pe,
  input  logic [MEM_AW-1:0] host_addr,
  input  logic [31:0]       host_wdata,
  output logic [31:0]       host_rdata,
  output logic              fifo_err,
  output logic [NPE-1:0]    mac_mul_v,
  output logic [NPE-1:0]    mac_acc_v
);

  logic [31:0]    out_data [NPE];
  logic [NPE-1:0] push_n, push_s, push_w, push_e;
  logic [NPE-1:0] vprp, hprp, stall_v, err_v;
  logic [31:0]    rdata    [NPE];

  for (genvar y = 0; y < NY_P; y++) begin : g_row
    for (genvar x = 0; x < NX_P; x++) begin : g_col
      localparam int unsigned P   = y * NX_P + x;
      localparam int unsigned G   = group_of(x, y, NX_P, NY_P);
      localparam bit HAS_N = (y + 1 < NY_P);
      localparam bit HAS_S = (y > 0);
      localparam bit HAS_E = (x + 1 < NX_P);
      localparam bit HAS_W = (x > 0);
      localparam int unsigned PN = HAS_N ? P + NX_P : P;
      localparam int unsigned PS = HAS_S ? P - NX_P : P;
      localparam int unsigned PE_ = HAS_E ? P + 1 : P;
      localparam int unsigned PWst = HAS_W ? P - 1 : P;

      pe #(.MEM_WORDS_P(MEM_WORDS_P), .FIFO_DEPTH_P(FIFO_DEPTH_P)) u_pe (
        .clk, .rst_n,
        .uop_in    (uop_g[G]),
        .stall_in  (stall),
        .stall_req (stall_v[P]),
        .idle,
        .host_we   (host_we && host_pe == PW'(P)),
        .host_addr,
        .host_wdata,
        .host_rdata(rdata[P]),
        .out_data  (out_data[P]),
        .push_n_o  (push_n[P]),
        .push_s_o  (push_s[P]),
        .push_w_o  (push_w[P]),
        .push_e_o  (push_e[P]),
        // N-FIFO is written by the north neighbour's nffw, and so on
        .n_push_i  (HAS_N ? push_n[PN]   : 1'b0),
        .n_data_i  (HAS_N ? out_data[PN] : 32'd0),
        .s_push_i  (HAS_S ? push_s[PS]   : 1'b0),
        .s_data_i  (HAS_S ? out_data[PS] : 32'd0),
        .w_push_i  (HAS_W ? push_w[PWst] : 1'b0),
        .w_data_i  (HAS_W ? out_data[PWst] : 32'd0),
        .e_push_i  (HAS_E ? push_e[PE_]  : 1'b0),
        .e_data_i  (HAS_E ? out_data[PE_] : 32'd0),
        .vprp_o    (vprp[P]),
        .hprp_o    (hprp[P]),
        .vprp_i    (HAS_S ? vprp[PS]   : 1'b0),
        .hprp_i    (HAS_W ? hprp[PWst] : 1'b0),
        .fifo_err  (err_v[P]),
        .mac_mul   (mac_mul_v[P]),
        .mac_acc   (mac_acc_v[P])
      );
    end
  end

  assign stall    = |stall_v;
  assign fifo_err = |err_v;

  always_comb begin
    host_rdata = '0;
    for (int p = 0; p < NPE; p++)
      if (host_pe == PW'(p)) host_rdata = rdata[p];
  end

endmodule
