// array_controller: mode control and host access for the array processor.
//
// The array has an idle mode and a computing mode. In idle mode all local
// memories and sequence memories form one word-addressed space that the host
// (through the PCI controller) reads and writes: this is how data and
// microprograms are loaded and results read back. Writing 1 to bit 0 of the
// control word starts all sequencers and enters computing mode. When every
// sequencer has halted, the controller waits PIPE_DEPTH unstalled cycles for
// the PE pipelines to drain and returns to idle mode.
//
// Address map (32-bit words, host_addr[21:20] selects the region):
//   0: local memory   [14:8] PE index (y*12 + x), [7:0] word
//   1: sequence mem   [17:14] sequencer (sca_pkg::group_e), [13:1] word,
//                     [0] 0 = bits 31:0, 1 = bits 63:32
//   2: control        0: write bit 0 = start; read status
//                        {fifo_err, all halted, computing, idle}
//                     1: cycles of the last run   2: stall cycles
//                     3: multiplications issued (all PEs)
//                     4: accumulations issued (all PEs)
// Memory writes are accepted in idle mode only. Reads return data one cycle
// after the address (registered host_rdata). The word address, PE select,
// sequence-memory half and write data go out as plain slices of the host
// bus; only the write enables and the read mux are decoded. The modes, their purpose and
// the single address space follow the design; the map, the drain wait and
// the counters are this implementation's.
module array_controller
  import sca_pkg::*;
#(
  parameter int unsigned NPE = sca_pkg::NX * sca_pkg::NY,
  parameter int unsigned PW  = $clog2(NPE)
) (
  input  logic                clk,
  input  logic                rst_n,
  // host bus
  input  logic                host_we,
  input  logic [HOST_AW-1:0]  host_addr,
  input  logic [31:0]         host_wdata,
  output logic [31:0]         host_rdata,
  // array
  output logic                idle,
  output logic                pe_we,
  output logic [PW-1:0]       pe_sel,
  output logic [MEM_AW-1:0]   pe_addr,
  input  logic [31:0]         pe_rdata,
  input  logic                stall,
  input  logic                fifo_err,
  input  logic [NPE-1:0]      mac_mul_v,
  input  logic [NPE-1:0]      mac_acc_v,
  // sequencers
  output logic                seq_start,
  output logic [NSEQ-1:0]     seq_we,
  output logic [SEQ_AW-1:0]   seq_addr,
  output logic                seq_half,
  input  logic [31:0]         seq_rdata [NSEQ],
  input  logic [NSEQ-1:0]     seq_halted,
  output logic [31:0]         wdata
);

  mode_e       mode;
  logic [3:0]  drain;
  logic [31:0] cyc_cnt, stall_cnt, mac_cnt, acc_cnt;
  logic [1:0]  region;
  logic [3:0]  seq_sel;
  logic [$clog2(NPE+1)-1:0] mac_now, acc_now;

  assign region   = host_addr[21:20];
  assign idle     = (mode == M_IDLE);
  assign pe_sel   = host_addr[8 +: PW];
  assign pe_addr  = host_addr[7:0];
  assign pe_we    = idle && host_we && region == RG_LMEM;
  assign seq_sel  = host_addr[17:14];
  assign seq_addr = host_addr[13:1];
  assign seq_half = host_addr[0];
  assign wdata    = host_wdata;
  assign seq_start = idle && host_we && region == RG_CTRL &&
                     host_addr[2:0] == 3'd0 && host_wdata[0];

  always_comb begin
    for (int s = 0; s < NSEQ; s++)
      seq_we[s] = idle && host_we && region == RG_SEQ && seq_sel == 4'(s);
  end

  always_comb begin
    mac_now = '0;
    acc_now = '0;
    for (int p = 0; p < NPE; p++) begin
      mac_now = mac_now + $bits(mac_now)'(mac_mul_v[p]);
      acc_now = acc_now + $bits(acc_now)'(mac_acc_v[p]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode      <= M_IDLE;
      drain     <= '0;
      cyc_cnt   <= '0;
      stall_cnt <= '0;
      mac_cnt   <= '0;
      acc_cnt   <= '0;
    end else begin
      unique case (mode)
        M_IDLE: if (seq_start) begin
          mode      <= M_RUN;
          cyc_cnt   <= '0;
          stall_cnt <= '0;
          mac_cnt   <= '0;
          acc_cnt   <= '0;
        end
        M_RUN: if (&seq_halted) begin
          mode  <= M_DRAIN;
          drain <= 4'(PIPE_DEPTH);
        end
        M_DRAIN: if (!stall) begin
          if (drain == 4'd1) mode <= M_IDLE;
          drain <= drain - 1'b1;
        end
        default: mode <= M_IDLE;
      endcase
      if (mode != M_IDLE) begin
        cyc_cnt <= cyc_cnt + 1'b1;
        if (stall) stall_cnt <= stall_cnt + 1'b1;
        mac_cnt <= mac_cnt + 32'(mac_now);
        acc_cnt <= acc_cnt + 32'(acc_now);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) host_rdata <= '0;
    else begin
      unique case (region)
        RG_LMEM: host_rdata <= pe_rdata;
        RG_SEQ:  host_rdata <= (seq_sel < 4'(NSEQ)) ? seq_rdata[seq_sel] : 32'd0;
        RG_CTRL: unique case (host_addr[2:0])
          3'd0: host_rdata <= {28'd0, fifo_err, &seq_halted, !idle, idle};
          3'd1: host_rdata <= cyc_cnt;
          3'd2: host_rdata <= stall_cnt;
          3'd3: host_rdata <= mac_cnt;
          3'd4: host_rdata <= acc_cnt;
          default: host_rdata <= '0;
        endcase
        default: host_rdata <= '0;
      endcase
    end
  end

endmodule
