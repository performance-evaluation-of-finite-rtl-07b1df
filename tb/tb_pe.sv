// tb_pe: self-checking testbench of one processing element.
//
// Loads the local memory through the idle-mode host port, pre-fills the four
// FIFOs as the neighbours would, then issues a short microprogram as a
// sequencer would (the microoperation is held while the PE stalls):
// a multiply from the S-FIFO (mulp), a negated product sent to the north
// and south neighbours (mulm), an accumulation over the forwarding path with
// operands from the N-, E- and W-FIFOs (accp), and an accumulation chain that
// is interrupted by an h-active stall, followed by a v-active stall. The
// expected values are exact products and sums of small binary fractions. The
// results are read back in idle mode. Also checks the seven-cycle latency
// from issue to write-back and the length of each stall.
module tb_pe;
  import sca_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  uop_t uop_in;
  logic stall_in, stall_req, idle;
  logic host_we;
  logic [7:0] host_addr;
  logic [31:0] host_wdata, host_rdata, out_data;
  logic push_n_o, push_s_o, push_w_o, push_e_o;
  logic n_push_i, s_push_i, w_push_i, e_push_i;
  logic [31:0] n_data_i, s_data_i, w_data_i, e_data_i;
  logic vprp_o, hprp_o, vprp_i, hprp_i, fifo_err, mac_mul, mac_acc;
  int checks = 0, failures = 0;

  pe #(.MEM_WORDS_P(256), .FIFO_DEPTH_P(32)) dut (.*);

  assign stall_in = stall_req;

  always #5 clk = ~clk;   // one cycle is 10 time units

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic [31:0] got, logic [31:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("%s: got %h want %h", what, got, want);
    end
  endtask

  // --- microoperation builders ---
  function automatic uop_t op(logic [7:0] ra1, logic [7:0] ra2, bit sign, bit acc);
    uop_t u = UOP_NOP;
    u.ra1 = ra1; u.ra2 = ra2; u.sign = sign; u.acc_sel = acc;
    return u;
  endfunction

  // issue one microoperation: present it until a cycle without stall
  time issue_t [$];
  task automatic issue(uop_t u);
    time t;
    uop_in = u;
    @(posedge clk);
    t = $time;
    #1;
    while (stall_in) begin
      @(posedge clk);
      t = $time;
      #1;
    end
    issue_t.push_back(t);   // edge that captured u into MS/MR
  endtask

  task automatic host_write(int a, logic [31:0] d);
    @(negedge clk);
    host_we = 1'b1; host_addr = 8'(a); host_wdata = d;
    @(negedge clk);
    host_we = 1'b0;
  endtask

  task automatic push_in(int dir, logic [31:0] d);
    @(negedge clk);
    case (dir)
      0: begin n_push_i = 1'b1; n_data_i = d; end
      1: begin s_push_i = 1'b1; s_data_i = d; end
      2: begin w_push_i = 1'b1; w_data_i = d; end
      default: begin e_push_i = 1'b1; e_data_i = d; end
    endcase
    @(negedge clk);
    {n_push_i, s_push_i, w_push_i, e_push_i} = '0;
  endtask

  // neighbour-side monitor of the pushes
  time push_ns_t = 0, push_we_t = 0;
  int nsn = 0, wen = 0;
  logic [31:0] push_ns_val, push_we_val;
  always @(posedge clk) begin
    if (push_n_o && push_s_o) begin push_ns_t = $time; push_ns_val = out_data; nsn++; end
    if (push_w_o && push_e_o) begin push_we_t = $time; push_we_val = out_data; wen++; end
    if (push_n_o != push_s_o || push_w_o != push_e_o) begin
      failures++;
      $display("unexpected single push");
    end
  end

  // stall monitor and the neighbour that releases it
  int stall_cycles = 0, stall_len = 0, hstalls = 0, vstalls = 0;
  always @(posedge clk) if (stall_req && rst_n) stall_cycles++;
  initial begin
    vprp_i = 1'b0; hprp_i = 1'b0;
    forever begin
      @(negedge clk);
      if (stall_req) begin
        bit is_h;
        is_h = dut.msmr.hdep;
        repeat (4) @(negedge clk);       // neighbour arrives 4 cycles later
        if (is_h) begin hprp_i = 1'b1; hstalls++; end
        else      begin vprp_i = 1'b1; vstalls++; end
        @(negedge clk);
        hprp_i = 1'b0; vprp_i = 1'b0;
      end
    end
  end

  initial begin
    uop_t u;
    uop_in = UOP_NOP; idle = 1'b1; host_we = 1'b0; host_addr = '0; host_wdata = '0;
    {n_push_i, s_push_i, w_push_i, e_push_i} = '0;
    n_data_i = '0; s_data_i = '0; w_data_i = '0; e_data_i = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    host_write(0, 32'h3f800000);   // 1.0
    host_write(1, 32'h40000000);   // 2.0
    host_write(2, 32'h40400000);   // 3.0
    host_write(3, 32'h40800000);   // 4.0
    host_write(4, 32'h3f000000);   // 0.5
    for (int i = 0; i < 5; i++) begin
      @(negedge clk); host_addr = 8'(i); #1;
      chk("host readback", host_rdata, (i == 0) ? 32'h3f800000 : (i == 1) ? 32'h40000000 :
          (i == 2) ? 32'h40400000 : (i == 3) ? 32'h40800000 : 32'h3f000000);
    end
    push_in(1, 32'h40a00000);      // S-FIFO: 5.0
    push_in(0, 32'h3e800000);      // N-FIFO: 0.25
    push_in(3, 32'h40800000);      // E-FIFO: 4.0
    push_in(2, 32'h3fc00000);      // W-FIFO: 1.5
    @(negedge clk);
    idle = 1'b0;

    // I0 mulp: M[20] := S-FIFO * M[1] = 10
    u = op(8'd0, 8'd1, 1, 0); u.asrc = 1; u.vsrc = 1; u.wb.mem_w = 1; u.wb.waddr = 8'd20;
    issue(u);
    // I1 mulm: -(M[2]*M[3]) = -12 to the N and S neighbours
    u = op(8'd2, 8'd3, 0, 0); u.wb.nffw = 1; u.wb.sffw = 1;
    issue(u);
    // I2: N-FIFO * E-FIFO = 1.0, start of an accumulation
    u = op(8'd0, 8'd0, 1, 0); u.asrc = 1; u.vsrc = 0; u.bsrc = 1; u.hsrc = 1;
    issue(u);
    issue(UOP_NOP);
    issue(UOP_NOP);
    // I5 accp: M[21] := 1.0 + M[4] * W-FIFO = 1.75, also to W/E neighbours
    u = op(8'd4, 8'd0, 1, 1); u.bsrc = 1; u.hsrc = 0;
    u.wb.mem_w = 1; u.wb.waddr = 8'd21; u.wb.wffw = 1; u.wb.effw = 1;
    issue(u);
    repeat (6) issue(UOP_NOP);   // let I1 reach write-back before the stall
    // I6: M[0]*M[3] = 4, chain start
    issue(op(8'd0, 8'd3, 1, 0));
    // I7: nop that waits for the h-active register (stalls)
    u = UOP_NOP; u.hdep = 1; u.hchg = 1;
    issue(u);
    issue(UOP_NOP);
    // I9: M[22] := 4 - M[1]*M[2] = -2
    u = op(8'd1, 8'd2, 0, 1); u.wb.mem_w = 1; u.wb.waddr = 8'd22;
    issue(u);
    // I10: waits for the v-active register (stalls)
    u = UOP_NOP; u.vdep = 1; u.vchg = 1;
    issue(u);
    // I11: h-active is now set: no stall
    u = UOP_NOP; u.hdep = 1;
    issue(u);
    repeat (10) issue(UOP_NOP);

    // latency: I1 issued at issue_cyc[1], pushes seen in WB seven cycles on
    checks++;
    if (push_ns_t - issue_t[1] != 7 * 10) begin
      failures++;
      $display("mulm push at %0t, issued %0t", push_ns_t, issue_t[1]);
    end
    chk("mulm result to N/S", push_ns_val, 32'hc1400000);
    chk("accp result to W/E", push_we_val, 32'h3fe00000);
    checks++;
    if (nsn != 1 || wen != 1) begin failures++; $display("push counts %0d %0d", nsn, wen); end
    checks++;
    if (hstalls != 1 || vstalls != 1 || stall_cycles != 10) begin
      failures++;
      $display("stalls h=%0d v=%0d cycles=%0d (want 1, 1, 10)", hstalls, vstalls, stall_cycles);
    end
    checks++;
    if (fifo_err) begin failures++; $display("FIFO error flagged"); end

    @(negedge clk);
    idle = 1'b1;
    host_addr = 8'd20; #1; chk("M[20] mulp", host_rdata, 32'h41200000);
    host_addr = 8'd21; #1; chk("M[21] accp", host_rdata, 32'h3fe00000);
    host_addr = 8'd22; #1; chk("M[22] accp across stall", host_rdata, 32'hc0000000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
