// tb_upmc_service_unit: self-checking test of the service unit through its
// VCI target port, with one FIFO of each kind (slave in, slave out, master
// in, master out) and three configuration and two status registers. A bus
// functional initiator issues single-word reads and writes. Checked: the
// address decode of FIFO windows, configuration and status registers and
// the error responses (unmapped region, FIFO or register index past the
// last, write to a status register); data through both slave FIFOs; the
// master FIFOs' DMA on their own initiator ports; the per-FIFO interrupt
// lines; the response timing (rspval the cycle after cmdack, one access
// per cycle with rspack held high) and the back-pressure rule (no cmdack
// while a response waits for rspack).
module tb_upmc_service_unit;
  import cosy_pkg::*;
  localparam int unsigned WIDTH = 32;
  localparam int unsigned DEPTH = 8;
  localparam int unsigned CW    = $clog2(DEPTH + 1);
  localparam int unsigned NF    = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  vci_req_t         s_req;
  logic             s_cmdack, s_rspack;
  vci_rsp_t         s_rsp;
  logic             cp_push [NF], cp_pop[NF], vu_req_pulse[NF];
  logic [WIDTH-1:0] cp_wdata[NF], cp_rdata[NF];
  logic [CW-1:0]    cp_count[NF], cp_free[NF];
  logic [LEN_W-1:0] vu_last_len[NF], vu_remaining[NF];
  logic [NF-1:0]    irq;
  logic [31:0]      cfg [3];
  logic [31:0]      stat[2];
  vci_req_t         m_req [2];
  logic             m_cmdack[2], m_rspack[2];
  vci_rsp_t         m_rsp [2];

  upmc_service_unit #(
    .WIDTH(WIDTH), .DEPTH(DEPTH), .N_SIN(1), .N_SOUT(1), .N_MIN(1), .N_MOUT(1),
    .N_CFG(3), .N_STAT(2)
  ) dut (.*);

  vci_mem_model #(.AW_W(10), .MAX_WAIT(1)) u_mem_in (
    .clk, .rst_n, .req(m_req[0]), .cmdack(m_cmdack[0]), .rsp(m_rsp[0]), .rspack(m_rspack[0])
  );
  vci_mem_model #(.AW_W(10), .MAX_WAIT(1)) u_mem_out (
    .clk, .rst_n, .req(m_req[1]), .cmdack(m_cmdack[1]), .rsp(m_rsp[1]), .rspack(m_rspack[1])
  );

  function automatic logic [31:0] fa(int f, logic [3:0] off);
    return 32'h1000_0000 | 32'(f * 64) | 32'(off) << 2;
  endfunction

  // one access; returns data and error, and the cycles from command to response
  task automatic bus(vci_cmd_e c, logic [31:0] a, logic [31:0] wd,
                     output logic [31:0] d, output logic e);
    int t;
    @(negedge clk);
    s_req = '0; s_req.cmdval = 1; s_req.cmd = c; s_req.address = a;
    s_req.wdata = wd; s_req.be = 4'hF; s_req.eop = 1;
    @(posedge clk);
    while (!s_cmdack) @(posedge clk);
    #1; s_req = '0;
    t = 1;
    while (!s_rsp.rspval) begin @(posedge clk); #1; t++; end
    check(t == 1, "response the cycle after acceptance");
    d = s_rsp.rdata; e = s_rsp.rerror;
  endtask

  logic [31:0] d; logic e;
  initial begin
    s_req = '0; s_rspack = 1;
    for (int k = 0; k < NF; k++) begin
      cp_push[k] = 0; cp_pop[k] = 0; vu_req_pulse[k] = 0; cp_wdata[k] = '0;
      vu_last_len[k] = LEN_W'(k); vu_remaining[k] = '0;
    end
    stat[0] = 32'h5151_0000; stat[1] = 32'h5151_0001;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // configuration and status registers
    bus(VCI_WRITE, 32'h800, 32'hCAFE_0000, d, e); check(!e, "cfg0 write");
    bus(VCI_WRITE, 32'h808, 32'hCAFE_0002, d, e); check(!e, "cfg2 write");
    check(cfg[0] == 32'hCAFE_0000 && cfg[2] == 32'hCAFE_0002 && cfg[1] == 0, "cfg outputs");
    bus(VCI_READ, 32'h808, 0, d, e);  check(!e && d == 32'hCAFE_0002, "cfg2 read back");
    bus(VCI_READ, 32'h80C, 0, d, e);  check(e, "cfg index past the last errors");
    bus(VCI_READ, 32'hC04, 0, d, e);  check(!e && d == 32'h5151_0001, "stat1 read");
    bus(VCI_WRITE, 32'hC00, 1, d, e); check(e, "status write errors");
    bus(VCI_READ, 32'h400, 0, d, e);  check(e, "unmapped region errors");
    bus(VCI_READ, fa(4, FR_STATE), 0, d, e); check(e, "FIFO index past the last errors");
    bus(VCI_READ, fa(2, FR_REQLEN), 0, d, e); check(!e && d[15:0] == 2, "FIFO 2 window decoded");

    // slave input FIFO 0 with its interrupt line
    bus(VCI_WRITE, fa(0, FR_THRESH), 8, d, e);
    bus(VCI_WRITE, fa(0, FR_CTRL), 1, d, e);
    #1 check(irq == 4'b0001, "irq line 0 only: input FIFO has 8 free");
    for (int i = 0; i < 3; i++) bus(VCI_WRITE, fa(0, FR_DATA), 32'h700 + i, d, e);
    check(irq == 4'b0000, "irq line 0 drops below threshold");
    check(cp_count[0] == 3, "three items for the coprocessor");
    for (int i = 0; i < 3; i++) begin
      @(negedge clk); check(cp_rdata[0] == 32'h700 + i, "coprocessor reads bus data");
      cp_pop[0] = 1; @(negedge clk); cp_pop[0] = 0;
    end

    // slave output FIFO 1
    for (int i = 0; i < 5; i++) begin
      @(negedge clk); cp_push[1] = 1; cp_wdata[1] = 32'h900 + i; @(negedge clk); cp_push[1] = 0;
    end
    bus(VCI_READ, fa(1, FR_STATE), 0, d, e); check(d == DEPTH - 5, "output FIFO state");
    for (int i = 0; i < 5; i++) begin
      bus(VCI_READ, fa(1, FR_DATA), 0, d, e); check(!e && d == 32'h900 + i, "bus reads coprocessor data");
    end
    bus(VCI_READ, fa(1, FR_DATA), 0, d, e); check(e, "read of empty output FIFO errors");

    // back-to-back: with rspack high one access is accepted per cycle
    @(negedge clk);
    s_req = '0; s_req.cmdval = 1; s_req.cmd = VCI_READ; s_req.address = 32'h800;
    for (int i = 0; i < 4; i++) begin
      @(posedge clk); check(s_cmdack, "one access per cycle");
    end
    // back-pressure: response not taken, next command not acknowledged
    @(negedge clk); s_rspack = 0;
    @(posedge clk); @(posedge clk);
    #1 check(!s_cmdack && s_rsp.rspval, "no cmdack while a response waits");
    @(negedge clk); s_rspack = 1;
    #1 check(s_cmdack, "cmdack returns with rspack");
    @(negedge clk); s_req = '0;
    @(negedge clk);

    // master input FIFO 2: DMA reads memory words 0x40.. into the FIFO
    bus(VCI_WRITE, fa(2, FR_BASE), 32'h100, d, e);
    bus(VCI_WRITE, fa(2, FR_STRIDE), 4, d, e);
    bus(VCI_WRITE, fa(2, FR_CTRL), 4, d, e);
    // master output FIFO 3: DMA writes coprocessor items to 0x200 (fixed)
    bus(VCI_WRITE, fa(3, FR_BASE), 32'h200, d, e);
    bus(VCI_WRITE, fa(3, FR_STRIDE), 0, d, e);
    bus(VCI_WRITE, fa(3, FR_CTRL), 4, d, e);
    @(negedge clk); cp_push[3] = 1; cp_wdata[3] = 32'hABCD; @(negedge clk); cp_push[3] = 0;
    repeat (60) @(posedge clk);
    check(cp_count[2] == DEPTH, "master input FIFO filled by DMA");
    check(u_mem_in.n_reads == DEPTH, "DMA read once per slot");
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); check(cp_rdata[2] == 32'hC0DE_0000 + 32'h40 + i, "DMA read data in order");
      cp_pop[2] = 1; @(negedge clk); cp_pop[2] = 0;
    end
    check(u_mem_out.n_writes == 1 && u_mem_out.mem[32'h200 >> 2] == 32'hABCD, "DMA write lands at fixed address");
    check(u_mem_in.n_writes == 0 && u_mem_out.n_reads == 0, "master ports not swapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
