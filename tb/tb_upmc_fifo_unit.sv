// tb_upmc_fifo_unit: self-checking test of the FIFO unit in three kinds:
// a slave input FIFO, a slave output FIFO and a master output FIFO whose DMA
// engine writes to a behavioural VCI memory. Register accesses are driven
// directly on the register port. Checked: DATA pushes and pops with the
// error rules, STATE as the number of free slots, the threshold interrupt
// on both sides of its threshold for input and output FIFOs, the sticky
// request interrupt and its clear, REQLEN, the master-only registers (and
// the error they give on a slave FIFO), the DMA writes landing at
// base + stride * i with the ring wrapping after WRAP items, and the counted
// DMA mode (COUNT transfers, then the DONE flag and interrupt).
module tb_upmc_fifo_unit;
  import cosy_pkg::*;
  localparam int unsigned WIDTH = 32;
  localparam int unsigned DEPTH = 8;
  localparam int unsigned CW    = $clog2(DEPTH + 1);

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

  // three units: 0 slave in, 1 slave out, 2 master out
  reg_req_t         rq   [3];
  reg_rsp_t         rs   [3];
  logic             cpush[3], cpop[3], irq[3], reqp[3];
  logic [WIDTH-1:0] cwd  [3], crd[3];
  logic [CW-1:0]    ccnt [3], cfree[3];
  logic [LEN_W-1:0] llen [3], lrem[3];
  vci_req_t         mreq [3];
  logic             mack [3], mrack[3];
  vci_rsp_t         mrsp [3];

  upmc_fifo_unit #(.WIDTH(WIDTH), .DEPTH(DEPTH), .KIND(FK_SLAVE_IN)) u_si (
    .clk, .rst_n, .reg_req(rq[0]), .reg_rsp(rs[0]),
    .cp_push(cpush[0]), .cp_wdata(cwd[0]), .cp_pop(cpop[0]), .cp_rdata(crd[0]),
    .cp_count(ccnt[0]), .cp_free(cfree[0]),
    .vu_req_pulse(reqp[0]), .vu_last_len(llen[0]), .vu_remaining(lrem[0]),
    .irq(irq[0]), .m_req(mreq[0]), .m_cmdack(1'b0), .m_rsp('0), .m_rspack(mrack[0])
  );
  upmc_fifo_unit #(.WIDTH(WIDTH), .DEPTH(DEPTH), .KIND(FK_SLAVE_OUT)) u_so (
    .clk, .rst_n, .reg_req(rq[1]), .reg_rsp(rs[1]),
    .cp_push(cpush[1]), .cp_wdata(cwd[1]), .cp_pop(cpop[1]), .cp_rdata(crd[1]),
    .cp_count(ccnt[1]), .cp_free(cfree[1]),
    .vu_req_pulse(reqp[1]), .vu_last_len(llen[1]), .vu_remaining(lrem[1]),
    .irq(irq[1]), .m_req(mreq[1]), .m_cmdack(1'b0), .m_rsp('0), .m_rspack(mrack[1])
  );
  upmc_fifo_unit #(.WIDTH(WIDTH), .DEPTH(DEPTH), .KIND(FK_MASTER_OUT)) u_mo (
    .clk, .rst_n, .reg_req(rq[2]), .reg_rsp(rs[2]),
    .cp_push(cpush[2]), .cp_wdata(cwd[2]), .cp_pop(cpop[2]), .cp_rdata(crd[2]),
    .cp_count(ccnt[2]), .cp_free(cfree[2]),
    .vu_req_pulse(reqp[2]), .vu_last_len(llen[2]), .vu_remaining(lrem[2]),
    .irq(irq[2]), .m_req(mreq[2]), .m_cmdack(mack[2]), .m_rsp(mrsp[2]), .m_rspack(mrack[2])
  );
  vci_mem_model #(.AW_W(10), .MAX_WAIT(2)) u_mem (
    .clk, .rst_n, .req(mreq[2]), .cmdack(mack[2]), .rsp(mrsp[2]), .rspack(mrack[2])
  );

  task automatic idle_all();
    for (int u = 0; u < 3; u++) begin
      rq[u] = '0; cpush[u] = 0; cpop[u] = 0; cwd[u] = '0; reqp[u] = 0;
    end
  endtask

  task automatic rd(int u, logic [3:0] off, output logic [31:0] d, output logic e);
    @(negedge clk);
    rq[u] = '0; rq[u].re = 1'b1; rq[u].off = off;
    #1; d = rs[u].rdata; e = rs[u].err;
    @(posedge clk); #1;
    rq[u] = '0;
  endtask

  task automatic wr(int u, logic [3:0] off, logic [31:0] v, output logic e);
    @(negedge clk);
    rq[u] = '0; rq[u].we = 1'b1; rq[u].off = off; rq[u].wdata = v;
    #1; e = rs[u].err;
    @(posedge clk); #1;
    rq[u] = '0;
  endtask

  task automatic cp_push1(int u, logic [31:0] v);
    @(negedge clk); cpush[u] = 1; cwd[u] = v;
    @(posedge clk); #1; cpush[u] = 0;
  endtask
  task automatic cp_pop1(int u, output logic [31:0] v);
    @(negedge clk); v = crd[u]; cpop[u] = 1;
    @(posedge clk); #1; cpop[u] = 0;
  endtask

  initial begin
    logic [31:0] d; logic e;
    idle_all();
    llen[0] = 16'd12; lrem[0] = 16'd7; llen[1] = 0; lrem[1] = 0; llen[2] = 0; lrem[2] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ---------------- slave input FIFO
    rd(0, FR_STATE, d, e); check(d == DEPTH && !e, "SI state after reset = DEPTH");
    wr(0, FR_THRESH, 5, e); check(!e, "SI threshold write");
    wr(0, FR_CTRL, 32'h1, e);
    check(irq[0], "SI irq: free 8 >= thr 5");
    for (int i = 0; i < DEPTH; i++) begin
      wr(0, FR_DATA, 32'hA0 + i, e); check(!e, "SI push accepted");
      rd(0, FR_STATE, d, e); check(d == DEPTH - 1 - i, "SI state counts down");
      check(irq[0] == (DEPTH - 1 - i >= 5), "SI threshold irq level");
    end
    wr(0, FR_DATA, 32'hFF, e); check(e, "SI push into full FIFO errors");
    rd(0, FR_DATA, d, e);      check(e, "SI DATA read errors");
    rd(0, FR_BASE, d, e);      check(e, "slave FIFO has no BASE register");
    wr(0, FR_STATE, 1, e);     check(e, "STATE is read only");
    for (int i = 0; i < DEPTH; i++) begin
      cp_pop1(0, d); check(d == 32'hA0 + i, "SI coprocessor pops in order");
    end
    check(ccnt[0] == 0, "SI empty after pops");
    // request interrupt, REQLEN
    rd(0, FR_REQLEN, d, e); check(d == {16'd7, 16'd12}, "REQLEN shows remaining and length");
    wr(0, FR_CTRL, 32'h2, e);
    check(!irq[0], "no irq before a request");
    @(negedge clk); reqp[0] = 1; @(posedge clk); #1; reqp[0] = 0;
    #1 check(irq[0], "request irq raised");
    rd(0, FR_IRQ, d, e); check(d[IRQ_REQ], "IRQ register shows request");
    wr(0, FR_IRQ, 32'h2, e);
    #1 check(!irq[0], "request irq cleared by write 1");
    wr(0, FR_CTRL, 32'h0, e);
    @(negedge clk); reqp[0] = 1; @(posedge clk); #1; reqp[0] = 0;
    #1 check(!irq[0], "request irq masked");

    // ---------------- slave output FIFO
    wr(1, FR_THRESH, 3, e);
    wr(1, FR_CTRL, 32'h1, e);
    rd(1, FR_DATA, d, e); check(e, "SO read of empty FIFO errors");
    for (int i = 0; i < DEPTH; i++) begin
      check(irq[1] == (DEPTH - i <= 3), "SO threshold irq level");
      cp_push1(1, 32'hB0 + i);
    end
    wr(1, FR_DATA, 1, e); check(e, "SO DATA write errors");
    for (int i = 0; i < DEPTH; i++) begin
      rd(1, FR_DATA, d, e); check(!e && d == 32'hB0 + i, "SO bus pops in order");
    end
    rd(1, FR_STATE, d, e); check(d == DEPTH, "SO empty again");

    // ---------------- master output FIFO
    wr(2, FR_BASE, 32'h100, e);   check(!e, "BASE write");
    wr(2, FR_STRIDE, 32'h8, e);
    wr(2, FR_WRAP, 32'd5, e);
    rd(2, FR_BASE, d, e);   check(d == 32'h100, "BASE read back");
    rd(2, FR_STRIDE, d, e); check(d == 32'h8, "STRIDE read back");
    rd(2, FR_WRAP, d, e);   check(d == 32'd5, "WRAP read back");
    rd(2, FR_DATA, d, e);   check(e, "master FIFO has no DATA register");
    for (int i = 0; i < 4; i++) cp_push1(2, 32'hD0 + i);
    repeat (10) @(posedge clk);
    check(u_mem.n_writes == 0, "no DMA while disabled");
    wr(2, FR_CTRL, 32'h4, e);
    for (int i = 4; i < 7; i++) cp_push1(2, 32'hD0 + i);
    repeat (60) @(posedge clk);
    check(u_mem.n_writes == 7, "seven DMA writes");
    // items 0..4 at 0x100 + 8*i, then the ring wraps: 5 -> 0x100, 6 -> 0x108
    for (int i = 2; i < 5; i++) check(u_mem.mem[(32'h100 + 8 * i) >> 2] == 32'hD0 + i, "DMA item address");
    check(u_mem.mem[32'h100 >> 2] == 32'hD5, "ring wraps to base");
    check(u_mem.mem[32'h108 >> 2] == 32'hD6, "ring continues after wrap");
    rd(2, FR_ADDR, d, e); check(d == 32'h110, "ADDR shows next address");
    rd(2, FR_STATE, d, e); check(d == DEPTH, "master FIFO drained");
    // counted mode: only COUNT transfers, then DONE and its interrupt
    wr(2, FR_COUNT, 3, e); check(!e, "COUNT write");
    wr(2, FR_CTRL, 32'h1C, e);
    for (int i = 7; i < 12; i++) cp_push1(2, 32'hD0 + i);
    repeat (60) @(posedge clk);
    check(u_mem.n_writes == 10, "counted mode stops after COUNT transfers");
    rd(2, FR_COUNT, d, e); check(d == 0, "COUNT runs down to zero");
    rd(2, FR_STATE, d, e); check(d == DEPTH - 2, "two items left in FIFO");
    check(irq[2], "DONE interrupt");
    rd(2, FR_IRQ, d, e); check(d[IRQ_DONE], "IRQ register shows DONE");
    wr(2, FR_IRQ, 32'h8, e);
    #1 check(!irq[2], "DONE cleared by write 1");
    wr(2, FR_COUNT, 2, e);
    repeat (40) @(posedge clk);
    check(u_mem.n_writes == 12, "next chunk of COUNT transfers");
    check(u_mem.mem[(32'h100 + 8 * 1) >> 2] == 32'hD0 + 11, "last item at the ring position");
    check(irq[2], "DONE again after the second chunk");
    rd(0, FR_COUNT, d, e); check(e, "slave FIFO has no COUNT register");
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
