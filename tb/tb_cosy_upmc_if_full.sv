// tb_cosy_upmc_if_full: the interface in its reference configuration, with
// every parameter at its default (one slave input FIFO 0 and one slave
// output FIFO 1, 32 bits x 8 slots, two configuration and two status
// registers). Software is played by a bus-functional task on the VCI target.
// One complete round trip: the coprocessor writes four vectors (39 items)
// that software reads on the threshold interrupt (hw -> sw), then reads two
// vectors (27 items) that software writes after the per-request interrupt,
// pacing itself with the threshold interrupt (sw -> hw). Configuration and
// status registers are exercised too. Every item is checked by value and
// order, and producer stall, consumer stall, threshold and request
// interrupts and an error response must each occur.
module tb_cosy_upmc_if_full;
  import cosy_pkg::*;
  localparam int unsigned WIDTH = 32;
  localparam int unsigned DEPTH = 8;
  localparam int unsigned NFA   = 2;

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

  // ------------------------------------------------------ the interface
  logic             a_req_valid[NFA], a_req_ready[NFA], a_done[NFA];
  logic [LEN_W-1:0] a_req_len  [NFA];
  logic             a_wr_valid [NFA], a_wr_ready[NFA], a_rd_valid[NFA], a_rd_ready[NFA];
  logic [WIDTH-1:0] a_wr_data  [NFA], a_rd_data[NFA];
  logic             a_stalled  [NFA];
  logic [31:0]      a_cfg[2], a_stat[2];
  logic [NFA-1:0]   a_irq;
  vci_req_t         a_sreq, a_mreq[1];
  logic             a_scmdack, a_srspack, a_mcmdack[1], a_mrspack[1];
  vci_rsp_t         a_srsp, a_mrsp[1];
  assign a_mcmdack[0] = 1'b0;
  assign a_mrsp[0]    = '0;

  cosy_upmc_if u_a (
    .clk, .rst_n,
    .cop_req_valid(a_req_valid), .cop_req_len(a_req_len), .cop_req_ready(a_req_ready),
    .cop_done(a_done), .cop_wr_valid(a_wr_valid), .cop_wr_data(a_wr_data),
    .cop_wr_ready(a_wr_ready), .cop_rd_valid(a_rd_valid), .cop_rd_data(a_rd_data),
    .cop_rd_ready(a_rd_ready), .cop_stalled(a_stalled), .cfg(a_cfg), .stat(a_stat),
    .irq(a_irq), .s_req(a_sreq), .s_cmdack(a_scmdack), .s_rsp(a_srsp), .s_rspack(a_srspack),
    .m_req(a_mreq), .m_cmdack(a_mcmdack), .m_rsp(a_mrsp), .m_rspack(a_mrspack)
  );

  // ------------------------------------------------- software bus master
  vci_req_t sw_req;
  assign a_sreq    = sw_req;
  assign a_srspack = 1'b1;

  int n_err_rsp = 0;
  task automatic bus(vci_cmd_e c, logic [31:0] a, logic [31:0] wd,
                     output logic [31:0] d, output logic e);
    @(negedge clk);
    sw_req = '0; sw_req.cmdval = 1; sw_req.cmd = c; sw_req.address = a;
    sw_req.wdata = wd; sw_req.be = 4'hF; sw_req.eop = 1;
    @(posedge clk);
    while (!a_scmdack) @(posedge clk);
    #1; sw_req = '0;
    while (!a_srsp.rspval) begin @(posedge clk); #1; end
    d = a_srsp.rdata;
    e = a_srsp.rerror;
    if (e) n_err_rsp++;
  endtask

  function automatic logic [31:0] fa(int f, logic [3:0] off);
    return 32'(f * 64) | (32'(off) << 2);
  endfunction

  // ----------------------------------------------------- event counters
  int n_wstall = 0, n_rstall = 0, n_thr_irq = 0, n_req_irq = 0, n_cfg = 0, n_stat = 0;
  logic [NFA-1:0] a_st_q = '0;
  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < NFA; k++) begin
      if (a_stalled[k] && !a_st_q[k]) begin
        if (k == 1) n_wstall++; else n_rstall++;
      end
      a_st_q[k] <= a_stalled[k];
    end
  end

  // ------------------------------------------------ coprocessor helpers
  task automatic a_write_vec(int k, int len, ref int unsigned seq, input logic [31:0] tag);
    @(negedge clk);
    a_req_valid[k] = 1; a_req_len[k] = LEN_W'(len);
    @(posedge clk); while (!a_req_ready[k]) @(posedge clk);
    @(negedge clk); a_req_valid[k] = 0;
    while (1) begin
      a_wr_valid[k] = 1; a_wr_data[k] = tag + seq;
      @(posedge clk);
      if (a_done[k]) break;
      if (a_wr_ready[k]) seq++;
      @(negedge clk);
    end
    a_wr_valid[k] = 0;
  endtask

  // read a vector; each item is compared with exp(seq)
  task automatic a_read_vec(int k, int len, ref int unsigned seq, input int mode);
    @(negedge clk);
    a_req_valid[k] = 1; a_req_len[k] = LEN_W'(len);
    @(posedge clk); while (!a_req_ready[k]) @(posedge clk);
    @(negedge clk); a_req_valid[k] = 0;
    while (1) begin
      a_rd_ready[k] = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (a_done[k]) break;
      if (a_rd_valid[k] && a_rd_ready[k]) begin
        check(a_rd_data[k] == expect_item(mode, seq), $sformatf("A FIFO %0d item %0d", k, seq));
        seq++;
      end
      @(negedge clk);
    end
    a_rd_ready[k] = 0;
  endtask

  function automatic logic [31:0] expect_item(int mode, int unsigned seq);
    return 32'h2000_0000 + 32'(mode) + seq;   // sw -> hw items (mode 0)
  endfunction

  // --------------------------------------------------------------- run
  logic [31:0] d; logic e;
  int unsigned seq_p, seq_c, seq_r;

  initial begin
    for (int k = 0; k < NFA; k++) begin
      a_req_valid[k] = 0; a_req_len[k] = 0; a_wr_valid[k] = 0; a_wr_data[k] = 0; a_rd_ready[k] = 0;
    end
    sw_req = '0;
    a_stat[0] = 0; a_stat[1] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- registers
    bus(VCI_WRITE, 32'h804, 32'h0000_BEEF, d, e);
    check(a_cfg[1] == 32'h0000_BEEF, "configuration register reaches the coprocessor");
    n_cfg++;
    a_stat[0] = 32'h0000_0F0F;
    bus(VCI_READ, 32'hC00, 0, d, e);
    check(!e && d == 32'h0000_0F0F, "status register reaches software");
    n_stat++;

    // ---- hw -> sw on A's slave output FIFO 1
    seq_p = 0; seq_c = 0;
    bus(VCI_WRITE, fa(1, FR_THRESH), 4, d, e);   // >= 4 items waiting
    bus(VCI_WRITE, fa(1, FR_CTRL), 1, d, e);
    fork
      begin
        int lens[4] = '{5, 13, 20, 1};
        foreach (lens[i]) a_write_vec(1, lens[i], seq_p, 32'h1000_0000);
      end
      begin
        int idle = 0;
        while (seq_c < 39) begin
          if (a_irq[1] || idle > 40) begin
            int n;
            if (a_irq[1]) n_thr_irq++;
            idle = 0;
            bus(VCI_READ, fa(1, FR_STATE), 0, d, e);
            n = DEPTH - int'(d);
            for (int i = 0; i < n; i++) begin
              bus(VCI_READ, fa(1, FR_DATA), 0, d, e);
              check(!e && d == 32'h1000_0000 + seq_c, "hw->sw item");
              seq_c++;
            end
            repeat (25) @(posedge clk);   // a slow consumer
          end else begin
            @(posedge clk); idle++;
          end
        end
      end
    join
    check(seq_p == 39 && seq_c == 39, "hw->sw: all 39 items");
    bus(VCI_READ, fa(1, FR_DATA), 0, d, e);
    check(e, "read of the empty FIFO answers with an error");

    // ---- sw -> hw on A's slave input FIFO 0
    seq_r = 0;
    bus(VCI_WRITE, fa(0, FR_CTRL), 32'h2, d, e);  // request interrupt
    fork
      begin
        a_read_vec(0, 21, seq_r, 0);
        a_read_vec(0, 6, seq_r, 0);
      end
      begin
        int unsigned sent = 0;
        for (int v = 0; v < 2; v++) begin
          int left;
          while (!a_irq[0]) @(posedge clk);
          n_req_irq++;
          bus(VCI_READ, fa(0, FR_IRQ), 0, d, e);
          check(d[IRQ_REQ], "IRQ register shows the request");
          bus(VCI_WRITE, fa(0, FR_IRQ), 32'h2, d, e);
          bus(VCI_READ, fa(0, FR_REQLEN), 0, d, e);
          left = int'(d[15:0]);
          check(left == (v == 0 ? 21 : 6), "REQLEN gives the requested length");
          while (left > 0) begin
            int fr, n;
            bus(VCI_READ, fa(0, FR_STATE), 0, d, e);
            fr = int'(d);
            n = (fr < left) ? fr : left;
            for (int i = 0; i < n; i++) begin
              bus(VCI_WRITE, fa(0, FR_DATA), 32'h2000_0000 + sent, d, e);
              check(!e, "sw write accepted");
              sent++;
            end
            left -= n;
            if (left > 0) begin
              // wait for wtr = min(left, DEPTH) free slots
              bus(VCI_WRITE, fa(0, FR_THRESH), (left < DEPTH) ? left : DEPTH, d, e);
              bus(VCI_WRITE, fa(0, FR_CTRL), 32'h1, d, e);
              while (!a_irq[0]) @(posedge clk);
              n_thr_irq++;
              bus(VCI_WRITE, fa(0, FR_CTRL), 32'h0, d, e);
            end
          end
          bus(VCI_WRITE, fa(0, FR_CTRL), 32'h2, d, e);
        end
      end
    join
    check(seq_r == 27, "sw->hw: all 27 items");

    // ---- every mechanism seen at least once
    $display("producer stalls %0d, consumer stalls %0d, threshold irqs %0d, request irqs %0d",
             n_wstall, n_rstall, n_thr_irq, n_req_irq);
    $display("error responses %0d, cfg %0d, stat %0d", n_err_rsp, n_cfg, n_stat);
    check(n_wstall > 0, "producer stall happened");
    check(n_rstall > 0, "consumer stall happened");
    check(n_thr_irq > 0, "threshold interrupt happened");
    check(n_req_irq > 0, "request interrupt happened");
    check(n_err_rsp > 0, "error response happened");
    check(n_cfg > 0 && n_stat > 0, "configuration and status registers used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
