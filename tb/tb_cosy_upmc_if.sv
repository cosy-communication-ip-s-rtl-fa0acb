// tb_cosy_upmc_if: end-to-end test of the communication interface in the
// channel schemes it serves. Two interfaces are built: A with one FIFO of
// each kind (0 slave in, 1 slave out, 2 master in, 3 master out) and C in
// the reference configuration (0 slave in, 1 slave out). Software is played
// by bus-functional tasks on the VCI target ports; memory by a behavioural
// VCI memory.
//
//   hw -> sw   A's coprocessor writes vectors into FIFO 1; software reads
//              them when the threshold interrupt says enough items wait
//   sw -> hw   A's coprocessor reads vectors from FIFO 0; the per-request
//              interrupt tells software the length, software writes the
//              items as room appears, waiting on the threshold interrupt
//   sw -> hw through shared memory  software writes items into a 128-word
//              ring in memory and hands them in chunks to A's master input
//              FIFO 2 (counted DMA, completion interrupt); the address
//              generator wraps; the coprocessor reads 160 items
//   hw -> hw   A's master output FIFO 3 writes into C's slave input FIFO
//              data register; C's coprocessor reads slowly, so C refuses
//              words when full and A's DMA retries them
//   registers  configuration written by software reaches the coprocessor,
//              status written by the coprocessor reaches software
// Every item is checked by value and order. Each mechanism (producer stall,
// consumer stall, threshold interrupt, request interrupt, ring wrap, DMA
// chunk completion, DMA retry, error response, configuration and status
// access) is counted
// and must occur at least once.
module tb_cosy_upmc_if;
  import cosy_pkg::*;
  localparam int unsigned WIDTH = 32;
  localparam int unsigned DEPTH = 8;
  localparam int unsigned NFA   = 4;
  localparam int unsigned NFC   = 2;

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

  // ---------------------------------------------------------- interface A
  logic             a_req_valid[NFA], a_req_ready[NFA], a_done[NFA];
  logic [LEN_W-1:0] a_req_len  [NFA];
  logic             a_wr_valid [NFA], a_wr_ready[NFA], a_rd_valid[NFA], a_rd_ready[NFA];
  logic [WIDTH-1:0] a_wr_data  [NFA], a_rd_data[NFA];
  logic             a_stalled  [NFA];
  logic [31:0]      a_cfg[2], a_stat[2];
  logic [NFA-1:0]   a_irq;
  vci_req_t         a_sreq, a_mreq[2];
  logic             a_scmdack, a_srspack, a_mcmdack[2], a_mrspack[2];
  vci_rsp_t         a_srsp, a_mrsp[2];

  cosy_upmc_if #(.N_MIN(1), .N_MOUT(1)) u_a (
    .clk, .rst_n,
    .cop_req_valid(a_req_valid), .cop_req_len(a_req_len), .cop_req_ready(a_req_ready),
    .cop_done(a_done), .cop_wr_valid(a_wr_valid), .cop_wr_data(a_wr_data),
    .cop_wr_ready(a_wr_ready), .cop_rd_valid(a_rd_valid), .cop_rd_data(a_rd_data),
    .cop_rd_ready(a_rd_ready), .cop_stalled(a_stalled), .cfg(a_cfg), .stat(a_stat),
    .irq(a_irq), .s_req(a_sreq), .s_cmdack(a_scmdack), .s_rsp(a_srsp), .s_rspack(a_srspack),
    .m_req(a_mreq), .m_cmdack(a_mcmdack), .m_rsp(a_mrsp), .m_rspack(a_mrspack)
  );

  vci_mem_model #(.AW_W(10), .MAX_WAIT(1)) u_mem (
    .clk, .rst_n, .req(a_mreq[0]), .cmdack(a_mcmdack[0]), .rsp(a_mrsp[0]), .rspack(a_mrspack[0])
  );

  // ---------------------------------------------------------- interface C
  logic             c_req_valid[NFC], c_req_ready[NFC], c_done[NFC];
  logic [LEN_W-1:0] c_req_len  [NFC];
  logic             c_wr_valid [NFC], c_wr_ready[NFC], c_rd_valid[NFC], c_rd_ready[NFC];
  logic [WIDTH-1:0] c_wr_data  [NFC], c_rd_data[NFC];
  logic             c_stalled  [NFC];
  logic [31:0]      c_cfg[2], c_stat[2];
  logic [NFC-1:0]   c_irq;
  vci_req_t         c_sreq, c_mreq[1];
  logic             c_scmdack, c_srspack, c_mcmdack[1], c_mrspack[1];
  vci_rsp_t         c_srsp, c_mrsp[1];

  cosy_upmc_if u_c (
    .clk, .rst_n,
    .cop_req_valid(c_req_valid), .cop_req_len(c_req_len), .cop_req_ready(c_req_ready),
    .cop_done(c_done), .cop_wr_valid(c_wr_valid), .cop_wr_data(c_wr_data),
    .cop_wr_ready(c_wr_ready), .cop_rd_valid(c_rd_valid), .cop_rd_data(c_rd_data),
    .cop_rd_ready(c_rd_ready), .cop_stalled(c_stalled), .cfg(c_cfg), .stat(c_stat),
    .irq(c_irq), .s_req(c_sreq), .s_cmdack(c_scmdack), .s_rsp(c_srsp), .s_rspack(c_srspack),
    .m_req(c_mreq), .m_cmdack(c_mcmdack), .m_rsp(c_mrsp), .m_rspack(c_mrspack)
  );
  assign c_mcmdack[0] = 1'b0;
  assign c_mrsp[0]    = '0;

  // ------------------------------------------- software bus masters
  // port 0: A's target; port 1: C's target, shared with A's DMA port 1
  vci_req_t sw_req[2];
  logic     sw_rspack[2];
  bit       c_owned_by_dma = 0;
  assign a_sreq    = sw_req[0];
  assign a_srspack = sw_rspack[0];
  assign c_sreq    = c_owned_by_dma ? a_mreq[1] : sw_req[1];
  assign c_srspack = c_owned_by_dma ? a_mrspack[1] : sw_rspack[1];
  assign a_mcmdack[1] = c_owned_by_dma && c_scmdack;
  assign a_mrsp[1]    = c_owned_by_dma ? c_srsp : '0;

  int n_err_rsp = 0;
  task automatic bus(int p, vci_cmd_e c, logic [31:0] a, logic [31:0] wd,
                     output logic [31:0] d, output logic e);
    @(negedge clk);
    sw_req[p] = '0; sw_req[p].cmdval = 1; sw_req[p].cmd = c; sw_req[p].address = a;
    sw_req[p].wdata = wd; sw_req[p].be = 4'hF; sw_req[p].eop = 1; sw_rspack[p] = 1;
    @(posedge clk);
    while (!(p == 0 ? a_scmdack : c_scmdack)) @(posedge clk);
    #1; sw_req[p] = '0;
    while (!(p == 0 ? a_srsp.rspval : c_srsp.rspval)) begin @(posedge clk); #1; end
    d = (p == 0) ? a_srsp.rdata : c_srsp.rdata;
    e = (p == 0) ? a_srsp.rerror : c_srsp.rerror;
    if (e) n_err_rsp++;
  endtask

  function automatic logic [31:0] fa(int f, logic [3:0] off);
    return 32'(f * 64) | (32'(off) << 2);
  endfunction

  // ----------------------------------------------------- event counters
  int n_wstall = 0, n_rstall = 0, n_thr_irq = 0, n_req_irq = 0;
  int n_wrap = 0, n_retry = 0, n_cfg = 0, n_stat = 0, n_done_irq = 0;
  logic [NFA-1:0] a_st_q = '0;
  logic [NFC-1:0] c_st_q = '0;
  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < NFA; k++) begin
      if (a_stalled[k] && !a_st_q[k]) begin
        if (k == 1 || k == 3) n_wstall++; else n_rstall++;
      end
      a_st_q[k] <= a_stalled[k];
    end
    for (int k = 0; k < NFC; k++) begin
      if (c_stalled[k] && !c_st_q[k]) n_rstall++;
      c_st_q[k] <= c_stalled[k];
    end
    if (c_owned_by_dma && a_mrsp[1].rspval && a_mrspack[1] && a_mrsp[1].rerror) n_retry++;
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

  localparam logic [31:0] RING_BASE = 32'h400;
  localparam int          RING_LEN  = 128;
  function automatic logic [31:0] expect_item(int mode, int unsigned seq);
    if (mode == 0) return 32'h2000_0000 + seq;   // sw -> hw items
    return 32'h4000_0000 + seq;                  // items through the memory ring
  endfunction

  // --------------------------------------------------------------- run
  logic [31:0] d; logic e;
  int unsigned seq_p, seq_c, seq_r, seq_h, seq_hc;

  initial begin
    for (int k = 0; k < NFA; k++) begin
      a_req_valid[k] = 0; a_req_len[k] = 0; a_wr_valid[k] = 0; a_wr_data[k] = 0; a_rd_ready[k] = 0;
    end
    for (int k = 0; k < NFC; k++) begin
      c_req_valid[k] = 0; c_req_len[k] = 0; c_wr_valid[k] = 0; c_wr_data[k] = 0; c_rd_ready[k] = 0;
    end
    sw_req[0] = '0; sw_req[1] = '0; sw_rspack[0] = 1; sw_rspack[1] = 1;
    a_stat[0] = 0; a_stat[1] = 0; c_stat[0] = 0; c_stat[1] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- registers
    bus(0, VCI_WRITE, 32'h804, 32'h0000_BEEF, d, e);
    check(a_cfg[1] == 32'h0000_BEEF, "configuration register reaches the coprocessor");
    n_cfg++;
    a_stat[0] = 32'h0000_0F0F;
    bus(0, VCI_READ, 32'hC00, 0, d, e);
    check(!e && d == 32'h0000_0F0F, "status register reaches software");
    n_stat++;

    // ---- hw -> sw on A's slave output FIFO 1
    seq_p = 0; seq_c = 0;
    bus(0, VCI_WRITE, fa(1, FR_THRESH), 4, d, e);   // >= 4 items waiting
    bus(0, VCI_WRITE, fa(1, FR_CTRL), 1, d, e);
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
            bus(0, VCI_READ, fa(1, FR_STATE), 0, d, e);
            n = DEPTH - int'(d);
            for (int i = 0; i < n; i++) begin
              bus(0, VCI_READ, fa(1, FR_DATA), 0, d, e);
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
    bus(0, VCI_READ, fa(1, FR_DATA), 0, d, e);
    check(e, "read of the empty FIFO answers with an error");

    // ---- sw -> hw on A's slave input FIFO 0
    seq_r = 0;
    bus(0, VCI_WRITE, fa(0, FR_CTRL), 32'h2, d, e);  // request interrupt
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
          bus(0, VCI_READ, fa(0, FR_IRQ), 0, d, e);
          check(d[IRQ_REQ], "IRQ register shows the request");
          bus(0, VCI_WRITE, fa(0, FR_IRQ), 32'h2, d, e);
          bus(0, VCI_READ, fa(0, FR_REQLEN), 0, d, e);
          left = int'(d[15:0]);
          check(left == (v == 0 ? 21 : 6), "REQLEN gives the requested length");
          while (left > 0) begin
            int fr, n;
            bus(0, VCI_READ, fa(0, FR_STATE), 0, d, e);
            fr = int'(d);
            n = (fr < left) ? fr : left;
            for (int i = 0; i < n; i++) begin
              bus(0, VCI_WRITE, fa(0, FR_DATA), 32'h2000_0000 + sent, d, e);
              check(!e, "sw write accepted");
              sent++;
            end
            left -= n;
            if (left > 0) begin
              // wait for wtr = min(left, DEPTH) free slots
              bus(0, VCI_WRITE, fa(0, FR_THRESH), (left < DEPTH) ? left : DEPTH, d, e);
              bus(0, VCI_WRITE, fa(0, FR_CTRL), 32'h1, d, e);
              while (!a_irq[0]) @(posedge clk);
              n_thr_irq++;
              bus(0, VCI_WRITE, fa(0, FR_CTRL), 32'h0, d, e);
            end
          end
          bus(0, VCI_WRITE, fa(0, FR_CTRL), 32'h2, d, e);
        end
      end
    join
    check(seq_r == 27, "sw->hw: all 27 items");

    // ---- sw -> hw through a FIFO in shared memory: A's master input FIFO 2
    // Software writes items into a 128-word ring in memory and hands them
    // to the DMA engine chunk by chunk (counted mode, DONE interrupt).
    seq_h = 0;
    bus(0, VCI_WRITE, fa(2, FR_BASE), RING_BASE, d, e);
    bus(0, VCI_WRITE, fa(2, FR_STRIDE), 4, d, e);
    bus(0, VCI_WRITE, fa(2, FR_WRAP), RING_LEN, d, e);
    bus(0, VCI_WRITE, fa(2, FR_COUNT), 0, d, e);
    bus(0, VCI_WRITE, fa(2, FR_CTRL), 32'h2, d, e);     // request interrupt only
    fork
      a_read_vec(2, 160, seq_h, 1);
      begin
        int left, sent;
        while (!a_irq[2]) @(posedge clk);
        n_req_irq++;
        bus(0, VCI_READ, fa(2, FR_REQLEN), 0, d, e);
        left = int'(d[15:0]);
        check(left == 160, "REQLEN of the ring consumer");
        bus(0, VCI_WRITE, fa(2, FR_IRQ), 32'h2, d, e);
        bus(0, VCI_WRITE, fa(2, FR_CTRL), 32'h1C, d, e); // DMA, counted, DONE irq
        sent = 0;
        while (left > 0) begin
          int k;
          k = (left < 40) ? left : 40;
          for (int i = 0; i < k; i++)
            u_mem.mem[(RING_BASE >> 2) + ((sent + i) % RING_LEN)] = 32'h4000_0000 + 32'(sent + i);
          if (sent + k > RING_LEN && sent <= RING_LEN) n_wrap++;
          bus(0, VCI_WRITE, fa(2, FR_COUNT), k, d, e);
          while (!a_irq[2]) @(posedge clk);
          n_done_irq++;
          bus(0, VCI_WRITE, fa(2, FR_IRQ), 32'h8, d, e);
          sent += k;
          left -= k;
        end
      end
    join
    check(seq_h == 160, "ring: 160 items read");
    bus(0, VCI_READ, fa(2, FR_ADDR), 0, d, e);
    check(d == RING_BASE + 4 * (160 % RING_LEN), "ring address wrapped");
    bus(0, VCI_WRITE, fa(2, FR_CTRL), 32'h0, d, e);

    // ---- hw -> hw: A's master output FIFO 3 into C's slave input FIFO 0
    bus(0, VCI_WRITE, fa(3, FR_BASE), fa(0, FR_DATA), d, e);
    bus(0, VCI_WRITE, fa(3, FR_STRIDE), 0, d, e);
    bus(0, VCI_WRITE, fa(3, FR_CTRL), 32'h4, d, e);
    c_owned_by_dma = 1;
    seq_hc = 0;
    fork
      begin
        int unsigned s = 0;
        a_write_vec(3, 30, s, 32'h3000_0000);
      end
      begin
        @(negedge clk);
        c_req_valid[0] = 1; c_req_len[0] = 30;
        @(posedge clk); while (!c_req_ready[0]) @(posedge clk);
        @(negedge clk); c_req_valid[0] = 0;
        while (1) begin
          c_rd_ready[0] = ($urandom_range(0, 9) == 0);   // slow consumer
          @(posedge clk);
          if (c_done[0]) break;
          if (c_rd_valid[0] && c_rd_ready[0]) begin
            check(c_rd_data[0] == 32'h3000_0000 + seq_hc, "hw->hw item");
            seq_hc++;
          end
          @(negedge clk);
        end
        c_rd_ready[0] = 0;
      end
    join
    check(seq_hc == 30, "hw->hw: all 30 items");

    // ---- every mechanism seen at least once
    $display("producer stalls %0d, consumer stalls %0d, threshold irqs %0d, request irqs %0d",
             n_wstall, n_rstall, n_thr_irq, n_req_irq);
    $display("ring wraps %0d, DMA chunks %0d, DMA retries %0d, error responses %0d, cfg %0d, stat %0d",
             n_wrap, n_done_irq, n_retry, n_err_rsp, n_cfg, n_stat);
    check(n_wstall > 0, "producer stall happened");
    check(n_rstall > 0, "consumer stall happened");
    check(n_thr_irq > 0, "threshold interrupt happened");
    check(n_req_irq > 0, "request interrupt happened");
    check(n_wrap > 0, "address ring wrapped");
    check(n_done_irq > 0, "counted DMA completion interrupt happened");
    check(n_retry > 0, "DMA retry happened");
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
