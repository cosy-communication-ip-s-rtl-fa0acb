// tb_upmc_dma: self-checking test of the master FIFO DMA engine, both ways,
// against a behavioural VCI memory with random command and response delays.
//
// The output engine writes a counting item stream from FIFO A to a ring of
// addresses; the input engine reads words from memory into FIFO B, which the
// bench drains. Checked: every written word lands at the address the bench
// expects, every word read arrives in order with the memory's value, no
// traffic while disabled, the sticky error flag on an error response (and
// its clear), the retry of a failed transfer, and the rate with a zero-wait target: one transfer every
// three cycles.
module tb_upmc_dma;
  import cosy_pkg::*;
  localparam int unsigned WIDTH = 32;
  localparam int unsigned DEPTH = 8;
  localparam int unsigned CW    = $clog2(DEPTH + 1);
  localparam logic [31:0] OBASE = 32'h0000_0100;
  localparam logic [31:0] IBASE = 32'h0000_0800;
  localparam int          N     = 300;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ------------------------------------------------------- output engine
  logic             o_en, o_adv, o_pop, o_push_unused, o_err, o_err_clr, o_active, o_retry;
  logic [31:0]      o_addr;
  logic [WIDTH-1:0] o_wdata_unused;
  vci_req_t         o_req;
  logic             o_cmdack, o_rspack;
  vci_rsp_t         o_rsp;
  logic             a_push, a_full, a_empty;
  logic [WIDTH-1:0] a_wdata, a_rdata;
  logic [CW-1:0]    a_count, a_free;

  upmc_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_fa (
    .clk, .rst_n, .push(a_push), .wdata(a_wdata), .pop(o_pop), .rdata(a_rdata),
    .full(a_full), .empty(a_empty), .count(a_count), .free(a_free)
  );
  upmc_dma #(.WIDTH(WIDTH), .DEPTH(DEPTH), .IS_INPUT(1'b0)) u_o (
    .clk, .rst_n, .en(o_en), .addr(o_addr), .advance(o_adv),
    .fifo_empty(a_empty), .fifo_free(a_free), .fifo_rdata(a_rdata),
    .fifo_pop(o_pop), .fifo_push(o_push_unused), .fifo_wdata(o_wdata_unused),
    .m_req(o_req), .m_cmdack(o_cmdack), .m_rsp(o_rsp), .m_rspack(o_rspack),
    .err(o_err), .err_clr(o_err_clr), .retry(o_retry), .active(o_active)
  );
  vci_mem_model #(.AW_W(12), .MAX_WAIT(2)) u_omem (
    .clk, .rst_n, .req(o_req), .cmdack(o_cmdack), .rsp(o_rsp), .rspack(o_rspack)
  );

  // -------------------------------------------------------- input engine
  logic             i_en, i_adv, i_pop_unused, i_push, i_err, i_err_clr, i_active, i_retry;
  logic [31:0]      i_addr;
  logic [WIDTH-1:0] i_wdata;
  vci_req_t         i_req;
  logic             i_cmdack, i_rspack;
  vci_rsp_t         i_rsp;
  logic             b_pop, b_full, b_empty;
  logic [WIDTH-1:0] b_rdata;
  logic [CW-1:0]    b_count, b_free;

  upmc_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_fb (
    .clk, .rst_n, .push(i_push), .wdata(i_wdata), .pop(b_pop), .rdata(b_rdata),
    .full(b_full), .empty(b_empty), .count(b_count), .free(b_free)
  );
  upmc_dma #(.WIDTH(WIDTH), .DEPTH(DEPTH), .IS_INPUT(1'b1)) u_i (
    .clk, .rst_n, .en(i_en), .addr(i_addr), .advance(i_adv),
    .fifo_empty(b_empty), .fifo_free(b_free), .fifo_rdata(b_rdata),
    .fifo_pop(i_pop_unused), .fifo_push(i_push), .fifo_wdata(i_wdata),
    .m_req(i_req), .m_cmdack(i_cmdack), .m_rsp(i_rsp), .m_rspack(i_rspack),
    .err(i_err), .err_clr(i_err_clr), .retry(i_retry), .active(i_active)
  );
  vci_mem_model #(.AW_W(12), .MAX_WAIT(2), .ERR_ADDR(32'h0000_3000)) u_imem (
    .clk, .rst_n, .req(i_req), .cmdack(i_cmdack), .rsp(i_rsp), .rspack(i_rspack)
  );

  // the bench's own address generators: base + 4 * transfers
  int unsigned o_n = 0, i_n = 0, o_pushed = 0, b_seen = 0;
  logic [31:0] i_base = IBASE;
  assign o_addr = OBASE + 32'(4 * o_n);
  assign i_addr = i_base + 32'(4 * i_n);

  bit fill_on = 1, drain_on = 1;
  always @(negedge clk) begin
    a_push  <= fill_on && !a_full && ($urandom_range(0, 2) != 0) && (o_pushed < N);
    b_pop   <= drain_on && ($urandom_range(0, 2) != 0);
  end
  assign a_wdata = 32'h5000_0000 + o_pushed;

  always @(posedge clk) if (rst_n) begin
    if (a_push && !a_full) o_pushed <= o_pushed + 1;
    if (o_adv) begin
      check(o_rsp.rspval && !o_rsp.rerror, "write advance on good response");
      check(u_omem.last_addr == OBASE + 32'(4 * o_n), "write address");
      check(a_rdata == 32'h5000_0000 + o_n, "write data in order");
      o_n <= o_n + 1;
    end
    if (i_adv) i_n <= i_n + 1;
    if (b_pop && !b_empty) begin
      check(b_rdata == 32'hC0DE_0000 + ((IBASE >> 2) + b_seen), "read data in order");
      b_seen <= b_seen + 1;
    end
  end

  initial begin
    int t0, seen0;
    o_en = 0; i_en = 0; o_err_clr = 0; i_err_clr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // disabled: no traffic although FIFO A fills and FIFO B is empty
    repeat (30) @(posedge clk);
    check(u_omem.n_writes == 0 && u_imem.n_reads == 0, "no traffic while disabled");
    o_en = 1; i_en = 1;
    wait (o_n == N);
    repeat (20) @(posedge clk);
    check(u_omem.n_writes == N, "all items written once");
    for (int k = 0; k < N; k++)
      check(u_omem.mem[(OBASE >> 2) + k] == 32'h5000_0000 + k, "memory contents after DMA writes");
    check(b_seen > 0, "input engine delivered words");
    check(!o_err && !i_err, "no error flagged");
    // error response: point the input engine at the error range
    i_en = 0;
    wait (!i_active);
    wait (b_empty);
    @(negedge clk);
    i_base = 32'h0000_3000 - 32'(4 * i_n);
    seen0 = b_seen;
    i_en = 1;
    repeat (20) @(posedge clk);
    check(i_err, "error flag set by error response");
    i_en = 0;
    wait (!i_active);
    repeat (10) @(posedge clk);
    check(b_empty && b_seen == seen0, "failed reads push nothing");
    @(negedge clk); i_err_clr = 1; @(negedge clk); i_err_clr = 0;
    check(!i_err, "error flag cleared");
    // failed reads are retried at the same address: back in range, the
    // engine resumes with the word it failed on
    i_base = IBASE;
    i_en = 1;
    wait (b_seen > seen0);
    repeat (40) @(posedge clk);
    check(!i_err, "no error once back in range");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // rate check: a separate engine against a zero-wait memory
  logic             z_adv, z_pop, z_push_unused, z_err, z_active, z_cmdack, z_rspack, z_retry;
  logic [WIDTH-1:0] z_wdata_unused;
  vci_req_t         z_req;
  vci_rsp_t         z_rsp;
  int unsigned      z_n = 0, z_first = 0, z_last = 0;
  upmc_dma #(.WIDTH(WIDTH), .DEPTH(DEPTH), .IS_INPUT(1'b0)) u_z (
    .clk, .rst_n, .en(1'b1), .addr(32'h40), .advance(z_adv),
    .fifo_empty(1'b0), .fifo_free('0), .fifo_rdata(32'h1234_5678),
    .fifo_pop(z_pop), .fifo_push(z_push_unused), .fifo_wdata(z_wdata_unused),
    .m_req(z_req), .m_cmdack(z_cmdack), .m_rsp(z_rsp), .m_rspack(z_rspack),
    .err(z_err), .err_clr(1'b0), .retry(z_retry), .active(z_active)
  );
  vci_mem_model #(.AW_W(8), .MAX_WAIT(0)) u_zmem (
    .clk, .rst_n, .req(z_req), .cmdack(z_cmdack), .rsp(z_rsp), .rspack(z_rspack)
  );
  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && z_adv) begin
      if (z_n == 0) z_first <= cyc;
      if (z_n == 10) check(cyc - z_first == 30, $sformatf("10 transfers in %0d cycles, expected 30", cyc - z_first));
      z_n <= z_n + 1;
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
