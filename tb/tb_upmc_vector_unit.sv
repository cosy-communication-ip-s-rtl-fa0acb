// tb_upmc_vector_unit: self-checking test of the vector unit, both ways.
//
// A write unit (IS_INPUT = 0) fills FIFO A from a counting item stream while
// the bench drains A at random; a read unit (IS_INPUT = 1) empties FIFO B,
// which the bench fills at random. Random vector lengths (0..20, so longer
// than the FIFO) are requested back to back. Checked: item order and values,
// one done per request and none otherwise, the exact return time of an
// unblocked vector (done L + 1 cycles after the request is accepted), and
// the threshold protocol: a unit stalls only on a full (write) or empty
// (read) FIFO, stays stalled while fewer than min(remaining, DEPTH) slots or
// items are available, and wakes in the cycle after that many are.
module tb_upmc_vector_unit;
  import cosy_pkg::*;
  localparam int unsigned WIDTH = 32;
  localparam int unsigned DEPTH = 8;
  localparam int unsigned CW    = $clog2(DEPTH + 1);
  localparam int          NVEC  = 150;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always #5 clk = ~clk;

  // ------------------------------------------------------------- unit W
  logic             w_req_valid, w_req_ready, w_done, w_wr_valid, w_wr_ready;
  logic [LEN_W-1:0] w_req_len, w_last_len, w_remaining;
  logic [WIDTH-1:0] w_wr_data;
  logic             w_push, w_pop_unused, w_rd_valid_unused;
  logic [WIDTH-1:0] w_fwdata, w_rd_data_unused;
  logic             w_req_pulse, w_busy, w_stalled, w_wake;
  logic             a_pop, a_full, a_empty;
  logic [WIDTH-1:0] a_rdata;
  logic [CW-1:0]    a_count, a_free;

  upmc_vector_unit #(.WIDTH(WIDTH), .DEPTH(DEPTH), .IS_INPUT(1'b0)) u_w (
    .clk, .rst_n,
    .req_valid(w_req_valid), .req_len(w_req_len), .req_ready(w_req_ready), .done(w_done),
    .wr_valid(w_wr_valid), .wr_data(w_wr_data), .wr_ready(w_wr_ready),
    .rd_valid(w_rd_valid_unused), .rd_data(w_rd_data_unused), .rd_ready(1'b0),
    .fifo_push(w_push), .fifo_wdata(w_fwdata), .fifo_pop(w_pop_unused),
    .fifo_rdata(a_rdata), .fifo_count(a_count), .fifo_free(a_free),
    .req_pulse(w_req_pulse), .last_len(w_last_len), .remaining(w_remaining),
    .busy(w_busy), .stalled(w_stalled), .wake(w_wake)
  );
  upmc_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_fa (
    .clk, .rst_n, .push(w_push), .wdata(w_fwdata), .pop(a_pop), .rdata(a_rdata),
    .full(a_full), .empty(a_empty), .count(a_count), .free(a_free)
  );

  // ------------------------------------------------------------- unit R
  logic             r_req_valid, r_req_ready, r_done, r_rd_valid, r_rd_ready;
  logic [LEN_W-1:0] r_req_len, r_last_len, r_remaining;
  logic [WIDTH-1:0] r_rd_data;
  logic             r_push_unused, r_pop, r_wr_ready_unused;
  logic [WIDTH-1:0] r_fwdata_unused;
  logic             r_req_pulse, r_busy, r_stalled, r_wake;
  logic             b_push, b_full, b_empty;
  logic [WIDTH-1:0] b_wdata, b_rdata;
  logic [CW-1:0]    b_count, b_free;

  upmc_vector_unit #(.WIDTH(WIDTH), .DEPTH(DEPTH), .IS_INPUT(1'b1)) u_r (
    .clk, .rst_n,
    .req_valid(r_req_valid), .req_len(r_req_len), .req_ready(r_req_ready), .done(r_done),
    .wr_valid(1'b0), .wr_data('0), .wr_ready(r_wr_ready_unused),
    .rd_valid(r_rd_valid), .rd_data(r_rd_data), .rd_ready(r_rd_ready),
    .fifo_push(r_push_unused), .fifo_wdata(r_fwdata_unused), .fifo_pop(r_pop),
    .fifo_rdata(b_rdata), .fifo_count(b_count), .fifo_free(b_free),
    .req_pulse(r_req_pulse), .last_len(r_last_len), .remaining(r_remaining),
    .busy(r_busy), .stalled(r_stalled), .wake(r_wake)
  );
  upmc_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_fb (
    .clk, .rst_n, .push(b_push), .wdata(b_wdata), .pop(r_pop), .rdata(b_rdata),
    .full(b_full), .empty(b_empty), .count(b_count), .free(b_free)
  );

  // ----------------------------------------------------- bench counters
  int unsigned w_seq = 0, a_seq = 0;   // items sent by the bench / drained from A
  int unsigned b_seq = 0, r_seq = 0;   // items put into B / received from R
  int          w_rem = 0, r_rem = 0;   // bench's own count of items left
  int          w_thr = 0, r_thr = 0;
  bit          w_prev_st = 0, r_prev_st = 0;
  int          w_dones = 0, r_dones = 0, w_reqs = 0, r_reqs = 0;
  int          w_stalls = 0, r_stalls = 0;
  bit          drain_on = 1, fill_on = 1;
  bit          w_exp_wake = 0, w_exp_stay = 0, r_exp_wake = 0, r_exp_stay = 0;

  assign w_wr_data = w_seq;

  // expected threshold while stalled; checked on each clock with the
  // values of the cycle before the edge
  always @(posedge clk) if (rst_n) begin
    // write side
    if (w_stalled && !w_prev_st) begin
      w_stalls++;
      w_thr = (w_rem < DEPTH) ? w_rem : DEPTH;
    end
    w_prev_st = w_stalled;
    // threshold rules, checked one edge apart
    if (w_exp_wake) check(!w_stalled && w_wake, "write unit wakes once wtr slots are free");
    if (w_exp_stay) check(w_stalled, "write unit stays stalled below wtr");
    w_exp_wake = w_stalled && (int'(a_free) >= w_thr);
    w_exp_stay = w_stalled && (int'(a_free) <  w_thr);
    if (w_req_valid && w_req_ready) begin w_rem = w_req_len; w_reqs++; end
    if (w_wr_valid && w_wr_ready) begin w_seq <= w_seq + 1; w_rem--; end
    if (a_pop && !a_empty) begin
      check(a_rdata == a_seq, "write-side item value/order");
      a_seq++;
    end
    if (w_done) w_dones++;
    // read side
    if (r_stalled && !r_prev_st) begin
      r_stalls++;
      r_thr = (r_rem < DEPTH) ? r_rem : DEPTH;
    end
    r_prev_st = r_stalled;
    if (r_exp_wake) check(!r_stalled && r_wake, "read unit wakes once rtr items are present");
    if (r_exp_stay) check(r_stalled, "read unit stays stalled below rtr");
    r_exp_wake = r_stalled && (int'(b_count) >= r_thr);
    r_exp_stay = r_stalled && (int'(b_count) <  r_thr);
    if (r_req_valid && r_req_ready) begin r_rem = r_req_len; r_reqs++; end
    if (r_rd_valid && r_rd_ready) begin
      check(r_rd_data == r_seq, "read-side item value/order");
      r_seq++;
      r_rem--;
    end
    if (b_push && !b_full) b_seq++;
    if (r_done) r_dones++;
  end

  // a unit may only enter the wait on a blocked FIFO
  always @(posedge clk) if (rst_n) begin
    if (w_busy && !w_stalled && !a_full && w_rem > 0) check(w_wr_ready, "write unit ready when FIFO has room");
    if (r_busy && !r_stalled && !b_empty && r_rem > 0) check(r_rd_valid, "read unit valid when FIFO has items");
  end

  // bench sides of the FIFOs
  always @(negedge clk) begin
    a_pop      <= drain_on && ($urandom_range(0, 3) == 0);
    b_push     <= fill_on && ($urandom_range(0, 3) == 0);
    b_wdata    <= b_seq;
    w_wr_valid <= w_busy && ($urandom_range(0, 4) != 0);
    r_rd_ready <= r_busy && ($urandom_range(0, 4) != 0);
  end

  // issue one request and wait for its done
  task automatic vec_write(int len);
    @(negedge clk);
    w_req_valid = 1'b1; w_req_len = LEN_W'(len);
    do @(posedge clk); while (!w_req_ready);
    @(negedge clk); w_req_valid = 1'b0;
    while (!w_done) @(negedge clk);
  endtask
  task automatic vec_read(int len);
    @(negedge clk);
    r_req_valid = 1'b1; r_req_len = LEN_W'(len);
    do @(posedge clk); while (!r_req_ready);
    @(negedge clk); r_req_valid = 1'b0;
    while (!r_done) @(negedge clk);
  endtask

  initial begin
    int t0, lat;
    w_req_valid = 0; r_req_valid = 0; w_req_len = 0; r_req_len = 0;
    a_pop = 0; b_push = 0; b_wdata = 0; w_wr_valid = 0; r_rd_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // directed latency: an unblocked 5-item write with the item stream
    // always valid returns 6 cycles after the request is accepted
    drain_on = 0;
    @(negedge clk);
    force w_wr_valid = 1'b1;
    w_req_valid = 1'b1; w_req_len = 5;
    @(posedge clk); t0 = $time;
    @(negedge clk); w_req_valid = 1'b0;
    while (!w_done) @(negedge clk);
    lat = ($time - t0 + 5) / 10;
    check(lat == 6, $sformatf("write latency %0d cycles, expected 6", lat));
    release w_wr_valid;
    // zero-length request returns on the next cycle
    @(negedge clk);
    w_req_valid = 1'b1; w_req_len = 0;
    @(posedge clk); t0 = $time;
    @(negedge clk); w_req_valid = 1'b0;
    check(w_done, "zero-length vector returns the cycle after acceptance");
    drain_on = 1;
    fork
      for (int i = 0; i < NVEC; i++) vec_write($urandom_range(0, 20));
      for (int i = 0; i < NVEC; i++) vec_read($urandom_range(0, 20));
    join
    repeat (50) @(negedge clk);
    check(w_dones == w_reqs && w_reqs == NVEC + 2, "one done per write request");
    check(r_dones == r_reqs && r_reqs == NVEC, "one done per read request");
    check(w_stalls > 0 && r_stalls > 0, "both units stalled at least once");
    check(w_seq == a_seq + int'(a_count), "all written items accounted for");
    $display("stalls: write %0d read %0d; items written %0d read %0d", w_stalls, r_stalls, w_seq, r_seq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
