// upmc_vector_unit: top level of the interface for one FIFO. It turns a SYS
// vector read or write of the coprocessor into item-by-item FIFO transfers.
//
// The coprocessor issues a request (req_valid with req_len items); the unit
// accepts it when idle (req_ready) and then moves the items one per cycle:
// on a write (IS_INPUT = 0) from the coprocessor's item stream into the FIFO,
// on a read (IS_INPUT = 1) from the FIFO to the coprocessor. The call
// returns with a one-cycle done pulse in the cycle after the last item moves;
// a zero-length request returns the cycle after it is accepted.
//
// Blocking follows the channel's threshold protocol: when the FIFO is full
// (write) or empty (read) with items still to move, the unit stalls and sets
// its threshold to min(items remaining, DEPTH); it resumes (the wake-up
// call-back) only when at least that many slots are free (write) or that
// many items are present (read). Transfers thus happen in chunks rather than
// one item whenever one slot frees up, and no vector size or FIFO depth can
// deadlock the channel. stalled is high while waiting and wake pulses when
// the wait ends.
//
// req_pulse marks each accepted request so that the service unit can raise
// the optional per-request interrupt; req_len and remaining are exposed for
// software. The item-by-item FIFO protocol, the per-request interrupt and the
// threshold protocol follow the described design; the valid/ready handshakes
// and the exact threshold value are this design's own choices.
module upmc_vector_unit
  import cosy_pkg::*;
#(
  parameter int unsigned WIDTH    = 32,
  parameter int unsigned DEPTH    = 8,
  parameter bit          IS_INPUT = 1'b0,
  localparam int unsigned CW      = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // SYS request from the coprocessor
  input  logic             req_valid,
  input  logic [LEN_W-1:0] req_len,
  output logic             req_ready,
  output logic             done,
  // item stream, coprocessor -> interface (write vectors)
  input  logic             wr_valid,
  input  logic [WIDTH-1:0] wr_data,
  output logic             wr_ready,
  // item stream, interface -> coprocessor (read vectors)
  output logic             rd_valid,
  output logic [WIDTH-1:0] rd_data,
  input  logic             rd_ready,
  // FIFO side
  output logic             fifo_push,
  output logic [WIDTH-1:0] fifo_wdata,
  output logic             fifo_pop,
  input  logic [WIDTH-1:0] fifo_rdata,
  input  logic [CW-1:0]    fifo_count,
  input  logic [CW-1:0]    fifo_free,
  // towards the service unit
  output logic             req_pulse,
  output logic [LEN_W-1:0] last_len,
  output logic [LEN_W-1:0] remaining,
  output logic             busy,
  output logic             stalled,
  output logic             wake
);

  typedef enum logic [1:0] {S_IDLE, S_XFER, S_WAIT} state_e;
  state_e           state;
  logic [CW-1:0]    thr;
  logic             xfer;      // an item moves this cycle
  logic             blocked;   // FIFO cannot serve the next item
  logic [CW-1:0]    avail;     // slots (write) or items (read) available
  logic [LEN_W-1:0] rem_min;

  assign avail   = IS_INPUT ? fifo_count : fifo_free;
  assign blocked = (avail == '0);
  assign rem_min = (remaining < LEN_W'(DEPTH)) ? remaining : LEN_W'(DEPTH);

  assign req_ready = (state == S_IDLE);
  assign req_pulse = req_valid && req_ready;
  assign busy      = (state != S_IDLE);
  assign stalled   = (state == S_WAIT);

  always_comb begin
    fifo_push  = 1'b0;
    fifo_pop   = 1'b0;
    fifo_wdata = wr_data;
    wr_ready   = 1'b0;
    rd_valid   = 1'b0;
    rd_data    = fifo_rdata;
    xfer       = 1'b0;
    if (state == S_XFER && !blocked) begin
      if (IS_INPUT) begin
        rd_valid = 1'b1;
        fifo_pop = rd_ready;
        xfer     = rd_ready;
      end else begin
        wr_ready  = 1'b1;
        fifo_push = wr_valid;
        xfer      = wr_valid;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      remaining <= '0;
      last_len  <= '0;
      thr       <= '0;
      done      <= 1'b0;
      wake      <= 1'b0;
    end else begin
      done <= 1'b0;
      wake <= 1'b0;
      unique case (state)
        S_IDLE: if (req_valid) begin
          last_len  <= req_len;
          remaining <= req_len;
          if (req_len == '0) done <= 1'b1;
          else               state <= S_XFER;
        end
        S_XFER: begin
          if (xfer) begin
            remaining <= remaining - 1'b1;
            if (remaining == LEN_W'(1)) begin
              // the last item moves: the SYS call returns
              state <= S_IDLE;
              done  <= 1'b1;
            end
          end else if (blocked) begin
            thr   <= CW'(rem_min);
            state <= S_WAIT;
          end
        end
        S_WAIT: if (avail >= thr) begin
          state <= S_XFER;
          wake  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
