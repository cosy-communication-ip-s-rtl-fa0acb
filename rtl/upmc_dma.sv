// upmc_dma: the bus-master engine of a master FIFO, a single-word VCI
// initiator driven by the address generator.
//
// IS_INPUT = 0 (master output FIFO): while enabled and the FIFO holds an
// item, the engine issues a VCI write of the head item to the generated
// address. IS_INPUT = 1 (master input FIFO): while enabled and the FIFO has
// a free slot, it issues a VCI read at the generated address. One transfer
// is outstanding at a time, so a transfer takes at least three cycles
// (command, response, return to idle). When the response comes back
// without error the item is popped (write) or the word pushed (read) and the
// address generator advances. A response with rerror set leaves FIFO and
// address unchanged, so the same transfer is tried again: a target that
// refuses a word (a full slave FIFO, an empty one on a read) only delays
// the channel and loses nothing. Each error response sets the sticky err
// flag (cleared by err_clr) and pulses retry.
// That master FIFOs move data by DMA to a configurable address is given; the
// single-outstanding sequencing and the retry on error are this design's own
// choices.
module upmc_dma
  import cosy_pkg::*;
#(
  parameter int unsigned WIDTH    = 32,
  parameter int unsigned DEPTH    = 8,
  parameter bit          IS_INPUT = 1'b0,
  localparam int unsigned CW      = $clog2(DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  // address generator
  input  logic [VCI_AW-1:0] addr,
  output logic              advance,
  // FIFO
  input  logic              fifo_empty,
  input  logic [CW-1:0]     fifo_free,
  input  logic [WIDTH-1:0]  fifo_rdata,
  output logic              fifo_pop,
  output logic              fifo_push,
  output logic [WIDTH-1:0]  fifo_wdata,
  // VCI initiator
  output vci_req_t          m_req,
  input  logic              m_cmdack,
  input  vci_rsp_t          m_rsp,
  output logic              m_rspack,
  // status
  output logic              err,
  input  logic              err_clr,
  output logic              retry,
  output logic              active
);

  typedef enum logic [1:0] {D_IDLE, D_CMD, D_RSP} dstate_e;
  dstate_e state;
  logic    have_work;
  logic    cmd_acc, rsp_acc;

  assign have_work = IS_INPUT ? (fifo_free != '0) : !fifo_empty;
  assign cmd_acc   = (state == D_CMD) && m_cmdack;
  assign rsp_acc   = (state == D_RSP) && m_rsp.rspval;
  assign active    = (state != D_IDLE);

  always_comb begin
    m_req         = '0;
    m_req.cmdval  = (state == D_CMD);
    m_req.address = addr;
    m_req.cmd     = IS_INPUT ? VCI_READ : VCI_WRITE;
    m_req.be      = 4'hF;
    m_req.wdata   = IS_INPUT ? '0 : VCI_DW'(fifo_rdata);
    m_req.eop     = 1'b1;
    m_rspack      = (state == D_RSP);
    advance       = rsp_acc && !m_rsp.rerror;
    retry         = rsp_acc && m_rsp.rerror;
    fifo_pop      = !IS_INPUT && rsp_acc && !m_rsp.rerror;
    fifo_push     = IS_INPUT && rsp_acc && !m_rsp.rerror;
    fifo_wdata    = WIDTH'(m_rsp.rdata);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= D_IDLE;
      err   <= 1'b0;
    end else begin
      unique case (state)
        D_IDLE:  if (en && have_work) state <= D_CMD;
        D_CMD:   if (m_cmdack) state <= D_RSP;
        D_RSP:   if (m_rsp.rspval) state <= D_IDLE;
        default: state <= D_IDLE;
      endcase
      if (rsp_acc && m_rsp.rerror) err <= 1'b1;
      else if (err_clr)            err <= 1'b0;
    end
  end

  // VCI rule: a command stays valid and unchanged until it is acknowledged.
  logic     prev_wait;
  vci_req_t prev_req;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_wait <= 1'b0;
      prev_req  <= '0;
    end else begin
      prev_wait <= m_req.cmdval && !m_cmdack;
      prev_req  <= m_req;
      if (prev_wait)
        assert (m_req == prev_req)
          else $error("upmc_dma: VCI command changed before cmdack");
    end
  end

endmodule
