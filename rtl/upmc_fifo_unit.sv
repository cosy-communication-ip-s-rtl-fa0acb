// upmc_fifo_unit: one FIFO of the service unit, with its state and threshold
// registers, its interrupt and, for a master FIFO, its DMA engine.
//
// KIND selects the FIFO's direction and who serves its bus side:
//   FK_SLAVE_IN   the bus writes the DATA register, the coprocessor reads
//   FK_SLAVE_OUT  the coprocessor writes, the bus reads the DATA register
//   FK_MASTER_IN  the DMA engine reads memory, the coprocessor reads
//   FK_MASTER_OUT the coprocessor writes, the DMA engine writes memory
// The coprocessor side (cp_*) is driven by the vector unit.
//
// Registers (word offsets, see cosy_pkg): STATE is the number of free slots.
// THRESH holds a threshold on that state; the threshold condition is
// free >= THRESH for an input FIFO (room for a software producer) and
// free <= THRESH for an output FIFO (DEPTH - THRESH items ready for a
// software consumer). CTRL enables the threshold interrupt, the
// per-request interrupt and the DMA engine. IRQ shows the threshold
// condition and the sticky request and DMA-error flags (write 1 to clear).
// REQLEN shows the coprocessor's last vector length and its remaining items.
// A master FIFO adds BASE, STRIDE and WRAP for the address generator, which
// restarts at BASE whenever DMA_EN goes from 0 to 1, and the read-only ADDR.
// With CTRL.CNT_EN set, the DMA engine runs only while COUNT is not zero;
// each completed transfer decrements COUNT, and the transfer that brings it
// to zero sets the sticky DONE flag. Software thus hands the engine one
// chunk at a time (for a channel whose FIFO lives in shared memory) and
// learns of its completion by interrupt.
// irq is a level: (THR_IE and threshold condition) or (REQ_IE and request
// flag) or (DONE_IE and DONE flag). The DMA retry flag only records that a
// transfer had to be repeated and raises no interrupt. Register reads are combinational in the access cycle
// (the service unit registers the response); writes take effect one cycle
// later. An access to a register the kind does not have, a write to a
// read-only register, a write to a full or a read from an empty DATA FIFO
// return err and change nothing.
// The state and threshold registers, the threshold and per-request
// interrupts and the master address generator follow the described design;
// the register layout and the direction of the threshold comparison are
// this design's own choices.
module upmc_fifo_unit
  import cosy_pkg::*;
#(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 8,
  parameter fifo_kind_e  KIND  = FK_SLAVE_IN,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // register access from the service unit
  input  reg_req_t          reg_req,
  output reg_rsp_t          reg_rsp,
  // coprocessor side, from the vector unit
  input  logic              cp_push,
  input  logic [WIDTH-1:0]  cp_wdata,
  input  logic              cp_pop,
  output logic [WIDTH-1:0]  cp_rdata,
  output logic [CW-1:0]     cp_count,
  output logic [CW-1:0]     cp_free,
  input  logic              vu_req_pulse,
  input  logic [LEN_W-1:0]  vu_last_len,
  input  logic [LEN_W-1:0]  vu_remaining,
  // interrupt
  output logic              irq,
  // VCI initiator (master kinds only)
  output vci_req_t          m_req,
  input  logic              m_cmdack,
  input  vci_rsp_t          m_rsp,
  output logic              m_rspack
);

  localparam bit IS_MASTER = (KIND == FK_MASTER_IN) || (KIND == FK_MASTER_OUT);
  localparam bit IS_INPUT  = (KIND == FK_SLAVE_IN)  || (KIND == FK_MASTER_IN);

  // ---------------------------------------------------------------- FIFO
  logic             f_push, f_pop, f_full, f_empty;
  logic [WIDTH-1:0] f_wdata, f_rdata;
  logic [CW-1:0]    f_count, f_free;

  upmc_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .push(f_push), .wdata(f_wdata), .pop(f_pop), .rdata(f_rdata),
    .full(f_full), .empty(f_empty), .count(f_count), .free(f_free)
  );

  assign cp_rdata = f_rdata;
  assign cp_count = f_count;
  assign cp_free  = f_free;

  // ----------------------------------------------------------- registers
  logic [CW-1:0]     thresh;
  logic [4:0]        ctrl;
  logic              req_flag, done_flag;
  logic [31:0]       xfer_cnt;
  logic              dma_en;
  logic [VCI_AW-1:0] base, stride;
  logic [31:0]       wrap;
  logic              thr_cond;
  logic              bus_push, bus_pop;
  logic              dma_push, dma_pop;
  logic [WIDTH-1:0]  dma_wdata;
  logic              dma_err, err_clr;
  logic [VCI_AW-1:0] gen_addr;
  logic [31:0]       gen_index;
  logic              gen_load, gen_adv;

  assign thr_cond = IS_INPUT ? (f_free >= thresh) : (f_free <= thresh);

  // register read / access decode
  always_comb begin
    reg_rsp  = '0;
    bus_push = 1'b0;
    bus_pop  = 1'b0;
    unique case (reg_req.off)
      FR_DATA: begin
        if (KIND == FK_SLAVE_IN) begin
          reg_rsp.err = reg_req.re || (reg_req.we && f_full);
          bus_push    = reg_req.we && !f_full;
        end else if (KIND == FK_SLAVE_OUT) begin
          reg_rsp.rdata = 32'(f_rdata);
          reg_rsp.err   = reg_req.we || (reg_req.re && f_empty);
          bus_pop       = reg_req.re && !f_empty;
        end else begin
          reg_rsp.err = reg_req.we || reg_req.re;
        end
      end
      FR_STATE: begin
        reg_rsp.rdata = 32'(f_free);
        reg_rsp.err   = reg_req.we;
      end
      FR_THRESH: reg_rsp.rdata = 32'(thresh);
      FR_CTRL:   reg_rsp.rdata = 32'(ctrl);
      FR_IRQ:    reg_rsp.rdata = {28'd0, done_flag, dma_err, req_flag, thr_cond};
      FR_REQLEN: begin
        reg_rsp.rdata = {vu_remaining, vu_last_len};
        reg_rsp.err   = reg_req.we;
      end
      FR_BASE: begin
        reg_rsp.rdata = IS_MASTER ? base : '0;
        reg_rsp.err   = !IS_MASTER && (reg_req.we || reg_req.re);
      end
      FR_STRIDE: begin
        reg_rsp.rdata = IS_MASTER ? stride : '0;
        reg_rsp.err   = !IS_MASTER && (reg_req.we || reg_req.re);
      end
      FR_WRAP: begin
        reg_rsp.rdata = IS_MASTER ? wrap : '0;
        reg_rsp.err   = !IS_MASTER && (reg_req.we || reg_req.re);
      end
      FR_ADDR: begin
        reg_rsp.rdata = IS_MASTER ? gen_addr : '0;
        reg_rsp.err   = reg_req.we || (!IS_MASTER && reg_req.re);
      end
      FR_COUNT: begin
        reg_rsp.rdata = IS_MASTER ? xfer_cnt : '0;
        reg_rsp.err   = !IS_MASTER && (reg_req.we || reg_req.re);
      end
      default: reg_rsp.err = reg_req.we || reg_req.re;
    endcase
  end

  logic wr_ctrl;
  assign wr_ctrl  = reg_req.we && reg_req.off == FR_CTRL;
  assign gen_load = wr_ctrl && reg_req.wdata[CTRL_DMA_EN] && !ctrl[CTRL_DMA_EN];
  assign err_clr  = reg_req.we && reg_req.off == FR_IRQ && reg_req.wdata[IRQ_ERR];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      thresh    <= '0;
      ctrl      <= '0;
      req_flag  <= 1'b0;
      done_flag <= 1'b0;
      xfer_cnt  <= '0;
      base     <= '0;
      stride   <= '0;
      wrap     <= '0;
    end else begin
      if (reg_req.we) begin
        unique case (reg_req.off)
          FR_THRESH: thresh <= (reg_req.wdata > 32'(DEPTH)) ? CW'(DEPTH) : CW'(reg_req.wdata);
          FR_CTRL:   ctrl   <= reg_req.wdata[4:0];
          FR_BASE:   if (IS_MASTER) base   <= reg_req.wdata;
          FR_STRIDE: if (IS_MASTER) stride <= reg_req.wdata;
          FR_WRAP:   if (IS_MASTER) wrap   <= reg_req.wdata;
          default: ;
        endcase
      end
      // transfer counter: a completed transfer wins over a register write
      if (gen_adv && ctrl[CTRL_CNT_EN] && xfer_cnt != '0)
        xfer_cnt <= xfer_cnt - 1;
      else if (IS_MASTER && reg_req.we && reg_req.off == FR_COUNT)
        xfer_cnt <= reg_req.wdata;
      if (gen_adv && ctrl[CTRL_CNT_EN] && xfer_cnt == 32'd1)
        done_flag <= 1'b1;
      else if (reg_req.we && reg_req.off == FR_IRQ && reg_req.wdata[IRQ_DONE])
        done_flag <= 1'b0;
      if (vu_req_pulse)
        req_flag <= 1'b1;
      else if (reg_req.we && reg_req.off == FR_IRQ && reg_req.wdata[IRQ_REQ])
        req_flag <= 1'b0;
    end
  end

  assign irq = (ctrl[CTRL_THR_IE] && thr_cond) || (ctrl[CTRL_REQ_IE] && req_flag) ||
               (ctrl[CTRL_DONE_IE] && done_flag);
  assign dma_en = ctrl[CTRL_DMA_EN] && (!ctrl[CTRL_CNT_EN] || xfer_cnt != '0);

  // ---------------------------------------------------------- master DMA
  generate
    if (IS_MASTER) begin : g_master
      upmc_addr_gen #(.AW(VCI_AW)) u_agen (
        .clk, .rst_n,
        .base, .stride, .wrap,
        .load(gen_load), .advance(gen_adv),
        .addr(gen_addr), .index(gen_index)
      );
      upmc_dma #(.WIDTH(WIDTH), .DEPTH(DEPTH), .IS_INPUT(IS_INPUT)) u_dma (
        .clk, .rst_n,
        .en(dma_en),
        .addr(gen_addr), .advance(gen_adv),
        .fifo_empty(f_empty), .fifo_free(f_free), .fifo_rdata(f_rdata),
        .fifo_pop(dma_pop), .fifo_push(dma_push), .fifo_wdata(dma_wdata),
        .m_req, .m_cmdack, .m_rsp, .m_rspack,
        .err(dma_err), .err_clr, .retry(), .active()
      );
    end else begin : g_slave
      assign gen_addr  = '0;
      assign gen_index = '0;
      assign gen_adv   = 1'b0;
      assign dma_push  = 1'b0;
      assign dma_pop   = 1'b0;
      assign dma_wdata = '0;
      assign dma_err   = 1'b0;
      assign m_req     = '0;
      assign m_rspack  = 1'b0;
    end
  endgenerate

  // ------------------------------------------------------ FIFO port muxing
  always_comb begin
    if (IS_INPUT) begin
      // producer is the bus side, consumer the coprocessor
      f_push  = IS_MASTER ? dma_push : bus_push;
      f_wdata = IS_MASTER ? dma_wdata : WIDTH'(reg_req.wdata);
      f_pop   = cp_pop;
    end else begin
      f_push  = cp_push;
      f_wdata = cp_wdata;
      f_pop   = IS_MASTER ? dma_pop : bus_pop;
    end
  end

endmodule
