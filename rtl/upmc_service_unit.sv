// upmc_service_unit: middle level of the interface. It serves the FIFOs and
// the configuration and status registers to the bus through a VCI target
// port, and holds the FIFO units (with their DMA engines for master FIFOs).
//
// The FIFOs are numbered slave inputs first, then slave outputs, master
// inputs and master outputs (N_SIN, N_SOUT, N_MIN, N_MOUT of each). Address
// bits [11:10] select the region: 00 the FIFO windows (FIFO index in [9:6],
// register in [5:2]), 10 the N_CFG configuration registers (read/write, seen
// by the coprocessor on cfg), 11 the N_STAT status registers (read only,
// driven by the coprocessor on stat); 01 and indices past the last FIFO or
// register answer with rerror. Upper address bits are left to the bus
// wrapper's decoding.
//
// Timing: one command is accepted per cycle while no response is waiting or
// the waiting one is acknowledged in the same cycle (cmdack = !rspval ||
// rspack). The register access happens in the accept cycle and its response
// is registered, so rspval rises the cycle after cmdack.
// The number and kind of FIFOs and registers as parameters follow the
// described generic interface (reference configuration: one slave input and
// one slave output FIFO of 8 x 32 bits); the register counts' defaults, the
// address map and the error responses are this design's own choices.
module upmc_service_unit
  import cosy_pkg::*;
#(
  parameter int unsigned WIDTH  = 32,
  parameter int unsigned DEPTH  = 8,
  parameter int unsigned N_SIN  = 1,
  parameter int unsigned N_SOUT = 1,
  parameter int unsigned N_MIN  = 0,
  parameter int unsigned N_MOUT = 0,
  parameter int unsigned N_CFG  = 2,
  parameter int unsigned N_STAT = 2,
  localparam int unsigned NF    = N_SIN + N_SOUT + N_MIN + N_MOUT,
  localparam int unsigned NM    = N_MIN + N_MOUT,
  localparam int unsigned NMP   = (NM == 0) ? 1 : NM,
  localparam int unsigned CW    = $clog2(DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // VCI target
  input  vci_req_t          s_req,
  output logic              s_cmdack,
  output vci_rsp_t          s_rsp,
  input  logic              s_rspack,
  // coprocessor side of each FIFO (from the vector units)
  input  logic              cp_push      [NF],
  input  logic [WIDTH-1:0]  cp_wdata     [NF],
  input  logic              cp_pop       [NF],
  output logic [WIDTH-1:0]  cp_rdata     [NF],
  output logic [CW-1:0]     cp_count     [NF],
  output logic [CW-1:0]     cp_free      [NF],
  input  logic              vu_req_pulse [NF],
  input  logic [LEN_W-1:0]  vu_last_len  [NF],
  input  logic [LEN_W-1:0]  vu_remaining [NF],
  // interrupts, one per FIFO
  output logic [NF-1:0]     irq,
  // configuration and status registers
  output logic [31:0]       cfg          [N_CFG],
  input  logic [31:0]       stat         [N_STAT],
  // VCI initiators of the master FIFOs (index 0: first master FIFO)
  output vci_req_t          m_req        [NMP],
  input  logic              m_cmdack     [NMP],
  input  vci_rsp_t          m_rsp        [NMP],
  output logic              m_rspack     [NMP]
);

  function automatic fifo_kind_e kind_of(int unsigned k);
    if (k < N_SIN)                 return FK_SLAVE_IN;
    if (k < N_SIN + N_SOUT)        return FK_SLAVE_OUT;
    if (k < N_SIN + N_SOUT + N_MIN) return FK_MASTER_IN;
    return FK_MASTER_OUT;
  endfunction

  // ------------------------------------------------------------ decode
  logic       accept, is_wr, is_rd;
  logic [1:0] region;
  logic [3:0] fidx;
  logic [7:0] ridx;
  vci_rsp_t   rsp_q;

  assign s_cmdack = !rsp_q.rspval || s_rspack;
  assign accept   = s_req.cmdval && s_cmdack;
  assign is_wr    = accept && (s_req.cmd == VCI_WRITE);
  assign is_rd    = accept && (s_req.cmd == VCI_READ);
  assign region   = s_req.address[11:10];
  assign fidx     = s_req.address[9:6];
  assign ridx     = s_req.address[9:2];
  assign s_rsp    = rsp_q;

  reg_req_t unit_req [NF];
  reg_rsp_t unit_rsp [NF];

  // ------------------------------------------------------- FIFO units
  generate
    for (genvar k = 0; k < NF; k++) begin : g_fifo
      localparam fifo_kind_e K = kind_of(k);
      always_comb begin
        unit_req[k]       = '0;
        unit_req[k].off   = s_req.address[5:2];
        unit_req[k].wdata = s_req.wdata;
        if (region == REGION_FIFO && 32'(fidx) == k) begin
          unit_req[k].we = is_wr;
          unit_req[k].re = is_rd;
        end
      end

      vci_req_t u_mreq;
      logic     u_mrspack, u_mcmdack;
      vci_rsp_t u_mrsp;

      upmc_fifo_unit #(.WIDTH(WIDTH), .DEPTH(DEPTH), .KIND(K)) u_unit (
        .clk, .rst_n,
        .reg_req(unit_req[k]), .reg_rsp(unit_rsp[k]),
        .cp_push(cp_push[k]), .cp_wdata(cp_wdata[k]), .cp_pop(cp_pop[k]),
        .cp_rdata(cp_rdata[k]), .cp_count(cp_count[k]), .cp_free(cp_free[k]),
        .vu_req_pulse(vu_req_pulse[k]), .vu_last_len(vu_last_len[k]),
        .vu_remaining(vu_remaining[k]),
        .irq(irq[k]),
        .m_req(u_mreq), .m_cmdack(u_mcmdack), .m_rsp(u_mrsp), .m_rspack(u_mrspack)
      );

      if (k >= N_SIN + N_SOUT) begin : g_mport
        localparam int unsigned M = k - (N_SIN + N_SOUT);
        assign m_req[M]    = u_mreq;
        assign m_rspack[M] = u_mrspack;
        assign u_mcmdack   = m_cmdack[M];
        assign u_mrsp      = m_rsp[M];
      end else begin : g_noport
        assign u_mcmdack = 1'b0;
        assign u_mrsp    = '0;
      end
    end

    if (NM == 0) begin : g_no_master
      assign m_req[0]    = '0;
      assign m_rspack[0] = 1'b0;
    end
  endgenerate

  // -------------------------------------------- configuration registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_CFG; i++) cfg[i] <= '0;
    end else if (is_wr && region == REGION_CFG) begin
      for (int i = 0; i < N_CFG; i++)
        if (32'(ridx) == i) cfg[i] <= s_req.wdata;
    end
  end

  // ----------------------------------------------------------- response
  // index muxes, written as loops so that no index is wider than needed
  reg_rsp_t    fifo_sel;
  logic        fifo_hit, cfg_hit, stat_hit;
  logic [31:0] cfg_sel, stat_sel;
  always_comb begin
    fifo_sel = '0;
    fifo_hit = 1'b0;
    for (int k = 0; k < NF; k++)
      if (32'(fidx) == k) begin
        fifo_sel = unit_rsp[k];
        fifo_hit = 1'b1;
      end
    cfg_sel = '0;
    cfg_hit = 1'b0;
    for (int i = 0; i < N_CFG; i++)
      if (32'(ridx) == i) begin
        cfg_sel = cfg[i];
        cfg_hit = 1'b1;
      end
    stat_sel = '0;
    stat_hit = 1'b0;
    for (int i = 0; i < N_STAT; i++)
      if (32'(ridx) == i) begin
        stat_sel = stat[i];
        stat_hit = 1'b1;
      end
  end

  vci_rsp_t rsp_d;
  always_comb begin
    rsp_d        = '0;
    rsp_d.rspval = 1'b1;
    rsp_d.reop   = 1'b1;
    unique case (region)
      REGION_FIFO: begin
        rsp_d.rdata  = fifo_sel.rdata;
        rsp_d.rerror = !fifo_hit || fifo_sel.err;
      end
      REGION_CFG: begin
        rsp_d.rdata  = cfg_sel;
        rsp_d.rerror = !cfg_hit;
      end
      REGION_STAT: begin
        rsp_d.rdata  = stat_sel;
        rsp_d.rerror = !stat_hit || is_wr;
      end
      default: rsp_d.rerror = 1'b1;
    endcase
    if (!(s_req.cmd inside {VCI_READ, VCI_WRITE})) rsp_d.rerror = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsp_q <= '0;
    end else if (accept) begin
      rsp_q <= rsp_d;
    end else if (s_rspack) begin
      rsp_q.rspval <= 1'b0;
    end
  end

endmodule
