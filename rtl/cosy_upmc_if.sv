// cosy_upmc_if: generic coprocessor-to-bus communication interface for
// COSY channels, in three levels.
//
//   vector units   one per FIFO: turn the coprocessor's SYS vector reads and
//                  writes into item-by-item FIFO transfers (threshold
//                  protocol, optional interrupt per request)
//   service unit   the FIFOs with their state and threshold registers and
//                  interrupts, the configuration and status registers, the
//                  DMA address generators of master FIFOs, all served on a
//                  VCI target port
//   bus wrapper    not part of this module: the VCI ports are brought out so
//                  that a wrapper to the physical bus can be attached
//
// Defaults give the reference configuration: one slave input FIFO (index 0:
// software or another master writes, the coprocessor reads) and one slave
// output FIFO (index 1: the coprocessor writes, software reads), each 32 bits
// wide and 8 slots deep. Master FIFOs (N_MIN, N_MOUT) add VCI initiator
// ports, one per master FIFO; with none, m_req[0] is tied off.
//
// Coprocessor ports are arrays indexed by FIFO number (see
// upmc_service_unit). Per FIFO: a request (cop_req_valid, cop_req_len,
// cop_req_ready), an item stream into the interface (cop_wr_*, used by
// output FIFOs), an item stream out of it (cop_rd_*, used by input FIFOs)
// and cop_done, which pulses the cycle after the last item of the vector has
// moved. The unused stream of a FIFO is ignored (ready/valid held low).
// irq has one level-sensitive line per FIFO. cfg and stat are the general
// configuration and status registers shared with the coprocessor.
// The three-level structure, the parameters (number and kind of FIFOs,
// width, depth, register counts) and the reference sizes follow the
// described interface; handshakes, register map and defaults of the
// register counts are this design's own choices.
module cosy_upmc_if
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
  // coprocessor: SYS requests, one per FIFO
  input  logic              cop_req_valid [NF],
  input  logic [LEN_W-1:0]  cop_req_len   [NF],
  output logic              cop_req_ready [NF],
  output logic              cop_done      [NF],
  input  logic              cop_wr_valid  [NF],
  input  logic [WIDTH-1:0]  cop_wr_data   [NF],
  output logic              cop_wr_ready  [NF],
  output logic              cop_rd_valid  [NF],
  output logic [WIDTH-1:0]  cop_rd_data   [NF],
  input  logic              cop_rd_ready  [NF],
  output logic              cop_stalled   [NF],
  output logic [31:0]       cfg           [N_CFG],
  input  logic [31:0]       stat          [N_STAT],
  // interrupts
  output logic [NF-1:0]     irq,
  // VCI target (towards the bus wrapper)
  input  vci_req_t          s_req,
  output logic              s_cmdack,
  output vci_rsp_t          s_rsp,
  input  logic              s_rspack,
  // VCI initiators of master FIFOs
  output vci_req_t          m_req         [NMP],
  input  logic              m_cmdack      [NMP],
  input  vci_rsp_t          m_rsp         [NMP],
  output logic              m_rspack      [NMP]
);

  function automatic bit is_input_fifo(int unsigned k);
    return (k < N_SIN) || (k >= N_SIN + N_SOUT && k < N_SIN + N_SOUT + N_MIN);
  endfunction

  logic             cp_push      [NF];
  logic [WIDTH-1:0] cp_wdata     [NF];
  logic             cp_pop       [NF];
  logic [WIDTH-1:0] cp_rdata     [NF];
  logic [CW-1:0]    cp_count     [NF];
  logic [CW-1:0]    cp_free      [NF];
  logic             vu_req_pulse [NF];
  logic [LEN_W-1:0] vu_last_len  [NF];
  logic [LEN_W-1:0] vu_remaining [NF];

  generate
    for (genvar k = 0; k < NF; k++) begin : g_vu
      upmc_vector_unit #(
        .WIDTH(WIDTH), .DEPTH(DEPTH), .IS_INPUT(is_input_fifo(k))
      ) u_vu (
        .clk, .rst_n,
        .req_valid(cop_req_valid[k]), .req_len(cop_req_len[k]),
        .req_ready(cop_req_ready[k]), .done(cop_done[k]),
        .wr_valid(cop_wr_valid[k]), .wr_data(cop_wr_data[k]), .wr_ready(cop_wr_ready[k]),
        .rd_valid(cop_rd_valid[k]), .rd_data(cop_rd_data[k]), .rd_ready(cop_rd_ready[k]),
        .fifo_push(cp_push[k]), .fifo_wdata(cp_wdata[k]), .fifo_pop(cp_pop[k]),
        .fifo_rdata(cp_rdata[k]), .fifo_count(cp_count[k]), .fifo_free(cp_free[k]),
        .req_pulse(vu_req_pulse[k]), .last_len(vu_last_len[k]),
        .remaining(vu_remaining[k]), .busy(), .stalled(cop_stalled[k]), .wake()
      );
    end
  endgenerate

  upmc_service_unit #(
    .WIDTH(WIDTH), .DEPTH(DEPTH),
    .N_SIN(N_SIN), .N_SOUT(N_SOUT), .N_MIN(N_MIN), .N_MOUT(N_MOUT),
    .N_CFG(N_CFG), .N_STAT(N_STAT)
  ) u_svc (
    .clk, .rst_n,
    .s_req, .s_cmdack, .s_rsp, .s_rspack,
    .cp_push, .cp_wdata, .cp_pop, .cp_rdata, .cp_count, .cp_free,
    .vu_req_pulse, .vu_last_len, .vu_remaining,
    .irq, .cfg, .stat,
    .m_req, .m_cmdack, .m_rsp, .m_rspack
  );

endmodule
