// cosy_pkg: types and constants shared by the UPMC communication interface.
//
// The interface connects a hardware coprocessor to a system bus through the
// VCI (Virtual Component Interface) request/response protocol. This package
// holds the single-word VCI request and response records used on the target
// (slave) port and on the DMA initiator (master) ports, the internal register
// access record that the service unit hands to each FIFO unit, and the
// register map. The record layout is a reduced Basic-VCI: one word per packet
// (eop always 1), a two-phase valid/ack handshake on command and response.
// The field set, the encodings and the register map are this design's own
// choice; only the use of VCI as the bus-independent interface is given.
package cosy_pkg;

  localparam int unsigned VCI_AW = 32;  // VCI address width (bytes)
  localparam int unsigned VCI_DW = 32;  // VCI data width
  localparam int unsigned LEN_W  = 16;  // width of a vector length / item count

  // VCI command codes (Basic VCI encoding: 01 read, 10 write)
  typedef enum logic [1:0] {
    VCI_NOP   = 2'b00,
    VCI_READ  = 2'b01,
    VCI_WRITE = 2'b10
  } vci_cmd_e;

  // Command phase, initiator -> target. Held stable while cmdval && !cmdack.
  typedef struct packed {
    logic              cmdval;
    logic [VCI_AW-1:0] address;
    vci_cmd_e          cmd;
    logic [3:0]        be;
    logic [VCI_DW-1:0] wdata;
    logic              eop;
  } vci_req_t;

  // Response phase, target -> initiator. Held stable while rspval && !rspack.
  typedef struct packed {
    logic              rspval;
    logic [VCI_DW-1:0] rdata;
    logic              rerror;
    logic              reop;
  } vci_rsp_t;

  // Register access from the service unit to one FIFO unit (one cycle, the
  // cycle the VCI command is accepted). off is the word offset in the window.
  typedef struct packed {
    logic        we;
    logic        re;
    logic [3:0]  off;
    logic [31:0] wdata;
  } reg_req_t;

  typedef struct packed {
    logic [31:0] rdata;
    logic        err;
  } reg_rsp_t;

  // ---- register map (byte address bits [11:0] of a VCI access) ----------
  // [11:10] = 00 : FIFO windows, FIFO index in [9:6], word offset in [5:2]
  // [11:10] = 10 : configuration registers, index in [9:2]  (read/write)
  // [11:10] = 11 : status registers, index in [9:2]         (read only)
  // [11:10] = 01 : unmapped (error response)
  localparam logic [1:0] REGION_FIFO = 2'b00;
  localparam logic [1:0] REGION_CFG  = 2'b10;
  localparam logic [1:0] REGION_STAT = 2'b11;

  // word offsets inside a FIFO window
  localparam logic [3:0] FR_DATA   = 4'd0;  // slave FIFOs: push (input) / pop (output)
  localparam logic [3:0] FR_STATE  = 4'd1;  // RO: number of free slots
  localparam logic [3:0] FR_THRESH = 4'd2;  // RW: threshold on the state
  localparam logic [3:0] FR_CTRL   = 4'd3;  // RW: bit0 THR_IE, bit1 REQ_IE, bit2 DMA_EN, bit3 CNT_EN, bit4 DONE_IE
  localparam logic [3:0] FR_IRQ    = 4'd4;  // bit0 threshold cond (RO), bit1 request, bit2 DMA retry, bit3 count done (W1C)
  localparam logic [3:0] FR_REQLEN = 4'd5;  // RO: [15:0] last vector length, [31:16] items remaining
  localparam logic [3:0] FR_BASE   = 4'd6;  // master FIFOs: address generator base
  localparam logic [3:0] FR_STRIDE = 4'd7;  // master FIFOs: address increment in bytes
  localparam logic [3:0] FR_WRAP   = 4'd8;  // master FIFOs: items before returning to base (0: never)
  localparam logic [3:0] FR_ADDR   = 4'd9;  // master FIFOs: RO current address
  localparam logic [3:0] FR_COUNT  = 4'd10; // master FIFOs: transfers left in counted mode

  localparam int unsigned CTRL_THR_IE = 0;
  localparam int unsigned CTRL_REQ_IE = 1;
  localparam int unsigned CTRL_DMA_EN = 2;
  localparam int unsigned CTRL_CNT_EN = 3;
  localparam int unsigned CTRL_DONE_IE = 4;

  localparam int unsigned IRQ_THR = 0;
  localparam int unsigned IRQ_REQ = 1;
  localparam int unsigned IRQ_ERR = 2;
  localparam int unsigned IRQ_DONE = 3;

  // FIFO kinds, in the order the service unit numbers them
  typedef enum logic [1:0] {
    FK_SLAVE_IN   = 2'd0,  // bus writes, coprocessor reads
    FK_SLAVE_OUT  = 2'd1,  // coprocessor writes, bus reads
    FK_MASTER_IN  = 2'd2,  // DMA reads from the bus, coprocessor reads
    FK_MASTER_OUT = 2'd3   // coprocessor writes, DMA writes to the bus
  } fifo_kind_e;

endpackage
