// vci_mem_model: behavioural VCI target memory for testbenches. A word
// memory of 2**AW_W words, byte address bits [AW_W+1:2]. It acknowledges a
// command after a random delay of 0..MAX_WAIT cycles (0: in the same cycle)
// and returns the response after another random delay of 0..MAX_WAIT cycles
// where 0 gives rspval the cycle after acceptance. One command is served at a time.
// Addresses at or above ERR_ADDR get an error response and are not written.
// It counts accepted writes and reads and keeps the address of the last one.
module vci_mem_model
  import cosy_pkg::*;
#(
  parameter int unsigned AW_W     = 10,
  parameter int unsigned MAX_WAIT = 2,
  parameter logic [31:0] ERR_ADDR = 32'hF000_0000
) (
  input  logic     clk,
  input  logic     rst_n,
  input  vci_req_t req,
  output logic     cmdack,
  output vci_rsp_t rsp,
  input  logic     rspack
);
  logic [31:0] mem [2**AW_W];
  int  n_writes = 0, n_reads = 0;
  int  cmd_wait, rsp_wait;
  bit  pending;
  logic [31:0] last_addr;

  initial begin
    for (int i = 0; i < 2**AW_W; i++) mem[i] = 32'hC0DE_0000 + i;
    cmd_wait = $urandom_range(0, MAX_WAIT);
  end

  assign cmdack = rst_n && !pending && (cmd_wait == 0);

  always @(posedge clk or negedge rst_n) begin
    int w;
    if (!rst_n) begin
      pending <= 0;
      rsp     <= '0;
    end else begin
      if (req.cmdval && !pending) begin
        if (cmd_wait == 0) begin
          pending   <= 1;
          w = $urandom_range(0, MAX_WAIT);
          if (w == 0) rsp.rspval <= 1'b1;
          else        rsp_wait   <= w;
          last_addr <= req.address;
          rsp.rerror <= (req.address >= ERR_ADDR);
          rsp.reop   <= 1'b1;
          if (req.cmd == VCI_WRITE) begin
            n_writes <= n_writes + 1;
            if (req.address < ERR_ADDR) mem[req.address[AW_W+1:2]] <= req.wdata;
            rsp.rdata <= '0;
          end else begin
            n_reads   <= n_reads + 1;
            rsp.rdata <= mem[req.address[AW_W+1:2]];
          end
          cmd_wait <= $urandom_range(0, MAX_WAIT);
        end else begin
          cmd_wait <= cmd_wait - 1;
        end
      end
      if (pending && !rsp.rspval) begin
        if (rsp_wait <= 1) rsp.rspval <= 1'b1;
        rsp_wait <= rsp_wait - 1;
      end
      if (rsp.rspval && rspack) begin
        rsp.rspval <= 1'b0;
        pending    <= 0;
      end
    end
  end
endmodule
