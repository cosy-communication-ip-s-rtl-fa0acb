// upmc_addr_gen: run-time configurable address generator of a master FIFO.
//
// Produces the bus address of the next DMA transfer. load restarts it at
// base. Each advance adds stride to the address; after wrap advances the
// address returns to base, so a buffer of wrap items in memory is walked as a
// ring (wrap = 0 never returns). stride = 0 keeps the address fixed, which is
// how a master FIFO pushes into another interface's slave FIFO data register.
// addr is registered and changes the cycle after load or advance; load wins
// over advance. That a master FIFO has a run-time configurable address
// generator is given; base/stride/wrap as its configuration is this design's
// own choice.
module upmc_addr_gen #(
  parameter int unsigned AW = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] base,
  input  logic [AW-1:0] stride,
  input  logic [31:0]   wrap,
  input  logic          load,
  input  logic          advance,
  output logic [AW-1:0] addr,
  output logic [31:0]   index
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr  <= '0;
      index <= '0;
    end else if (load) begin
      addr  <= base;
      index <= '0;
    end else if (advance) begin
      if (wrap != '0 && index + 1 == wrap) begin
        addr  <= base;
        index <= '0;
      end else begin
        addr  <= addr + stride;
        index <= index + 1;
      end
    end
  end

endmodule
