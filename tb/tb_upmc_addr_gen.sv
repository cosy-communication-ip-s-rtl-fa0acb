// tb_upmc_addr_gen: self-checking test of the master FIFO address generator.
// Random configurations (base, stride, wrap, including stride 0 and wrap 0)
// are loaded and advanced at random; each address is compared with the
// closed form base + stride * (advances mod wrap).
module tb_upmc_addr_gen;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [31:0] base, stride, wrap, addr, index;
  logic load, advance;
  int checks = 0, failures = 0;

  upmc_addr_gen #(.AW(32)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: addr=%h index=%0d", what, $time, addr, index);
    end
  endtask

  initial begin
    longint unsigned n;
    logic [31:0] expect_addr;
    load = 0; advance = 0; base = '0; stride = '0; wrap = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int cfg = 0; cfg < 40; cfg++) begin
      base   = $urandom & 32'hFFFF_FFFC;
      stride = (cfg % 5 == 0) ? 32'd0 : 32'd4 * $urandom_range(1, 4);
      wrap   = (cfg % 7 == 0) ? 32'd0 : $urandom_range(1, 20);
      load = 1'b1;
      @(posedge clk); #1;
      load = 1'b0;
      n = 0;
      check(addr == base && index == 0, "after load");
      for (int i = 0; i < 60; i++) begin
        advance = 1'($urandom_range(0, 1));
        @(posedge clk); #1;
        if (advance) n++;
        expect_addr = base + stride * 32'((wrap == 0) ? n : n % wrap);
        check(addr == expect_addr, "address sequence");
        check(index == 32'((wrap == 0) ? n : n % wrap), "index");
      end
      advance = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
