// tb_pixel_history_memory: writes random samples to random addresses while
// reading random addresses, and checks every read (one cycle latency)
// against an array model, including a read of an address written in the
// same cycle (old value returned).
`timescale 1ns/1ps
module tb_pixel_history_memory;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we;
  logic [6:0] waddr, raddr;
  logic [7:0] wdata, rdata;
  pixel_history_memory dut (.*);

  int checks = 0, failures = 0;
  logic [7:0] model [100];
  logic [7:0] expd;
  bit have;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0; have = 0;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk); we = 1; waddr = 7'(i); wdata = 8'($urandom); model[i] = wdata;
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (have) begin
        checks++;
        if (rdata != expd) begin failures++; $display("FAIL: read %h expected %h", rdata, expd); end
      end
      we = $urandom_range(0, 1); waddr = 7'($urandom_range(0, 99)); wdata = 8'($urandom);
      raddr = (i % 5 == 0) ? waddr : 7'($urandom_range(0, 99));
      expd = model[raddr]; have = 1;
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
