// tb_writeback_collect: each core model holds a queue of numbered results and
// offers them at random times; checks that results leave in global order
// (core 0, 1, .., N-1, 0, ..) under random output back-pressure.
`timescale 1ns/1ps
module tb_writeback_collect;
  localparam int N = 4, W = 256;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0] in_valid, in_ready;
  logic [W-1:0] in_data [N];
  logic out_valid, out_ready;
  logic [W-1:0] out_data;
  writeback_collect #(.N_CORES(N), .WIDTH(W)) dut (.*);

  int checks = 0, failures = 0, got = 0;
  int nxt [N];
  bit offer [N];
  bit hs_in [N];
  bit hs_out;

  task automatic check(bit c, string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    out_ready = 0;
    for (int c = 0; c < N; c++) begin nxt[c] = c; offer[c] = 0; end
    in_valid = '0;
    for (int c = 0; c < N; c++) in_data[c] = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 1500; i++) begin
      @(negedge clk);
      for (int c = 0; c < N; c++) begin
        if (!offer[c]) offer[c] = $urandom_range(0, 2) == 0;
        in_valid[c] = offer[c];
        in_data[c]  = W'(nxt[c]);
      end
      out_ready = $urandom_range(0, 1);
      #1;
      for (int c = 0; c < N; c++) hs_in[c] = in_valid[c] && in_ready[c];
      hs_out = out_valid && out_ready;
      if (out_valid) check(out_data == W'(got), $sformatf("order: exp %0d got %0d", got, out_data));
      check(out_valid == in_valid[got % N], "valid from the core in turn");
      @(posedge clk);
      for (int c = 0; c < N; c++)
        if (hs_in[c]) begin
          nxt[c] += N; offer[c] = 0;
        end
      if (hs_out) got++;
    end
    check(got > 100, "results flowed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
