// tb_sync_fifo: random push/pop traffic against a queue model; checks data
// order, the full and empty flags against the occupancy and the count output.
`timescale 1ns/1ps
module tb_sync_fifo;
  localparam int W = 256, D = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;
  logic [$clog2(D+1)-1:0] count;
  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  int checks = 0, failures = 0, n_full = 0, n_empty = 0;
  logic [W-1:0] q[$];
  bit hs_in, hs_out;

  task automatic check(bit c, string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      in_valid  = ($urandom_range(0, 3) != 0) ^ (i > 1000 && i < 1200);
      out_ready = ($urandom_range(0, 2) != 0) && !(i > 400 && i < 500);
      for (int j = 0; j < W / 32; j++) in_data[j*32 +: 32] = $urandom;
      #1;
      hs_in = in_valid && in_ready; hs_out = out_valid && out_ready;
      check(in_ready == (q.size() < D), "in_ready matches occupancy");
      check(out_valid == (q.size() > 0), "out_valid matches occupancy");
      check(count == q.size(), "count");
      if (out_valid) check(out_data == q[0], "data order");
      if (q.size() == D) n_full++;
      if (q.size() == 0) n_empty++;
      @(posedge clk);
      if (hs_out) void'(q.pop_front());
      if (hs_in) q.push_back(in_data);
    end
    check(n_full > 0 && n_empty > 0, "full and empty reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
