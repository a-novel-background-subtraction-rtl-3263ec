// tb_load_dispatch: feeds numbered words with random core back-pressure and
// checks that word n reaches core n mod N_CORES, that the bus stalls exactly
// when the addressed core is not ready, and that batch_done marks each
// completed batch.
`timescale 1ns/1ps
module tb_load_dispatch;
  localparam int N = 4, W = 256;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, batch_done;
  logic [W-1:0] in_data, out_data;
  logic [N-1:0] out_valid, out_ready;
  load_dispatch #(.N_CORES(N), .WIDTH(W)) dut (.*);

  int checks = 0, failures = 0, sent = 0, batches = 0, stalls = 0;
  bit hs;

  task automatic check(bit c, string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    in_valid = 0; out_ready = '0; in_data = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      in_valid  = $urandom_range(0, 3) != 0;
      in_data   = W'(sent);
      out_ready = N'($urandom);
      #1;
      hs = in_valid && in_ready;
      check(out_data == in_data, "broadcast data");
      check(out_valid == (in_valid ? N'(1) << (sent % N) : '0), "addressed core");
      check(in_ready == out_ready[sent % N], "stall follows addressed core");
      if (in_valid && !in_ready) stalls++;
      @(posedge clk);
      if (hs) begin
        sent++;
        #1 check(batch_done == (sent % N == 0), "batch_done");
        if (batch_done) batches++;
      end else begin
        #1 check(!batch_done, "no batch_done without transfer");
      end
    end
    check(batches > 10 && stalls > 10, "batches and stalls seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
