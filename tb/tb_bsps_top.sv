// tb_bsps_top: end-to-end test of the whole system at its default
// parameters (4 cores, 100-sample history).
//   Phase 1, initialisation: for each of the 64 pixel locations of an 8x8
//   image a history of 100 values (one or two temperature modes) goes
//   through the model estimation unit; each mixture is checked against the
//   statistics of its history and stored in a memory model.
//   Phase 2, segmentation: 40 frames stream through the cores. Pixels are
//   drawn from each location's background modes; a hot object crosses part
//   of the image, one location changes its background for good and one sees
//   six different objects in a row (more than its mixture has slots). Every
//   write-back word is compared with an integer reference model, and the
//   updated mixture is stored for the next frame. A location's next pixel
//   is sent only after its previous result came back, as frame order in
//   memory guarantees in the real system. Load gaps and write-back
//   back-pressure are random in most frames; one frame runs unthrottled to
//   check the rate: cycles per pixel times the number of cores must stay
//   within the ~388 cycles per pixel and core implied by the reported
//   28.15 frames/s at 320x240 with 4 cores at 210 MHz.
// Every mechanism (FIFO-full stall, write-back stall, batch, fit update,
// new component in a free slot, replacement of the weakest component,
// background, foreground, model estimation, component pruning) is counted
// and must occur at least once.
`timescale 1ns/1ps
module tb_bsps_top;
  import bsps_pkg::*;
  import bsu_ref_pkg::*;
  import hist_gen_pkg::*;

  localparam int NPIX = 64, FRAMES = 40;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic   ld_valid, ld_ready, ld_batch_done, wb_valid, wb_ready;
  word_t  ld_word, wb_word;
  logic   hist_valid, hist_ready, model_valid, model_ready, meu_busy;
  pixel_t hist_pixel;
  gmm_t   model_gmm;

  bsps_top dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // mechanism counters
  int n_model = 0, n_pruned = 0, n_ldstall = 0, n_wbstall = 0, n_batch = 0;
  int n_fit = 0, n_free = 0, n_repl = 0, n_bg = 0, n_fg = 0;

  task automatic check(bit c, string s);
    checks++; if (!c) begin failures++; if (failures < 20) $display("FAIL: %s", s); end
  endtask

  initial begin
    #400ms; failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  scene_t scn [NPIX];
  gmm_t   dram [NPIX];
  bit     fresh [NPIX];          // result of the previous frame written back
  ref_res_t expq [$];
  int     expp [$];
  bit     throttle = 1;

  always @(posedge clk) begin
    if (ld_valid && !ld_ready) n_ldstall++;
    if (wb_valid && !wb_ready) n_wbstall++;
    if (rst_n && ld_batch_done) n_batch++;
  end

  function automatic int bg_sample(int p);
    scene_t s = scn[p];
    int c = $urandom_range(0, s.n_cl - 1);
    return s.centre[c] + $urandom_range(0, 2 * s.half[c]) - s.half[c];
  endfunction

  // ---------------- phase 1: model estimation ----------------
  task automatic estimate(int p);
    int h [$], lab [$], nc;
    gen(scn[p], 100, h, lab);
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      hist_valid = 1; hist_pixel = 8'(h[i]);
      while (!hist_ready) @(negedge clk);
      @(posedge clk); #1 hist_valid = 0;
    end
    while (!model_valid) @(negedge clk);
    failures += check_fit(scn[p], h, lab, model_gmm, checks);
    dram[p] = model_gmm;
    n_model++;
    nc = 0;
    for (int k = 0; k < K_MAX; k++) if (model_gmm[k].w != 0) nc++;
    if (nc < K_MAX) n_pruned++;
    model_ready = 1;
    @(posedge clk); #1 model_ready = 0;
  endtask

  // ---------------- phase 2: frames ----------------
  task automatic send_frame(int f);
    for (int p = 0; p < NPIX; p++) begin
      int x;
      ref_res_t r;
      x = bg_sample(p);
      if (f >= 12 && f < 24 && (p % 8) >= (f - 12) / 2 && (p % 8) < (f - 12) / 2 + 3 && p / 8 >= 2 && p / 8 < 5)
        x = 225 + $urandom_range(0, 4);          // hot object
      if (p == 63 && f >= 20) x = 150 + $urandom_range(0, 2);   // new background
      if (p == 7 && f >= 30 && f < 36) x = 130 + 25 * (f - 30);  // passing objects
      if (x < 0) x = 0;
      if (x > 255) x = 255;
      while (!fresh[p]) @(negedge clk);
      fresh[p] = 0;
      r = bsu_step(x, dram[p], 7, 40, 29491, 16'h0800, 16'h0080);
      expq.push_back(r); expp.push_back(p);
      @(negedge clk);
      if (throttle) while ($urandom_range(0, 3) == 0) @(negedge clk);
      ld_valid = 1;
      ld_word = '0; ld_word.pixel = 8'(x); ld_word.gmm = dram[p];
      while (!ld_ready) @(negedge clk);
      @(posedge clk); #1 ld_valid = 0;
    end
  endtask

  int received = 0;
  initial begin : consumer
    wb_ready = 0;
    forever begin
      @(negedge clk);
      wb_ready = throttle ? ($urandom_range(0, 2) != 0) : 1'b1;
      #1;
      if (wb_valid && wb_ready) begin
        ref_res_t r;
        int p;
        if (expq.size() == 0) begin
          check(0, "unexpected write-back word");
        end else begin
          r = expq.pop_front(); p = expp.pop_front();
          check(wb_word.fg == r.fg, $sformatf("fg of pixel %0d", p));
          check(wb_word.fit == r.fit, $sformatf("fit of pixel %0d", p));
          check(wb_word.gmm == r.gmm, $sformatf("mixture of pixel %0d", p));
          if (r.fit) n_fit++; else if (r.replaced_used) n_repl++; else n_free++;
          if (r.fg) n_bg += 0; else n_bg++;
          if (r.fg) n_fg++;
          dram[p] = wb_word.gmm;
          fresh[p] = 1;
          received++;
        end
      end
    end
  end

  initial begin : main
    int t0, npx_sent, fgmap;
    ld_valid = 0; ld_word = '0; hist_valid = 0; hist_pixel = '0; model_ready = 0;
    for (int p = 0; p < NPIX; p++) begin
      scn[p].n_cl = (p % 3 == 0) ? 2 : 1;
      scn[p].centre = '{60 + (p % 8) * 4, 110 + (p / 8) * 3, 0, 0};
      scn[p].half   = '{2 + p % 3, 3, 0, 0};
      fresh[p] = 1;
    end
    repeat (3) @(posedge clk); rst_n = 1;
    for (int p = 0; p < NPIX; p++) estimate(p);
    $display("models estimated at cycle %0d", cycle);
    for (int f = 0; f < FRAMES; f++) begin
      throttle = (f != 5);
      t0 = cycle;
      send_frame(f);
      while (received < (f + 1) * NPIX) @(negedge clk);
      if (f == 5) begin
        $display("unthrottled frame: %0d cycles for %0d pixels", cycle - t0, NPIX);
        check((cycle - t0) * 4 <= 388 * NPIX, "frame rate at least the reported one");
      end
    end
    $display("models=%0d pruned=%0d fifo_full_stalls=%0d wb_stalls=%0d batches=%0d",
             n_model, n_pruned, n_ldstall, n_wbstall, n_batch);
    $display("fit_updates=%0d new_in_free_slot=%0d replaced=%0d background=%0d foreground=%0d",
             n_fit, n_free, n_repl, n_bg, n_fg);
    check(n_model == NPIX, "every location modelled");
    check(n_pruned > 0, "component pruning happened");
    check(n_ldstall > 0, "FIFO-full stall happened");
    check(n_wbstall > 0, "write-back stall happened");
    check(n_batch == FRAMES * NPIX / 4, "one batch per four pixels");
    check(n_fit > 0, "fit update happened");
    check(n_free > 0, "new component in a free slot happened");
    check(n_repl > 0, "replacement of the weakest component happened");
    check(n_bg > 0 && n_fg > 0, "both classes seen");
    check(received == FRAMES * NPIX && expq.size() == 0, "every pixel written back once");
    // after the change, the new background at location 63 must be learnt
    check(dram[63][0].w != 0 || dram[63][1].w != 0, "location 63 still modelled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
