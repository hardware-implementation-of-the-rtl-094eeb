// tb_preproc_seg: self-checking test of the segmentation unit.
//
// Streams random frames with a noisy background and a few bright streaks
// into preproc_seg (small image, WIN = 4) and compares every emitted segment
// with a reference model written here at the behavioural level: background =
// mean of the previous WIN pixels, a segment starts above BKG + tau, continues
// above the latched BKG + tau, ends at a lower pixel or the row end. Also
// checks the 3-cycle output latency and the frame_done pulse.
module tb_preproc_seg;
  import spot_pkg::*;
  localparam int W = 24, H = 10, WIN = 4, PW = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [PW-1:0] tau, pix;
  logic pix_valid, pix_sof, seg_valid, frame_done;
  segment_t seg;
  preproc_seg #(.IMG_W(W), .IMG_H(H), .PIX_W(PW), .WIN(WIN)) dut (
    .clk, .rst_n, .tau, .pix_valid, .pix_sof, .pix, .seg_valid, .seg, .frame_done);

  int checks = 0, failures = 0;
  int img [H][W];
  segment_t exp_q[$];
  int close_idx[$];
  longint pcyc [H*W];
  int cur_idx;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic model();
    int hist[$]; int bkg, bl, inseg, sum, xs, pxs, len, cs, r0;
    segment_t s;
    hist = {};
    for (int r = 0; r < H; r++) begin
      inseg = 0;
      for (int c = 0; c < W; c++) begin
        int p, over_new, over_cont, lastc;
        p = img[r][c];
        bkg = 0;
        if (hist.size() >= WIN) for (int k = 0; k < WIN; k++) bkg += hist[hist.size()-1-k];
        bkg = bkg / WIN;
        over_new  = (hist.size() >= WIN) && (p > bkg + tau);
        over_cont = inseg && (p > bl + tau);
        lastc = (c == W-1);
        if (inseg && (!over_cont || lastc)) begin
          if (over_cont) begin sum += p; xs += c; pxs += c*p; len++; end
          s.row = r0; s.col_s = cs; s.col_e = over_cont ? c : c-1;
          s.e = sum - bl*len; s.ey = pxs - bl*xs;
          exp_q.push_back(s); close_idx.push_back(r*W+c);
          inseg = 0;
        end else if (!inseg && over_new) begin
          bl = bkg; sum = p; xs = c; pxs = c*p; len = 1; cs = c; r0 = r; inseg = 1;
          if (lastc) begin
            s.row = r; s.col_s = c; s.col_e = c; s.e = p - bl; s.ey = c*(p-bl);
            exp_q.push_back(s); close_idx.push_back(r*W+c); inseg = 0;
          end
        end else if (inseg) begin
          sum += p; xs += c; pxs += c*p; len++;
        end
        hist.push_back(p);
      end
    end
  endtask

  int got = 0, nsegs_total = 0, fdone = 0;
  always @(posedge clk) if (seg_valid) begin
    segment_t e;
    got++;
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("unexpected segment"); end
    else begin
      e = exp_q.pop_front();
      if (seg !== e) begin
        failures++;
        $display("MISMATCH row %0d cs %0d ce %0d e %0d ey %0d / exp row %0d cs %0d ce %0d e %0d ey %0d",
          seg.row, seg.col_s, seg.col_e, seg.e, seg.ey, e.row, e.col_s, e.col_e, e.e, e.ey);
      end
    end
  end

  // latency: segment closed by pixel at cycle t appears at t+3
  always @(posedge clk) if (seg_valid) begin
    checks++;
    if (close_idx.size() == 0 || cyc - pcyc[close_idx.pop_front()] != 3) begin
      failures++; $display("latency error");
    end
  end
  always @(posedge clk) if (pix_valid) pcyc[cur_idx] = cyc;
  always @(posedge clk) if (frame_done) fdone++;

  initial begin
    #2000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tau = 20; pix_valid = 0; pix_sof = 0; pix = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 6; f++) begin
      for (int r = 0; r < H; r++) for (int c = 0; c < W; c++)
        img[r][c] = 30 + $urandom_range(0, 10);
      // streaks and blobs, some touching the row end
      for (int k = 0; k < 5; k++) begin
        automatic int r0 = $urandom_range(0, H-1), c0 = $urandom_range(0, W-1), l = $urandom_range(1, 6);
        for (int i = 0; i < l && c0+i < W; i++) img[r0][c0+i] = 80 + $urandom_range(0, 150);
      end
      img[2][W-1] = 200;
      model();
      nsegs_total += exp_q.size();
      for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) begin
        // occasional idle cycles
        if ($urandom_range(0, 7) == 0) begin
          @(negedge clk); pix_valid = 0;
        end
        @(negedge clk);
        pix_valid = 1; pix_sof = (r == 0 && c == 0); pix = PW'(img[r][c]); cur_idx = r*W+c;
      end
      @(negedge clk); pix_valid = 0; pix_sof = 0;
      repeat (10) @(posedge clk);
      checks++;
      if (exp_q.size() != 0) begin failures++; $display("missing %0d segments", exp_q.size()); exp_q = {}; close_idx = {}; end
    end
    checks++;
    if (fdone != 6) begin failures++; $display("frame_done count %0d", fdone); end
    checks++;
    if (nsegs_total < 20) begin failures++; $display("too few segments %0d", nsegs_total); end
    $display("segments checked: %0d", got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
