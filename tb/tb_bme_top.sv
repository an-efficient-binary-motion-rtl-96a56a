// tb_bme_top: end-to-end test of the binary motion estimation engine at its
// full size (16 PEs, 48x48 window, -16..+15 search range).
//
// Each search loads a reference window holding a noisy binary object and a
// current BAB cut from it (with its own noise), runs one search and checks
// against a reference model written here: class of every one of the 1024
// candidates, which rows start a SAD slot, the first minimum SAD in scan
// order, the motion vector (mvd and mvs = mvp + mvd), CurrMB, the number of
// slots and of SAD positions, and the latency 175 + 16*slots cycles.
// Mechanisms counted and required at least once: skipped positions, a slot
// with several matching PEs, matches in both passes, class overlap, a
// coarse class width, full-search mode and a search with no match.
module tb_bme_top;
  int checks = 0, failures = 0;
  logic        clk = 0, rst_n = 0;
  logic        cur_wr_en, sr_wr_en, full_search, start;
  logic [3:0]  cur_wr_row;
  logic [15:0] cur_wr_data;
  logic [5:0]  sr_wr_row;
  logic [47:0] sr_wr_data;
  logic [2:0]  class_shift;
  logic [7:0]  overlap;
  logic signed [7:0] mvp_x, mvp_y, mvs_x, mvs_y;
  logic        busy, done, mv_found;
  logic signed [5:0] mvd_x, mvd_y;
  logic [8:0]  best_sad, curr_mb;
  logic [6:0]  n_slots;
  logic [10:0] n_sp;

  // Window and current BAB as packed rows, bit 47 / bit 15 = leftmost pixel.
  logic [47:0] win [48];
  logic [15:0] cur [16];
  // Loop bounds held in variables so that the simulator keeps the loops.
  int nwin = 48, nbab = 16, npos = 32, npe = 16;

  int n_skip = 0, n_multi = 0, n_pass1 = 0, n_overlap = 0, n_coarse = 0,
      n_full = 0, n_nomatch = 0, n_searches = 0;

  bme_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int cls(int c, int s);
    return (c + (1 << s) - 1) >> s;
  endfunction

  task automatic make_scene(int cy, int cx, int rad, int dv, int dh, int noise_w, int noise_c);
    for (int r = 0; r < nwin; r++)
      for (int c = 0; c < nwin; c++)
        win[r][47-c] = ((r - cy) * (r - cy) + (c - cx) * (c - cx) < rad * rad) ^
                       ($urandom_range(0, 99) < noise_w);
    for (int r = 0; r < nbab; r++) begin
      cur[r] = win[r + dv][47-dh -: 16];
      for (int c = 0; c < nbab; c++)
        if ($urandom_range(0, 99) < noise_c) cur[r][c] = ~cur[r][c];
    end
  endtask

  task automatic load();
    for (int r = 0; r < nwin; r++) begin
      @(negedge clk);
      sr_wr_en = 1; sr_wr_row = 6'(r); sr_wr_data = win[r];
      if (r < 16) begin
        cur_wr_en = 1; cur_wr_row = 4'(r); cur_wr_data = cur[r];
      end else cur_wr_en = 0;
    end
    @(negedge clk);
    sr_wr_en = 0; cur_wr_en = 0;
  endtask

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL search %0d: %s", n_searches, what);
    end
  endtask

  task automatic search(int s, int ov, bit fs);
    int ccur, slots, sp, bsad, bh, bv, lat, cnt, sad, d;
    bit found, any, row_multi;
    n_searches++;
    load();
    class_shift = 3'(s); overlap = 8'(ov); full_search = fs;
    mvp_x = 8'sd3 * 8'(n_searches) - 8'sd20; mvp_y = 8'sd7 - 8'sd2 * 8'(n_searches);
    // reference model
    ccur = 0;
    for (int r = 0; r < nbab; r++) ccur += $countones(cur[r]);
    slots = 0; sp = 0; found = 0; bsad = 0; bh = 0; bv = 0;
    for (int p = 0; p < 2; p++)
      for (int v = 0; v < npos; v++) begin
        any = 0; row_multi = 0;
        for (int k = 0; k < npe; k++) begin
          int h;
          h = 16 * p + k;
          cnt = 0; sad = 0;
          for (int r = 0; r < nbab; r++) begin
            cnt += $countones(win[v + r][47-h -: 16]);
            sad += $countones(win[v + r][47-h -: 16] ^ cur[r]);
          end
          d = cls(cnt, s) - cls(ccur, s);
          if (d < 0) d = -d;
          if (fs || d <= ov) begin
            if (any) row_multi = 1;
            any = 1; sp++;
            if (p == 1) n_pass1++;
            if (!found || sad < bsad) begin found = 1; bsad = sad; bh = h; bv = v; end
          end
        end
        if (any) slots++;
        if (row_multi) n_multi++;
      end
    // run
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    lat = 1;
    while (!done && lat < 2000) begin @(negedge clk); lat++; end
    chk(lat == 175 + 16 * slots, $sformatf("latency %0d exp %0d", lat, 175 + 16 * slots));
    chk(int'(curr_mb) == ccur, $sformatf("curr_mb %0d exp %0d", curr_mb, ccur));
    chk(int'(n_slots) == slots, $sformatf("slots %0d exp %0d", n_slots, slots));
    chk(int'(n_sp) == sp, $sformatf("search positions %0d exp %0d", n_sp, sp));
    chk(mv_found == found, $sformatf("found %0d exp %0d", mv_found, found));
    if (found) begin
      chk(int'(best_sad) == bsad, $sformatf("sad %0d exp %0d", best_sad, bsad));
      chk(int'(mvd_x) == bh - 16 && int'(mvd_y) == bv - 16,
          $sformatf("mvd (%0d,%0d) exp (%0d,%0d)", mvd_x, mvd_y, bh - 16, bv - 16));
      chk(int'(mvs_x) == int'(mvp_x) + bh - 16 && int'(mvs_y) == int'(mvp_y) + bv - 16, "mvs");
    end else n_nomatch++;
    if (sp < 1024) n_skip++;
    if (ov > 0 && !fs) n_overlap++;
    if (s > 0 && !fs) n_coarse++;
    if (fs) n_full++;
    $display("search %0d: shift=%0d overlap=%0d full=%0d curr_mb=%0d slots=%0d sp=%0d cycles=%0d mvd=(%0d,%0d) sad=%0d found=%0d",
             n_searches, s, ov, fs, curr_mb, n_slots, n_sp, lat, mvd_x, mvd_y, best_sad, mv_found);
    // results hold after done
    repeat (3) @(negedge clk);
    chk(!busy, "idle after done");
  endtask

  initial begin
    cur_wr_en = 0; sr_wr_en = 0; full_search = 0; start = 0;
    cur_wr_row = 0; cur_wr_data = 0; sr_wr_row = 0; sr_wr_data = 0;
    class_shift = 0; overlap = 0; mvp_x = 0; mvp_y = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 256 classes, no overlap: exact copy of a window block
    make_scene(24, 22, 11, 18, 9, 0, 0);   search(0, 0, 0);
    // noisy current BAB, overlap of 6 classes
    make_scene(22, 27, 12, 13, 20, 2, 3);  search(0, 6, 0);
    // 16 classes (16 ones per class), no overlap
    make_scene(25, 24, 14, 10, 13, 3, 2);  search(4, 0, 0);
    // 32 classes with 1 class of overlap
    make_scene(20, 30, 13, 16, 22, 1, 1);  search(3, 1, 0);
    // full search
    make_scene(24, 24, 10, 17, 15, 2, 2);  search(0, 0, 1);
    // no candidate matches: opaque current BAB against a thin object
    make_scene(24, 24, 5, 0, 0, 0, 0);
    for (int r = 0; r < 16; r++) cur[r] = 16'hFFFF;
    search(0, 0, 0);
    // a few random scenes
    for (int t = 0; t < 4; t++) begin
      make_scene($urandom_range(14, 34), $urandom_range(14, 34), $urandom_range(6, 16),
                 $urandom_range(0, 31), $urandom_range(0, 31), 2, 2);
      search($urandom_range(0, 3), $urandom_range(0, 4), 0);
    end
    chk(n_skip > 0, "no search skipped a position");
    chk(n_multi > 0, "no slot with several matching PEs");
    chk(n_pass1 > 0, "no match in the second pass");
    chk(n_overlap > 0, "overlap never used");
    chk(n_coarse > 0, "coarse classes never used");
    chk(n_full > 0, "full search never used");
    chk(n_nomatch > 0, "no-match search never seen");
    $display("mechanisms: skip=%0d multi=%0d pass1=%0d overlap=%0d coarse=%0d full=%0d nomatch=%0d",
             n_skip, n_multi, n_pass1, n_overlap, n_coarse, n_full, n_nomatch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
