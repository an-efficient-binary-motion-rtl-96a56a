// tb_bme_workload: shape-coding workload on a CIF-sized (352x288) binary
// object plane.
//
// Two frames of a synthetic object (an ellipse joined with a rectangle that
// moves by a few pixels and changes slightly between frames) are generated.
// Every boundary BAB of the current frame (neither all 0 nor all 1) is
// searched in a +/-16 window of the reference frame centred on its own
// position (predictor 0; pixels outside the frame read as 0) with three
// settings: 256 classes without overlap, 256 classes with 6 classes of
// overlap, and full search. Each search is checked against a reference
// search in this file (motion vector, SAD, slots, latency 175 + 16*slots).
// The run prints, per setting, the SAD positions relative to full search,
// the average cycles per BAB and the average SAD of the chosen vectors.
module tb_bme_workload;
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

  localparam int FW = 352, FH = 288;
  logic [FW-1:0] ref_f [FH];   // bit FW-1 = leftmost pixel
  logic [FW-1:0] cur_f [FH];
  logic [47:0]   win [48];
  logic [15:0]   cur [16];
  int nfw = FW, nfh = FH, nwin = 48, nbab = 16, npos = 32, npe = 16;

  int tot_sp [3], tot_cyc [3], tot_sad [3], nbabs = 0;

  bme_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit inside_obj(int y, int x, int cy, int cx, int ay, int ax);
    return ((y - cy) * (y - cy) * ax * ax + (x - cx) * (x - cx) * ay * ay < ay * ay * ax * ax) ||
           (y > cy && y < cy + ay + 20 && x > cx - 25 && x < cx + 30);
  endfunction

  function automatic bit pix(int y, int x);
    if (y < 0 || y >= nfh || x < 0 || x >= nfw) return 0;
    return ref_f[y][FW-1-x];
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic run_one(int cfg);
    int ccur, slots, sp, bsad, bh, bv, cnt, sad, d, lat, ov;
    bit found, any, fs;
    ov = (cfg == 1) ? 6 : 0;
    fs = (cfg == 2);
    class_shift = 0; overlap = 8'(ov); full_search = fs; mvp_x = 0; mvp_y = 0;
    ccur = 0;
    for (int r = 0; r < nbab; r++) ccur += $countones(cur[r]);
    slots = 0; sp = 0; found = 0; bsad = 0; bh = 0; bv = 0;
    for (int p = 0; p < 2; p++)
      for (int v = 0; v < npos; v++) begin
        any = 0;
        for (int k = 0; k < npe; k++) begin
          int h;
          h = 16 * p + k;
          cnt = 0; sad = 0;
          for (int r = 0; r < nbab; r++) begin
            cnt += $countones(win[v + r][47-h -: 16]);
            sad += $countones(win[v + r][47-h -: 16] ^ cur[r]);
          end
          d = cnt - ccur;
          if (d < 0) d = -d;
          if (fs || d <= ov) begin
            any = 1; sp++;
            if (!found || sad < bsad) begin found = 1; bsad = sad; bh = h; bv = v; end
          end
        end
        if (any) slots++;
      end
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    lat = 1;
    while (!done && lat < 2000) begin @(negedge clk); lat++; end
    chk(lat == 175 + 16 * slots, $sformatf("latency %0d exp %0d", lat, 175 + 16 * slots));
    chk(int'(n_sp) == sp && int'(n_slots) == slots, "positions/slots");
    chk(mv_found == found, "found");
    if (found) chk(int'(best_sad) == bsad && int'(mvd_x) == bh - 16 && int'(mvd_y) == bv - 16,
                   $sformatf("mv (%0d,%0d) sad %0d exp (%0d,%0d) %0d", mvd_x, mvd_y, best_sad,
                             bh - 16, bv - 16, bsad));
    tot_sp[cfg]  += sp;
    tot_cyc[cfg] += lat;
    // an unmatched BAB would be intra coded: count its SAD as 256
    tot_sad[cfg] += found ? bsad : 256;
  endtask

  initial begin
    int ones, y0, x0;
    cur_wr_en = 0; sr_wr_en = 0; full_search = 0; start = 0;
    cur_wr_row = 0; cur_wr_data = 0; sr_wr_row = 0; sr_wr_data = 0;
    class_shift = 0; overlap = 0; mvp_x = 0; mvp_y = 0;
    for (int c = 0; c < 3; c++) begin tot_sp[c] = 0; tot_cyc[c] = 0; tot_sad[c] = 0; end
    // frames: reference object and the moved, slightly reshaped current object
    for (int y = 0; y < nfh; y++)
      for (int x = 0; x < nfw; x++) begin
        ref_f[y][FW-1-x] = inside_obj(y, x, 130, 170, 80, 60);
        cur_f[y][FW-1-x] = inside_obj(y, x, 133, 175, 81, 59);
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int by = 0; by < nfh / 16; by++)
      for (int bx = 0; bx < nfw / 16; bx++) begin
        y0 = 16 * by; x0 = 16 * bx;
        ones = 0;
        for (int r = 0; r < nbab; r++) begin
          cur[r] = cur_f[y0 + r][FW-1-x0 -: 16];
          ones += $countones(cur[r]);
        end
        if (ones == 0 || ones == 256) continue;
        nbabs++;
        for (int r = 0; r < nwin; r++)
          for (int c = 0; c < nwin; c++)
            win[r][47-c] = pix(y0 - 16 + r, x0 - 16 + c);
        for (int r = 0; r < nwin; r++) begin
          @(negedge clk);
          sr_wr_en = 1; sr_wr_row = 6'(r); sr_wr_data = win[r];
          cur_wr_en = (r < 16); cur_wr_row = 4'(r); cur_wr_data = cur[r % 16];
        end
        @(negedge clk);
        sr_wr_en = 0; cur_wr_en = 0;
        for (int cfg = 0; cfg < 3; cfg++) run_one(cfg);
      end
    chk(nbabs > 20, "too few boundary BABs");
    chk(tot_sp[0] < tot_sp[1] && tot_sp[1] < tot_sp[2], "overlap must add positions");
    chk(tot_sad[2] <= tot_sad[1] && tot_sad[1] <= tot_sad[0], "SAD ordering");
    for (int c = 0; c < 3; c++)
      $display("setting %0d (%s): BABs=%0d SAD positions=%0d (%0.2f%% of full search) avg cycles/BAB=%0.1f avg SAD=%0.2f",
               c, c == 0 ? "256 classes" : c == 1 ? "256 classes, overlap 6" : "full search",
               nbabs, tot_sp[c], 100.0 * tot_sp[c] / (1024.0 * nbabs),
               real'(tot_cyc[c]) / nbabs, real'(tot_sad[c]) / nbabs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
