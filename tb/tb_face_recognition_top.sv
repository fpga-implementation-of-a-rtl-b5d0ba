// tb_face_recognition_top: end-to-end test of the face recognition datapath
// at its full size (40 Gabor filters of 1024 taps, 100 training vectors).
//
// The testbench builds its own data: 40 Gabor kernels (5 scales x 8
// orientations, kmax = pi/2, f = sqrt(2), sigma = pi, 32 x 32 window, real
// part, quantised to Q1.15), a synthetic 112x92 face and, for every run, a
// database of 100 vectors made of noisy copies of the expected feature
// vector plus one exact copy. The expected feature vector is computed here
// by direct convolution of the facial window with each kernel, taking
// max(|f| >> 15) saturated to 16 bits; the expected match is the first
// minimum of the City Block distances over the enrolled vectors.
//
// Runs: eye, nose and mouth regions, one with a partly filled database.
// Checked: the 40 features, the match index and distance, and the clock
// counts of the filtering and classification phases. Counted mechanisms:
// each region kind, filter back-pressure on the pixel register, maximum
// updates in the comparators, a partly filled database.
module tb_face_recognition_top;
  import face_pkg::*;

  localparam int NF = NUM_FILTERS;
  localparam int NT = TAPS;
  localparam int N  = N_TRAIN;
  localparam int L  = FEAT_LEN;
  localparam int KW = 32;            // kernel window edge

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                        start = 1'b0;
  region_e                     region_sel = REG_EYE;
  logic                        img_valid = 1'b0;
  logic [PIX_W-1:0]            img_pix = '0;
  logic                        coef_we = 1'b0;
  logic [$clog2(NF)-1:0]       coef_filt = '0;
  logic [$clog2(NT/DA_K)-1:0]  coef_grp = '0;
  logic [DA_K-1:0][COEF_W-1:0] coef_data = '0;
  logic                        db_we = 1'b0;
  logic [$clog2(N)-1:0]        db_vec = '0;
  logic [$clog2(L)-1:0]        db_idx = '0;
  logic [FEAT_W-1:0]           db_data = '0;
  logic [$clog2(N):0]          n_valid = '0;
  logic                        busy, feat_valid, match_valid;
  logic [L-1:0][FEAT_W-1:0]    feat;
  logic [$clog2(N)-1:0]        match_idx;
  logic [DIST_W-1:0]           match_dist;

  face_recognition_top dut (.*);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters
  int n_eye = 0, n_nose = 0, n_mouth = 0, n_backpressure = 0, n_max_update = 0, n_partial_db = 0;
  always @(posedge clk) begin
    if (dut.u_fe.reg_valid && !dut.u_fe.fir_rfd && dut.u_fe.busy) n_backpressure++;
    if (dut.u_fe.fir_rdy && dut.u_fe.g_cmp[0].u_cmp.intensity > dut.u_fe.feat[0]) n_max_update++;
  end

  int coef [NF][NT];
  int img  [IMG_ROWS][IMG_COLS];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Gabor kernels: scale s = f / 8, orientation o = f % 8.
  task automatic make_kernels();
    real kmax = 3.14159265358979 / 2.0, fs = $sqrt(2.0), sg = 3.14159265358979;
    for (int f = 0; f < NF; f++) begin
      int  s = f / NUM_ORIENTS, o = f % NUM_ORIENTS;
      real kv = kmax / (fs ** s), phi = 3.14159265358979 * o / 8.0;
      for (int n = 0; n < KW; n++)
        for (int m = 0; m < KW; m++) begin
          real y = n - KW/2, x = m - KW/2, g, q;
          g = (kv*kv/(sg*sg)) * $exp(-kv*kv*(x*x + y*y)/(2.0*sg*sg)) *
              ($cos(kv*(x*$cos(phi) + y*$sin(phi))) - $exp(-sg*sg/2.0));
          q = g * 32768.0;
          if (q > 32767.0) q = 32767.0;
          if (q < -32768.0) q = -32768.0;
          coef[f][n*KW + m] = int'(q);
        end
    end
  endtask

  // Synthetic face: bright oval, two dark eyes, a dark mouth, noise.
  task automatic make_image();
    for (int r = 0; r < IMG_ROWS; r++)
      for (int c = 0; c < IMG_COLS; c++) begin
        real v;
        v = 60.0 + 120.0 * $exp(-((r-56.0)*(r-56.0)/900.0 + (c-46.0)*(c-46.0)/500.0));
        v -= 70.0 * $exp(-((r-50.0)*(r-50.0) + (c-30.0)*(c-30.0)) / 20.0);
        v -= 70.0 * $exp(-((r-50.0)*(r-50.0) + (c-62.0)*(c-62.0)) / 20.0);
        v -= 50.0 * $exp(-((r-89.0)*(r-89.0)/6.0 + (c-46.0)*(c-46.0)/120.0));
        v += 30.0 * $exp(-((r-70.0)*(r-70.0)/30.0 + (c-46.0)*(c-46.0)/8.0));
        v += real'($urandom_range(0, 24));
        if (v < 0.0) v = 0.0;
        if (v > 255.0) v = 255.0;
        img[r][c] = int'(v);
      end
  endtask

  // Facial windows, 1-based inclusive (row, column) ranges.
  function automatic void window(region_e r, output int r0, r1, c0, c1);
    case (r)
      REG_EYE:  begin r0 = 40; r1 = 60; c0 = 5;  c1 = 90; end
      REG_NOSE: begin r0 = 60; r1 = 80; c0 = 21; c1 = 77; end
      default:  begin r0 = 80; r1 = 98; c0 = 19; c1 = 77; end
    endcase
  endfunction

  function automatic void ref_features(region_e r, output int fv [L], output int len);
    int r0, r1, c0, c1;
    int xs [$];
    window(r, r0, r1, c0, c1);
    for (int y = r0; y <= r1; y++)
      for (int x = c0; x <= c1; x++) xs.push_back(img[y-1][x-1]);
    len = xs.size();
    for (int f = 0; f < NF; f++) begin
      longint best = 0;
      for (int n = 0; n < len; n++) begin
        longint s = 0, mag;
        int kmax_i = (n < NT) ? n : NT - 1;
        for (int k = 0; k <= kmax_i; k++) s += longint'(coef[f][k]) * longint'(xs[n-k]);
        mag = (s < 0) ? -s : s;
        mag = mag >>> OUT_SHIFT;
        if (mag > 65535) mag = 65535;
        if (mag > best) best = mag;
      end
      fv[f] = int'(best);
    end
  endfunction

  task automatic load_coefs();
    for (int f = 0; f < NF; f++)
      for (int g = 0; g < NT / DA_K; g++) begin
        @(negedge clk);
        coef_we = 1'b1; coef_filt = $bits(coef_filt)'(f); coef_grp = $bits(coef_grp)'(g);
        for (int i = 0; i < DA_K; i++) coef_data[i] = COEF_W'(coef[f][g*DA_K + i]);
      end
    @(negedge clk) coef_we = 1'b0;
  endtask

  int db [N][L];

  // Database of noisy copies of fv with an exact copy at index target.
  task automatic load_db(const ref int fv [L], int target);
    for (int j = 0; j < N; j++)
      for (int i = 0; i < L; i++) begin
        int v = fv[i];
        if (j != target) v += $urandom_range(1, 40) * ((($urandom & 1) != 0) ? 1 : -1) * (j % 7 + 1);
        if (v < 0) v = 0;
        if (v > 65535) v = 65535;
        db[j][i] = v;
        @(negedge clk);
        db_we = 1'b1; db_vec = $bits(db_vec)'(j); db_idx = $bits(db_idx)'(i); db_data = FEAT_W'(v);
      end
    @(negedge clk) db_we = 1'b0;
  endtask

  task automatic run(region_e r, int target, int nv);
    int fv [L];
    int len, best_j;
    longint best_d, t_img_end, t_feat, t_match;
    ref_features(r, fv, len);
    load_db(fv, target);
    n_valid = $bits(n_valid)'(nv);
    if (nv < N) n_partial_db++;
    best_j = 0; best_d = -1;
    for (int j = 0; j < nv; j++) begin
      longint d = 0;
      for (int i = 0; i < L; i++) d += ((db[j][i] > fv[i]) ? longint'(db[j][i]) - longint'(fv[i]) : longint'(fv[i]) - longint'(db[j][i]));
      if (best_d < 0 || d < best_d) begin best_d = d; best_j = j; end
    end
    @(negedge clk);
    check(!busy, "idle before start");
    start = 1'b1; region_sel = r;
    @(negedge clk) start = 1'b0;
    check(busy, "busy after start");
    for (int y = 0; y < IMG_ROWS; y++)
      for (int x = 0; x < IMG_COLS; x++) begin
        img_valid = 1'b1; img_pix = PIX_W'(img[y][x]);
        @(negedge clk);
        img_valid = 1'b0;
        if ($urandom_range(0, 9) == 0) @(negedge clk);
      end
    t_img_end = cyc;
    while (!feat_valid) @(negedge clk);
    t_feat = cyc;
    for (int f = 0; f < NF; f++)
      check(int'(feat[f]) == fv[f], $sformatf("feature %0d: %0d expected %0d", f, feat[f], fv[f]));
    check(t_feat - t_img_end >= longint'(int'(PIX_W + 1) * len) &&
          t_feat - t_img_end <= longint'(int'(PIX_W + 1) * len + 8),
          $sformatf("filter phase took %0d clocks for %0d pixels", t_feat - t_img_end, len));
    while (!match_valid) @(negedge clk);
    t_match = cyc;
    check(int'(match_idx) == best_j, $sformatf("match %0d expected %0d", match_idx, best_j));
    check(longint'(match_dist) == best_d, $sformatf("distance %0d expected %0d", match_dist, best_d));
    check(t_match - t_feat <= longint'(L) + longint'(nv) + 8, $sformatf("classify took %0d clocks", t_match - t_feat));
    @(negedge clk);
    check(!busy, "idle after match");
    case (r)
      REG_EYE:  n_eye++;
      REG_NOSE: n_nose++;
      default:  n_mouth++;
    endcase
    $display("region %s: %0d pixels, filter phase %0d clocks, classify %0d clocks, match %0d distance %0d",
             r.name(), len, t_feat - t_img_end, t_match - t_feat, match_idx, match_dist);
    $display("  features: %p", fv);
  endtask

  initial begin
    make_kernels();
    make_image();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    load_coefs();
    run(REG_EYE,   37, N);
    run(REG_NOSE,  60, 50);      // exact copy not enrolled: nearest of the first 50
    run(REG_MOUTH, 99, N);
    check(n_eye > 0 && n_nose > 0 && n_mouth > 0, "every region kind used");
    check(n_backpressure > 0, "filter back-pressure seen");
    check(n_max_update > 0, "maximum updated");
    check(n_partial_db > 0, "partly filled database used");
    $display("mechanisms: eye=%0d nose=%0d mouth=%0d backpressure=%0d max_updates=%0d partial_db=%0d",
             n_eye, n_nose, n_mouth, n_backpressure, n_max_update, n_partial_db);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
