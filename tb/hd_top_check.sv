// hd_top_check: end-to-end test bench body for hd_top, shared by the small
// and the full-size test.
//
// Generates synthetic scenes: a smooth colour background with a few
// salt-and-pepper pixels, and foreground frames that show the same
// background (with fresh noise pixels and a little sensor noise) plus a
// dark upright "person" box that moves right from frame to frame. Each
// frame is streamed into the design together with the background. An
// independent reference model computes the expected detection image stage
// by stage (grey + nearest-neighbour resize, median of row medians with
// pass-through border, Haar LL with rounding down, WMSE over the
// pre-processed frames, |fg - bg|, threshold WMSE + offset, 255 - x,
// output median filter) and every detection pixel, its coordinates and the
// end-of-frame flag are compared.
//
// It also counts how often each mechanism of the design happened (resize
// drop, input stall during the column pass, median flush, border
// pass-through, column pass, pixels kept and cleared by the threshold,
// WMSE update) and counts a failure for any that never did.
//
// FULL = 1 instantiates hd_top with no parameter override (default size).
module hd_top_check #(
  parameter bit FULL  = 0,
  parameter int SRC_W = 40,
  parameter int SRC_H = 36,
  parameter int IMG_W = 32,
  parameter int IMG_H = 32,
  parameter int NF    = 2,
  parameter bit GAPS  = 1
);
  import hd_pkg::*;

  localparam int OW = IMG_W / 2, OH = IMG_H / 2;
  localparam int SHIFT = 3 + $clog2(IMG_W * IMG_H);

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  rgb_t frame_in, bg_in;
  pix_t thr_offset = 8'd6;
  logic det_valid, det_last, busy;
  pix_t det_pix;
  logic [$clog2(OW)-1:0] det_x;
  logic [$clog2(OH)-1:0] det_y;
  logic [12:0] wmse;
  logic [15:0] frame_count;

  if (FULL) begin : g_full
    hd_top dut (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
      .frame_in(frame_in), .bg_in(bg_in), .thr_offset(thr_offset),
      .det_valid(det_valid), .det_pix(det_pix), .det_x(det_x), .det_y(det_y),
      .det_last(det_last), .wmse(wmse), .frame_count(frame_count), .busy(busy));
  end else begin : g_small
    hd_top #(.SRC_W(SRC_W), .SRC_H(SRC_H), .IMG_W(IMG_W), .IMG_H(IMG_H)) dut (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
      .frame_in(frame_in), .bg_in(bg_in), .thr_offset(thr_offset),
      .det_valid(det_valid), .det_pix(det_pix), .det_x(det_x), .det_y(det_y),
      .det_last(det_last), .wmse(wmse), .frame_count(frame_count), .busy(busy));
  end

  always #5 clk = ~clk;

  // ---------------- scenes ----------------
  rgb_t bg_src [SRC_H][SRC_W];
  rgb_t fg_src [SRC_H][SRC_W];

  function automatic pix_t sat(int v);
    return pix_t'((v < 0) ? 0 : (v > 255) ? 255 : v);
  endfunction

  task automatic make_background();
    for (int y = 0; y < SRC_H; y++)
      for (int x = 0; x < SRC_W; x++) begin
        int base = 140 + (x * 60) / SRC_W + (y * 20) / SRC_H;
        bg_src[y][x] = '{r: sat(base + 10), g: sat(base), b: sat(base - 15)};
        if ($urandom_range(0, 199) == 0) bg_src[y][x] = '{r: 8'd255, g: 8'd255, b: 8'd255};
      end
  endtask

  task automatic make_frame(int f);
    int pw = SRC_W / 8, ph = SRC_H / 3;
    int px = SRC_W / 6 + f * (SRC_W / 10), py = SRC_H / 3;
    for (int y = 0; y < SRC_H; y++)
      for (int x = 0; x < SRC_W; x++) begin
        rgb_t p = bg_src[y][x];
        int n = $urandom_range(0, 4) - 2;
        p = '{r: sat(int'(p.r) + n), g: sat(int'(p.g) + n), b: sat(int'(p.b) + n)};
        if (x >= px && x < px + pw && y >= py && y < py + ph)
          p = '{r: 8'd20, g: 8'd15, b: 8'd25};
        if ($urandom_range(0, 199) == 0) p = '{r: 8'd0, g: 8'd0, b: 8'd0};
        fg_src[y][x] = p;
      end
  endtask

  // ---------------- reference model ----------------
  int fg_pp [IMG_H][IMG_W], bg_pp [IMG_H][IMG_W];
  int fg_m  [IMG_H][IMG_W], bg_m  [IMG_H][IMG_W];
  int neg   [OH][OW];
  int exp_det [$];
  int exp_wmse;
  int exp_wmse_q [$];

  function automatic int luma(rgb_t p);
    return (77 * int'(p.r) + 150 * int'(p.g) + 29 * int'(p.b)) >> 8;
  endfunction

  function automatic int m3(int a, int b, int c);
    int lo = (a < b) ? a : b;
    int hi = (a < b) ? b : a;
    return (c <= lo) ? lo : (c >= hi) ? hi : c;
  endfunction

  task automatic compute_expected();
    int yi, xi, thr;
    longint sum;
    // pre-processing: grey, keep pixel x if floor((x+1)D/S) > floor(xD/S)
    yi = 0;
    for (int y = 0; y < SRC_H; y++) begin
      if ((y + 1) * IMG_H / SRC_H > y * IMG_H / SRC_H) begin
        xi = 0;
        for (int x = 0; x < SRC_W; x++)
          if ((x + 1) * IMG_W / SRC_W > x * IMG_W / SRC_W) begin
            fg_pp[yi][xi] = luma(fg_src[y][x]);
            bg_pp[yi][xi] = luma(bg_src[y][x]);
            xi++;
          end
        yi++;
      end
    end
    // WMSE
    sum = 0;
    for (int y = 0; y < IMG_H; y++)
      for (int x = 0; x < IMG_W; x++)
        sum += (fg_pp[y][x] - bg_pp[y][x]) * (fg_pp[y][x] - bg_pp[y][x]);
    exp_wmse = int'(sum >> SHIFT);
    exp_wmse_q.push_back(exp_wmse);
    thr = exp_wmse + int'(thr_offset);
    // median filters
    for (int y = 0; y < IMG_H; y++)
      for (int x = 0; x < IMG_W; x++) begin
        if (y == 0 || x == 0 || y == IMG_H-1 || x == IMG_W-1) begin
          fg_m[y][x] = fg_pp[y][x];
          bg_m[y][x] = bg_pp[y][x];
        end else begin
          fg_m[y][x] = m3(m3(fg_pp[y-1][x-1], fg_pp[y-1][x], fg_pp[y-1][x+1]),
                          m3(fg_pp[y][x-1],   fg_pp[y][x],   fg_pp[y][x+1]),
                          m3(fg_pp[y+1][x-1], fg_pp[y+1][x], fg_pp[y+1][x+1]));
          bg_m[y][x] = m3(m3(bg_pp[y-1][x-1], bg_pp[y-1][x], bg_pp[y-1][x+1]),
                          m3(bg_pp[y][x-1],   bg_pp[y][x],   bg_pp[y][x+1]),
                          m3(bg_pp[y+1][x-1], bg_pp[y+1][x], bg_pp[y+1][x+1]));
        end
      end
    // LL band, subtraction, threshold, negative
    for (int i = 0; i < OH; i++)
      for (int j = 0; j < OW; j++) begin
        int f0 = (fg_m[2*i][2*j]   + fg_m[2*i][2*j+1]) / 2;
        int f1 = (fg_m[2*i+1][2*j] + fg_m[2*i+1][2*j+1]) / 2;
        int b0 = (bg_m[2*i][2*j]   + bg_m[2*i][2*j+1]) / 2;
        int b1 = (bg_m[2*i+1][2*j] + bg_m[2*i+1][2*j+1]) / 2;
        int fl = (f0 + f1) / 2, bl = (b0 + b1) / 2;
        int d  = (fl > bl) ? fl - bl : bl - fl;
        neg[i][j] = 255 - ((d > thr) ? d : 0);
      end
    // output median filter
    for (int i = 0; i < OH; i++)
      for (int j = 0; j < OW; j++) begin
        if (i == 0 || j == 0 || i == OH-1 || j == OW-1)
          exp_det.push_back(neg[i][j]);
        else
          exp_det.push_back(m3(m3(neg[i-1][j-1], neg[i-1][j], neg[i-1][j+1]),
                               m3(neg[i][j-1],   neg[i][j],   neg[i][j+1]),
                               m3(neg[i+1][j-1], neg[i+1][j], neg[i+1][j+1])));
      end
  endtask

  // ---------------- mechanism counters ----------------
  int n_drop = 0, n_stall = 0, n_flush = 0, n_border = 0, n_colpass = 0;
  int n_kept = 0, n_cleared = 0, n_wmse_upd = 0, n_det = 0, n_frames_out = 0;
  logic col_q = 0;

  if (FULL) begin : g_mon_full
    always @(posedge clk) if (rst_n) begin
      if (g_full.dut.fg_pp_drop) n_drop++;
      if (g_full.dut.u_mf_fg.shift && !g_full.dut.u_mf_fg.taking_input) n_flush++;
      if (g_full.dut.fg_col && !col_q) n_colpass++;
      col_q <= g_full.dut.fg_col;
      if (g_full.dut.fg_ll_v && g_full.dut.kept) n_kept++;
      if (g_full.dut.fg_ll_v && !g_full.dut.kept) n_cleared++;
      if (g_full.dut.wmse_update) n_wmse_upd++;
      if (det_valid && g_full.dut.om_b) n_border++;
    end
  end else begin : g_mon_small
    always @(posedge clk) if (rst_n) begin
      if (g_small.dut.fg_pp_drop) n_drop++;
      if (g_small.dut.u_mf_fg.shift && !g_small.dut.u_mf_fg.taking_input) n_flush++;
      if (g_small.dut.fg_col && !col_q) n_colpass++;
      col_q <= g_small.dut.fg_col;
      if (g_small.dut.fg_ll_v && g_small.dut.kept) n_kept++;
      if (g_small.dut.fg_ll_v && !g_small.dut.kept) n_cleared++;
      if (g_small.dut.wmse_update) n_wmse_upd++;
      if (det_valid && g_small.dut.om_b) n_border++;
    end
  end

  // ---------------- output checker ----------------
  always @(posedge clk) if (rst_n) begin
    if (in_valid && !in_ready) n_stall++;
    if (det_valid) begin
      int k, e;
      k = n_det % (OW * OH);
      e = (exp_det.size() > 0) ? exp_det[0] : -1;
      checks++;
      if (int'(det_pix) != e || int'(det_x) != k % OW || int'(det_y) != k / OW ||
          det_last != (k == OW * OH - 1)) begin
        failures++;
        if (failures < 10)
          $display("FAIL det %0d (%0d,%0d): pix %0d exp %0d at (%0d,%0d) last %0d",
                   n_det, k / OW, k % OW, det_pix, e, det_y, det_x, det_last);
      end
      if (exp_det.size() > 0) void'(exp_det.pop_front());
      n_det++;
      if (det_last) begin
        // the frame's WMSE is registered before its first LL sample
        checks++;
        if (exp_wmse_q.size() == 0 || int'(wmse) != exp_wmse_q[0]) begin
          failures++;
          $display("FAIL frame %0d wmse %0d exp %0d", n_frames_out, wmse,
                   exp_wmse_q.size() ? exp_wmse_q[0] : -1);
        end
        if (exp_wmse_q.size() > 0) void'(exp_wmse_q.pop_front());
        n_frames_out++;
      end
    end
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    // watchdog: generous bound of 2 * frame time per frame plus slack
    repeat (NF * (3 * SRC_W * SRC_H + 2 * IMG_W * IMG_H) + 10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    make_background();
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++) begin
      make_frame(f);
      compute_expected();
      for (int y = 0; y < SRC_H; y++)
        for (int x = 0; x < SRC_W; x++) begin
          @(negedge clk);
          while (GAPS && $urandom_range(0, 7) == 0) begin in_valid = 0; @(negedge clk); end
          in_valid = 1;
          frame_in = fg_src[y][x];
          bg_in    = bg_src[y][x];
          @(posedge clk);
          while (!in_ready) @(posedge clk);
        end
    end
    @(negedge clk);
    in_valid = 0;
    while (n_frames_out < NF) @(posedge clk);
    chk(int'(frame_count) == NF, "frame count");
    repeat (IMG_W + 10) @(posedge clk);
    chk(!busy, "busy after last frame");
    chk(n_det == NF * OW * OH, $sformatf("detection pixels %0d", n_det));
    chk(exp_det.size() == 0, "expected pixels left over");
    if (SRC_W != IMG_W || SRC_H != IMG_H) chk(n_drop > 0, "resize never dropped a pixel");
    chk(n_stall > 0, "input never stalled by a column pass");
    chk(n_flush > 0, "median filter never flushed");
    chk(n_border > 0, "no border pass-through");
    chk(n_colpass == NF, $sformatf("column passes %0d", n_colpass));
    chk(n_kept > 0, "threshold never kept a pixel");
    chk(n_cleared > 0, "threshold never cleared a pixel");
    chk(n_wmse_upd == NF, "WMSE updates");
    $display("mechanisms: drop=%0d stall=%0d flush=%0d border=%0d colpass=%0d kept=%0d cleared=%0d wmse_upd=%0d",
             n_drop, n_stall, n_flush, n_border, n_colpass, n_kept, n_cleared, n_wmse_upd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
