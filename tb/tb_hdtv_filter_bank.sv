// tb_hdtv_filter_bank: end-to-end test of the filter bank at its default
// size: a 720x576 luminance frame is decomposed into ten bands and rebuilt
// through the three synthesis levels.
//
//  1. The coefficient banks are programmed through the write port: first a
//     different analysis set (h0 = h9 = 0), then the published values again;
//     a short run checks that the altered set changes the result (mode
//     switch) before the real frame is sent.
//  2. A synthetic frame (smooth patterns plus noise) streams in with random
//     idle cycles. All bands of the three steps are compared bit-exactly
//     with the reference model.
//  3. Step 3's bands I..IV feed synthesis level 3; its 2x2 blocks rebuild the
//     low/low image of step 2, which with bands V..VII feeds level 2, whose
//     output with bands VIII..X feeds level 1. Level 3's blocks are also
//     compared bit-exactly with the reference synthesis.
//  4. The rebuilt frame is compared with the original away from the right
//     and bottom borders (the last band samples are missing there): its
//     signal-to-noise ratio must exceed 46 dB.
// Each mechanism (coefficient write, idle input cycle, frame start, output
// of every step and level) is counted and must occur.
module tb_hdtv_filter_bank;
  import filt_pkg::*;
  import filt_ref_pkg::*;

  logic clk = 1'b1;
  always #5 clk = ~clk;

  localparam int W = 720, H = 576, MARGIN = 64;

  int checks = 0, failures = 0;
  int n_coef_writes = 0, n_gaps = 0, n_sof = 0, n_switch = 0;

  logic       rst_n;
  logic       coef_we, coef_sel;
  logic [3:0] coef_addr;
  coef_t      coef_wdata;
  logic       pix_valid, pix_sol, pix_sof;
  logic [7:0] pix;
  bands_t     ana [3];
  bands_t     syn_in [3];
  block_t     syn_out [3];

  hdtv_filter_bank dut (
    .clk(clk), .rst_n(rst_n),
    .coef_we(coef_we), .coef_sel(coef_sel), .coef_addr(coef_addr), .coef_wdata(coef_wdata),
    .pix_valid(pix_valid), .pix_sol(pix_sol), .pix_sof(pix_sof), .pix(pix),
    .ana_step1(ana[0]), .ana_step2(ana[1]), .ana_step3(ana[2]),
    .syn_in(syn_in), .syn_out(syn_out));

  // Captured analysis bands, in raster order per step: ll, lh, hl, hh.
  int cap [3][4][$];
  // Captured synthesis blocks per level.
  int blk_q [3][4][$];

  for (genvar s = 0; s < 3; s++) begin : g_cap
    always @(posedge clk) begin
      #1;
      if (ana[s].tag.valid) begin
        cap[s][0].push_back(int'(signed'(ana[s].ll)));
        cap[s][1].push_back(int'(signed'(ana[s].lh)));
        cap[s][2].push_back(int'(signed'(ana[s].hl)));
        cap[s][3].push_back(int'(signed'(ana[s].hh)));
      end
      if (syn_out[s].tag.valid)
        for (int i = 0; i < 4; i++) blk_q[s][i].push_back(int'(signed'(syn_out[s].px[i / 2][i % 2])));
    end
  end

  task automatic write_coef(input bit sel, input int addr, input coef_t c);
    @(negedge clk);
    coef_we = 1'b1; coef_sel = sel; coef_addr = 4'(addr); coef_wdata = c;
    @(negedge clk);
    coef_we = 1'b0;
    n_coef_writes++;
  endtask

  task automatic clear_capture();
    for (int s = 0; s < 3; s++)
      for (int i = 0; i < 4; i++) begin cap[s][i].delete(); blk_q[s][i].delete(); end
  endtask

  task automatic send_frame(input arr_t img, input int w, input int h, input int gap_odds);
    for (int r = 0; r < h; r++) begin
      for (int c = 0; c < w; c++) begin
        @(negedge clk);
        while (gap_odds > 0 && $urandom_range(0, gap_odds - 1) == 0) begin
          pix_valid = 1'b0; n_gaps++;
          @(negedge clk);
        end
        pix_valid = 1'b1;
        pix_sol = (c == 0);
        pix_sof = (c == 0) && (r == 0);
        if (pix_sof) n_sof++;
        pix = 8'(img[r * w + c]);
      end
    end
    @(negedge clk);
    pix_valid = 1'b0;
  endtask

  // Feed one synthesis level with four band planes (bw x bh) and collect
  // the rebuilt image (2bw x 2bh) into rec; missing samples stay 0.
  task automatic run_level(input int lvl, input arr_t b0, input arr_t b1, input arr_t b2,
                           input arr_t b3, input int bw, input int bh, output arr_t rec);
    for (int i = 0; i < 4; i++) blk_q[lvl][i].delete();
    for (int r = 0; r < bh; r++) begin
      for (int c = 0; c < bw; c++) begin
        int k;
        k = r * bw + c;
        @(negedge clk);
        syn_in[lvl].tag = '{valid: 1'b1, sol: c == 0, sof: c == 0 && r == 0};
        syn_in[lvl].ll = DATA_W'(b0[k]); syn_in[lvl].lh = DATA_W'(b1[k]);
        syn_in[lvl].hl = DATA_W'(b2[k]); syn_in[lvl].hh = DATA_W'(b3[k]);
      end
    end
    @(negedge clk);
    syn_in[lvl].tag.valid = 1'b0;
    repeat (100) @(negedge clk);
    checks++;
    if (blk_q[lvl][0].size() != bw * bh) begin
      failures++; $display("level %0d gave %0d blocks", lvl + 1, blk_q[lvl][0].size());
    end
    rec = new[4 * bw * bh];
    foreach (rec[i]) rec[i] = 0;
    for (int k = 0; k < blk_q[lvl][0].size(); k++) begin
      int m, n;
      m = k / bw; n = k % bw;
      for (int i = 0; i < 4; i++) begin
        int rr, cc;
        rr = 2 * m - 7 + i / 2;
        cc = 2 * n - 7 + i % 2;
        if (rr >= 0 && rr < 2 * bh && cc >= 0 && cc < 2 * bw) rec[rr * 2 * bw + cc] = blk_q[lvl][i][k];
      end
    end
  endtask

  function automatic arr_t q2a(input int q [$]);
    arr_t a;
    a = new[q.size()];
    foreach (q[i]) a[i] = q[i];
    return a;
  endfunction

  initial begin
    arr_t img, imgw, pat, rb [3][4], sb [3][4], rec3, rec2, rec1, p [4];
    coef_t ca [ANA_TAPS];
    coef_t cs [SYN_TAPS];
    coef_t calt [ANA_TAPS];
    int ref_alt, got_alt;
    real se, snr;
    int npx;

    rst_n = 1'b0; coef_we = 1'b0; coef_sel = 1'b0; coef_addr = '0; coef_wdata = '0;
    pix_valid = 1'b0; pix_sol = 1'b0; pix_sof = 1'b0; pix = '0;
    for (int l = 0; l < 3; l++) syn_in[l] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    default_coefs(ca, cs);

    // --- Mode switch: altered analysis set on a short run. ---
    calt = ca;
    calt[0] = '0;
    calt[9] = '0;
    write_coef(1'b0, 0, calt[0]);
    write_coef(1'b0, 9, calt[9]);
    pat = new[W * 16];
    foreach (pat[i]) pat[i] = (i * 37 + (i / W) * 11) % 256;
    imgw = new[W * 16];
    foreach (pat[i]) imgw[i] = pat[i] << FRAC_BITS;
    clear_capture();
    send_frame(pat, W, 16, 0);
    repeat (300) @(negedge clk);
    ana2d(imgw, W, 16, calt, rb[0][0], rb[0][1], rb[0][2], rb[0][3]);
    ana2d(imgw, W, 16, ca, sb[0][0], sb[0][1], sb[0][2], sb[0][3]);
    checks++;
    ref_alt = 0; got_alt = 0;
    for (int k = 0; k < rb[0][0].size(); k++) begin
      if (k < cap[0][0].size() && cap[0][0][k] != rb[0][0][k]) got_alt++;
      if (rb[0][0][k] != sb[0][0][k]) ref_alt++;
    end
    if (cap[0][0].size() != rb[0][0].size() || got_alt != 0 || ref_alt == 0) begin
      failures++;
      $display("altered set: %0d samples, %0d mismatches, %0d differ from default", cap[0][0].size(), got_alt, ref_alt);
    end else n_switch++;

    // --- Program the published sets through the port. ---
    for (int k = 0; k < ANA_TAPS; k++) write_coef(1'b0, k, ca[k]);
    for (int k = 0; k < SYN_TAPS; k++) write_coef(1'b1, k, cs[k]);

    // --- Full frame. ---
    img = new[W * H];
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        real v;
        v = 128.0 + 70.0 * $sin(c / 23.0) * $cos(r / 31.0) + 25.0 * $sin((c + 2 * r) / 9.0)
            + real'($urandom_range(0, 16)) - 8.0;
        if (v < 0.0) v = 0.0;
        if (v > 255.0) v = 255.0;
        img[r * W + c] = int'(v);
      end
    imgw = new[W * H];
    foreach (img[i]) imgw[i] = img[i] << FRAC_BITS;
    clear_capture();
    send_frame(img, W, H, 8);
    repeat (500) @(negedge clk);

    ana2d(imgw, W, H, ca, rb[0][0], rb[0][1], rb[0][2], rb[0][3]);
    ana2d(rb[0][0], W / 2, H / 2, ca, rb[1][0], rb[1][1], rb[1][2], rb[1][3]);
    ana2d(rb[1][0], W / 4, H / 4, ca, rb[2][0], rb[2][1], rb[2][2], rb[2][3]);
    for (int s = 0; s < 3; s++)
      for (int b = 0; b < 4; b++) begin
        int bad;
        bad = 0;
        checks++;
        if (cap[s][b].size() != rb[s][b].size()) bad = -1;
        else foreach (rb[s][b][k]) if (cap[s][b][k] != rb[s][b][k]) bad++;
        if (bad != 0) begin
          failures++;
          $display("step %0d band %0d: %0d samples, %0d mismatches", s + 1, b, cap[s][b].size(), bad);
        end
        sb[s][b] = q2a(cap[s][b]);
      end

    // --- Synthesis, coarse to fine. ---
    run_level(2, sb[2][0], sb[2][1], sb[2][2], sb[2][3], W / 8, H / 8, rec3);
    syn2d(sb[2][0], sb[2][1], sb[2][2], sb[2][3], W / 8, H / 8, cs, p[0], p[1], p[2], p[3]);
    for (int i = 0; i < 4; i++) begin
      int bad;
      bad = 0;
      checks++;
      foreach (p[i][k]) if (k >= blk_q[2][i].size() || blk_q[2][i][k] != p[i][k]) bad++;
      if (bad != 0) begin failures++; $display("level 3 plane %0d: %0d mismatches", i, bad); end
    end
    run_level(1, rec3, sb[1][1], sb[1][2], sb[1][3], W / 4, H / 4, rec2);
    run_level(0, rec2, sb[0][1], sb[0][2], sb[0][3], W / 2, H / 2, rec1);

    se = 0.0; npx = 0;
    for (int r = 0; r < H - MARGIN; r++)
      for (int c = 0; c < W - MARGIN; c++) begin
        real d;
        d = real'(rec1[r * W + c]) / real'(1 << FRAC_BITS) - real'(img[r * W + c]);
        se += d * d;
        npx++;
      end
    snr = (se == 0.0) ? 999.0 : 10.0 * $log10(255.0 * 255.0 * npx / se);
    $display("reconstruction SNR over %0d pixels: %0.2f dB", npx, snr);
    checks++;
    if (snr < 46.0) failures++;

    // --- Mechanisms. ---
    $display("coef writes %0d, idle cycles %0d, frame starts %0d, coefficient switches %0d",
             n_coef_writes, n_gaps, n_sof, n_switch);
    checks++;
    if (n_coef_writes == 0 || n_gaps == 0 || n_sof < 2 || n_switch == 0) failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
