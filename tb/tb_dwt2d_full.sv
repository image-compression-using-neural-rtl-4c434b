// tb_dwt2d_full - the 2D DWT processor at its default size (256 x 256, 8-bit
// pixels, modified DA filters): one level, then all five levels down to
// 1024 sub-blocks of 8 x 8.
//
// Loads a generated image (random pixels, a smooth ramp region, and blocks of
// 0 and 255 at the edges) and runs the processor twice: one level of
// decomposition, then the maximum number of levels (every sub-band split again
// until the sub-blocks are 8 x 8). After each run the whole N x N coefficient
// array is read back and compared with a software model of the same transform:
// centred 9/7 analysis with whole-sample symmetric extension inside each tile,
// integer taps, round-half-up rescaling by 2^10 / 2^9 after each pass and
// saturation to the coefficient width, with each tile's results written to its
// four quadrants. Each run's time is checked against the cycle count of the
// bit-serial schedule. Mechanisms counted (each must occur): left and right
// boundary mirroring, samples loaded without an output (the downsampling),
// filter starts, processor back-pressure (a sample waiting for in_ready), row and
// column outputs, the next line being fed while the previous line's last results
// are still in flight, tiles processed, and rows of later levels run on the
// second processor.
module tb_dwt2d_full;
  import dwt_pkg::*;

  localparam int    TN    = 256;
  localparam arch_e TARCH = ARCH_MODIFIED_DA;
  localparam int    W     = 8;
  localparam int    OUT_W = 16;
  localparam int    H     = TN / 2;
  localparam int    MAXL  = $clog2(TN) - 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic                         load_we = 1'b0;
  logic [$clog2(TN*TN)-1:0]     load_addr = '0;
  logic [W-1:0]                 load_data = '0;
  logic                         start = 1'b0;
  logic [3:0]                   levels = 4'd1;
  logic                         busy, done;
  logic [$clog2(TN*TN)-1:0]     rd_addr = '0;
  logic signed [OUT_W-1:0]      rd_data;

  dwt2d  u_dut (
    .clk, .rst_n, .load_we, .load_addr, .load_data, .start, .levels, .busy, .done,
    .rd_addr, .rd_data
  );

  // ---------------- software model ----------------
  int img  [TN][TN];
  int coef [TN][TN];
  int midl [TN][H];
  int midh [TN][H];

  localparam int LPC [9] = '{27, -17, -80, 273, 617, 273, -80, -17, 27};
  localparam int HPC [7] = '{47, -29, -303, 569, -303, -29, 47};

  function automatic int mirror(int i, int n);
    if (i < 0) return -i;
    if (i > n - 1) return 2 * (n - 1) - i;
    return i;
  endfunction

  function automatic int rnd_sat(longint v, int sh, int width);
    longint r;
    longint lim;
    r   = (v + (longint'(1) << (sh - 1))) >>> sh;
    lim = longint'(1) << (width - 1);
    if (r > lim - 1) r = lim - 1;
    if (r < -lim)    r = -lim;
    return int'(r);
  endfunction

  // 1D analysis of the first n entries of a line; lo[k], hi[k] for k < n/2
  task automatic analyse(input int x [TN], input int n, output int lo [H], output int hi [H]);
    for (int k = 0; k < n / 2; k++) begin
      longint sl = 0, sh = 0;
      for (int t = 0; t < 9; t++) sl += longint'(LPC[t]) * x[mirror(2 * k + t - 4, n)];
      for (int t = 0; t < 7; t++) sh += longint'(HPC[t]) * x[mirror(2 * k + t - 2, n)];
      lo[k] = rnd_sat(sl, 10, OUT_W);
      hi[k] = rnd_sat(sh, 9, OUT_W);
    end
  endtask

  // nlev levels; every tile of a level is transformed in place into its quadrants
  task automatic model(input int nlev);
    int x [TN];
    int lo [H], hi [H];
    for (int r = 0; r < TN; r++) for (int c = 0; c < TN; c++) coef[r][c] = img[r][c];
    for (int l = 0; l < nlev; l++) begin
      int n, hn;
      n = TN >> l; hn = n / 2;
      for (int tr = 0; tr < (1 << l); tr++)
        for (int tc = 0; tc < (1 << l); tc++) begin
          int r0, c0;
          r0 = tr * n; c0 = tc * n;
          for (int r = 0; r < n; r++) begin
            for (int c = 0; c < n; c++) x[c] = coef[r0 + r][c0 + c];
            analyse(x, n, lo, hi);
            for (int k = 0; k < hn; k++) begin midl[r][k] = lo[k]; midh[r][k] = hi[k]; end
          end
          for (int c = 0; c < hn; c++) begin
            for (int r = 0; r < n; r++) x[r] = midl[r][c];
            analyse(x, n, lo, hi);
            for (int k = 0; k < hn; k++) begin coef[r0 + k][c0 + c] = lo[k]; coef[r0 + hn + k][c0 + c] = hi[k]; end
            for (int r = 0; r < n; r++) x[r] = midh[r][c];
            analyse(x, n, lo, hi);
            for (int k = 0; k < hn; k++) begin coef[r0 + k][c0 + hn + c] = lo[k]; coef[r0 + hn + k][c0 + hn + c] = hi[k]; end
          end
        end
    end
  endtask

  // cycle count of the bit-serial schedule for nlev levels
  function automatic longint schedule(input int nlev);
    longint t;
    t = 0;
    for (int l = 0; l < nlev; l++) begin
      longint n, hn, wr, per_row, per_col;
      n = TN >> l; hn = n / 2;
      wr = (l == 0) ? W : OUT_W;
      if (TARCH == ARCH_MODIFIED_DA) begin
        per_row = (n + 7) * wr + hn;
        per_col = (n + 7) * OUT_W + hn;
      end else begin
        per_row = (n + 7) * wr + hn * (wr + 1);
        per_col = (n + 7) * OUT_W + hn * (OUT_W + 1);
      end
      t += (longint'(1) << (2 * l)) * (n * per_row + hn * per_col);
    end
    return t;
  endfunction

  // ---------------- mechanism counters ----------------
  longint n_mirror_lo = 0, n_mirror_hi = 0, n_no_emit = 0, n_start = 0;
  longint n_stall = 0, n_row_out = 0, n_col_out = 0, n_overlap = 0;
  longint n_tiles = 0, n_p2_rows = 0;

  always @(posedge clk) if (rst_n) begin
    if (u_dut.u_ctrl.fire_row || u_dut.u_ctrl.fire_col) begin
      if (int'(u_dut.u_ctrl.s) < 4)      n_mirror_lo++;
      if (int'(u_dut.u_ctrl.s) > int'(u_dut.u_ctrl.n) + 3) n_mirror_hi++;
      if (!u_dut.u_ctrl.p1_emit)         n_no_emit++;
      if (u_dut.u_ctrl.fire_row && u_dut.u_ctrl.line != u_dut.u_ctrl.wr_line) n_overlap++;
    end
    if ((u_dut.u_ctrl.p1_valid && !u_dut.u_ctrl.p1_ready) ||
        (u_dut.u_ctrl.p2_valid && !u_dut.u_ctrl.p2_ready)) n_stall++;
    if (u_dut.u_row.start) n_start++;
    if (u_dut.u_ctrl.mid_we)  n_row_out++;
    if (u_dut.u_ctrl.coef_we) n_col_out++;
    if (u_dut.u_ctrl.tile_end) n_tiles++;
    if (u_dut.u_ctrl.fire_row && u_dut.u_ctrl.lvl != '0) n_p2_rows++;
  end

  task automatic need(input string what, input longint n, input longint expect_n);
    checks++;
    $display("  %-34s %0d", what, n);
    if (n == 0 || (expect_n >= 0 && n != expect_n)) begin
      failures++;
      $display("FAIL mechanism '%s' count %0d (expected %0d)", what, n, expect_n);
    end
  endtask

  // ---------------- watchdog ----------------
  initial begin
    repeat (TN * TN * 300 + 50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint t0, t_run, t_exp;
  int     mism;

  task automatic clear_counts();
    n_mirror_lo = 0; n_mirror_hi = 0; n_no_emit = 0; n_start = 0;
    n_stall = 0; n_row_out = 0; n_col_out = 0; n_overlap = 0; n_tiles = 0; n_p2_rows = 0;
  endtask

  // start a run of nlev levels, wait for done, check its time and every coefficient
  task automatic run_and_check(input int nlev);
    int ntiles;
    model(nlev);
    clear_counts();
    levels = 4'(nlev);
    start = 1'b1;
    t0 = cycle;
    @(posedge clk); #1;
    start = 1'b0;
    checks++;
    if (!busy || done) begin failures++; $display("FAIL not busy (or still done) after start"); end
    while (!done) begin @(posedge clk); #1; end
    t_run = cycle - t0;
    ntiles = 0;
    for (int l = 0; l < nlev; l++) ntiles += 1 << (2 * l);
    t_exp = schedule(nlev);
    $display("%0d level(s), %0d tiles: transform took %0d cycles (schedule %0d)", nlev, ntiles, t_run, t_exp);
    checks++;
    if (t_run < t_exp || t_run > t_exp + 60 * ntiles) begin
      failures++; $display("FAIL transform time %0d, schedule %0d", t_run, t_exp);
    end
    mism = 0;
    for (int i = 0; i < TN; i++)
      for (int j = 0; j < TN; j++) begin
        rd_addr = ($clog2(TN*TN))'(i * TN + j);
        @(posedge clk); #1;
        checks++;
        if (int'(rd_data) != coef[i][j]) begin
          failures++;
          if (mism < 10) $display("FAIL coefficient (%0d,%0d): got %0d expected %0d", i, j, rd_data, coef[i][j]);
          mism++;
        end
      end
    checks++;
    if (n_tiles != ntiles) begin failures++; $display("FAIL %0d tiles processed, expected %0d", n_tiles, ntiles); end
  endtask

  initial begin
    // image: random body, a ramp in the middle rows, saturated blocks near the edges
    for (int r = 0; r < TN; r++)
      for (int c = 0; c < TN; c++) begin
        if (r < 3 && c < 3)                 img[r][c] = 255;
        else if (r >= TN - 3 && c >= TN - 3) img[r][c] = 0;
        else if (r >= TN / 4 && r < TN / 2) img[r][c] = (c * 255) / (TN - 1);
        else                                img[r][c] = int'($urandom_range(0, 255));
      end

    repeat (3) @(posedge clk); #1;
    rst_n = 1'b1;
    @(posedge clk); #1;

    // load the image
    for (int r = 0; r < TN; r++)
      for (int c = 0; c < TN; c++) begin
        load_we   = 1'b1;
        load_addr = ($clog2(TN*TN))'(r * TN + c);
        load_data = W'(img[r][c]);
        @(posedge clk); #1;
      end
    load_we = 1'b0;
    checks++;
    if (done || busy) begin failures++; $display("FAIL busy/done before start"); end

    // one level
    run_and_check(1);
    $display("mechanisms (one level):");
    need("left-edge mirrored samples",  n_mirror_lo, 4 * (TN + H));
    need("right-edge mirrored samples", n_mirror_hi, 3 * (TN + H));
    need("samples without output",      n_no_emit, -1);
    need("row filter starts",           n_start, TN * H);
    need("processor back-pressure",     n_stall, -1);
    need("row-pass results",            n_row_out, TN * H);
    need("column-pass results",         n_col_out, H * H);
    need("next line fed during drain",  n_overlap, -1);

    // all levels down to 8 x 8 sub-blocks (a restart without reloading)
    run_and_check(MAXL);
    $display("mechanisms (%0d levels):", MAXL);
    need("tiles processed",             n_tiles, -1);
    need("rows of later levels on #2",  n_p2_rows, -1);
    need("column-pass results",         n_col_out, MAXL * H * H);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
