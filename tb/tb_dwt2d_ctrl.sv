// tb_dwt2d_ctrl - self-checking testbench for the 2D DWT control unit.
//
// The control unit runs at N = 32 (up to two levels) against memories and 1D
// processors modelled in this testbench. The input image holds its own address
// (pixel (r, c) = (r*32 + c) mod 256), so every sample handed to a processor
// identifies where it was read. The processor models accept a sample after a
// random number of cycles (exercising the handshake) and answer every emit a few
// cycles later with a tag instead of a filter result: a row pass (processor #1,
// or #2 alone above level 0) returns lo = sample, hi = -sample; the column pass
// returns lo = sample and hi = sample + 1000 (L columns, #2) or + 2000 (H
// columns, #3). A software model applies the same tag rules to the schedule the
// control unit should follow (symmetric extension inside each tile, outputs to
// the tile's quadrants, level after level), and after each run the whole
// coefficient memory is compared with it. Level 0 samples are also checked one
// by one against the expected extended stream and emit flag. Runs: 1 level,
// 2 levels, 15 (clamped to 2) and 0 (taken as 1), plus busy/done behaviour.
module tb_dwt2d_ctrl;

  localparam int N = 32, H = N / 2;
  localparam int W = 8, OUT_W = 16;
  localparam int AW = $clog2(N * N), AW_Q = $clog2(N * N / 2);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic start = 1'b0, busy, done;
  logic [3:0] levels = 4'd1;
  logic [AW-1:0] in_raddr, coef_raddr;
  logic [W-1:0] in_rdata;
  logic [OUT_W-1:0] coef_rdata;
  logic p1_valid, p1_ready, p1_emit, p1_out_valid;
  logic [W-1:0] p1_data;
  logic signed [OUT_W-1:0] p1_lo, p1_hi;
  logic mid_we;
  logic [AW_Q-1:0] mid_waddr, mid_raddr;
  logic [OUT_W-1:0] midl_wdata, midh_wdata, midl_rdata, midh_rdata;
  logic p2_valid, p3_valid, p2_ready, p3_ready, pc_emit, p2_out_valid, p3_out_valid;
  logic [OUT_W-1:0] p2_data, p3_data;
  logic signed [OUT_W-1:0] p2_lo, p2_hi, p3_lo, p3_hi;
  logic coef_we;
  logic [AW-1:0] coef_waddr [4];
  logic [OUT_W-1:0] coef_wdata [4];

  dwt2d_ctrl #(.N(N), .W(W), .OUT_W(OUT_W)) u_ctrl (.*);

  // ---------------- memories ----------------
  logic [OUT_W-1:0] midl [N * H], midh [N * H];
  int               coefm [N * N];

  always_ff @(posedge clk) begin
    in_rdata   <= W'(in_raddr);
    coef_rdata <= OUT_W'(coefm[coef_raddr]);
    midl_rdata <= midl[mid_raddr];
    midh_rdata <= midh[mid_raddr];
    if (mid_we) begin
      midl[mid_waddr] <= midl_wdata;
      midh[mid_waddr] <= midh_wdata;
    end
    if (coef_we)
      for (int q = 0; q < 4; q++) coefm[coef_waddr[q]] <= int'($signed(coef_wdata[q]));
  end

  function automatic int mirror(int i, int n);
    if (i < 0) return -i;
    if (i > n - 1) return 2 * (n - 1) - i;
    return i;
  endfunction

  // ---------------- processor models ----------------
  int  gap1 = 0, gapc = 0;
  int  s1 = 0, line1 = 0;
  int  q1_t [$], q1_v [$], qc_t [$], qc_l [$], qc_h [$], qc_col [$];
  int  t = 0;
  int  n_stall = 0, n_emit1 = 0, n_mirror = 0, n_rows2 = 0, n_writes = 0;

  assign p1_ready = (gap1 == 0);
  assign p2_ready = (gapc == 0);
  assign p3_ready = (gapc == 0);

  always @(posedge clk) begin
    t++;
    if (gap1 > 0) gap1 <= gap1 - 1;
    if (gapc > 0) gapc <= gapc - 1;
    if (rst_n && ((p1_valid && !p1_ready) || (p2_valid && !p2_ready))) n_stall++;
    if (rst_n && coef_we) n_writes++;
    // processor #1 (rows of level 0), checked sample by sample
    if (rst_n && p1_valid && p1_ready) begin
      int e;
      e = line1 * N + mirror(s1 - 4, N);
      checks++;
      if (int'(p1_data) != (e & 8'hff) || p1_emit != (s1 >= 8 && s1 % 2 == 0)) begin
        failures++; $display("FAIL row %0d s %0d: data %0d emit %0b, expected %0d", line1, s1, p1_data, p1_emit, e);
      end
      if (s1 < 4 || s1 > N + 3) n_mirror++;
      if (p1_emit) begin q1_t.push_back(t + 3); q1_v.push_back(int'(p1_data)); n_emit1++; end
      gap1 <= int'($urandom_range(1, 5));
      if (s1 == N + 6) begin s1 = 0; line1++; end else s1++;
    end
    // processors #2 and #3: #2 alone is a row pass, both together a column pass
    if (rst_n && p2_valid && p2_ready) begin
      checks++;
      if (p3_valid && !p3_ready) begin failures++; $display("FAIL column processors out of step"); end
      if (!p3_valid) n_rows2++;
      if (pc_emit) begin
        qc_t.push_back(t + 2);
        qc_l.push_back(int'($signed(p2_data)));
        qc_h.push_back(int'($signed(p3_data)));
        qc_col.push_back(int'(p3_valid));
      end
      gapc <= int'($urandom_range(1, 6));
    end
  end

  // answer each emit at its due cycle
  initial begin
    p1_out_valid = 1'b0; p2_out_valid = 1'b0; p3_out_valid = 1'b0;
    p1_lo = '0; p1_hi = '0; p2_lo = '0; p2_hi = '0; p3_lo = '0; p3_hi = '0;
    forever begin
      @(posedge clk); #1;
      p1_out_valid = 1'b0;
      p2_out_valid = 1'b0;
      p3_out_valid = 1'b0;
      if (q1_t.size() > 0 && q1_t[0] == t) begin
        p1_out_valid = 1'b1;
        p1_lo = OUT_W'(q1_v[0]);
        p1_hi = -OUT_W'(q1_v[0]);
        void'(q1_t.pop_front()); void'(q1_v.pop_front());
      end
      if (qc_t.size() > 0 && qc_t[0] == t) begin
        p2_out_valid = 1'b1;
        if (qc_col[0] != 0) begin
          p3_out_valid = 1'b1;
          p2_lo = OUT_W'(qc_l[0]);
          p2_hi = OUT_W'(qc_l[0] + 1000);
          p3_lo = OUT_W'(qc_h[0]);
          p3_hi = OUT_W'(qc_h[0] + 2000);
        end else begin
          p2_lo = OUT_W'(qc_l[0]);
          p2_hi = -OUT_W'(qc_l[0]);
        end
        void'(qc_t.pop_front()); void'(qc_l.pop_front()); void'(qc_h.pop_front()); void'(qc_col.pop_front());
      end
    end
  end

  // ---------------- tag model of the schedule ----------------
  int xm [N][N];
  int lm [N][H], hm [N][H];

  task automatic model(input int nlev);
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) xm[r][c] = (r * N + c) & 8'hff;
    for (int l = 0; l < nlev; l++) begin
      int n, hn;
      n = N >> l; hn = n / 2;
      for (int tr = 0; tr < (1 << l); tr++)
        for (int tc = 0; tc < (1 << l); tc++) begin
          int r0, c0;
          r0 = tr * n; c0 = tc * n;
          for (int r = 0; r < n; r++)
            for (int k = 0; k < hn; k++) begin
              lm[r][k] = xm[r0 + r][c0 + mirror(2 * k + 4, n)];
              hm[r][k] = -lm[r][k];
            end
          for (int c = 0; c < hn; c++)
            for (int k = 0; k < hn; k++) begin
              xm[r0 + k][c0 + c]           = lm[mirror(2 * k + 4, n)][c];
              xm[r0 + hn + k][c0 + c]      = lm[mirror(2 * k + 4, n)][c] + 1000;
              xm[r0 + k][c0 + hn + c]      = hm[mirror(2 * k + 4, n)][c];
              xm[r0 + hn + k][c0 + hn + c] = hm[mirror(2 * k + 4, n)][c] + 2000;
            end
        end
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int lv, input int nlev);
    int mism;
    s1 = 0; line1 = 0;
    n_stall = 0; n_emit1 = 0; n_mirror = 0; n_rows2 = 0; n_writes = 0;
    for (int i = 0; i < N * N; i++) coefm[i] = 32'h7fff_0000;   // marks never-written words
    levels = 4'(lv);
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    checks++;
    if (!busy || done) begin failures++; $display("FAIL busy/done after start"); end
    while (!done) begin @(posedge clk); #1; end
    model(nlev);
    mism = 0;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        checks++;
        if (coefm[r * N + c] != xm[r][c]) begin
          failures++;
          if (mism < 8) $display("FAIL levels %0d: word (%0d,%0d) = %0d, expected %0d", lv, r, c, coefm[r * N + c], xm[r][c]);
          mism++;
        end
      end
    checks += 3;
    if (line1 != N) begin failures++; $display("FAIL %0d level-0 rows fed", line1); end
    if (n_stall == 0 || n_emit1 != N * H || n_mirror != 7 * N) begin
      failures++; $display("FAIL mechanisms: stalls %0d emits %0d mirrored %0d", n_stall, n_emit1, n_mirror);
    end
    if (n_writes != nlev * H * H || (nlev > 1) != (n_rows2 > 0)) begin
      failures++; $display("FAIL %0d column writes, %0d rows on #2", n_writes, n_rows2);
    end
    $display("levels input %0d: %0d level(s), %0d stalls, %0d samples to #2 in row passes", lv, nlev, n_stall, n_rows2);
    repeat (5) @(posedge clk); #1;
    checks++;
    if (!done || busy) begin failures++; $display("FAIL done not held"); end
  endtask

  initial begin
    for (int i = 0; i < N * H; i++) begin midl[i] = '0; midh[i] = '0; end
    repeat (3) @(posedge clk); #1;
    rst_n = 1'b1;
    repeat (2) @(posedge clk); #1;
    checks++;
    if (busy || done) begin failures++; $display("FAIL busy/done out of reset"); end
    run(1, 1);
    run(2, 2);
    run(15, 2);
    run(0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
