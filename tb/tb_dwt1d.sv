// tb_dwt1d - self-checking testbench for the 1D DWT processor.
//
// Three instances share one input stream of unsigned 8-bit samples:
//   u_mod  modified DA filters, OUT_W = 12
//   u_mux  multiplexer + split-DA filters, OUT_W = 12
//   u_sat  modified DA filters, OUT_W = 8, to exercise output saturation
// The stream is a line x[-4] .. x[N+2] with symmetric extension; in_emit is set on
// every second sample from the ninth on, so each output pair is L[k], H[k] of the
// centred 9/7 analysis. Outputs are compared with a direct computation (rounded
// rescale by 2^10 / 2^9 and saturation). Throughput is checked: with samples
// always available an output pair every 2*8+1 = 17 cycles for the modified DA
// processor and every 3*8+1 = 25 cycles for the mux processor.
module tb_dwt1d;
  import dwt_pkg::*;

  localparam int N = 64;
  localparam int H = N / 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic       in_valid = 1'b0;
  logic [7:0] in_data = '0;
  logic       in_emit = 1'b0;
  logic       rdy_mod, rdy_mux, rdy_sat;
  logic       ov_mod, ov_mux, ov_sat;
  logic signed [11:0] lo_mod, hi_mod, lo_mux, hi_mux;
  logic signed [7:0]  lo_sat, hi_sat;

  dwt1d #(.ARCH(ARCH_MODIFIED_DA), .W(8), .IN_SIGNED(1'b0), .OUT_W(12)) u_mod (
    .clk, .rst_n, .in_valid(in_valid && rdy_mux && rdy_sat), .in_ready(rdy_mod), .in_data, .in_emit,
    .out_valid(ov_mod), .out_lo(lo_mod), .out_hi(hi_mod));
  dwt1d #(.ARCH(ARCH_MUX_DA), .W(8), .IN_SIGNED(1'b0), .OUT_W(12)) u_mux (
    .clk, .rst_n, .in_valid(in_valid && rdy_mod && rdy_sat), .in_ready(rdy_mux), .in_data, .in_emit,
    .out_valid(ov_mux), .out_lo(lo_mux), .out_hi(hi_mux));
  dwt1d #(.ARCH(ARCH_MODIFIED_DA), .W(8), .IN_SIGNED(1'b0), .OUT_W(8)) u_sat (
    .clk, .rst_n, .in_valid(in_valid && rdy_mod && rdy_mux), .in_ready(rdy_sat), .in_data, .in_emit,
    .out_valid(ov_sat), .out_lo(lo_sat), .out_hi(hi_sat));

  localparam int LPC [9] = '{27, -17, -80, 273, 617, 273, -80, -17, 27};
  localparam int HPC [7] = '{47, -29, -303, 569, -303, -29, 47};

  int x [N];
  int exp_lo12 [H], exp_hi12 [H], exp_lo8 [H], exp_hi8 [H];
  int n_sat = 0;

  function automatic int mirror(int i);
    if (i < 0) return -i;
    if (i > N - 1) return 2 * (N - 1) - i;
    return i;
  endfunction

  function automatic int rnd_sat(longint v, int sh, int width);
    longint r, lim;
    r   = (v + (longint'(1) << (sh - 1))) >>> sh;
    lim = longint'(1) << (width - 1);
    if (r > lim - 1) r = lim - 1;
    if (r < -lim)    r = -lim;
    return int'(r);
  endfunction

  // output monitors
  int k_mod = 0, k_mux = 0, k_sat = 0;
  longint last_mod = -1, last_mux = -1;
  int sp_mod = 0, sp_mux = 0;
  // only one instance streams at full rate; spacing is checked in a separate run
  bit solo_mod = 0, solo_mux = 0;

  always @(posedge clk) if (rst_n) begin
    if (ov_mod) begin
      checks += 2;
      if (int'(lo_mod) != exp_lo12[k_mod] || int'(hi_mod) != exp_hi12[k_mod]) begin
        failures++; $display("FAIL mod k=%0d got %0d/%0d expected %0d/%0d", k_mod, lo_mod, hi_mod, exp_lo12[k_mod], exp_hi12[k_mod]);
      end
      if (solo_mod && last_mod >= 0 && cycle - last_mod == 17) sp_mod++;
      last_mod = cycle;
      k_mod++;
    end
    if (ov_mux) begin
      checks += 2;
      if (int'(lo_mux) != exp_lo12[k_mux] || int'(hi_mux) != exp_hi12[k_mux]) begin
        failures++; $display("FAIL mux k=%0d got %0d/%0d expected %0d/%0d", k_mux, lo_mux, hi_mux, exp_lo12[k_mux], exp_hi12[k_mux]);
      end
      if (solo_mux && last_mux >= 0 && cycle - last_mux == 25) sp_mux++;
      last_mux = cycle;
      k_mux++;
    end
    if (ov_sat) begin
      checks += 2;
      if (int'(lo_sat) != exp_lo8[k_sat] || int'(hi_sat) != exp_hi8[k_sat]) begin
        failures++; $display("FAIL sat k=%0d got %0d/%0d expected %0d/%0d", k_sat, lo_sat, hi_sat, exp_lo8[k_sat], exp_hi8[k_sat]);
      end
      if (exp_lo8[k_sat] == 127 || exp_hi8[k_sat] == 127 || exp_hi8[k_sat] == -128) n_sat++;
      k_sat++;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stream one line into the processors; all three must accept together
  task automatic run_line();
    for (int k = 0; k < H; k++) begin
      longint sl = 0, sh = 0;
      for (int n = 0; n < 9; n++) sl += longint'(LPC[n]) * x[mirror(2 * k + n - 4)];
      for (int n = 0; n < 7; n++) sh += longint'(HPC[n]) * x[mirror(2 * k + n - 2)];
      exp_lo12[k] = rnd_sat(sl, 10, 12); exp_hi12[k] = rnd_sat(sh, 9, 12);
      exp_lo8[k]  = rnd_sat(sl, 10, 8);  exp_hi8[k]  = rnd_sat(sh, 9, 8);
    end
    k_mod = 0; k_mux = 0; k_sat = 0;
    for (int s = 0; s <= N + 6; s++) begin
      in_valid = 1'b1;
      in_data  = 8'(x[mirror(s - 4)]);
      in_emit  = (s >= 8) && (s % 2 == 0);
      do @(posedge clk); while (!(rdy_mod && rdy_mux && rdy_sat));
      #1;
    end
    in_valid = 1'b0;
    repeat (40) @(posedge clk);
    #1;
    checks += 3;
    if (k_mod != H || k_mux != H || k_sat != H) begin
      failures++; $display("FAIL output counts %0d %0d %0d, expected %0d", k_mod, k_mux, k_sat, H);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk); #1;
    rst_n = 1'b1;
    @(posedge clk); #1;
    // line 1: random
    for (int i = 0; i < N; i++) x[i] = int'($urandom_range(0, 255));
    run_line();
    // line 2: steps between 0 and 255 (drives the 8-bit outputs into saturation)
    for (int i = 0; i < N; i++) x[i] = ((i / 5) % 2 == 0) ? 255 : 0;
    run_line();
    // line 3: ramp
    for (int i = 0; i < N; i++) x[i] = (i * 255) / (N - 1);
    run_line();
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL saturation never exercised"); end

    // throughput of each architecture alone: drive only its own valid
    force u_mux.in_valid = 1'b0;
    force u_sat.in_valid = 1'b0;
    solo_mod = 1;
    k_mod = 0;
    for (int k = 0; k < H; k++) begin exp_lo12[k] = 0; exp_hi12[k] = 0; end
    for (int s = 0; s < 40; s++) begin
      force u_mod.in_valid = 1'b1;
      in_data = '0; in_emit = (s >= 8) && (s % 2 == 0);
      do @(posedge clk); while (!rdy_mod);
      #1;
    end
    release u_mod.in_valid;
    repeat (40) @(posedge clk); #1;
    solo_mod = 0;
    k_mux = 0;
    release u_mux.in_valid;
    force u_mod.in_valid = 1'b0;
    solo_mux = 1;
    for (int s = 0; s < 40; s++) begin
      force u_mux.in_valid = 1'b1;
      in_data = '0; in_emit = (s >= 8) && (s % 2 == 0);
      do @(posedge clk); while (!rdy_mux);
      #1;
    end
    release u_mux.in_valid;
    repeat (40) @(posedge clk); #1;
    checks += 2;
    if (sp_mod < 15) begin failures++; $display("FAIL modified DA: %0d outputs at 17-cycle spacing", sp_mod); end
    if (sp_mux < 15) begin failures++; $display("FAIL mux DA: %0d outputs at 25-cycle spacing", sp_mux); end
    $display("spacing ok: modified %0d, mux %0d; saturated outputs %0d", sp_mod, sp_mux, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
