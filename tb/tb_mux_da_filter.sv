// tb_mux_da_filter - self-checking testbench for the multiplexer + split DA filter.
//
// Four instances: 9-tap low pass and 7-tap high pass on unsigned 8-bit samples
// (the published configuration), and the same pair on signed 12-bit samples.
// Samples are shifted in bit-serially, LSB first. Every output is compared with a
// direct convolution of the samples held in a software history. Checked timing:
//   * first output of the low pass 9*8 + 8 + 1 = 81 cycles after its first shift,
//   * first output of the high pass 7*8 + 8 + 1 = 65 cycles after its first shift,
//   * in streaming (8 shift cycles, 1 start, wait while busy) one output every
//     17 cycles, and no shifting is attempted while the filter is busy.
module tb_mux_da_filter;
  import dwt_pkg::*;

  localparam int NI = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic        ser_in [NI];
  logic        ser_en [NI];
  logic        start  [NI];
  logic        busy   [NI];
  logic        yv     [NI];
  logic signed [20:0] y8  [2];
  logic signed [24:0] y12 [2];

  mux_da_filter #(.W(8),  .TAPS(9), .IN_SIGNED(1'b0), .COEFS(LP_COEF)) u_lp8 (
    .clk, .rst_n, .ser_in(ser_in[0]), .ser_en(ser_en[0]), .start(start[0]), .busy(busy[0]), .y(y8[0]), .y_valid(yv[0]));
  mux_da_filter #(.W(8),  .TAPS(7), .IN_SIGNED(1'b0), .COEFS(HP_COEF)) u_hp8 (
    .clk, .rst_n, .ser_in(ser_in[1]), .ser_en(ser_en[1]), .start(start[1]), .busy(busy[1]), .y(y8[1]), .y_valid(yv[1]));
  mux_da_filter #(.W(12), .TAPS(9), .IN_SIGNED(1'b1), .COEFS(LP_COEF)) u_lp12 (
    .clk, .rst_n, .ser_in(ser_in[2]), .ser_en(ser_en[2]), .start(start[2]), .busy(busy[2]), .y(y12[0]), .y_valid(yv[2]));
  mux_da_filter #(.W(12), .TAPS(7), .IN_SIGNED(1'b1), .COEFS(HP_COEF)) u_hp12 (
    .clk, .rst_n, .ser_in(ser_in[3]), .ser_en(ser_en[3]), .start(start[3]), .busy(busy[3]), .y(y12[1]), .y_valid(yv[3]));

  function automatic int width_of(int i);  return (i < 2) ? 8 : 12; endfunction
  function automatic int taps_of(int i);   return (i % 2 == 0) ? 9 : 7; endfunction

  // software history, newest sample first
  longint hist [NI][9];
  longint expq [NI][$];
  longint tstart [NI][$];
  longint last_valid [NI];
  int     spacing_ok [NI];
  int     outputs [NI];

  function automatic longint ref_y(int i);
    longint s = 0;
    for (int k = 0; k < taps_of(i); k++)
      s += longint'(((i % 2) == 0) ? LP_COEF[k] : HP_COEF[k]) * hist[i][k];
    return s;
  endfunction

  function automatic longint rand_sample(int i);
    longint v;
    if (i < 2) v = longint'($urandom_range(0, 255));
    else       v = longint'($urandom_range(0, 4095)) - 2048;
    return v;
  endfunction

  // shift one sample into the instances in mask (all in parallel, same width group)
  task automatic shift_sample(input bit mask [NI], input longint v [NI]);
    int wmax = 0;
    for (int i = 0; i < NI; i++) if (mask[i] && width_of(i) > wmax) wmax = width_of(i);
    for (int b = 0; b < wmax; b++) begin
      for (int i = 0; i < NI; i++) begin
        ser_en[i] = mask[i] && (b < width_of(i));
        ser_in[i] = v[i][b];
      end
      @(posedge clk); #1;
    end
    for (int i = 0; i < NI; i++) begin
      ser_en[i] = 1'b0;
      if (mask[i]) begin
        for (int k = 8; k > 0; k--) hist[i][k] = hist[i][k-1];
        hist[i][0] = v[i];
      end
    end
  endtask

  task automatic pulse_start(input bit mask [NI]);
    for (int i = 0; i < NI; i++) begin
      start[i] = mask[i];
      if (mask[i]) begin
        expq[i].push_back(ref_y(i));
        tstart[i].push_back(cycle);
      end
    end
    @(posedge clk); #1;
    for (int i = 0; i < NI; i++) start[i] = 1'b0;
    // the SISO chain is in use until the output is written
    for (int i = 0; i < NI; i++) while (busy[i]) begin @(posedge clk); #1; end
  endtask

  // output monitor
  always @(posedge clk) begin
    for (int i = 0; i < NI; i++) begin
      if (rst_n && yv[i]) begin
        longint got, e, t0;
        got = (i < 2) ? longint'(y8[i % 2]) : longint'(y12[i % 2]);
        checks++;
        if (expq[i].size() == 0) begin
          failures++; $display("FAIL inst %0d: unexpected output", i);
        end else begin
          e  = expq[i].pop_front();
          t0 = tstart[i].pop_front();
          if (got != e) begin
            failures++; $display("FAIL inst %0d: y=%0d expected %0d", i, got, e);
          end
          // output pulse exactly W+1 cycles after start (W compute + 1 add)
          checks++;
          if (cycle - t0 != longint'(width_of(i) + 1)) begin
            failures++; $display("FAIL inst %0d: start-to-output %0d cycles", i, cycle - t0);
          end
        end
        outputs[i]++;
        if (last_valid[i] >= 0 && cycle - last_valid[i] == longint'(2 * width_of(i) + 1)) spacing_ok[i]++;
        last_valid[i] = cycle;
      end
    end
  end

  // watchdog
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint t_first;
  bit     m [NI];
  longint v [NI];

  initial begin
    for (int i = 0; i < NI; i++) begin
      ser_in[i] = 0; ser_en[i] = 0; start[i] = 0; last_valid[i] = -1;
      spacing_ok[i] = 0; outputs[i] = 0;
      for (int k = 0; k < 9; k++) hist[i][k] = 0;
    end
    repeat (3) @(posedge clk); #1;
    rst_n = 1'b1;
    @(posedge clk); #1;

    // ---- latency of the 8-bit high pass alone: 7 samples, start, output ----
    m = '{0, 1, 0, 0};
    t_first = cycle;
    for (int s = 0; s < 7; s++) begin
      for (int i = 0; i < NI; i++) v[i] = rand_sample(i);
      shift_sample(m, v);
    end
    pulse_start(m);
    do @(posedge clk); while (!yv[1]);
    checks++;
    if (cycle - t_first != 65) begin
      failures++; $display("FAIL high pass latency %0d, expected 65", cycle - t_first);
    end
    @(posedge clk); #1;

    // ---- latency of the 8-bit low pass alone: 9 samples, start, output ----
    m = '{1, 0, 0, 0};
    t_first = cycle;
    for (int s = 0; s < 9; s++) begin
      for (int i = 0; i < NI; i++) v[i] = rand_sample(i);
      shift_sample(m, v);
    end
    pulse_start(m);
    do @(posedge clk); while (!yv[0]);
    checks++;
    if (cycle - t_first != 81) begin
      failures++; $display("FAIL low pass latency %0d, expected 81", cycle - t_first);
    end
    @(posedge clk); #1;

    // ---- streaming: all four, a start after every sample ----
    for (int i = 0; i < NI; i++) last_valid[i] = -1;
    for (int s = 0; s < 9; s++) begin
      for (int i = 0; i < NI; i++) v[i] = rand_sample(i);
      shift_sample('{1, 1, 0, 0}, v);
    end
    for (int s = 0; s < 60; s++) begin
      for (int i = 0; i < NI; i++) v[i] = (s % 10 == 0) ? ((i < 2) ? 255 : -2048) : rand_sample(i);
      shift_sample('{1, 1, 0, 0}, v);
      pulse_start('{1, 1, 0, 0});
    end
    repeat (12) @(posedge clk); #1;
    // signed 12-bit pair: 12 shift cycles + 1 start per sample
    for (int s = 0; s < 9; s++) begin
      for (int i = 0; i < NI; i++) v[i] = rand_sample(i);
      shift_sample('{0, 0, 1, 1}, v);
    end
    for (int s = 0; s < 60; s++) begin
      for (int i = 0; i < NI; i++) v[i] = (s % 7 == 0) ? ((s % 2 == 0) ? 2047 : -2048) : rand_sample(i);
      shift_sample('{0, 0, 1, 1}, v);
      pulse_start('{0, 0, 1, 1});
    end
    repeat (20) @(posedge clk);

    // throughput: back-to-back outputs every W+1 cycles (9 for 8-bit samples)
    for (int i = 0; i < NI; i++) begin
      checks++;
      if (spacing_ok[i] < 59) begin
        failures++; $display("FAIL inst %0d: only %0d outputs at %0d-cycle spacing", i, spacing_ok[i], 2 * width_of(i) + 1);
      end
      checks++;
      if (expq[i].size() != 0) begin
        failures++; $display("FAIL inst %0d: %0d outputs missing", i, expq[i].size());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
