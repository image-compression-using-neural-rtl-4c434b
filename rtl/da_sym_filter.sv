// da_sym_filter - symmetric 9/7 FIR filter in modified distributed arithmetic.
//
// Computes y = sum_k COEFS[k] * x[k] over the TAPS most recent samples without
// multipliers. The structure follows the modified DA architecture:
//   1. SISO chain: TAPS registers of W bits form one long shift register that is
//      loaded bit-serially (ser_in, LSB of each sample first, one bit per cycle
//      while ser_en is high). W cycles move every sample one register down.
//   2. First-stage adders: the samples that share a coefficient (k and TAPS-1-k)
//      are added; the centre sample is passed on. This gives NP = (TAPS+1)/2 sums
//      of W+1 bits.
//   3. PISO: on `start` the NP sums are loaded in parallel into PISO registers
//      (one cycle). They then shift right once per cycle for B = W+1 cycles.
//   4. Split LUTs: the LSBs of the first TOP_PAIRS PISOs address the top ROM
//      (depth 4 for the default 2), the LSBs of the rest address the bottom ROM
//      (depth 8 for the 9-tap low pass, 4 for the 7-tap high pass).
//   5. Each ROM output goes to its own accumulator, which adds the word at the
//      top and shifts the whole register right by one bit per cycle, so that after
//      B cycles it holds sum_n lut_n * 2^n exactly. With IN_SIGNED the last (sign)
//      bit slice is subtracted (two's complement DA). A final adder sums the two
//      accumulators.
// Because the SISO chain and the PISO registers are separate, the next sample can
// be shifted in while the current window is being accumulated: with W=8 a new
// output every 9 cycles (8 shift cycles + 1 start cycle), and the first output 82
// cycles after the first shift (72 load + 1 start + 9 accumulate).
//
// Interface: y / y_valid: y_valid is a one-cycle pulse in the cycle after the last
// accumulation step, and y holds its value until the next accumulation starts.
// `start` may be given at the earliest in the last accumulation cycle of the
// previous window (checked by an assertion).
//
// The bit-serial SISO/PISO structure, the pre-adders, the split into a 2-input and
// a 3-input LUT and the cycle counts follow the published architecture. The
// assignment of pairs to the two LUTs (outer pairs to the top LUT), LSB-first
// serial order, the optional signed mode and the exact-width accumulators are
// choices of this implementation.
module da_sym_filter
  import dwt_pkg::*;
#(
  parameter int    W         = 8,        // input sample width
  parameter int    TAPS      = 9,        // 9 (low pass) or 7 (high pass)
  parameter bit    IN_SIGNED = 1'b0,     // samples are two's complement
  parameter coef_t COEFS [9] = LP_COEF,  // taps 0..TAPS-1 used, symmetric
  parameter int    TOP_PAIRS = 2,        // PISO registers addressing the top LUT
  localparam int   Y_W       = W + 13    // output width
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  ser_in,    // serial sample bit, LSB first
  input  logic                  ser_en,    // shift the SISO chain by one bit
  input  logic                  start,     // pre-add and load the PISO registers
  output logic                  busy,      // accumulation in progress
  output logic signed [Y_W-1:0] y,
  output logic                  y_valid
);

  localparam int NP    = (TAPS + 1) / 2;   // PISO registers after pre-adding
  localparam int BOT   = NP - TOP_PAIRS;   // PISO registers addressing the bottom LUT
  localparam int B     = W + 1;            // bits per pre-added sum = accumulation cycles
  localparam int LUT_W = COEF_W + 2;
  localparam int ACC_W = LUT_W + B + 1;
  localparam int CNT_W = $clog2(B + 1);

  // ---------------- SISO chain ----------------
  logic [W-1:0] siso [TAPS];

  always_ff @(posedge clk) begin
    if (ser_en) begin
      siso[0] <= {ser_in, siso[0][W-1:1]};
      for (int k = 1; k < TAPS; k++) siso[k] <= {siso[k-1][0], siso[k][W-1:1]};
    end
  end

  // ---------------- first-stage adders ----------------
  logic [B-1:0] presum [NP];

  always_comb begin
    for (int i = 0; i < NP; i++) begin
      if (2 * i + 1 == TAPS) begin
        // centre tap, no partner
        presum[i] = IN_SIGNED ? {siso[i][W-1], siso[i]} : {1'b0, siso[i]};
      end else if (IN_SIGNED) begin
        presum[i] = {siso[i][W-1], siso[i]} + {siso[TAPS-1-i][W-1], siso[TAPS-1-i]};
      end else begin
        presum[i] = {1'b0, siso[i]} + {1'b0, siso[TAPS-1-i]};
      end
    end
  end

  // ---------------- PISO registers and control ----------------
  logic [B-1:0]     piso [NP];
  logic             active;
  logic [CNT_W-1:0] step;
  logic             last_step;

  assign last_step = active && (step == CNT_W'(B - 1));
  assign busy      = active;

  always_ff @(posedge clk) begin
    if (start) begin
      for (int i = 0; i < NP; i++) piso[i] <= presum[i];
    end else if (active) begin
      for (int i = 0; i < NP; i++) piso[i] <= piso[i] >> 1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active  <= 1'b0;
      step    <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= last_step;
      if (start) begin
        active <= 1'b1;
        step   <= '0;
      end else if (last_step) begin
        active <= 1'b0;
      end else if (active) begin
        step <= step + 1'b1;
      end
    end
  end

  // ---------------- split LUTs ----------------
  logic [TOP_PAIRS-1:0]   top_addr;
  logic [BOT-1:0]         bot_addr;
  logic signed [LUT_W-1:0] top_word, bot_word;

  always_comb begin
    for (int i = 0; i < TOP_PAIRS; i++) top_addr[i] = piso[i][0];
    for (int i = 0; i < BOT; i++)       bot_addr[i] = piso[TOP_PAIRS + i][0];
  end

  da_lut #(.COEFS(COEFS), .FIRST(0), .NBITS(TOP_PAIRS), .LUT_W(LUT_W)) u_top_lut (
    .addr(top_addr), .data(top_word)
  );
  da_lut #(.COEFS(COEFS), .FIRST(TOP_PAIRS), .NBITS(BOT), .LUT_W(LUT_W)) u_bot_lut (
    .addr(bot_addr), .data(bot_word)
  );

  // ---------------- shift-right accumulators ----------------
  logic signed [ACC_W-1:0] acc_top, acc_bot;
  logic signed [ACC_W-1:0] nxt_top, nxt_bot;
  logic                    sub_slice;

  assign sub_slice = IN_SIGNED && (step == CNT_W'(B - 1));

  always_comb begin
    logic signed [ACC_W-1:0] base_t, base_b, add_t, add_b;
    base_t = (step == '0) ? '0 : acc_top;
    base_b = (step == '0) ? '0 : acc_bot;
    add_t  = ACC_W'(top_word) <<< B;
    add_b  = ACC_W'(bot_word) <<< B;
    nxt_top = (sub_slice ? base_t - add_t : base_t + add_t) >>> 1;
    nxt_bot = (sub_slice ? base_b - add_b : base_b + add_b) >>> 1;
  end

  always_ff @(posedge clk) begin
    if (active) begin
      acc_top <= nxt_top;
      acc_bot <= nxt_bot;
    end
  end

  // final adder
  assign y = Y_W'(acc_top + acc_bot);

  // A new window may only be started once the previous one is in its last step.
  a_start_spacing : assert property (@(posedge clk) disable iff (!rst_n)
                                     start |-> (!active || last_step));
  // The SISO chain must not move in the cycle its contents are pre-added.
  a_no_shift_on_start : assert property (@(posedge clk) disable iff (!rst_n)
                                         start |-> !ser_en);

endmodule
