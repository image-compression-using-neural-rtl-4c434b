// mux_da_filter - 9/7 FIR filter built from 2:1 multiplexers and split DA.
//
// The sum y = sum_k COEFS[k] * x[k] is split in two: the first N_MUX taps are
// computed with one 2:1 multiplexer per tap (select = current bit of that sample,
// inputs = the coefficient register or zero), the last four taps with split
// distributed arithmetic (two ROMs of four entries, each addressed by the bits of
// two samples). No symmetry is used, so every tap has its own SISO register.
//
// Operation:
//   * Load: TAPS registers of W bits form one SISO chain loaded bit-serially
//     (ser_in, LSB first, one bit per cycle while ser_en is high).
//   * Compute (`start`, then W cycles): each SISO register rotates by one bit per
//     cycle, presenting bit n of every sample at its LSB. The multiplexer outputs
//     are summed into one accumulator, the two ROM words into a second one; both
//     add at the top and shift right, so after W cycles each holds sum_n p_n 2^n.
//     With IN_SIGNED the last (sign) bit slice is subtracted.
//   * Add (1 cycle): the two accumulators are added into the output register.
// With W=8 the first output appears 9*8 + 8 + 1 = 81 cycles after the first shift
// and a new output every 17 cycles (8 load + 8 compute + 1 add), since the SISO
// chain is used for both loading and computing. `busy` is high from `start`
// until the output is written; the chain must not be shifted while busy
// (assertion).
//
// Interface: y_valid is a one-cycle pulse with y valid; y holds its value.
//
// The split of the taps (multiplexers first, split DA for the last four), the
// bit-serial select and the 8 + 8 + 1 cycle schedule follow the published
// architecture. Rotating the SISO registers during computation, the separate
// accumulators and the signed mode are choices of this implementation.
module mux_da_filter
  import dwt_pkg::*;
#(
  parameter int    W         = 8,        // input sample width
  parameter int    TAPS      = 9,        // 9 (low pass) or 7 (high pass)
  parameter bit    IN_SIGNED = 1'b0,
  parameter coef_t COEFS [9] = LP_COEF,
  localparam int   Y_W       = W + 13
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  ser_in,
  input  logic                  ser_en,
  input  logic                  start,
  output logic                  busy,
  output logic signed [Y_W-1:0] y,
  output logic                  y_valid
);

  localparam int N_MUX = TAPS - 4;          // taps handled by multiplexers
  localparam int LUT_W = COEF_W + 2;
  localparam int ACC_W = COEF_W + 4 + W + 1;
  localparam int CNT_W = $clog2(W + 1);

  logic [W-1:0] siso [TAPS];
  logic             computing, adding;
  logic [CNT_W-1:0] step;
  logic             last_step;

  assign last_step = computing && (step == CNT_W'(W - 1));
  assign busy      = computing || adding;

  // SISO chain: serial load, or rotate in place while computing
  always_ff @(posedge clk) begin
    if (ser_en) begin
      siso[0] <= {ser_in, siso[0][W-1:1]};
      for (int k = 1; k < TAPS; k++) siso[k] <= {siso[k-1][0], siso[k][W-1:1]};
    end else if (start || computing) begin
      for (int k = 0; k < TAPS; k++) siso[k] <= {siso[k][0], siso[k][W-1:1]};
    end
  end

  // multiplexer bank: coefficient register or ground, selected by the sample bit
  logic signed [COEF_W-1:0] mux_out [N_MUX];
  logic signed [LUT_W+1:0]  mux_sum;

  always_comb begin
    mux_sum = '0;
    for (int k = 0; k < N_MUX; k++) begin
      mux_out[k] = siso[k][0] ? COEFS[k] : '0;
      mux_sum    = mux_sum + (LUT_W+2)'(mux_out[k]);
    end
  end

  // split DA for the last four taps
  logic signed [LUT_W-1:0] lut_a, lut_b;

  da_lut #(.COEFS(COEFS), .FIRST(N_MUX), .NBITS(2), .LUT_W(LUT_W)) u_lut_a (
    .addr({siso[N_MUX+1][0], siso[N_MUX][0]}), .data(lut_a)
  );
  da_lut #(.COEFS(COEFS), .FIRST(N_MUX + 2), .NBITS(2), .LUT_W(LUT_W)) u_lut_b (
    .addr({siso[N_MUX+3][0], siso[N_MUX+2][0]}), .data(lut_b)
  );

  // shift-right accumulators
  logic signed [ACC_W-1:0] acc_mux, acc_da;
  logic                    first, sub_slice;

  assign first     = start;
  assign sub_slice = IN_SIGNED && last_step;

  always_ff @(posedge clk) begin
    if (start || computing) begin
      logic signed [ACC_W-1:0] bm, bd, am, ad;
      bm = first ? '0 : acc_mux;
      bd = first ? '0 : acc_da;
      am = ACC_W'(mux_sum) <<< W;
      ad = ACC_W'(lut_a + lut_b) <<< W;
      acc_mux <= (sub_slice ? bm - am : bm + am) >>> 1;
      acc_da  <= (sub_slice ? bd - ad : bd + ad) >>> 1;
    end
    if (adding) y <= Y_W'(acc_mux + acc_da);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      computing <= 1'b0;
      adding    <= 1'b0;
      step      <= '0;
      y_valid   <= 1'b0;
    end else begin
      y_valid <= adding;
      adding  <= last_step;
      if (start) begin
        computing <= 1'b1;
        step      <= CNT_W'(1);
      end else if (last_step) begin
        computing <= 1'b0;
      end else if (computing) begin
        step <= step + 1'b1;
      end
    end
  end

  a_no_start_while_busy : assert property (@(posedge clk) disable iff (!rst_n)
                                           start |-> !busy);
  a_no_shift_while_busy : assert property (@(posedge clk) disable iff (!rst_n)
                                           ser_en |-> !(busy || start));

endmodule
