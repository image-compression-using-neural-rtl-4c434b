// dwt1d - one-dimensional 9/7 DWT processor (low-pass + high-pass filter pair).
//
// Accepts one sample per handshake (in_valid / in_ready) and shifts it bit-serially,
// LSB first, into the SISO chains of a 9-tap low-pass and a 7-tap high-pass filter
// that share the serial input, so the high-pass window is always the newest 7
// samples of the low-pass window of 9. When a sample is accepted with in_emit set,
// both filters are started once it is fully loaded; the caller sets in_emit on every
// second sample, which is the downsampling by two of the DWT. With the input stream
// x[2k-4] .. x[2k+4] the low pass then produces L[k] = sum h[n] x[2k+n-4] and the high
// pass H[k] = sum g[n] x[2k+n-2], the usual centred 9/7 analysis pair.
//
// Timing per sample: W cycles to shift (the accepting cycle is the first), plus one
// start cycle when in_emit. With ARCH_MODIFIED_DA the accumulation (W+1 cycles)
// overlaps the loading of the next samples; with ARCH_MUX_DA the filters compute
// in their SISO registers, so loading waits until they are idle (in_ready low).
// Outputs: out_valid pulses one cycle after the filters finish, with out_lo / out_hi
// rounded back to sample scale (divided by 2^10 and 2^9, round half up) and
// saturated to OUT_W bits.
//
// The filter pair and its bit-serial feeding follow the published 1D-DWT processor.
// The handshake, the in_emit downsampling control, the rescaling and saturation
// are choices of this implementation.
module dwt1d
  import dwt_pkg::*;
#(
  parameter arch_e ARCH      = ARCH_MODIFIED_DA,
  parameter int    W         = 8,      // input sample width
  parameter bit    IN_SIGNED = 1'b0,   // input samples are two's complement
  parameter int    OUT_W     = 12      // width of the rescaled outputs
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic [W-1:0]            in_data,
  input  logic                    in_emit,   // compute an output pair after this sample
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_lo,
  output logic signed [OUT_W-1:0] out_hi
);

  localparam int Y_W   = W + 13;
  localparam int BIT_W = $clog2(W + 1);

  typedef enum logic [1:0] {S_IDLE, S_SHIFT, S_START} state_e;

  state_e           state;
  logic [W-1:0]     sreg;
  logic [BIT_W-1:0] bits_left;
  logic             emit_q;
  logic             ser_in, ser_en, start;
  logic             busy_lo, busy_hi, filt_busy;
  logic signed [Y_W-1:0] y_lo, y_hi;
  logic             yv_lo, yv_hi;

  // the mux architecture computes inside its SISO chain: no loading while busy
  assign filt_busy = (ARCH == ARCH_MUX_DA) && (busy_lo || busy_hi);
  assign in_ready  = (state == S_IDLE) && !filt_busy;

  always_comb begin
    ser_in = 1'b0;
    ser_en = 1'b0;
    start  = 1'b0;
    case (state)
      S_IDLE:  begin ser_in = in_data[0]; ser_en = in_valid && in_ready; end
      S_SHIFT: begin ser_in = sreg[0];    ser_en = 1'b1;                 end
      S_START: start = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      sreg      <= '0;
      bits_left <= '0;
      emit_q    <= 1'b0;
    end else begin
      case (state)
        S_IDLE: if (in_valid && in_ready) begin
          sreg      <= in_data >> 1;
          bits_left <= BIT_W'(W - 1);
          emit_q    <= in_emit;
          state     <= S_SHIFT;
        end
        S_SHIFT: begin
          sreg      <= sreg >> 1;
          bits_left <= bits_left - 1'b1;
          if (bits_left == BIT_W'(1)) state <= emit_q ? S_START : S_IDLE;
        end
        S_START: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  generate
    if (ARCH == ARCH_MODIFIED_DA) begin : g_mod
      da_sym_filter #(.W(W), .TAPS(LP_TAPS), .IN_SIGNED(IN_SIGNED), .COEFS(LP_COEF)) u_lo (
        .clk, .rst_n, .ser_in, .ser_en, .start, .busy(busy_lo), .y(y_lo), .y_valid(yv_lo));
      da_sym_filter #(.W(W), .TAPS(HP_TAPS), .IN_SIGNED(IN_SIGNED), .COEFS(HP_COEF)) u_hi (
        .clk, .rst_n, .ser_in, .ser_en, .start, .busy(busy_hi), .y(y_hi), .y_valid(yv_hi));
    end else begin : g_mux
      mux_da_filter #(.W(W), .TAPS(LP_TAPS), .IN_SIGNED(IN_SIGNED), .COEFS(LP_COEF)) u_lo (
        .clk, .rst_n, .ser_in, .ser_en, .start, .busy(busy_lo), .y(y_lo), .y_valid(yv_lo));
      mux_da_filter #(.W(W), .TAPS(HP_TAPS), .IN_SIGNED(IN_SIGNED), .COEFS(HP_COEF)) u_hi (
        .clk, .rst_n, .ser_in, .ser_en, .start, .busy(busy_hi), .y(y_hi), .y_valid(yv_hi));
    end
  endgenerate

  // rescale with round-half-up and saturate
  function automatic logic signed [OUT_W-1:0] scale(input logic signed [Y_W-1:0] v, input int sh);
    logic signed [Y_W:0] r;
    r = (Y_W+1)'(v) + ((Y_W+1)'(1) <<< (sh - 1));
    r = r >>> sh;
    if (r > (Y_W+1)'(2 ** (OUT_W - 1) - 1))      return {1'b0, {(OUT_W-1){1'b1}}};
    else if (r < -(Y_W+1)'(2 ** (OUT_W - 1)))    return {1'b1, {(OUT_W-1){1'b0}}};
    else                                         return OUT_W'(r);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_lo    <= '0;
      out_hi    <= '0;
    end else begin
      out_valid <= yv_lo;
      if (yv_lo) begin
        out_lo <= scale(y_lo, LP_SHIFT);
        out_hi <= scale(y_hi, HP_SHIFT);
      end
    end
  end

  a_pair_in_step : assert property (@(posedge clk) disable iff (!rst_n) yv_lo == yv_hi);

endmodule
