// dwt2d_ctrl - control unit of the 2D DWT processor.
//
// After a `start` pulse it runs `levels` levels of decomposition of an N x N
// image. Level 0 transforms the whole image; every further level transforms each
// sub-band of the previous level again as an independent image (the tile size
// halves and the number of tiles quadruples per level), so after L levels the
// coefficient memory holds 4^L sub-blocks of N/2^L x N/2^L. Each tile of size n,
// at origin (r0, c0) of the coefficient array, goes through two passes:
//   Row pass: every tile row is read along the row and streamed as
//     x[-4] .. x[n+2] with whole-sample symmetric extension at both ends
//     (x[-i] = x[i], x[n-1+i] = x[n-1-i]); emit is set on x[4], x[6], ...,
//     x[n+2], which yields the n/2 pairs L[k], H[k] of the row. Level 0 reads the
//     input memory and uses the row processor (1D DWT #1, W-bit unsigned); later
//     levels read the coefficient memory and use 1D DWT #2, whose input is
//     OUT_W-bit signed. L[k] goes to the L buffer and H[k] to the H buffer at
//     address r*N/2 + k.
//   Column pass: every column c < n/2 of the two buffers is streamed the same way
//     down the column, from both buffers at once, to the column processors in
//     lockstep (#2 on L, #3 on H). Output row k of column c gives four words,
//     written in one cycle into the tile's quadrants: LL at (r0+k, c0+c), LH at
//     (r0+n/2+k, c0+c), HL at (r0+k, c0+n/2+c), HH at (r0+n/2+k, c0+n/2+c).
// A tile is read completely into the buffers before its results overwrite it, so
// the transform runs in place. Memory reads are synchronous: after each accepted
// sample the next address is presented and the data is offered one cycle later.
// Writes are counted separately from reads, so feeding the next line overlaps
// the last results of the previous one. `done` rises when the last word of the
// last level is written and stays high until the next `start`. Sample and result
// words pass straight through this unit; it adds addresses, enables and flags.
// Coefficient addresses are linear (row * N + column).
//
// The input memory, three 1D processors and output memory, and decomposition
// repeated until the sub-blocks are 8 x 8 (every sub-band split again), follow the
// published design. The two-pass schedule, the L/H buffers, running the later
// levels' rows on processor #2, the symmetric extension and the addressing are
// this design's choices.
module dwt2d_ctrl #(
  parameter int N      = 256,   // image is N x N
  parameter int W      = 8,     // pixel width
  parameter int OUT_W  = 16,    // coefficient width (row results and sub-bands)
  localparam int AW    = $clog2(N * N),
  localparam int AW_Q  = $clog2(N * N / 2),
  localparam int MAX_LEVELS = $clog2(N) - 3   // down to 8 x 8 sub-blocks
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [3:0]        levels,      // 1 .. MAX_LEVELS, sampled at start (clamped)
  output logic              busy,
  output logic              done,
  // input memory read
  output logic [AW-1:0]     in_raddr,
  input  logic [W-1:0]      in_rdata,
  // coefficient memory read (levels above 0)
  output logic [AW-1:0]     coef_raddr,
  input  logic [OUT_W-1:0]  coef_rdata,
  // row processor (level 0)
  output logic              p1_valid,
  input  logic              p1_ready,
  output logic [W-1:0]      p1_data,
  output logic              p1_emit,
  input  logic              p1_out_valid,
  input  logic signed [OUT_W-1:0] p1_lo,
  input  logic signed [OUT_W-1:0] p1_hi,
  // row-pass buffers (L half and H half)
  output logic              mid_we,
  output logic [AW_Q-1:0]   mid_waddr,
  output logic [OUT_W-1:0]  midl_wdata,
  output logic [OUT_W-1:0]  midh_wdata,
  output logic [AW_Q-1:0]   mid_raddr,
  input  logic [OUT_W-1:0]  midl_rdata,
  input  logic [OUT_W-1:0]  midh_rdata,
  // processor #2 (rows above level 0, L columns) and #3 (H columns)
  output logic              p2_valid,
  output logic              p3_valid,
  input  logic              p2_ready,
  input  logic              p3_ready,
  output logic [OUT_W-1:0]  p2_data,
  output logic [OUT_W-1:0]  p3_data,
  output logic              pc_emit,
  input  logic              p2_out_valid,
  input  logic              p3_out_valid,
  input  logic signed [OUT_W-1:0] p2_lo,
  input  logic signed [OUT_W-1:0] p2_hi,
  input  logic signed [OUT_W-1:0] p3_lo,
  input  logic signed [OUT_W-1:0] p3_hi,
  // coefficient memory write: 0 LL, 1 LH, 2 HL, 3 HH, each at its own address
  output logic              coef_we,
  output logic [AW-1:0]     coef_waddr [4],
  output logic [OUT_W-1:0]  coef_wdata [4]
);

  localparam int LN    = $clog2(N);
  localparam int HALF  = N / 2;
  localparam int SW    = $clog2(N + 8) + 1;
  localparam int LW    = LN + 1;

  typedef enum logic [2:0] {C_IDLE, C_ROW, C_ROW_WAIT, C_COL, C_COL_WAIT, C_DONE} cstate_e;

  cstate_e       state;
  logic [SW-1:0] s;            // position in the extended line stream
  logic [LW-1:0] line;         // row (row pass) or column (column pass) being fed
  logic          dv;           // memory data for the current address is valid
  logic [LW-1:0] wr_line;      // line whose outputs are being written
  logic [LW-1:0] wr_k;         // output index within that line
  logic [LW-1:0] pos;          // mirrored sample position along the line
  logic          fire_row, fire_col, last_s, row_out_valid;
  logic [3:0]    lvl, last_lvl;   // current and final level
  logic [LN-1:0] tr, tc;          // tile row / column index within the level
  logic [LW-1:0] n, half;         // tile size and half of it
  logic [LN-1:0] r0, c0;          // tile origin
  logic [LN-1:0] tiles_m1;        // tiles per side - 1

  assign n        = LW'(N) >> lvl;
  assign half     = n >> 1;
  assign r0       = LN'(tr << (LN - int'(lvl)));
  assign c0       = LN'(tc << (LN - int'(lvl)));
  assign tiles_m1 = LN'((1 << lvl) - 1);

  // whole-sample symmetric extension of stream index s (x index s-4) in a tile
  always_comb begin
    int i;
    i = int'(s) - 4;
    if (i < 0)                 pos = LW'(-i);
    else if (i > int'(n) - 1)  pos = LW'(2 * (int'(n) - 1) - i);
    else                       pos = LW'(i);
  end

  assign last_s     = (int'(s) == int'(n) + 6);
  assign in_raddr   = {LN'(r0 + LN'(line)), LN'(c0 + LN'(pos))};
  assign coef_raddr = in_raddr;
  assign mid_raddr  = AW_Q'(pos) * AW_Q'(HALF) + AW_Q'(line);

  assign p1_emit  = (s >= SW'(8)) && !s[0];
  assign pc_emit  = p1_emit;
  assign p1_data  = in_rdata;
  assign p1_valid = (state == C_ROW) && dv && (lvl == '0);
  assign p2_valid = ((state == C_ROW) && (lvl != '0) || (state == C_COL)) && dv;
  assign p3_valid = (state == C_COL) && dv;
  assign p2_data  = (state == C_COL) ? midl_rdata : coef_rdata;
  assign p3_data  = midh_rdata;
  assign fire_row = (state == C_ROW) && dv && ((lvl == '0) ? p1_ready : p2_ready);
  assign fire_col = p3_valid && p2_ready && p3_ready;

  assign busy = (state != C_IDLE) && (state != C_DONE);
  assign done = (state == C_DONE);

  logic tile_end;
  assign tile_end = (state == C_COL_WAIT) && (wr_line == half);

  // ---------------- feeding and tile sequencing ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= C_IDLE;
      s        <= '0;
      line     <= '0;
      dv       <= 1'b0;
      lvl      <= '0;
      last_lvl <= '0;
      tr       <= '0;
      tc       <= '0;
    end else begin
      dv <= !(fire_row || fire_col) && (state == C_ROW || state == C_COL);
      case (state)
        C_IDLE, C_DONE: if (start) begin
          state    <= C_ROW;
          s        <= '0;
          line     <= '0;
          lvl      <= '0;
          tr       <= '0;
          tc       <= '0;
          if (levels == '0)                     last_lvl <= '0;
          else if (int'(levels) > MAX_LEVELS)   last_lvl <= 4'(MAX_LEVELS - 1);
          else                                  last_lvl <= levels - 1'b1;
        end
        C_ROW: if (fire_row) begin
          if (last_s) begin
            s <= '0;
            if (line == n - 1'b1) state <= C_ROW_WAIT;
            else                  line  <= line + 1'b1;
          end else begin
            s <= s + 1'b1;
          end
        end
        C_ROW_WAIT: if (wr_line == n) begin
          state <= C_COL;
          s     <= '0;
          line  <= '0;
        end
        C_COL: if (fire_col) begin
          if (last_s) begin
            s <= '0;
            if (line == half - 1'b1) state <= C_COL_WAIT;
            else                     line  <= line + 1'b1;
          end else begin
            s <= s + 1'b1;
          end
        end
        C_COL_WAIT: if (tile_end) begin
          s     <= '0;
          line  <= '0;
          state <= C_ROW;
          if (tc != tiles_m1) begin
            tc <= tc + 1'b1;
          end else begin
            tc <= '0;
            if (tr != tiles_m1) begin
              tr <= tr + 1'b1;
            end else begin
              tr <= '0;
              if (lvl == last_lvl) state <= C_DONE;
              else                 lvl   <= lvl + 1'b1;
            end
          end
        end
        default: state <= C_IDLE;
      endcase
    end
  end

  // ---------------- result writing ----------------
  logic wr_ev;
  assign row_out_valid = (lvl == '0) ? p1_out_valid : p2_out_valid;
  assign wr_ev = ((state == C_ROW || state == C_ROW_WAIT) && row_out_valid) ||
                 ((state == C_COL || state == C_COL_WAIT) && p2_out_valid);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_line <= '0;
      wr_k    <= '0;
    end else if (((state == C_IDLE || state == C_DONE) && start) ||
                 (state == C_ROW_WAIT && wr_line == n) || tile_end) begin
      wr_line <= '0;
      wr_k    <= '0;
    end else if (wr_ev) begin
      if (wr_k == half - 1'b1) begin
        wr_k    <= '0;
        wr_line <= wr_line + 1'b1;
      end else begin
        wr_k <= wr_k + 1'b1;
      end
    end
  end

  assign mid_we     = (state == C_ROW || state == C_ROW_WAIT) && row_out_valid;
  assign mid_waddr  = AW_Q'(wr_line) * AW_Q'(HALF) + AW_Q'(wr_k);
  assign midl_wdata = (lvl == '0) ? p1_lo : p2_lo;
  assign midh_wdata = (lvl == '0) ? p1_hi : p2_hi;

  // output row k = wr_k of column c = wr_line goes to the four quadrants of the tile
  logic [LN-1:0] row_lo, row_hi, col_lo, col_hi;
  assign row_lo = r0 + LN'(wr_k);
  assign row_hi = row_lo + LN'(half);
  assign col_lo = c0 + LN'(wr_line);
  assign col_hi = col_lo + LN'(half);

  assign coef_we       = (state == C_COL || state == C_COL_WAIT) && p2_out_valid;
  assign coef_waddr[0] = {row_lo, col_lo};
  assign coef_waddr[1] = {row_hi, col_lo};
  assign coef_waddr[2] = {row_lo, col_hi};
  assign coef_waddr[3] = {row_hi, col_hi};
  assign coef_wdata[0] = p2_lo;
  assign coef_wdata[1] = p2_hi;
  assign coef_wdata[2] = p3_lo;
  assign coef_wdata[3] = p3_hi;

  // in the column pass the two column processors run in lockstep
  a_cols_lockstep : assert property (@(posedge clk) disable iff (!rst_n)
                                     (state == C_COL || state == C_COL_WAIT) |-> p2_out_valid == p3_out_valid);
  a_cols_ready    : assert property (@(posedge clk) disable iff (!rst_n)
                                     (state == C_COL) |-> p2_ready == p3_ready);
  a_p3_quiet      : assert property (@(posedge clk) disable iff (!rst_n)
                                     (state == C_ROW || state == C_ROW_WAIT) |-> !p3_out_valid);

endmodule
