// dwt2d - 2D 9/7 discrete wavelet transform processor (top level).
//
// An N x N image of W-bit pixels is written into the input memory through the
// load port. A `start` pulse runs `levels` levels of decomposition. Level 1
// gives the four sub-bands LL, LH, HL and HH, each N/2 x N/2. Every further
// level splits each sub-band of the previous level into four again, until at
// the maximum of log2(N) - 3 levels the image is 4^L sub-blocks of 8 x 8.
// After `done` the coefficients are read through the read port as one N x N
// array in the usual quadrant layout. A tile of size n splits into LL in the
// top-left quadrant, LH (low-pass rows, high-pass columns) in the bottom-left,
// HL in the top-right and HH in the bottom-right, recursively. Inside:
//   * input memory        N*N x W bits
//   * 1D DWT #1           row processor of level 0 (W-bit unsigned input)
//   * row buffers         L and H halves of a row-transformed tile, OUT_W bits
//   * 1D DWT #2, #3       column processors on the L and the H half (OUT_W-bit
//                         signed input); #2 also does the rows of later levels
//   * coefficient memory  N*N x OUT_W bits in four banks
//   * control unit        sequencing, addressing and symmetric boundary extension
// The bank of coefficient (r, c) is {XOR of the bits of r, XOR of the bits of c}
// and its word within the bank is {r >> 1, c >> 1}. The four words of one column
// output differ in one row bit and/or one column bit, so they always fall in four
// different banks and are written in the same cycle.
// The 1D processors use the modified distributed-arithmetic filters by default
// (ARCH = ARCH_MODIFIED_DA); ARCH_MUX_DA selects the multiplexer + split-DA filters.
//
// Coefficients follow the usual 9/7 analysis convention with integer taps: after
// each 1D pass the results are rescaled by 2^-10 (low pass) and 2^-9 (high pass)
// with rounding and saturated to OUT_W bits.
//
// Timing with the default filters: a tile of size n takes
// n * ((n+7)*Wr + n/2) cycles for its rows, with Wr = W at level 0 and OUT_W
// above it, plus n/2 * ((n+7)*OUT_W + n/2) cycles for its columns. That is about
// 1.1 M cycles for one level at N = 256 and about 9 M cycles for all five levels.
// The read port reads the coefficient memory only while the processor is not busy.
//
// The composition (input memory, three 1D-DWT processors, output memory), image
// size N = 256, 8-bit pixels and decomposition down to 8 x 8 sub-blocks follow
// the published design. The row buffers, widths, rescaling, memory banking and
// port protocol are this design's choices.
module dwt2d
  import dwt_pkg::*;
#(
  parameter int    N      = 256,
  parameter int    W      = 8,
  parameter int    OUT_W  = 16,
  parameter arch_e ARCH   = ARCH_MODIFIED_DA,
  localparam int   AW     = $clog2(N * N)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // image load port
  input  logic                    load_we,
  input  logic [AW-1:0]           load_addr,   // row * N + column
  input  logic [W-1:0]            load_data,
  // control
  input  logic                    start,
  input  logic [3:0]              levels,      // 1 .. log2(N)-3, sampled at start
  output logic                    busy,
  output logic                    done,
  // coefficient read port (data one cycle after address)
  input  logic [AW-1:0]           rd_addr,     // row * N + column
  output logic signed [OUT_W-1:0] rd_data
);

  localparam int AW_Q = $clog2(N * N / 2);
  localparam int AW_B = $clog2(N * N / 4);
  localparam int LN   = $clog2(N);

  // input memory
  logic [AW-1:0] in_raddr;
  logic [W-1:0]  in_rdata;

  frame_mem #(.DEPTH(N * N), .WIDTH(W)) u_in_mem (
    .clk, .we(load_we), .waddr(load_addr), .wdata(load_data),
    .raddr(in_raddr), .rdata(in_rdata)
  );

  // row processor
  logic                    p1_valid, p1_ready, p1_emit, p1_out_valid;
  logic [W-1:0]            p1_data;
  logic signed [OUT_W-1:0] p1_lo, p1_hi;

  dwt1d #(.ARCH(ARCH), .W(W), .IN_SIGNED(1'b0), .OUT_W(OUT_W)) u_row (
    .clk, .rst_n, .in_valid(p1_valid), .in_ready(p1_ready), .in_data(p1_data),
    .in_emit(p1_emit), .out_valid(p1_out_valid), .out_lo(p1_lo), .out_hi(p1_hi)
  );

  // row buffers
  logic             mid_we;
  logic [AW_Q-1:0]  mid_waddr, mid_raddr;
  logic [OUT_W-1:0] midl_wdata, midh_wdata, midl_rdata, midh_rdata;

  frame_mem #(.DEPTH(N * N / 2), .WIDTH(OUT_W)) u_mid_l (
    .clk, .we(mid_we), .waddr(mid_waddr), .wdata(midl_wdata),
    .raddr(mid_raddr), .rdata(midl_rdata)
  );
  frame_mem #(.DEPTH(N * N / 2), .WIDTH(OUT_W)) u_mid_h (
    .clk, .we(mid_we), .waddr(mid_waddr), .wdata(midh_wdata),
    .raddr(mid_raddr), .rdata(midh_rdata)
  );

  // column processors (#2 also runs the rows of levels above 0)
  logic                    p2_valid, p3_valid, pc_emit, p2_ready, p3_ready, p2_out_valid, p3_out_valid;
  logic [OUT_W-1:0]        p2_data, p3_data;
  logic signed [OUT_W-1:0] p2_lo, p2_hi, p3_lo, p3_hi;

  dwt1d #(.ARCH(ARCH), .W(OUT_W), .IN_SIGNED(1'b1), .OUT_W(OUT_W)) u_col_l (
    .clk, .rst_n, .in_valid(p2_valid), .in_ready(p2_ready), .in_data(p2_data),
    .in_emit(pc_emit), .out_valid(p2_out_valid), .out_lo(p2_lo), .out_hi(p2_hi)
  );
  dwt1d #(.ARCH(ARCH), .W(OUT_W), .IN_SIGNED(1'b1), .OUT_W(OUT_W)) u_col_h (
    .clk, .rst_n, .in_valid(p3_valid), .in_ready(p3_ready), .in_data(p3_data),
    .in_emit(pc_emit), .out_valid(p3_out_valid), .out_lo(p3_lo), .out_hi(p3_hi)
  );

  // coefficient memory: four banks selected by row / column bit parity
  logic             coef_we;
  logic [AW-1:0]    coef_waddr [4];
  logic [OUT_W-1:0] coef_wdata [4];
  logic [AW-1:0]    coef_raddr, raddr;
  logic [OUT_W-1:0] coef_rdata;
  logic [AW_B-1:0]  bank_waddr [4];
  logic [OUT_W-1:0] bank_wdata [4];
  logic [OUT_W-1:0] bank_rdata [4];
  logic [1:0]       rbank_q;

  function automatic logic [1:0] bank_of(input logic [AW-1:0] a);
    return {^a[AW-1:LN], ^a[LN-1:0]};
  endfunction

  // route each of the four result words to its bank
  always_comb begin
    for (int b = 0; b < 4; b++) begin
      bank_waddr[b] = '0;
      bank_wdata[b] = '0;
      for (int q = 0; q < 4; q++)
        if (bank_of(coef_waddr[q]) == 2'(b)) begin
          bank_waddr[b] = {coef_waddr[q][AW-1:LN+1], coef_waddr[q][LN-1:1]};
          bank_wdata[b] = coef_wdata[q];
        end
    end
  end

  assign raddr = busy ? coef_raddr : rd_addr;

  for (genvar b = 0; b < 4; b++) begin : g_bank
    frame_mem #(.DEPTH(N * N / 4), .WIDTH(OUT_W)) u_bank (
      .clk, .we(coef_we), .waddr(bank_waddr[b]), .wdata(bank_wdata[b]),
      .raddr({raddr[AW-1:LN+1], raddr[LN-1:1]}), .rdata(bank_rdata[b])
    );
  end

  always_ff @(posedge clk) rbank_q <= bank_of(raddr);
  assign coef_rdata = bank_rdata[rbank_q];
  assign rd_data    = $signed(coef_rdata);

  // control unit
  dwt2d_ctrl #(.N(N), .W(W), .OUT_W(OUT_W)) u_ctrl (
    .clk, .rst_n, .start, .levels, .busy, .done,
    .in_raddr, .in_rdata, .coef_raddr, .coef_rdata,
    .p1_valid, .p1_ready, .p1_data, .p1_emit, .p1_out_valid, .p1_lo, .p1_hi,
    .mid_we, .mid_waddr, .midl_wdata, .midh_wdata, .mid_raddr, .midl_rdata, .midh_rdata,
    .p2_valid, .p3_valid, .p2_ready, .p3_ready, .p2_data, .p3_data, .pc_emit,
    .p2_out_valid, .p3_out_valid, .p2_lo, .p2_hi, .p3_lo, .p3_hi,
    .coef_we, .coef_waddr, .coef_wdata
  );

endmodule
