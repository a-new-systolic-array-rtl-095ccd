// gdht_odd_top -- odd-time generalized discrete Hartley transform processor.
//
// Computes, for a prime length N and a block of real samples x(0..N-1),
//   Y(k) = sum_i x(i) * [cos((2i+1) k pi/N) + sin((2i+1) k pi/N)],  k = 0..N-1.
// The transform is restructured into two band-correlations of length
// (N-1)/2 that run in parallel on two identical linear systolic arrays:
//   input_restructure  x -> x_C, x_S and the folded, permuted operands
//   band_stream_ctrl   coefficient, tag-bit and operand streams
//   band_corr_array x2 T_C and T_S (one row per cycle)
//   gdht_post          H_C, H_S and the final rotation into Y(k), Y(N-k)
// This decomposition and the two arrays follow the published algorithm and
// architecture; the fixed-point formats, the block handshake and the
// control timing are this design's own.
//
// Interface: a block x_i is taken on a rising edge with in_valid && in_ready.
// in_ready is high when the arrays are idle or playing the last element of
// the previous block's stream, so a new block can be taken every N-2 cycles.
// out_valid is a one-cycle pulse 3(N-1)/2 cycles after the block was taken;
// y_o holds the result from then until the next block's results start to
// arrive (at least (N-3)/2 cycles). There is no output back-pressure.
// y_o is rounded to integers. Synchronous active-low reset.
module gdht_odd_top
  import gdht_pkg::*;
#(
  parameter int N  = N_DEF,
  parameter int G  = G_DEF,
  parameter int XW = XW_DEF,
  parameter int CW = CW_DEF,
  parameter int CF = CF_DEF,
  localparam int YW = out_width(XW, N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [XW-1:0] x_i [N],
  output logic                 out_valid,
  output logic signed [YW-1:0] y_o [N]
);

  localparam int M  = (N - 1) / 2;
  localparam int UW = aux_width(XW, N);
  localparam int VW = opnd_width(XW, N);
  localparam int TW = corr_width(XW, CW, N);

  if (!is_primitive_root(G, N)) begin : g_bad_root
    $error("G is not a primitive root of N");
  end
  if (CF > CW - 2) begin : g_bad_cf
    $error("CF must leave two integer bits in CW");
  end

  logic signed [VW-1:0] uc [M];
  logic signed [VW-1:0] us [M];
  logic signed [UW-1:0] xc0, xs0;

  input_restructure #(.N(N), .G(G), .XW(XW)) u_restructure (
    .x_i  (x_i),
    .uc_o (uc),
    .us_o (us),
    .xc0_o(xc0),
    .xs0_o(xs0)
  );

  logic signed [VW-1:0] xc_str, xs_str;
  logic signed [CW-1:0] c_str;
  logic                 tc_str;
  logic                 frame;
  logic signed [UW-1:0] xc0_d, xs0_d;

  band_stream_ctrl #(.N(N), .G(G), .XW(XW), .CW(CW), .CF(CF)) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .start_valid(in_valid),
    .start_ready(in_ready),
    .uc_i       (uc),
    .us_i       (us),
    .xc0_i      (xc0),
    .xs0_i      (xs0),
    .xc_o       (xc_str),
    .xs_o       (xs_str),
    .c_o        (c_str),
    .tc_o       (tc_str),
    .frame_o    (frame),
    .xc0_o      (xc0_d),
    .xs0_o      (xs0_d)
  );

  logic signed [TW-1:0] t_c, t_s;

  band_corr_array #(.M(M), .VW(VW), .CW(CW), .TW(TW)) u_array_c (
    .clk  (clk),
    .rst_n(rst_n),
    .xe_i (xc_str),
    .c_i  (c_str),
    .tc_i (tc_str),
    .y_o  (t_c)
  );

  band_corr_array #(.M(M), .VW(VW), .CW(CW), .TW(TW)) u_array_s (
    .clk  (clk),
    .rst_n(rst_n),
    .xe_i (xs_str),
    .c_i  (c_str),
    .tc_i (tc_str),
    .y_o  (t_s)
  );

  gdht_post #(.N(N), .G(G), .XW(XW), .CW(CW), .CF(CF)) u_post (
    .clk        (clk),
    .rst_n      (rst_n),
    .frame_i    (frame),
    .xc0_i      (xc0_d),
    .xs0_i      (xs0_d),
    .tc_i       (t_c),
    .ts_i       (t_s),
    .out_valid_o(out_valid),
    .y_o        (y_o)
  );

endmodule
