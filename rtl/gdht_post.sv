// gdht_post -- output stage of the odd-time GDHT.
//
// The two arrays deliver one band-correlation row per cycle; row j carries
// T_C(k) and T_S(k) for k = psi(j) = fold(<G^(j+1)>_N). For each row this
// stage forms
//   H_C(k) = x_C(0) + 2 T_C(k),          H_S(k) = x_S(0) + 2 T_S(k),
//   Y(k)   =  H_C(k) cos(k pi/N) + H_S(k) sin(k pi/N),
//   Y(N-k) = -H_C(k) cos(k pi/N) + H_S(k) sin(k pi/N),
// and writes both into the output register; Y(0) = x_S(0) (the k = 0 term of
// the transform definition, the sum of all samples). These are the
// published post-processing equations, read with x_S(0) in H_S, which is
// what the transform definition requires. Two multipliers and three adders
// per row, shared by all rows; the rotation constants are selected by the row
// counter. Scaling: T carries CF fraction bits, H is aligned to CF fraction
// bits, the products carry 2CF, and Y is rounded (half up) back to integers.
//
// Timing: frame_i marks row 0 on tc_i/ts_i and brings x_C(0)/x_S(0) of that
// block; rows 1 .. M-1 follow in the next cycles. out_valid_o is a one-cycle
// pulse in the cycle after row M-1; y_o then holds the whole transform and
// stays unchanged until row 0 of the next block arrives. Synchronous
// active-low reset.
module gdht_post
  import gdht_pkg::*;
#(
  parameter int N  = N_DEF,
  parameter int G  = G_DEF,
  parameter int XW = XW_DEF,
  parameter int CW = CW_DEF,
  parameter int CF = CF_DEF,
  localparam int M  = (N - 1) / 2,
  localparam int UW = aux_width(XW, N),
  localparam int TW = corr_width(XW, CW, N),
  localparam int YW = out_width(XW, N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 frame_i,
  input  logic signed [UW-1:0] xc0_i,
  input  logic signed [UW-1:0] xs0_i,
  input  logic signed [TW-1:0] tc_i,
  input  logic signed [TW-1:0] ts_i,
  output logic                 out_valid_o,
  output logic signed [YW-1:0] y_o [N]
);

  localparam int HW = ((UW + CF > TW + 1) ? UW + CF : TW + 1) + 1;  // H width
  localparam int PW = HW + CW + 1;                                   // product sum width
  localparam int RW = $clog2(M + 1);

  // Per-row constants.
  logic [$clog2(N)-1:0] kidx [M];
  logic signed [CW-1:0] cosk [M];
  logic signed [CW-1:0] sink [M];
  for (genvar j = 0; j < M; j++) begin : g_rot
    localparam int K = psi(j, G, N);
    assign kidx[j] = ($clog2(N))'(K);
    assign cosk[j] = CW'(rot_cos(K, N, CF));
    assign sink[j] = CW'(rot_sin(K, N, CF));
  end

  logic                 busy;
  logic [RW-1:0]        row;
  logic [RW-1:0]        row_c;   // row on the inputs this cycle
  logic signed [UW-1:0] xc0_h, xs0_h;
  logic signed [UW-1:0] xc0, xs0;
  logic signed [HW-1:0] hc, hs;
  logic signed [PW-1:0] pc, ps;
  logic signed [PW-1:0] sum_p, sum_m;
  logic signed [YW-1:0] yk, ynk;
  logic                 row_v;

  always_comb begin
    row_v = frame_i || busy;
    row_c = frame_i ? '0 : row;
    xc0   = frame_i ? xc0_i : xc0_h;
    xs0   = frame_i ? xs0_i : xs0_h;
    hc    = (HW'(xc0) <<< CF) + (HW'(tc_i) <<< 1);
    hs    = (HW'(xs0) <<< CF) + (HW'(ts_i) <<< 1);
    pc    = PW'(hc * cosk[row_c[$clog2(M)-1:0]]);
    ps    = PW'(hs * sink[row_c[$clog2(M)-1:0]]);
    sum_p = ps + pc + (PW'(1) <<< (2 * CF - 1));
    sum_m = ps - pc + (PW'(1) <<< (2 * CF - 1));
    yk    = YW'(sum_p >>> (2 * CF));
    ynk   = YW'(sum_m >>> (2 * CF));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      row         <= '0;
      xc0_h       <= '0;
      xs0_h       <= '0;
      out_valid_o <= 1'b0;
      for (int i = 0; i < N; i++) y_o[i] <= '0;
    end else begin
      out_valid_o <= 1'b0;
      if (frame_i) begin
        xc0_h  <= xc0_i;
        xs0_h  <= xs0_i;
        y_o[0] <= YW'(xs0_i);
      end
      if (row_v) begin
        y_o[kidx[row_c[$clog2(M)-1:0]]]     <= yk;
        y_o[N - int'(kidx[row_c[$clog2(M)-1:0]])] <= ynk;
        if (row_c == RW'(M - 1)) begin
          busy        <= 1'b0;
          row         <= '0;
          out_valid_o <= 1'b1;
        end else begin
          busy <= 1'b1;
          row  <= row_c + 1'b1;
        end
      end
    end
  end

  // A new frame may only start once the previous one has delivered its last
  // row; the stream controller guarantees this by its N-2 cycle period.
  a_no_frame_overlap: assert property (@(posedge clk) disable iff (!rst_n) frame_i |-> !busy)
    else $error("frame started while rows of the previous frame were pending");

endmodule
