// band_stream_ctrl -- stream generator that feeds the two band-correlation
// arrays.
//
// For each accepted block it plays a stream of L = N-2 elements (one per
// cycle) into the first element of both arrays. Element s carries
//   - the coefficient c(<G^(s+2)>_N)         (shared by both arrays),
//   - the tag-control bit, 1 only for s = M-1 (shared by both arrays),
//   - operand uc[s] / us[s] for s < M and 0 for s >= M.
// For N = 13, G = 2 this is the sequence c(4) c(8) c(3) c(6) c(12) c(11) c(9)
// c(5) c(10) c(7) c(1) with tag 0 0 0 0 0 1 0 0 0 0 0 of the published
// design. The coefficients are constants computed at elaboration.
//
// Handshake: a block (uc, us, xc0, xs0) is taken on a rising edge with
// start_valid && start_ready; element 0 is on the stream outputs in the next
// cycle. start_ready is high when idle and during the last stream element,
// so blocks may follow each other every L cycles with no gap. Outside a
// stream all stream outputs are 0. x_C(0) and x_S(0) of the block are carried
// through a delay line and appear on xc0_o/xs0_o together with a one-cycle
// frame_o pulse in the cycle in which row 0 of that block leaves the arrays
// (2M-1 cycles after element 0). The handshake, the idle behaviour and the
// delay line are this design's choices; the published design only shows the
// streams. Synchronous active-low reset.
module band_stream_ctrl
  import gdht_pkg::*;
#(
  parameter int N  = N_DEF,
  parameter int G  = G_DEF,
  parameter int XW = XW_DEF,
  parameter int CW = CW_DEF,
  parameter int CF = CF_DEF,
  localparam int M  = (N - 1) / 2,
  localparam int L  = N - 2,
  localparam int UW = aux_width(XW, N),
  localparam int VW = opnd_width(XW, N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // block input
  input  logic                 start_valid,
  output logic                 start_ready,
  input  logic signed [VW-1:0] uc_i [M],
  input  logic signed [VW-1:0] us_i [M],
  input  logic signed [UW-1:0] xc0_i,
  input  logic signed [UW-1:0] xs0_i,
  // streams into the arrays
  output logic signed [VW-1:0] xc_o,
  output logic signed [VW-1:0] xs_o,
  output logic signed [CW-1:0] c_o,
  output logic                 tc_o,
  // frame side data, aligned with row 0 at the array outputs
  output logic                 frame_o,
  output logic signed [UW-1:0] xc0_o,
  output logic signed [UW-1:0] xs0_o
);

  localparam int SW = $clog2(L);
  localparam int D  = 2 * M;  // delay from acceptance to row 0 out

  typedef struct packed {
    logic                 frame;
    logic signed [UW-1:0] xc0;
    logic signed [UW-1:0] xs0;
  } side_t;

  // Coefficient table, one entry per stream element.
  logic signed [CW-1:0] coef [L];
  for (genvar s = 0; s < L; s++) begin : g_coef
    assign coef[s] = CW'(stream_coef(s, G, N, CF));
  end

  logic                 active;
  logic [SW-1:0]        sidx;
  logic signed [VW-1:0] hold_c [M];
  logic signed [VW-1:0] hold_s [M];
  side_t                side [D];
  logic                 take;

  assign start_ready = !active || (sidx == SW'(L - 1));
  assign take        = start_valid && start_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active <= 1'b0;
      sidx   <= '0;
      for (int m = 0; m < M; m++) begin
        hold_c[m] <= '0;
        hold_s[m] <= '0;
      end
    end else if (take) begin
      active <= 1'b1;
      sidx   <= '0;
      hold_c <= uc_i;
      hold_s <= us_i;
    end else if (active) begin
      if (sidx == SW'(L - 1)) active <= 1'b0;
      else                    sidx   <= sidx + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int d = 0; d < D; d++) side[d] <= '0;
    end else begin
      side[0] <= '{frame: take, xc0: xc0_i, xs0: xs0_i};
      for (int d = 1; d < D; d++) side[d] <= side[d-1];
    end
  end

  always_comb begin
    xc_o = '0;
    xs_o = '0;
    c_o  = '0;
    tc_o = 1'b0;
    if (active) begin
      c_o  = coef[sidx];
      tc_o = (sidx == SW'(M - 1));
      if (sidx < SW'(M)) begin
        xc_o = hold_c[sidx[$clog2(M)-1:0]];
        xs_o = hold_s[sidx[$clog2(M)-1:0]];
      end
    end
  end

  assign frame_o = side[D-1].frame;
  assign xc0_o   = side[D-1].xc0;
  assign xs0_o   = side[D-1].xs0;

  // The element counter never leaves the stream, and a block is never taken
  // before the last element of the previous stream.
  a_sidx_range: assert property (@(posedge clk) disable iff (!rst_n) active |-> sidx < SW'(L))
    else $error("stream index out of range");
  a_take_at_end: assert property (@(posedge clk) disable iff (!rst_n)
                                  take && active |-> sidx == SW'(L - 1))
    else $error("block taken in the middle of a stream");

endmodule
