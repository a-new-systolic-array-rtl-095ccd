// input_restructure -- input restructuring of the odd-time GDHT.
//
// From one block of N samples x(0..N-1) it forms the two auxiliary input
// sequences of the algorithm,
//   x_C(N-1) = x(N-1),  x_C(i) = x(i) - x_C(i+1)
//   x_S(N-1) = x(N-1),  x_S(i) = x(i) + x_S(i+1)     for i = N-2 .. 0,
// and the folded, permuted operands of the two band-correlations,
//   uc[m] = x_C(psi(m)) + x_C(N-psi(m)),  us[m] = x_S(psi(m)) + x_S(N-psi(m)),
// with psi(m) = fold(<G^(m+1)>_N), m = 0 .. (N-1)/2 - 1, together with x_C(0)
// and x_S(0), which the output stage needs. The recurrences and the operand
// order are those of the published algorithm; building them as a purely
// combinational chain of adders (result valid in the same cycle as the
// input) is this design's choice.
module input_restructure
  import gdht_pkg::*;
#(
  parameter int N  = N_DEF,
  parameter int G  = G_DEF,
  parameter int XW = XW_DEF,
  localparam int M  = (N - 1) / 2,
  localparam int UW = aux_width(XW, N),
  localparam int VW = opnd_width(XW, N)
) (
  input  logic signed [XW-1:0] x_i  [N],
  output logic signed [VW-1:0] uc_o [M],
  output logic signed [VW-1:0] us_o [M],
  output logic signed [UW-1:0] xc0_o,
  output logic signed [UW-1:0] xs0_o
);

  logic signed [UW-1:0] xc [N];
  logic signed [UW-1:0] xs [N];

  always_comb begin
    xc[N-1] = UW'(x_i[N-1]);
    xs[N-1] = UW'(x_i[N-1]);
    for (int i = N - 2; i >= 0; i--) begin
      xc[i] = UW'(x_i[i]) - xc[i+1];
      xs[i] = UW'(x_i[i]) + xs[i+1];
    end
  end

  for (genvar m = 0; m < M; m++) begin : g_fold
    localparam int P = psi(m, G, N);
    assign uc_o[m] = VW'(xc[P]) + VW'(xc[N-P]);
    assign us_o[m] = VW'(xs[P]) + VW'(xs[N-P]);
  end

  assign xc0_o = xc[0];
  assign xs0_o = xs[0];

endmodule
