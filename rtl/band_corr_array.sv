// band_corr_array -- linear systolic array computing one band-correlation.
//
// M = (N-1)/2 processing elements (gdht_pe) are chained; all input channels
// enter at element 1 and the results leave element M. The partial-result
// input of element 1 is tied to zero. Fed with the stream of 2M-1 elements
// produced by band_stream_ctrl (element s: operand u[s] for s < M and 0
// after, coefficient c(<G^(s+2)>_N), tag 1 only for s = M-1), element p takes
// operand u[M-p] when the tag reaches it, and the array delivers
//   T(row j) = sum_m c(<G^(j+m+2)>_N) * u[m],   j = 0 .. M-1
// on y_o, row j during cycle j + 2M - 1 counted from the cycle in which
// stream element 0 is on the inputs. That is the band-correlation of the
// published algorithm, row j giving T(psi(j)). A new stream may follow the
// previous one with no gap. The array structure and data-flow rates follow
// the published design; the pipelined timing numbers above are derived from
// them.
module band_corr_array #(
  parameter int M  = 6,   // number of processing elements, (N-1)/2
  parameter int VW = 21,  // operand width
  parameter int CW = 16,  // coefficient width
  parameter int TW = 40   // result width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [VW-1:0] xe_i,  // operand stream
  input  logic signed [CW-1:0] c_i,   // coefficient stream
  input  logic                 tc_i,  // tag-control bit stream
  output logic signed [TW-1:0] y_o    // band-correlation results
);

  // Channel between element p-1 and element p; index 0 is the array input.
  logic signed [VW-1:0] xe [M+1];
  logic signed [CW-1:0] c  [M+1];
  logic                 tc [M+1];
  logic signed [TW-1:0] y  [M+1];

  assign xe[0] = xe_i;
  assign c[0]  = c_i;
  assign tc[0] = tc_i;
  assign y[0]  = '0;

  for (genvar p = 0; p < M; p++) begin : g_pe
    gdht_pe #(.VW(VW), .CW(CW), .TW(TW)) u_pe (
      .clk  (clk),
      .rst_n(rst_n),
      .xe_i (xe[p]),
      .c_i  (c[p]),
      .tc_i (tc[p]),
      .y_i  (y[p]),
      .xe_o (xe[p+1]),
      .c_o  (c[p+1]),
      .tc_o (tc[p+1]),
      .y_o  (y[p+1])
    );
  end

  assign y_o = y[M];

endmodule
