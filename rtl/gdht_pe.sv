// gdht_pe -- processing element of the band-correlation systolic array.
//
// Each element holds one operand xi of the correlation. Operands (xe) and
// coefficients (c) travel through the element over two register stages, the
// tag bit (tc) and the partial result (y) over one, so operands and
// coefficients move at half the rate of the partial results. When the tag bit
// arriving with the current input is 1, the element takes the passing operand
// as its new xi and uses it at once: y' = y + xe*c. Otherwise it uses the
// stored operand: y' = y + xi*c. This is the element function of the
// published design (one multiplier, one adder and a multiplexer that selects
// the multiplier operand); the reset and the widths are this design's choice.
//
// Interface: all outputs are registers, updated on the rising clock edge;
// rst_n is an active-low synchronous reset that clears every register.
// Latency: xe/c 2 cycles, tc/y 1 cycle.
module gdht_pe #(
  parameter int VW = 21,  // operand width
  parameter int CW = 16,  // coefficient width
  parameter int TW = 40   // partial-result width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [VW-1:0] xe_i,
  input  logic signed [CW-1:0] c_i,
  input  logic                 tc_i,
  input  logic signed [TW-1:0] y_i,
  output logic signed [VW-1:0] xe_o,
  output logic signed [CW-1:0] c_o,
  output logic                 tc_o,
  output logic signed [TW-1:0] y_o
);

  logic signed [VW-1:0] xe_d;   // first operand stage
  logic signed [CW-1:0] c_d;    // first coefficient stage
  logic signed [VW-1:0] xi;     // stored operand
  logic signed [VW-1:0] mul_a;  // multiplier operand chosen by the tag
  logic signed [TW-1:0] prod;

  always_comb begin
    mul_a = tc_i ? xe_i : xi;
    prod  = TW'(mul_a * c_i);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      xe_d <= '0;
      xe_o <= '0;
      c_d  <= '0;
      c_o  <= '0;
      tc_o <= 1'b0;
      xi   <= '0;
      y_o  <= '0;
    end else begin
      xe_d <= xe_i;
      xe_o <= xe_d;
      c_d  <= c_i;
      c_o  <= c_d;
      tc_o <= tc_i;
      if (tc_i) xi <= xe_i;
      y_o  <= y_i + prod;
    end
  end

endmodule
