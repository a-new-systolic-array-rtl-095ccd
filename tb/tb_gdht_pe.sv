// tb_gdht_pe -- self-checking test of one processing element.
//
// Drives random operands, coefficients, partial results and tag bits (tag
// set on about one cycle in four) and checks, every cycle, the element
// against a model kept here: operand and coefficient outputs equal the
// inputs of two clock edges before, tag output the tag of one edge before,
// y_o = y_i + xi*c of the previous cycle, where xi is the operand captured
// at the last tag (or the passing operand when the tag is set). Also checks
// that tag loads occurred.
module tb_gdht_pe;
  localparam int VW = 21, CW = 16, TW = 40;

  logic clk = 1'b0;
  logic rst_n;
  logic signed [VW-1:0] xe_i, xe_o;
  logic signed [CW-1:0] c_i, c_o;
  logic tc_i, tc_o;
  logic signed [TW-1:0] y_i, y_o;

  gdht_pe #(.VW(VW), .CW(CW), .TW(TW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, loads = 0;
  longint m_xi;
  longint xe_h [2], c_h [2];
  longint y_exp;

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    rst_n = 1'b0;
    xe_i = '0; c_i = '0; tc_i = 1'b0; y_i = '0;
    m_xi = 0; xe_h = '{0, 0}; c_h = '{0, 0}; y_exp = 0;
    @(negedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      longint a;
      xe_i = VW'($urandom);
      c_i  = CW'($urandom);
      tc_i = ($urandom_range(0, 3) == 0);
      y_i  = TW'({$urandom, $urandom}) >>> 2;
      // model
      a = tc_i ? longint'(xe_i) : m_xi;
      if (tc_i) begin m_xi = xe_i; loads++; end
      y_exp = longint'(y_i) + a * longint'(c_i);
      @(negedge clk);
      chk("y_o", y_o, y_exp);
      chk("tc_o", tc_o, tc_i ? 1 : 0);
      if (t >= 1) begin
        chk("xe_o", xe_o, xe_h[0]);
        chk("c_o", c_o, c_h[0]);
      end
      xe_h[1] = xe_h[0]; xe_h[0] = xe_i;
      c_h[1]  = c_h[0];  c_h[0]  = c_i;
    end
    checks++;
    if (loads == 0) begin failures++; $display("FAIL: no tag load"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
