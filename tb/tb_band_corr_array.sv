// tb_band_corr_array -- self-checking test of the linear systolic array.
//
// Plays streams of 2M-1 elements into the array in the format of the
// published example (operands u[0..M-1] then zeros, tag bit on element M-1),
// with random operands and random coefficients, some streams back to back and
// some separated by idle gaps of zeros. For each stream, row j is expected on
// y_o during cycle j + 2M - 1 after element 0 and must equal the
// band-correlation sum_m c[j+m] u[m], computed here directly.
module tb_band_corr_array;
  localparam int M = 6, VW = 21, CW = 16, TW = 40;
  localparam int L = 2 * M - 1;
  localparam int NSTR = 20;

  logic clk = 1'b0;
  logic rst_n;
  logic signed [VW-1:0] xe_i;
  logic signed [CW-1:0] c_i;
  logic tc_i;
  logic signed [TW-1:0] y_o;

  band_corr_array #(.M(M), .VW(VW), .CW(CW), .TW(TW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_b2b = 0, n_gap = 0;
  int cyc = 0;
  // expected output per cycle index
  longint exp_y [int];

  initial begin
    rst_n = 1'b0;
    xe_i = '0; c_i = '0; tc_i = 1'b0;
    @(negedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < NSTR; s++) begin
      longint u [M];
      longint c [L];
      int t0;
      int gap;
      gap = (s % 3 == 0) ? $urandom_range(1, 8) : 0;
      if (s > 0) begin if (gap == 0) n_b2b++; else n_gap++; end
      repeat (gap) begin
        xe_i = '0; c_i = '0; tc_i = 1'b0;
        @(negedge clk); cyc++;
      end
      for (int m = 0; m < M; m++) u[m] = longint'(VW'($urandom));
      for (int k = 0; k < L; k++) c[k] = longint'(CW'($urandom));
      // sign-extend the random fields
      for (int m = 0; m < M; m++) u[m] = (u[m] <<< (64 - VW)) >>> (64 - VW);
      for (int k = 0; k < L; k++) c[k] = (c[k] <<< (64 - CW)) >>> (64 - CW);
      t0 = cyc;
      for (int j = 0; j < M; j++) begin
        longint acc;
        acc = 0;
        for (int m = 0; m < M; m++) acc += c[j+m] * u[m];
        exp_y[t0 + j + 2 * M - 1] = acc;
      end
      for (int k = 0; k < L; k++) begin
        xe_i = (k < M) ? VW'(u[k]) : '0;
        c_i  = CW'(c[k]);
        tc_i = (k == M - 1);
        @(negedge clk); cyc++;
      end
    end
    xe_i = '0; c_i = '0; tc_i = 1'b0;
    repeat (3 * M) begin @(negedge clk); cyc++; end
    checks++;
    if (n_b2b == 0 || n_gap == 0) begin failures++; $display("FAIL: stream spacing not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output sampled just before the edge that ends cycle 'cyc'.
  always @(posedge clk) begin
    if (rst_n && exp_y.exists(cyc)) begin
      checks++;
      if (longint'(y_o) != exp_y[cyc]) begin
        failures++;
        $display("FAIL cycle %0d: y_o=%0d expected %0d", cyc, y_o, exp_y[cyc]);
      end
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
