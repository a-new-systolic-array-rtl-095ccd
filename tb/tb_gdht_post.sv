// tb_gdht_post -- self-checking test of the output stage for N = 13, G = 2.
//
// Feeds frames of six rows of random band-correlation results, limited to
// the range a real transform can produce so that Y fits its width, (rows carry
// k = 2 4 5 3 6 1 in that order), some frames back to back and some apart,
// with random x_C(0)/x_S(0). Expected outputs are computed here from
//   H_C = x_C(0) + 2 T_C,  H_S = x_S(0) + 2 T_S,
//   Y(k) = H_C cos(k pi/N) + H_S sin(k pi/N), Y(N-k) = -H_C cos + H_S sin,
//   Y(0) = x_S(0),
// with coefficients quantised here and the stage's rounding. Checks the
// whole y_o vector on the out_valid pulse, the pulse position (the cycle
// after the last row) and that y_o is held afterwards.
module tb_gdht_post;
  import gdht_pkg::*;
  localparam int N = 13, G = 2, XW = 16, CW = 16, CF = 14, M = 6;
  localparam int UW = aux_width(XW, N), TW = corr_width(XW, CW, N), YW = out_width(XW, N);
  localparam int ROWK [M] = '{2, 4, 5, 3, 6, 1};

  logic clk = 1'b0;
  logic rst_n;
  logic frame_i;
  logic signed [UW-1:0] xc0_i, xs0_i;
  logic signed [TW-1:0] tc_i, ts_i;
  logic out_valid_o;
  logic signed [YW-1:0] y_o [N];

  gdht_post #(.N(N), .G(G), .XW(XW), .CW(CW), .CF(CF)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_out = 0, n_frames = 0;
  int cyc = 0;
  longint expv [N];
  int exp_valid_cyc = -1;

  function automatic longint qv(real v);
    real s;
    s = v * (2.0 ** CF);
    return longint'($rtoi(s + ((s >= 0.0) ? 0.5 : -0.5)));
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (out_valid_o != (cyc == exp_valid_cyc)) begin
        failures++;
        $display("FAIL cycle %0d: out_valid=%0d", cyc, out_valid_o);
      end
      if (out_valid_o || cyc == exp_valid_cyc + 2) begin
        if (out_valid_o) n_out++;
        for (int k = 0; k < N; k++) begin
          checks++;
          if (longint'(y_o[k]) != expv[k]) begin
            failures++;
            $display("FAIL Y(%0d)=%0d expected %0d", k, y_o[k], expv[k]);
          end
        end
      end
    end
    cyc <= cyc + 1;
  end

  initial begin
    real pi;
    pi = 3.14159265358979323846;
    rst_n = 1'b0;
    frame_i = 1'b0; xc0_i = '0; xs0_i = '0; tc_i = '0; ts_i = '0;
    @(negedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 40; f++) begin
      longint xc0, xs0;
      longint nv [N];
      repeat ((f % 2) ? 5 : 12) begin
        @(negedge clk);
        frame_i = 1'b0; tc_i = TW'($urandom); ts_i = TW'($urandom);
      end
      xc0 = longint'(UW'($urandom));
      xs0 = longint'(UW'($urandom));
      xc0 = (xc0 <<< (64 - UW)) >>> (64 - UW + 2);
      xs0 = (xs0 <<< (64 - UW)) >>> (64 - UW + 2);
      nv[0] = xs0;
      for (int j = 0; j < M; j++) begin
        longint t_c, t_s, hc, hs, pc, ps, rnd;
        @(negedge clk);
        t_c = longint'($signed({$urandom, $urandom})) >>> (64 - (CF + XW + 1));
        t_s = longint'($signed({$urandom, $urandom})) >>> (64 - (CF + XW + 1));
        frame_i = (j == 0);
        xc0_i = (j == 0) ? UW'(xc0) : UW'($urandom);
        xs0_i = (j == 0) ? UW'(xs0) : UW'($urandom);
        tc_i = TW'(t_c);
        ts_i = TW'(t_s);
        hc = (xc0 <<< CF) + 2 * t_c;
        hs = (xs0 <<< CF) + 2 * t_s;
        pc = hc * qv($cos(pi * ROWK[j] / N));
        ps = hs * qv($sin(pi * ROWK[j] / N));
        rnd = longint'(1) <<< (2 * CF - 1);
        nv[ROWK[j]]     = (ps + pc + rnd) >>> (2 * CF);
        nv[N - ROWK[j]] = (ps - pc + rnd) >>> (2 * CF);
        if (j == M - 1) exp_valid_cyc = cyc + 1;
      end
      n_frames++;
      @(negedge clk);
      frame_i = 1'b0;
      expv = nv;
    end
    repeat (10) @(negedge clk);
    checks++;
    if (n_out != n_frames) begin failures++; $display("FAIL: %0d outputs for %0d frames", n_out, n_frames); end
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
