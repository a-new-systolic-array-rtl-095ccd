// tb_gdht_odd_top -- end-to-end test of the odd-time GDHT processor at its
// default size (N = 13, G = 2, 16-bit samples).
//
// Blocks are driven through the in_valid/in_ready handshake in three phases:
// isolated blocks with idle gaps, a continuous back-to-back stream, and
// random valid gaps. Every result is compared with two references computed
// here, independently of the design's structure:
//   1. a bit-exact integer model that evaluates the cos-sum form of the
//      band-correlation directly, T(k) = sum_i c(<k i>_N) (x(i) + x(N-i)),
//      with coefficients quantised here, followed by the same rounding;
//   2. the transform definition in real arithmetic, within a bound that
//      covers the coefficient quantisation.
// Also checked: latency 3(N-1)/2 cycles from acceptance to out_valid, a
// block accepted every N-2 cycles when the input is always valid, and that
// back-to-back blocks, idle restarts, input waits and full-scale inputs
// all occurred.
module tb_gdht_odd_top;
  import gdht_pkg::*;

  localparam int N  = N_DEF;
  localparam int G  = G_DEF;
  localparam int XW = XW_DEF;
  localparam int CW = CW_DEF;
  localparam int CF = CF_DEF;
  localparam int M  = (N - 1) / 2;
  localparam int YW = out_width(XW, N);
  localparam int LAT = 3 * M;
  localparam int NBLK = 60;

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid, in_ready, out_valid;
  logic signed [XW-1:0] x_i [N];
  logic signed [YW-1:0] y_o [N];

  gdht_odd_top dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .x_i(x_i), .out_valid(out_valid), .y_o(y_o)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ---------------- references ----------------
  typedef longint yvec_t [N];
  typedef struct { yvec_t yq; real yr [N]; int t_acc; } exp_t;
  exp_t expq [$];

  function automatic longint cqt(int j);
    real v;
    v = $cos(2.0 * 3.14159265358979323846 * j / N) * (2.0 ** CF);
    return longint'($rtoi(v + ((v >= 0.0) ? 0.5 : -0.5)));
  endfunction

  function automatic longint qt(real v);
    real s;
    s = v * (2.0 ** CF);
    return longint'($rtoi(s + ((s >= 0.0) ? 0.5 : -0.5)));
  endfunction

  function automatic exp_t make_exp(input logic signed [XW-1:0] x [N]);
    exp_t e;
    longint xc [N], xs [N];
    longint tcs, tss, hc, hs, pc, ps, rnd;
    real pi;
    pi = 3.14159265358979323846;
    xc[N-1] = x[N-1];
    xs[N-1] = x[N-1];
    for (int i = N - 2; i >= 0; i--) begin
      xc[i] = longint'(x[i]) - xc[i+1];
      xs[i] = longint'(x[i]) + xs[i+1];
    end
    rnd = longint'(1) <<< (2 * CF - 1);
    e.yq[0] = xs[0];
    for (int k = 1; k <= M; k++) begin
      tcs = 0; tss = 0;
      for (int i = 1; i <= M; i++) begin
        tcs += cqt((k * i) % N) * (xc[i] + xc[N-i]);
        tss += cqt((k * i) % N) * (xs[i] + xs[N-i]);
      end
      hc = (xc[0] <<< CF) + 2 * tcs;
      hs = (xs[0] <<< CF) + 2 * tss;
      pc = hc * qt($cos(pi * k / N));
      ps = hs * qt($sin(pi * k / N));
      e.yq[k]   = (ps + pc + rnd) >>> (2 * CF);
      e.yq[N-k] = (ps - pc + rnd) >>> (2 * CF);
    end
    for (int k = 0; k < N; k++) begin
      e.yr[k] = 0.0;
      for (int i = 0; i < N; i++)
        e.yr[k] += real'(x[i]) * ($cos((2 * i + 1) * k * pi / N) + $sin((2 * i + 1) * k * pi / N));
    end
    return e;
  endfunction

  // Bound on the deviation from the exact transform: coefficient error
  // 2^-(CF+1) on terms of at most N 2^(XW-1) magnitude, summed generously.
  localparam real TOL = 2.0 * N * N * (2.0 ** (XW - 1)) / (2.0 ** CF) + 2.0;

  // ---------------- stimulus ----------------
  logic signed [XW-1:0] nxt [N];
  int n_sent = 0, n_recv = 0;
  int n_b2b = 0, n_idle_start = 0, n_wait = 0, n_fullscale = 0;
  int last_acc = -100;
  bit was_busy;
  int mode;  // 0: gaps, 1: continuous, 2: random

  function automatic void gen_block(int idx);
    for (int i = 0; i < N; i++) begin
      case (idx % 8)
        0: nxt[i] = (i == 0) ? XW'(1000) : '0;                     // impulse
        1: nxt[i] = {1'b0, {(XW-1){1'b1}}};                          // +full scale
        2: nxt[i] = {1'b1, {(XW-1){1'b0}}};                          // -full scale
        3: nxt[i] = i[0] ? {1'b1, {(XW-1){1'b0}}} : {1'b0, {(XW-1){1'b1}}};
        default: nxt[i] = XW'($urandom);
      endcase
    end
    if (idx % 8 inside {1, 2, 3}) n_fullscale++;
  endfunction

  // accept / scoreboard push
  always @(posedge clk) begin
    if (rst_n && in_valid && in_ready) begin
      exp_t e;
      e = make_exp(x_i);
      e.t_acc = cycle;
      expq.push_back(e);
      if (n_sent > 0 && cycle - last_acc == N - 2) n_b2b++;
      else n_idle_start++;
      if (mode == 1 && n_sent > 0 && was_busy) begin
        checks++;
        if (cycle - last_acc != N - 2) begin
          failures++;
          $display("FAIL: block interval %0d, expected %0d", cycle - last_acc, N - 2);
        end
      end
      last_acc = cycle;
      n_sent++;
    end
    if (rst_n && in_valid && !in_ready) n_wait++;
  end

  // output check
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL: out_valid with no block outstanding");
      end else begin
        exp_t e;
        e = expq.pop_front();
        checks++;
        if (cycle - e.t_acc != LAT) begin
          failures++;
          $display("FAIL: latency %0d, expected %0d", cycle - e.t_acc, LAT);
        end
        for (int k = 0; k < N; k++) begin
          real d;
          checks++;
          if (longint'(y_o[k]) != e.yq[k]) begin
            failures++;
            $display("FAIL blk %0d Y(%0d) = %0d, expected %0d", n_recv, k, y_o[k], e.yq[k]);
          end
          d = real'(y_o[k]) - e.yr[k];
          if (d < 0.0) d = -d;
          checks++;
          if (d > TOL) begin
            failures++;
            $display("FAIL blk %0d Y(%0d) = %0d, exact %f", n_recv, k, y_o[k], e.yr[k]);
          end
        end
      end
      n_recv++;
    end
  end

  initial begin
    rst_n = 1'b0;
    in_valid = 1'b0;
    mode = 0;
    was_busy = 1'b0;
    for (int i = 0; i < N; i++) x_i[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int b = 0; b < NBLK; b++) begin
      int target;
      mode = (b < 10) ? 0 : (b < 40) ? 1 : 2;
      gen_block(b);
      if (mode == 0) repeat (LAT + 5) @(negedge clk);
      if (mode == 2) repeat ($urandom_range(0, 2 * N)) @(negedge clk);
      @(negedge clk);
      x_i = nxt;
      in_valid = 1'b1;
      was_busy = (mode == 1 && b > 10);
      target = n_sent + 1;
      do @(negedge clk); while (n_sent != target);
      if (mode != 1 || b == 39) in_valid = 1'b0;
    end
    repeat (LAT + 10) @(posedge clk);
    checks++;
    if (n_recv != NBLK) begin
      failures++;
      $display("FAIL: %0d results for %0d blocks", n_recv, NBLK);
    end
    $display("events: back_to_back=%0d idle_start=%0d input_wait_cycles=%0d full_scale_blocks=%0d",
             n_b2b, n_idle_start, n_wait, n_fullscale);
    checks++; if (n_b2b == 0)        begin failures++; $display("FAIL: no back-to-back block"); end
    checks++; if (n_idle_start == 0) begin failures++; $display("FAIL: no start from idle"); end
    checks++; if (n_wait == 0)       begin failures++; $display("FAIL: input never waited for ready"); end
    checks++; if (n_fullscale == 0)  begin failures++; $display("FAIL: no full-scale block"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
