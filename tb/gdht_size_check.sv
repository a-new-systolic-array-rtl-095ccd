// gdht_size_check -- drives one gdht_odd_top instance of length N (primitive
// root G) with NBLK random blocks, offered back to back, and checks every
// result bit-exactly against an integer model of the cos-sum form of the
// band-correlation, T(k) = sum_i c(<k i>_N) (x(i) + x(N-i)), with the same
// quantisation and rounding, and against the transform definition in real
// arithmetic within a quantisation bound. Also checks the latency 3(N-1)/2.
// Reports its counts on ports; done rises when all results have been seen.
module gdht_size_check #(
  parameter int N    = 7,
  parameter int G    = 3,
  parameter int NBLK = 20
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  import gdht_pkg::*;
  localparam int XW = XW_DEF, CW = CW_DEF, CF = CF_DEF;
  localparam int M  = (N - 1) / 2;
  localparam int YW = out_width(XW, N);
  localparam real PI_R = 3.14159265358979323846;
  localparam real TOL = 2.0 * N * N * (2.0 ** (XW - 1)) / (2.0 ** CF) + 2.0;

  logic in_valid, in_ready, out_valid;
  logic signed [XW-1:0] x_i [N];
  logic signed [YW-1:0] y_o [N];

  gdht_odd_top #(.N(N), .G(G)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .x_i(x_i), .out_valid(out_valid), .y_o(y_o)
  );

  typedef struct { longint yq [N]; real yr [N]; int t_acc; } exp_t;
  exp_t expq [$];
  int cycle = 0, n_sent = 0, n_recv = 0;

  function automatic longint qt(real v);
    real s;
    s = v * (2.0 ** CF);
    return longint'($rtoi(s + ((s >= 0.0) ? 0.5 : -0.5)));
  endfunction

  function automatic exp_t make_exp(input logic signed [XW-1:0] x [N]);
    exp_t e;
    longint xc [N], xs [N];
    longint tcs, tss, hc, hs, pc, ps, rnd;
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
        tcs += qt($cos(2.0 * PI_R * ((k * i) % N) / N)) * (xc[i] + xc[N-i]);
        tss += qt($cos(2.0 * PI_R * ((k * i) % N) / N)) * (xs[i] + xs[N-i]);
      end
      hc = (xc[0] <<< CF) + 2 * tcs;
      hs = (xs[0] <<< CF) + 2 * tss;
      pc = hc * qt($cos(PI_R * k / N));
      ps = hs * qt($sin(PI_R * k / N));
      e.yq[k]   = (ps + pc + rnd) >>> (2 * CF);
      e.yq[N-k] = (ps - pc + rnd) >>> (2 * CF);
    end
    for (int k = 0; k < N; k++) begin
      e.yr[k] = 0.0;
      for (int i = 0; i < N; i++)
        e.yr[k] += real'(x[i]) * ($cos((2 * i + 1) * k * PI_R / N) + $sin((2 * i + 1) * k * PI_R / N));
    end
    return e;
  endfunction

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (rst_n && in_valid && in_ready) begin
      exp_t e;
      e = make_exp(x_i);
      e.t_acc = cycle;
      expq.push_back(e);
      n_sent++;
    end
    if (rst_n && out_valid) begin
      if (expq.size() == 0) begin
        failures++;
      end else begin
        exp_t e;
        e = expq.pop_front();
        checks++;
        if (cycle - e.t_acc != 3 * M) begin
          failures++;
          $display("FAIL N=%0d: latency %0d", N, cycle - e.t_acc);
        end
        for (int k = 0; k < N; k++) begin
          real d;
          checks += 2;
          if (longint'(y_o[k]) != e.yq[k]) begin
            failures++;
            $display("FAIL N=%0d Y(%0d) = %0d, expected %0d", N, k, y_o[k], e.yq[k]);
          end
          d = real'(y_o[k]) - e.yr[k];
          if (d < 0.0) d = -d;
          if (d > TOL) begin
            failures++;
            $display("FAIL N=%0d Y(%0d) = %0d, exact %f", N, k, y_o[k], e.yr[k]);
          end
        end
      end
      n_recv++;
    end
  end

  initial begin
    checks = 0;
    failures = 0;
    done = 1'b0;
    in_valid = 1'b0;
    for (int i = 0; i < N; i++) x_i[i] = '0;
    @(posedge rst_n);
    for (int b = 0; b < NBLK; b++) begin
      int target;
      @(negedge clk);
      for (int i = 0; i < N; i++) x_i[i] = XW'($urandom);
      in_valid = 1'b1;
      target = n_sent + 1;
      do @(negedge clk); while (n_sent != target);
    end
    in_valid = 1'b0;
    repeat (3 * M + 4) @(negedge clk);
    checks++;
    if (n_recv != NBLK) begin
      failures++;
      $display("FAIL N=%0d: %0d results for %0d blocks", N, n_recv, NBLK);
    end
    done = 1'b1;
  end
endmodule
