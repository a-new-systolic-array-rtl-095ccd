// tb_band_stream_ctrl -- self-checking test of the stream generator for
// N = 13, G = 2.
//
// Offers random blocks, sometimes continuously and sometimes with gaps, and
// checks for each accepted block, cycle by cycle, the stream of the
// published example: coefficient c(j) for j = 4 8 3 6 12 11 9 5 10 7 1
// (quantised here from $cos), tag bit 0 0 0 0 0 1 0 0 0 0 0, operands
// u[0..5] then five zeros, on both operand outputs; all-zero outputs when
// idle; frame_o with x_C(0)/x_S(0) 2M-1 cycles after element 0; start_ready
// low during elements 0..L-2 of a stream; and a gap-free restart.
module tb_band_stream_ctrl;
  import gdht_pkg::*;
  localparam int N = 13, G = 2, XW = 16, CW = 16, CF = 14, M = 6, L = 11;
  localparam int UW = aux_width(XW, N), VW = opnd_width(XW, N);
  localparam int STREAM [L] = '{4, 8, 3, 6, 12, 11, 9, 5, 10, 7, 1};

  logic clk = 1'b0;
  logic rst_n;
  logic start_valid, start_ready;
  logic signed [VW-1:0] uc_i [M], us_i [M];
  logic signed [UW-1:0] xc0_i, xs0_i;
  logic signed [VW-1:0] xc_o, xs_o;
  logic signed [CW-1:0] c_o;
  logic tc_o, frame_o;
  logic signed [UW-1:0] xc0_o, xs0_o;

  band_stream_ctrl #(.N(N), .G(G), .XW(XW), .CW(CW), .CF(CF)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_b2b = 0, n_acc = 0;
  int cyc = 0;

  typedef struct {
    bit v; longint xc; longint xs; longint c; bit tc;
  } slot_t;
  slot_t  exp_s [int];   // expected stream element per cycle
  longint exp_f0 [int];  // expected xc0 on frame cycle
  longint exp_f1 [int];
  int last_acc = -100;

  function automatic longint cq(int j);
    real v;
    v = $cos(2.0 * 3.14159265358979323846 * j / N) * (2.0 ** CF);
    return longint'($rtoi(v + ((v >= 0.0) ? 0.5 : -0.5)));
  endfunction

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL cycle %0d %s: got %0d expected %0d", cyc, what, got, exp);
    end
  endtask

  // Sample just before each rising edge; cycle 'cyc' is the one ending there.
  always @(posedge clk) if (rst_n) begin
    slot_t e;
    if (exp_s.exists(cyc)) e = exp_s[cyc];
    else e = '{v: 0, xc: 0, xs: 0, c: 0, tc: 0};
    chk("xc_o", xc_o, e.xc);
    chk("xs_o", xs_o, e.xs);
    chk("c_o", c_o, e.c);
    chk("tc_o", tc_o, e.tc);
    chk("frame_o", frame_o, exp_f0.exists(cyc));
    if (exp_f0.exists(cyc)) begin
      chk("xc0_o", xc0_o, exp_f0[cyc]);
      chk("xs0_o", xs0_o, exp_f1[cyc]);
    end
    if (start_valid && start_ready) begin
      if (cyc - last_acc == L) n_b2b++;
      if (n_acc > 0) chk("no overlap", (cyc - last_acc >= L) ? 1 : 0, 1);
      last_acc = cyc;
      n_acc++;
      for (int s = 0; s < L; s++)
        exp_s[cyc + 1 + s] = '{v: 1, xc: (s < M) ? longint'(uc_i[s]) : 0,
                               xs: (s < M) ? longint'(us_i[s]) : 0,
                               c: cq(STREAM[s]), tc: (s == M - 1)};
      exp_f0[cyc + 2 * M] = xc0_i;
      exp_f1[cyc + 2 * M] = xs0_i;
    end
    cyc <= cyc + 1;
  end

  initial begin
    rst_n = 1'b0;
    start_valid = 1'b0;
    for (int m = 0; m < M; m++) begin uc_i[m] = '0; us_i[m] = '0; end
    xc0_i = '0; xs0_i = '0;
    @(negedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      start_valid = (t < 200) ? 1'b1 : ($urandom_range(0, 9) == 0);
      for (int m = 0; m < M; m++) begin uc_i[m] = VW'($urandom); us_i[m] = VW'($urandom); end
      xc0_i = UW'($urandom); xs0_i = UW'($urandom);
    end
    @(negedge clk);
    start_valid = 1'b0;
    repeat (3 * L) @(negedge clk);
    checks++;
    if (n_b2b == 0 || n_acc < 20) begin failures++; $display("FAIL: b2b=%0d acc=%0d", n_b2b, n_acc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
