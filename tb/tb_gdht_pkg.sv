// tb_gdht_pkg -- checks the index arithmetic and coefficient functions of
// gdht_pkg against the N = 13, G = 2 example: the coefficient stream order
// 4 8 3 6 12 11 9 5 10 7 1, the folded operand/row order 2 4 5 3 6 1, the
// primitive-root test, and the quantised cos/sin values against $cos/$sin.
module tb_gdht_pkg;
  import gdht_pkg::*;
  localparam int N = 13, G = 2, CF = 14;
  localparam int STREAM [11] = '{4, 8, 3, 6, 12, 11, 9, 5, 10, 7, 1};
  localparam int ROWS [6] = '{2, 4, 5, 3, 6, 1};

  int checks = 0, failures = 0;

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic bit close(int q, real v);
    real d;
    d = real'(q) / (2.0 ** CF) - v;
    if (d < 0.0) d = -d;
    return d <= 0.5 / (2.0 ** CF) + 1e-12;
  endfunction

  initial begin
    real pi;
    pi = 3.14159265358979323846;
    for (int s = 0; s < 11; s++) chk($sformatf("stream index %0d", s), modpow(G, s + 2, N), STREAM[s]);
    for (int m = 0; m < 6; m++) chk($sformatf("psi(%0d)", m), psi(m, G, N), ROWS[m]);
    chk("2 is a root of 13", is_primitive_root(2, 13), 1);
    chk("3 is not a root of 13", is_primitive_root(3, 13), 0);
    chk("3 is a root of 7", is_primitive_root(3, 7), 1);
    chk("fold(8)", fold(8, 13), 5);
    for (int s = 0; s < 11; s++) begin
      checks++;
      if (!close(stream_coef(s, G, N, CF), $cos(2.0 * pi * STREAM[s] / N))) begin
        failures++; $display("FAIL stream_coef(%0d)", s);
      end
    end
    for (int k = 0; k <= 6; k++) begin
      checks += 2;
      if (!close(rot_cos(k, N, CF), $cos(pi * k / N))) begin failures++; $display("FAIL rot_cos(%0d)", k); end
      if (!close(rot_sin(k, N, CF), $sin(pi * k / N))) begin failures++; $display("FAIL rot_sin(%0d)", k); end
    end
    chk("aux_width", aux_width(16, 13), 20);
    chk("out_width", out_width(16, 13), 21);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
