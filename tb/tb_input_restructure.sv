// tb_input_restructure -- self-checking test of the input restructuring for
// N = 13, G = 2.
//
// For random and full-scale sample blocks it computes x_C and x_S with the
// backward recurrences and checks the operand vectors against the pairs
// listed for this example, in band-correlation column order:
// (2,11) (4,9) (5,8) (3,10) (6,7) (1,12), plus x_C(0) and x_S(0).
module tb_input_restructure;
  import gdht_pkg::*;
  localparam int N = 13, XW = 16, M = 6;
  localparam int UW = aux_width(XW, N), VW = opnd_width(XW, N);
  localparam int PAIR [M] = '{2, 4, 5, 3, 6, 1};

  logic signed [XW-1:0] x_i [N];
  logic signed [VW-1:0] uc_o [M], us_o [M];
  logic signed [UW-1:0] xc0_o, xs0_o;

  input_restructure #(.N(N), .G(2), .XW(XW)) dut (.*);

  int checks = 0, failures = 0;

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int t = 0; t < 200; t++) begin
      longint xc [N], xs [N];
      for (int i = 0; i < N; i++)
        case (t)
          0: x_i[i] = 16'sh7fff;
          1: x_i[i] = -16'sh8000;
          2: x_i[i] = i[0] ? 16'sh7fff : -16'sh8000;
          default: x_i[i] = XW'($urandom);
        endcase
      #1;
      xc[N-1] = x_i[N-1];
      xs[N-1] = x_i[N-1];
      for (int i = N - 2; i >= 0; i--) begin
        xc[i] = longint'(x_i[i]) - xc[i+1];
        xs[i] = longint'(x_i[i]) + xs[i+1];
      end
      chk("xc0", xc0_o, xc[0]);
      chk("xs0", xs0_o, xs[0]);
      for (int m = 0; m < M; m++) begin
        chk($sformatf("uc[%0d]", m), uc_o[m], xc[PAIR[m]] + xc[N-PAIR[m]]);
        chk($sformatf("us[%0d]", m), us_o[m], xs[PAIR[m]] + xs[N-PAIR[m]]);
      end
    end
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
