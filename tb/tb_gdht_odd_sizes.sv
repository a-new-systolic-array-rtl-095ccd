// tb_gdht_odd_sizes -- runs the odd-time GDHT processor at other prime
// lengths than the default: N = 5 (G = 2), 7 (G = 3), 11 (G = 2) and 17
// (G = 3), each with back-to-back random blocks checked by gdht_size_check.
module tb_gdht_odd_sizes;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic done [4];
  int   chk [4], fail [4];

  gdht_size_check #(.N(5),  .G(2)) u_n5  (.clk(clk), .rst_n(rst_n), .done(done[0]), .checks(chk[0]), .failures(fail[0]));
  gdht_size_check #(.N(7),  .G(3)) u_n7  (.clk(clk), .rst_n(rst_n), .done(done[1]), .checks(chk[1]), .failures(fail[1]));
  gdht_size_check #(.N(11), .G(2)) u_n11 (.clk(clk), .rst_n(rst_n), .done(done[2]), .checks(chk[2]), .failures(fail[2]));
  gdht_size_check #(.N(17), .G(3)) u_n17 (.clk(clk), .rst_n(rst_n), .done(done[3]), .checks(chk[3]), .failures(fail[3]));

  int checks, failures;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (done[0] && done[1] && done[2] && done[3]);
    checks = 0; failures = 0;
    for (int i = 0; i < 4; i++) begin checks += chk[i]; failures += fail[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    checks = 0; failures = 1;
    for (int i = 0; i < 4; i++) begin checks += chk[i]; failures += fail[i]; end
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
