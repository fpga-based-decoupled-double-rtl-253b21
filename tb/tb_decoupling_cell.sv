// tb_decoupling_cell: first builds the exact case the cell exists for, a
// positive-frame vector made of a dc part plus a negative-sequence vector
// rotated by -2*theta, and checks the cell returns just the dc part; then
// compares random operands against the cell equations in floating point.
module tb_decoupling_cell;
  import ddsrf_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, valid;
  vec2_t x, xbar, y;
  sincos_t rot;
  int checks = 0, failures = 0;
  function automatic real fabs(input real v); return (v < 0.0) ? -v : v; endfunction
  always #4 clk = ~clk;

  decoupling_cell dut (.clk, .rst_n, .en, .x, .xbar, .rot, .y, .valid);

  task automatic apply(input real ed, input real eq, input real tol);
    en = 1'b1;
    @(negedge clk);
    en = 1'b0;
    checks++;
    if (!valid || fabs(real'(y.d) - ed) > tol || fabs(real'(y.q) - eq) > tol) begin
      failures++;
      $display("FAIL got %0d %0d exp %f %f", y.d, y.q, ed, eq);
    end
    @(negedge clk);
  endtask

  initial begin
    real ang, vpd, vpq, vnd, vnq;
    x = '0; xbar = '0; rot = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // Decoupling: x = Vp + R(2th)*Vn, xbar = Vn  ->  y = Vp.
    for (int i = 0; i < 200; i++) begin
      ang = 6.283185307 * real'($urandom % 10000) / 10000.0;
      vpd = 24000.0; vpq = real'(int'($urandom % 2000) - 1000);
      vnd = real'(int'($urandom % 8000) - 4000); vnq = real'(int'($urandom % 8000) - 4000);
      rot.s = q15_t'($rtoi($floor(32767.0 * $sin(ang) + 0.5)));
      rot.c = q15_t'($rtoi($floor(32767.0 * $cos(ang) + 0.5)));
      xbar.d = sig_t'($rtoi(vnd)); xbar.q = sig_t'($rtoi(vnq));
      x.d = sig_t'($rtoi(vpd + $cos(ang) * vnd + $sin(ang) * vnq));
      x.q = sig_t'($rtoi(vpq - $sin(ang) * vnd + $cos(ang) * vnq));
      apply(vpd, vpq, 3.0);
    end
    // Random operands against the equations.
    for (int i = 0; i < 200; i++) begin
      real ed, eq;
      ang = 6.283185307 * real'($urandom % 10000) / 10000.0;
      rot.s = q15_t'($rtoi($floor(32767.0 * $sin(ang) + 0.5)));
      rot.c = q15_t'($rtoi($floor(32767.0 * $cos(ang) + 0.5)));
      x.d = sig_t'(int'($urandom % 60000) - 30000);
      x.q = sig_t'(int'($urandom % 60000) - 30000);
      xbar.d = sig_t'(int'($urandom % 60000) - 30000);
      xbar.q = sig_t'(int'($urandom % 60000) - 30000);
      ed = real'(x.d) - ( real'(rot.c) * real'(xbar.d) + real'(rot.s) * real'(xbar.q)) / 32768.0;
      eq = real'(x.q) - (-real'(rot.s) * real'(xbar.d) + real'(rot.c) * real'(xbar.q)) / 32768.0;
      apply(ed, eq, 1.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
