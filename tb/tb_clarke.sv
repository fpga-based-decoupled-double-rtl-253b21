// tb_clarke: drives random three-phase samples (and full-scale corners) and
// compares alpha/beta with the power-invariant Clarke matrix evaluated in
// floating point; also checks the one-clock latency of `valid`.
module tb_clarke;
  import ddsrf_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, valid;
  q15_t a, b, c;
  sig_t alpha, beta;
  int checks = 0, failures = 0;
  function automatic real fabs(input real v); return (v < 0.0) ? -v : v; endfunction
  always #4 clk = ~clk;

  clarke dut (.clk, .rst_n, .en, .a, .b, .c, .alpha, .beta, .valid);

  task automatic one(input q15_t ia, input q15_t ib, input q15_t ic);
    real ea, eb;
    @(negedge clk);
    a = ia; b = ib; c = ic; en = 1'b1;
    @(negedge clk);
    en = 1'b0;
    ea = $sqrt(2.0/3.0) * (real'(ia) - 0.5*real'(ib) - 0.5*real'(ic));
    eb = $sqrt(2.0/3.0) * ($sqrt(3.0)/2.0) * (real'(ib) - real'(ic));
    checks++;
    if (!valid || fabs(real'(alpha) - ea) > 2.0 || fabs(real'(beta) - eb) > 2.0) begin
      failures++;
      $display("FAIL a=%0d b=%0d c=%0d got %0d %0d exp %f %f v=%b", ia, ib, ic, alpha, beta, ea, eb, valid);
    end
    @(negedge clk);
    checks++;
    if (valid) begin failures++; $display("FAIL valid held"); end
  endtask

  initial begin
    a = '0; b = '0; c = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    one(16'sd32767, -16'sd32768, -16'sd32768);
    one(-16'sd32768, 16'sd32767, 16'sd32767);
    one(16'sd0, 16'sd32767, -16'sd32768);
    for (int i = 0; i < 300; i++) one(q15_t'($urandom), q15_t'($urandom), q15_t'($urandom));
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
