// tb_stimulus_rom: reads 250 samples (two and a half periods) and compares
// each with the test-signal formulas evaluated in floating point: the
// positive (0.6, pi/3), negative (0.07, pi/4) and zero (0.02, pi/8)
// sequences plus the third harmonics 0.1/0.1/0.2 of each phase, and the
// ideal sine sin(x + pi/3). Also checks the wrap after 100 samples and
// that the output changes only on `en`.
module tb_stimulus_rom;
  import ddsrf_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, valid;
  q15_t va, vb, vc, ideal;
  int checks = 0, failures = 0;
  always #4 clk = ~clk;

  stimulus_rom dut (.clk, .rst_n, .en, .va, .vb, .vc, .ideal, .valid);

  localparam real PI = 3.14159265358979;
  function automatic int q(input real v); return $rtoi($floor(32767.0 * v + 0.5)); endfunction
  function automatic bit near(input q15_t got, input int exp);
    return (int'(got) - exp <= 1) && (exp - int'(got) <= 1);
  endfunction

  initial begin
    real x, ea, eb, ec, ei;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 250; k++) begin
      x  = 2.0 * PI * real'(k % 100) / 100.0;
      ea = 0.6 * $sin(x + PI/3) + 0.07 * $sin(x + PI/4) + 0.02 * $sin(x + PI/8)
         + 0.1 * $sin(3*x + PI/2);
      eb = 0.6 * $sin(x + PI/3 - 2*PI/3) + 0.07 * $sin(x + PI/4 + 2*PI/3)
         + 0.02 * $sin(x + PI/8) + 0.1 * $sin(3*x + PI/5);
      ec = 0.6 * $sin(x + PI/3 + 2*PI/3) + 0.07 * $sin(x + PI/4 - 2*PI/3)
         + 0.02 * $sin(x + PI/8) + 0.2 * $sin(3*x + PI/5);
      ei = $sin(x + PI/3);
      en = 1'b1;
      @(negedge clk);
      en = 1'b0;
      checks++;
      if (!valid || !near(va, q(ea)) || !near(vb, q(eb)) || !near(vc, q(ec)) || !near(ideal, q(ei))) begin
        failures++;
        $display("FAIL k=%0d got %0d %0d %0d %0d exp %0d %0d %0d %0d", k, va, vb, vc, ideal, q(ea), q(eb), q(ec), q(ei));
      end
      repeat (2) @(negedge clk);
      checks++;
      if (valid || !near(va, q(ea))) begin failures++; $display("FAIL output not held"); end
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
