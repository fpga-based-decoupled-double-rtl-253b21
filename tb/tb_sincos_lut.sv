// tb_sincos_lut: sweeps the phase over [0, 2*pi) and a little beyond and
// checks that the table returns sin/cos of area p = floor(128*theta/(2*pi))
// (mod 128) and of area 2p, each the Q15 value round(32767*sin(2*pi*k/128))
// computed here in floating point; at area boundaries either neighbour is
// accepted. Also checks the one-clock read latency and the reset values.
module tb_sincos_lut;
  import ddsrf_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, valid;
  logic [17:0] theta;
  sincos_t sc1, sc2;
  int checks = 0, failures = 0;
  always #4 clk = ~clk;

  sincos_lut dut (.clk, .rst_n, .en, .theta, .sc1, .sc2, .valid);

  localparam real PI = 3.14159265358979;
  function automatic q15_t tab(input int k);
    return q15_t'($rtoi($floor(32767.0 * $sin(2.0 * PI * real'(k % 128) / 128.0) + 0.5)));
  endfunction
  function automatic bit match(input int p, input sincos_t a, input sincos_t b);
    return a.s == tab(p) && a.c == tab(p + 32) &&
           b.s == tab((2 * p) % 128) && b.c == tab((2 * p + 32) % 128);
  endfunction

  initial begin
    real th, pr;
    int p;
    theta = '0;
    repeat (2) @(negedge clk);
    checks++;
    if (sc1.s != 0 || sc1.c != 32767) begin failures++; $display("FAIL reset value"); end
    rst_n = 1'b1;
    for (int i = 0; i < 1500; i++) begin
      theta = (i < 1000) ? 18'(i * 206) : 18'($urandom % 208000);
      th = real'(theta) / 32768.0;
      pr = 128.0 * th / (2.0 * PI);
      p  = $rtoi($floor(pr));
      en = 1'b1;
      @(negedge clk);
      en = 1'b0;
      checks++;
      if (!valid || !(match(p % 128, sc1, sc2) ||
          (pr - real'(p) < 0.001 && match((p + 127) % 128, sc1, sc2)) ||
          (real'(p + 1) - pr < 0.001 && match((p + 1) % 128, sc1, sc2)))) begin
        failures++;
        $display("FAIL theta=%0d p=%0d got %0d %0d %0d %0d", theta, p, sc1.s, sc1.c, sc2.s, sc2.c);
      end
      @(negedge clk);
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
