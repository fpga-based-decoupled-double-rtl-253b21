// tb_sample_tick: checks that the strobe is one cycle wide and repeats every
// DIV = 25000 clocks (5 kHz at 125 MHz), and that reset restarts the count.
module tb_sample_tick;
  logic clk = 1'b0, rst_n = 1'b0, tick;
  int checks = 0, failures = 0;
  always #4 clk = ~clk;

  sample_tick dut (.clk, .rst_n, .tick);

  longint cyc = 0, last = -1;
  int ticks = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    while (ticks < 6) begin
      @(posedge clk);
      if (tick) begin
        if (last >= 0) check(cyc - last == 25000, $sformatf("period %0d", cyc - last));
        last = cyc;
        ticks++;
        @(posedge clk);
        check(!tick, "tick wider than one cycle");
      end
    end
    // Reset in mid-count: the next strobe comes a full period after release.
    repeat (1000) @(posedge clk);
    rst_n <= 1'b0;
    @(posedge clk);
    rst_n <= 1'b1;
    last = cyc;
    do @(posedge clk); while (!tick);
    // The first edge with reset released is one after the edge that releases it.
    check(cyc - last == 25001, $sformatf("period after reset %0d", cyc - last));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
