// sample_tick: sampling strobe generator.
//
// The PLL samples its inputs at 5 kHz while the fabric runs from a 125 MHz
// global clock, so one sample period is 25000 clock cycles. This counter
// counts DIV cycles and raises `tick` for exactly one cycle at the end of
// each count, giving one strobe every DIV cycles. The first strobe comes DIV
// cycles after reset is released. The clock and sampling rates follow the
// document; building the strobe with a plain down-counter is this design's
// own choice.
//
// Ports: clk, rst_n (active-low, synchronous), tick (one-cycle pulse).
module sample_tick #(
  parameter int unsigned DIV = 25000   // 125 MHz / 5 kHz
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);
  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt  <= CW'(DIV - 1);
      tick <= 1'b0;
    end else if (cnt == '0) begin
      cnt  <= CW'(DIV - 1);
      tick <= 1'b1;
    end else begin
      cnt  <= cnt - 1'b1;
      tick <= 1'b0;
    end
  end
endmodule
