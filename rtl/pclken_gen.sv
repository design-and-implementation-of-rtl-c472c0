// APB clock enable and gated APB clock generator.
//
// In a synchronous AHB to APB bridge the APB clock comes from the same source
// as HCLK and is phase aligned with it; the APB side is slowed down by a clock
// enable, PCLKEN.  This block divides HCLK by PCLK_DIV: a counter runs over
// PCLK_DIV HCLK cycles and PCLKEN is high in the last cycle of each period,
// i.e. in the HCLK cycle that ends on a rising PCLK edge.  Logic clocked by
// HCLK and qualified by PCLKEN behaves exactly like logic clocked by PCLK.
//
// PCLK itself is produced by a standard latch-based clock gate: PCLKEN is
// latched while HCLK is low and ANDed with HCLK, so PCLK pulses high for the
// first half of every HCLK cycle that starts right after PCLKEN was high.
// The latch is intended (it is the clock-gate cell) and is the only latch in
// the design.  PCLK_DIV=1 gives PCLKEN stuck high and PCLK equal to HCLK.
//
// Using PCLKEN to set the APB rate follows the published bridge; the counter,
// the divide ratio of 2 (the ratio in its validation waveforms) and the clock
// gate are this design's choices.
module pclken_gen #(
  parameter int unsigned PCLK_DIV = 2  // HCLK cycles per PCLK cycle (>= 1)
) (
  input  logic HCLK,
  input  logic HRESETn,
  output logic PCLKEN,
  output logic PCLK
);

  localparam int unsigned CW = (PCLK_DIV > 1) ? $clog2(PCLK_DIV) : 1;

  logic [CW-1:0] cnt;
  logic          en_lat;

  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn)
      cnt <= '0;
    else if (cnt == CW'(PCLK_DIV - 1))
      cnt <= '0;
    else
      cnt <= cnt + 1'b1;
  end

  assign PCLKEN = (PCLK_DIV <= 1) || (cnt == CW'(PCLK_DIV - 1));

  // Clock gate: transparent while HCLK is low
  always_latch begin
    if (!HCLK) en_lat = PCLKEN;
  end

  assign PCLK = HCLK & en_lat;

  initial assert (PCLK_DIV >= 1) else $error("PCLK_DIV must be at least 1");

endmodule
