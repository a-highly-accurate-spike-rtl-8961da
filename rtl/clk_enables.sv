// clk_enables: rate generator for the processor's four clock rates.
//
// The processor runs its units at 960 kHz, 240 kHz, 120 kHz and 30 kHz
// (the four rates come from the document). This design keeps one 960 kHz
// clock and derives the three slower rates as one-cycle clock-enable pulses
// from a free-running counter, instead of separate gated clocks: a
// counter modulo DIV_LOW counts fast cycles, and each enable fires on the
// last fast cycle of its own period. The ratios 4, 8 and 32 follow from
// the document's rates; using enables rather than clocks is this design's
// choice.
//
// Interface: en_240k, en_120k, en_30k are high for one clk cycle per period.
// After reset all three first fire together 32 cycles later (en_240k and
// en_120k also fire earlier, at cycles 4 and 8).
module clk_enables #(
  parameter int unsigned DIV_240K = 4,
  parameter int unsigned DIV_120K = 8,
  parameter int unsigned DIV_30K  = 32
) (
  input  logic clk,
  input  logic rst_n,
  output logic en_240k,
  output logic en_120k,
  output logic en_30k
);
  localparam int unsigned CW = $clog2(DIV_30K);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      cnt <= '0;
    else if (cnt == CW'(DIV_30K - 1)) cnt <= '0;
    else                             cnt <= cnt + 1'b1;
  end

  always_comb begin
    en_240k = (32'(cnt) % DIV_240K) == DIV_240K - 1;
    en_120k = (32'(cnt) % DIV_120K) == DIV_120K - 1;
    en_30k  = cnt == CW'(DIV_30K - 1);
  end

  initial begin
    assert (DIV_30K % DIV_120K == 0 && DIV_30K % DIV_240K == 0)
      else $error("slow rates must divide the 30 kHz period");
  end
endmodule
