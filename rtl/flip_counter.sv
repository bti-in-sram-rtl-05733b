// flip_counter: interval timer that triggers the cyclic flipping.
//
// Counts clock cycles while enabled and raises tick for one cycle every
// `interval` cycles, so one word of the memory is due to be flipped per
// interval. The interval is a run-time input: the hardware scheme is
// evaluated at intervals of 255, 511, 1023 and 2047 cycles, and with 8192
// words a full pass then leaves each cell at most interval x 8192 cycles in
// one state. interval = 0 stops the counter. Disabling (en=0) clears it.
//
// Timing: with en held high from reset, the first tick is in the cycle
// `interval` cycles after the count starts, then every `interval` cycles.
// A change of interval takes effect when the current count passes it.
// From the source: a counter triggers the flips independently of CPU reads
// and writes, at a configurable rate. Its width and reset are this design's.
module flip_counter #(
  parameter int unsigned INTERVAL_W = bti_flip_pkg::DEF_INTERVAL_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  logic [INTERVAL_W-1:0] interval,
  output logic                  tick
);

  logic [INTERVAL_W-1:0] count;
  logic                  wrap;

  assign wrap = en && (interval != '0) && (count >= interval - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      tick  <= 1'b0;
    end else begin
      tick <= wrap;
      if (!en || interval == '0 || wrap) count <= '0;
      else                               count <= count + 1'b1;
    end
  end

endmodule
