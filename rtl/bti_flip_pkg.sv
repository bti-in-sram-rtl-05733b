// Shared constants and helpers of the cyclic-flipping BTI mitigation.
//
// The mitigated memory is the data RAM of a small RISC-V microcontroller:
// 32 KiB of 32-bit words (8192 words). A fraction of the words is kept
// stored inverted at any time; which fraction is described by two indexes,
// start and end (half-open range [start, end)). The helper is_inverted()
// answers, for one word address, whether the array currently holds the
// complement of the true data. The indexes are one bit wider than a word
// address because end reaches WORDS when the whole memory is inverted.
package bti_flip_pkg;

  // Size of the data RAM (8192 words of 32 bits, 32 KiB).
  localparam int unsigned DEF_WORDS  = 8192;
  localparam int unsigned DEF_DATA_W = 32;
  // Width of the run-time flip interval; the evaluated intervals go up to 2047.
  localparam int unsigned DEF_INTERVAL_W = 16;
  // Interval (cycles between two word flips) used as the reset value.
  localparam int unsigned DEF_INTERVAL = 255;

  // A word is stored inverted when start <= addr < end.
  function automatic logic is_inverted(input logic [31:0] addr,
                                       input logic [31:0] start_idx,
                                       input logic [31:0] end_idx);
    return (addr >= start_idx) && (addr < end_idx);
  endfunction

endpackage
