// flip_control: inverted-region bookkeeping and read-flip-write sequencer.
//
// Two indexes describe which words are stored inverted: every word with
// start_idx <= address < end_idx. A pass over the memory has two halves.
// First end_idx walks from 0 to WORDS, inverting one word per step, until
// the whole memory holds inverted data. Then start_idx walks from 0 to
// WORDS, restoring one word per step. When start_idx reaches WORDS both
// indexes return to 0 and the next pass begins. Every cell thereby spends
// half of each pass in each state, which moves its duty factor to 0.5 and
// bounds its static stress to half a pass.
//
// Each tick from the counter asks for one step. A step is a read of the
// target word (end_idx in the first half, start_idx in the second), a
// latch cycle in which the read data is taken from the array's output
// register, and a write of its complement. The memory is used only in
// cycles the flipping interface grants (no CPU access): a read or write
// that is not granted is retried in the next cycle. If the CPU writes the
// target word after it was read and before the complement is written, the
// latched value is stale and the step restarts from the read. A tick that
// arrives while the previous step is in progress is queued (one deep); a
// tick that finds one already queued is dropped and reported on overrun.
//
// Timing: at least 3 cycles per step (read, latch, write), 2 of them memory
// cycles. The indexes and the stored word change at the same clock edge,
// so is_inverted() is exact in every cycle.
// From the source: the start and end indexes and their walk (the four
// stages of a pass), the read / flip / write step, the counter trigger and
// the use of idle memory cycles only. This design's own choices: the latch
// cycle, the restart on a conflicting write and the one-deep tick queue.
module flip_control #(
  parameter int unsigned WORDS  = bti_flip_pkg::DEF_WORDS,
  parameter int unsigned DATA_W = bti_flip_pkg::DEF_DATA_W,
  localparam int unsigned ADDR_W = $clog2(WORDS),
  localparam int unsigned IDX_W  = ADDR_W + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tick,        // counter trigger: one step due
  // memory port towards the flipping interface (raw, stored polarity)
  output logic              mem_req,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [DATA_W-1:0] mem_wdata,
  input  logic              mem_gnt,     // port free in this cycle
  input  logic [DATA_W-1:0] mem_rdata,   // array data-out register
  // CPU address, to tell its polarity and detect writes to the target
  input  logic              cpu_req,
  input  logic              cpu_we,
  input  logic [ADDR_W-1:0] cpu_addr,
  output logic              cpu_inv,
  // status
  output logic [IDX_W-1:0]  start_idx,
  output logic [IDX_W-1:0]  end_idx,
  output logic              step_done,   // one word flipped this cycle
  output logic              pass_done,   // indexes wrapped to 0
  output logic              restart,     // step restarted after CPU write
  output logic              overrun      // tick dropped
);
  import bti_flip_pkg::*;

  typedef enum logic [1:0] {S_IDLE, S_READ, S_LATCH, S_WRITE} state_t;
  state_t            state, state_n;
  logic              pending;
  logic [DATA_W-1:0] buf_q;
  logic              conflict;
  logic              in_first_half;

  assign in_first_half = (end_idx != IDX_W'(WORDS));
  assign mem_addr      = in_first_half ? end_idx[ADDR_W-1:0]
                                       : start_idx[ADDR_W-1:0];
  assign mem_wdata     = ~buf_q;
  assign mem_req       = (state == S_READ) || (state == S_WRITE);
  assign mem_we        = (state == S_WRITE);

  assign cpu_inv  = is_inverted(32'(cpu_addr), 32'(start_idx), 32'(end_idx));
  assign conflict = cpu_req && cpu_we && (cpu_addr == mem_addr);

  assign step_done = (state == S_WRITE) && !conflict && mem_gnt;
  assign restart   = ((state == S_LATCH) || (state == S_WRITE)) && conflict;
  assign overrun   = tick && pending && (state != S_IDLE);
  assign pass_done = step_done && !in_first_half &&
                     (start_idx == IDX_W'(WORDS - 1));

  always_comb begin
    state_n = state;
    unique case (state)
      S_IDLE:  if (pending) state_n = S_READ;
      S_READ:  if (mem_gnt) state_n = S_LATCH;
      S_LATCH: state_n = conflict ? S_READ : S_WRITE;
      S_WRITE: if (conflict)     state_n = S_READ;
               else if (mem_gnt) state_n = S_IDLE;
      default: state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      pending   <= 1'b0;
      buf_q     <= '0;
      start_idx <= '0;
      end_idx   <= '0;
    end else begin
      state <= state_n;
      if (tick)                                 pending <= 1'b1;
      else if (state == S_IDLE && pending)      pending <= 1'b0;
      if (state == S_LATCH) buf_q <= mem_rdata;
      if (step_done) begin
        if (in_first_half) begin
          end_idx <= end_idx + 1'b1;
        end else if (pass_done) begin
          start_idx <= '0;
          end_idx   <= '0;
        end else begin
          start_idx <= start_idx + 1'b1;
        end
      end
    end
  end

  // The inverted region is always a well-formed range.
  a_range : assert property (@(posedge clk) disable iff (!rst_n)
    (start_idx <= end_idx) && (end_idx <= IDX_W'(WORDS)));
  // start_idx only moves once the whole memory is inverted.
  a_halves : assert property (@(posedge clk) disable iff (!rst_n)
    (start_idx != '0) |-> (end_idx == IDX_W'(WORDS)));

endmodule
