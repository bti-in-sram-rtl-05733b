// bti_flip_sram: data SRAM with hardware cyclic-flipping BTI mitigation.
//
// An SRAM cell that holds the same value for a long time suffers static
// bias-temperature-instability stress in two of its transistors. This
// memory keeps moving every word between its true and its inverted form in
// the background, so every cell spends half the time storing each value.
// The processor sees an ordinary single-port RAM and is never stalled.
//
// Structure: flip_counter raises a tick every cfg_interval cycles;
// flip_control then reads the next word, inverts it and writes it back in
// idle memory cycles, and advances the start/end indexes of the inverted
// region; flip_interface gives the CPU priority on the array and corrects
// the polarity of CPU reads and writes from the region indexes; sram_array
// is the 8192 x 32-bit storage.
//
// CPU port: cpu_req with cpu_we=1 writes the cpu_be bytes of cpu_wdata to
// word cpu_addr at the clock edge; cpu_we=0 reads, and cpu_rdata is valid
// with cpu_rvalid one cycle later. Every request is accepted at once.
// Mitigation: mit_en starts the counter, cfg_interval sets the cycles per
// flipped word (255, 511, 1023 and 2047 are the evaluated settings: a pass
// of 2 x 8192 steps then bounds static stress to cfg_interval x 8192
// cycles). Status outputs report the region indexes and one-cycle pulses
// for each flipped word, each completed pass, each restarted step and each
// dropped tick.
// From the source: the four parts and how they connect, the data RAM size
// and the configurable interval. Port protocol and status outputs are this
// design's own.
module bti_flip_sram #(
  parameter int unsigned WORDS      = bti_flip_pkg::DEF_WORDS,
  parameter int unsigned DATA_W     = bti_flip_pkg::DEF_DATA_W,
  parameter int unsigned INTERVAL_W = bti_flip_pkg::DEF_INTERVAL_W,
  localparam int unsigned ADDR_W = $clog2(WORDS),
  localparam int unsigned IDX_W  = ADDR_W + 1,
  localparam int unsigned BE_W   = DATA_W / 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // mitigation configuration
  input  logic                  mit_en,
  input  logic [INTERVAL_W-1:0] cfg_interval,
  // CPU data port
  input  logic                  cpu_req,
  input  logic                  cpu_we,
  input  logic [ADDR_W-1:0]     cpu_addr,
  input  logic [BE_W-1:0]       cpu_be,
  input  logic [DATA_W-1:0]     cpu_wdata,
  output logic [DATA_W-1:0]     cpu_rdata,
  output logic                  cpu_rvalid,
  // status
  output logic [IDX_W-1:0]      start_idx,
  output logic [IDX_W-1:0]      end_idx,
  output logic                  step_done,
  output logic                  pass_done,
  output logic                  restart,
  output logic                  overrun
);

  logic              tick;
  logic              cpu_inv;
  logic              flip_req, flip_we, flip_gnt;
  logic [ADDR_W-1:0] flip_addr;
  logic [DATA_W-1:0] flip_wdata, flip_rdata;
  logic              mem_en, mem_we;
  logic [ADDR_W-1:0] mem_addr;
  logic [BE_W-1:0]   mem_be;
  logic [DATA_W-1:0] mem_wdata, mem_rdata;

  flip_counter #(.INTERVAL_W(INTERVAL_W)) u_counter (
    .clk, .rst_n, .en(mit_en), .interval(cfg_interval), .tick
  );

  flip_control #(.WORDS(WORDS), .DATA_W(DATA_W)) u_control (
    .clk, .rst_n, .tick,
    .mem_req(flip_req), .mem_we(flip_we), .mem_addr(flip_addr),
    .mem_wdata(flip_wdata), .mem_gnt(flip_gnt), .mem_rdata(flip_rdata),
    .cpu_req, .cpu_we, .cpu_addr, .cpu_inv,
    .start_idx, .end_idx, .step_done, .pass_done, .restart, .overrun
  );

  flip_interface #(.WORDS(WORDS), .DATA_W(DATA_W)) u_interface (
    .clk, .rst_n,
    .cpu_req, .cpu_we, .cpu_addr, .cpu_be, .cpu_wdata, .cpu_rdata,
    .cpu_rvalid, .cpu_inv,
    .flip_req, .flip_we, .flip_addr, .flip_wdata, .flip_gnt, .flip_rdata,
    .mem_en, .mem_we, .mem_addr, .mem_be, .mem_wdata, .mem_rdata
  );

  sram_array #(.WORDS(WORDS), .DATA_W(DATA_W)) u_sram (
    .clk, .en(mem_en), .we(mem_we), .addr(mem_addr), .be(mem_be),
    .wdata(mem_wdata), .rdata(mem_rdata)
  );

endmodule
