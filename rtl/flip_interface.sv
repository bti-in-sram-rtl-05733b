// flip_interface: polarity correction and port sharing between the databus,
// the flipping control and the SRAM array.
//
// The CPU always has the memory: in a cycle with cpu_req the array performs
// the CPU access and the flipping control is refused (flip_gnt=0). Only in
// cycles without a CPU access does the flipping control get the port, so
// the mitigation never stalls the processor. A CPU write to a word that is
// currently stored inverted (cpu_inv) stores the complement of the written
// bytes; a CPU read of such a word returns the complement of the stored
// word, so the CPU always sees true data. The flipping control reads and
// writes raw, stored-polarity data.
//
// Timing: CPU reads return data one cycle after the request, flagged by
// cpu_rvalid; the polarity flag of the read is registered alongside so the
// correction matches the moment of the read. Writes take effect at the
// clock edge of the request.
// From the source: the interface between array and databus applies the
// Flip signal to the read and written values, and the mitigation only uses
// the memory when the processor does not. This design's own choices: the
// fixed CPU priority, the rvalid flag and byte enables.
module flip_interface #(
  parameter int unsigned WORDS  = bti_flip_pkg::DEF_WORDS,
  parameter int unsigned DATA_W = bti_flip_pkg::DEF_DATA_W,
  localparam int unsigned ADDR_W = $clog2(WORDS),
  localparam int unsigned BE_W   = DATA_W / 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // databus (CPU) side, true data
  input  logic              cpu_req,
  input  logic              cpu_we,
  input  logic [ADDR_W-1:0] cpu_addr,
  input  logic [BE_W-1:0]   cpu_be,
  input  logic [DATA_W-1:0] cpu_wdata,
  output logic [DATA_W-1:0] cpu_rdata,
  output logic              cpu_rvalid,
  input  logic              cpu_inv,     // cpu_addr is stored inverted
  // flipping control side, stored data
  input  logic              flip_req,
  input  logic              flip_we,
  input  logic [ADDR_W-1:0] flip_addr,
  input  logic [DATA_W-1:0] flip_wdata,
  output logic              flip_gnt,
  output logic [DATA_W-1:0] flip_rdata,
  // SRAM array side
  output logic              mem_en,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [BE_W-1:0]   mem_be,
  output logic [DATA_W-1:0] mem_wdata,
  input  logic [DATA_W-1:0] mem_rdata
);

  logic rd_inv_q;

  assign flip_gnt   = !cpu_req;
  assign flip_rdata = mem_rdata;
  assign cpu_rdata  = mem_rdata ^ {DATA_W{rd_inv_q}};

  always_comb begin
    if (cpu_req) begin
      mem_en    = 1'b1;
      mem_we    = cpu_we;
      mem_addr  = cpu_addr;
      mem_be    = cpu_be;
      mem_wdata = cpu_wdata ^ {DATA_W{cpu_inv}};
    end else begin
      mem_en    = flip_req;
      mem_we    = flip_we;
      mem_addr  = flip_addr;
      mem_be    = '1;
      mem_wdata = flip_wdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_inv_q   <= 1'b0;
      cpu_rvalid <= 1'b0;
    end else begin
      cpu_rvalid <= cpu_req && !cpu_we;
      if (cpu_req && !cpu_we) rd_inv_q <= cpu_inv;
    end
  end

  // The flipping control never touches the array in a CPU cycle.
  a_cpu_priority : assert property (@(posedge clk) disable iff (!rst_n)
    cpu_req |-> (mem_addr == cpu_addr) && (mem_we == cpu_we));

endmodule
