// Self-checking testbench for flip_interface. Random CPU and flip requests
// and random array read data are applied; the testbench checks that the CPU
// always owns the array port, that CPU write data is complemented exactly
// when cpu_inv is set, that the flip request reaches the array unchanged
// with all byte enables only when no CPU access is present, and that read
// data returned to the CPU one cycle later is corrected with the polarity
// captured at the time of the read.
module tb_flip_interface;
  localparam int unsigned DW = 32;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          cpu_req, cpu_we, cpu_inv;
  logic [12:0]   cpu_addr;
  logic [3:0]    cpu_be;
  logic [DW-1:0] cpu_wdata, cpu_rdata;
  logic          cpu_rvalid;
  logic          flip_req, flip_we, flip_gnt;
  logic [12:0]   flip_addr;
  logic [DW-1:0] flip_wdata, flip_rdata;
  logic          mem_en, mem_we;
  logic [12:0]   mem_addr;
  logic [3:0]    mem_be;
  logic [DW-1:0] mem_wdata, mem_rdata;
  int            checks = 0, failures = 0;
  bit            prev_read, prev_inv;

  flip_interface dut (
    .clk, .rst_n, .cpu_req, .cpu_we, .cpu_addr, .cpu_be, .cpu_wdata,
    .cpu_rdata, .cpu_rvalid, .cpu_inv, .flip_req, .flip_we, .flip_addr,
    .flip_wdata, .flip_gnt, .flip_rdata, .mem_en, .mem_we, .mem_addr,
    .mem_be, .mem_wdata, .mem_rdata
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {cpu_req, cpu_we, cpu_inv, flip_req, flip_we} = '0;
    cpu_addr = '0; cpu_be = '0; cpu_wdata = '0; flip_addr = '0;
    flip_wdata = '0; mem_rdata = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      // read issued in the previous cycle: corrected data now
      mem_rdata = $urandom;
      // new request
      cpu_req   = $urandom % 2;
      cpu_we    = $urandom % 2;
      cpu_inv   = $urandom % 2;
      cpu_addr  = 13'($urandom);
      cpu_be    = 4'($urandom);
      cpu_wdata = $urandom;
      flip_req  = $urandom % 2;
      flip_we   = $urandom % 2;
      flip_addr = 13'($urandom);
      flip_wdata = $urandom;
      #1;
      // the previous read is corrected with the polarity it was issued with
      check(cpu_rvalid == prev_read, "rvalid one cycle after a read");
      if (prev_read)
        check(cpu_rdata == (mem_rdata ^ {DW{prev_inv}}), "read correction");
      check(flip_rdata == mem_rdata, "raw data to flipping control");
      if (cpu_req) begin
        check(!flip_gnt, "flip refused during CPU access");
        check(mem_en && mem_we == cpu_we && mem_addr == cpu_addr && mem_be == cpu_be,
              "CPU owns the port");
        if (cpu_we) check(mem_wdata == (cpu_wdata ^ {DW{cpu_inv}}), "write correction");
      end else begin
        check(flip_gnt, "flip granted in idle cycle");
        check(mem_en == flip_req, "flip enable");
        if (flip_req)
          check(mem_we == flip_we && mem_addr == flip_addr && mem_be == 4'hF &&
                mem_wdata == flip_wdata, "flip access passes unchanged");
      end
      prev_read = cpu_req && !cpu_we;
      prev_inv  = cpu_inv;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
