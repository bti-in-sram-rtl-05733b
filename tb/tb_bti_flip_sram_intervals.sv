// Workload testbench: the four flip intervals evaluated for the hardware
// scheme (255, 511, 1023 and 2047 cycles) on the full-size 8192-word
// memory. For each interval one complete pass runs while a background
// process reads a random word about every 4000 cycles and checks it. The
// testbench measures how long word 0 stays inverted, which is the longest
// time any cell holds one value, and checks it against interval x 8192
// (within a few cycles of read contention) and against the published
// static-stress durations 2.09e6, 4.19e6, 8.38e6 and 1.68e7 cycles
// (within 0.5 %). About 63 million cycles in total.
module tb_bti_flip_sram_intervals;
  localparam int unsigned WORDS = 8192;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        mit_en = 1'b0;
  logic [15:0] cfg_interval = '0;
  logic        cpu_req = 1'b0, cpu_we = 1'b0;
  logic [12:0] cpu_addr = '0;
  logic [3:0]  cpu_be = 4'hF;
  logic [31:0] cpu_wdata = '0, cpu_rdata;
  logic        cpu_rvalid;
  logic [13:0] start_idx, end_idx;
  logic        step_done, pass_done, restart, overrun;

  int          checks = 0, failures = 0, n_reads = 0;
  longint      cycle = 0;
  bit          reading = 0;
  int          ivs [4] = '{255, 511, 1023, 2047};
  real         table_val [4] = '{2.09e6, 4.19e6, 8.38e6, 1.68e7};

  bti_flip_sram dut (
    .clk, .rst_n, .mit_en, .cfg_interval, .cpu_req, .cpu_we, .cpu_addr,
    .cpu_be, .cpu_wdata, .cpu_rdata, .cpu_rvalid, .start_idx, .end_idx,
    .step_done, .pass_done, .restart, .overrun
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  function automatic logic [31:0] pattern(int a);
    return 32'(a) * 32'h0101_0ACF + 32'h1234_5678;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d: %s", cycle, what);
    end
  endtask

  initial begin : watchdog
    repeat (70_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // background reads with a check of the returned data
  initial begin : reader
    int a;
    forever begin
      repeat (3000 + $urandom % 2000) @(posedge clk);
      if (reading) begin
        a = int'($urandom % WORDS);
        @(negedge clk);
        cpu_req = 1; cpu_we = 0; cpu_addr = 13'(a);
        @(negedge clk);
        cpu_req = 0;
        check(cpu_rvalid && cpu_rdata == pattern(a), $sformatf("read word %0d", a));
        n_reads++;
      end
    end
  end

  initial begin
    longint t_inv, t_rest, d;
    real rel;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int a = 0; a < WORDS; a++) begin
      @(negedge clk);
      cpu_req = 1; cpu_we = 1; cpu_addr = 13'(a); cpu_wdata = pattern(a);
    end
    @(negedge clk) cpu_req = 0;
    reading = 1;
    foreach (ivs[k]) begin
      @(negedge clk);
      cfg_interval = 16'(ivs[k]);
      mit_en = 1;
      wait (end_idx == 14'd1);
      t_inv = cycle;
      wait (start_idx == 14'd1);
      t_rest = cycle;
      @(posedge pass_done);
      @(negedge clk);
      mit_en = 0;
      d = t_rest - t_inv;
      check(d >= longint'(ivs[k]) * WORDS - 4 && d <= longint'(ivs[k]) * WORDS + 4,
            $sformatf("interval %0d: word 0 inverted %0d cycles, expected %0d",
                      ivs[k], d, ivs[k] * WORDS));
      rel = (real'(d) - table_val[k]) / table_val[k];
      check(rel < 0.005 && rel > -0.005,
            $sformatf("interval %0d: %0d cycles vs published %e", ivs[k], d, table_val[k]));
      $display("interval %0d: static stress %0d cycles (published %e)", ivs[k], d, table_val[k]);
    end
    check(n_reads > 100, "background reads happened");
    $display("reads=%0d", n_reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
