// Workload testbench: duty-factor balance under benchmark-like traffic, on a
// 256-word memory with a flip interval of 8 cycles. The lower half of the
// memory is used by a random program (reads and writes); the upper half
// holds data that is written once and never changed, the case that causes
// static stress. Two traffic mixes are run: 20 % reads / 10 % writes (a
// typical instruction mix) and 20 % reads / 1.2 % writes (a compute-bound
// program). Over whole passes the testbench counts, for every bit of every
// static word, the cycles in which the stored cell holds 1, and checks that
// the duty factor is 0.5 within 1 %. It also checks that no static cell keeps
// its value longer than interval x WORDS cycles plus a small contention
// margin, and it checks every CPU read against a reference copy.
module tb_bti_flip_sram_duty;
  localparam int unsigned WORDS = 256;
  localparam int unsigned IV    = 8;
  localparam int unsigned HALF  = WORDS / 2;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        mit_en = 1'b0;
  logic [15:0] cfg_interval = 16'(IV);
  logic        cpu_req = 1'b0, cpu_we = 1'b0;
  logic [7:0]  cpu_addr = '0;
  logic [3:0]  cpu_be = 4'hF;
  logic [31:0] cpu_wdata = '0, cpu_rdata;
  logic        cpu_rvalid;
  logic [8:0]  start_idx, end_idx;
  logic        step_done, pass_done, restart, overrun;

  logic [31:0] truth [WORDS];
  int          ones  [HALF][32];
  longint      last_change [HALF];
  logic [31:0] last_val [HALF];
  longint      max_static = 0;
  longint      cycle = 0, meas_cycles = 0;
  int          checks = 0, failures = 0;
  int          rd_pct = 0, wr_permille = 0;
  bit          measuring = 0, traffic = 0;
  bit          exp_valid = 0;
  logic [31:0] exp_data;

  bti_flip_sram #(.WORDS(WORDS)) dut (
    .clk, .rst_n, .mit_en, .cfg_interval, .cpu_req, .cpu_we, .cpu_addr,
    .cpu_be, .cpu_wdata, .cpu_rdata, .cpu_rvalid, .start_idx, .end_idx,
    .step_done, .pass_done, .restart, .overrun
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d: %s", cycle, what);
    end
  endtask

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // program traffic: reads anywhere, writes only to the lower half
  always @(negedge clk) if (traffic) begin
    int r;
    r = int'($urandom % 1000);
    cpu_req   <= r < rd_pct * 10 + wr_permille;
    cpu_we    <= r < wr_permille;
    cpu_addr  <= (r < wr_permille) ? 8'($urandom % HALF) : 8'($urandom);
    cpu_be    <= 4'hF;
    cpu_wdata <= $urandom;
  end

  always @(posedge clk) if (rst_n) begin
    cycle++;
    check(cpu_rvalid == exp_valid, "rvalid");
    if (exp_valid) check(cpu_rdata == exp_data, "read data");
    exp_valid = 0;
    if (measuring) begin
      meas_cycles++;
      for (int w = 0; w < HALF; w++) begin
        logic [31:0] s;
        s = dut.u_sram.mem[HALF + w];
        for (int b = 0; b < 32; b++) ones[w][b] += int'(s[b]);
        if (s != last_val[w]) begin
          if (cycle - last_change[w] > max_static) max_static = cycle - last_change[w];
          last_change[w] = cycle;
          last_val[w] = s;
        end
      end
    end
    if (cpu_req) begin
      if (cpu_we) truth[cpu_addr] = cpu_wdata;
      else begin
        exp_valid = 1;
        exp_data  = truth[cpu_addr];
      end
    end
  end

  task automatic run_mix(input int rd, input int wr_pm, input int passes);
    int bad = 0;
    real worst = 0.0;
    rd_pct = rd; wr_permille = wr_pm;
    traffic = 1;
    @(posedge pass_done);
    @(posedge clk); #1;
    for (int w = 0; w < HALF; w++) begin
      for (int b = 0; b < 32; b++) ones[w][b] = 0;
      last_change[w] = cycle;
      last_val[w] = dut.u_sram.mem[HALF + w];
    end
    max_static = 0; meas_cycles = 0;
    measuring = 1;
    repeat (passes) @(posedge pass_done);
    @(posedge clk); #1;
    measuring = 0;
    for (int w = 0; w < HALF; w++)
      for (int b = 0; b < 32; b++) begin
        real df;
        df = real'(ones[w][b]) / real'(meas_cycles);
        if (df < 0.49 || df > 0.51) bad++;
        if ((df - 0.5) * (df - 0.5) > worst) worst = (df - 0.5) * (df - 0.5);
      end
    check(bad == 0, $sformatf("%0d static cells off a 0.5 duty factor", bad));
    check(max_static <= longint'(IV) * WORDS + 16,
          $sformatf("static stress %0d cycles, bound %0d", max_static, IV * WORDS));
    check(max_static >= longint'(IV) * WORDS - 16, "static stress reaches half a pass");
    $display("mix %0d%% reads %0d.%0d%% writes: %0d cycles, worst |duty-0.5|^2 %f, longest static %0d cycles",
             rd, wr_pm / 10, wr_pm % 10, meas_cycles, worst, max_static);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int a = 0; a < WORDS; a++) begin
      @(negedge clk);
      cpu_req = 1; cpu_we = 1; cpu_addr = 8'(a); cpu_wdata = $urandom;
    end
    @(negedge clk) cpu_req = 0;
    mit_en = 1;
    run_mix(20, 100, 4);
    run_mix(20, 12, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
