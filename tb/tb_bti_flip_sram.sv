// End-to-end testbench for bti_flip_sram with a 64-word memory.
// The memory is first filled through the CPU port, then the mitigation runs
// under random CPU traffic (byte-masked writes and reads) at several flip
// intervals. A reference array holds the true data: every CPU read must
// return it one cycle after the request, and in every cycle the stored
// array must equal it complemented over [start_idx, end_idx). A quiet phase
// checks the rate: with no CPU traffic one word is flipped every interval
// cycles and a full pass (every word inverted and restored) takes
// 2 x WORDS x interval cycles. The test fails unless every mechanism has
// occurred: word flips, complete passes, flips waiting for the CPU,
// restarts after a CPU write to the word being flipped, dropped ticks,
// and CPU reads and writes of words stored inverted.
module tb_bti_flip_sram;
  localparam int unsigned WORDS = 64;
  localparam int unsigned DW    = 32;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          mit_en = 1'b0;
  logic [15:0]   cfg_interval = 16'd3;
  logic          cpu_req = 1'b0, cpu_we = 1'b0;
  logic [5:0]    cpu_addr = '0;
  logic [3:0]    cpu_be = '0;
  logic [DW-1:0] cpu_wdata = '0, cpu_rdata;
  logic          cpu_rvalid;
  logic [6:0]    start_idx, end_idx;
  logic          step_done, pass_done, restart, overrun;

  logic [DW-1:0] truth [WORDS];
  int            checks = 0, failures = 0, cycle = 0;
  int            n_step = 0, n_pass = 0, n_restart = 0, n_overrun = 0;
  int            n_wait = 0, n_inv_rd = 0, n_inv_wr = 0;
  int            cpu_pct = 0, hit_pct = 0;
  bit            traffic = 0;
  bit            exp_valid = 0;
  logic [DW-1:0] exp_data;

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

  function automatic bit inv_of(int a);
    return a >= int'(start_idx) && a < int'(end_idx);
  endfunction

  initial begin : watchdog
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // random traffic, applied at the falling edge
  always @(negedge clk) if (traffic) begin
    int tgt;
    tgt = (end_idx != 7'(WORDS)) ? int'(end_idx) : int'(start_idx);
    cpu_req   <= ($urandom % 100) < cpu_pct;
    cpu_we    <= $urandom % 2;
    cpu_addr  <= (($urandom % 100) < hit_pct) ? 6'(tgt) : 6'($urandom);
    cpu_be    <= ($urandom % 2) ? 4'hF : 4'($urandom);
    cpu_wdata <= $urandom;
  end

  // checks and reference model at the rising edge
  always @(posedge clk) if (rst_n) begin
    cycle++;
    check(cpu_rvalid == exp_valid, "rvalid one cycle after each read");
    if (exp_valid) check(cpu_rdata == exp_data, $sformatf("read data %h expected %h", cpu_rdata, exp_data));
    exp_valid = 0;
    if (mit_en || start_idx != 0 || end_idx != 0)
      for (int a = 0; a < WORDS; a++)
        check(dut.u_sram.mem[a] == (truth[a] ^ {DW{inv_of(a)}}), $sformatf("stored word %0d", a));
    if (step_done) n_step++;
    if (pass_done) n_pass++;
    if (restart)   n_restart++;
    if (overrun)   n_overrun++;
    if (dut.flip_req && !dut.flip_gnt) n_wait++;
    if (cpu_req) begin
      if (inv_of(int'(cpu_addr))) begin
        if (cpu_we) n_inv_wr++; else n_inv_rd++;
      end
      if (cpu_we) begin
        for (int b = 0; b < 4; b++)
          if (cpu_be[b]) truth[cpu_addr][b*8 +: 8] = cpu_wdata[b*8 +: 8];
      end else begin
        exp_valid = 1;
        exp_data  = truth[cpu_addr];
      end
    end
  end

  initial begin
    int t0, t1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // fill the memory
    for (int a = 0; a < WORDS; a++) begin
      @(negedge clk);
      cpu_req = 1; cpu_we = 1; cpu_addr = 6'(a); cpu_be = 4'hF; cpu_wdata = $urandom;
    end
    @(negedge clk) cpu_req = 0;
    // quiet phase: rate check, interval 5
    cfg_interval = 16'd5;
    mit_en = 1;
    @(posedge pass_done);
    t0 = cycle;
    @(posedge pass_done);
    t1 = cycle;
    checks++;
    if (t1 - t0 != 2 * WORDS * 5) begin
      failures++;
      $display("FAIL pass length %0d cycles, expected %0d", t1 - t0, 2 * WORDS * 5);
    end
    // random traffic at interval 3
    cfg_interval = 16'd3;
    cpu_pct = 40;
    traffic = 1;
    repeat (40000) @(posedge clk);
    // writes aimed at the word being flipped
    hit_pct = 50;
    repeat (20000) @(posedge clk);
    // interval 1 under heavy traffic: ticks are dropped
    hit_pct = 0; cpu_pct = 80; cfg_interval = 16'd1;
    repeat (5000) @(posedge clk);
    traffic = 0;
    @(negedge clk) cpu_req = 0;
    repeat (10) @(posedge clk);
    // read back every word
    for (int a = 0; a < WORDS; a++) begin
      @(negedge clk);
      cpu_req = 1; cpu_we = 0; cpu_addr = 6'(a);
    end
    @(negedge clk) cpu_req = 0;
    repeat (3) @(posedge clk);
    check(n_step > 0,    "word flips happened");
    check(n_pass > 2,    "complete passes happened");
    check(n_wait > 0,    "flips waited for the CPU");
    check(n_restart > 0, "restarts happened");
    check(n_overrun > 0, "dropped ticks happened");
    check(n_inv_rd > 0,  "reads of inverted words happened");
    check(n_inv_wr > 0,  "writes of inverted words happened");
    $display("steps=%0d passes=%0d waits=%0d restarts=%0d overruns=%0d inv_reads=%0d inv_writes=%0d",
             n_step, n_pass, n_wait, n_restart, n_overrun, n_inv_rd, n_inv_wr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
