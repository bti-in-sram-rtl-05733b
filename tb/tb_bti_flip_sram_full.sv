// Full-size testbench for bti_flip_sram at its default parameters (8192
// words of 32 bits), with the flip interval set to 255 cycles, the fastest
// evaluated setting. The memory is filled through the CPU port, then one
// complete pass of the mitigation runs: every word is inverted and
// restored once. Checks: the time word 0 stays inverted is
// 8192 x 255 = 2,088,960 cycles (the static-stress bound of the scheme at
// this interval), a pass takes 2 x 8192 x 255 cycles, the stored array is
// fully inverted halfway and back to true data at the end, and CPU reads
// at sampled moments during the pass return true data.
module tb_bti_flip_sram_full;
  localparam int unsigned WORDS = 8192;
  localparam int unsigned IV    = 255;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        mit_en = 1'b0;
  logic [15:0] cfg_interval = 16'(IV);
  logic        cpu_req = 1'b0, cpu_we = 1'b0;
  logic [12:0] cpu_addr = '0;
  logic [3:0]  cpu_be = 4'hF;
  logic [31:0] cpu_wdata = '0, cpu_rdata;
  logic        cpu_rvalid;
  logic [13:0] start_idx, end_idx;
  logic        step_done, pass_done, restart, overrun;

  int          checks = 0, failures = 0;
  longint      cycle = 0;
  longint      t_inv, t_rest, t_start;
  int          n_reads = 0;

  bti_flip_sram dut (
    .clk, .rst_n, .mit_en, .cfg_interval, .cpu_req, .cpu_we, .cpu_addr,
    .cpu_be, .cpu_wdata, .cpu_rdata, .cpu_rvalid, .start_idx, .end_idx,
    .step_done, .pass_done, .restart, .overrun
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  // Reference content: word a holds pattern(a).
  function automatic logic [31:0] pattern(int a);
    return 32'(a) * 32'h9E37_79B1 ^ 32'h5A5A_0000;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d: %s", cycle, what);
    end
  endtask

  initial begin : watchdog
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cpu_read_check(input int a);
    @(negedge clk);
    cpu_req = 1; cpu_we = 0; cpu_addr = 13'(a);
    @(negedge clk);
    cpu_req = 0;
    check(cpu_rvalid && cpu_rdata == pattern(a), $sformatf("read word %0d", a));
    n_reads++;
  endtask

  task automatic check_array(input bit inverted);
    int bad = 0;
    for (int a = 0; a < WORDS; a++)
      if (dut.u_sram.mem[a] != (pattern(a) ^ {32{inverted}})) bad++;
    check(bad == 0, $sformatf("%0d stored words wrong (inverted=%0d)", bad, inverted));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int a = 0; a < WORDS; a++) begin
      @(negedge clk);
      cpu_req = 1; cpu_we = 1; cpu_addr = 13'(a); cpu_wdata = pattern(a);
    end
    @(negedge clk) cpu_req = 0;
    check_array(0);
    mit_en = 1;
    t_start = cycle;
    // word 0 becomes inverted
    wait (end_idx == 14'd1);
    t_inv = cycle;
    // sample reads in the first half
    for (int k = 0; k < 16; k++) begin
      repeat (60000) @(posedge clk);
      cpu_read_check(int'($urandom % WORDS));
    end
    wait (end_idx == 14'(WORDS));
    @(posedge clk);
    #1;
    check_array(1);
    wait (start_idx == 14'd1);
    t_rest = cycle;
    check(t_rest - t_inv == longint'(WORDS) * IV,
          $sformatf("word 0 inverted for %0d cycles, expected %0d", t_rest - t_inv, WORDS * IV));
    for (int k = 0; k < 16; k++) begin
      repeat (60000) @(posedge clk);
      cpu_read_check(int'($urandom % WORDS));
    end
    @(posedge pass_done);
    @(posedge clk);
    #1;
    check(cycle - t_start >= 2 * longint'(WORDS) * IV &&
          cycle - t_start <= 2 * longint'(WORDS) * IV + 10,
          $sformatf("pass took %0d cycles, expected %0d", cycle - t_start, 2 * WORDS * IV));
    check(start_idx == 0 && end_idx == 0, "indexes back to 0");
    mit_en = 0;
    check_array(0);
    for (int k = 0; k < 64; k++) cpu_read_check(int'($urandom % WORDS));
    $display("pass cycles=%0d reads=%0d", cycle - t_start, n_reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
