// Self-checking testbench for flip_control with a 16-word memory.
// The testbench plays the array and the flipping interface: it keeps the
// true data of every word and the raw stored array, grants the port only in
// cycles without a (random) CPU access, and applies CPU writes in stored
// polarity using cpu_inv. Every cycle it checks that the stored array equals
// the true data complemented over [start_idx, end_idx), that the indexes
// follow an independent model of the two-phase walk, that cpu_inv matches
// the model and that memory requests go to the model's target word.
// It drives ticks both sparsely and densely and forces CPU writes to the
// target word, and fails unless steps, completed passes, restarts and
// dropped ticks have all been seen.
module tb_flip_control;
  localparam int unsigned WORDS = 16;
  localparam int unsigned DW    = 32;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          tick = 1'b0;
  logic          mem_req, mem_we, mem_gnt;
  logic [3:0]    mem_addr;
  logic [DW-1:0] mem_wdata, mem_rdata;
  logic          cpu_req = 1'b0, cpu_we = 1'b0;
  logic [3:0]    cpu_addr = '0;
  logic          cpu_inv;
  logic [4:0]    start_idx, end_idx;
  logic          step_done, pass_done, restart, overrun;

  logic [DW-1:0] truth [WORDS];
  logic [DW-1:0] raw   [WORDS];
  int            m_start = 0, m_end = 0;
  int            checks = 0, failures = 0;
  int            n_step = 0, n_pass = 0, n_restart = 0, n_overrun = 0, n_wait = 0;
  int            cpu_pct = 30, tick_pct = 2, hit_pct = 0;

  flip_control #(.WORDS(WORDS), .DATA_W(DW)) dut (
    .clk, .rst_n, .tick, .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_gnt,
    .mem_rdata, .cpu_req, .cpu_we, .cpu_addr, .cpu_inv,
    .start_idx, .end_idx, .step_done, .pass_done, .restart, .overrun
  );

  always #5 clk = ~clk;
  assign mem_gnt = !cpu_req;

  function automatic bit inv_of(int a);
    return a >= m_start && a < m_end;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Stimulus is changed at the falling edge; checks and the memory model
  // act at the rising edge, before the design updates.
  always @(negedge clk) if (rst_n) begin
    int tgt;
    tgt = (m_end != WORDS) ? m_end : m_start;
    tick    <= ($urandom % 100) < tick_pct;
    cpu_req <= ($urandom % 100) < cpu_pct;
    cpu_we  <= $urandom % 2;
    cpu_addr <= (($urandom % 100) < hit_pct) ? 4'(tgt) : 4'($urandom);
  end

  always @(posedge clk) if (rst_n) begin
    int tgt;
    logic [DW-1:0] wd;
    tgt = (m_end != WORDS) ? m_end : m_start;
    // state checks
    check(start_idx == 5'(m_start) && end_idx == 5'(m_end),
          $sformatf("indexes %0d/%0d model %0d/%0d", start_idx, end_idx, m_start, m_end));
    check(cpu_inv == inv_of(int'(cpu_addr)), "cpu_inv");
    for (int a = 0; a < WORDS; a++)
      check(raw[a] == (truth[a] ^ {DW{inv_of(a)}}), $sformatf("stored word %0d", a));
    if (mem_req) check(int'(mem_addr) == tgt, "request to target word");
    if (mem_req && !mem_gnt) n_wait++;
    if (restart) n_restart++;
    if (overrun) n_overrun++;
    // memory model
    if (cpu_req) begin
      if (cpu_we) begin
        wd = $urandom;
        truth[cpu_addr] = wd;
        raw[cpu_addr]   = wd ^ {DW{inv_of(int'(cpu_addr))}};
      end
      mem_rdata <= raw[cpu_addr];
    end else if (mem_req) begin
      if (mem_we) raw[mem_addr] = mem_wdata;
      else        mem_rdata <= raw[mem_addr];
    end
    // index model
    if (step_done) begin
      n_step++;
      check(mem_we && mem_gnt, "step only on a granted write");
      if (m_end != WORDS) m_end++;
      else if (m_start == WORDS - 1) begin
        m_start = 0; m_end = 0; n_pass++;
        check(pass_done, "pass_done at wrap");
      end else m_start++;
    end else check(!pass_done, "no stray pass_done");
  end

  initial begin
    for (int a = 0; a < WORDS; a++) begin
      truth[a] = $urandom;
      raw[a]   = truth[a];
    end
    mem_rdata = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // sparse ticks, moderate CPU traffic: several passes
    repeat (30000) @(posedge clk);
    // CPU writes aimed at the target word: restarts
    hit_pct = 40; cpu_pct = 40;
    repeat (20000) @(posedge clk);
    // dense ticks under heavy traffic: dropped ticks
    hit_pct = 0; tick_pct = 60; cpu_pct = 70;
    repeat (5000) @(posedge clk);
    tick_pct = 0; cpu_pct = 0;
    repeat (20) @(posedge clk);
    check(n_step > 0,    "steps happened");
    check(n_pass > 0,    "full passes happened");
    check(n_restart > 0, "restarts happened");
    check(n_overrun > 0, "dropped ticks happened");
    check(n_wait > 0,    "flip waited for the CPU");
    $display("steps=%0d passes=%0d restarts=%0d overruns=%0d waits=%0d",
             n_step, n_pass, n_restart, n_overrun, n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
