// Self-checking testbench for flip_counter. For several intervals, among
// them the evaluated 255 and 2047, it measures the number of cycles between
// successive ticks and checks that it equals the interval, that the first
// tick after enabling comes `interval` cycles later, and that no tick is
// produced while disabled or with interval 0.
module tb_flip_counter;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        en = 1'b0;
  logic [15:0] interval = '0;
  logic        tick;
  int          checks = 0, failures = 0;
  int          cycle = 0;

  flip_counter dut (.clk, .rst_n, .en, .interval, .tick);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic measure(input int iv);
    int t_en, t_prev, n;
    @(negedge clk);
    en = 0;
    interval = 16'(iv);
    @(negedge clk);
    en = 1;
    t_en = cycle;
    n = 0;
    t_prev = t_en;
    while (n < 5) begin
      @(posedge clk);
      #1;
      if (tick) begin
        expect_eq(cycle - t_prev, iv, $sformatf("tick spacing interval %0d", iv));
        t_prev = cycle;
        n++;
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // disabled: no ticks
    interval = 16'd4;
    repeat (50) begin
      @(posedge clk); #1;
      expect_eq(int'(tick), 0, "no tick while disabled");
    end
    measure(1);
    measure(2);
    measure(7);
    measure(255);
    measure(2047);
    // interval 0 stops the counter
    @(negedge clk) interval = '0;
    repeat (3) @(posedge clk);
    repeat (300) begin
      @(posedge clk); #1;
      expect_eq(int'(tick), 0, "no tick with interval 0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
