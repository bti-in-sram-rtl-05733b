// Self-checking testbench for sram_array at its default size (8192 x 32).
// Fills a window of words with full-word writes, then runs random byte-
// masked writes and reads against a reference array kept in the testbench.
// Checks that read data appears exactly one cycle after the request and
// holds while no further read is issued, and that writes with partial byte
// enables change only the enabled bytes. Words at both ends of the address
// range are exercised.
module tb_sram_array;
  localparam int unsigned WORDS = 8192;
  localparam int unsigned DW    = 32;

  logic          clk = 1'b0;
  logic          en, we;
  logic [12:0]   addr;
  logic [3:0]    be;
  logic [DW-1:0] wdata, rdata;
  int            checks = 0, failures = 0;
  logic [DW-1:0] model [WORDS];
  bit            written [WORDS];

  sram_array dut (.clk, .en, .we, .addr, .be, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [DW-1:0] got, input logic [DW-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic do_write(input int a, input logic [3:0] b, input logic [DW-1:0] d);
    @(negedge clk);
    en = 1; we = 1; addr = 13'(a); be = b; wdata = d;
    for (int i = 0; i < 4; i++) if (b[i]) model[a][i*8 +: 8] = d[i*8 +: 8];
    written[a] = 1;
    @(negedge clk);
    en = 0; we = 0;
  endtask

  task automatic do_read(input int a);
    @(negedge clk);
    en = 1; we = 0; addr = 13'(a);
    @(negedge clk);          // one cycle after the request
    en = 0;
    check(rdata, model[a], $sformatf("read addr %0d", a));
    @(negedge clk);          // data must hold without a new read
    check(rdata, model[a], $sformatf("hold addr %0d", a));
  endtask

  initial begin
    en = 0; we = 0; addr = '0; be = '0; wdata = '0;
    for (int i = 0; i < 64; i++) do_write(i, 4'hF, $urandom);
    for (int i = WORDS - 64; i < WORDS; i++) do_write(i, 4'hF, $urandom);
    for (int n = 0; n < 3000; n++) begin
      int a;
      a = ($urandom % 2) ? int'($urandom % 64) : int'(WORDS - 64 + $urandom % 64);
      if ($urandom % 2) do_write(a, 4'($urandom), $urandom);
      else              do_read(a);
    end
    for (int i = 0; i < 64; i++) do_read(i);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
