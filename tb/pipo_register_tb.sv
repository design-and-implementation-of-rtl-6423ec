// pipo_register_tb: self-check of the parallel-in parallel-out register
// at its default width of 8 bits. Random words are loaded on successive
// clocks; after each edge q must equal the word presented before it (one
// clock of delay, all bits together). Synchronous reset is applied at the
// start and again in mid-run, and must clear q on the next edge even while
// data is presented. A watchdog ends the run with a failure.
module pipo_register_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic       rst;
  logic [7:0] d, q, expected;

  pipo_register dut (.clk(clk), .rst(rst), .d(d), .q(q));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog: pipo_register_tb did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [7:0] want, input string what);
    checks++;
    if (q !== want) begin
      failures++;
      $display("%s: q=%02h expected %02h", what, q, want);
    end
  endtask

  initial begin
    rst = 1'b1;
    d   = 8'hA5;
    @(negedge clk);
    check(8'h00, "reset");
    rst = 1'b0;
    for (int n = 0; n < 500; n++) begin
      expected = 8'($urandom);
      d = expected;
      if (n == 250) rst = 1'b1;
      @(negedge clk);
      check(rst ? 8'h00 : expected, rst ? "mid-run reset" : "load");
      rst = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
