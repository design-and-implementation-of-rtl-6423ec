// pipo_adder_tb: self-check of the accumulate adder and its PIPO register
// at the default width of 8 bits. Random addends are fed one per clock;
// a reference sum kept in a wider integer gives the expected accumulator
// (its low 8 bits) and the expected overflow flag (set from the first
// clock on which the running sum passes 255, held until reset). Runs with
// small addends check that no overflow is flagged before it is due; resets
// between runs check that both accumulator and flag clear. One clock of
// latency from addend to accumulator is checked on every cycle. A watchdog
// ends the run with a failure.
module pipo_adder_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int overflows_seen = 0;

  logic       rst;
  logic [7:0] addend, acc;
  logic       ovf;

  longint ref_sum;
  logic   ref_ovf;

  pipo_adder dut (.clk(clk), .rst(rst), .addend(addend), .acc(acc), .ovf(ovf));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog: pipo_adder_tb did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_reset();
    rst = 1'b1;
    addend = 8'hFF;
    @(negedge clk);
    rst = 1'b0;
    ref_sum = 0;
    ref_ovf = 1'b0;
    checks++;
    if (acc !== 8'd0 || ovf !== 1'b0) begin
      failures++;
      $display("reset: acc=%0d ovf=%0b", acc, ovf);
    end
  endtask

  initial begin
    for (int run = 0; run < 20; run++) begin
      do_reset();
      for (int n = 0; n < 40; n++) begin
        // even runs use small addends so overflow comes late or never
        addend = (run % 2 == 0) ? 8'($urandom_range(0, 7)) : 8'($urandom);
        ref_sum = ref_sum + addend;
        if (ref_sum > 255) ref_ovf = 1'b1;
        @(negedge clk);
        checks++;
        if (acc !== 8'(ref_sum) || ovf !== ref_ovf) begin
          failures++;
          $display("run %0d step %0d: acc=%0d ovf=%0b expected %0d %0b",
                   run, n, acc, ovf, 8'(ref_sum), ref_ovf);
        end
      end
      if (ref_ovf) overflows_seen++;
    end
    checks++;
    if (overflows_seen == 0 || overflows_seen == 20) begin
      failures++;
      $display("overflow mechanism not exercised both ways: %0d runs", overflows_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
