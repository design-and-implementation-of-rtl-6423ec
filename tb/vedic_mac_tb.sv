// vedic_mac_tb: self-check of the multiply-accumulate unit in all four
// configurations of the design: N = 4 with the Urdhva, Nikhilam and
// Yavadunam multipliers, and N = 8 with Urdhva. All four get random
// operands every clock and are compared with a reference running sum of
// a*b (a*a for Yavadunam) kept in a wide integer: accumulator = low 2N
// bits, overflow = the sum has passed 2^(2N) - 1 since the last reset.
// The timing is checked explicitly: after reset one operand pair is
// presented, the accumulators must still read 0 just before the next
// rising edge and must hold exactly that one product just after it
// (one MAC per clock, one clock of latency). Runs alternate between small
// operands (no overflow) and full-range ones (overflow), with a reset
// between runs. A watchdog ends the run with a failure.
module vedic_mac_tb;
  import vedic_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic        rst;
  logic [3:0]  a4, b4, a4n, b4n, a4y;
  logic [7:0]  a8, b8;
  logic [7:0]  acc_u4, acc_n4, acc_y4;
  logic [15:0] acc_u8;
  logic        ovf_u4, ovf_n4, ovf_y4, ovf_u8;

  longint sum_u4, sum_n4, sum_y4, sum_u8;
  int     ovf_runs;

  vedic_mac #(.N(4), .SUTRA(URDHVA))    dut_u4 (.clk, .rst, .a(a4),  .b(b4),  .acc(acc_u4), .ovf(ovf_u4));
  vedic_mac #(.N(4), .SUTRA(NIKHILAM))  dut_n4 (.clk, .rst, .a(a4n), .b(b4n), .acc(acc_n4), .ovf(ovf_n4));
  vedic_mac #(.N(4), .SUTRA(YAVADUNAM)) dut_y4 (.clk, .rst, .a(a4y), .b(4'd0), .acc(acc_y4), .ovf(ovf_y4));
  vedic_mac #(.N(8), .SUTRA(URDHVA))    dut_u8 (.clk, .rst, .a(a8),  .b(b8),  .acc(acc_u8), .ovf(ovf_u8));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog: vedic_mac_tb did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_state(input string what);
    checks += 4;
    if (acc_u4 !== 8'(sum_u4) || ovf_u4 !== (sum_u4 > 255)) begin
      failures++; $display("%s u4: acc=%0d ovf=%0b sum=%0d", what, acc_u4, ovf_u4, sum_u4);
    end
    if (acc_n4 !== 8'(sum_n4) || ovf_n4 !== (sum_n4 > 255)) begin
      failures++; $display("%s n4: acc=%0d ovf=%0b sum=%0d", what, acc_n4, ovf_n4, sum_n4);
    end
    if (acc_y4 !== 8'(sum_y4) || ovf_y4 !== (sum_y4 > 255)) begin
      failures++; $display("%s y4: acc=%0d ovf=%0b sum=%0d", what, acc_y4, ovf_y4, sum_y4);
    end
    if (acc_u8 !== 16'(sum_u8) || ovf_u8 !== (sum_u8 > 65535)) begin
      failures++; $display("%s u8: acc=%0d ovf=%0b sum=%0d", what, acc_u8, ovf_u8, sum_u8);
    end
  endtask

  task automatic zero_operands();
    a4 = '0; b4 = '0; a4n = '0; b4n = '0; a4y = '0; a8 = '0; b8 = '0;
  endtask

  task automatic do_reset();
    rst = 1'b1;
    a4 = 4'hF; b4 = 4'hF; a4n = 4'hF; b4n = 4'hF; a4y = 4'hF; a8 = 8'hFF; b8 = 8'hFF;
    @(negedge clk);
    rst = 1'b0;
    sum_u4 = 0; sum_n4 = 0; sum_y4 = 0; sum_u8 = 0;
    expect_state("reset");
  endtask

  initial begin
    ovf_runs = 0;
    // latency: one pair in, nothing before the edge, exactly it after
    do_reset();
    zero_operands();
    a4 = 4'd13; b4 = 4'd11; a4n = 4'd6; b4n = 4'd9; a4y = 4'd14; a8 = 8'd201; b8 = 8'd77;
    @(posedge clk);
    #1;
    a4 = '0; a4n = '0; a4y = '0; a8 = '0;
    sum_u4 = 13 * 11; sum_n4 = 6 * 9; sum_y4 = 14 * 14; sum_u8 = 201 * 77;
    expect_state("one clock after first operands");
    @(negedge clk);
    expect_state("zero operands hold the sum");

    for (int run = 0; run < 30; run++) begin
      do_reset();
      for (int n = 0; n < 24; n++) begin
        if (run % 2 == 0) begin
          a4 = 4'($urandom_range(0, 3)); b4 = 4'($urandom_range(0, 3));
          a4n = 4'($urandom_range(0, 3)); b4n = 4'($urandom_range(0, 3));
          a4y = 4'($urandom_range(0, 3));
          a8 = 8'($urandom_range(0, 40)); b8 = 8'($urandom_range(0, 40));
        end else begin
          a4 = 4'($urandom); b4 = 4'($urandom); a4n = 4'($urandom); b4n = 4'($urandom);
          a4y = 4'($urandom); a8 = 8'($urandom); b8 = 8'($urandom);
        end
        sum_u4 += a4 * b4;
        sum_n4 += a4n * b4n;
        sum_y4 += a4y * a4y;
        sum_u8 += a8 * b8;
        @(negedge clk);
        expect_state($sformatf("run %0d step %0d", run, n));
      end
      if (ovf_u4 && ovf_n4 && ovf_y4 && ovf_u8) ovf_runs++;
    end
    checks++;
    if (ovf_runs == 0) begin
      failures++;
      $display("overflow never reached in all four units");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
