// yavadunam_square_tb: exhaustive self-check of yavadunam_square at N = 4
// (the 4-bit MACs) and N = 8 (the 8-bit MAC). Every input value is applied
// (many times over: the inner loop only repeats the check) and the
// output is compared with the square computed by the simulator's own
// arithmetic. A free-running clock paces the inputs; a watchdog ends the
// run with a failure if it has not finished after a fixed number of cycles.
module yavadunam_square_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [3:0]  a4;
  logic [7:0]  p4;
  logic [7:0]  a8;
  logic [15:0] p8;

  yavadunam_square #(.N(4)) dut4 (.a(a4), .sq(p4));
  yavadunam_square #(.N(8)) dut8 (.a(a8), .sq(p8));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog: yavadunam_square_tb did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i);
        #1;
        checks++;
        if (p4 !== 8'(i * i)) begin
          failures++;
          if (failures < 10) $display("N=4 mismatch: a=%0d got %0d", i, p4);
        end
      end
    @(posedge clk);
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i);
        #1;
        checks++;
        if (p8 !== 16'(i * i)) begin
          failures++;
          if (failures < 10) $display("N=8 mismatch: a=%0d got %0d", i, p8);
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
