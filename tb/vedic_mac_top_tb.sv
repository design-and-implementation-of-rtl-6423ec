// vedic_mac_top_tb: end-to-end test of the four MAC units of the top at
// their default sizes, running the kind of equations the MAC is meant for:
// equations made only of products and squares.
//
//   Pythagoras  B^2 + P^2 = H^2 : B^2 and P^2 are summed on the Yavadunam
//               MAC (one square per clock) and H*H is formed on the 4-bit
//               Urdhva MAC; both must match each other and the reference.
//               Larger triples run on the 8-bit Urdhva MAC (B*B + P*P).
//   Circle      x^2 + y^2 vs r^2 : random points are classified as inside,
//               on or outside the circle from the two accumulators.
//   Ellipse     (x/a)^2 + (y/b)^2 = 1, cleared of division as
//               x^2*b^2 + y^2*a^2 = a^2*b^2 : the four squares come from the
//               Yavadunam MAC, their products are accumulated on the 8-bit
//               Urdhva MAC.
//   Dot product random vectors on the Nikhilam and both Urdhva MACs,
//               long enough to overflow, against a reference sum.
//
// Every result is also checked against the simulator's own arithmetic. The
// mechanisms of the design are counted and each must occur at least once:
// multi-cycle accumulation, reset clearing a non-zero accumulator, the
// overflow flag being set in each unit, the Nikhilam cross difference both
// negative (a + b < 16) and non-negative, and the zero-operand path of the
// Nikhilam and Yavadunam units. A watchdog ends the run with a failure.
module vedic_mac_top_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic        rst;
  logic [3:0]  u4_a, u4_b, n4_a, n4_b, y4_a;
  logic [7:0]  u8_a, u8_b;
  logic [7:0]  u4_acc, n4_acc, y4_acc;
  logic [15:0] u8_acc;
  logic        u4_ovf, n4_ovf, y4_ovf, u8_ovf;

  // mechanism counters
  int n_accum, n_reset_clear, n_ovf_u4, n_ovf_n4, n_ovf_y4, n_ovf_u8;
  int n_nik_neg, n_nik_pos, n_zero_path;
  int n_pyth, n_circle, n_ellipse, n_dot;

  vedic_mac_top dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog: vedic_mac_top_tb did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic idle_inputs();
    u4_a = '0; u4_b = '0; n4_a = '0; n4_b = '0; y4_a = '0; u8_a = '0; u8_b = '0;
  endtask

  task automatic reset_all();
    bit was_nonzero;
    was_nonzero = (u4_acc | n4_acc | y4_acc) != 0 || u8_acc != 0;
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    check(u4_acc == 0 && n4_acc == 0 && y4_acc == 0 && u8_acc == 0 &&
          !u4_ovf && !n4_ovf && !y4_ovf && !u8_ovf, "reset clears all units");
    if (was_nonzero) n_reset_clear++;
  endtask

  // one clock of the Yavadunam MAC: acc += a^2
  task automatic y4_step(input int a);
    y4_a = 4'(a);
    if (a == 0) n_zero_path++;
    @(negedge clk);
    y4_a = '0;
  endtask

  // square of a 4-bit value on the Yavadunam MAC, from a cleared state
  task automatic y4_square(input int a, output int sq);
    reset_all();
    y4_step(a);
    sq = y4_acc;
    check(sq == a * a, $sformatf("Yavadunam %0d^2 = %0d", a, sq));
  endtask

  task automatic pythagoras4(input int b, input int p, input int h);
    reset_all();
    y4_step(b);
    y4_step(p);
    n_accum++;
    u4_a = 4'(h); u4_b = 4'(h);
    @(negedge clk);
    idle_inputs();
    check(y4_acc == b * b + p * p, $sformatf("B^2+P^2 for %0d,%0d", b, p));
    check(u4_acc == h * h, $sformatf("H^2 for %0d", h));
    check(y4_acc == u4_acc && !y4_ovf && !u4_ovf, $sformatf("triple %0d,%0d,%0d holds", b, p, h));
    n_pyth++;
  endtask

  task automatic pythagoras8(input int b, input int p, input int h);
    int lhs;
    reset_all();
    u8_a = 8'(b); u8_b = 8'(b);
    @(negedge clk);
    u8_a = 8'(p); u8_b = 8'(p);
    @(negedge clk);
    n_accum++;
    idle_inputs();
    lhs = u8_acc;
    reset_all();
    u8_a = 8'(h); u8_b = 8'(h);
    @(negedge clk);
    idle_inputs();
    check(lhs == b * b + p * p && u8_acc == h * h && lhs == u8_acc,
          $sformatf("8-bit triple %0d,%0d,%0d: %0d vs %0d", b, p, h, lhs, u8_acc));
    n_pyth++;
  endtask

  // circle: classify (x, y) against radius r, all on the 4-bit MACs
  task automatic circle4(input int x, input int y, input int r);
    int lhs, rhs, want, got;
    reset_all();
    y4_step(x);
    y4_step(y);
    u4_a = 4'(r); u4_b = 4'(r);
    @(negedge clk);
    idle_inputs();
    lhs = y4_ovf ? 256 + y4_acc : y4_acc;   // at most 450: one wrap
    rhs = u4_acc;
    want = (x * x + y * y < r * r) ? -1 : (x * x + y * y == r * r) ? 0 : 1;
    got  = (lhs < rhs) ? -1 : (lhs == rhs) ? 0 : 1;
    check(got == want, $sformatf("circle point (%0d,%0d) r=%0d", x, y, r));
    if (y4_ovf) n_ovf_y4++;
    n_circle++;
  endtask

  // ellipse: x^2*b^2 + y^2*a^2 == a^2*b^2
  task automatic ellipse(input int x, input int y, input int a, input int b, input bit on_curve);
    int x2, y2, a2, b2, lhs;
    y4_square(x, x2);
    y4_square(y, y2);
    y4_square(a, a2);
    y4_square(b, b2);
    reset_all();
    u8_a = 8'(x2); u8_b = 8'(b2);
    @(negedge clk);
    u8_a = 8'(y2); u8_b = 8'(a2);
    @(negedge clk);
    n_accum++;
    idle_inputs();
    lhs = u8_acc;
    reset_all();
    u8_a = 8'(a2); u8_b = 8'(b2);
    @(negedge clk);
    idle_inputs();
    check(lhs == x * x * b * b + y * y * a * a, $sformatf("ellipse lhs (%0d,%0d)", x, y));
    check((lhs == u8_acc) == on_curve,
          $sformatf("ellipse point (%0d,%0d) a=%0d b=%0d on=%0b", x, y, a, b, on_curve));
    n_ellipse++;
  endtask

  task automatic dot_products(input int len);
    longint su4, sn4, su8;
    reset_all();
    su4 = 0; sn4 = 0; su8 = 0;
    for (int i = 0; i < len; i++) begin
      u4_a = 4'($urandom); u4_b = 4'($urandom);
      n4_a = 4'($urandom); n4_b = 4'($urandom);
      if (i % 7 == 3) n4_b = '0;
      u8_a = 8'($urandom); u8_b = 8'($urandom);
      if (n4_a == 0 || n4_b == 0) n_zero_path++;
      else if (n4_a + n4_b < 16) n_nik_neg++;
      else n_nik_pos++;
      su4 += u4_a * u4_b; sn4 += n4_a * n4_b; su8 += u8_a * u8_b;
      @(negedge clk);
      check(u4_acc == 8'(su4) && u4_ovf == (su4 > 255), "u4 dot product");
      check(n4_acc == 8'(sn4) && n4_ovf == (sn4 > 255), "n4 dot product");
      check(u8_acc == 16'(su8) && u8_ovf == (su8 > 65535), "u8 dot product");
    end
    idle_inputs();
    if (len > 1) n_accum++;
    if (u4_ovf) n_ovf_u4++;
    if (n4_ovf) n_ovf_n4++;
    if (u8_ovf) n_ovf_u8++;
    n_dot++;
  endtask

  initial begin
    idle_inputs();
    rst = 1'b1;
    @(negedge clk);
    reset_all();

    // Pythagoras on the 4-bit units, then larger triples on the 8-bit unit
    pythagoras4(3, 4, 5);
    pythagoras4(6, 8, 10);
    pythagoras4(5, 12, 13);
    pythagoras4(9, 12, 15);
    pythagoras4(0, 7, 7);
    pythagoras8(20, 21, 29);
    pythagoras8(65, 72, 97);
    pythagoras8(119, 120, 169);

    // circle: points on, inside and outside, including sums past 255
    circle4(3, 4, 5);
    circle4(2, 3, 5);
    circle4(5, 5, 7);
    circle4(15, 15, 15);
    for (int i = 0; i < 40; i++)
      circle4($urandom_range(0, 15), $urandom_range(0, 15), $urandom_range(1, 15));

    // ellipse: points on and off the curve
    ellipse(6, 12, 10, 15, 1'b1);   // (0.6)^2 + (0.8)^2 = 1
    ellipse(10, 0, 10, 7, 1'b1);
    ellipse(0, 7, 10, 7, 1'b1);
    ellipse(5, 5, 10, 7, 1'b0);

    // dot products long enough to overflow every accumulator
    dot_products(3);
    dot_products(60);

    // each mechanism must have happened
    check(n_accum > 0, "multi-cycle accumulation exercised");
    check(n_reset_clear > 0, "reset of a non-zero accumulator exercised");
    check(n_ovf_u4 > 0, "4-bit Urdhva overflow exercised");
    check(n_ovf_n4 > 0, "4-bit Nikhilam overflow exercised");
    check(n_ovf_y4 > 0, "4-bit Yavadunam overflow exercised");
    check(n_ovf_u8 > 0, "8-bit Urdhva overflow exercised");
    check(n_nik_neg > 0, "Nikhilam negative cross difference exercised");
    check(n_nik_pos > 0, "Nikhilam non-negative cross difference exercised");
    check(n_zero_path > 0, "zero-operand path exercised");
    $display("mechanisms: accum=%0d reset_clear=%0d ovf u4=%0d n4=%0d y4=%0d u8=%0d nik_neg=%0d nik_pos=%0d zero=%0d",
             n_accum, n_reset_clear, n_ovf_u4, n_ovf_n4, n_ovf_y4, n_ovf_u8, n_nik_neg, n_nik_pos, n_zero_path);
    $display("workloads: pythagoras=%0d circle=%0d ellipse=%0d dot=%0d", n_pyth, n_circle, n_ellipse, n_dot);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
