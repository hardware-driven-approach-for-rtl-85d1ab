// tb_restoring_divider: self-checking test of restoring_divider.
//
// A 5-bit instance repeats the worked division 24 / 2 (quotient 01100,
// remainder 00000) and then divides every 5-bit dividend by every non-zero
// 5-bit divisor. A 16-bit instance (the default width) divides 3000 random
// pairs plus edge cases. Every result is compared with the / and %
// operators, and every operation's latency must be W clocks.
module tb_restoring_divider;

  localparam int unsigned WS = 5;
  localparam int unsigned WL = 16;

  logic clk = 1'b0;
  logic rst_n = 1'b0;

  logic          s_start = 1'b0, s_busy, s_done;
  logic [WS-1:0] s_dvd = '0, s_dvs = 1, s_quo, s_rem;
  logic          l_start = 1'b0, l_busy, l_done;
  logic [WL-1:0] l_dvd = '0, l_dvs = 1, l_quo, l_rem;

  int checks = 0;
  int failures = 0;
  int cyc = 0;

  restoring_divider #(.W(WS)) dut_s (
    .clk, .rst_n, .start(s_start), .dividend(s_dvd), .divisor(s_dvs),
    .busy(s_busy), .done(s_done), .quotient(s_quo), .remainder(s_rem)
  );

  restoring_divider dut_l (
    .clk, .rst_n, .start(l_start), .dividend(l_dvd), .divisor(l_dvs),
    .busy(l_busy), .done(l_done), .quotient(l_quo), .remainder(l_rem)
  );

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
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

  task automatic div_s(input int unsigned a, input int unsigned b);
    int t0;
    @(negedge clk);
    s_start = 1'b1;
    s_dvd = WS'(a);
    s_dvs = WS'(b);
    @(posedge clk);
    t0 = cyc;
    @(negedge clk);
    s_start = 1'b0;
    while (!s_done) @(negedge clk);
    check(s_quo == WS'(a / b) && s_rem == WS'(a % b),
          $sformatf("%0d / %0d gave q=%0d r=%0d", a, b, s_quo, s_rem));
    check(cyc - t0 - 1 == WS, $sformatf("5-bit latency %0d", cyc - t0 - 1));
  endtask

  task automatic div_l(input int unsigned a, input int unsigned b);
    int t0;
    @(negedge clk);
    l_start = 1'b1;
    l_dvd = WL'(a);
    l_dvs = WL'(b);
    @(posedge clk);
    t0 = cyc;
    @(negedge clk);
    l_start = 1'b0;
    while (!l_done) @(negedge clk);
    check(l_quo == WL'(a / b) && l_rem == WL'(a % b),
          $sformatf("%0d / %0d gave q=%0d r=%0d", a, b, l_quo, l_rem));
    check(cyc - t0 - 1 == WL, $sformatf("16-bit latency %0d", cyc - t0 - 1));
  endtask

  initial begin
    int unsigned a, b;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    div_s(24, 2);
    check(s_quo == 5'b01100 && s_rem == 5'b00000, "worked example 24 / 2");

    for (a = 0; a < 32; a++)
      for (b = 1; b < 32; b++) div_s(a, b);

    div_l(16'hffff, 1);
    div_l(16'hffff, 16'hffff);
    div_l(16'h8000, 16'h8001);
    div_l(16'hfffe, 16'h7fff);
    div_l(40320, 2);
    for (int i = 0; i < 3000; i++) begin
      a = $urandom_range(0, 16'hffff);
      b = $urandom_range(1, 16'hffff);
      if (i % 3 == 0) b = $urandom_range(1, 255);
      div_l(a, b);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
