// tb_factorial_unit: self-checking test of factorial_unit at its default
// width (W = 16).
//
// For n = 0..8 it checks the product against a reference computed in the
// testbench, the latency (n-1)*(W+1) clocks for n >= 2, and that overflow
// stays low. For n = 8 it also checks the intermediate products at the end
// of the first two passes: 8*7 = 56 (0111000) and 56*6 = 336 (101010000).
// For n = 9, 10 and 12 it checks that overflow is raised. A start while
// busy must be ignored.
module tb_factorial_unit;

  localparam int unsigned W = 16;

  logic           clk = 1'b0;
  logic           rst_n = 1'b0;
  logic           start = 1'b0;
  logic [W-1:0]   n = '0;
  logic           busy, done, overflow;
  logic [2*W-1:0] product;

  int checks = 0;
  int failures = 0;
  int cyc = 0;

  factorial_unit dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
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

  function automatic longint unsigned ref_fact(input int k);
    longint unsigned p = 1;
    for (int i = 2; i <= k; i++) p *= longint'(i);
    return p;
  endfunction

  // Starts n!, waits for done, checks product, overflow and latency.
  task automatic run(input int k, input bit expect_ovf);
    int t0, lat, exp_lat;
    longint unsigned exp_p;
    @(negedge clk);
    start = 1'b1;
    n = W'(k);
    @(posedge clk);
    t0 = cyc;
    @(negedge clk);
    start = 1'b0;
    // A second start while busy must be ignored.
    if (busy) begin
      start = 1'b1;
      n = W'(3);
      @(negedge clk);
      start = 1'b0;
    end
    while (!done) @(negedge clk);
    lat = cyc - t0 - 1;
    exp_lat = (k >= 2) ? (k - 1) * (W + 1) : 0;
    exp_p = ref_fact(k);
    if (!expect_ovf) begin
      check(product == (2*W)'(exp_p),
            $sformatf("%0d! = %0d, expected %0d", k, product, exp_p));
      check(!overflow, $sformatf("%0d! overflow raised", k));
    end else begin
      check(overflow, $sformatf("%0d! overflow not raised", k));
    end
    check(lat == exp_lat,
          $sformatf("%0d! latency %0d, expected %0d", k, lat, exp_lat));
    @(negedge clk);
    check(!done, "done longer than one cycle");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    check(!busy && !done, "idle after reset");

    // Worked example: the first two passes of 8!.
    @(negedge clk);
    start = 1'b1;
    n = W'(8);
    @(negedge clk);
    start = 1'b0;
    repeat (W) @(negedge clk);         // end of pass 1 (multiplier 7)
    check(product == 56, $sformatf("pass 1 product %0d, expected 56", product));
    repeat (W + 1) @(negedge clk);     // end of pass 2 (multiplier 6)
    check(product == 336, $sformatf("pass 2 product %0d, expected 336", product));
    while (!done) @(negedge clk);
    check(product == 40320, $sformatf("8! = %0d", product));

    for (int k = 0; k <= 8; k++) run(k, 1'b0);
    run(9, 1'b1);
    run(10, 1'b1);
    run(12, 1'b1);
    // Overflow is cleared by the next operation.
    run(5, 1'b0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
