// tb_permutation_unit: self-checking test of permutation_unit at the
// default width (W = 16).
//
// Runs the worked example 4P2 = 12, then every n = 0..8 with every
// r = 0..n, comparing with n!/(n-r)! computed in the testbench and checking
// the latency max(Tf(n), Tf(n-r)) + W + 3. Also checks err for r > n and
// overflow for n = 9 and n = 10.
module tb_permutation_unit;

  localparam int unsigned W = 16;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         start = 1'b0;
  logic [W-1:0] n = '0, r = '0;
  logic         busy, done, overflow, err;
  logic [W-1:0] result;

  int checks = 0;
  int failures = 0;
  int cyc = 0;

  permutation_unit dut (.*);

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

  function automatic int tf(input int k);
    return (k >= 2) ? (k - 1) * (W + 1) : 0;
  endfunction

  task automatic run(input int nn, input int rr);
    int t0, lat, exp_lat;
    @(negedge clk);
    start = 1'b1;
    n = W'(nn);
    r = W'(rr);
    @(posedge clk);
    t0 = cyc;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    lat = cyc - t0 - 1;
    if (rr > nn) begin
      check(err && result == '0, $sformatf("%0dP%0d: err not raised", nn, rr));
      exp_lat = 0;
    end else begin
      exp_lat = ((tf(nn) > tf(nn - rr)) ? tf(nn) : tf(nn - rr)) + W + 3;
      if (nn <= 8) begin
        check(!err && !overflow &&
              result == W'(ref_fact(nn) / ref_fact(nn - rr)),
              $sformatf("%0dP%0d = %0d (err %0b ovf %0b), expected %0d", nn, rr,
                        result, err, overflow, ref_fact(nn) / ref_fact(nn - rr)));
      end else begin
        check(overflow, $sformatf("%0dP%0d: overflow not raised", nn, rr));
      end
    end
    check(lat == exp_lat,
          $sformatf("%0dP%0d latency %0d, expected %0d", nn, rr, lat, exp_lat));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    run(4, 2);
    check(result == 16'd12, "worked example 4P2 = 12");

    for (int nn = 0; nn <= 8; nn++)
      for (int rr = 0; rr <= nn; rr++) run(nn, rr);

    run(3, 5);
    run(0, 1);
    run(9, 2);
    run(10, 10);
    run(6, 3);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
