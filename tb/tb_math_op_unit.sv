// tb_math_op_unit: end-to-end test of the operator unit at its default
// parameters (W = 16, no parameter override).
//
// Issues every operator through the opcode port: n! for n = 0..8, nPr and
// nCr for every 0 <= r <= n <= 8, the worked examples 8! and 4P2, an unknown
// opcode, r > n, factorials too large for the registers, and a start while
// busy. Results are compared with values computed in the testbench, and
// each latency with the unit's formula plus two clocks of dispatch.
// It also counts how often each mechanism of the hardware happened (add
// and skip steps of the multiplier, product reloads into HL, restoring and
// non-restoring divide steps, overflow, err, the n <= 1 shortcut, each
// opcode) and counts a failure for any that never happened.
module tb_math_op_unit;

  import math_op_pkg::*;

  localparam int unsigned W = DATA_W;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         start = 1'b0;
  opcode_e      opcode = OP_FACT;
  logic [W-1:0] n = '0, r = '0;
  logic         busy, done, overflow, err;
  logic [W-1:0] result;

  int checks = 0;
  int failures = 0;
  int cyc = 0;

  // Mechanism counters.
  int n_add, n_skip, n_reload, n_restore, n_norestore;
  int n_ovf, n_err_r, n_err_op, n_short;
  int n_op[3];

  math_op_unit dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watch the factorial unit of the n! operator and the divider of the
  // permutation operator.
  always @(posedge clk) if (rst_n) begin
    if (int'(dut.u_fact.state) == 1) begin
      if (dut.u_fact.bc[0]) n_add++;
      else                  n_skip++;
    end
    if (int'(dut.u_fact.state) == 2 && dut.u_fact.gc_dec != '0) n_reload++;
    if (int'(dut.u_fact.state) == 0 && dut.u_fact.start && dut.u_fact.n <= 1) n_short++;
    if (dut.u_perm.u_div.run) begin
      if (dut.u_perm.u_div.diff[W]) n_restore++;
      else                          n_norestore++;
    end
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

  function automatic int tp(input int nn, input int rr);
    return ((tf(nn) > tf(nn - rr)) ? tf(nn) : tf(nn - rr)) + W + 3;
  endfunction

  task automatic run(input opcode_e op, input int nn, input int rr);
    int t0, lat, exp_lat;
    longint unsigned exp_v;
    bit exp_err, exp_ovf;
    @(negedge clk);
    start = 1'b1;
    opcode = op;
    n = W'(nn);
    r = W'(rr);
    @(posedge clk);
    t0 = cyc;
    @(negedge clk);
    start = 1'b0;
    // A start while busy is ignored.
    if (busy) begin
      start = 1'b1;
      opcode = OP_FACT;
      n = W'(2);
    end
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    lat = cyc - t0 - 1;
    exp_err = 1'b0;
    exp_ovf = 1'b0;
    exp_v = 0;
    unique case (op)
      OP_FACT: begin
        exp_v = ref_fact(nn);
        exp_ovf = (nn > 8);
        exp_lat = tf(nn) + 2;
        n_op[0]++;
      end
      OP_PERM: begin
        n_op[1]++;
        if (rr > nn) begin
          exp_err = 1'b1;
          exp_lat = 2;
        end else begin
          exp_v = ref_fact(nn) / ref_fact(nn - rr);
          exp_ovf = (nn > 8);
          exp_lat = tp(nn, rr) + 2;
        end
      end
      OP_COMB: begin
        n_op[2]++;
        if (rr > nn) begin
          exp_err = 1'b1;
          exp_lat = 2;
        end else begin
          exp_v = ref_fact(nn) / (ref_fact(nn - rr) * ref_fact(rr));
          exp_ovf = (nn > 8);
          exp_lat = tp(nn, rr) + W + 3 + 2;
        end
      end
      default: begin
        exp_err = 1'b1;
        exp_lat = 1;
      end
    endcase
    if (exp_err) begin
      check(err && result == '0, $sformatf("op %s n=%0d r=%0d: err not raised",
                                           op.name(), nn, rr));
      if (op == OP_RSVD) n_err_op++;
      else               n_err_r++;
    end else if (exp_ovf) begin
      check(overflow && !err, $sformatf("op %s n=%0d r=%0d: overflow not raised",
                                        op.name(), nn, rr));
      n_ovf++;
    end else begin
      check(!err && !overflow && result == W'(exp_v),
            $sformatf("op %s n=%0d r=%0d: result %0d (err %0b ovf %0b), expected %0d",
                      op.name(), nn, rr, result, err, overflow, exp_v));
    end
    check(lat == exp_lat, $sformatf("op %s n=%0d r=%0d: latency %0d, expected %0d",
                                    op.name(), nn, rr, lat, exp_lat));
  endtask

  initial begin
    {n_add, n_skip, n_reload, n_restore, n_norestore} = '0;
    {n_ovf, n_err_r, n_err_op, n_short} = '0;
    n_op = '{default: 0};
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    run(OP_FACT, 8, 0);
    check(result == 16'd40320, "worked example 8! = 40320");
    run(OP_PERM, 4, 2);
    check(result == 16'd12, "worked example 4P2 = 12");

    for (int k = 0; k <= 8; k++) run(OP_FACT, k, 0);
    for (int nn = 0; nn <= 8; nn++)
      for (int rr = 0; rr <= nn; rr++) begin
        run(OP_PERM, nn, rr);
        run(OP_COMB, nn, rr);
      end
    run(OP_RSVD, 5, 2);
    run(OP_PERM, 2, 3);
    run(OP_COMB, 1, 4);
    run(OP_FACT, 9, 0);
    run(OP_PERM, 10, 3);
    run(OP_COMB, 9, 4);
    run(OP_COMB, 7, 3);

    $display("mechanisms: add=%0d skip=%0d reload=%0d restore=%0d no_restore=%0d",
             n_add, n_skip, n_reload, n_restore, n_norestore);
    $display("            overflow=%0d err_r=%0d err_opcode=%0d shortcut=%0d",
             n_ovf, n_err_r, n_err_op, n_short);
    $display("            fact=%0d perm=%0d comb=%0d", n_op[0], n_op[1], n_op[2]);
    check(n_add > 0, "multiplier add step never happened");
    check(n_skip > 0, "multiplier skip step never happened");
    check(n_reload > 0, "product reload into HL never happened");
    check(n_restore > 0, "divider restore never happened");
    check(n_norestore > 0, "divider non-restoring step never happened");
    check(n_ovf > 0, "overflow never happened");
    check(n_err_r > 0, "r > n error never happened");
    check(n_err_op > 0, "unknown opcode never happened");
    check(n_short > 0, "n <= 1 shortcut never happened");
    for (int i = 0; i < 3; i++) check(n_op[i] > 0, "an operator was never issued");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
