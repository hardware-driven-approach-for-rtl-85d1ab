// restoring_divider: unsigned restoring division of a W-bit dividend by a
// W-bit divisor, one quotient bit per clock.
//
// Registers: Q holds the dividend and collects the quotient bits, B the
// divisor, A the partial remainder with an extra top bit As that serves as
// its sign, SC the sequence counter (set to W). Each step shifts A,Q left
// one bit, forms A-B, and tests As: if As is 1 the quotient bit Qn is 0
// and A is restored (A+B, which is the shifted A); if As is 0 Qn is 1 and
// A keeps the difference. After W steps Q holds the quotient and A the
// remainder. A is one bit wider than B so that As is a true sign for every
// W-bit divisor (own choice; the worked example uses equal widths).
// The subtract, sign test and restore of one step happen in one clock
// (own choice).
//
// Interface: start is taken while busy is low; divisor must not be 0
// (checked by an assertion; the operators only divide by factorials).
// done pulses for one cycle, quotient and remainder stay valid until the
// next start. Timing: with start sampled at edge 0, done is high after
// edge W.
module restoring_divider #(
  parameter int unsigned W = math_op_pkg::DATA_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] dividend,
  input  logic [W-1:0] divisor,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] quotient,
  output logic [W-1:0] remainder
);

  localparam int unsigned SCW = $clog2(W + 1);

  logic [W:0]     a;      // a[W] is the sign As
  logic [W-1:0]   q, b;
  logic [SCW-1:0] sc;
  logic           run;

  logic [W:0]     a_sh;   // A after the left shift of AQ
  logic [W:0]     diff;   // A - B

  always_comb begin
    a_sh = {a[W-1:0], q[W-1]};
    diff = a_sh - {1'b0, b};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a    <= '0;
      q    <= '0;
      b    <= '0;
      sc   <= '0;
      run  <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!run) begin
        if (start) begin
          a   <= '0;
          q   <= dividend;
          b   <= divisor;
          sc  <= SCW'(W);
          run <= 1'b1;
        end
      end else begin
        if (diff[W]) begin
          a <= a_sh;                  // As = 1: Qn = 0, A = A + B
          q <= {q[W-2:0], 1'b0};
        end else begin
          a <= diff;                  // As = 0: Qn = 1
          q <= {q[W-2:0], 1'b1};
        end
        sc <= sc - SCW'(1);
        if (sc == SCW'(1)) begin
          run  <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign busy      = run;
  assign quotient  = q;
  assign remainder = a[W-1:0];

  a_nonzero_divisor: assert property (@(posedge clk) disable iff (!rst_n)
    (start && !run) |-> (divisor != '0))
    else $error("restoring_divider: division by zero");

endmodule
