// permutation_unit: computes nPr = n! / (n-r)!.
//
// Two factorial units run side by side, one on n (its result becomes the
// dividend Q) and one on n-r (its result becomes the divisor B); when both
// have finished, the restoring divider forms Q / B and its quotient is the
// result. The operator's description says that the factorial hardware
// produces both operands and that a restoring divider divides them; using
// two factorial units at once, rather than one unit twice, is this
// design's choice.
//
// Interface: start is taken while busy is low. done pulses for one cycle,
// result and flags stay valid until the next start. err is set (result 0)
// when r > n, which has no permutation (own choice). overflow is set when
// n! does not fit the W-bit registers; the result is then wrong.
// Timing: with start sampled at edge 0, done is high after edge
// max(Tf(n), Tf(n-r)) + W + 3, where Tf(k) = (k-1)*(W+1) for k >= 2 and
// 0 otherwise is the factorial unit's latency; for r > n after edge 0.
module permutation_unit #(
  parameter int unsigned W = math_op_pkg::DATA_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] n,
  input  logic [W-1:0] r,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] result,
  output logic         overflow,
  output logic         err
);

  typedef enum logic [1:0] {S_IDLE, S_FACT, S_DIV} state_e;

  state_e         state;
  logic           f_start, d_start;
  logic [W-1:0]   nr;
  logic           fn_busy, fn_done, fn_ovf;
  logic           fk_busy, fk_done, fk_ovf;
  logic [2*W-1:0] fn_prod, fk_prod;
  logic           fn_got, fk_got;
  logic           d_busy, d_done;
  logic [W-1:0]   quo, rem;
  logic [W-1:0]   res_q;
  logic           ovf_q, err_q, done_q;

  // n! : dividend
  factorial_unit #(.W(W)) u_fact_n (
    .clk, .rst_n, .start(f_start), .n(n),
    .busy(fn_busy), .done(fn_done), .product(fn_prod), .overflow(fn_ovf)
  );

  // (n-r)! : divisor
  factorial_unit #(.W(W)) u_fact_nr (
    .clk, .rst_n, .start(f_start), .n(nr),
    .busy(fk_busy), .done(fk_done), .product(fk_prod), .overflow(fk_ovf)
  );

  restoring_divider #(.W(W)) u_div (
    .clk, .rst_n, .start(d_start),
    .dividend(fn_prod[W-1:0]), .divisor(fk_prod[W-1:0]),
    .busy(d_busy), .done(d_done), .quotient(quo), .remainder(rem)
  );

  always_comb begin
    nr      = n - r;
    f_start = (state == S_IDLE) && start && (r <= n);
    d_start = (state == S_FACT) && fn_got && fk_got;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      fn_got <= 1'b0;
      fk_got <= 1'b0;
      res_q  <= '0;
      ovf_q  <= 1'b0;
      err_q  <= 1'b0;
      done_q <= 1'b0;
    end else begin
      done_q <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            ovf_q <= 1'b0;
            if (r > n) begin
              err_q  <= 1'b1;
              res_q  <= '0;
              done_q <= 1'b1;
            end else begin
              err_q  <= 1'b0;
              fn_got <= 1'b0;
              fk_got <= 1'b0;
              state  <= S_FACT;
            end
          end
        end
        S_FACT: begin
          if (fn_done) begin
            fn_got <= 1'b1;
            if (fn_ovf || fn_prod[2*W-1:W] != '0) ovf_q <= 1'b1;
          end
          if (fk_done) begin
            fk_got <= 1'b1;
            if (fk_ovf) ovf_q <= 1'b1;
          end
          if (fn_got && fk_got) state <= S_DIV;   // divider started now
        end
        S_DIV: begin
          if (d_done) begin
            res_q  <= quo;
            done_q <= 1'b1;
            state  <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy     = (state != S_IDLE);
  assign done     = done_q;
  assign result   = res_q;
  assign overflow = ovf_q;
  assign err      = err_q;

endmodule
