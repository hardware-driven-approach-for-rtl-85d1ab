// combination_unit: computes nCr = nPr / r!.
//
// The operator is built from the two earlier operators: a permutation unit
// forms nPr, a factorial unit forms r! at the same time, and a restoring
// divider then divides nPr by r!. The description names only these parts;
// running the permutation and the r! factorial side by side and adding a
// divider of its own is this design's choice.
//
// Interface: start is taken while busy is low. done pulses for one cycle,
// result and flags stay valid until the next start. err is set (result 0)
// when r > n (own choice). overflow is set when n! does not fit the W-bit
// registers; the result is then wrong.
// Timing: with start sampled at edge 0, done is high after edge
// max(Tp, Tf(r)) + W + 3, where Tp is the permutation unit's latency and
// Tf(k) = (k-1)*(W+1) for k >= 2 (0 otherwise) the factorial unit's; Tp is
// always the larger. For r > n done is high after edge 0.
module combination_unit #(
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

  typedef enum logic [1:0] {S_IDLE, S_OPND, S_DIV} state_e;

  state_e         state;
  logic           o_start, d_start;
  logic           p_busy, p_done, p_ovf, p_err;
  logic [W-1:0]   p_res;
  logic           f_busy, f_done, f_ovf;
  logic [2*W-1:0] f_prod;
  logic           p_got, f_got;
  logic           d_busy, d_done;
  logic [W-1:0]   quo, rem;
  logic [W-1:0]   res_q;
  logic           ovf_q, err_q, done_q;

  // nPr : dividend
  permutation_unit #(.W(W)) u_perm (
    .clk, .rst_n, .start(o_start), .n(n), .r(r),
    .busy(p_busy), .done(p_done), .result(p_res), .overflow(p_ovf), .err(p_err)
  );

  // r! : divisor
  factorial_unit #(.W(W)) u_fact_r (
    .clk, .rst_n, .start(o_start), .n(r),
    .busy(f_busy), .done(f_done), .product(f_prod), .overflow(f_ovf)
  );

  restoring_divider #(.W(W)) u_div (
    .clk, .rst_n, .start(d_start),
    .dividend(p_res), .divisor(f_prod[W-1:0]),
    .busy(d_busy), .done(d_done), .quotient(quo), .remainder(rem)
  );

  always_comb begin
    o_start = (state == S_IDLE) && start && (r <= n);
    d_start = (state == S_OPND) && p_got && f_got;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      p_got  <= 1'b0;
      f_got  <= 1'b0;
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
              err_q <= 1'b0;
              p_got <= 1'b0;
              f_got <= 1'b0;
              state <= S_OPND;
            end
          end
        end
        S_OPND: begin
          if (p_done) begin
            p_got <= 1'b1;
            if (p_ovf) ovf_q <= 1'b1;
          end
          if (f_done) begin
            f_got <= 1'b1;
            if (f_ovf || f_prod[2*W-1:W] != '0) ovf_q <= 1'b1;
          end
          if (p_got && f_got) state <= S_DIV;  // divider started now
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
