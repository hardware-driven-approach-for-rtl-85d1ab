// math_op_unit: the three added C operators behind one opcode port.
//
// A program names an operator by its mnemonic, here the opcode:
//   OP_FACT  result = n!      (factorial hardware)
//   OP_PERM  result = nPr     (permutation hardware)
//   OP_COMB  result = nCr     (combination hardware)
// Each operator has its own hardware, as described for the operators; this
// unit decodes the opcode, starts the selected unit and returns that
// unit's result and flags. The decoder, the handshake and the shared
// result register are this design's own.
//
// Interface: when start is high and busy is low, opcode, n and r are taken.
// done pulses for one cycle; result, overflow and err stay valid until the
// next start. err is set for an unknown opcode (after one cycle) and for
// r > n in OP_PERM and OP_COMB. overflow means a factorial did not fit the
// W-bit registers, so the result is wrong. n! is correct up to n = 8 for
// W = 16. Latency: one clock for the decode plus the selected unit's
// latency plus one clock for the result register.
module math_op_unit
  import math_op_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  opcode_e      opcode,
  input  logic [W-1:0] n,
  input  logic [W-1:0] r,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] result,
  output logic         overflow,
  output logic         err
);

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT} state_e;

  state_e         state;
  opcode_e        op_q;
  logic [W-1:0]   n_q, r_q;
  logic           fs, ps, cs;

  logic           f_busy, f_done, f_ovf;
  logic [2*W-1:0] f_prod;
  logic           p_busy, p_done, p_ovf, p_err;
  logic [W-1:0]   p_res;
  logic           c_busy, c_done, c_ovf, c_err;
  logic [W-1:0]   c_res;

  logic [W-1:0]   res_q;
  logic           ovf_q, err_q, done_q;

  factorial_unit #(.W(W)) u_fact (
    .clk, .rst_n, .start(fs), .n(n_q),
    .busy(f_busy), .done(f_done), .product(f_prod), .overflow(f_ovf)
  );

  permutation_unit #(.W(W)) u_perm (
    .clk, .rst_n, .start(ps), .n(n_q), .r(r_q),
    .busy(p_busy), .done(p_done), .result(p_res), .overflow(p_ovf), .err(p_err)
  );

  combination_unit #(.W(W)) u_comb (
    .clk, .rst_n, .start(cs), .n(n_q), .r(r_q),
    .busy(c_busy), .done(c_done), .result(c_res), .overflow(c_ovf), .err(c_err)
  );

  // Opcode decode: one start strobe per operator hardware.
  always_comb begin
    fs = (state == S_ISSUE) && (op_q == OP_FACT);
    ps = (state == S_ISSUE) && (op_q == OP_PERM);
    cs = (state == S_ISSUE) && (op_q == OP_COMB);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      op_q   <= OP_FACT;
      n_q    <= '0;
      r_q    <= '0;
      res_q  <= '0;
      ovf_q  <= 1'b0;
      err_q  <= 1'b0;
      done_q <= 1'b0;
    end else begin
      done_q <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            op_q  <= opcode;
            n_q   <= n;
            r_q   <= r;
            state <= S_ISSUE;
          end
        end
        S_ISSUE: begin
          if (op_q == OP_RSVD) begin
            res_q  <= '0;
            ovf_q  <= 1'b0;
            err_q  <= 1'b1;
            done_q <= 1'b1;
            state  <= S_IDLE;
          end else begin
            state <= S_WAIT;
          end
        end
        S_WAIT: begin
          unique case (op_q)
            OP_FACT: if (f_done) begin
              res_q  <= f_prod[W-1:0];
              ovf_q  <= f_ovf || (f_prod[2*W-1:W] != '0);
              err_q  <= 1'b0;
              done_q <= 1'b1;
              state  <= S_IDLE;
            end
            OP_PERM: if (p_done) begin
              res_q  <= p_res;
              ovf_q  <= p_ovf;
              err_q  <= p_err;
              done_q <= 1'b1;
              state  <= S_IDLE;
            end
            OP_COMB: if (c_done) begin
              res_q  <= c_res;
              ovf_q  <= c_ovf;
              err_q  <= c_err;
              done_q <= 1'b1;
              state  <= S_IDLE;
            end
            default: state <= S_IDLE;
          endcase
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
