// factorial_unit: computes n! with a shift-and-add multiplier that is run
// once per value of a global counter.
//
// Registers (names follow the operator's description):
//   HL  multiplicand: n at the start, then the previous product
//   BC  multiplier: n-1 at the start, then the global counter GC
//   F   carry out of the DE + HL addition
//   DE  upper half of the partial product; FDEBC shifts right as one register
//   SC  sequence counter, set to the number of multiplier bits (W)
//   GC  global counter, n-1 at the start, decremented after every pass
// One pass: for SC = W..1, if BC[0] is 1 add HL to DE (carry into F), then
// shift F,DE,BC right by one. At the end of the pass DEBC holds HL*BC.
// Then GC is decremented; if it is not 0, the HL-input MUX loads DEBC into
// HL, BC takes GC, and the next pass starts. When GC reaches 0 DEBC is n!.
// So the passes multiply by n-1, n-2, ..., 1.
//
// Interface: start is taken while busy is low. done pulses for one cycle
// and product stays valid until the next start. overflow is set when an
// intermediate product does not fit the W-bit HL register (DE not zero at a
// reload); the product is then wrong.
//
// Timing (own choice: one add-and-shift per clock, one clock per reload):
// with start sampled at clock edge 0, done is high after edge
// (n-1)*(W+1) for n >= 2. For n = 0 and n = 1 (own choice: 0! = 1! = 1,
// no passes) done is high right after edge 0.
module factorial_unit #(
  parameter int unsigned W = math_op_pkg::DATA_W
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [W-1:0]   n,
  output logic           busy,
  output logic           done,
  output logic [2*W-1:0] product,
  output logic           overflow
);

  localparam int unsigned SCW = $clog2(W + 1);

  typedef enum logic [1:0] {S_IDLE, S_MULT, S_LOAD} state_e;

  state_e         state;
  logic [W-1:0]   hl, de, bc, gc;
  logic [SCW-1:0] sc;
  logic           ovf;

  // Add stage of one multiplier step: {F,DE} = DE + (BCn ? HL : 0). F is
  // the carry sum[W]; it lives only within the clock, since the shift that
  // follows in the same clock moves it into DE's top bit and clears F.
  logic [W:0]     sum;
  logic [W-1:0]   gc_dec;

  always_comb begin
    sum    = {1'b0, de} + (bc[0] ? {1'b0, hl} : '0);
    gc_dec = gc - W'(1);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      hl    <= '0;
      de    <= '0;
      bc    <= '0;
      gc    <= '0;
      sc    <= '0;
      ovf   <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            ovf <= 1'b0;
            de  <= '0;
            sc  <= SCW'(W);
            if (n <= W'(1)) begin
              // 0! = 1! = 1: no pass needed, DEBC = 1.
              bc   <= W'(1);
              hl   <= n;
              gc   <= '0;
              done <= 1'b1;
            end else begin
              hl    <= n;          // MUX select 0: operand into HL
              gc    <= n - W'(1);
              bc    <= n - W'(1);
              state <= S_MULT;
            end
          end
        end
        S_MULT: begin
          // Add, then shift F,DE,BC right once.
          de <= sum[W:1];
          bc <= {sum[0], bc[W-1:1]};
          sc <= sc - SCW'(1);
          if (sc == SCW'(1)) state <= S_LOAD;
        end
        S_LOAD: begin
          gc <= gc_dec;
          if (gc_dec == '0) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            hl    <= bc;            // MUX select 1: DEBC into HL
            if (de != '0) ovf <= 1'b1;
            bc    <= gc_dec;        // GC into BC
            de    <= '0;
            sc    <= SCW'(W);
            state <= S_MULT;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy     = (state != S_IDLE);
  assign product  = {de, bc};
  assign overflow = ovf;

endmodule
