// lhs_pe: one processing element of the left-hand-side (LHS) systolic array.
//
// The PE holds one coefficient of C_M1, a power of W_4 (1, -j, -1 or +j),
// fixed by its row and column; the inverse transform uses the conjugate.
// Each cycle it multiplies the sample arriving from the PE below by that
// coefficient, adds the partial sum arriving from the PE on its left, and
// registers both the sample (passed up) and the new partial sum (passed
// right). A product by a power of W_4 is only a swap and negation of I and Q,
// so the PE needs one adder and no hardware multiplier. Latency 1 cycle.
module lhs_pe #(
  parameter int unsigned W   = 16,     // sample width
  parameter int unsigned SW  = 18,     // partial-sum width
  parameter logic [1:0]  EXP = 2'd0    // coefficient is W_4^EXP
) (
  input  logic                 clk,
  input  logic                 inverse,
  input  logic signed [W-1:0]  x_re,   // from the PE below
  input  logic signed [W-1:0]  x_im,
  input  logic signed [SW-1:0] s_re,   // from the PE on the left
  input  logic signed [SW-1:0] s_im,
  output logic signed [W-1:0]  xo_re,  // to the PE above
  output logic signed [W-1:0]  xo_im,
  output logic signed [SW-1:0] so_re,  // to the PE on the right
  output logic signed [SW-1:0] so_im
);
  logic [1:0]           e;
  logic signed [SW-1:0] a, b, pr, pi;

  always_comb begin
    e = inverse ? 2'(-EXP) : EXP;
    a = SW'(x_re);
    b = SW'(x_im);
    unique case (e)
      2'd0:    begin pr =  a; pi =  b; end
      2'd1:    begin pr =  b; pi = -a; end
      2'd2:    begin pr = -a; pi = -b; end
      default: begin pr = -b; pi =  a; end
    endcase
  end

  always_ff @(posedge clk) begin
    xo_re <= x_re;
    xo_im <= x_im;
    so_re <= s_re + pr;
    so_im <= s_im + pi;
  end
endmodule
