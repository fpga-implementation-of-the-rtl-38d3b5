// rhs_pe: one processing element of the right-hand-side (RHS) systolic array.
//
// Data Y arrive from the PE on the left and the C_M2 coefficient, a power of
// W_4, arrives from the PE below together with the first/last markers of the
// sum; both are registered and passed on (right and up) unchanged. The PE
// keeps its own accumulator (output-stationary): on "first" it loads the
// product, otherwise it adds it, and on "last" it copies the finished sum to
// its result register, where it stays for the next Q cycles while the
// accumulator starts the next sum. Multiplying by a power of W_4 is a swap
// and negation of I and Q, so the PE needs one adder. Latency 1 cycle.
module rhs_pe #(
  parameter int unsigned W  = 18,  // input width
  parameter int unsigned AW = 22   // accumulator width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 inverse,
  input  logic signed [W-1:0]  y_re,     // from the left
  input  logic signed [W-1:0]  y_im,
  input  logic                 c_valid,  // from below
  input  logic                 c_first,
  input  logic                 c_last,
  input  logic [1:0]           c_exp,    // coefficient is W_4^c_exp
  output logic signed [W-1:0]  yo_re,    // to the right
  output logic signed [W-1:0]  yo_im,
  output logic                 co_valid, // to above
  output logic                 co_first,
  output logic                 co_last,
  output logic [1:0]           co_exp,
  output logic signed [AW-1:0] res_re,   // finished sum
  output logic signed [AW-1:0] res_im
);
  logic [1:0]           e;
  logic signed [AW-1:0] a, b, pr, pi, acc_re, acc_im, nx_re, nx_im;

  always_comb begin
    e = inverse ? 2'(-c_exp) : c_exp;
    a = AW'(y_re);
    b = AW'(y_im);
    unique case (e)
      2'd0:    begin pr =  a; pi =  b; end
      2'd1:    begin pr =  b; pi = -a; end
      2'd2:    begin pr = -a; pi = -b; end
      default: begin pr = -b; pi =  a; end
    endcase
    nx_re = c_first ? pr : acc_re + pr;
    nx_im = c_first ? pi : acc_im + pi;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) co_valid <= 1'b0;
    else        co_valid <= c_valid;
  end

  always_ff @(posedge clk) begin
    yo_re    <= y_re;
    yo_im    <= y_im;
    co_first <= c_first;
    co_last  <= c_last;
    co_exp   <= c_exp;
    if (c_valid) begin
      acc_re <= nx_re;
      acc_im <= nx_im;
      if (c_last) begin
        res_re <= nx_re;
        res_im <= nx_im;
      end
    end
  end
endmodule
