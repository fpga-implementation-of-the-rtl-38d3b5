// cmul: pipelined complex multiplier, data times a fixed-point coefficient.
//
// p = a * w, where w has sar_pkg::TFRAC fraction bits. Stage 1 registers the
// four real products, stage 2 forms the real and imaginary sums, rounds to
// nearest and saturates to W bits. Latency 2 cycles, one product per cycle.
// The four-multiplier form and the rounding are this design's choice.
module cmul import sar_pkg::*; #(
  parameter int unsigned W = 16  // data width of each part
) (
  input  logic                clk,
  input  logic signed [W-1:0] a_re,
  input  logic signed [W-1:0] a_im,
  input  coef_t               w,
  output logic signed [W-1:0] p_re,
  output logic signed [W-1:0] p_im
);
  localparam int unsigned PW = W + TW;

  logic signed [PW-1:0] rr, ii, ri, ir;
  logic signed [PW:0]   sre, sim;

  function automatic logic signed [W-1:0] rnd_sat(logic signed [PW:0] v);
    logic signed [PW:0] t;
    t = (v + (PW + 1)'(1 << (TFRAC - 1))) >>> TFRAC;
    if (t > (PW + 1)'((1 << (W - 1)) - 1))       return {1'b0, {(W - 1){1'b1}}};
    else if (t < -(PW + 1)'(1 << (W - 1)))       return {1'b1, {(W - 1){1'b0}}};
    else                                         return t[W-1:0];
  endfunction

  always_ff @(posedge clk) begin
    rr <= a_re * w.re;
    ii <= a_im * w.im;
    ri <= a_re * w.im;
    ir <= a_im * w.re;
    p_re <= rnd_sat(sre);
    p_im <= rnd_sat(sim);
  end

  assign sre = (PW + 1)'(rr) - (PW + 1)'(ii);
  assign sim = (PW + 1)'(ri) + (PW + 1)'(ir);
endmodule
