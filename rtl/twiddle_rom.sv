// twiddle_rom: combinational table of W_n^e = exp(-j*2*pi*e/n).
//
// Only a quarter-wave sine table of n/4+1 entries is stored; it is computed
// at elaboration from sin() and the four quadrants are rebuilt by symmetry.
// With conj = 1 the table yields exp(+j*2*pi*e/n), which the inverse FFT uses.
// Values have sar_pkg::TFRAC fraction bits. Purely combinational.
module twiddle_rom import sar_pkg::*; #(
  parameter int unsigned N = 64  // transform size, a power of two >= 4
) (
  input  logic [$clog2(N)-1:0] e,     // exponent
  input  logic                 conj,  // 1: conjugate
  output coef_t                w
);
  localparam int unsigned QN = N / 4;
  localparam int unsigned FW = (QN > 1) ? $clog2(QN) : 1;

  typedef logic signed [TW-1:0] tab_t [QN+1];

  function automatic tab_t make_tab();
    tab_t t;
    for (int i = 0; i <= int'(QN); i++) t[i] = sin_q(i, int'(N));
    return t;
  endfunction

  localparam tab_t SIN_TAB = make_tab();

  logic [1:0]           quad;
  logic [FW:0]          f;
  logic signed [TW-1:0] s_f, s_c;  // sin(phi), cos(phi) of the angle inside the quadrant
  logic signed [TW-1:0] cos_v, sin_v;

  always_comb begin
    quad = e[$clog2(N)-1 -: 2];
    f    = (FW + 1)'(e % QN);
    s_f  = SIN_TAB[f];
    s_c  = SIN_TAB[(FW + 1)'(QN) - f];
    unique case (quad)
      2'd0:    begin cos_v =  s_c; sin_v =  s_f; end
      2'd1:    begin cos_v = -s_f; sin_v =  s_c; end
      2'd2:    begin cos_v = -s_c; sin_v = -s_f; end
      default: begin cos_v =  s_f; sin_v = -s_c; end
    endcase
    w.re = cos_v;
    w.im = conj ? sin_v : -sin_v;
  end
endmodule
