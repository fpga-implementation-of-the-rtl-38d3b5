// shared_multiplier: the four complex multipliers below the RHS array.
//
// The same four multipliers serve two element-wise products of the block
// operation: after the column FFTs they multiply by the twiddle factor
// W_N^e of the row/column FFT decomposition (e supplied per lane, N = L*L),
// and after the row FFTs they multiply by the phase function of the current
// CSA step (values supplied per lane from the phase cache). Selecting unity
// turns the row pass into a plain FFT. The inverse transform conjugates the
// twiddles but never the phase function.
// Stage 1 registers the data and the selected coefficient, stages 2-3 are the
// pipelined cmul: latency 3 cycles, four points per cycle. A tag of TAGW bits
// travels beside the data with the same latency.
module shared_multiplier import sar_pkg::*; #(
  parameter int unsigned N    = 4096,  // length of the whole transform
  parameter int unsigned TAGW = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     inverse,
  input  sm_sel_e                  sel,
  input  logic                     in_valid,
  input  logic [TAGW-1:0]          in_tag,
  input  cplx_t                    in_d   [4],
  input  logic [$clog2(N)-1:0]     in_exp [4],
  input  coef_t                    in_ph  [4],
  output logic                     out_valid,
  output logic [TAGW-1:0]          out_tag,
  output cplx_t                    out_d  [4]
);
  localparam coef_t ONE = '{re: TW'(1 << TFRAC), im: '0};

  logic            v_d [3];
  logic [TAGW-1:0] t_d [3];
  cplx_t           d_r [4];
  coef_t           c_r [4];

  for (genvar j = 0; j < 4; j++) begin : g_lane
    coef_t tw;
    twiddle_rom #(.N(N)) u_tw (.e(in_exp[j]), .conj(inverse), .w(tw));

    always_ff @(posedge clk) begin
      d_r[j] <= in_d[j];
      unique case (sel)
        SM_TWIDDLE: c_r[j] <= tw;
        SM_PHASE:   c_r[j] <= in_ph[j];
        default:    c_r[j] <= ONE;
      endcase
    end

    cmul #(.W(DW)) u_mul (
      .clk, .a_re(d_r[j].re), .a_im(d_r[j].im), .w(c_r[j]),
      .p_re(out_d[j].re), .p_im(out_d[j].im)
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 3; k++) v_d[k] <= 1'b0;
    end else begin
      v_d[0] <= in_valid;
      v_d[1] <= v_d[0];
      v_d[2] <= v_d[1];
    end
  end

  always_ff @(posedge clk) begin
    t_d[0] <= in_tag;
    t_d[1] <= t_d[0];
    t_d[2] <= t_d[1];
  end

  assign out_valid = v_d[2];
  assign out_tag   = t_d[2];
endmodule
