// wm_multiplier: the column of Q complex multipliers between the LHS and RHS
// arrays, applying the element-wise factor W_M of Eq. 15:
//     Y(k1, n1) = W_L^(n1*k1) * Y'(k1, n1),  L = 4*Q.
// Lane k1 takes row k1 of the LHS array together with its tag, whose low bits
// hold n1; the twiddle comes from a small table indexed by (n1*k1) mod L.
// The inverse transform uses conjugate twiddles. Each lane is a 2-stage
// pipelined cmul, so every lane's data, valid and tag leave 2 cycles after
// they arrive and the row skew of the LHS array is kept.
module wm_multiplier import sar_pkg::*; #(
  parameter int unsigned Q    = 16,  // lanes (rows of the arrays)
  parameter int unsigned W    = 18,  // sample width
  parameter int unsigned TAGW = 6    // tag width; tag[$clog2(Q)-1:0] is n1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 inverse,
  input  logic                 in_valid [Q],
  input  logic [TAGW-1:0]      in_tag   [Q],
  input  logic signed [W-1:0]  in_re    [Q],
  input  logic signed [W-1:0]  in_im    [Q],
  output logic                 out_valid [Q],
  output logic [TAGW-1:0]      out_tag   [Q],
  output logic signed [W-1:0]  out_re    [Q],
  output logic signed [W-1:0]  out_im    [Q]
);
  localparam int unsigned L  = 4 * Q;
  localparam int unsigned LB = $clog2(L);
  localparam int unsigned QB = $clog2(Q);

  for (genvar k = 0; k < Q; k++) begin : g_lane
    logic [LB-1:0] e;
    coef_t         w;
    logic          v_d [2];
    logic [TAGW-1:0] t_d [2];

    assign e = LB'(int'(in_tag[k][QB-1:0]) * k);

    twiddle_rom #(.N(L)) u_tw (.e(e), .conj(inverse), .w(w));

    cmul #(.W(W)) u_mul (
      .clk, .a_re(in_re[k]), .a_im(in_im[k]), .w(w),
      .p_re(out_re[k]), .p_im(out_im[k])
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        v_d[0] <= 1'b0;
        v_d[1] <= 1'b0;
      end else begin
        v_d[0] <= in_valid[k];
        v_d[1] <= v_d[0];
      end
    end

    always_ff @(posedge clk) begin
      t_d[0] <= in_tag[k];
      t_d[1] <= t_d[0];
    end

    assign out_valid[k] = v_d[1];
    assign out_tag[k]   = t_d[1];
  end
endmodule
