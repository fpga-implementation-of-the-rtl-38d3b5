// rhs_array: right-hand-side systolic array, Q rows by 4 columns of rhs_pe,
// finishing one 4*Q-point sub-FFT (Eq. 17, Z = C_M2 * Y^t):
//     Z(k1 + Q*k2) = sum_n1 W_4^(n1*k2) * Y(k1, n1).
// Row k1 takes Y(k1, n1) from the left, skewed as the LHS array leaves it
// (row r one cycle after row r-1). The coefficient exponent (n1*k2) mod 4 and
// the first/last markers enter column k2 from below, taken from row 0's tag
// and delayed k2 cycles, so PE (k1, k2) sees matching data and coefficient.
// The tag of row 0 holds {first, last, n1}; n1 runs 0..Q-1.
//
// Draining: when column k2 finishes a sum, a per-column counter reads the Q
// result registers of that column one per cycle; the four columns are then
// deskewed so that one cycle carries Z(d + Q*k2) for k2 = 0..3 with index d
// on out_idx. Each value is rounded, shifted right by `shift` and saturated
// to OW bits. Sums of consecutive sub-FFTs can follow with no gap: the output
// also delivers four points per cycle.
module rhs_array #(
  parameter int unsigned Q    = 16,            // rows
  parameter int unsigned W    = 18,            // input width
  parameter int unsigned OW   = 16,            // output width
  parameter int unsigned TAGW = $clog2(Q) + 2  // {first, last, n1}
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   inverse,
  input  logic [2:0]             shift,
  input  logic                   in_valid [Q],
  input  logic [TAGW-1:0]        in_tag   [Q],
  input  logic signed [W-1:0]    in_re    [Q],
  input  logic signed [W-1:0]    in_im    [Q],
  output logic                   out_valid,
  output logic [$clog2(Q)-1:0]   out_idx,
  output logic signed [OW-1:0]   out_re [4],
  output logic signed [OW-1:0]   out_im [4]
);
  localparam int unsigned QB = $clog2(Q);
  localparam int unsigned AW = W + QB;

  // ---- coefficient stream for the bottom of each column ----
  logic       cb_v [4][4];
  logic       cb_f [4][4];
  logic       cb_l [4][4];
  logic [1:0] cb_e [4][4];
  logic       cin_v [4], cin_f [4], cin_l [4];
  logic [1:0] cin_e [4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < 4; c++) for (int k = 0; k < 4; k++) cb_v[c][k] <= 1'b0;
    end else begin
      for (int c = 0; c < 4; c++) begin
        cb_v[c][0] <= in_valid[0];
        for (int k = 1; k < 4; k++) cb_v[c][k] <= cb_v[c][k-1];
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int c = 0; c < 4; c++) begin
      cb_f[c][0] <= in_tag[0][QB+1];
      cb_l[c][0] <= in_tag[0][QB];
      cb_e[c][0] <= 2'((int'(in_tag[0][QB-1:0]) * c) % 4);
      for (int k = 1; k < 4; k++) begin
        cb_f[c][k] <= cb_f[c][k-1];
        cb_l[c][k] <= cb_l[c][k-1];
        cb_e[c][k] <= cb_e[c][k-1];
      end
    end
  end

  always_comb begin
    cin_v[0] = in_valid[0];
    cin_f[0] = in_tag[0][QB+1];
    cin_l[0] = in_tag[0][QB];
    cin_e[0] = 2'd0;
    for (int c = 1; c < 4; c++) begin
      cin_v[c] = cb_v[c][c-1];
      cin_f[c] = cb_f[c][c-1];
      cin_l[c] = cb_l[c][c-1];
      cin_e[c] = cb_e[c][c-1];
    end
  end

  // ---- PE grid ----
  logic signed [W-1:0]  yr_re [Q][4], yr_im [Q][4];
  logic                 cu_v [Q][4], cu_f [Q][4], cu_l [Q][4];
  logic [1:0]           cu_e [Q][4];
  logic signed [AW-1:0] res_re [Q][4], res_im [Q][4];

  for (genvar r = 0; r < Q; r++) begin : g_row
    for (genvar c = 0; c < 4; c++) begin : g_col
      logic signed [W-1:0] yi_re, yi_im;
      logic ci_v, ci_f, ci_l;
      logic [1:0] ci_e;
      if (c == 0) begin : g_left
        assign yi_re = in_re[r];
        assign yi_im = in_im[r];
      end else begin : g_mid
        assign yi_re = yr_re[r][c-1];
        assign yi_im = yr_im[r][c-1];
      end
      if (r == 0) begin : g_bot
        assign ci_v = cin_v[c];
        assign ci_f = cin_f[c];
        assign ci_l = cin_l[c];
        assign ci_e = cin_e[c];
      end else begin : g_up
        assign ci_v = cu_v[r-1][c];
        assign ci_f = cu_f[r-1][c];
        assign ci_l = cu_l[r-1][c];
        assign ci_e = cu_e[r-1][c];
      end
      rhs_pe #(.W(W), .AW(AW)) u_pe (
        .clk, .rst_n, .inverse,
        .y_re(yi_re), .y_im(yi_im),
        .c_valid(ci_v), .c_first(ci_f), .c_last(ci_l), .c_exp(ci_e),
        .yo_re(yr_re[r][c]), .yo_im(yr_im[r][c]),
        .co_valid(cu_v[r][c]), .co_first(cu_f[r][c]), .co_last(cu_l[r][c]), .co_exp(cu_e[r][c]),
        .res_re(res_re[r][c]), .res_im(res_im[r][c])
      );
    end
  end

  // ---- per-column drain and deskew ----
  logic              dr_act [4];
  logic [QB-1:0]     dr_cnt [4];
  logic              col_v  [4];
  logic [QB-1:0]     col_i  [4];
  logic signed [AW-1:0] col_re [4], col_im [4];
  // deskew: column c is delayed 3-c more cycles
  logic              ds_v  [4][3];
  logic [QB-1:0]     ds_i  [4][3];
  logic signed [AW-1:0] ds_re [4][3], ds_im [4][3];
  logic              al_v  [4];
  logic [QB-1:0]     al_i  [4];
  logic signed [AW-1:0] al_re [4], al_im [4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < 4; c++) begin
        dr_act[c] <= 1'b0;
        dr_cnt[c] <= '0;
        col_v[c]  <= 1'b0;
        for (int k = 0; k < 3; k++) ds_v[c][k] <= 1'b0;
      end
    end else begin
      for (int c = 0; c < 4; c++) begin
        col_v[c] <= dr_act[c];
        if (cin_v[c] && cin_l[c]) begin
          dr_act[c] <= 1'b1;
          dr_cnt[c] <= '0;
        end else if (dr_act[c]) begin
          dr_cnt[c] <= dr_cnt[c] + 1'b1;
          if (dr_cnt[c] == QB'(Q - 1)) dr_act[c] <= 1'b0;
        end
        ds_v[c][0] <= col_v[c];
        for (int k = 1; k < 3; k++) ds_v[c][k] <= ds_v[c][k-1];
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int c = 0; c < 4; c++) begin
      col_i[c]  <= dr_cnt[c];
      col_re[c] <= res_re[dr_cnt[c]][c];
      col_im[c] <= res_im[dr_cnt[c]][c];
      ds_i[c][0]  <= col_i[c];
      ds_re[c][0] <= col_re[c];
      ds_im[c][0] <= col_im[c];
      for (int k = 1; k < 3; k++) begin
        ds_i[c][k]  <= ds_i[c][k-1];
        ds_re[c][k] <= ds_re[c][k-1];
        ds_im[c][k] <= ds_im[c][k-1];
      end
    end
  end

  always_comb begin
    al_v[3]  = col_v[3];
    al_i[3]  = col_i[3];
    al_re[3] = col_re[3];
    al_im[3] = col_im[3];
    for (int c = 0; c < 3; c++) begin
      al_v[c]  = ds_v[c][2-c];
      al_i[c]  = ds_i[c][2-c];
      al_re[c] = ds_re[c][2-c];
      al_im[c] = ds_im[c][2-c];
    end
  end

  // ---- scale, round, saturate ----
  function automatic logic signed [OW-1:0] scale(logic signed [AW-1:0] v, logic [2:0] sh);
    logic signed [AW:0] t;
    t = (AW + 1)'(v);
    if (sh != 3'd0) t = (t + ((AW + 1)'(1) <<< (sh - 3'd1))) >>> sh;
    if (t > (AW + 1)'((1 << (OW - 1)) - 1))  return {1'b0, {(OW - 1){1'b1}}};
    else if (t < -(AW + 1)'(1 << (OW - 1)))  return {1'b1, {(OW - 1){1'b0}}};
    else                                     return t[OW-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= al_v[0];
  end

  always_ff @(posedge clk) begin
    out_idx <= al_i[0];
    for (int c = 0; c < 4; c++) begin
      out_re[c] <= scale(al_re[c], shift);
      out_im[c] <= scale(al_im[c], shift);
    end
  end
endmodule
