// lhs_array: left-hand-side systolic array, Q rows by 4 columns of lhs_pe.
//
// It computes one column of C_M1 * X per cycle (Eq. 15 before the W_M
// product): the four samples X(n1 + Q*n2), n2 = 0..3, enter at the bottom,
// column n2 taking sample n2, and row k1 delivers
//     Y'(k1, n1) = sum_n2 W_4^(n2*k1) * X(n1 + Q*n2).
// Samples move up one PE per cycle and partial sums move right one PE per
// cycle, so column n2 is fed n2 cycles late (input skew registers inside this
// module). Row r's result leaves the right edge r+4 cycles after the four
// samples were presented together; the valid flag and tag given with the
// samples come out beside each row with the same delay. The next array (the
// W_M multipliers, then the RHS array) uses this row skew as it is.
// A new column of samples can be presented every cycle.
module lhs_array #(
  parameter int unsigned Q    = 16,  // rows; sub-FFT length is 4*Q
  parameter int unsigned W    = 16,  // input sample width
  parameter int unsigned TAGW = 6    // width of the tag carried beside the data
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   inverse,
  input  logic                   in_valid,
  input  logic [TAGW-1:0]        in_tag,
  input  logic signed [W-1:0]    x_re [4],
  input  logic signed [W-1:0]    x_im [4],
  output logic                   row_valid [Q],
  output logic [TAGW-1:0]        row_tag   [Q],
  output logic signed [W+1:0]    y_re [Q],
  output logic signed [W+1:0]    y_im [Q]
);
  localparam int unsigned SW = W + 2;

  // input skew: column c sees its sample c cycles late
  logic signed [W-1:0] skew_re [4][4];
  logic signed [W-1:0] skew_im [4][4];

  always_ff @(posedge clk) begin
    for (int c = 0; c < 4; c++) begin
      skew_re[c][0] <= x_re[c];
      skew_im[c][0] <= x_im[c];
      for (int k = 1; k < 4; k++) begin
        skew_re[c][k] <= skew_re[c][k-1];
        skew_im[c][k] <= skew_im[c][k-1];
      end
    end
  end

  logic signed [W-1:0]  bot_re [4], bot_im [4];
  logic signed [W-1:0]  xu_re [Q][4], xu_im [Q][4];
  logic signed [SW-1:0] ps_re [Q][4], ps_im [Q][4];

  always_comb begin
    bot_re[0] = x_re[0];
    bot_im[0] = x_im[0];
    for (int c = 1; c < 4; c++) begin
      bot_re[c] = skew_re[c][c-1];
      bot_im[c] = skew_im[c][c-1];
    end
  end

  for (genvar r = 0; r < Q; r++) begin : g_row
    for (genvar c = 0; c < 4; c++) begin : g_col
      logic signed [W-1:0]  xin_re, xin_im;
      logic signed [SW-1:0] sin_re, sin_im;
      if (r == 0) begin : g_bot
        assign xin_re = bot_re[c];
        assign xin_im = bot_im[c];
      end else begin : g_up
        assign xin_re = xu_re[r-1][c];
        assign xin_im = xu_im[r-1][c];
      end
      if (c == 0) begin : g_left
        assign sin_re = '0;
        assign sin_im = '0;
      end else begin : g_mid
        assign sin_re = ps_re[r][c-1];
        assign sin_im = ps_im[r][c-1];
      end
      lhs_pe #(.W(W), .SW(SW), .EXP(2'((r * c) % 4))) u_pe (
        .clk, .inverse,
        .x_re(xin_re), .x_im(xin_im), .s_re(sin_re), .s_im(sin_im),
        .xo_re(xu_re[r][c]), .xo_im(xu_im[r][c]),
        .so_re(ps_re[r][c]), .so_im(ps_im[r][c])
      );
    end
    assign y_re[r] = ps_re[r][3];
    assign y_im[r] = ps_im[r][3];
  end

  // valid/tag delay line; row r taps stage r+4
  logic              v_sr [Q+4];
  logic [TAGW-1:0]   t_sr [Q+4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(Q) + 4; k++) v_sr[k] <= 1'b0;
    end else begin
      v_sr[0] <= in_valid;
      for (int k = 1; k < int'(Q) + 4; k++) v_sr[k] <= v_sr[k-1];
    end
  end

  always_ff @(posedge clk) begin
    t_sr[0] <= in_tag;
    for (int k = 1; k < int'(Q) + 4; k++) t_sr[k] <= t_sr[k-1];
  end

  always_comb begin
    for (int r = 0; r < int'(Q); r++) begin
      row_valid[r] = v_sr[r+3];
      row_tag[r]   = t_sr[r+3];
    end
  end
endmodule
