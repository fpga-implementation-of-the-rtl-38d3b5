// tb_csa_controller: runs block operations (normal and transposed layout)
// with a delay-line model of the datapath (RHS output D cycles after each
// read, write 4 cycles after that). Checks: the read coordinates and LHS
// tags of every cycle of both passes; the write coordinates and W_N
// exponents of every RHS output; that the row pass reads nothing before the
// last column-pass write; N/4 read cycles per pass; one done pulse.
module tb_csa_controller;
  import sar_pkg::*;
  localparam int L = 16, Q = L / 4, N = L * L, D = 12;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  mode_t mode = '0, mode_q;
  logic busy, done, rd_en, lhs_valid, rhs_valid, wr_fire;
  pass_e pass;
  logic [3:0] rd_r [4], rd_c [4], wr_r [4], wr_c [4];
  logic [3:0] lhs_tag;
  logic [1:0] rhs_idx;
  logic [7:0] tw_exp [4];
  int checks = 0, failures = 0;

  csa_controller #(.L(L)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // datapath model
  logic dl [D + 5];
  int   ocnt;
  pass_e prev_pass;
  always @(posedge clk) begin
    prev_pass <= pass;
    dl[0] <= rst_n && rd_en;
    for (int k = 1; k < D + 5; k++) dl[k] <= rst_n && dl[k-1];
    if (!rst_n || !busy || pass != prev_pass) ocnt <= 0;
    else if (rhs_valid) ocnt <= ocnt + 1;
  end
  assign rhs_valid = rst_n && dl[D-1];
  assign rhs_idx   = 2'(ocnt % Q);
  assign wr_fire   = rst_n && dl[D+3];

  // read-side checker
  int rcnt, rpass_cnt [2], last_col_wr, first_row_rd, cyc, ndone;
  logic tag_exp_v;
  logic [3:0] tag_exp;
  always @(posedge clk) cyc++;
  always @(negedge clk) if (rst_n) begin
    if (done) ndone++;
    if (lhs_valid) begin
      checks++;
      if (lhs_tag != tag_exp) begin failures++; $display("FAIL tag %h exp %h", lhs_tag, tag_exp); end
    end
    if (rd_en) begin
      int s, m, a, b, p;
      p = int'(pass);
      s = rpass_cnt[p] / Q; m = rpass_cnt[p] % Q;
      tag_exp = {m == 0, m == Q - 1, 2'(m)};
      if (pass == PASS_ROW && first_row_rd < 0) first_row_rd = cyc;
      for (int j = 0; j < 4; j++) begin
        if (pass == PASS_COL) begin a = m + Q * j; b = s; end
        else begin a = s; b = m + Q * j; end
        if (mode_q.transposed) begin int t; t = a; a = b; b = t; end
        checks++;
        if (int'(rd_r[j]) != a || int'(rd_c[j]) != b) begin
          failures++;
          if (failures < 8) $display("FAIL read pass %0d s %0d m %0d lane %0d got [%0d][%0d] exp [%0d][%0d]",
                                     p, s, m, j, rd_r[j], rd_c[j], a, b);
        end
      end
      rpass_cnt[p]++;
    end
    if (rhs_valid) begin
      int s, d, a, b, k;
      s = ocnt / Q; d = ocnt % Q;
      for (int j = 0; j < 4; j++) begin
        k = d + Q * j;
        if (pass == PASS_COL) begin a = k; b = s; end
        else begin a = s; b = k; end
        if (mode_q.transposed) begin int t; t = a; a = b; b = t; end
        checks++;
        if (int'(wr_r[j]) != a || int'(wr_c[j]) != b || int'(tw_exp[j]) != (s * k) % N) begin
          failures++;
          if (failures < 8) $display("FAIL write s %0d d %0d lane %0d got [%0d][%0d] e %0d", s, d, j,
                                     wr_r[j], wr_c[j], tw_exp[j]);
        end
      end
    end
    if (wr_fire && pass == PASS_COL) last_col_wr = cyc;
  end

  task automatic run(input mode_t m);
    rpass_cnt[0] = 0; rpass_cnt[1] = 0; first_row_rd = -1; ndone = 0;
    @(negedge clk);
    mode = m; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (busy) @(negedge clk);
    @(negedge clk);
    checks++;
    if (rpass_cnt[0] != N / 4 || rpass_cnt[1] != N / 4) begin
      failures++; $display("FAIL read cycles %0d %0d", rpass_cnt[0], rpass_cnt[1]);
    end
    checks++;
    if (first_row_rd <= last_col_wr) begin failures++; $display("FAIL row pass started before column writes ended"); end
    checks++;
    if (ndone != 1) begin failures++; $display("FAIL %0d done pulses", ndone); end
  endtask

  initial begin
    mode_t m;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    m = '0;
    run(m);
    m.transposed = 1'b1; m.inverse = 1'b1;
    run(m);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
