// tb_rhs_array: feeds several back-to-back sub-FFT blocks of random Y(k1,n1)
// into the RHS array with the row skew the LHS array produces, and checks
// each output beat against Z(d + Q*c) = sum_n1 W_4^(n1*c) Y(d, n1), rounded,
// shifted and saturated as specified, computed here. Run 1: forward, shift 4.
// Run 2: inverse, shift 0, where large sums must saturate. Outputs must
// arrive in order d = 0..Q-1, with no gap inside the back-to-back run
// (four points per cycle).
module tb_rhs_array;
  localparam int Q = 16, W = 18, OW = 16, QB = 4, TAGW = QB + 2, NB = 6;
  logic clk = 1'b0, rst_n = 1'b0, inverse = 1'b0;
  logic [2:0] shift = 3'd4;
  logic in_valid [Q];
  logic [TAGW-1:0] in_tag [Q];
  logic signed [W-1:0] in_re [Q], in_im [Q];
  logic out_valid;
  logic [QB-1:0] out_idx;
  logic signed [OW-1:0] out_re [4], out_im [4];
  int checks = 0, failures = 0, nsat = 0;
  int yr [NB][Q][Q], yi [NB][Q][Q];
  int ob, od, first_out, last_out, cyc;

  rhs_array #(.Q(Q), .W(W), .OW(OW)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int scale(longint v, int sh);
    longint t;
    t = v;
    if (sh != 0) t = (t + (longint'(1) << (sh - 1))) >>> sh;
    if (t > 32767) return 32767;
    if (t < -32768) return -32768;
    return int'(t);
  endfunction

  always @(negedge clk) if (rst_n && out_valid) begin
    if (ob == 0 && od == 0) first_out = cyc;
    last_out = cyc;
    checks++;
    if (int'(out_idx) != od) begin failures++; $display("FAIL idx %0d exp %0d", out_idx, od); end
    for (int c = 0; c < 4; c++) begin
      longint sr, si;
      int e, vr, vi;
      sr = 0; si = 0;
      for (int n1 = 0; n1 < Q; n1++) begin
        e = (n1 * c) % 4;
        if (inverse) e = (4 - e) % 4;
        case (e)
          0: begin vr =  yr[ob][od][n1]; vi =  yi[ob][od][n1]; end
          1: begin vr =  yi[ob][od][n1]; vi = -yr[ob][od][n1]; end
          2: begin vr = -yr[ob][od][n1]; vi = -yi[ob][od][n1]; end
          default: begin vr = -yi[ob][od][n1]; vi = yr[ob][od][n1]; end
        endcase
        sr += vr; si += vi;
      end
      checks++;
      if (scale(sr, int'(shift)) == 32767 || scale(sr, int'(shift)) == -32768) nsat++;
      if (int'(out_re[c]) != scale(sr, int'(shift)) || int'(out_im[c]) != scale(si, int'(shift))) begin
        failures++;
        if (failures < 8) $display("FAIL blk %0d d %0d c %0d got (%0d,%0d) exp (%0d,%0d)", ob, od, c,
                                   out_re[c], out_im[c], scale(sr, int'(shift)), scale(si, int'(shift)));
      end
    end
    od++;
    if (od == Q) begin od = 0; ob++; end
  end

  task automatic run(input int amp);
    for (int b = 0; b < NB; b++) for (int r = 0; r < Q; r++) for (int n = 0; n < Q; n++) begin
      yr[b][r][n] = int'($urandom_range(0, 2 * amp)) - amp;
      yi[b][r][n] = int'($urandom_range(0, 2 * amp)) - amp;
    end
    ob = 0; od = 0;
    for (int t = 0; t < NB * Q + Q; t++) begin
      @(negedge clk);
      for (int r = 0; r < Q; r++) begin
        int idx;
        idx = t - r;
        if (idx >= 0 && idx < NB * Q) begin
          in_valid[r] = 1'b1;
          in_tag[r] = {idx % Q == 0, idx % Q == Q - 1, QB'(idx % Q)};
          in_re[r] = W'(yr[idx / Q][r][idx % Q]);
          in_im[r] = W'(yi[idx / Q][r][idx % Q]);
        end else begin
          in_valid[r] = 1'b0;
          in_tag[r] = '0;
        end
      end
    end
    repeat (Q + 12) @(negedge clk);
    checks++;
    if (ob != NB || last_out - first_out != NB * Q - 1) begin
      failures++;
      $display("FAIL %0d blocks out, span %0d cycles", ob, last_out - first_out);
    end
  endtask

  initial begin
    for (int r = 0; r < Q; r++) in_valid[r] = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(20000);
    inverse = 1'b1; shift = 3'd0;
    run(100000);
    checks++;
    if (nsat == 0) begin failures++; $display("FAIL no saturation seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
