// tb_lhs_array: streams random four-point columns through the LHS array, one
// per cycle, in forward and inverse mode, and checks every row output
// against sum_c W_4^(r*c) x[c] (conjugated for inverse) computed here, and
// that row r appears exactly r+4 cycles after its input.
module tb_lhs_array;
  localparam int Q = 16, W = 16, TAGW = 8, NIN = 200;
  logic clk = 1'b0, rst_n = 1'b0, inverse = 1'b0, in_valid = 1'b0;
  logic [TAGW-1:0] in_tag = '0;
  logic signed [W-1:0] x_re [4], x_im [4];
  logic row_valid [Q];
  logic [TAGW-1:0] row_tag [Q];
  logic signed [W+1:0] y_re [Q], y_im [Q];
  int checks = 0, failures = 0, cyc = 0;
  int sr [NIN][4], si [NIN][4], scyc [NIN];
  bit sinv [NIN];

  lhs_array #(.Q(Q), .W(W), .TAGW(TAGW)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker: at each negedge look at every valid row
  always @(negedge clk) if (rst_n) begin
    for (int r = 0; r < Q; r++) if (row_valid[r]) begin
      int t, er, ei, e, vr, vi;
      t = int'(row_tag[r]);
      er = 0; ei = 0;
      for (int c = 0; c < 4; c++) begin
        e = (r * c) % 4;
        if (sinv[t]) e = (4 - e) % 4;
        case (e)
          0: begin vr =  sr[t][c]; vi =  si[t][c]; end
          1: begin vr =  si[t][c]; vi = -sr[t][c]; end
          2: begin vr = -sr[t][c]; vi = -si[t][c]; end
          default: begin vr = -si[t][c]; vi = sr[t][c]; end
        endcase
        er += vr; ei += vi;
      end
      checks++;
      if (int'(y_re[r]) != er || int'(y_im[r]) != ei || cyc - scyc[t] != r + 4) begin
        failures++;
        if (failures < 8) $display("FAIL row %0d tag %0d got (%0d,%0d) exp (%0d,%0d) lat %0d",
                                   r, t, y_re[r], y_im[r], er, ei, cyc - scyc[t]);
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < NIN; t++) begin
      @(negedge clk);
      // switch mode only after the array has drained
      if (t == NIN / 2) begin
        in_valid = 1'b0;
        repeat (Q + 6) @(negedge clk);
        inverse = 1'b1;
      end
      in_valid = 1'b1;
      in_tag = TAGW'(t);
      for (int c = 0; c < 4; c++) begin
        sr[t][c] = int'($urandom_range(0, 65535)) - 32768;
        si[t][c] = int'($urandom_range(0, 65535)) - 32768;
        x_re[c] = W'(sr[t][c]);
        x_im[c] = W'(si[t][c]);
      end
      sinv[t] = inverse;
      scyc[t] = cyc;
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (Q + 8) @(negedge clk);
    checks++;
    if (checks < NIN * Q) begin failures++; $display("FAIL only %0d checks", checks); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
