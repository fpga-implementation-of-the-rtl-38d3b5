// tb_wm_multiplier: random samples and random n1 on every lane, every cycle.
// Each lane k must return round(y * W_L^(n1*k)) (conjugate twiddle in
// inverse mode), rounded to nearest and saturated, exactly 2 cycles later.
// Twiddles are computed here from cos/sin, independently of the RTL table.
module tb_wm_multiplier;
  localparam int Q = 16, L = 4 * Q, W = 18, TAGW = 14, NIN = 300;
  localparam real PI = 3.14159265358979323846;
  logic clk = 1'b0, rst_n = 1'b0, inverse = 1'b0;
  logic in_valid [Q], out_valid [Q];
  logic [TAGW-1:0] in_tag [Q], out_tag [Q];
  logic signed [W-1:0] in_re [Q], in_im [Q], out_re [Q], out_im [Q];
  int checks = 0, failures = 0, cyc = 0;
  longint ar [NIN][Q], aq [NIN][Q];
  int n1s [NIN][Q], scyc [NIN];
  bit sinv [NIN];

  wm_multiplier #(.Q(Q), .W(W), .TAGW(TAGW)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint rs(longint v);
    longint t;
    t = (v + 8192) >>> 14;
    if (t > (1 << (W - 1)) - 1) t = (1 << (W - 1)) - 1;
    if (t < -(1 << (W - 1))) t = -(1 << (W - 1));
    return t;
  endfunction

  always @(negedge clk) if (rst_n) begin
    for (int k = 0; k < Q; k++) if (out_valid[k]) begin
      int t;
      longint c, s, er, ei;
      t = int'(out_tag[k][TAGW-1:4]);
      c = longint'($floor($cos(2.0 * PI * real'((n1s[t][k] * k) % L) / real'(L)) * 16384.0 + 0.5));
      s = longint'($floor($sin(2.0 * PI * real'((n1s[t][k] * k) % L) / real'(L)) * 16384.0 + 0.5));
      if (!sinv[t]) s = -s;  // W = cos - j sin
      er = rs(ar[t][k] * c - aq[t][k] * s);
      ei = rs(ar[t][k] * s + aq[t][k] * c);
      checks++;
      if (longint'(out_re[k]) != er || longint'(out_im[k]) != ei || cyc - scyc[t] != 2) begin
        failures++;
        if (failures < 8) $display("FAIL lane %0d got (%0d,%0d) exp (%0d,%0d)", k, out_re[k], out_im[k], er, ei);
      end
    end
  end

  initial begin
    for (int k = 0; k < Q; k++) in_valid[k] = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < NIN; t++) begin
      @(negedge clk);
      inverse = (t % 3 == 2);
      sinv[t] = inverse;
      scyc[t] = cyc;
      for (int k = 0; k < Q; k++) begin
        n1s[t][k] = int'($urandom_range(0, Q - 1));
        ar[t][k] = longint'($urandom_range(0, 262143)) - 131072;
        aq[t][k] = longint'($urandom_range(0, 262143)) - 131072;
        in_valid[k] = 1'b1;
        in_tag[k] = {TAGW'(t) << 4} | TAGW'(n1s[t][k]);
        in_re[k] = W'(ar[t][k]);
        in_im[k] = W'(aq[t][k]);
      end
    end
    @(negedge clk);
    for (int k = 0; k < Q; k++) in_valid[k] = 1'b0;
    repeat (5) @(negedge clk);
    checks++;
    if (checks < NIN * Q) begin failures++; $display("FAIL only %0d checks", checks); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
