// tb_shared_multiplier: random data on the four lanes every cycle, cycling
// through the three selections (W_N twiddle with random exponent, phase
// value, unity) and both directions. Each lane must return the rounded,
// saturated product with the expected coefficient, 3 cycles later, with its
// tag. Twiddles are computed here from cos/sin for N = 4096.
module tb_shared_multiplier;
  import sar_pkg::*;
  localparam int N = 4096, TAGW = 10, NIN = 400;
  localparam real PI = 3.14159265358979323846;
  logic clk = 1'b0, rst_n = 1'b0, inverse = 1'b0, in_valid = 1'b0, out_valid;
  sm_sel_e sel = SM_TWIDDLE;
  logic [TAGW-1:0] in_tag = '0, out_tag;
  cplx_t in_d [4], out_d [4];
  logic [11:0] in_exp [4];
  coef_t in_ph [4];
  int checks = 0, failures = 0, cyc = 0;
  longint er [NIN][4], ei [NIN][4];
  int scyc [NIN];
  int nsel [3];

  shared_multiplier #(.N(N), .TAGW(TAGW)) dut (.*);
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
    if (t > 32767) t = 32767;
    if (t < -32768) t = -32768;
    return t;
  endfunction

  always @(negedge clk) if (rst_n && out_valid) begin
    int t;
    t = int'(out_tag);
    for (int j = 0; j < 4; j++) begin
      checks++;
      if (longint'(out_d[j].re) != er[t][j] || longint'(out_d[j].im) != ei[t][j] || cyc - scyc[t] != 3) begin
        failures++;
        if (failures < 8) $display("FAIL t %0d lane %0d got (%0d,%0d) exp (%0d,%0d)", t, j,
                                   out_d[j].re, out_d[j].im, er[t][j], ei[t][j]);
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < NIN; t++) begin
      @(negedge clk);
      sel = sm_sel_e'(t % 3);
      nsel[t % 3]++;
      inverse = (t % 7) >= 4;
      in_valid = 1'b1;
      in_tag = TAGW'(t);
      scyc[t] = cyc;
      for (int j = 0; j < 4; j++) begin
        longint a, b, c, s;
        int e;
        a = longint'($urandom_range(0, 65535)) - 32768;
        b = longint'($urandom_range(0, 65535)) - 32768;
        e = int'($urandom_range(0, N - 1));
        in_d[j] = '{re: DW'(a), im: DW'(b)};
        in_exp[j] = 12'(e);
        in_ph[j] = '{re: TW'($urandom_range(0, 32767) - 16384), im: TW'($urandom_range(0, 32767) - 16384)};
        case (sel)
          SM_TWIDDLE: begin
            c = longint'($floor($cos(2.0 * PI * real'(e) / real'(N)) * 16384.0 + 0.5));
            s = -longint'($floor($sin(2.0 * PI * real'(e) / real'(N)) * 16384.0 + 0.5));
            if (inverse) s = -s;
          end
          SM_PHASE: begin c = longint'(in_ph[j].re); s = longint'(in_ph[j].im); end
          default:  begin c = 16384; s = 0; end
        endcase
        er[t][j] = rs(a * c - b * s);
        ei[t][j] = rs(a * s + b * c);
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (6) @(negedge clk);
    checks++;
    if (checks < NIN * 4) begin failures++; $display("FAIL only %0d checks", checks); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
