// tb_csa_sar_core: end-to-end check of one block operation at L = 16
// (256-point lines).
// Test 1: forward FFT of random data followed by phase compensation with a
//         random phase function; result compared with a floating-point DFT
//         times the phase, scaled by 2^-(shift_col+shift_row).
// Test 2: the same line, left transposed in the cache, run through the
//         inverse FFT without phase compensation; must give back the input.
// Test 3: forward FFT without phase (unity multiplier) of a single impulse.
// The cycle count of each operation is checked against N/2 plus latency.
module tb_csa_sar_core;
  import sar_pkg::*;

  localparam int L = 16;
  localparam int Q = L / 4;
  localparam int N = L * L;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  mode_t mode;
  logic busy, done;
  logic host_we = 1'b0, host_sel = 1'b0, host_re = 1'b0;
  logic [$clog2(N/4)-1:0] host_addr = '0;
  cplx_t host_wdata [4], host_rdata [4];

  int checks = 0, failures = 0;

  csa_sar_core #(.L(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real xr [N], xi [N], pr [N], pim [N], zr [N], zi [N];
  int  gr [N], gi [N];

  task automatic load(input bit sel, input int vr [N], input int vi [N]);
    for (int q = 0; q < N / 4; q++) begin
      @(negedge clk);
      host_we = 1'b1; host_sel = sel; host_addr = q[$bits(host_addr)-1:0];
      for (int i = 0; i < 4; i++) host_wdata[i] = '{re: DW'(vr[4*q+i]), im: DW'(vi[4*q+i])};
    end
    @(negedge clk);
    host_we = 1'b0;
  endtask

  task automatic unload();
    for (int q = 0; q < N / 4; q++) begin
      @(negedge clk);
      host_re = 1'b1; host_addr = q[$bits(host_addr)-1:0];
      @(negedge clk);
      host_re = 1'b0;
      for (int i = 0; i < 4; i++) begin
        gr[4*q+i] = int'(host_rdata[i].re);
        gi[4*q+i] = int'(host_rdata[i].im);
      end
    end
  endtask

  task automatic run(input mode_t m, output int cycles);
    @(negedge clk);
    mode = m; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
  endtask

  // compare stored matrix position p with expected value
  task automatic cmp(input int p, input real er, input real ei, input real tol, input string what);
    real d;
    d = ((real'(gr[p]) - er) ** 2 + (real'(gi[p]) - ei) ** 2) ** 0.5;
    checks++;
    if (d > tol) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s pos %0d got (%0d,%0d) exp (%0.1f,%0.1f)", what, p, gr[p], gi[p], er, ei);
    end
  endtask

  task automatic check_cycles(input int cycles);
    checks++;
    // two passes of N/4 read cycles each, plus pipeline latency per pass
    if (cycles < N / 2 || cycles > N / 2 + 2 * (Q + 40)) begin
      failures++;
      $display("FAIL cycle count %0d", cycles);
    end
  endtask

  initial begin
    int vr [N], vi [N], cyc, sc;
    mode_t m;
    mode = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // ---------------- test 1: FFT + phase ----------------
    for (int n = 0; n < N; n++) begin
      vr[n] = int'($urandom_range(0, 8000)) - 4000;
      vi[n] = int'($urandom_range(0, 8000)) - 4000;
      xr[n] = vr[n]; xi[n] = vi[n];
    end
    load(1'b0, vr, vi);
    // phase function for frequency k stored at position (k%L)*L + k/L
    for (int k = 0; k < N; k++) begin
      real a;
      int p;
      a = 2.0 * PI * real'($urandom_range(0, 1023)) / 1024.0;
      p = (k % L) * L + k / L;
      vr[p] = int'($floor($cos(a) * 16384.0 + 0.5));
      vi[p] = int'($floor($sin(a) * 16384.0 + 0.5));
      pr[k] = real'(vr[p]) / 16384.0; pim[k] = real'(vi[p]) / 16384.0;
    end
    load(1'b1, vr, vi);
    m = '0; m.phase_en = 1'b1; m.shift_col = 3'd4; m.shift_row = 3'd4;
    run(m, cyc);
    check_cycles(cyc);
    $display("FFT+phase operation: %0d cycles for %0d points", cyc, N);
    sc = 1 << 8;
    for (int k = 0; k < N; k++) begin
      real ar, aq;
      ar = 0.0; aq = 0.0;
      for (int n = 0; n < N; n++) begin
        real c, s;
        c = $cos(2.0 * PI * real'((n * k) % N) / real'(N));
        s = $sin(2.0 * PI * real'((n * k) % N) / real'(N));
        ar += xr[n] * c + xi[n] * s;
        aq += xi[n] * c - xr[n] * s;
      end
      ar /= sc; aq /= sc;
      zr[k] = ar * pr[k] - aq * pim[k];
      zi[k] = ar * pim[k] + aq * pr[k];
    end
    unload();
    for (int k = 0; k < N; k++) cmp((k % L) * L + k / L, zr[k], zi[k], 6.0, "fft+phase");

    // ---------------- test 2: inverse FFT on the transposed result ----------------
    // forward result (before phase) is needed: redo test 1 without phase
    for (int n = 0; n < N; n++) begin vr[n] = int'(xr[n]); vi[n] = int'(xi[n]); end
    load(1'b0, vr, vi);
    m = '0; m.shift_col = 3'd2; m.shift_row = 3'd2;
    run(m, cyc);
    check_cycles(cyc);
    m = '0; m.inverse = 1'b1; m.transposed = 1'b1; m.shift_col = 3'd3; m.shift_row = 3'd3;
    run(m, cyc);
    check_cycles(cyc);
    unload();
    // forward scaled by 1/16, inverse by 1/64 -> x * N / 1024 = x / 4
    for (int n = 0; n < N; n++) cmp(n, xr[n] / 4.0, xi[n] / 4.0, 4.0, "fft->ifft");

    // ---------------- test 3: impulse, unity multiplier ----------------
    for (int n = 0; n < N; n++) begin vr[n] = 0; vi[n] = 0; end
    vr[3] = 1000; vi[3] = -500;
    load(1'b0, vr, vi);
    m = '0;
    run(m, cyc);
    check_cycles(cyc);
    unload();
    for (int k = 0; k < N; k++) begin
      real c, s;
      c = $cos(2.0 * PI * real'((3 * k) % N) / real'(N));
      s = $sin(2.0 * PI * real'((3 * k) % N) / real'(N));
      cmp((k % L) * L + k / L, 1000.0 * c - 500.0 * s, -500.0 * c - 1000.0 * s, 3.0, "impulse");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
