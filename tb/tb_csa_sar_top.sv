// tb_csa_sar_top: end-to-end test of the SAR processor platform at its
// default size (4096-point lines, 64 x 64), driven as a host would drive it:
// registers over AXI4-Lite, data and phase functions in a DDR model behind
// the AXI4 master, which stalls at random.
//   op 1: load line + load phase 1 + forward FFT with phase compensation
//         + store                       (azimuth FFT and first phase)
//   op 2: load op 1's result (stored transposed) + load phase 2 + inverse
//         FFT with phase compensation on the transposed layout + store
//   op 3: no load, the line is still in the cache: forward FFT without
//         phase compensation (unity multiplier) + store
// Each result is compared with a floating-point DFT/IDFT of the previous
// result as read back from DDR. Mechanisms counted (each must occur): FFT,
// IFFT, phase compensation, unity multiplier, transposed layout, cache reuse
// without a load, W-channel stalls, R-channel gaps, done interrupt. The
// processing time of each operation is checked against N/2 cycles plus
// pipeline latency.
module tb_csa_sar_top;
  import sar_pkg::*;

  localparam int L     = 64;
  localparam int N     = L * L;
  localparam int BEATS = N / 4;
  localparam real PI   = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // AXI4-Lite
  logic [7:0]  s_awaddr = '0, s_araddr = '0;
  logic        s_awvalid = 1'b0, s_wvalid = 1'b0, s_bready = 1'b1, s_arvalid = 1'b0, s_rready = 1'b1;
  logic [31:0] s_wdata = '0;
  logic        s_awready, s_wready, s_bvalid, s_arready, s_rvalid;
  logic [1:0]  s_bresp, s_rresp;
  logic [31:0] s_rdata;
  // AXI4
  logic [31:0]  m_araddr, m_awaddr;
  logic [7:0]   m_arlen, m_awlen;
  logic [2:0]   m_arsize, m_awsize;
  logic [1:0]   m_arburst, m_awburst, m_rresp, m_bresp;
  logic         m_arvalid, m_arready, m_rlast, m_rvalid, m_rready;
  logic         m_awvalid, m_awready, m_wlast, m_wvalid, m_wready, m_bvalid, m_bready;
  logic [127:0] m_rdata, m_wdata;
  logic [15:0]  m_wstrb;
  logic         irq;
  int           w_stalls, r_gaps;

  csa_sar_top dut (.*);

  axi_ddr_model #(.WORDS(8 * BEATS), .STALL(1'b1)) ddr (
    .clk, .rst_n,
    .araddr(m_araddr), .arlen(m_arlen), .arvalid(m_arvalid), .arready(m_arready),
    .rdata(m_rdata), .rresp(m_rresp), .rlast(m_rlast), .rvalid(m_rvalid), .rready(m_rready),
    .awaddr(m_awaddr), .awlen(m_awlen), .awvalid(m_awvalid), .awready(m_awready),
    .wdata(m_wdata), .wlast(m_wlast), .wvalid(m_wvalid), .wready(m_wready),
    .bresp(m_bresp), .bvalid(m_bvalid), .bready(m_bready),
    .w_stalls, .r_gaps
  );

  int checks = 0, failures = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- processing time of each block operation ----
  int proc_cycles, last_proc_cycles;
  bit in_proc;
  always @(posedge clk) begin
    if (rst_n && dut.core_start) begin in_proc = 1'b1; proc_cycles = 0; end
    else if (in_proc) proc_cycles++;
    if (dut.core_done) begin in_proc = 1'b0; last_proc_cycles = proc_cycles; end
  end
  int irq_count = 0;
  always @(posedge clk) if (rst_n && irq) irq_count++;

  // ---- AXI4-Lite host tasks ----
  task automatic reg_write(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    s_awaddr = a; s_awvalid = 1'b1; s_wdata = d; s_wvalid = 1'b1;
    #1;
    while (!(s_awready && s_wready)) begin @(negedge clk); #1; end
    @(negedge clk);
    s_awvalid = 1'b0; s_wvalid = 1'b0;
    while (!s_bvalid) @(negedge clk);
  endtask

  task automatic reg_read(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    s_araddr = a; s_arvalid = 1'b1;
    #1;
    while (!s_arready) begin @(negedge clk); #1; end
    @(negedge clk);
    s_arvalid = 1'b0;
    while (!s_rvalid) @(negedge clk);
    d = s_rdata;
  endtask

  task automatic run_op(input mode_t m, input logic [3:0] steps, input int src, input int ph, input int dst);
    logic [31:0] st;
    reg_write(8'h08, 32'(m));
    reg_write(8'h0C, 32'(src * BEATS * 16));
    reg_write(8'h10, 32'(ph * BEATS * 16));
    reg_write(8'h14, 32'(dst * BEATS * 16));
    reg_write(8'h00, {27'd0, steps, 1'b1});
    do begin
      repeat (50) @(negedge clk);
      reg_read(8'h04, st);
    end while (!st[1]);
    checks++;
    if (st[0]) begin failures++; $display("FAIL busy still set with done"); end
    if (steps[2]) begin
      checks++;
      if (last_proc_cycles < N / 2 || last_proc_cycles > N / 2 + 200) begin
        failures++;
        $display("FAIL processing took %0d cycles", last_proc_cycles);
      end
      $display("block operation: %0d cycles for %0d points", last_proc_cycles, N);
    end
  endtask

  // ---- DDR access helpers (region r, matrix position p) ----
  function automatic void put(int r, int p, int re, int im);
    ddr.mem[r * BEATS + p / 4][32 * (p % 4) +: 32] = {16'(re), 16'(im)};
  endfunction
  function automatic int get_re(int r, int p);
    return int'($signed(ddr.mem[r * BEATS + p / 4][32 * (p % 4) + 16 +: 16]));
  endfunction
  function automatic int get_im(int r, int p);
    return int'($signed(ddr.mem[r * BEATS + p / 4][32 * (p % 4) +: 16]));
  endfunction

  real ct [N], st_ [N];
  real ar [N], aq [N], er [N], ei [N], phr [N], phi [N];

  // (er, ei) = sign-DFT of (ar, aq) / sc
  task automatic dft(input bit inv, input real sc);
    for (int k = 0; k < N; k++) begin
      real sr, si;
      sr = 0.0; si = 0.0;
      for (int n = 0; n < N; n++) begin
        int e;
        real c, s;
        e = (n * k) % N;
        c = ct[e];
        s = inv ? -st_[e] : st_[e];
        sr += ar[n] * c + aq[n] * s;
        si += aq[n] * c - ar[n] * s;
      end
      er[k] = sr / sc; ei[k] = si / sc;
    end
  endtask

  task automatic compare(input int region, input bit out_transposed, input real tol, input string what);
    int bad;
    bad = 0;
    for (int k = 0; k < N; k++) begin
      int p;
      real d;
      p = out_transposed ? (k % L) * L + k / L : k;
      d = ((real'(get_re(region, p)) - er[k]) ** 2 + (real'(get_im(region, p)) - ei[k]) ** 2) ** 0.5;
      checks++;
      if (d > tol) begin
        failures++; bad++;
        if (bad < 5) $display("FAIL %s k=%0d got (%0d,%0d) exp (%0.1f,%0.1f)", what, k,
                              get_re(region, p), get_im(region, p), er[k], ei[k]);
      end
    end
    $display("%s: %0d of %0d points outside tolerance", what, bad, N);
  endtask

  // phase function with random angles, stored at positions given by layout
  task automatic make_phase(input int region, input bit out_transposed);
    for (int k = 0; k < N; k++) begin
      real a;
      int p, vr, vi;
      a = 2.0 * PI * real'($urandom_range(0, 4095)) / 4096.0;
      vr = int'($floor($cos(a) * 16384.0 + 0.5));
      vi = int'($floor($sin(a) * 16384.0 + 0.5));
      p = out_transposed ? (k % L) * L + k / L : k;
      put(region, p, vr, vi);
      phr[k] = real'(vr) / 16384.0; phi[k] = real'(vi) / 16384.0;
    end
  endtask

  task automatic apply_phase();
    for (int k = 0; k < N; k++) begin
      real r, i;
      r = er[k] * phr[k] - ei[k] * phi[k];
      i = er[k] * phi[k] + ei[k] * phr[k];
      er[k] = r; ei[k] = i;
    end
  endtask

  int n_fft = 0, n_ifft = 0, n_phase = 0, n_unity = 0, n_transposed = 0, n_reuse = 0;

  initial begin
    mode_t m;
    logic [31:0] rd;
    for (int e = 0; e < N; e++) begin
      ct[e]  = $cos(2.0 * PI * real'(e) / real'(N));
      st_[e] = $sin(2.0 * PI * real'(e) / real'(N));
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // register read-back
    reg_write(8'h08, 32'h1A5);
    reg_read(8'h08, rd);
    checks++;
    if (rd != 32'h1A5) begin failures++; $display("FAIL mode read-back %h", rd); end

    // ---------------- op 1 ----------------
    for (int n = 0; n < N; n++) begin
      int vr, vi;
      vr = int'($urandom_range(0, 8000)) - 4000;
      vi = int'($urandom_range(0, 8000)) - 4000;
      put(0, n, vr, vi);
      ar[n] = vr; aq[n] = vi;
    end
    make_phase(1, 1'b1);
    m = '0; m.phase_en = 1'b1; m.shift_col = 3'd4; m.shift_row = 3'd4;
    run_op(m, 4'b1111, 0, 1, 2);
    n_fft++; n_phase++;
    dft(1'b0, 256.0);
    apply_phase();
    compare(2, 1'b1, 6.0, "op1 FFT+phase");

    // ---------------- op 2 ----------------
    for (int k = 0; k < N; k++) begin
      int p;
      p = (k % L) * L + k / L;
      ar[k] = get_re(2, p); aq[k] = get_im(2, p);
    end
    make_phase(3, 1'b0);
    m = '0; m.inverse = 1'b1; m.transposed = 1'b1; m.phase_en = 1'b1; m.shift_col = 3'd3; m.shift_row = 3'd3;
    run_op(m, 4'b1111, 2, 3, 4);
    n_ifft++; n_phase++; n_transposed++;
    dft(1'b1, 64.0);
    apply_phase();
    compare(4, 1'b0, 6.0, "op2 IFFT+phase, transposed");

    // ---------------- op 3 ----------------
    for (int n = 0; n < N; n++) begin ar[n] = get_re(4, n); aq[n] = get_im(4, n); end
    m = '0; m.shift_col = 3'd3; m.shift_row = 3'd3;
    run_op(m, 4'b1100, 0, 0, 5);
    n_fft++; n_unity++; n_reuse++;
    dft(1'b0, 64.0);
    compare(5, 1'b1, 6.0, "op3 FFT from cache");

    // ---------------- mechanism coverage ----------------
    $display("fft=%0d ifft=%0d phase=%0d unity=%0d transposed=%0d reuse=%0d w_stalls=%0d r_gaps=%0d irq=%0d",
             n_fft, n_ifft, n_phase, n_unity, n_transposed, n_reuse, w_stalls, r_gaps, irq_count);
    checks++; if (n_fft == 0)        begin failures++; $display("FAIL no FFT"); end
    checks++; if (n_ifft == 0)       begin failures++; $display("FAIL no IFFT"); end
    checks++; if (n_phase == 0)      begin failures++; $display("FAIL no phase compensation"); end
    checks++; if (n_unity == 0)      begin failures++; $display("FAIL no unity multiplier"); end
    checks++; if (n_transposed == 0) begin failures++; $display("FAIL no transposed layout"); end
    checks++; if (n_reuse == 0)      begin failures++; $display("FAIL no cache reuse"); end
    checks++; if (w_stalls == 0)     begin failures++; $display("FAIL no W stall"); end
    checks++; if (r_gaps == 0)       begin failures++; $display("FAIL no R gap"); end
    checks++; if (irq_count != 3)    begin failures++; $display("FAIL irq count %0d", irq_count); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
