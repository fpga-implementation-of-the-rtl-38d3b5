// tb_csa_image_flow: forms a whole N x N SAR image (N = L*L, default 256,
// so a 256 x 256 image) with the modified chirp-scaling flow. The host side
// lives in this testbench: it programs the processor over AXI4-Lite, keeps
// the image and the three phase functions in the DDR model, and does the two
// corner turns (matrix transposes) between operations. Per line:
//   op 1: azimuth FFT x phase 1          (load, load phase, process, store)
//   op 2: range FFT x phase 2            (load, load phase, process; no store)
//   op 3: range IFFT x phase 3, run on the line op 2 left in the cache with
//         the transposed layout          (load phase, process, store)
//   op 4: azimuth IFFT, unity multiplier (load, process, store)
// Phase functions are unit-magnitude values with random angles, a different
// one for every line, so every line's result is distinct. Each operation's
// output is compared with a double-precision DFT/IDFT of that operation's
// input as read back from DDR (op 2 and op 3 together, since the line between
// them never leaves the cache). Mechanism counts are printed and must be
// non-zero; every block operation's duration is checked, and the total
// number of clock cycles for the image is printed. L = 32 would form a
// 1024 x 1024 image, with a reference model about 64 times slower.
module tb_csa_image_flow;
  import sar_pkg::*;

  parameter int L = 16;
  localparam int N     = L * L;         // line length and image side
  localparam int BEATS = N / 4;         // beats per line
  localparam int IMG   = N * BEATS;     // beats per image or phase plane
  localparam real PI   = 3.14159265358979323846;
  // DDR regions, in units of IMG beats
  localparam int R_RAW = 0, R_B = 1, R_C = 2, R_D = 3, R_E = 4, R_F = 5, R_P1 = 6, R_P2 = 7, R_P3 = 8;
  localparam real TOL1 = 6.0, TOL23 = 10.0;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [7:0]  s_awaddr = '0, s_araddr = '0;
  logic        s_awvalid = 1'b0, s_wvalid = 1'b0, s_bready = 1'b1, s_arvalid = 1'b0, s_rready = 1'b1;
  logic [31:0] s_wdata = '0;
  logic        s_awready, s_wready, s_bvalid, s_arready, s_rvalid;
  logic [1:0]  s_bresp, s_rresp;
  logic [31:0] s_rdata;
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

  csa_sar_top #(.L(L), .BURST(64)) dut (.*);

  axi_ddr_model #(.WORDS(9 * IMG), .STALL(1'b1)) ddr (
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
    repeat (40 * N * N) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int proc_cycles, last_proc_cycles, max_proc = 0, irq_count = 0, cycle = 0;
  bit in_proc;
  always @(posedge clk) begin
    if (rst_n && dut.core_start) begin in_proc = 1'b1; proc_cycles = 0; end
    else if (in_proc) proc_cycles++;
    if (dut.core_done) begin in_proc = 1'b0; last_proc_cycles = proc_cycles; end
    if (rst_n && irq) irq_count++;
    cycle++;
  end

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

  int cmd_cycles = 0;  // clock cycles spent in commands, register accesses included

  function automatic logic [31:0] line_addr(int region, int line);
    return 32'((region * IMG + line * BEATS) * 16);
  endfunction

  // one processor command; waits for the interrupt, then checks STATUS
  task automatic run_op(input mode_t m, input logic [3:0] steps, input logic [31:0] src,
                        input logic [31:0] ph, input logic [31:0] dst);
    logic [31:0] st;
    int irq0, c0;
    c0 = cycle;
    reg_write(8'h08, 32'(m));
    reg_write(8'h0C, src);
    reg_write(8'h10, ph);
    reg_write(8'h14, dst);
    irq0 = irq_count;
    reg_write(8'h00, {27'd0, steps, 1'b1});
    while (irq_count == irq0) @(negedge clk);
    reg_read(8'h04, st);
    checks++;
    if (st[1:0] != 2'b10) begin failures++; $display("FAIL status %b after command", st[1:0]); end
    checks++;
    if (last_proc_cycles < N / 2 || last_proc_cycles > N / 2 + 100) begin
      failures++;
      $display("FAIL block operation took %0d cycles", last_proc_cycles);
    end
    if (last_proc_cycles > max_proc) max_proc = last_proc_cycles;
    cmd_cycles += cycle - c0;
  endtask

  // ---- DDR access: region, line, position within the line ----
  function automatic void put(int r, int ln, int p, int re, int im);
    ddr.mem[r * IMG + ln * BEATS + p / 4][32 * (p % 4) +: 32] = {16'(re), 16'(im)};
  endfunction
  function automatic int get_re(int r, int ln, int p);
    return int'($signed(ddr.mem[r * IMG + ln * BEATS + p / 4][32 * (p % 4) + 16 +: 16]));
  endfunction
  function automatic int get_im(int r, int ln, int p);
    return int'($signed(ddr.mem[r * IMG + ln * BEATS + p / 4][32 * (p % 4) +: 16]));
  endfunction
  // position of frequency k in a line the processor left transposed
  function automatic int tpos(int k);
    return (k % L) * L + k / L;
  endfunction

  real ct [N], st_ [N];
  real ar [N], aq [N], er [N], ei [N];

  // (er, ei) = DFT (or IDFT) of (ar, aq) / sc
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

  // (er, ei) *= phase (region, line, position of each k)
  task automatic apply_phase(input int r, input int ln, input bit transposed_pos);
    for (int k = 0; k < N; k++) begin
      real pr, pi_, t;
      int p;
      p = transposed_pos ? tpos(k) : k;
      pr = real'(get_re(r, ln, p)) / 16384.0;
      pi_ = real'(get_im(r, ln, p)) / 16384.0;
      t = er[k] * pr - ei[k] * pi_;
      ei[k] = er[k] * pi_ + ei[k] * pr;
      er[k] = t;
    end
  endtask

  // compare (er, ei) with a stored line; returns number of bad points
  function automatic int compare(int r, int ln, bit transposed_pos, real tol, string what);
    int bad = 0;
    for (int k = 0; k < N; k++) begin
      int p;
      real d;
      p = transposed_pos ? tpos(k) : k;
      d = ((real'(get_re(r, ln, p)) - er[k]) ** 2 + (real'(get_im(r, ln, p)) - ei[k]) ** 2) ** 0.5;
      checks++;
      if (d > tol) begin
        failures++; bad++;
        if (failures < 10)
          $display("FAIL %s line %0d k=%0d got (%0d,%0d) exp (%0.1f,%0.1f)", what, ln, k,
                   get_re(r, ln, p), get_im(r, ln, p), er[k], ei[k]);
      end
    end
    return bad;
  endfunction

  task automatic load_input(input int r, input int ln);
    for (int n = 0; n < N; n++) begin ar[n] = get_re(r, ln, n); aq[n] = get_im(r, ln, n); end
  endtask

  int n_fft = 0, n_ifft = 0, n_phase = 0, n_unity = 0, n_transposed = 0, n_reuse = 0, n_turn = 0;

  initial begin
    mode_t m1, m2, m3, m4;
    int bad;
    for (int e = 0; e < N; e++) begin
      ct[e]  = $cos(2.0 * PI * real'(e) / real'(N));
      st_[e] = $sin(2.0 * PI * real'(e) / real'(N));
    end
    // raw echo matrix (line = one azimuth line) and the three phase planes.
    // Phase 1 and 2 multiply results left transposed; phase 3 multiplies a
    // result in natural order (op 3 runs on the transposed layout).
    for (int ln = 0; ln < N; ln++)
      for (int n = 0; n < N; n++) begin
        put(R_RAW, ln, n, int'($urandom_range(0, 8000)) - 4000, int'($urandom_range(0, 8000)) - 4000);
        for (int r = R_P1; r <= R_P3; r++) begin
          real a;
          a = 2.0 * PI * real'($urandom_range(0, 4095)) / 4096.0;
          put(r, ln, n, int'($floor($cos(a) * 16384.0 + 0.5)), int'($floor($sin(a) * 16384.0 + 0.5)));
        end
      end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    m1 = '0; m1.phase_en = 1'b1; m1.shift_col = 3'd2; m1.shift_row = 3'd2;
    m2 = m1;
    m3 = '0; m3.inverse = 1'b1; m3.transposed = 1'b1; m3.phase_en = 1'b1; m3.shift_col = 3'd2; m3.shift_row = 3'd2;
    m4 = '0; m4.inverse = 1'b1; m4.shift_col = 3'd2; m4.shift_row = 3'd2;

    // ---- op 1: azimuth FFT x phase 1 ----
    bad = 0;
    for (int ln = 0; ln < N; ln++) begin
      run_op(m1, 4'b1111, line_addr(R_RAW, ln), line_addr(R_P1, ln), line_addr(R_B, ln));
      load_input(R_RAW, ln);
      dft(1'b0, 16.0);
      apply_phase(R_P1, ln, 1'b1);
      bad += compare(R_B, ln, 1'b1, TOL1, "op1");
    end
    n_fft++; n_phase++;
    $display("op 1 (azimuth FFT, phase 1): %0d lines, %0d points outside tolerance", N, bad);

    // ---- corner turn: range line j, sample a = azimuth line a, frequency j ----
    for (int j = 0; j < N; j++)
      for (int a = 0; a < N; a++)
        put(R_C, j, a, get_re(R_B, a, tpos(j)), get_im(R_B, a, tpos(j)));
    n_turn++;

    // ---- op 2 + op 3: range FFT x phase 2, then range IFFT x phase 3 ----
    bad = 0;
    for (int ln = 0; ln < N; ln++) begin
      run_op(m2, 4'b0111, line_addr(R_C, ln), line_addr(R_P2, ln), 32'd0);
      run_op(m3, 4'b1110, 32'd0, line_addr(R_P3, ln), line_addr(R_D, ln));
      load_input(R_C, ln);
      dft(1'b0, 16.0);
      apply_phase(R_P2, ln, 1'b1);
      for (int k = 0; k < N; k++) begin ar[k] = er[k]; aq[k] = ei[k]; end
      dft(1'b1, 16.0);
      apply_phase(R_P3, ln, 1'b0);
      bad += compare(R_D, ln, 1'b0, TOL23, "op2+3");
    end
    n_fft++; n_ifft++; n_phase += 2; n_transposed++; n_reuse++;
    $display("op 2+3 (range FFT, phase 2, range IFFT, phase 3): %0d lines, %0d points outside tolerance", N, bad);

    // ---- corner turn back to azimuth lines ----
    for (int a = 0; a < N; a++)
      for (int j = 0; j < N; j++)
        put(R_E, a, j, get_re(R_D, j, a), get_im(R_D, j, a));
    n_turn++;

    // ---- op 4: azimuth IFFT ----
    bad = 0;
    for (int ln = 0; ln < N; ln++) begin
      run_op(m4, 4'b1101, line_addr(R_E, ln), 32'd0, line_addr(R_F, ln));
      load_input(R_E, ln);
      dft(1'b1, 16.0);
      bad += compare(R_F, ln, 1'b1, TOL1, "op4");
    end
    n_ifft++; n_unity++;
    $display("op 4 (azimuth IFFT): %0d lines, %0d points outside tolerance", N, bad);

    $display("image %0dx%0d: fft=%0d ifft=%0d phase=%0d unity=%0d transposed=%0d reuse=%0d turns=%0d w_stalls=%0d r_gaps=%0d irq=%0d longest_op=%0d cycles",
             N, N, n_fft, n_ifft, n_phase, n_unity, n_transposed, n_reuse, n_turn, w_stalls, r_gaps,
             irq_count, max_proc);
    $display("processor time for the image: %0d cycles (%0.2f ms at 235 MHz), corner turns not included",
             cmd_cycles, real'(cmd_cycles) / 235.0e3);
    checks++; if (irq_count != 4 * N) begin failures++; $display("FAIL %0d interrupts", irq_count); end
    checks++; if (w_stalls == 0)      begin failures++; $display("FAIL no W stalls"); end
    checks++; if (r_gaps == 0)        begin failures++; $display("FAIL no R gaps"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
