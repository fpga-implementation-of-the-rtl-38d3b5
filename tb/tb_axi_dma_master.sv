// tb_axi_dma_master: the DMA sequencer against the DDR model (random
// stalls) and a model of the processor's cache port (lines of 256 points,
// 64 beats, bursts of 16). Command 1 runs all four steps: the data and phase
// caches must receive the DDR lines beat for beat, the processor must be
// started once, and the line stored to DDR must equal the cache content
// (which the processor model changes while "processing"). Command 2 runs
// only the store step: no load and no processor start may happen.
module tb_axi_dma_master;
  import sar_pkg::*;
  localparam int L = 16, BEATS = L * L / 4, BURST = 16;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [3:0] steps = '0;
  logic [31:0] src_addr, ph_addr, dst_addr;
  logic busy, done, core_start, core_done = 1'b0;
  logic host_we, host_sel, host_re;
  logic [5:0] host_addr;
  cplx_t host_wdata [4], host_rdata [4];
  logic [31:0] m_araddr, m_awaddr;
  logic [7:0] m_arlen, m_awlen;
  logic [2:0] m_arsize, m_awsize;
  logic [1:0] m_arburst, m_awburst, m_rresp, m_bresp;
  logic m_arvalid, m_arready, m_rlast, m_rvalid, m_rready;
  logic m_awvalid, m_awready, m_wlast, m_wvalid, m_wready, m_bvalid, m_bready;
  logic [127:0] m_rdata, m_wdata;
  logic [15:0] m_wstrb;
  int w_stalls, r_gaps;
  int checks = 0, failures = 0, n_core = 0, n_done = 0;
  logic [127:0] cache_d [BEATS], cache_p [BEATS];

  axi_dma_master #(.L(L), .BURST(BURST)) dut (.*);
  axi_ddr_model #(.WORDS(4 * BEATS), .STALL(1'b1)) ddr (
    .clk, .rst_n,
    .araddr(m_araddr), .arlen(m_arlen), .arvalid(m_arvalid), .arready(m_arready),
    .rdata(m_rdata), .rresp(m_rresp), .rlast(m_rlast), .rvalid(m_rvalid), .rready(m_rready),
    .awaddr(m_awaddr), .awlen(m_awlen), .awvalid(m_awvalid), .awready(m_awready),
    .wdata(m_wdata), .wlast(m_wlast), .wvalid(m_wvalid), .wready(m_wready),
    .bresp(m_bresp), .bvalid(m_bvalid), .bready(m_bready), .w_stalls, .r_gaps
  );
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // cache port model: writes at once, reads one cycle later
  always @(posedge clk) begin
    if (rst_n && host_we) begin
      if (host_sel) cache_p[host_addr] <= {host_wdata[3], host_wdata[2], host_wdata[1], host_wdata[0]};
      else          cache_d[host_addr] <= {host_wdata[3], host_wdata[2], host_wdata[1], host_wdata[0]};
    end
    if (host_re) for (int i = 0; i < 4; i++) host_rdata[i] <= cache_d[host_addr][32 * i +: 32];
  end

  // processor model: 30 cycles of "processing" inverting every word
  initial forever begin
    @(posedge clk);
    if (rst_n && core_start) begin
      n_core++;
      repeat (30) @(posedge clk);
      for (int b = 0; b < BEATS; b++) cache_d[b] = ~cache_d[b];
      core_done <= 1'b1;
      @(posedge clk);
      core_done <= 1'b0;
    end
  end
  always @(posedge clk) if (rst_n && done) n_done++;

  task automatic command(input logic [3:0] st);
    @(negedge clk);
    steps = st; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (busy) @(negedge clk);
    @(negedge clk);
  endtask

  initial begin
    src_addr = 32'(0 * BEATS * 16);
    ph_addr  = 32'(1 * BEATS * 16);
    dst_addr = 32'(2 * BEATS * 16);
    for (int w = 0; w < 4 * BEATS; w++) ddr.mem[w] = {$urandom, $urandom, $urandom, $urandom};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    command(4'b1111);
    for (int b = 0; b < BEATS; b++) begin
      checks++;
      if (cache_p[b] != ddr.mem[BEATS + b]) begin failures++; $display("FAIL phase beat %0d", b); end
      checks++;
      if (ddr.mem[2 * BEATS + b] != cache_d[b] || cache_d[b] != ~ddr.mem[b]) begin
        failures++; $display("FAIL data beat %0d", b);
      end
    end
    checks++;
    if (n_core != 1 || n_done != 1) begin failures++; $display("FAIL core starts %0d done %0d", n_core, n_done); end

    // store only, to region 3
    for (int b = 0; b < BEATS; b++) cache_d[b] = {$urandom, $urandom, $urandom, $urandom};
    dst_addr = 32'(3 * BEATS * 16);
    command(4'b1000);
    for (int b = 0; b < BEATS; b++) begin
      checks++;
      if (ddr.mem[3 * BEATS + b] != cache_d[b]) begin failures++; $display("FAIL store-only beat %0d", b); end
    end
    checks++;
    if (n_core != 1 || n_done != 2) begin failures++; $display("FAIL store-only started the core"); end
    checks++;
    if (w_stalls == 0 || r_gaps == 0) begin failures++; $display("FAIL no bus stalls exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
