// csa_sar_top: the FPGA platform around the chirp-scaling SAR processor.
//
// The host processor programs the operation through an AXI4-Lite slave
// (csa_axil_regs): mode (FFT/IFFT, phase compensation on/off, stored layout,
// scaling), the DDR addresses of the input line, the phase function and the
// result, and the steps to run. The AXI4 master (axi_dma_master, 128-bit
// data, four points per beat) moves the line and the phase function from DDR
// into the cache RAMs of the processor core, starts the block operation and
// writes the result back. The transposes between CSA operations (the
// "corner turns" of the 2-D SAR matrix) are left to the host, as are the DDR
// controller and the DDR itself, which connect to the master port.
// A full CSA image takes four operations per line: azimuth FFT + first
// phase, range FFT + second phase, range IFFT + third phase (run on the
// cached result of the previous one, transposed layout, no DDR trip), and
// azimuth IFFT with phase compensation off.
module csa_sar_top import sar_pkg::*; #(
  parameter int unsigned L     = 64,   // line length is L*L (4096)
  parameter int unsigned BURST = 256
) (
  input  logic         clk,
  input  logic         rst_n,
  // AXI4-Lite slave (host)
  input  logic [7:0]   s_awaddr,
  input  logic         s_awvalid,
  output logic         s_awready,
  input  logic [31:0]  s_wdata,
  input  logic         s_wvalid,
  output logic         s_wready,
  output logic [1:0]   s_bresp,
  output logic         s_bvalid,
  input  logic         s_bready,
  input  logic [7:0]   s_araddr,
  input  logic         s_arvalid,
  output logic         s_arready,
  output logic [31:0]  s_rdata,
  output logic [1:0]   s_rresp,
  output logic         s_rvalid,
  input  logic         s_rready,
  // AXI4 master (DDR)
  output logic [31:0]  m_araddr,
  output logic [7:0]   m_arlen,
  output logic [2:0]   m_arsize,
  output logic [1:0]   m_arburst,
  output logic         m_arvalid,
  input  logic         m_arready,
  input  logic [127:0] m_rdata,
  input  logic [1:0]   m_rresp,
  input  logic         m_rlast,
  input  logic         m_rvalid,
  output logic         m_rready,
  output logic [31:0]  m_awaddr,
  output logic [7:0]   m_awlen,
  output logic [2:0]   m_awsize,
  output logic [1:0]   m_awburst,
  output logic         m_awvalid,
  input  logic         m_awready,
  output logic [127:0] m_wdata,
  output logic [15:0]  m_wstrb,
  output logic         m_wlast,
  output logic         m_wvalid,
  input  logic         m_wready,
  input  logic [1:0]   m_bresp,
  input  logic         m_bvalid,
  output logic         m_bready,
  // completion interrupt (one-cycle pulse)
  output logic         irq
);
  logic        start, busy, done;
  logic [3:0]  steps;
  mode_t       mode;
  logic [31:0] src_addr, ph_addr, dst_addr;

  logic        core_start, core_busy, core_done;
  logic        host_we, host_sel, host_re;
  logic [$clog2(L*L/4)-1:0] host_addr;
  cplx_t       host_wdata [4], host_rdata [4];

  csa_axil_regs u_regs (
    .clk, .rst_n,
    .s_awaddr, .s_awvalid, .s_awready, .s_wdata, .s_wvalid, .s_wready,
    .s_bresp, .s_bvalid, .s_bready, .s_araddr, .s_arvalid, .s_arready,
    .s_rdata, .s_rresp, .s_rvalid, .s_rready,
    .start, .steps, .mode, .src_addr, .ph_addr, .dst_addr, .busy, .done
  );

  axi_dma_master #(.L(L), .BURST(BURST)) u_dma (
    .clk, .rst_n, .start, .steps, .src_addr, .ph_addr, .dst_addr, .busy, .done,
    .core_start, .core_done,
    .host_we, .host_sel, .host_re, .host_addr, .host_wdata, .host_rdata,
    .m_araddr, .m_arlen, .m_arsize, .m_arburst, .m_arvalid, .m_arready,
    .m_rdata, .m_rresp, .m_rlast, .m_rvalid, .m_rready,
    .m_awaddr, .m_awlen, .m_awsize, .m_awburst, .m_awvalid, .m_awready,
    .m_wdata, .m_wstrb, .m_wlast, .m_wvalid, .m_wready,
    .m_bresp, .m_bvalid, .m_bready
  );

  csa_sar_core #(.L(L)) u_core (
    .clk, .rst_n, .start(core_start), .mode, .busy(core_busy), .done(core_done),
    .host_we, .host_sel, .host_re, .host_addr, .host_wdata, .host_rdata
  );

  assign irq = done;

  // the DMA only touches the caches while the core is idle
  assert property (@(posedge clk) disable iff (!rst_n) core_busy |-> !(host_we || host_re))
    else $error("csa_sar_top: cache access while the core is busy");
endmodule
