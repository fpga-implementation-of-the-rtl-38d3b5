// tb_csa_axil_regs: AXI4-Lite writes and reads of every register; start
// must give one pulse with the step bits, be ignored while busy, and the
// done flag must set on done and clear on the next start.
module tb_csa_axil_regs;
  import sar_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] s_awaddr = '0, s_araddr = '0;
  logic s_awvalid = 1'b0, s_wvalid = 1'b0, s_bready = 1'b1, s_arvalid = 1'b0, s_rready = 1'b1;
  logic [31:0] s_wdata = '0, s_rdata;
  logic s_awready, s_wready, s_bvalid, s_arready, s_rvalid;
  logic [1:0] s_bresp, s_rresp;
  logic start, busy = 1'b0, done = 1'b0;
  logic [3:0] steps;
  mode_t mode;
  logic [31:0] src_addr, ph_addr, dst_addr;
  int checks = 0, failures = 0, nstart = 0;

  csa_axil_regs dut (.*);
  always #5 clk = ~clk;
  always @(negedge clk) if (start) nstart++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    s_awaddr = a; s_awvalid = 1'b1; s_wdata = d; s_wvalid = 1'b1;
    #1;
    while (!(s_awready && s_wready)) begin @(negedge clk); #1; end
    @(negedge clk);
    s_awvalid = 1'b0; s_wvalid = 1'b0;
    while (!s_bvalid) @(negedge clk);
  endtask

  task automatic rd_chk(input logic [7:0] a, input logic [31:0] exp);
    @(negedge clk);
    s_araddr = a; s_arvalid = 1'b1;
    #1;
    while (!s_arready) begin @(negedge clk); #1; end
    @(negedge clk);
    s_arvalid = 1'b0;
    while (!s_rvalid) @(negedge clk);
    checks++;
    if (s_rdata != exp) begin failures++; $display("FAIL reg %h got %h exp %h", a, s_rdata, exp); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wr(8'h08, 32'h0000_01FF);
    wr(8'h0C, 32'h1000_0000);
    wr(8'h10, 32'h2000_0040);
    wr(8'h14, 32'h3000_0080);
    rd_chk(8'h08, 32'h1FF);
    rd_chk(8'h0C, 32'h1000_0000);
    rd_chk(8'h10, 32'h2000_0040);
    rd_chk(8'h14, 32'h3000_0080);
    checks++;
    if (mode != mode_t'(9'h1FF) || src_addr != 32'h1000_0000 || ph_addr != 32'h2000_0040 || dst_addr != 32'h3000_0080) begin
      failures++; $display("FAIL register outputs");
    end
    wr(8'h00, 32'b1_0101);
    repeat (2) @(negedge clk);
    checks++;
    if (nstart != 1 || steps != 4'b1010) begin failures++; $display("FAIL start %0d steps %b", nstart, steps); end
    rd_chk(8'h00, 32'b1_0100);
    busy = 1'b1;
    rd_chk(8'h04, 32'h1);
    wr(8'h00, 32'b1);            // ignored while busy
    repeat (2) @(negedge clk);
    checks++;
    if (nstart != 1) begin failures++; $display("FAIL start while busy %0d", nstart); end
    @(negedge clk); busy = 1'b0; done = 1'b1;
    @(negedge clk); done = 1'b0;
    rd_chk(8'h04, 32'h2);
    wr(8'h00, 32'b1);
    rd_chk(8'h04, 32'h0);
    repeat (2) @(negedge clk);
    checks++;
    if (nstart != 2) begin failures++; $display("FAIL second start"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
