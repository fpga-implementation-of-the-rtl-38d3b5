// axi_ddr_model: behavioural AXI4 slave standing in for the DDR controller
// and DDR memory (testbench only, not synthesizable).
//
// 128-bit words, WORDS deep, byte address / 16 selects the word. INCR bursts.
// Read addresses are queued and answered in order; write addresses are
// queued and their data accepted in order; one B response per burst.
// With STALL = 1, arready/awready/wready and rvalid are withheld at random
// to exercise the master's handshakes. Counts of stalled cycles are exposed
// so that a testbench can check that stalls happened.
module axi_ddr_model #(
  parameter int WORDS = 4096,
  parameter bit STALL = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [31:0]  araddr,
  input  logic [7:0]   arlen,
  input  logic         arvalid,
  output logic         arready,
  output logic [127:0] rdata,
  output logic [1:0]   rresp,
  output logic         rlast,
  output logic         rvalid,
  input  logic         rready,
  input  logic [31:0]  awaddr,
  input  logic [7:0]   awlen,
  input  logic         awvalid,
  output logic         awready,
  input  logic [127:0] wdata,
  input  logic         wlast,
  input  logic         wvalid,
  output logic         wready,
  output logic [1:0]   bresp,
  output logic         bvalid,
  input  logic         bready,
  output int           w_stalls,
  output int           r_gaps
);
  logic [127:0] mem [WORDS];
  int ar_q [$], arl_q [$], aw_q [$], awl_q [$];
  int r_addr, r_left, w_addr, w_left;
  bit r_busy, w_busy;
  int b_pend;

  assign rresp = 2'b00;
  assign bresp = 2'b00;

  always @(posedge clk or negedge rst_n) begin
    int na, nl;
    bit nb;
    if (!rst_n) begin
      arready <= 1'b0; awready <= 1'b0; wready <= 1'b0;
      rvalid <= 1'b0; rlast <= 1'b0; bvalid <= 1'b0;
      r_busy <= 1'b0; w_busy <= 1'b0; b_pend <= 0;
      w_stalls <= 0; r_gaps <= 0;
    end else begin
      // address channels
      if (arvalid && arready) begin ar_q.push_back(int'(araddr >> 4)); arl_q.push_back(int'(arlen) + 1); end
      if (awvalid && awready) begin aw_q.push_back(int'(awaddr >> 4)); awl_q.push_back(int'(awlen) + 1); end
      arready <= STALL ? ($urandom_range(0, 3) != 0) : 1'b1;
      awready <= STALL ? ($urandom_range(0, 3) != 0) : 1'b1;

      // read data
      na = r_addr; nl = r_left; nb = r_busy;
      if (rvalid && rready) begin
        na++; nl--;
        if (nl == 0) nb = 1'b0;
      end
      if (!nb && ar_q.size() > 0) begin
        na = ar_q.pop_front(); nl = arl_q.pop_front(); nb = 1'b1;
      end
      if (rvalid && !rready) begin
        // hold the beat
      end else if (nb && (!STALL || $urandom_range(0, 4) != 0)) begin
        rvalid <= 1'b1;
        rdata  <= mem[na % WORDS];
        rlast  <= (nl == 1);
      end else begin
        rvalid <= 1'b0;
        if (nb) r_gaps <= r_gaps + 1;
      end
      r_addr <= na; r_left <= nl; r_busy <= nb;

      // write data
      if (!w_busy && aw_q.size() > 0) begin
        w_addr <= aw_q.pop_front();
        w_left <= awl_q.pop_front();
        w_busy <= 1'b1;
      end
      if (w_busy) begin
        if (wvalid && wready) begin
          mem[w_addr % WORDS] <= wdata;
          w_addr <= w_addr + 1;
          w_left <= w_left - 1;
          if (w_left == 1) begin
            w_busy <= 1'b0;
            b_pend <= b_pend + 1;
            if (!wlast) $error("axi_ddr_model: wlast missing at end of burst");
          end else if (wlast) $error("axi_ddr_model: early wlast");
        end
        if (wvalid && !wready) w_stalls <= w_stalls + 1;
        if (wvalid && wready && w_left == 1) wready <= 1'b0;
        else wready <= STALL ? ($urandom_range(0, 3) != 0) : 1'b1;
      end else begin
        wready <= 1'b0;
      end

      // write responses
      if (bvalid && bready) bvalid <= 1'b0;
      else if (!bvalid && b_pend > 0) begin
        bvalid <= 1'b1;
        b_pend <= b_pend - 1;
      end
    end
  end
endmodule
