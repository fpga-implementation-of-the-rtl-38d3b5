// axi_dma_master: AXI4 master towards the DDR controller plus the sequencer
// of one processor command.
//
// A command (start with a set of step bits) runs, in this order, the steps
// that are selected:
//   load line   : read N/4 beats from DDR at src_addr into the data cache
//   load phase  : read N/4 beats from DDR at ph_addr into the phase cache
//   process     : start the block operation and wait for it to finish
//   store line  : write N/4 beats from the data cache to DDR at dst_addr
// Leaving out "load line" runs the next operation on the line already in the
// cache (modified CSA flow: the range IFFT follows the range FFT without a
// trip through DDR); leaving out "store" keeps the result there.
// The bus is 128 bits wide, four 32-bit points per beat: point i of a beat is
// bits [32i+31:32i], I in the upper 16 bits, Q in the lower. Beat b of a line
// is cache quad b. Transfers are INCR bursts of BURST beats (one burst in
// flight per direction at a time is not required: all addresses are issued
// back to back). Reads accept a beat every cycle. Writes prefetch from the
// cache into a two-entry queue so that a beat can leave every cycle while
// wready is high, and stall when it is low. done pulses once at the end.
module axi_dma_master import sar_pkg::*; #(
  parameter int unsigned L     = 64,   // line is L*L points
  parameter int unsigned BURST = 256   // beats per burst (AXI4 INCR limit)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // command
  input  logic                     start,
  input  logic [3:0]               steps,     // {store, process, load phase, load line}
  input  logic [31:0]              src_addr,
  input  logic [31:0]              ph_addr,
  input  logic [31:0]              dst_addr,
  output logic                     busy,
  output logic                     done,
  // processor
  output logic                     core_start,
  input  logic                     core_done,
  output logic                     host_we,
  output logic                     host_sel,
  output logic                     host_re,
  output logic [$clog2(L*L/4)-1:0] host_addr,
  output cplx_t                    host_wdata [4],
  input  cplx_t                    host_rdata [4],
  // AXI4 master, read
  output logic [31:0]              m_araddr,
  output logic [7:0]               m_arlen,
  output logic [2:0]               m_arsize,
  output logic [1:0]               m_arburst,
  output logic                     m_arvalid,
  input  logic                     m_arready,
  input  logic [127:0]             m_rdata,
  input  logic [1:0]               m_rresp,
  input  logic                     m_rlast,
  input  logic                     m_rvalid,
  output logic                     m_rready,
  // AXI4 master, write
  output logic [31:0]              m_awaddr,
  output logic [7:0]               m_awlen,
  output logic [2:0]               m_awsize,
  output logic [1:0]               m_awburst,
  output logic                     m_awvalid,
  input  logic                     m_awready,
  output logic [127:0]             m_wdata,
  output logic [15:0]              m_wstrb,
  output logic                     m_wlast,
  output logic                     m_wvalid,
  input  logic                     m_wready,
  input  logic [1:0]               m_bresp,
  input  logic                     m_bvalid,
  output logic                     m_bready
);
  localparam int unsigned BEATS  = L * L / 4;
  localparam int unsigned BL     = (BEATS < BURST) ? BEATS : BURST;
  localparam int unsigned NBUR   = BEATS / BL;
  localparam int unsigned BB     = $clog2(BEATS + 1);
  localparam int unsigned HB     = $clog2(BEATS);

  typedef enum logic [2:0] {D_IDLE, D_LOAD, D_PHASE, D_PROC, D_STORE, D_DONE} dstate_e;
  dstate_e state;
  logic [3:0]  steps_q;
  logic [BB-1:0] a_cnt;   // addresses issued (in beats)
  logic [BB-1:0] r_cnt;   // read beats received
  logic [BB-1:0] i_cnt;   // cache reads issued for writing
  logic [BB-1:0] w_cnt;   // write beats sent
  logic [$clog2(NBUR+1)-1:0] b_cnt;  // write responses
  logic        proc_started;
  logic [31:0] base;

  // write prefetch queue
  logic [127:0] wq [2];
  logic [1:0]   wq_n;
  logic         wq_rd, wq_wr;
  logic         pend;

  assign busy = (state != D_IDLE);
  assign base = (state == D_PHASE) ? ph_addr : (state == D_STORE) ? dst_addr : src_addr;

  // ---- address channels ----
  assign m_arvalid = ((state == D_LOAD) || (state == D_PHASE)) && (a_cnt < BB'(BEATS));
  assign m_araddr  = base + 32'(a_cnt) * 32'd16;
  assign m_arlen   = 8'(BL - 1);
  assign m_arsize  = 3'd4;
  assign m_arburst = 2'b01;
  assign m_awvalid = (state == D_STORE) && (a_cnt < BB'(BEATS));
  assign m_awaddr  = base + 32'(a_cnt) * 32'd16;
  assign m_awlen   = 8'(BL - 1);
  assign m_awsize  = 3'd4;
  assign m_awburst = 2'b01;

  // ---- read data -> cache ----
  assign m_rready = (state == D_LOAD) || (state == D_PHASE);

  // ---- cache -> write data ----
  assign wq_rd    = (state == D_STORE) && (i_cnt < BB'(BEATS)) && (32'(wq_n) + 32'(pend) < 2);
  assign wq_wr    = pend;
  assign m_wvalid = (wq_n != 2'd0);
  assign m_wdata  = wq[0];
  assign m_wstrb  = '1;
  assign m_wlast  = (32'(w_cnt) % BL) == BL - 1;
  assign m_bready = 1'b1;

  always_comb begin
    host_we   = m_rvalid && m_rready;
    host_sel  = (state == D_PHASE);
    host_re   = wq_rd;
    host_addr = host_we ? HB'(r_cnt) : HB'(i_cnt);
    for (int i = 0; i < 4; i++) host_wdata[i] = m_rdata[32*i +: 32];
  end

  always_ff @(posedge clk) begin
    if (wq_wr) begin
      if (m_wvalid && m_wready) begin
        if (wq_n == 2'd1) wq[0] <= {host_rdata[3], host_rdata[2], host_rdata[1], host_rdata[0]};
        else              wq[1] <= {host_rdata[3], host_rdata[2], host_rdata[1], host_rdata[0]};
        if (wq_n == 2'd2) wq[0] <= wq[1];
      end else begin
        wq[wq_n[0]] <= {host_rdata[3], host_rdata[2], host_rdata[1], host_rdata[0]};
      end
    end else if (m_wvalid && m_wready) begin
      wq[0] <= wq[1];
    end
  end

  function automatic dstate_e next_step(dstate_e from, logic [3:0] st);
    if (from < D_LOAD   && st[0]) return D_LOAD;
    if (from < D_PHASE  && st[1]) return D_PHASE;
    if (from < D_PROC   && st[2]) return D_PROC;
    if (from < D_STORE  && st[3]) return D_STORE;
    return D_DONE;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= D_IDLE;
      steps_q      <= '0;
      a_cnt        <= '0;
      r_cnt        <= '0;
      i_cnt        <= '0;
      w_cnt        <= '0;
      b_cnt        <= '0;
      wq_n         <= '0;
      pend         <= 1'b0;
      proc_started <= 1'b0;
      core_start   <= 1'b0;
      done         <= 1'b0;
    end else begin
      core_start <= 1'b0;
      done       <= 1'b0;
      pend       <= wq_rd;
      if ((m_arvalid && m_arready) || (m_awvalid && m_awready)) a_cnt <= a_cnt + BB'(BL);
      if (host_we) r_cnt <= r_cnt + 1'b1;
      if (wq_rd) i_cnt <= i_cnt + 1'b1;
      if (m_wvalid && m_wready) w_cnt <= w_cnt + 1'b1;
      if (m_bvalid) b_cnt <= b_cnt + 1'b1;
      wq_n <= wq_n + 2'(wq_wr) - 2'(m_wvalid && m_wready);

      unique case (state)
        D_IDLE: if (start) begin
          steps_q <= steps;
          state   <= next_step(D_IDLE, steps);
        end
        D_LOAD, D_PHASE: if (host_we && r_cnt == BB'(BEATS - 1)) begin
          a_cnt <= '0;
          r_cnt <= '0;
          state <= next_step(state, steps_q);
        end
        D_PROC: begin
          if (!proc_started) begin
            core_start   <= 1'b1;
            proc_started <= 1'b1;
          end else if (core_done) begin
            proc_started <= 1'b0;
            state        <= next_step(D_PROC, steps_q);
          end
        end
        D_STORE: if (m_bvalid && b_cnt == ($bits(b_cnt))'(NBUR - 1)) begin
          a_cnt <= '0;
          i_cnt <= '0;
          w_cnt <= '0;
          b_cnt <= '0;
          state <= D_DONE;
        end
        D_DONE: begin
          done  <= 1'b1;
          state <= D_IDLE;
        end
        default: state <= D_IDLE;
      endcase
    end
  end

  // AXI rule: a valid address is held until it is accepted
  assert property (@(posedge clk) disable iff (!rst_n)
                   (m_arvalid && !m_arready) |=> (m_arvalid && $stable(m_araddr)))
    else $error("axi_dma_master: AR changed before it was accepted");
  assert property (@(posedge clk) disable iff (!rst_n)
                   (m_wvalid && !m_wready) |=> (m_wvalid && $stable(m_wdata)))
    else $error("axi_dma_master: W changed before it was accepted");
endmodule
