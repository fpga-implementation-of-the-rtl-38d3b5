// csa_axil_regs: AXI4-Lite slave through which the host processor controls
// the SAR processor, holding the operation-mode register.
//
// Register map (32-bit words, byte offsets):
//   0x00 CTRL     W: bit0 start (self-clearing pulse), bits 4:1 the steps to
//                 run: bit1 load line from DDR, bit2 load phase function,
//                 bit3 process (block operation), bit4 store line to DDR.
//                 R: the step bits last written.
//   0x04 STATUS   R: bit0 busy, bit1 done (set at the end, cleared by start)
//   0x08 MODE     R/W: bits 8:0 = sar_pkg::mode_t {inverse, phase_en,
//                 transposed, shift_col[2:0], shift_row[2:0]}
//   0x0C SRC      R/W: DDR byte address of the input line
//   0x10 PHASE    R/W: DDR byte address of the phase function
//   0x14 DST      R/W: DDR byte address for the result line
// A write is taken when address and data are both valid and no response is
// pending; byte strobes are ignored (full-word writes). Reads answer one
// cycle after the address. Responses are always OKAY.
module csa_axil_regs import sar_pkg::*; (
  input  logic        clk,
  input  logic        rst_n,
  // AXI4-Lite slave
  input  logic [7:0]  s_awaddr,
  input  logic        s_awvalid,
  output logic        s_awready,
  input  logic [31:0] s_wdata,
  input  logic        s_wvalid,
  output logic        s_wready,
  output logic [1:0]  s_bresp,
  output logic        s_bvalid,
  input  logic        s_bready,
  input  logic [7:0]  s_araddr,
  input  logic        s_arvalid,
  output logic        s_arready,
  output logic [31:0] s_rdata,
  output logic [1:0]  s_rresp,
  output logic        s_rvalid,
  input  logic        s_rready,
  // to the DMA sequencer
  output logic        start,
  output logic [3:0]  steps,
  output mode_t       mode,
  output logic [31:0] src_addr,
  output logic [31:0] ph_addr,
  output logic [31:0] dst_addr,
  input  logic        busy,
  input  logic        done
);
  logic done_flag;
  logic wr_go, rd_go;

  assign wr_go     = s_awvalid && s_wvalid && !s_bvalid;
  assign s_awready = wr_go;
  assign s_wready  = wr_go;
  assign rd_go     = s_arvalid && !s_rvalid;
  assign s_arready = rd_go;
  assign s_bresp   = 2'b00;
  assign s_rresp   = 2'b00;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_bvalid  <= 1'b0;
      s_rvalid  <= 1'b0;
      s_rdata   <= '0;
      start     <= 1'b0;
      steps     <= '0;
      mode      <= '0;
      src_addr  <= '0;
      ph_addr   <= '0;
      dst_addr  <= '0;
      done_flag <= 1'b0;
    end else begin
      start <= 1'b0;
      if (done) done_flag <= 1'b1;
      if (s_bvalid && s_bready) s_bvalid <= 1'b0;
      if (s_rvalid && s_rready) s_rvalid <= 1'b0;
      if (wr_go) begin
        s_bvalid <= 1'b1;
        unique case (s_awaddr[7:2])
          6'h0: begin
            steps <= s_wdata[4:1];
            if (s_wdata[0] && !busy) begin
              start     <= 1'b1;
              done_flag <= 1'b0;
            end
          end
          6'h2: mode     <= mode_t'(s_wdata[$bits(mode_t)-1:0]);
          6'h3: src_addr <= s_wdata;
          6'h4: ph_addr  <= s_wdata;
          6'h5: dst_addr <= s_wdata;
          default: ;
        endcase
      end
      if (rd_go) begin
        s_rvalid <= 1'b1;
        unique case (s_araddr[7:2])
          6'h0:    s_rdata <= {27'd0, steps, 1'b0};
          6'h1:    s_rdata <= {30'd0, done_flag, busy};
          6'h2:    s_rdata <= 32'(mode);
          6'h3:    s_rdata <= src_addr;
          6'h4:    s_rdata <= ph_addr;
          6'h5:    s_rdata <= dst_addr;
          default: s_rdata <= '0;
        endcase
      end
    end
  end
endmodule
