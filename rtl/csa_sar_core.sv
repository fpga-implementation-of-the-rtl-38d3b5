// csa_sar_core: the systolic-array unit of the chirp-scaling SAR processor.
//
// One "block operation" of the modified CSA flow on one N-point line
// (N = L*L, default 4096 = 64 x 64): column FFT, W_N multiplication, row FFT,
// phase compensation. Each length-L sub-FFT is itself split L = 4*Q
// (Q = 16 by default) and computed by the datapath
//   data cache -> LHS array (Q x 4 PEs, C_M1 X)
//              -> W_M multipliers (Q complex multipliers)
//              -> RHS array (Q x 4 PEs, C_M2 Y^t, rounding and scaling)
//              -> shared multipliers (4, W_N or phase function or 1)
//              -> data cache (in place)
// at four points per cycle, so a pass takes N/4 cycles plus the pipeline
// latency, and a block operation about N/2 cycles. The phase cache holds the
// phase function of the current CSA step, stored in the same matrix order
// as the results it multiplies.
//
// Host port (used only while busy = 0): four points per beat; quad q
// addresses the stored matrix row by row: elements [q/Q][4*(q%Q) + i],
// i = 0..3. host_sel = 0 selects the data cache, 1 the phase cache (write
// only). Reads return data one cycle after host_re.
// After an operation on a line loaded in natural order (element n at
// quad position n), frequency k sits at [k%L][k/L]: the result comes out
// transposed, and running the next operation with mode.transposed = 1 takes
// it as it is. Both caches are disabled while rst_n is low.
//
// From the source architecture: the order of the block operation, the array
// sizes, four N/4-word memories, and the shared multipliers serving both W_N
// and the phase function. This design's own: the bank mapping, the separate
// phase cache, the transposed-layout mode and the per-pass scaling.
module csa_sar_core import sar_pkg::*; #(
  parameter int unsigned L = 64  // sub-FFT length; the line has L*L points
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  mode_t                     mode,
  output logic                      busy,
  output logic                      done,
  // host port to the cache RAMs
  input  logic                      host_we,
  input  logic                      host_sel,
  input  logic                      host_re,
  input  logic [$clog2(L*L/4)-1:0]  host_addr,
  input  cplx_t                     host_wdata [4],
  output cplx_t                     host_rdata [4]
);
  localparam int unsigned Q    = L / 4;
  localparam int unsigned N    = L * L;
  localparam int unsigned LB   = $clog2(L);
  localparam int unsigned QB   = $clog2(Q);
  localparam int unsigned NB   = $clog2(N);
  localparam int unsigned TAGW = QB + 2;
  localparam int unsigned CW   = 8 * LB;  // write coordinates carried as a tag

  mode_t mode_q;
  pass_e pass;

  // ---- controller ----
  logic          rd_en, lhs_valid, rhs_valid, wr_fire;
  logic [LB-1:0] rd_r [4], rd_c [4], wr_r [4], wr_c [4];
  logic [TAGW-1:0] lhs_tag;
  logic [QB-1:0] rhs_idx;
  logic [NB-1:0] tw_exp [4];

  csa_controller #(.L(L)) u_ctrl (
    .clk, .rst_n, .start, .mode, .busy, .done, .mode_q, .pass,
    .rd_en, .rd_r, .rd_c, .lhs_valid, .lhs_tag,
    .rhs_valid, .rhs_idx, .tw_exp, .wr_r, .wr_c, .wr_fire
  );

  // ---- host coordinates ----
  logic [LB-1:0] h_r [4], h_c [4];
  always_comb begin
    for (int j = 0; j < 4; j++) begin
      h_r[j] = host_addr[$bits(host_addr)-1 -: LB];
      h_c[j] = {host_addr[QB-1:0], 2'(j)};
    end
  end

  // ---- data cache ----
  logic          d_we, d_re;
  logic [LB-1:0] d_wr_r [4], d_wr_c [4], d_rd_r [4], d_rd_c [4];
  cplx_t         d_wdata [4], d_rdata [4];
  cplx_t         sm_out [4];
  logic          sm_valid;
  logic [CW-1:0] sm_tag;

  always_comb begin
    // no cache access while reset is asserted
    d_we = rst_n && (busy ? sm_valid : (host_we && !host_sel));
    d_re = rst_n && (busy ? rd_en    : host_re);
    for (int j = 0; j < 4; j++) begin
      d_wr_r[j]  = busy ? sm_tag[(2*j)*LB +: LB]     : h_r[j];
      d_wr_c[j]  = busy ? sm_tag[(2*j+1)*LB +: LB]   : h_c[j];
      d_wdata[j] = busy ? sm_out[j] : host_wdata[j];
      d_rd_r[j]  = busy ? rd_r[j] : h_r[j];
      d_rd_c[j]  = busy ? rd_c[j] : h_c[j];
    end
  end
  assign wr_fire = sm_valid;

  cache_ram #(.L(L)) u_data (
    .clk, .we(d_we), .wr_r(d_wr_r), .wr_c(d_wr_c), .wdata(d_wdata),
    .re(d_re), .rd_r(d_rd_r), .rd_c(d_rd_c), .rdata(d_rdata)
  );
  assign host_rdata = d_rdata;

  // ---- phase cache ----
  cplx_t ph_rdata [4];
  coef_t ph_coef [4];
  cache_ram #(.L(L)) u_phase (
    .clk, .we(rst_n && host_we && host_sel && !busy), .wr_r(h_r), .wr_c(h_c), .wdata(host_wdata),
    .re(rst_n && rhs_valid), .rd_r(wr_r), .rd_c(wr_c), .rdata(ph_rdata)
  );
  always_comb for (int j = 0; j < 4; j++) ph_coef[j] = '{re: ph_rdata[j].re, im: ph_rdata[j].im};

  // ---- LHS array ----
  logic signed [DW-1:0]   x_re [4], x_im [4];
  logic                   l_v [Q];
  logic [TAGW-1:0]        l_t [Q];
  logic signed [DW+1:0]   l_re [Q], l_im [Q];

  always_comb for (int j = 0; j < 4; j++) begin
    x_re[j] = d_rdata[j].re;
    x_im[j] = d_rdata[j].im;
  end

  lhs_array #(.Q(Q), .W(DW), .TAGW(TAGW)) u_lhs (
    .clk, .rst_n, .inverse(mode_q.inverse), .in_valid(lhs_valid), .in_tag(lhs_tag),
    .x_re, .x_im, .row_valid(l_v), .row_tag(l_t), .y_re(l_re), .y_im(l_im)
  );

  // ---- W_M multipliers ----
  logic                 m_v [Q];
  logic [TAGW-1:0]      m_t [Q];
  logic signed [DW+1:0] m_re [Q], m_im [Q];

  wm_multiplier #(.Q(Q), .W(DW + 2), .TAGW(TAGW)) u_wm (
    .clk, .rst_n, .inverse(mode_q.inverse), .in_valid(l_v), .in_tag(l_t),
    .in_re(l_re), .in_im(l_im), .out_valid(m_v), .out_tag(m_t), .out_re(m_re), .out_im(m_im)
  );

  // ---- RHS array ----
  logic signed [DW-1:0] r_re [4], r_im [4];

  rhs_array #(.Q(Q), .W(DW + 2), .OW(DW), .TAGW(TAGW)) u_rhs (
    .clk, .rst_n, .inverse(mode_q.inverse),
    .shift(pass == PASS_COL ? mode_q.shift_col : mode_q.shift_row),
    .in_valid(m_v), .in_tag(m_t), .in_re(m_re), .in_im(m_im),
    .out_valid(rhs_valid), .out_idx(rhs_idx), .out_re(r_re), .out_im(r_im)
  );

  // ---- one register while the phase cache is read ----
  logic          p_v;
  cplx_t         p_d [4];
  logic [NB-1:0] p_e [4];
  logic [CW-1:0] p_t;
  sm_sel_e       sel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) p_v <= 1'b0;
    else        p_v <= rhs_valid;
  end

  always_ff @(posedge clk) begin
    for (int j = 0; j < 4; j++) begin
      p_d[j] <= '{re: r_re[j], im: r_im[j]};
      p_e[j] <= tw_exp[j];
      p_t[(2*j)*LB +: LB]   <= wr_r[j];
      p_t[(2*j+1)*LB +: LB] <= wr_c[j];
    end
  end

  assign sel = (pass == PASS_COL) ? SM_TWIDDLE : (mode_q.phase_en ? SM_PHASE : SM_UNITY);

  // ---- shared multipliers ----
  shared_multiplier #(.N(N), .TAGW(CW)) u_sm (
    .clk, .rst_n, .inverse(mode_q.inverse), .sel,
    .in_valid(p_v), .in_tag(p_t), .in_d(p_d), .in_exp(p_e), .in_ph(ph_coef),
    .out_valid(sm_valid), .out_tag(sm_tag), .out_d(sm_out)
  );
endmodule
