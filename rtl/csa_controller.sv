// csa_controller: sequencer and address generator of one block operation.
//
// A block operation transforms one N-point line (N = L*L, Q = L/4) held in
// the data cache as an L x L matrix, in two passes:
//   column pass: L sub-FFTs of length L, one per column, results multiplied
//                by W_N^(n1*k2) and written back in place;
//   row pass:    L sub-FFTs of length L, one per row, results multiplied by
//                the phase function (or by 1) and written back in place.
// The read side issues one four-point read per cycle: sub-FFT s, step m
// (0..Q-1) reads the elements m, m+Q, m+2Q, m+3Q of the column (or row) s.
// L*Q = N/4 cycles per pass. One cycle later (memory latency) the samples go
// to the LHS array with the tag {first, last, m}.
// The write side follows the RHS output (out_valid, out_idx = d): output
// d of sub-FFT s holds frequencies d + Q*j, j = 0..3, which are written back
// to the same column (row) s. For them this module produces the W_N
// exponents, the phase-cache read coordinates and the write coordinates,
// all combinationally from the RHS output. A pass ends when all N/4 writes
// have been made; the row pass only starts then, since it reads what the
// column pass wrote. With mode.transposed = 1 rows and columns of the stored
// matrix swap roles, so a line left in the cache by one operation (stored
// transposed) can be processed again without moving it.
// start is taken in IDLE only; done is a one-cycle pulse at the end.
module csa_controller import sar_pkg::*; #(
  parameter int unsigned L = 64
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  mode_t                 mode,
  output logic                  busy,
  output logic                  done,
  output mode_t                 mode_q,     // mode latched at start
  output pass_e                 pass,
  // read side
  output logic                  rd_en,
  output logic [$clog2(L)-1:0]  rd_r [4],
  output logic [$clog2(L)-1:0]  rd_c [4],
  output logic                  lhs_valid,
  output logic [$clog2(L/4)+1:0] lhs_tag,   // {first, last, m}
  // write side
  input  logic                  rhs_valid,
  input  logic [$clog2(L/4)-1:0] rhs_idx,
  output logic [$clog2(L*L)-1:0] tw_exp [4],
  output logic [$clog2(L)-1:0]  wr_r [4],
  output logic [$clog2(L)-1:0]  wr_c [4],
  input  logic                  wr_fire     // a four-point write happened
);
  localparam int unsigned Q  = L / 4;
  localparam int unsigned LB = $clog2(L);
  localparam int unsigned QB = $clog2(Q);
  localparam int unsigned NB = $clog2(L * L);
  localparam int unsigned WB = $clog2(L * Q);

  typedef enum logic [2:0] {S_IDLE, S_COL, S_COL_WAIT, S_ROW, S_ROW_WAIT} state_e;
  state_e state;

  logic [LB-1:0] rs;      // read: sub-FFT
  logic [QB-1:0] rm;      // read: step
  logic [LB-1:0] ws;      // write side: sub-FFT
  logic [WB-1:0] wcnt;    // writes done in this pass
  logic          reading;
  logic          rd_last;
  logic          wr_last;

  assign reading = (state == S_COL) || (state == S_ROW);
  assign rd_last = (rs == LB'(L - 1)) && (rm == QB'(Q - 1));
  assign wr_last = wr_fire && (wcnt == WB'(L * Q - 1));
  assign busy    = (state != S_IDLE);
  assign pass    = ((state == S_ROW) || (state == S_ROW_WAIT)) ? PASS_ROW : PASS_COL;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      rs        <= '0;
      rm        <= '0;
      ws        <= '0;
      wcnt      <= '0;
      done      <= 1'b0;
      mode_q    <= '0;
      lhs_valid <= 1'b0;
      lhs_tag   <= '0;
    end else begin
      done      <= 1'b0;
      lhs_valid <= reading;
      lhs_tag   <= {rm == '0, rm == QB'(Q - 1), rm};
      if (reading) begin
        rm <= rm + 1'b1;
        if (rm == QB'(Q - 1)) rs <= rs + 1'b1;
      end
      if (rhs_valid && rhs_idx == QB'(Q - 1)) ws <= ws + 1'b1;
      if (wr_fire) wcnt <= wcnt + 1'b1;
      unique case (state)
        S_IDLE: if (start) begin
          mode_q <= mode;
          rs <= '0; rm <= '0; ws <= '0; wcnt <= '0;
          state <= S_COL;
        end
        S_COL:      if (rd_last) state <= S_COL_WAIT;
        S_COL_WAIT: if (wr_last) begin
          rs <= '0; rm <= '0; ws <= '0; wcnt <= '0;
          state <= S_ROW;
        end
        S_ROW:      if (rd_last) state <= S_ROW_WAIT;
        S_ROW_WAIT: if (wr_last) begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // coordinates: logical (a, b) -> stored [r][c]
  always_comb begin
    rd_en = reading;
    for (int j = 0; j < 4; j++) begin
      logic [LB-1:0] a, b, k;
      // read side
      k = LB'(rm) + LB'(Q * j);
      if (pass == PASS_COL) begin a = k;  b = rs; end
      else                  begin a = rs; b = k;  end
      rd_r[j] = mode_q.transposed ? b : a;
      rd_c[j] = mode_q.transposed ? a : b;
      // write side
      k = LB'(rhs_idx) + LB'(Q * j);
      if (pass == PASS_COL) begin a = k;  b = ws; end
      else                  begin a = ws; b = k;  end
      wr_r[j] = mode_q.transposed ? b : a;
      wr_c[j] = mode_q.transposed ? a : b;
      tw_exp[j] = NB'(ws) * NB'(k);
    end
  end

  // a write can only follow an RHS output of the same pass
  assert property (@(posedge clk) disable iff (!rst_n) (state == S_IDLE) |-> !rhs_valid)
    else $error("csa_controller: RHS output while idle");
endmodule
