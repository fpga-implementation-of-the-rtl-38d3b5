// cache_ram: the four N/4-word memories that hold one N-point line.
//
// The line is seen as an L x L matrix (N = L*L, Q = L/4); element [r][c] is
// stored in bank (r/Q + r + c/Q + c) mod 4 at word r*Q + c/4 (see sar_pkg).
// Every access moves four elements, one per lane; the caller addresses each
// lane by its matrix coordinates and this module routes the lanes to the
// banks and back. The access patterns of the processor (four elements Q
// apart along a row or a column) and of the host port (four neighbours along
// a row or a column) always hit four different banks; an assertion checks it.
// One write port and one read port, both four lanes wide; reads return data
// one cycle after the address (registered, block-RAM style). A read and a
// write of the same word in one cycle return the old word.
module cache_ram import sar_pkg::*; #(
  parameter int unsigned L = 64  // matrix side; the line holds L*L points
) (
  input  logic                  clk,
  input  logic                  we,
  input  logic [$clog2(L)-1:0]  wr_r [4],
  input  logic [$clog2(L)-1:0]  wr_c [4],
  input  cplx_t                 wdata [4],
  input  logic                  re,
  input  logic [$clog2(L)-1:0]  rd_r [4],
  input  logic [$clog2(L)-1:0]  rd_c [4],
  output cplx_t                 rdata [4]
);
  localparam int unsigned Q  = L / 4;
  localparam int unsigned D  = L * Q;  // words per bank = N/4
  localparam int unsigned AB = $clog2(D);

  cplx_t mem [4][D];

  logic [1:0]    wb [4], rb [4];
  logic [AB-1:0] wa [4], ra [4];
  logic [1:0]    rb_q [4];
  cplx_t         bank_q [4];

  always_comb begin
    for (int j = 0; j < 4; j++) begin
      wb[j] = bank_of(32'(wr_r[j]), 32'(wr_c[j]), Q);
      wa[j] = AB'(word_of(32'(wr_r[j]), 32'(wr_c[j]), Q));
      rb[j] = bank_of(32'(rd_r[j]), 32'(rd_c[j]), Q);
      ra[j] = AB'(word_of(32'(rd_r[j]), 32'(rd_c[j]), Q));
    end
  end

  // lanes -> banks
  for (genvar b = 0; b < 4; b++) begin : g_bank
    logic          b_we;
    logic [AB-1:0] b_wa, b_ra;
    cplx_t         b_wd;
    always_comb begin
      b_we = 1'b0;
      b_wa = '0;
      b_wd = '0;
      b_ra = '0;
      for (int j = 0; j < 4; j++) begin
        if (wb[j] == 2'(b)) begin
          b_we = we;
          b_wa = wa[j];
          b_wd = wdata[j];
        end
        if (rb[j] == 2'(b)) b_ra = ra[j];
      end
    end
    always_ff @(posedge clk) begin
      if (b_we) mem[b][b_wa] <= b_wd;
      if (re)   bank_q[b] <= mem[b][b_ra];
    end
  end

  // banks -> lanes
  always_ff @(posedge clk) begin
    if (re) rb_q <= rb;
  end

  always_comb begin
    for (int j = 0; j < 4; j++) rdata[j] = bank_q[rb_q[j]];
  end

  // the four lanes of one access must use four different banks
  always_ff @(posedge clk) begin
    if (we) assert ((wb[0] != wb[1]) && (wb[0] != wb[2]) && (wb[0] != wb[3]) &&
                    (wb[1] != wb[2]) && (wb[1] != wb[3]) && (wb[2] != wb[3]))
      else $error("cache_ram: write lanes collide in one bank");
    if (re) assert ((rb[0] != rb[1]) && (rb[0] != rb[2]) && (rb[0] != rb[3]) &&
                    (rb[1] != rb[2]) && (rb[1] != rb[3]) && (rb[2] != rb[3]))
      else $error("cache_ram: read lanes collide in one bank");
  end
endmodule
