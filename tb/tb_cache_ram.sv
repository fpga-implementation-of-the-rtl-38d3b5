// tb_cache_ram: fills the L x L matrix (L = 16) four neighbours at a time
// along rows, reads it back along columns in the processor's pattern (four
// elements Q apart), rewrites it along columns in that pattern and reads it
// back along rows and four neighbours down a column. Every word read must be
// the one written, one cycle after the address.
module tb_cache_ram;
  import sar_pkg::*;
  localparam int L = 16, Q = L / 4;
  logic clk = 1'b0, we = 1'b0, re = 1'b0;
  logic [3:0] wr_r [4], wr_c [4], rd_r [4], rd_c [4];
  cplx_t wdata [4], rdata [4];
  cplx_t ref_m [L][L];
  int checks = 0, failures = 0;

  cache_ram #(.L(L)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr4(input int r [4], input int c [4]);
    @(negedge clk);
    we = 1'b1;
    for (int j = 0; j < 4; j++) begin
      wr_r[j] = 4'(r[j]); wr_c[j] = 4'(c[j]);
      wdata[j] = cplx_t'($urandom);
      ref_m[r[j]][c[j]] = wdata[j];
    end
    @(negedge clk);
    we = 1'b0;
  endtask

  task automatic rd4(input int r [4], input int c [4]);
    @(negedge clk);
    re = 1'b1;
    for (int j = 0; j < 4; j++) begin rd_r[j] = 4'(r[j]); rd_c[j] = 4'(c[j]); end
    @(negedge clk);
    re = 1'b0;
    for (int j = 0; j < 4; j++) begin
      checks++;
      if (rdata[j] != ref_m[r[j]][c[j]]) begin
        failures++;
        if (failures < 8) $display("FAIL [%0d][%0d] got %h exp %h", r[j], c[j], rdata[j], ref_m[r[j]][c[j]]);
      end
    end
  endtask

  initial begin
    int r [4], c [4];
    // rows, neighbours
    for (int a = 0; a < L; a++) for (int q = 0; q < Q; q++) begin
      for (int j = 0; j < 4; j++) begin r[j] = a; c[j] = 4 * q + j; end
      wr4(r, c);
    end
    // columns, Q apart
    for (int b = 0; b < L; b++) for (int m = 0; m < Q; m++) begin
      for (int j = 0; j < 4; j++) begin r[j] = m + Q * j; c[j] = b; end
      rd4(r, c);
    end
    // rewrite along columns, Q apart
    for (int b = 0; b < L; b++) for (int m = 0; m < Q; m++) begin
      for (int j = 0; j < 4; j++) begin r[j] = m + Q * j; c[j] = b; end
      wr4(r, c);
    end
    // rows, Q apart
    for (int a = 0; a < L; a++) for (int m = 0; m < Q; m++) begin
      for (int j = 0; j < 4; j++) begin r[j] = a; c[j] = m + Q * j; end
      rd4(r, c);
    end
    // columns, neighbours
    for (int b = 0; b < L; b++) for (int q = 0; q < Q; q++) begin
      for (int j = 0; j < 4; j++) begin r[j] = 4 * q + j; c[j] = b; end
      rd4(r, c);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
