// sar_pkg: types, constants and helper functions shared by the chirp-scaling
// SAR processor.
//
// Samples are complex 16-bit fixed point (16-bit I and 16-bit Q, 32 bits per
// point, four points per 128-bit bus beat). Twiddle factors and phase-function
// values are 16-bit with 14 fraction bits, so +1.0 is 16384 and is exact.
//
// An N-point line (N = L*L) is held as an L x L matrix in four memory banks.
// Element [r][c] lives in bank (r/Q + r + c/Q + c) mod 4 at word r*Q + c/4,
// Q = L/4. With this mapping the four points the datapath needs in one cycle
// (a column step, a row step, or four neighbours of a host beat in either
// direction) always fall into four different banks. The mapping is a choice
// of this design; the document only states that there are four N/4 memories.
package sar_pkg;

  localparam int DW    = 16;  // width of I and of Q
  localparam int TW    = 16;  // width of twiddle and phase-function parts
  localparam int TFRAC = 14;  // fraction bits of twiddles (1.0 = 2**TFRAC)

  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;

  typedef struct packed {
    logic signed [TW-1:0] re;
    logic signed [TW-1:0] im;
  } coef_t;

  // Which half of the block operation is running.
  typedef enum logic {
    PASS_COL = 1'b0,  // column FFTs, followed by W_N multiplication
    PASS_ROW = 1'b1   // row FFTs, followed by phase compensation
  } pass_e;

  // What the shared multipliers multiply by.
  typedef enum logic [1:0] {
    SM_TWIDDLE = 2'd0,  // W_N^e from the internal table
    SM_PHASE   = 2'd1,  // phase-function value from the phase cache
    SM_UNITY   = 2'd2   // 1.0 (plain FFT, no phase compensation)
  } sm_sel_e;

  // Operation mode, written by the host through the register interface.
  typedef struct packed {
    logic       inverse;     // 1: IFFT (conjugated twiddles), 0: FFT
    logic       phase_en;    // 1: multiply by the phase function after the row FFT
    logic       transposed;  // 1: element n of the line is at [n%L][n/L]
    logic [2:0] shift_col;   // right shift applied after the column FFT
    logic [2:0] shift_row;   // right shift applied after the row FFT
  } mode_t;

  // Bank holding matrix element [r][c].
  function automatic logic [1:0] bank_of(int unsigned r, int unsigned c, int unsigned q);
    return 2'((r / q + r + c / q + c) % 4);
  endfunction

  // Word inside the bank holding matrix element [r][c].
  function automatic int unsigned word_of(int unsigned r, int unsigned c, int unsigned q);
    return r * q + c / 4;
  endfunction

  // Round-to-nearest fixed-point value of sin(2*pi*k/n) with TFRAC fraction bits.
  function automatic logic signed [TW-1:0] sin_q(int k, int n);
    real v;
    v = $sin(2.0 * 3.14159265358979323846 * real'(k) / real'(n)) * real'(1 << TFRAC);
    return TW'($rtoi($floor(v + 0.5)));
  endfunction

endpackage
