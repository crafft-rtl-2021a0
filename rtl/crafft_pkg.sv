// crafft_pkg: types and row-layout helpers shared by the CRAFFT blocks.
//
// A compute tile is a bit array of ROWS x COLS cells. Every column holds one
// radix-2 butterfly, stored vertically: one row per bit of every operand
// ("transposed" layout). All numbers are two's complement, LSB in the lowest
// row of a field. The layout below is this design's own choice; the source
// only says that inputs, twiddle factors and outputs occupy rows of the
// column. Field sizes depend on WMAX (widest operand, input width plus one
// bit per FFT stage) and TW (twiddle width).
//
//   row 0          constant 0 in every column
//   row 1          constant 1 in every column
//   row 2          TMP: partial-product / negated operand bit
//   rows 3,4       C0/C1: carry, ping-pong between adjacent bit positions
//   rows 5,6       CN1/CN2: two copies of the inverted carry (MAJ5 inputs)
//   row 7          spare
//   X field        4 x WMAX rows: x_{2j} real, x_{2j} imag, x_{2j+1} real, x_{2j+1} imag
//   W field        2 x TW rows  : twiddle real, twiddle imag
//   Y field        4 x WMAX rows: y+ real, y- real, y+ imag, y- imag
//   ACC field      2 x (TW-2+WMAX) rows: ping-pong product accumulator
package crafft_pkg;

  // Gates a CRAM column can form (preset + threshold switching of the
  // output cell). Every gate reads up to five input rows and writes one row.
  typedef enum logic [2:0] {
    G_COPY  = 3'd0,
    G_NOT   = 3'd1,
    G_AND2  = 3'd2,
    G_NAND2 = 3'd3,
    G_MAJ3  = 3'd4,
    G_MAJ5  = 3'd5
  } gate_e;

  // Array access kinds.
  typedef enum logic [1:0] {
    A_NOP   = 2'd0,
    A_WRITE = 2'd1,   // memory write of one row (column masked)
    A_READ  = 2'd2,   // memory read of one row
    A_GATE  = 2'd3    // column-parallel logic gate
  } arr_op_e;

  // Commands from the global controller to a tile controller.
  typedef enum logic [1:0] {
    TC_NOP   = 2'd0,
    TC_WRITE = 2'd1,
    TC_READ  = 2'd2,
    TC_RUN   = 2'd3   // run one butterfly stage in every column
  } tile_cmd_e;

  // Fixed rows.
  localparam int R_ZERO = 0;
  localparam int R_ONE  = 1;
  localparam int R_TMP  = 2;
  localparam int R_C0   = 3;
  localparam int R_C1   = 4;
  localparam int R_CN1  = 5;
  localparam int R_CN2  = 6;
  localparam int R_X    = 8;

  // Fraction bits of a twiddle factor: Q2.(TW-2), so that +1 and -1 are exact.
  function automatic int twf(input int tw);
    return tw - 2;
  endfunction

  // slot 0 = x_{2j}, slot 1 = x_{2j+1}; part 0 = real, 1 = imaginary.
  function automatic int row_x(input int wmax, input int slot, input int part, input int b);
    return R_X + (slot * 2 + part) * wmax + b;
  endfunction

  function automatic int row_w(input int wmax, input int part, input int b, input int tw);
    return R_X + 4 * wmax + part * tw + b;
  endfunction

  // sign 0 = y_j (sum), sign 1 = y_{j+N/2} (difference).
  function automatic int row_y(input int wmax, input int tw, input int sgn, input int part,
                               input int b);
    return R_X + 4 * wmax + 2 * tw + (part * 2 + sgn) * wmax + b;
  endfunction

  function automatic int acc_width(input int wmax, input int tw);
    return twf(tw) + wmax;
  endfunction

  function automatic int row_acc(input int wmax, input int tw, input int sel, input int b);
    return R_X + 8 * wmax + 2 * tw + sel * acc_width(wmax, tw) + b;
  endfunction

  function automatic int rows_needed(input int wmax, input int tw);
    return row_acc(wmax, tw, 2, 0);
  endfunction

endpackage
