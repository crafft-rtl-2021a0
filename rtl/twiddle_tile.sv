// twiddle_tile: the Twiddle tile, memory of the precomputed powers of w.
//
// It holds w^e = exp(-2*pi*i*e/N) for e in [0, N/2), real and imaginary part
// as TW-bit signed numbers with TW-2 fraction bits, in the same transposed
// layout as a compute tile: block b, row r (r < TW: real bit r, else
// imaginary bit r-TW) holds bit r of the twiddles bL .. bL+COLS-1, one per
// column. The table is loaded from outside (wr_*); loading a table for a
// smaller N is how the accelerator is reconfigured to a smaller FFT.
//
// Distribution read (rd_en): for compute tile rd_tile and stage shift rd_m
// (m = log2 N - stage), column c of that tile needs w^e with
// e = ((tile*COLS + c) >> m) << m. The read returns that row already spread
// across the columns: within a block when 2^m < COLS, otherwise column 0 of
// block (tile >> (m - log2 COLS)) << (m - log2 COLS) repeated in every
// column. rdata is valid the cycle after rd_en.
// The storage is the source's; the spreading read port is this design's own
// way of feeding one tile row per cycle.
module twiddle_tile #(
  parameter int COLS = 1024,
  parameter int TW   = 16,
  parameter int NBLK = 512,
  localparam int LGC  = $clog2(COLS),
  localparam int NROW = NBLK * 2 * TW,
  localparam int RRW  = $clog2(NROW),
  localparam int BW   = (NBLK > 1) ? $clog2(NBLK) : 1,
  localparam int RW2  = $clog2(2 * TW)
) (
  input  logic            clk,
  input  logic            wr_en,
  input  logic [RRW-1:0]  wr_row,
  input  logic [COLS-1:0] wdata,
  input  logic            rd_en,
  input  logic [BW-1:0]   rd_tile,
  input  logic [RW2-1:0]  rd_r,
  input  logic [7:0]      rd_m,
  output logic [COLS-1:0] rdata
);

  logic [COLS-1:0] mem [NROW];
  logic [COLS-1:0] raw;
  logic [7:0]      m_q;
  logic [BW-1:0]   blk;

  always_comb begin
    blk = rd_tile;
    if (int'(rd_m) >= LGC) blk = (rd_tile >> (int'(rd_m) - LGC)) << (int'(rd_m) - LGC);
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_row] <= wdata;
    if (rd_en) begin
      raw <= mem[RRW'(int'(blk) * 2 * TW + int'(rd_r))];
      m_q <= rd_m;
    end
  end

  // Spread: column c takes column (c >> m) << m, or column 0 for m >= log2 COLS.
  for (genvar c = 0; c < COLS; c++) begin : g_spread
    always_comb begin
      rdata[c] = raw[0];
      for (int mm = 0; mm < LGC; mm++)
        if (int'(m_q) == mm) rdata[c] = raw[(c >> mm) << mm];
    end
  end

endmodule
