// tb_twiddle_tile: table load and spreading distribution read.
//
// Fills the twiddle tile with random rows, then reads every (tile, row,
// stage shift m) combination and checks that column c of the returned row
// holds bit c' of the stored block, with c' = (c >> m) << m inside the tile's
// own block for 2^m < COLS, and column 0 of block (tile >> (m - log2 COLS))
// << (m - log2 COLS) otherwise. Also checks the one-cycle read latency.
`timescale 1ns/1ps
module tb_twiddle_tile;
  localparam int COLS = 8;
  localparam int TW = 16;
  localparam int NBLK = 4;
  localparam int LGC = $clog2(COLS);
  localparam int NROW = NBLK * 2 * TW;

  logic clk = 0;
  logic wr_en = 0, rd_en = 0;
  logic [$clog2(NROW)-1:0] wr_row = 0;
  logic [COLS-1:0] wdata = 0, rdata;
  logic [$clog2(NBLK)-1:0] rd_tile = 0;
  logic [$clog2(2 * TW)-1:0] rd_r = 0;
  logic [7:0] rd_m = 0;
  logic [COLS-1:0] shadow [NROW];
  int checks = 0, failures = 0;

  twiddle_tile #(.COLS(COLS), .TW(TW), .NBLK(NBLK)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_all();
    for (int r = 0; r < NROW; r++) begin
      @(negedge clk);
      wr_en = 1; wr_row = $bits(wr_row)'(r); wdata = COLS'($urandom); shadow[r] = wdata;
    end
    @(negedge clk); wr_en = 0;
    for (int t = 0; t < NBLK; t++)
      for (int r = 0; r < 2 * TW; r++)
        for (int m = 0; m <= LGC + $clog2(NBLK); m++) begin
          logic [COLS-1:0] expv;
          int blk = (m >= LGC) ? ((t >> (m - LGC)) << (m - LGC)) : t;
          for (int c = 0; c < COLS; c++)
            expv[c] = shadow[blk * 2 * TW + r][(m >= LGC) ? 0 : ((c >> m) << m)];
          @(negedge clk);
          rd_en = 1; rd_tile = $bits(rd_tile)'(t); rd_r = $bits(rd_r)'(r); rd_m = 8'(m);
          @(negedge clk);
          rd_en = 0;
          checks++;
          if (rdata !== expv) begin
            failures++;
            $display("FAIL tile %0d row %0d m %0d: %b expected %b", t, r, m, rdata, expv);
          end
        end
  endtask

  initial begin
    run_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
