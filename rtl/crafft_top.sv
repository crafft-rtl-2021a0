// crafft_top: CRAFFT, a high-resolution FFT accelerator built from
// computational-RAM tiles.
//
// NT = 2^LOG2N_MAX / (2*COLS) compute tiles (each a ROWS x COLS CRAM array
// with its own tile controller), one twiddle tile, the fixed inter-tile
// network and the global controller. Every column of every compute tile
// computes one radix-2 butterfly of Singleton's constant-geometry FFT per
// stage; all columns of all active tiles work in lockstep.
//
// Use:
//   1. Load the twiddle table for the chosen N into the twiddle tile
//      (h_tw_we, h_tw_row = block*2*TW + bit, h_tw_wdata = that bit of the
//      COLS twiddles of the block; real part bits 0..TW-1, imaginary TW..2TW-1).
//   2. Write the inputs, in bit-reversed order, into the X rows of the tiles
//      (h_we, h_tile, h_row, h_wdata). Butterfly j = tile*COLS + column holds
//      x_{2j} in slot 0 and x_{2j+1} in slot 1; rows are given by crafft_pkg.
//   3. Pulse start with log2n; wait for done (busy is high meanwhile).
//   4. Read the outputs (h_re, h_tile, h_row; h_rdata the cycle after):
//      y_n for n < N/2 is the sum output of butterfly n, y_{n+N/2} its
//      difference output; width XW + log2n bits, natural order.
// The host port is only honoured while busy is low.
module crafft_top
  import crafft_pkg::*;
#(
  parameter int COLS      = 1024,
  parameter int ROWS      = 1024,
  parameter int LOG2N_MAX = 20,
  parameter int XW        = 16,
  parameter int TW        = 16,
  localparam int NT   = (1 << LOG2N_MAX) / (2 * COLS),
  localparam int TB   = (NT > 1) ? $clog2(NT) : 1,
  localparam int RW   = $clog2(ROWS),
  localparam int WMAX = XW + LOG2N_MAX,
  localparam int TWRW = $clog2(NT * 2 * TW),
  localparam int RW2  = $clog2(2 * TW)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [7:0]       log2n,
  output logic             busy,
  output logic             done,
  output logic [7:0]       stage,
  input  logic             h_we,
  input  logic             h_re,
  input  logic [TB-1:0]    h_tile,
  input  logic [RW-1:0]    h_row,
  input  logic [COLS-1:0]  h_wdata,
  output logic [COLS-1:0]  h_rdata,
  input  logic             h_tw_we,
  input  logic [TWRW-1:0]  h_tw_row,
  input  logic [COLS-1:0]  h_tw_wdata
);

  tile_cmd_e       t_cmd [NT];
  logic [RW-1:0]   t_row;
  logic [7:0]      t_width;
  logic [2:0]      t_wsel;
  logic [NT-1:0]   t_done, t_busy;
  logic [COLS-1:0] t_rdata [NT];
  logic [COLS-1:0] t_wdata [NT];
  logic [COLS-1:0] t_mask  [NT];
  logic [COLS-1:0] x_s0 [NT];
  logic [COLS-1:0] x_s1 [NT];
  logic [COLS-1:0] x_mask [NT];

  logic            tw_re;
  logic [TB-1:0]   tw_tile;
  logic [RW2-1:0]  tw_r;
  logic [7:0]      tw_m, x_lgt;
  logic            x_sgn;
  logic [COLS-1:0] tw_rdata;
  logic [TB-1:0]   h_tile_q;

  crafft_ctrl #(.COLS(COLS), .ROWS(ROWS), .LOG2N_MAX(LOG2N_MAX), .XW(XW), .TW(TW)) u_ctrl (
    .clk, .rst_n, .start, .log2n, .busy, .done, .stage,
    .h_we, .h_re, .h_tile, .h_row,
    .t_cmd, .t_row, .t_width, .t_wsel, .t_done,
    .tw_re, .tw_tile, .tw_r, .tw_m, .x_lgt, .x_sgn
  );

  twiddle_tile #(.COLS(COLS), .TW(TW), .NBLK(NT)) u_twiddle (
    .clk, .wr_en(h_tw_we && !busy), .wr_row(h_tw_row), .wdata(h_tw_wdata),
    .rd_en(tw_re), .rd_tile(tw_tile), .rd_r(tw_r), .rd_m(tw_m), .rdata(tw_rdata)
  );

  tile_xbar #(.COLS(COLS), .NT(NT)) u_xbar (
    .src_rows(t_rdata), .lg_t(x_lgt), .sgn(x_sgn),
    .slot0(x_s0), .slot1(x_s1), .mask(x_mask)
  );

  for (genvar q = 0; q < NT; q++) begin : g_tile
    always_comb begin
      t_mask[q] = '1;
      unique case (t_wsel)
        3'd1:    t_wdata[q] = tw_rdata;
        3'd2:    begin t_wdata[q] = x_s0[q]; t_mask[q] = x_mask[q]; end
        3'd3:    begin t_wdata[q] = x_s1[q]; t_mask[q] = x_mask[q]; end
        3'd4:    t_wdata[q] = '0;
        3'd5:    t_wdata[q] = '1;
        default: t_wdata[q] = h_wdata;
      endcase
    end

    compute_tile #(.COLS(COLS), .ROWS(ROWS), .WMAX(WMAX), .TW(TW)) u_tile (
      .clk, .rst_n, .cmd(t_cmd[q]), .row(t_row), .wdata(t_wdata[q]), .mask(t_mask[q]),
      .width(t_width), .rdata(t_rdata[q]), .busy(t_busy[q]), .done(t_done[q])
    );
  end

  always_ff @(posedge clk) if (h_re && !busy) h_tile_q <= h_tile;
  assign h_rdata = t_rdata[h_tile_q];

  // When the controller reports completion no tile may still be computing.
  a_tiles_idle_at_done: assert property (@(posedge clk) disable iff (!rst_n) done |-> (t_busy == '0))
    else $error("crafft_top: a tile is still busy at done");

endmodule
