// crafft_ctrl: the global CRAFFT controller.
//
// It orchestrates the tiles through one N-point FFT, N = 2^log2n chosen at
// start (COLS*2 <= N <= 2^LOG2N_MAX). T = N/(2*COLS) compute tiles take part;
// the others receive no commands. The inputs (bit-reversed order) and the
// twiddle table for this N must already be loaded through the host port.
//
//   CONST      write the constant 0 and 1 rows of every active tile
//   per stage k = 1 .. log2n:
//     TW_RD/WR distribute the stage's twiddles: for each active tile, for
//              each of the 2*TW twiddle rows, one read of the twiddle tile
//              (2 cycles per row)
//     RUN/WAIT start the butterfly in all active tiles (input width
//              XW+k-1) and wait for their done pulse
//     XRD/XW0/XW1  (not after the last stage) move the outputs to the
//              tiles that hold them as next-stage inputs: every tile reads one
//              output row, then the network's slot-0 and slot-1 rows are
//              written (3 cycles per output bit, for sum/difference and
//              real/imaginary)
//   DONE       one-cycle done pulse; results stay in the tiles' output rows
//
// While idle the host port reaches one tile (h_we / h_re, read data one
// cycle later on the tile's rdata). The sequence of phases follows the
// source; cycle-level timing and the command encoding are this design's own.
module crafft_ctrl
  import crafft_pkg::*;
#(
  parameter int COLS      = 1024,
  parameter int ROWS      = 1024,
  parameter int LOG2N_MAX = 20,
  parameter int XW        = 16,
  parameter int TW        = 16,
  localparam int WMAX = XW + LOG2N_MAX,
  localparam int LGC  = $clog2(COLS),
  localparam int NT   = (1 << LOG2N_MAX) / (2 * COLS),
  localparam int TB   = (NT > 1) ? $clog2(NT) : 1,
  localparam int RW   = $clog2(ROWS),
  localparam int RW2  = $clog2(2 * TW)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [7:0]     log2n,
  output logic           busy,
  output logic           done,
  output logic [7:0]     stage,
  // host port
  input  logic           h_we,
  input  logic           h_re,
  input  logic [TB-1:0]  h_tile,
  input  logic [RW-1:0]  h_row,
  // tiles
  output tile_cmd_e      t_cmd [NT],
  output logic [RW-1:0]  t_row,
  output logic [7:0]     t_width,
  output logic [2:0]     t_wsel,
  input  logic [NT-1:0]  t_done,
  // twiddle tile
  output logic           tw_re,
  output logic [TB-1:0]  tw_tile,
  output logic [RW2-1:0] tw_r,
  output logic [7:0]     tw_m,
  // network
  output logic [7:0]     x_lgt,
  output logic           x_sgn
);

  // write-data sources for t_wsel
  localparam logic [2:0] WS_HOST = 3'd0, WS_TWID = 3'd1, WS_S0 = 3'd2, WS_S1 = 3'd3,
                         WS_ZERO = 3'd4, WS_ONES = 3'd5;

  typedef enum logic [3:0] {
    S_IDLE, S_CONST0, S_CONST1, S_TW_RD, S_TW_WR, S_RUN, S_WAIT, S_XRD, S_XW0, S_XW1, S_DONE
  } state_e;

  state_e      st;
  logic [7:0]  s;       // log2 N of this run
  logic [7:0]  k;       // current stage, 1 .. s
  logic [7:0]  lgt;     // log2 of the active tile count
  logic [TB:0] t;       // tile counter for twiddle distribution
  logic [7:0]  r;       // twiddle row counter
  logic [7:0]  xb;      // transfer bit
  logic        xpart, xsgn;

  logic [TB:0] nact;
  assign nact = (TB + 1)'(1) << lgt;

  function automatic logic active(input int idx, input logic [TB:0] na);
    return idx < int'(na);
  endfunction

  always_comb begin
    for (int q = 0; q < NT; q++) t_cmd[q] = TC_NOP;
    t_row   = h_row;
    t_wsel  = WS_HOST;
    t_width = XW[7:0] + k - 8'd1;
    tw_re   = 1'b0;
    tw_tile = t[TB-1:0];
    tw_r    = r[RW2-1:0];
    tw_m    = s - k;
    x_lgt   = lgt;
    x_sgn   = xsgn;
    unique case (st)
      S_IDLE: begin
        if (h_we) t_cmd[h_tile] = TC_WRITE;
        else if (h_re) t_cmd[h_tile] = TC_READ;
      end
      S_CONST0, S_CONST1: begin
        t_row  = (st == S_CONST0) ? RW'(R_ZERO) : RW'(R_ONE);
        t_wsel = (st == S_CONST0) ? WS_ZERO : WS_ONES;
        for (int q = 0; q < NT; q++) if (active(q, nact)) t_cmd[q] = TC_WRITE;
      end
      S_TW_RD: tw_re = 1'b1;
      S_TW_WR: begin
        t_row  = RW'(row_w(WMAX, int'(r) / TW, int'(r) % TW, TW));
        t_wsel = WS_TWID;
        t_cmd[t[TB-1:0]] = TC_WRITE;
      end
      S_RUN: for (int q = 0; q < NT; q++) if (active(q, nact)) t_cmd[q] = TC_RUN;
      S_XRD: begin
        t_row = RW'(row_y(WMAX, TW, int'(xsgn), int'(xpart), int'(xb)));
        for (int q = 0; q < NT; q++) if (active(q, nact)) t_cmd[q] = TC_READ;
      end
      S_XW0, S_XW1: begin
        t_row  = RW'(row_x(WMAX, (st == S_XW0) ? 0 : 1, int'(xpart), int'(xb)));
        t_wsel = (st == S_XW0) ? WS_S0 : WS_S1;
        for (int q = 0; q < NT; q++) if (active(q, nact)) t_cmd[q] = TC_WRITE;
      end
      default: ;
    endcase
  end

  assign busy  = (st != S_IDLE);
  assign stage = k;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= S_IDLE;
      s     <= '0;
      k     <= 8'd1;
      lgt   <= '0;
      t     <= '0;
      r     <= '0;
      xb    <= '0;
      xpart <= 1'b0;
      xsgn  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          s   <= log2n;
          lgt <= log2n - 8'(LGC + 1);
          k   <= 8'd1;
          st  <= S_CONST0;
        end
        S_CONST0: st <= S_CONST1;
        S_CONST1: begin
          t  <= '0;
          r  <= '0;
          st <= S_TW_RD;
        end
        S_TW_RD: st <= S_TW_WR;
        S_TW_WR: begin
          if (int'(r) == 2 * TW - 1) begin
            r <= '0;
            if (t == nact - 1'b1) st <= S_RUN;
            else begin
              t  <= t + 1'b1;
              st <= S_TW_RD;
            end
          end else begin
            r  <= r + 8'd1;
            st <= S_TW_RD;
          end
        end
        S_RUN: st <= S_WAIT;
        S_WAIT: if (t_done[0]) begin
          if (k == s) st <= S_DONE;
          else begin
            xb    <= '0;
            xpart <= 1'b0;
            xsgn  <= 1'b0;
            st    <= S_XRD;
          end
        end
        S_XRD: st <= S_XW0;
        S_XW0: st <= S_XW1;
        S_XW1: begin
          st <= S_XRD;
          if (int'(xb) == XW + int'(k) - 1) begin   // last bit of a W+1-bit output
            xb <= '0;
            if (!xsgn) xsgn <= 1'b1;
            else begin
              xsgn <= 1'b0;
              if (!xpart) xpart <= 1'b1;
              else begin
                xpart <= 1'b0;
                k     <= k + 8'd1;
                t     <= '0;
                r     <= '0;
                st    <= S_TW_RD;
              end
            end
          end else xb <= xb + 8'd1;
        end
        default: begin // S_DONE
          done <= 1'b1;
          st   <= S_IDLE;
        end
      endcase
    end
  end

  // Rules of the interfaces.
  a_log2n_range: assert property (@(posedge clk) disable iff (!rst_n)
    (st == S_IDLE && start) |-> (int'(log2n) >= LGC + 1 && int'(log2n) <= LOG2N_MAX))
    else $error("crafft_ctrl: log2n=%0d outside %0d..%0d", log2n, LGC + 1, LOG2N_MAX);
  function automatic logic all_active_done(input logic [NT-1:0] d, input logic [TB:0] na);
    logic ok = 1'b1;
    for (int q = 0; q < NT; q++) if (q < int'(na) && !d[q]) ok = 1'b0;
    return ok;
  endfunction

  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    (st == S_WAIT && t_done[0]) |-> all_active_done(t_done, nact))
    else $error("crafft_ctrl: active tiles finished out of step");

endmodule
