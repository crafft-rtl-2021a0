// tb_crafft_top: end-to-end test of the CRAFFT accelerator.
//
// Small configuration: 8-column tiles, up to 64-point FFTs, so 4 compute
// tiles. Runs a 64-point FFT (all tiles, twiddle rows broadcast from another
// block), a 32-point FFT (half of the tiles disabled) and a 16-point FFT
// (single tile, its outputs routed back into itself), each on random complex
// inputs inside the unit circle. The inputs are loaded in bit-reversed
// order, the twiddle tile is reloaded for every size. Checks every output
// bit-exactly against the reference model, the accuracy against a
// double-precision DFT (SQNR), and the total cycle count against the
// schedule (twiddle distribution, butterfly gates, transfers). Counts how
// often each mechanism happened.
`timescale 1ns/1ps
module tb_crafft_top;
  import crafft_pkg::*;
  import crafft_ref_pkg::*;

  localparam int COLS = 8;
  localparam int ROWS = 512;
  localparam int LOG2N_MAX = 6;
  localparam int XW = 16;
  localparam int NT = (1 << LOG2N_MAX) / (2 * COLS);
  localparam int TB = (NT > 1) ? $clog2(NT) : 1;
  localparam int RW = $clog2(ROWS);
  localparam int WMAX = XW + LOG2N_MAX;
  localparam int TWRW = $clog2(NT * 2 * TW);

  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0] log2n = 0;
  logic busy, done;
  logic [7:0] stage;
  logic h_we = 0, h_re = 0, h_tw_we = 0;
  logic [TB-1:0] h_tile = 0;
  logic [RW-1:0] h_row = 0;
  logic [COLS-1:0] h_wdata = 0, h_rdata, h_tw_wdata = 0;
  logic [TWRW-1:0] h_tw_row = 0;

  int checks = 0, failures = 0;
  int n_bcast = 0, n_spread = 0, n_disabled = 0, n_single = 0, n_multi = 0, n_xfer = 0;
  longint cyc = 0;

  crafft_top #(.COLS(COLS), .ROWS(ROWS), .LOG2N_MAX(LOG2N_MAX), .XW(XW), .TW(TW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic tile_write(input int t, input int row, input logic [COLS-1:0] d);
    @(negedge clk);
    h_we = 1; h_tile = TB'(t); h_row = RW'(row); h_wdata = d;
    @(negedge clk);
    h_we = 0;
  endtask

  task automatic tile_read(input int t, input int row, output logic [COLS-1:0] d);
    @(negedge clk);
    h_re = 1; h_tile = TB'(t); h_row = RW'(row);
    @(negedge clk);
    h_re = 0;
    d = h_rdata;
  endtask

  task automatic run_fft(input int s);
    int n = 1 << s;
    int nt = n / (2 * COLS);
    longint xr[], xi[], ar[], ai[], yr[], yi[];
    longint wr[], wi[];
    longint t0, expect_cyc;
    real sig, err;
    logic [COLS-1:0] d;

    xr = new[n]; xi = new[n]; ar = new[n]; ai = new[n]; yr = new[n]; yi = new[n];
    wr = new[n / 2]; wi = new[n / 2];
    for (int q = 0; q < n; q++) begin
      // inside the unit circle of a 16-bit signed number
      xr[q] = longint'($urandom_range(46000)) - 23000;
      xi[q] = longint'($urandom_range(46000)) - 23000;
    end
    for (int e = 0; e < n / 2; e++) begin
      wr[e] = tw_re(e, s);
      wi[e] = tw_im(e, s);
    end
    // twiddle tile
    for (int b = 0; b < nt; b++)
      for (int r = 0; r < 2 * TW; r++) begin
        for (int c = 0; c < COLS; c++)
          d[c] = ((r < TW ? wr[b * COLS + c] : wi[b * COLS + c]) >> (r % TW)) & 1;
        @(negedge clk);
        h_tw_we = 1; h_tw_row = TWRW'(b * 2 * TW + r); h_tw_wdata = d;
        @(negedge clk);
        h_tw_we = 0;
      end
    // inputs, bit-reversed
    for (int q = 0; q < n; q++) begin
      ar[q] = xr[bitrev(q, s)];
      ai[q] = xi[bitrev(q, s)];
    end
    for (int t = 0; t < nt; t++)
      for (int slot = 0; slot < 2; slot++)
        for (int part = 0; part < 2; part++)
          for (int bb = 0; bb < XW; bb++) begin
            for (int c = 0; c < COLS; c++) begin
              int j = t * COLS + c;
              d[c] = ((part == 0 ? ar[2 * j + slot] : ai[2 * j + slot]) >> bb) & 1;
            end
            tile_write(t, row_x(WMAX, slot, part, bb), d);
          end
    // reference: s stages of the fixed-point butterfly
    for (int k = 1; k <= s; k++) begin
      int m = s - k;
      int w = XW + k - 1;
      for (int j = 0; j < n / 2; j++) begin
        int e = (j >> m) << m;
        bfly(ar[2 * j], ai[2 * j], ar[2 * j + 1], ai[2 * j + 1], wr[e], wi[e], w,
             yr[j], yi[j], yr[j + n / 2], yi[j + n / 2]);
      end
      for (int q = 0; q < n; q++) begin ar[q] = yr[q]; ai[q] = yi[q]; end
    end
    // expected cycles: 2 constant rows, per stage twiddle distribution
    // (2 cycles per row), run command, gates, done, transfers, and the
    // start and DONE states
    expect_cyc = 2 + 2;
    for (int k = 1; k <= s; k++) begin
      expect_cyc += nt * 2 * TW * 2 + 1 + stage_gates(XW + k - 1) + 1;
      if (k < s) expect_cyc += 3 * 4 * (XW + k);
    end
    // run
    @(negedge clk);
    start = 1; log2n = 8'(s);
    t0 = cyc;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    $display("N=%0d: %0d cycles (expected %0d)", n, cyc - t0, expect_cyc);
    check(cyc - t0 == expect_cyc, $sformatf("cycle count N=%0d", n));
    // read back and compare
    for (int q = 0; q < n; q++) begin yr[q] = 0; yi[q] = 0; end
    for (int t = 0; t < nt; t++)
      for (int sg = 0; sg < 2; sg++)
        for (int part = 0; part < 2; part++)
          for (int bb = 0; bb < XW + s; bb++) begin
            tile_read(t, row_y(WMAX, TW, sg, part, bb), d);
            for (int c = 0; c < COLS; c++) begin
              int idx = t * COLS + c + sg * n / 2;
              if (part == 0) yr[idx] |= longint'(d[c]) << bb;
              else           yi[idx] |= longint'(d[c]) << bb;
            end
          end
    sig = 0.0; err = 0.0;
    for (int q = 0; q < n; q++) begin
      real fr = 0.0, fi = 0.0;
      yr[q] = sext(yr[q], XW + s);
      yi[q] = sext(yi[q], XW + s);
      check(yr[q] == ar[q] && yi[q] == ai[q],
            $sformatf("N=%0d y[%0d] = (%0d,%0d), expected (%0d,%0d)", n, q, yr[q], yi[q], ar[q], ai[q]));
      for (int p = 0; p < n; p++) begin
        real ph = -2.0 * 3.14159265358979323846 * real'((longint'(p) * q) % n) / real'(n);
        fr += real'(xr[p]) * $cos(ph) - real'(xi[p]) * $sin(ph);
        fi += real'(xr[p]) * $sin(ph) + real'(xi[p]) * $cos(ph);
      end
      sig += fr * fr + fi * fi;
      err += (real'(yr[q]) - fr) ** 2 + (real'(yi[q]) - fi) ** 2;
    end
    $display("N=%0d: SQNR %0.1f dB", n, 10.0 * $log10(sig / err));
    check(10.0 * $log10(sig / err) > 70.0, $sformatf("SQNR N=%0d", n));
    // mechanisms
    if (s - 1 >= $clog2(COLS)) n_bcast++;
    n_spread++;
    if (nt < NT) n_disabled++;
    if (nt == 1) n_single++; else n_multi++;
    if (s > 1) n_xfer += s - 1;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_fft(6);
    run_fft(5);
    run_fft(4);
    $display("mechanisms: block broadcast %0d, in-block spread %0d, disabled tiles %0d, single-tile %0d, multi-tile %0d, transfers %0d",
             n_bcast, n_spread, n_disabled, n_single, n_multi, n_xfer);
    check(n_bcast > 0, "twiddle block broadcast never happened");
    check(n_spread > 0, "twiddle in-block spread never happened");
    check(n_disabled > 0, "tile disabling never happened");
    check(n_single > 0, "single-tile routing never happened");
    check(n_multi > 0, "multi-tile routing never happened");
    check(n_xfer > 0, "no inter-tile transfer happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
