// tb_compute_tile: butterfly stages in one compute tile.
//
// Loads random butterfly inputs (W-bit, inside the unit circle scaled to W
// bits) and random unit-magnitude twiddles into every column through row
// writes, runs one stage, reads the four output fields back and compares
// each column with the reference butterfly. Repeats for several widths W and
// checks the stage latency (gate count + 1 cycle) each time.
`timescale 1ns/1ps
module tb_compute_tile;
  import crafft_pkg::*;
  import crafft_ref_pkg::*;

  localparam int COLS = 8;
  localparam int ROWS = 512;
  localparam int WMAX = 24;
  localparam int RW = $clog2(ROWS);

  logic clk = 0, rst_n = 0;
  tile_cmd_e cmd = TC_NOP;
  logic [RW-1:0] row = 0;
  logic [COLS-1:0] wdata = 0, mask = '1, rdata;
  logic [7:0] width = 0;
  logic busy, done;
  int checks = 0, failures = 0;
  longint cyc = 0;

  compute_tile #(.COLS(COLS), .ROWS(ROWS), .WMAX(WMAX), .TW(TW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input int r, input logic [COLS-1:0] d);
    @(negedge clk); cmd = TC_WRITE; row = RW'(r); wdata = d; mask = '1;
    @(negedge clk); cmd = TC_NOP;
  endtask

  task automatic rd(input int r, output logic [COLS-1:0] d);
    @(negedge clk); cmd = TC_READ; row = RW'(r);
    @(negedge clk); cmd = TC_NOP; d = rdata;
  endtask

  task automatic stage(input int w);
    longint v [COLS][8];   // ar ai br bi wr wi (inputs)
    longint y [COLS][4];   // ypr ymr ypi ymi (got)
    longint e [COLS][4];
    logic [COLS-1:0] d;
    longint t0;
    longint lim = (longint'(1) << (w - 1)) * 7 / 10;
    for (int c = 0; c < COLS; c++) begin
      real ph = 6.283185307179586 * real'($urandom_range(1023)) / 1024.0;
      for (int q = 0; q < 4; q++) v[c][q] = longint'($urandom_range(32'(2 * lim))) - lim;
      v[c][4] = rnd($cos(ph) * real'(1 << TWF));
      v[c][5] = rnd(-$sin(ph) * real'(1 << TWF));
      bfly(v[c][0], v[c][1], v[c][2], v[c][3], v[c][4], v[c][5], w, e[c][0], e[c][2], e[c][1], e[c][3]);
    end
    wr(R_ZERO, '0);
    wr(R_ONE, '1);
    for (int slot = 0; slot < 2; slot++)
      for (int part = 0; part < 2; part++)
        for (int b = 0; b < w; b++) begin
          for (int c = 0; c < COLS; c++) d[c] = (v[c][slot * 2 + part] >> b) & 1;
          wr(row_x(WMAX, slot, part, b), d);
        end
    for (int part = 0; part < 2; part++)
      for (int b = 0; b < TW; b++) begin
        for (int c = 0; c < COLS; c++) d[c] = (v[c][4 + part] >> b) & 1;
        wr(row_w(WMAX, part, b, TW), d);
      end
    @(negedge clk); cmd = TC_RUN; width = 8'(w); t0 = cyc;
    @(negedge clk); cmd = TC_NOP;
    while (!done) @(negedge clk);
    checks++;
    if (cyc - t0 != longint'(stage_gates(w)) + 1) begin
      failures++;
      $display("FAIL latency W=%0d: %0d expected %0d", w, cyc - t0, stage_gates(w) + 1);
    end
    for (int c = 0; c < COLS; c++) for (int q = 0; q < 4; q++) y[c][q] = 0;
    for (int part = 0; part < 2; part++)
      for (int sg = 0; sg < 2; sg++)
        for (int b = 0; b <= w; b++) begin
          rd(row_y(WMAX, TW, sg, part, b), d);
          for (int c = 0; c < COLS; c++) y[c][part * 2 + sg] |= longint'(d[c]) << b;
        end
    for (int c = 0; c < COLS; c++)
      for (int q = 0; q < 4; q++) begin
        checks++;
        if (sext(y[c][q], w + 1) != e[c][q]) begin
          failures++;
          $display("FAIL W=%0d col %0d out %0d: %0d expected %0d", w, c, q, sext(y[c][q], w + 1), e[c][q]);
        end
      end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    stage(16);
    stage(17);
    stage(20);
    stage(WMAX - 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
