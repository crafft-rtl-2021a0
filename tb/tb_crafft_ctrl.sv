// tb_crafft_ctrl: the global controller's command sequence.
//
// The controller runs against a behavioural tile model that answers a RUN
// with a done pulse a fixed number of cycles later. For several FFT sizes the
// testbench counts what the controller issues and checks it against the
// schedule: two constant-row writes, 2*TW twiddle rows per active tile per
// stage (each a twiddle-tile read then a tile write with the right shift m),
// one RUN per stage, 4*(W+1) output-row transfers (read, slot-0 write,
// slot-1 write) after every stage but the last, no command ever to a
// disabled tile, the done pulse and the total cycle count. Also checks that
// host accesses reach the addressed tile while idle.
`timescale 1ns/1ps
module tb_crafft_ctrl;
  import crafft_pkg::*;

  localparam int COLS = 8, ROWS = 512, LOG2N_MAX = 6, XW = 16, TW = 16;
  localparam int NT = (1 << LOG2N_MAX) / (2 * COLS);
  localparam int TB = $clog2(NT);
  localparam int RW = $clog2(ROWS);
  localparam int WMAX = XW + LOG2N_MAX;
  localparam int LAT = 10;

  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0] log2n = 0;
  logic busy, done;
  logic [7:0] stage;
  logic h_we = 0, h_re = 0;
  logic [TB-1:0] h_tile = 0;
  logic [RW-1:0] h_row = 0;
  tile_cmd_e t_cmd [NT];
  logic [RW-1:0] t_row;
  logic [7:0] t_width;
  logic [2:0] t_wsel;
  logic [NT-1:0] t_done = '0;
  logic tw_re;
  logic [TB-1:0] tw_tile;
  logic [$clog2(2 * TW)-1:0] tw_r;
  logic [7:0] tw_m, x_lgt;
  logic x_sgn;

  int checks = 0, failures = 0;
  longint cyc = 0;
  int n_const, n_twr, n_tww, n_run, n_xrd, n_xw, n_bad, n_badm;
  int act;

  crafft_ctrl #(.COLS(COLS), .ROWS(ROWS), .LOG2N_MAX(LOG2N_MAX), .XW(XW), .TW(TW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // tile model: done LAT cycles after RUN
  int cnt = -1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    t_done <= '0;
    if (t_cmd[0] == TC_RUN) cnt <= LAT;
    else if (cnt > 0) cnt <= cnt - 1;
    else if (cnt == 0) begin
      cnt <= -1;
      for (int q = 0; q < NT; q++) if (q < act) t_done[q] <= 1'b1;
    end
  end

  // command monitor
  always @(posedge clk) if (busy) begin
    for (int q = 0; q < NT; q++) begin
      if (q >= act && t_cmd[q] != TC_NOP) n_bad++;
    end
    if (t_cmd[0] == TC_WRITE && (t_wsel == 3'd4 || t_wsel == 3'd5)) n_const++;
    if (tw_re) begin
      n_twr++;
      if (int'(tw_m) != int'(log2n) - int'(stage)) n_badm++;
    end
    for (int q = 0; q < NT; q++) if (t_cmd[q] == TC_WRITE && t_wsel == 3'd1) n_tww++;
    if (t_cmd[0] == TC_RUN) n_run++;
    if (t_cmd[0] == TC_READ) n_xrd++;
    if (t_cmd[0] == TC_WRITE && (t_wsel == 3'd2 || t_wsel == 3'd3)) n_xw++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input int s);
    longint t0, expc;
    int exp_xrd = 0;
    act = (1 << s) / (2 * COLS);
    n_const = 0; n_twr = 0; n_tww = 0; n_run = 0; n_xrd = 0; n_xw = 0; n_bad = 0; n_badm = 0;
    @(negedge clk); start = 1; log2n = 8'(s); t0 = cyc;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    expc = 4;
    for (int k = 1; k <= s; k++) begin
      expc += act * 2 * TW * 2 + 1 + LAT + 2;
      if (k < s) begin
        expc += 3 * 4 * (XW + k);
        exp_xrd += 4 * (XW + k);
      end
    end
    check(n_const == 2, $sformatf("constant rows %0d", n_const));
    check(n_twr == s * act * 2 * TW, $sformatf("twiddle reads %0d", n_twr));
    check(n_tww == s * act * 2 * TW, $sformatf("twiddle writes %0d", n_tww));
    check(n_badm == 0, "twiddle shift m wrong");
    check(n_run == s, $sformatf("runs %0d", n_run));
    check(n_xrd == exp_xrd, $sformatf("transfer reads %0d expected %0d", n_xrd, exp_xrd));
    check(n_xw == 2 * exp_xrd, $sformatf("transfer writes %0d", n_xw));
    check(n_bad == 0, "command to a disabled tile");
    check(cyc - t0 == expc, $sformatf("cycles %0d expected %0d", cyc - t0, expc));
    check(int'(x_lgt) == $clog2(act), "network pattern");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // host access while idle goes to the addressed tile only
    @(negedge clk); h_we = 1; h_tile = 2; h_row = 7;
    #1;
    check(t_cmd[2] == TC_WRITE && t_cmd[0] == TC_NOP && t_row == 7, "host write routing");
    @(negedge clk); h_we = 0; h_re = 1; h_tile = 1;
    #1;
    check(t_cmd[1] == TC_READ && t_cmd[2] == TC_NOP, "host read routing");
    @(negedge clk); h_re = 0;
    run(6);
    run(5);
    run(4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
