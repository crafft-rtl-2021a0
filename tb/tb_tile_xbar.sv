// tb_tile_xbar: the inter-tile network against Singleton's data movement.
//
// For every active tile count T (1, 2, 4, 8) and both output kinds, feeds
// random source rows and checks each destination column against the
// butterfly-level rule: destination butterfly j' slot s takes output
// y_{2j'+s} of the stage, i.e. the sum output of butterfly 2j'+s if that is
// below N/2 = T*COLS, else the difference output of butterfly 2j'+s-N/2.
// The column mask must be set exactly where the source kind matches.
`timescale 1ns/1ps
module tb_tile_xbar;
  localparam int COLS = 8;
  localparam int NT = 8;

  logic [COLS-1:0] src_rows [NT];
  logic [7:0] lg_t;
  logic sgn;
  logic [COLS-1:0] slot0 [NT];
  logic [COLS-1:0] slot1 [NT];
  logic [COLS-1:0] mask [NT];
  int checks = 0, failures = 0;

  tile_xbar #(.COLS(COLS), .NT(NT)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_all();
    for (int it = 0; it < 20; it++)
      for (int lg = 0; lg <= $clog2(NT); lg++)
        for (int sg = 0; sg < 2; sg++) begin
          int t_act = 1 << lg;
          int half = t_act * COLS;   // N/2 butterflies
          for (int q = 0; q < NT; q++) src_rows[q] = COLS'($urandom);
          lg_t = 8'(lg); sgn = sg[0];
          #1;
          for (int t = 0; t < t_act; t++)
            for (int c = 0; c < COLS; c++)
              for (int sl = 0; sl < 2; sl++) begin
                int jd = t * COLS + c;
                int src = 2 * jd + sl;          // index of y feeding x_{2j'+sl}
                bit is_diff = src >= half;
                int bsrc = is_diff ? src - half : src;
                logic got = sl ? slot1[t][c] : slot0[t][c];
                checks++;
                if (mask[t][c] !== (is_diff == sg[0])) begin
                  failures++;
                  $display("FAIL mask T=%0d sgn=%0d tile %0d col %0d", t_act, sg, t, c);
                end
                if (is_diff == sg[0]) begin
                  checks++;
                  if (got !== src_rows[bsrc / COLS][bsrc % COLS]) begin
                    failures++;
                    $display("FAIL data T=%0d sgn=%0d tile %0d col %0d slot %0d", t_act, sg, t, c, sl);
                  end
                end
              end
        end
  endtask

  initial begin
    run_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
