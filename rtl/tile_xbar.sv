// tile_xbar: fixed tile-to-tile network used between FFT stages.
//
// In Singleton's FFT output y_j of a stage (j < N/2, sum output of butterfly
// j) becomes input x_j of the next stage, and y_{j+N/2} (difference output)
// becomes x_{j+N/2}; input x_n belongs to butterfly n/2, slot n%2. With COLS
// butterflies per tile and T = N/(2*COLS) active tiles this means: half h of
// destination tile t (columns h*COLS/2 ..) is fed by source tile
// p mod T, p = 2t+h, taking that tile's sum outputs if p < T and its
// difference outputs otherwise; even source columns go to slot 0 (x_{2j}),
// odd columns to slot 1 (x_{2j+1}). This is the tile connectivity
// t -> t/2, t -> t/2 + T/2 of the source, extended to T = 1.
//
// Per transfer beat every tile has read the same output row (sum or
// difference, chosen by sgn) into src_rows. The network returns, for each
// destination tile, the slot-0 row, the slot-1 row and a column mask that is
// set on the halves whose source output kind matches sgn. lg_t = log2 T
// selects among the log2(NT)+1 possible patterns; the wiring of each is fixed.
// Purely combinational.
module tile_xbar #(
  parameter int COLS = 1024,
  parameter int NT   = 512,
  localparam int LGT = $clog2(NT),
  localparam int HC  = COLS / 2
) (
  input  logic [COLS-1:0] src_rows [NT],
  input  logic [7:0]      lg_t,
  input  logic            sgn,
  output logic [COLS-1:0] slot0 [NT],
  output logic [COLS-1:0] slot1 [NT],
  output logic [COLS-1:0] mask  [NT]
);

  // Even and odd columns of every source row.
  logic [HC-1:0] ev [NT];
  logic [HC-1:0] od [NT];

  always_comb begin
    for (int s = 0; s < NT; s++) begin
      for (int c = 0; c < HC; c++) begin
        ev[s][c] = src_rows[s][2 * c];
        od[s][c] = src_rows[s][2 * c + 1];
      end
    end
  end

  for (genvar t = 0; t < NT; t++) begin : g_dst
    for (genvar h = 0; h < 2; h++) begin : g_half
      logic [HC-1:0] cand_ev [LGT+1];
      logic [HC-1:0] cand_od [LGT+1];
      logic [HC-1:0] sel_ev, sel_od;
      logic          ok;

      for (genvar mm = 0; mm <= LGT; mm++) begin : g_m
        assign cand_ev[mm] = ev[(2 * t + h) & ((1 << mm) - 1)];
        assign cand_od[mm] = od[(2 * t + h) & ((1 << mm) - 1)];
      end

      always_comb begin
        sel_ev = cand_ev[0];
        sel_od = cand_od[0];
        ok     = 1'b0;
        for (int mm = 0; mm <= LGT; mm++) begin
          if (int'(lg_t) == mm) begin
            sel_ev = cand_ev[mm];
            sel_od = cand_od[mm];
            ok     = (t < (1 << mm)) && (((2 * t + h) >= (1 << mm)) == sgn);
          end
        end
      end

      assign slot0[t][h * HC +: HC] = sel_ev;
      assign slot1[t][h * HC +: HC] = sel_od;
      assign mask[t][h * HC +: HC]  = {HC{ok}};
    end
  end

endmodule
