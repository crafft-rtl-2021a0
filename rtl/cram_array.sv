// cram_array: one spintronic computational-RAM array, ROWS x COLS cells.
//
// The array is both a memory and a SIMD logic engine. As a memory it writes
// or reads one whole row (one bit of every column) per cycle. As a compute
// engine it forms the same logic gate in every enabled column at once: the
// gate's input cells sit in up to five rows, its output cell in a sixth row,
// and all columns selected by col_mask evaluate it in the same cycle. This is
// the column-level parallelism CRAFFT builds on. The gate set (COPY, NOT,
// AND2, NAND2, 3- and 5-input majority) is the one the CRAM literature
// describes; in silicon a gate is a preset of the output cell followed by a
// threshold-switching pulse, here it is one clock cycle that overwrites the
// output row in the masked columns (preset folded into the gate).
//
// The cell physics (MTJ resistances, bitline voltages) is not modelled: a
// cell is a flip-flop bit. The model follows the SHE (spin-Hall) cell, which
// has separate read and write word lines, so any row may serve as an input or
// an output; the odd/even row rule of the STT cell is not enforced.
//
// Interface (all synchronous to clk, one operation per cycle):
//   op = A_WRITE : mem[out_row] <= wdata in the columns where col_mask is 1
//   op = A_READ  : rdata <= mem[in_row[0]] (valid the cycle after)
//   op = A_GATE  : mem[out_row] <= gate(mem[in_row[0..4]]) where col_mask is 1
// A gate must not name its output row among its inputs (checked by assertion).
module cram_array
  import crafft_pkg::*;
#(
  parameter int COLS = 1024,
  parameter int ROWS = 1024,
  localparam int RW  = $clog2(ROWS)
) (
  input  logic            clk,
  input  arr_op_e         op,
  input  gate_e           gate,
  input  logic [RW-1:0]   in_row [5],
  input  logic [RW-1:0]   out_row,
  input  logic [COLS-1:0] col_mask,
  input  logic [COLS-1:0] wdata,
  output logic [COLS-1:0] rdata
);

  logic [COLS-1:0] mem [ROWS];

  logic [COLS-1:0] a, b, c, d, e, gres, newrow;

  assign a = mem[in_row[0]];
  assign b = mem[in_row[1]];
  assign c = mem[in_row[2]];
  assign d = mem[in_row[3]];
  assign e = mem[in_row[4]];

  always_comb begin
    unique case (gate)
      G_COPY:  gres = a;
      G_NOT:   gres = ~a;
      G_AND2:  gres = a & b;
      G_NAND2: gres = ~(a & b);
      G_MAJ3:  gres = (a & b) | (a & c) | (b & c);
      G_MAJ5:  gres = (a & b & c) | (a & b & d) | (a & b & e) | (a & c & d) | (a & c & e)
                    | (a & d & e) | (b & c & d) | (b & c & e) | (b & d & e) | (c & d & e);
      default: gres = a;
    endcase
  end

  // Masked merge into the output row: unselected columns keep their value.
  assign newrow = (mem[out_row] & ~col_mask)
                | (((op == A_WRITE) ? wdata : gres) & col_mask);

  always_ff @(posedge clk) begin
    if (op == A_WRITE || op == A_GATE) mem[out_row] <= newrow;
    if (op == A_READ) rdata <= a;
  end

  // A CRAM gate cannot use its preset output cell as an input.
  a_out_not_input: assert property (@(posedge clk)
    op == A_GATE |-> (out_row != in_row[0] && out_row != in_row[1] && out_row != in_row[2]
                      && out_row != in_row[3] && out_row != in_row[4]))
    else $error("cram_array: gate output row %0d is also an input", out_row);

endmodule
