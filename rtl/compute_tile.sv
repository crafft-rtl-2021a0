// compute_tile: one CRAFFT compute tile, a CRAM array plus its tile controller.
//
// The tile holds COLS butterflies, one per column, and computes all of them
// in parallel when it receives TC_RUN. Between stages it serves row reads and
// row writes (cmd = TC_READ / TC_WRITE); a read returns the row on rdata one
// cycle later. `done` pulses once a butterfly stage is complete.
// The split into array and controller follows the source's tile organisation;
// the command encoding is this design's own.
module compute_tile
  import crafft_pkg::*;
#(
  parameter int COLS = 1024,
  parameter int ROWS = 1024,
  parameter int WMAX = 36,
  parameter int TW   = 16,
  localparam int RW  = $clog2(ROWS)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  tile_cmd_e       cmd,
  input  logic [RW-1:0]   row,
  input  logic [COLS-1:0] wdata,
  input  logic [COLS-1:0] mask,
  input  logic [7:0]      width,
  output logic [COLS-1:0] rdata,
  output logic            busy,
  output logic            done
);

  arr_op_e         a_op;
  gate_e           a_gate;
  logic [RW-1:0]   a_in [5];
  logic [RW-1:0]   a_out;
  logic [COLS-1:0] a_mask, a_wdata, a_rdata;

  tile_ctrl #(.COLS(COLS), .ROWS(ROWS), .WMAX(WMAX), .TW(TW)) u_ctrl (
    .clk, .rst_n, .cmd, .row, .wdata, .mask, .width, .rdata, .busy, .done,
    .a_op, .a_gate, .a_in, .a_out, .a_mask, .a_wdata, .a_rdata
  );

  cram_array #(.COLS(COLS), .ROWS(ROWS)) u_array (
    .clk, .op(a_op), .gate(a_gate), .in_row(a_in), .out_row(a_out),
    .col_mask(a_mask), .wdata(a_wdata), .rdata(a_rdata)
  );

endmodule
