// tb_cram_array: self-checking test of the CRAM array model.
//
// Keeps a shadow copy of the array and drives random row writes (with random
// column masks), row reads and gates with random input and output rows.
// Checks every read against the shadow, the one-cycle read latency, and the
// NAND truth table of a 2-input gate (inputs 00,01,10,11 -> 1,1,1,0).
`timescale 1ns/1ps
module tb_cram_array;
  import crafft_pkg::*;

  localparam int COLS = 16;
  localparam int ROWS = 32;
  localparam int RW = $clog2(ROWS);

  logic clk = 0;
  arr_op_e op = A_NOP;
  gate_e gate = G_COPY;
  logic [RW-1:0] in_row [5];
  logic [RW-1:0] out_row = 0;
  logic [COLS-1:0] col_mask = 0, wdata = 0, rdata;
  logic [COLS-1:0] shadow [ROWS];
  int checks = 0, failures = 0;

  cram_array #(.COLS(COLS), .ROWS(ROWS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [COLS-1:0] ref_gate(input gate_e g, input logic [COLS-1:0] a, b, c, d, e);
    logic [COLS-1:0] r;
    for (int k = 0; k < COLS; k++) begin
      int ones = int'(a[k]) + int'(b[k]) + int'(c[k]) + int'(d[k]) + int'(e[k]);
      int ones3 = int'(a[k]) + int'(b[k]) + int'(c[k]);
      case (g)
        G_COPY:  r[k] = a[k];
        G_NOT:   r[k] = !a[k];
        G_AND2:  r[k] = a[k] && b[k];
        G_NAND2: r[k] = !(a[k] && b[k]);
        G_MAJ3:  r[k] = ones3 >= 2;
        default: r[k] = ones >= 3;
      endcase
    end
    return r;
  endfunction

  task automatic do_write(input int row, input logic [COLS-1:0] d, input logic [COLS-1:0] m);
    @(negedge clk);
    op = A_WRITE; out_row = RW'(row); wdata = d; col_mask = m;
    shadow[row] = (shadow[row] & ~m) | (d & m);
    @(negedge clk);
    op = A_NOP;
  endtask

  task automatic do_read_check(input int row);
    @(negedge clk);
    op = A_READ; in_row[0] = RW'(row);
    @(negedge clk);
    op = A_NOP;
    checks++;
    if (rdata !== shadow[row]) begin
      failures++;
      $display("FAIL read row %0d: %h expected %h", row, rdata, shadow[row]);
    end
  endtask

  task automatic run_all();
    for (int k = 0; k < 5; k++) in_row[k] = 0;
    for (int r = 0; r < ROWS; r++) do_write(r, COLS'($urandom), '1);
    for (int r = 0; r < ROWS; r++) do_read_check(r);
    // random traffic
    for (int it = 0; it < 2000; it++) begin
      int kind = $urandom_range(2);
      if (kind == 0) do_write($urandom_range(ROWS - 1), COLS'($urandom), COLS'($urandom));
      else if (kind == 1) do_read_check($urandom_range(ROWS - 1));
      else begin
        int o;
        int ins[5];
        logic [COLS-1:0] m = COLS'($urandom);
        gate_e g = gate_e'($urandom_range(5));
        o = $urandom_range(ROWS - 1);
        for (int k = 0; k < 5; k++) begin
          do ins[k] = $urandom_range(ROWS - 1); while (ins[k] == o);
        end
        @(negedge clk);
        op = A_GATE; gate = g; out_row = RW'(o); col_mask = m;
        for (int k = 0; k < 5; k++) in_row[k] = RW'(ins[k]);
        shadow[o] = (shadow[o] & ~m) | (ref_gate(g, shadow[ins[0]], shadow[ins[1]], shadow[ins[2]],
                                                 shadow[ins[3]], shadow[ins[4]]) & m);
        @(negedge clk);
        op = A_NOP;
        do_read_check(o);
      end
    end
    // NAND truth table on rows 0,1 -> 2 in columns 0..3
    do_write(0, COLS'(16'b1010), '1);
    do_write(1, COLS'(16'b1100), '1);
    @(negedge clk);
    op = A_GATE; gate = G_NAND2; in_row[0] = 0; in_row[1] = 1; out_row = 2; col_mask = '1;
    in_row[2] = 0; in_row[3] = 0; in_row[4] = 0;
    @(negedge clk);
    op = A_READ; in_row[0] = 2;
    @(negedge clk);
    op = A_NOP;
    checks++;
    if (rdata[3:0] !== 4'b0111) begin
      failures++;
      $display("FAIL NAND truth table: %b", rdata[3:0]);
    end
  endtask

  initial begin
    run_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
