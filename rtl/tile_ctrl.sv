// tile_ctrl: controller of one compute tile.
//
// Between stages it passes row reads and row writes from the global
// controller to the array (input loading, twiddle distribution, tile-to-tile
// transfer, result read-out). On TC_RUN it sequences, gate by gate, one
// radix-2 butterfly of Singleton's FFT in every column of the array at once:
//
//   t   = round( x_{2j+1} * w )           complex multiply, then round
//   y+  = x_{2j} + t ,   y- = x_{2j} - t
//
// Inputs are W bits wide (input port `width`), outputs W+1 bits (one bit of
// growth per stage, as the source prescribes). Twiddles are TW-bit signed with
// TW-2 fraction bits. The arithmetic is the source's: ripple-carry addition,
// an array of full adders for multiplication, rounding by adding 2^(q-1)
// before discarding q = TW-2 fraction bits, sign change before the final
// additions. The schedule is this design's own:
//
//   for part in {real, imag}:
//     MUL  2*TW shift-and-add passes into a ping-pong accumulator; each pass
//          adds (or, for the twiddle sign bit and for -x_i*w_i, subtracts)
//          one partial product x_{2j+1} AND w[b], sign extended, at bit b.
//          Bits below b are copied (COPY gate).
//     RND  add 2^(TW-3) to the accumulator.
//     YP   y+ = x_{2j} + acc[TW-2 +: W+1]
//     YM   y- = x_{2j} + NOT(acc[...]) + 1   (sign change, then addition)
//
// A full adder is five gates: TMP (partial product AND/NAND or NOT, only
// where needed), Cout = MAJ3(A,B,Cin), two NOT copies of Cout, and
// Sum = MAJ5(A,B,Cin,~Cout,~Cout). Every gate takes one cycle, so a stage
// takes a fixed, data-independent number of cycles (see the testbench).
// `done` pulses for one cycle after the last gate.
module tile_ctrl
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
  // command port from the global controller
  input  tile_cmd_e       cmd,
  input  logic [RW-1:0]   row,
  input  logic [COLS-1:0] wdata,
  input  logic [COLS-1:0] mask,
  input  logic [7:0]      width,
  output logic [COLS-1:0] rdata,
  output logic            busy,
  output logic            done,
  // array port
  output arr_op_e         a_op,
  output gate_e           a_gate,
  output logic [RW-1:0]   a_in [5],
  output logic [RW-1:0]   a_out,
  output logic [COLS-1:0] a_mask,
  output logic [COLS-1:0] a_wdata,
  input  logic [COLS-1:0] a_rdata
);

  localparam int TWF = TW - 2;

  typedef enum logic [1:0] {P_MUL, P_RND, P_YP, P_YM} pass_e;

  logic        run;
  pass_e       pass;
  logic        part;
  logic [7:0]  n;       // MUL pass number, 0 .. 2*TW-1
  logic [7:0]  i;       // bit position
  logic [2:0]  g;       // gate within the bit
  logic        csel;    // carry row holding the incoming carry
  logic        asel;    // accumulator copy holding the current value
  logic [7:0]  w;       // input width of this stage

  // ---------------------------------------------------------------- decode
  int  b, prod, aws, iend, xb, ab_i;
  logic sub, copy_bit, g_last, i_last;
  int  r_a, r_b, r_cin, r_cout, r_sum, r_xin, r_win;
  gate_e   dg;
  int      din [5];
  int      dout;

  always_comb begin
    b        = int'(n) % TW;
    prod     = int'(n) / TW;
    aws      = TWF + int'(w) + 1;
    sub      = (b == TW - 1) ^ (!part && prod == 1);
    copy_bit = (pass == P_MUL) && (int'(i) < b);
    xb       = (int'(i) - b > int'(w) - 1) ? int'(w) - 1 : int'(i) - b;
    ab_i     = (int'(i) > int'(w) - 1) ? int'(w) - 1 : int'(i);

    r_cout = csel ? R_C0 : R_C1;
    r_xin  = R_ZERO;
    r_win  = R_ZERO;
    r_a    = R_ZERO;
    r_b    = R_TMP;
    r_cin  = csel ? R_C1 : R_C0;
    r_sum  = R_ZERO;
    iend   = aws - 1;

    unique case (pass)
      P_MUL: begin
        r_xin = row_x(WMAX, 1, prod, xb);
        r_win = row_w(WMAX, int'(part) ^ prod, b, TW);
        r_a   = (n == 0) ? R_ZERO : row_acc(WMAX, TW, int'(asel), int'(i));
        r_b   = R_TMP;
        if (int'(i) == b) r_cin = sub ? R_ONE : R_ZERO;
        r_sum = row_acc(WMAX, TW, int'(!asel), int'(i));
      end
      P_RND: begin
        r_a   = row_acc(WMAX, TW, int'(asel), int'(i));
        r_b   = (int'(i) == TWF - 1) ? R_ONE : R_ZERO;
        if (int'(i) == TWF - 1) r_cin = R_ZERO;
        r_sum = row_acc(WMAX, TW, int'(!asel), int'(i));
      end
      P_YP: begin
        r_a   = row_x(WMAX, 0, int'(part), ab_i);
        r_b   = row_acc(WMAX, TW, int'(asel), TWF + int'(i));
        if (i == 0) r_cin = R_ZERO;
        r_sum = row_y(WMAX, TW, 0, int'(part), int'(i));
        iend  = int'(w);
      end
      default: begin // P_YM
        r_a   = row_x(WMAX, 0, int'(part), ab_i);
        r_b   = R_TMP;
        r_xin = row_acc(WMAX, TW, int'(asel), TWF + int'(i));
        if (i == 0) r_cin = R_ONE;
        r_sum = row_y(WMAX, TW, 1, int'(part), int'(i));
        iend  = int'(w);
      end
    endcase

    for (int k = 0; k < 5; k++) din[k] = R_ZERO;
    dg   = G_COPY;
    dout = R_TMP;
    if (copy_bit) begin
      dg     = G_COPY;
      din[0] = row_acc(WMAX, TW, int'(asel), int'(i));
      dout   = r_sum;
    end else begin
      unique case (g)
        3'd0: begin
          if (pass == P_MUL) begin
            dg     = sub ? G_NAND2 : G_AND2;
            din[0] = r_xin;
            din[1] = r_win;
          end else begin
            dg     = G_NOT;
            din[0] = r_xin;
          end
          dout = R_TMP;
        end
        3'd1: begin
          dg = G_MAJ3; din[0] = r_a; din[1] = r_b; din[2] = r_cin; dout = r_cout;
        end
        3'd2: begin
          dg = G_NOT; din[0] = r_cout; dout = R_CN1;
        end
        3'd3: begin
          dg = G_NOT; din[0] = r_cout; dout = R_CN2;
        end
        default: begin
          dg = G_MAJ5; din[0] = r_a; din[1] = r_b; din[2] = r_cin;
          din[3] = R_CN1; din[4] = R_CN2; dout = r_sum;
        end
      endcase
    end
    g_last = copy_bit || (g == 3'd4);
    i_last = (int'(i) == iend);
  end

  // First gate of a bit: the TMP gate exists only in MUL and YM passes.
  function automatic logic [2:0] first_gate(input pass_e p);
    return (p == P_RND || p == P_YP) ? 3'd1 : 3'd0;
  endfunction

  // ---------------------------------------------------------------- array drive
  always_comb begin
    a_op    = A_NOP;
    a_gate  = dg;
    a_mask  = '1;
    a_wdata = wdata;
    a_out   = row;
    for (int k = 0; k < 5; k++) a_in[k] = row;
    if (run) begin
      a_op  = A_GATE;
      a_out = RW'(dout);
      for (int k = 0; k < 5; k++) a_in[k] = RW'(din[k]);
    end else begin
      unique case (cmd)
        TC_WRITE: begin a_op = A_WRITE; a_mask = mask; end
        TC_READ:  a_op = A_READ;
        default:  a_op = A_NOP;
      endcase
    end
  end

  assign rdata = a_rdata;
  assign busy  = run;

  // ---------------------------------------------------------------- sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run  <= 1'b0;
      done <= 1'b0;
      pass <= P_MUL;
      part <= 1'b0;
      n    <= '0;
      i    <= '0;
      g    <= '0;
      csel <= 1'b0;
      asel <= 1'b0;
      w    <= '0;
    end else begin
      done <= 1'b0;
      if (!run) begin
        if (cmd == TC_RUN) begin
          run  <= 1'b1;
          pass <= P_MUL;
          part <= 1'b0;
          n    <= '0;
          i    <= '0;
          g    <= '0;
          csel <= 1'b0;
          asel <= 1'b0;
          w    <= width;
        end
      end else if (!g_last) begin
        g <= g + 3'd1;
      end else begin
        if (!copy_bit) csel <= !csel;
        if (!i_last) begin
          i <= i + 8'd1;
          g <= first_gate(pass);
        end else begin
          unique case (pass)
            P_MUL: begin
              asel <= !asel;
              if (int'(n) == 2 * TW - 1) begin
                pass <= P_RND;
                i    <= 8'(TWF - 1);
                g    <= first_gate(P_RND);
              end else begin
                n <= n + 8'd1;
                i <= '0;
                g <= first_gate(P_MUL);
              end
            end
            P_RND: begin
              asel <= !asel;
              pass <= P_YP;
              i    <= '0;
              g    <= first_gate(P_YP);
            end
            P_YP: begin
              pass <= P_YM;
              i    <= '0;
              g    <= first_gate(P_YM);
            end
            default: begin
              if (!part) begin
                part <= 1'b1;
                pass <= P_MUL;
                n    <= '0;
                i    <= '0;
                g    <= first_gate(P_MUL);
              end else begin
                run  <= 1'b0;
                done <= 1'b1;
              end
            end
          endcase
        end
      end
    end
  end

  // The layout must fit the array and the operands must fit their fields.
  initial begin
    assert (rows_needed(WMAX, TW) <= ROWS)
      else $fatal(1, "tile_ctrl: layout needs %0d rows, array has %0d", rows_needed(WMAX, TW), ROWS);
  end
  a_width_ok: assert property (@(posedge clk) disable iff (!rst_n)
    (!run && cmd == TC_RUN) |-> (int'(width) >= 1 && int'(width) < WMAX))
    else $error("tile_ctrl: stage width %0d does not fit WMAX=%0d", width, WMAX);

endmodule
