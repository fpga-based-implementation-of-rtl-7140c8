// cordic_sincos: cosine and sine of the reference angle theta* by CORDIC.
//
// Iterative rotation-mode CORDIC, one micro-rotation per clock. The binary
// angle (2^20 = one turn) is first folded into [-quarter, +quarter) turn by
// subtracting half a turn when it lies in the second or third quadrant; the
// results are then negated. The vector starts at (1/K, 0) with the CORDIC
// gain K = 1.64676 pre-compensated, and micro-rotation i turns it by
// +-atan(2^-i). The angle table holds round(atan(2^-i) / (2*pi) * 2^20).
//
// Timing: `start` (one cycle) captures `angle`; after ITER iterations, the
// results are rounded from the internal 20 fraction bits and
// written to `cos_o` / `sin_o` (Q2.16); `done` is high ITER+2 cycles
// after the cycle in which `start` was high (one cycle to load, ITER to
// iterate, one to round and write). `busy` is high in between; a `start` while
// busy is ignored. Outputs hold until the next result.
//
// The method names CORDIC SINCOS as the source of sin/cos of theta*; the
// iteration count, word lengths and the iterative (not unrolled) form are
// this design's choices.
module cordic_sincos
  import fsmpc_pkg::*;
#(
  parameter int ITER = 16
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  angle_t angle,
  output logic   busy,
  output logic   done,
  output trig_t  cos_o,
  output trig_t  sin_o
);
  localparam int GF = 4;                 // extra fraction bits inside the iterations
  localparam int XW = TRIG_W + 2 + GF;   // plus two guard bits of range
  localparam int ZW = ANGLE_W + 1;
  localparam int IW = (ITER > 1) ? $clog2(ITER + 1) : 1;
  localparam logic signed [XW-1:0] X_INIT = XW'(636751);  // 2^20 / 1.64676

  function automatic logic signed [ZW-1:0] atan_tab(int i);
    case (i)
      0:  return ZW'(131072);
      1:  return ZW'(77376);
      2:  return ZW'(40884);
      3:  return ZW'(20753);
      4:  return ZW'(10417);
      5:  return ZW'(5213);
      6:  return ZW'(2607);
      7:  return ZW'(1304);
      8:  return ZW'(652);
      9:  return ZW'(326);
      10: return ZW'(163);
      11: return ZW'(81);
      12: return ZW'(41);
      13: return ZW'(20);
      14: return ZW'(10);
      15: return ZW'(5);
      16: return ZW'(3);
      17: return ZW'(1);
      default: return '0;
    endcase
  endfunction

  logic signed [XW-1:0] x, y;
  logic signed [ZW-1:0] z;
  logic [IW-1:0]        it;
  logic                 neg;
  angle_t               folded;
  logic signed [XW-1:0] x_rnd, y_rnd;

  // drop the extra fraction bits, rounding to nearest
  assign x_rnd = (x + XW'(1 << (GF - 1))) >>> GF;
  assign y_rnd = (y + XW'(1 << (GF - 1))) >>> GF;

  always_comb begin
    folded = angle;
    if (angle[ANGLE_W-1] ^ angle[ANGLE_W-2])
      folded[ANGLE_W-1] = ~angle[ANGLE_W-1];   // +-half turn
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x     <= '0;
      y     <= '0;
      z     <= '0;
      it    <= '0;
      neg   <= 1'b0;
      busy  <= 1'b0;
      done  <= 1'b0;
      cos_o <= trig_t'(65536);
      sin_o <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          x    <= X_INIT;
          y    <= '0;
          z    <= ZW'(signed'(folded));
          neg  <= angle[ANGLE_W-1] ^ angle[ANGLE_W-2];
          it   <= '0;
          busy <= 1'b1;
        end
      end else if (it == IW'(ITER)) begin
        cos_o <= sat_trig(neg ? -48'(x_rnd) : 48'(x_rnd));
        sin_o <= sat_trig(neg ? -48'(y_rnd) : 48'(y_rnd));
        done  <= 1'b1;
        busy  <= 1'b0;
      end else begin
        if (z >= 0) begin
          x <= x - (y >>> it);
          y <= y + (x >>> it);
          z <= z - atan_tab(int'(it));
        end else begin
          x <= x + (y >>> it);
          y <= y - (x >>> it);
          z <= z + atan_tab(int'(it));
        end
        it <= it + 1'b1;
      end
    end
  end

  initial assert (ITER >= 1 && ITER <= 18) else $error("ITER must be 1..18");
endmodule
