// fsmpc_pkg: number formats, plant constants and the switching-state table
// shared by the finite-set model predictive current controllers (FS-MPC)
// of a two-level three-phase voltage source inverter (VSI) with RL load.
//
// Number formats (this design's choice; the method only calls for fixed point):
//   fx_t    signed 18 bit, 10 fraction bits (Q8.10): currents [A], voltages [V]
//   coef_t  signed 18 bit, 14 fraction bits (Q4.14): model coefficients k1, k2, k3
//   trig_t  signed 18 bit, 16 fraction bits (Q2.16): cos/sin of the reference angle
//   cost_t  unsigned 20 bit, 10 fraction bits: cost function values g
//   angle_t unsigned 20 bit binary angle, 2^20 = one full turn (2*pi)
//
// Plant and controller constants follow the method: Vdc = 145 V, R = 10 ohm,
// L = 10 mH, Ts = 50 us, which give k1 = 1 - R*Ts/L = 0.95 and k2 = Ts/L = 0.005
// (per volt, in A). The reference frequency of 50 Hz (k3 = w*L = 3.1416) and
// the 100 MHz system clock are this design's own assumptions.
//
// Switching states S0..S7 and their voltage vectors (stationary alpha-beta):
//   S0=000 ( 0        , 0          )   S4=011 (-2Vdc/3 , 0          )
//   S1=100 ( 2Vdc/3   , 0          )   S5=001 (-Vdc/3  , -sqrt3Vdc/3)
//   S2=110 ( Vdc/3    , sqrt3Vdc/3 )   S6=101 ( Vdc/3  , -sqrt3Vdc/3)
//   S3=010 (-Vdc/3    , sqrt3Vdc/3 )   S7=111 ( 0      , 0          )
// The 3-bit state is {Sa, Sb, Sc}; read as a binary number it is the state's
// "index number" (for example S1 = 100 has index 4).
package fsmpc_pkg;

  localparam int FX_W    = 18;
  localparam int FX_F    = 10;
  localparam int COEF_W  = 18;
  localparam int COEF_F  = 14;
  localparam int TRIG_W  = 18;
  localparam int TRIG_F  = 16;
  localparam int COST_W  = 20;
  localparam int ANGLE_W = 20;
  localparam int NSTATES = 8;

  typedef logic signed [FX_W-1:0]   fx_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [TRIG_W-1:0] trig_t;
  typedef logic        [COST_W-1:0] cost_t;
  typedef logic        [ANGLE_W-1:0] angle_t;
  typedef logic        [2:0]        sw_state_t;   // {Sa, Sb, Sc}

  // Plant and timing constants (method values, plus assumed clock and frequency)
  localparam real VDC_V     = 145.0;
  localparam real R_OHM     = 10.0;
  localparam real L_H       = 10.0e-3;
  localparam real TS_S      = 50.0e-6;
  localparam real F_REF_HZ  = 50.0;
  localparam real CLK_HZ    = 100.0e6;
  localparam real PI        = 3.14159265358979;

  // Real value -> nearest code with the given number of fraction bits
  // (a real-to-int cast rounds to nearest, ties away from zero)
  function automatic int to_fixed(real v, int frac);
    return int'(v * (2.0 ** frac));
  endfunction

  // Saturate a wide signed value to the data format
  function automatic fx_t sat_fx(logic signed [47:0] v);
    if (v > 48'sd131071)       return fx_t'(18'sd131071);
    else if (v < -48'sd131072) return fx_t'(-18'sd131072);
    else                       return fx_t'(v);
  endfunction

  // Saturate a wide signed value to the trigonometric format
  function automatic trig_t sat_trig(logic signed [47:0] v);
    if (v > 48'sd131071)       return trig_t'(18'sd131071);
    else if (v < -48'sd131072) return trig_t'(-18'sd131072);
    else                       return trig_t'(v);
  endfunction

  localparam coef_t K1_DEFAULT = coef_t'(to_fixed(1.0 - R_OHM * TS_S / L_H, COEF_F));
  localparam coef_t K2_DEFAULT = coef_t'(to_fixed(TS_S / L_H, COEF_F));
  localparam coef_t K3_DEFAULT = coef_t'(to_fixed(2.0 * PI * F_REF_HZ * L_H, COEF_F));
  localparam coef_t INV_SQRT3  = coef_t'(to_fixed(1.0 / 1.7320508075688772, COEF_F));

  localparam int TS_CYCLES_DEFAULT = int'(CLK_HZ * TS_S);            // 5000
  // Angle step per sample: F_REF * Ts of a turn, on a 32-bit accumulator
  localparam logic [31:0] THETA_STEP_DEFAULT = 32'(longint'(F_REF_HZ * TS_S * (2.0 ** 32)));

  // Switching state of each candidate S0..S7 (Table of states above)
  function automatic sw_state_t state_bits(int i);
    case (i)
      0: return 3'b000;
      1: return 3'b100;
      2: return 3'b110;
      3: return 3'b010;
      4: return 3'b011;
      5: return 3'b001;
      6: return 3'b101;
      default: return 3'b111;
    endcase
  endfunction

  // Inverter output voltage vector of a state: v = 2/3 (vaN + a vbN + a^2 vcN)
  // with phase voltages Sx*Vdc, i.e. alpha = Vdc/3 (2Sa - Sb - Sc),
  // beta = Vdc/sqrt3 (Sb - Sc).
  function automatic fx_t valpha(real vdc, int i);
    sw_state_t s;
    s = state_bits(i);
    return fx_t'(to_fixed(vdc / 3.0 * real'(2 * int'(s[2]) - int'(s[1]) - int'(s[0])), FX_F));
  endfunction

  function automatic fx_t vbeta(real vdc, int i);
    sw_state_t s;
    int        d;
    s = state_bits(i);
    d = int'(s[1]) - int'(s[0]) + 0 * int'(s[2]);
    return fx_t'(to_fixed(vdc / 1.7320508075688772 * real'(d), FX_F));
  endfunction

endpackage
