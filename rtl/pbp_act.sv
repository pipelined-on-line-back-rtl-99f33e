// pbp_act: activation function f(u) of a neuron and its derivative f'(u).
//
// f is the logistic sigmoid 1/(1+exp(-u)), approximated by the piecewise
// linear "PLAN" curve, which needs only shifts and adds:
//   |u| >= 5          : y = 1
//   2.375 <= |u| < 5  : y = |u|/32 + 0.84375
//   1 <= |u| < 2.375  : y = |u|/8  + 0.625
//   |u| < 1           : y = |u|/4  + 0.5
// and y(-u) = 1 - y(u). The derivative is formed from the output as
// f'(u) = y * (1 - y), the identity that holds for the exact sigmoid.
// The network needs some f and f'; which sigmoid, and this approximation,
// are this design's choice.
//
// Interface: u in, y = f(u) and dy = f'(u) out, all pbp_pkg::fix_t.
// Timing: purely combinational.
module pbp_act
  import pbp_pkg::*;
(
  input  fix_t u,
  output fix_t y,
  output fix_t dy
);

  // breakpoints and offsets in the fixed-point format
  localparam fix_t U_SAT  = fix_t'(5) <<< FRAC;          // 5.0
  localparam fix_t U_MID  = (fix_t'(19) <<< FRAC) >>> 3;  // 2.375
  localparam fix_t OFS_HI = (fix_t'(27) <<< FRAC) >>> 5;  // 0.84375
  localparam fix_t OFS_MD = (fix_t'(5) <<< FRAC) >>> 3;   // 0.625
  localparam fix_t OFS_LO = FIX_ONE >>> 1;                // 0.5

  fix_t mag;   // |u|
  fix_t ypos;  // f(|u|)

  always_comb begin
    mag = u[WORD_W-1] ? -u : u;
    if (mag >= U_SAT)       ypos = FIX_ONE;
    else if (mag >= U_MID)  ypos = (mag >>> 5) + OFS_HI;
    else if (mag >= FIX_ONE) ypos = (mag >>> 3) + OFS_MD;
    else                    ypos = (mag >>> 2) + OFS_LO;
    y  = u[WORD_W-1] ? FIX_ONE - ypos : ypos;
    dy = fmul(y, FIX_ONE - y);
  end

endmodule
