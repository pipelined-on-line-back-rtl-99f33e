// pbp_ref.svh: reference arithmetic for the testbenches, written directly
// on 64-bit integers holding Q15.16 values (65536 = 1.0), independent of
// the RTL's package.
`ifndef PBP_REF_SVH
`define PBP_REF_SVH

localparam longint R_ONE = 65536;

// product of two Q15.16 numbers, rounded toward minus infinity
function automatic longint r_mul(input longint a, input longint b);
  return (a * b) >>> 16;
endfunction

// PLAN approximation of the logistic sigmoid
function automatic longint r_sig(input longint u);
  longint a, y;
  a = (u < 0) ? -u : u;
  if (a >= 5 * R_ONE)           y = R_ONE;
  else if (a >= 155648)         y = a / 32 + 55296;   // 2.375, 0.84375
  else if (a >= R_ONE)          y = a / 8 + 40960;    // 0.625
  else                          y = a / 4 + 32768;    // 0.5
  return (u < 0) ? R_ONE - y : y;
endfunction

function automatic longint r_dsig(input longint y);
  return r_mul(y, R_ONE - y);
endfunction

// back to a signed 32-bit word, as the RTL holds it
function automatic longint r_w32(input longint v);
  return longint'(int'(v));
endfunction

`endif
