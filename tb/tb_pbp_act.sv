// tb_pbp_act: checks the activation unit against the reference PLAN sigmoid
// and its derivative y(1-y) over a sweep of u, plus known points
// (f(0) = 0.5, f'(0) = 0.25, saturation at |u| >= 5) and the symmetry
// f(-u) = 1 - f(u).
`timescale 1ns/1ps
module tb_pbp_act;
  import pbp_pkg::*;
  `include "pbp_ref.svh"

  fix_t u, y, dy;
  int checks = 0, failures = 0;
  localparam longint BREAKS [3] = '{65536, 155648, 327680};

  pbp_act dut (.u(u), .y(y), .dy(dy));

  task automatic check_point(input longint uv);
    longint ey, edy;
    u = fix_t'(uv);
    #1;
    ey  = r_sig(uv);
    edy = r_dsig(ey);
    checks++;
    if (longint'(y) != ey || longint'(dy) != edy) begin
      failures++;
      if (failures < 10)
        $display("FAIL u=%0d y=%0d (exp %0d) dy=%0d (exp %0d)", uv, y, ey, dy, edy);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ypos, yneg;
    // known points
    u = '0; #1;
    checks++; if (y != 32768 || dy != 16384) begin failures++; $display("FAIL f(0)"); end
    u = fix_t'(6 * 65536); #1;
    checks++; if (y != 65536 || dy != 0) begin failures++; $display("FAIL f(6)"); end
    u = fix_t'(-6 * 65536); #1;
    checks++; if (y != 0 || dy != 0) begin failures++; $display("FAIL f(-6)"); end
    // sweep -8 .. 8 with an odd step, and the breakpoints
    for (longint uv = -8 * 65536; uv <= 8 * 65536; uv += 997) check_point(uv);
    for (int i = 0; i < 3; i++) begin
      automatic longint bp = BREAKS[i];
      check_point(bp - 1); check_point(bp); check_point(-bp); check_point(-bp + 1);
    end
    // symmetry and monotonicity on random points
    for (int i = 0; i < 200; i++) begin
      longint uv = longint'($urandom_range(0, 7 * 65536));
      u = fix_t'(uv); #1; ypos = longint'(y);
      u = fix_t'(-uv); #1; yneg = longint'(y);
      checks++;
      if (ypos + yneg != 65536 || ypos < 32768) begin
        failures++; $display("FAIL symmetry u=%0d", uv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
