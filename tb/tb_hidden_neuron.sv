// tb_hidden_neuron: drives one hidden neuron the way the output neuron and
// the two shared memory components would, round after round, with random
// deltas, random input samples and random delays on both handshakes.
// Checks, against a reference model of the delayed (pipelined) update:
// every h_i it posts, its weights at the end, the number of iterations,
// the 9-cycle latency from taking the backward words to posting h_i when
// the forward component is free, and the hold-cycle count, which must equal
// the waits the testbench imposed.
`timescale 1ns/1ps
module tb_hidden_neuron;
  import pbp_pkg::*;
  `include "pbp_ref.svh"

  localparam int     N_IN   = 2;
  localparam int     ROUNDS = 60;
  localparam longint ETA_R  = 2 * R_ONE;
  localparam longint W0 [3] = '{32768, -26214, 6553};

  logic clk = 0, rst_n = 0, start = 0;
  logic bwd_full = 0, bwd_take;
  logic [1:0] bwd_addr;
  fix_t bwd_data;
  fix_t bwd_words [3];
  logic fwd_empty = 1, fwd_we, fwd_post;
  logic [0:0] fwd_addr;
  fix_t fwd_data;
  fix_t w [3];
  logic [31:0] hold_cycles, iterations;

  int checks = 0, failures = 0;
  longint cyc = 0;

  hidden_neuron #(.N_IN(N_IN)) dut (
    .clk, .rst_n, .start,
    .bwd_full, .bwd_addr, .bwd_data, .bwd_take,
    .fwd_empty, .fwd_we, .fwd_addr, .fwd_data, .fwd_post,
    .w, .hold_cycles, .iterations
  );

  assign bwd_data = bwd_words[bwd_addr];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic expect_eq(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // reference model state
  longint wr [3];
  longint x1 [2], x2 [2];
  longint fp1, fp2;

  function automatic longint ref_round(input longint delta, input longint xs [2]);
    longint g, u, h, xv;
    g = r_mul(r_mul(fp2, delta), ETA_R);
    for (int k = 0; k < 3; k++) begin
      xv = (k < 2) ? x2[k] : R_ONE;
      wr[k] = r_w32(wr[k] + r_mul(g, xv));
    end
    u = 0;
    for (int k = 0; k < 3; k++) begin
      xv = (k < 2) ? xs[k] : R_ONE;
      u = r_w32(u + r_mul(wr[k], xv));
    end
    h = r_sig(u);
    fp2 = fp1; fp1 = r_dsig(h);
    x2 = x1;   x1 = xs;
    return h;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint hold_exp = 0, t_take, c_free, d_wait, stall;
    longint delta, h_exp, xs [2];
    wr = W0; x1 = '{0, 0}; x2 = '{0, 0}; fp1 = 0; fp2 = 0;
    bwd_words = '{default: '0};
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    start <= 1;
    @(posedge clk);            // start sampled here
    start <= 0;
    c_free = 0;                // forward component free from the start
    for (int r = 0; r < ROUNDS; r++) begin
      d_wait = $urandom_range(0, 6);
      repeat (d_wait) @(posedge clk);
      hold_exp += d_wait;
      // what the output neuron would post: delta (0 for the first two rounds)
      delta = (r < 2) ? 0 : longint'($urandom_range(0, 65536)) - 32768;
      xs[0] = longint'($urandom_range(0, 131072)) - 65536;
      xs[1] = longint'($urandom_range(0, 131072)) - 65536;
      bwd_words[0] <= fix_t'(delta);
      bwd_words[1] <= fix_t'(xs[0]);
      bwd_words[2] <= fix_t'(xs[1]);
      bwd_full <= 1;
      h_exp = ref_round(delta, xs);
      // component taken back
      do @(posedge clk); while (!bwd_take);
      bwd_full <= 0;
      t_take = cyc;
      // h_i posted
      do @(posedge clk); while (!(fwd_we && fwd_post));
      expect_eq($sformatf("h round %0d", r), longint'(fwd_data), h_exp);
      // it waited only while the forward component was still full
      // (the component reads as free from the edge after cycle c_free + 1)
      stall = (c_free + 1 > t_take + 9) ? c_free + 1 - (t_take + 9) : 0;
      hold_exp += stall;
      expect_eq($sformatf("take-to-post cycles round %0d", r), cyc - t_take, 9 + stall);
      // the reader frees the forward component some cycles later
      fwd_empty <= 0;
      c_free = cyc + $urandom_range(0, 24);
      fork
        begin
          automatic longint t_free = c_free;
          while (cyc < t_free) @(posedge clk);
          fwd_empty <= 1;
        end
      join_none
    end
    repeat (2) @(posedge clk);
    for (int k = 0; k < 3; k++) expect_eq($sformatf("final weight %0d", k), longint'(w[k]), wr[k]);
    expect_eq("iterations", iterations, ROUNDS);
    // plus the one cycle it has waited for a next round that never comes
    expect_eq("hold cycles", hold_cycles, hold_exp + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
