// tb_pbp_top: end-to-end test of the 2-2-1 network at its default
// parameters, trained on XOR by pipelined on-line back-propagation.
//
// A reference model runs the same schedule (the hidden layer computes
// sample t+1 while the output neuron handles sample t, so each hidden
// weight update uses the delta of two samples back) in plain integer
// arithmetic. The testbench compares every epoch's mean square error, the
// stop epoch, the iteration counts and all final weights with it, and
// checks that the trained network solves XOR.
//   run 1: the epoch limit (5 epochs) stops training;
//   run 2: restart, training runs until the epoch error is below 0.01.
// It counts how often each mechanism happened and fails if one never did:
// hidden neurons on hold at the synchronization point, the output neuron
// waiting for the hidden layer, iterations of both layers (each one a post
// and a take of shared memory components), delayed updates of the hidden weights, epoch reports,
// both stop conditions and the restart. It prints the degree of
// parallelism Pd = 100 * (1 - hold / total) of each hidden neuron and the
// training speed in epochs per second at a 100 MHz clock.
`timescale 1ns/1ps
module tb_pbp_top;
  import pbp_pkg::*;
  `include "pbp_ref.svh"

  localparam longint ETA_R = 2 * R_ONE;
  localparam longint WH0 [2][3] = '{'{32768, -26214, 6553}, '{-19660, 39321, -13107}};
  localparam longint WO0 [3]    = '{26214, -32768, 3276};
  localparam longint XS [4][2]  = '{'{0, 0}, '{0, 65536}, '{65536, 0}, '{65536, 65536}};
  localparam longint DS [4]     = '{0, 65536, 65536, 0};
  localparam int     MAX_EP     = 1000;
  localparam longint MSE_STOP   = 655;    // 0.01

  logic clk = 0, rst_n = 0, start = 0;
  logic [31:0] cfg_max_epochs = 0;
  fix_t cfg_mse_stop = '0;
  logic done, converged, epoch_valid;
  logic [31:0] epoch_count;
  fix_t epoch_mse;
  fix_t w_hidden [2][3];
  fix_t w_out [3];
  logic [31:0] hid_hold_cycles [2], hid_iterations [2];
  logic [31:0] out_hold_cycles, out_iterations, run_cycles;

  pbp_top dut (.*);

  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  task automatic expect_eq(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // ---------------- reference model ----------------
  longint mse_ref [MAX_EP];
  longint wh_ref [2][3], wo_ref [3];
  int     stop_it;
  bit     stop_conv;

  task automatic ref_run(input int max_ep, input longint mse_stop);
    longint xh1 [2], xh2 [2], fp1 [2], fp2 [2];   // hidden history
    longint dl [$][2];                             // deltas per sample
    longint xs [2], h [2], hv, u, y, dy, e, ef, g, sse, xv;
    int s;
    wh_ref = WH0; wo_ref = WO0; sse = 0;
    xh1 = '{0, 0}; xh2 = '{0, 0}; fp1 = '{0, 0}; fp2 = '{0, 0};
    stop_it = -1; stop_conv = 0;
    dl.delete();
    s = 0;
    forever begin
      // hidden round s: delayed update with delta(s-2), then h(s)
      xs = XS[s % 4];
      for (int i = 0; i < 2; i++) begin
        longint d;
        d = (s >= 2) ? dl[s - 2][i] : 0;
        g = r_mul(r_mul(fp2[i], d), ETA_R);
        for (int k = 0; k < 3; k++) begin
          xv = (k < 2) ? xh2[k] : R_ONE;
          wh_ref[i][k] = r_w32(wh_ref[i][k] + r_mul(g, xv));
        end
        u = 0;
        for (int k = 0; k < 3; k++) begin
          xv = (k < 2) ? xs[k] : R_ONE;
          u = r_w32(u + r_mul(wh_ref[i][k], xv));
        end
        h[i] = r_sig(u);
        fp2[i] = fp1[i]; fp1[i] = r_dsig(h[i]);
      end
      xh2 = xh1; xh1 = xs;
      if (stop_it >= 0) break;   // the hidden layer's last round
      // output iteration s
      u = 0;
      for (int k = 0; k < 3; k++) begin
        hv = (k < 2) ? h[k] : R_ONE;
        u = r_w32(u + r_mul(wo_ref[k], hv));
      end
      y  = r_sig(u);
      dy = r_dsig(y);
      e  = DS[s % 4] - y;
      sse += r_mul(e, e);
      if (s % 4 == 3) begin
        mse_ref[s / 4] = sse / 4;
        sse = 0;
        if (mse_ref[s / 4] < mse_stop) begin stop_it = s; stop_conv = 1; end
        else if (s / 4 + 1 >= max_ep)  stop_it = s;
      end
      if (stop_it < 0) begin
        ef = r_mul(e, dy);
        dl.push_back('{r_mul(ef, wo_ref[0]), r_mul(ef, wo_ref[1])});
        g = r_mul(ef, ETA_R);
        for (int k = 0; k < 3; k++) begin
          hv = (k < 2) ? h[k] : R_ONE;
          wo_ref[k] = r_w32(wo_ref[k] + r_mul(g, hv));
        end
      end
      s++;
    end
  endtask

  // ---------------- mechanism counters ----------------
  int n_hold_hid, n_hold_out, n_fwd_post, n_fwd_take;
  int n_delayed_upd, n_epoch, n_stop_conv, n_stop_limit, n_restart;
  logic [31:0] prev_hold [2];
  logic [31:0] prev_out_hold, prev_oit;
  logic [31:0] prev_hit [2];
  fix_t        prev_wh [2][3];
  logic        prev_done;

  always @(posedge clk) begin
    if (rst_n) begin
      for (int i = 0; i < 2; i++) begin
        if (hid_hold_cycles[i] > prev_hold[i]) n_hold_hid++;
        if (hid_iterations[i] > prev_hit[i]) n_fwd_post++;
        for (int k = 0; k < 3; k++)
          if (!start && w_hidden[i][k] != prev_wh[i][k]) n_delayed_upd++;
      end
      if (out_hold_cycles > prev_out_hold) n_hold_out++;
      if (out_iterations > prev_oit) n_fwd_take++;
      if (epoch_valid) n_epoch++;
      if (start) n_restart++;
      if (done && !prev_done) begin
        if (converged) n_stop_conv++;
        else           n_stop_limit++;
      end
    end
    prev_hold     <= hid_hold_cycles;
    prev_out_hold <= out_hold_cycles;
    prev_hit      <= hid_iterations;
    prev_oit      <= out_iterations;
    prev_wh       <= w_hidden;
    prev_done     <= done;
  end

  // epoch error history, as a host would log it
  int ep_seen;
  always @(posedge clk) begin
    if (rst_n && epoch_valid) begin
      expect_eq($sformatf("epoch %0d mse", ep_seen), longint'(epoch_mse), mse_ref[ep_seen]);
      ep_seen++;
    end
  end

  task automatic run(input int max_ep, input longint mse_stop);
    real pd0, pd1;
    ref_run(max_ep, mse_stop);
    ep_seen = 0;
    cfg_max_epochs <= 32'(max_ep);
    cfg_mse_stop   <= fix_t'(mse_stop);
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    @(posedge clk);
    while (!done) @(posedge clk);
    repeat (40) @(posedge clk);    // let the hidden layer finish its round
    expect_eq("converged", converged, stop_conv);
    expect_eq("epochs", epoch_count, (stop_it + 1) / 4);
    expect_eq("epoch reports", ep_seen, (stop_it + 1) / 4);
    expect_eq("output iterations", out_iterations, stop_it + 1);
    for (int i = 0; i < 2; i++) begin
      expect_eq($sformatf("hidden %0d iterations", i), hid_iterations[i], stop_it + 2);
      for (int k = 0; k < 3; k++)
        expect_eq($sformatf("hidden %0d weight %0d", i, k), longint'(w_hidden[i][k]), wh_ref[i][k]);
    end
    for (int k = 0; k < 3; k++)
      expect_eq($sformatf("output weight %0d", k), longint'(w_out[k]), wo_ref[k]);
    if (converged) check_xor();
    pd0 = 100.0 * (1.0 - real'(hid_hold_cycles[0]) / real'(run_cycles));
    pd1 = 100.0 * (1.0 - real'(hid_hold_cycles[1]) / real'(run_cycles));
    $display("run: %0d epochs in %0d cycles, final mse %0.5f, converged %0d",
             epoch_count, run_cycles, real'(epoch_mse) / 65536.0, converged);
    $display("     Pd hidden 0 = %0.1f %%, hidden 1 = %0.1f %%, %0.0f epochs/s at 100 MHz",
             pd0, pd1, 1.0e8 * real'(epoch_count) / real'(run_cycles));
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    run(5, MSE_STOP);          // stopped by the epoch limit
    run(MAX_EP, MSE_STOP);     // restarted, stopped by the error criterion
    checks++;
    if (stop_conv == 0) begin failures++; $display("FAIL training did not converge"); end
    $display("mechanisms: hidden hold %0d, output wait %0d, hidden iterations %0d, output iterations %0d",
             n_hold_hid, n_hold_out, n_fwd_post, n_fwd_take);
    $display("            delayed weight changes %0d, epoch reports %0d, stops conv/limit %0d/%0d, restarts %0d",
             n_delayed_upd, n_epoch, n_stop_conv, n_stop_limit, n_restart);
    check_seen("hidden hold", n_hold_hid);
    check_seen("output wait", n_hold_out);
    check_seen("hidden iteration (forward post)", n_fwd_post);
    check_seen("output iteration (forward take)", n_fwd_take);
    check_seen("delayed hidden update", n_delayed_upd);
    check_seen("epoch report", n_epoch);
    check_seen("stop on error", n_stop_conv);
    check_seen("stop on epoch limit", n_stop_limit);
    check_seen("restart", n_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the trained network, evaluated with the weights the design ends with,
  // must classify all four XOR patterns on the right side of 0.5
  task automatic check_xor();
    longint u, h [2], y, xv;
    for (int p = 0; p < 4; p++) begin
      for (int i = 0; i < 2; i++) begin
        u = 0;
        for (int k = 0; k < 3; k++) begin
          xv = (k < 2) ? XS[p][k] : R_ONE;
          u = r_w32(u + r_mul(longint'(w_hidden[i][k]), xv));
        end
        h[i] = r_sig(u);
      end
      u = 0;
      for (int k = 0; k < 3; k++) u = r_w32(u + r_mul(longint'(w_out[k]), (k < 2) ? h[k] : R_ONE));
      y = r_sig(u);
      $display("     trained net: x = %0d%0d -> y = %0.3f", XS[p][0] / R_ONE, XS[p][1] / R_ONE, real'(y) / 65536.0);
      checks++;
      if ((y >= 32768) != (DS[p] == R_ONE)) begin
        failures++; $display("FAIL XOR pattern %0d misclassified", p);
      end
    end
  endtask

  task automatic check_seen(input string what, input int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
  endtask
endmodule
