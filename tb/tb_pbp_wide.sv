// tb_pbp_wide: the same network with four hidden neurons (2-4-1) instead of
// two, trained on XOR. It checks that the parameterised datapaths and the
// per-neuron pairs of shared memory components scale: every epoch's error,
// the stop epoch, iteration counts and all final weights are compared with
// a reference model of the pipelined schedule written for any number of
// hidden neurons, and the trained network must solve XOR. With more hidden
// neurons the output neuron has more work per iteration than a hidden
// neuron, so the hidden layer now waits at the synchronization point; the
// testbench prints the resulting degree of parallelism and requires that
// hold time appeared.
`timescale 1ns/1ps
module tb_pbp_wide;
  import pbp_pkg::*;
  `include "pbp_ref.svh"

  localparam int     NH    = 4;
  localparam longint ETA_R = 2 * R_ONE;
  localparam longint WH0 [NH][3] = '{'{32768, -26214, 6553}, '{-19660, 39321, -13107},
                                     '{13107, 19660, -6553},  '{-26214, -13107, 9830}};
  localparam longint WO0 [NH+1]  = '{26214, -32768, 19660, -13107, 3276};
  localparam longint XS [4][2]   = '{'{0, 0}, '{0, 65536}, '{65536, 0}, '{65536, 65536}};
  localparam longint DS [4]      = '{0, 65536, 65536, 0};
  localparam int     MAX_EP      = 1000;
  localparam longint MSE_STOP    = 655;    // 0.01

  localparam fix_t [NH-1:0][2:0] W_HID = {{fix_t'(9830),   -fix_t'(13107), -fix_t'(26214)},
                                          {-fix_t'(6553),  fix_t'(19660),  fix_t'(13107)},
                                          {-fix_t'(13107), fix_t'(39321),  -fix_t'(19660)},
                                          {fix_t'(6553),   -fix_t'(26214), fix_t'(32768)}};
  localparam fix_t [NH:0] W_OUT = {fix_t'(3276), -fix_t'(13107), fix_t'(19660),
                                   -fix_t'(32768), fix_t'(26214)};

  logic clk = 0, rst_n = 0, start = 0;
  logic [31:0] cfg_max_epochs = 0;
  fix_t cfg_mse_stop = '0;
  logic done, converged, epoch_valid;
  logic [31:0] epoch_count;
  fix_t epoch_mse;
  fix_t w_hidden [NH][3];
  fix_t w_out [NH+1];
  logic [31:0] hid_hold_cycles [NH], hid_iterations [NH];
  logic [31:0] out_hold_cycles, out_iterations, run_cycles;

  pbp_top #(.N_HID(NH), .W_HID_INIT(W_HID), .W_OUT_INIT(W_OUT)) dut (.*);

  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  task automatic expect_eq(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  longint mse_ref [MAX_EP];
  longint wh_ref [NH][3], wo_ref [NH+1];
  int     stop_it;
  bit     stop_conv;

  task automatic ref_run(input int max_ep, input longint mse_stop);
    longint xh1 [2], xh2 [2], fp1 [NH], fp2 [NH];
    longint dl [$][NH];
    longint dnew [NH];
    longint xs [2], h [NH], hv, u, y, dy, e, ef, g, sse, xv, d;
    int s;
    wh_ref = WH0; wo_ref = WO0; sse = 0;
    xh1 = '{0, 0}; xh2 = '{0, 0}; fp1 = '{default: 0}; fp2 = '{default: 0};
    stop_it = -1; stop_conv = 0;
    dl.delete();
    s = 0;
    forever begin
      xs = XS[s % 4];
      for (int i = 0; i < NH; i++) begin
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
      if (stop_it >= 0) break;
      u = 0;
      for (int k = 0; k <= NH; k++) begin
        hv = (k < NH) ? h[k] : R_ONE;
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
        for (int i = 0; i < NH; i++) dnew[i] = r_mul(ef, wo_ref[i]);
        dl.push_back(dnew);
        g = r_mul(ef, ETA_R);
        for (int k = 0; k <= NH; k++) begin
          hv = (k < NH) ? h[k] : R_ONE;
          wo_ref[k] = r_w32(wo_ref[k] + r_mul(g, hv));
        end
      end
      s++;
    end
  endtask

  int ep_seen = 0;
  always @(posedge clk) begin
    if (rst_n && epoch_valid) begin
      expect_eq($sformatf("epoch %0d mse", ep_seen), longint'(epoch_mse), mse_ref[ep_seen]);
      ep_seen++;
    end
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint u, hh [NH], y, xv;
    longint hold_total;
    ref_run(MAX_EP, MSE_STOP);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    cfg_max_epochs <= 32'(MAX_EP);
    cfg_mse_stop   <= fix_t'(MSE_STOP);
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    @(posedge clk);
    while (!done) @(posedge clk);
    repeat (60) @(posedge clk);
    expect_eq("converged", converged, 1);
    expect_eq("model converged", stop_conv, 1);
    expect_eq("epochs", epoch_count, (stop_it + 1) / 4);
    expect_eq("epoch reports", ep_seen, (stop_it + 1) / 4);
    expect_eq("output iterations", out_iterations, stop_it + 1);
    hold_total = 0;
    for (int i = 0; i < NH; i++) begin
      expect_eq($sformatf("hidden %0d iterations", i), hid_iterations[i], stop_it + 2);
      for (int k = 0; k < 3; k++)
        expect_eq($sformatf("hidden %0d weight %0d", i, k), longint'(w_hidden[i][k]), wh_ref[i][k]);
      hold_total += hid_hold_cycles[i];
    end
    for (int k = 0; k <= NH; k++)
      expect_eq($sformatf("output weight %0d", k), longint'(w_out[k]), wo_ref[k]);
    // the trained 2-4-1 network must solve XOR
    for (int p = 0; p < 4; p++) begin
      for (int i = 0; i < NH; i++) begin
        u = 0;
        for (int k = 0; k < 3; k++) begin
          xv = (k < 2) ? XS[p][k] : R_ONE;
          u = r_w32(u + r_mul(longint'(w_hidden[i][k]), xv));
        end
        hh[i] = r_sig(u);
      end
      u = 0;
      for (int k = 0; k <= NH; k++) u = r_w32(u + r_mul(longint'(w_out[k]), (k < NH) ? hh[k] : R_ONE));
      y = r_sig(u);
      checks++;
      if ((y >= 32768) != (DS[p] == R_ONE)) begin
        failures++; $display("FAIL XOR pattern %0d misclassified", p);
      end
    end
    // the output neuron is now the slower layer: the hidden neurons wait
    checks++;
    if (hid_hold_cycles[0] == 0) begin failures++; $display("FAIL no hold time in the hidden layer"); end
    $display("2-4-1: %0d epochs in %0d cycles (%0d per epoch), final mse %0.5f",
             epoch_count, run_cycles, run_cycles / epoch_count, real'(epoch_mse) / 65536.0);
    $display("       Pd hidden 0 = %0.1f %% (mean over hidden %0.1f %%)",
             100.0 * (1.0 - real'(hid_hold_cycles[0]) / real'(run_cycles)),
             100.0 * (1.0 - real'(hold_total) / real'(NH) / real'(run_cycles)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
