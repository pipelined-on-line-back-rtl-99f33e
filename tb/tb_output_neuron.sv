// tb_output_neuron: plays the two hidden neurons and the four shared memory
// components around one output neuron. The "hidden neurons" answer every
// sample with random h_i values after random delays, so both semaphore
// handshakes stall now and then. A reference model of the output neuron's
// share of pipelined back-propagation gives the expected contents of every
// backward message (delta_i one iteration late, then the next XOR sample),
// the mean square error of every epoch, the stop epoch and the final
// weights. Two runs: one stopped by the epoch limit, then a restart that
// stops because the error fell below the threshold. Also checks the
// 12-cycle latency from taking the h_i to posting the next message when
// the backward components are free.
`timescale 1ns/1ps
module tb_output_neuron;
  import pbp_pkg::*;
  `include "pbp_ref.svh"

  localparam int     NH     = 2;
  localparam int     NPAT   = 4;
  localparam int     MAXIT  = 48;
  localparam longint ETA_R  = 2 * R_ONE;
  localparam longint W0 [3] = '{26214, -32768, 3276};
  localparam longint XS [4][2] = '{'{0, 0}, '{0, 65536}, '{65536, 0}, '{65536, 65536}};
  localparam longint DS [4] = '{0, 65536, 65536, 0};

  logic clk = 0, rst_n = 0, start = 0;
  logic [31:0] cfg_max_epochs = 0;
  fix_t cfg_mse_stop = '0;
  logic bwd_empty [NH], bwd_we [NH], bwd_post [NH];
  logic [1:0] bwd_addr;
  fix_t bwd_wdata [NH];
  logic fwd_full [NH], fwd_take [NH];
  logic [0:0] fwd_addr;
  fix_t fwd_rdata [NH];
  logic done, converged, epoch_valid;
  logic [31:0] epoch_count, hold_cycles, iterations;
  fix_t epoch_mse;
  fix_t w [3];

  output_neuron dut (.*);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic expect_eq(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // stimulus and reference results
  longint hin [MAXIT][NH];       // h_i the hidden layer returns for sample r
  longint dref [MAXIT][NH];      // delta_i computed from sample r
  longint mse_ref [MAXIT/NPAT];
  longint wfin [3];              // weights when training stops
  int     stop_it;               // iteration at which training stops
  bit     stop_conv;

  // reference of the output neuron for a given pair of stop settings
  task automatic ref_run(input int max_ep, input longint mse_stop);
    longint wr [3], hv, u, y, e, dy, ef, g, sse;
    wr = W0; sse = 0; stop_it = -1; stop_conv = 0;
    for (int r = 0; r < MAXIT; r++) begin
      u = 0;
      for (int k = 0; k < 3; k++) begin
        hv = (k < NH) ? hin[r][k] : R_ONE;
        u = r_w32(u + r_mul(wr[k], hv));
      end
      y  = r_sig(u);
      dy = r_dsig(y);
      e  = DS[r % NPAT] - y;
      sse += r_mul(e, e);
      if (r % NPAT == NPAT - 1) begin
        mse_ref[r / NPAT] = sse / NPAT;
        sse = 0;
        if (mse_ref[r / NPAT] < mse_stop) begin stop_it = r; stop_conv = 1; break; end
        if (r / NPAT + 1 >= max_ep) begin stop_it = r; break; end
      end
      ef = r_mul(e, dy);
      for (int i = 0; i < NH; i++) dref[r][i] = r_mul(ef, wr[i]);
      g = r_mul(ef, ETA_R);
      for (int k = 0; k < 3; k++) begin
        hv = (k < NH) ? hin[r][k] : R_ONE;
        wr[k] = r_w32(wr[k] + r_mul(g, hv));
      end
    end
    wfin = wr;
  endtask

  // ---- the two "hidden neurons" with their memory components ----
  fix_t bwd_mem [NH][3];
  int   msg_seen [NH];
  int   lat_checks = 0;

  // backward components: store writes, raise full on post
  always @(posedge clk) begin
    for (int i = 0; i < NH; i++) begin
      if (bwd_we[i]) bwd_mem[i][bwd_addr] <= bwd_wdata[i];
    end
  end

  task automatic hidden(input int i, input int n_msgs);
    for (int m = 0; m < n_msgs; m++) begin
      longint d_exp, x_exp;
      // wait for message m in backward component i
      do @(posedge clk); while (bwd_empty[i]);
      repeat ($urandom_range(0, 8)) @(posedge clk);
      d_exp = (m < 2) ? 0 : dref[m - 2][i];
      expect_eq($sformatf("bwd%0d msg %0d delta", i, m), longint'(bwd_mem[i][0]), d_exp);
      for (int k = 0; k < 2; k++) begin
        x_exp = XS[m % NPAT][k];
        expect_eq($sformatf("bwd%0d msg %0d x%0d", i, m, k), longint'(bwd_mem[i][k+1]), x_exp);
      end
      bwd_empty[i] <= 1;
      msg_seen[i]++;
      // compute for a while, then post h_i of sample m
      repeat ($urandom_range(0, 14)) @(posedge clk);
      while (fwd_full[i]) @(posedge clk);
      fwd_rdata[i] <= fix_t'(hin[m][i]);
      fwd_full[i]  <= 1;
    end
  endtask

  always @(posedge clk) begin
    for (int i = 0; i < NH; i++) begin
      if (bwd_post[i]) bwd_empty[i] <= 0;
      if (fwd_take[i]) fwd_full[i] <= 0;
    end
  end

  // latency: take of h_i to the next post, 12 cycles if nothing stalls it
  longint t_take = -1;
  bit     free_at_send;
  always @(posedge clk) begin
    if (fwd_take[0]) t_take <= cyc;
    if (t_take >= 0 && cyc == t_take + 10) free_at_send <= bwd_empty[0] && bwd_empty[1];
    if (bwd_post[0] && t_take >= 0) begin
      checks++;
      lat_checks++;
      if (free_at_send ? (cyc - t_take != 12) : (cyc - t_take <= 12)) begin
        failures++;
        $display("FAIL take-to-post latency %0d (free %0d)", cyc - t_take, free_at_send);
      end
      t_take <= -1;
    end
  end

  // epoch reports
  int ep_seen = 0;
  always @(posedge clk) begin
    if (rst_n && epoch_valid) begin
      expect_eq($sformatf("epoch %0d mse", ep_seen), longint'(epoch_mse), mse_ref[ep_seen]);
      expect_eq($sformatf("epoch %0d count", ep_seen), epoch_count, ep_seen + 1);
      ep_seen++;
    end
  end

  task automatic run(input int max_ep, input longint mse_stop);
    ref_run(max_ep, mse_stop);
    cfg_max_epochs <= 32'(max_ep);
    cfg_mse_stop   <= fix_t'(mse_stop);
    for (int i = 0; i < NH; i++) begin
      bwd_empty[i] <= 1; fwd_full[i] <= 0; msg_seen[i] = 0;
    end
    ep_seen = 0;
    t_take = -1;
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    fork
      hidden(0, stop_it + 3);
      hidden(1, stop_it + 3);
    join_none
    @(posedge clk);
    while (!done) @(posedge clk);
    repeat (20) @(posedge clk);
    disable fork;
    expect_eq("converged flag", converged, stop_conv);
    expect_eq("epochs", epoch_count, (stop_it + 1) / NPAT);
    expect_eq("epoch reports", ep_seen, (stop_it + 1) / NPAT);
    expect_eq("iterations", iterations, stop_it + 1);
    // messages sent: the first sample, then one ahead of every iteration
    expect_eq("messages hidden 0", msg_seen[0], stop_it + 2);
    for (int k = 0; k < 3; k++) expect_eq($sformatf("final weight %0d", k), longint'(w[k]), wfin[k]);
    checks++;
    if (hold_cycles == 0) begin failures++; $display("FAIL no hold cycles"); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint thr;
    for (int r = 0; r < MAXIT; r++)
      for (int i = 0; i < NH; i++) hin[r][i] = longint'($urandom_range(0, 65536));
    for (int i = 0; i < NH; i++) begin
      bwd_empty[i] = 1; fwd_full[i] = 0; fwd_rdata[i] = '0;
      bwd_mem[i] = '{default: '0};
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // run 1: epoch limit of 3
    run(3, 0);
    // run 2: threshold just above the error of the third epoch (or the
    // second, if that is lower), so the error criterion stops training
    ref_run(MAXIT / NPAT, 0);
    thr = mse_ref[2] + 1;
    run(MAXIT / NPAT, thr);
    checks++;
    if (!stop_conv || lat_checks == 0) begin
      failures++; $display("FAIL run 2 did not exercise the error criterion");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
