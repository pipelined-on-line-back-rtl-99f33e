// pbp_top: a 2-2-1 neural network trained on-line, on chip, with pipelined
// back-propagation (PBP), one processing element per neuron.
//
// N_HID hidden neurons and one output neuron each run their own part of the
// training algorithm at the same time. They never share a bus: every hidden
// neuron i is joined to the output neuron by its own pair of shared memory
// components,
//   forward memory i  : written by hidden neuron i, read by the output neuron
//                       (carries h_i)
//   backward memory i : written by the output neuron, read by hidden neuron i
//                       (carries delta_i and the next input sample)
// each guarded by a semaphore. The posting and taking of these components is
// the synchronization point between the layers: while the output neuron
// turns the hidden outputs of sample t into an error and deltas, the hidden
// neurons already compute sample t+1, which makes the hidden weight update
// one iteration late.
//
// The topology (one pair of components per hidden neuron, one writer per
// component, the 2-2-1 XOR network) follows the architecture. The neurons
// here are fixed-point datapaths rather than programs on soft-core CPUs; the
// counters used for the degree of parallelism are this design's own.
//
// Interface: start (one cycle) restarts training from the initial weights
// with the stop settings cfg_max_epochs and cfg_mse_stop. done / converged,
// the mean square error of every epoch (epoch_valid pulse), the final
// weights and the hold counters are brought out as the results a host
// would read back. run_cycles counts cycles from start until done.
module pbp_top
  import pbp_pkg::*;
#(
  parameter int   N_IN                        = 2,
  parameter int   N_HID                       = 2,
  parameter int   N_PAT                       = 4,
  parameter fix_t ETA                         = fix_t'(2) <<< FRAC,
  // initial weights: W_HID_INIT[i][k] of hidden neuron i for input k (k = N_IN
  // is the bias), W_OUT_INIT[i] of the output neuron for h_i (i = N_HID is
  // the bias)
  parameter fix_t [N_HID-1:0][N_IN:0] W_HID_INIT = {{-fix_t'(13107), fix_t'(39321),  -fix_t'(19660)},
                                                  {fix_t'(6553),   -fix_t'(26214), fix_t'(32768)}},
  parameter fix_t [N_HID:0] W_OUT_INIT        = {fix_t'(3276), -fix_t'(32768), fix_t'(26214)},
  parameter fix_t X_SET [N_PAT][N_IN]         = '{'{fix_t'(0),     fix_t'(0)},
                                                  '{fix_t'(0),     fix_t'(65536)},
                                                  '{fix_t'(65536), fix_t'(0)},
                                                  '{fix_t'(65536), fix_t'(65536)}},
  parameter fix_t D_SET [N_PAT]               = '{fix_t'(0), fix_t'(65536), fix_t'(65536), fix_t'(0)},
  localparam int  AWB                         = $clog2(N_IN + 1)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] cfg_max_epochs,
  input  fix_t        cfg_mse_stop,
  output logic        done,
  output logic        converged,
  output logic        epoch_valid,
  output logic [31:0] epoch_count,
  output fix_t        epoch_mse,
  output fix_t        w_hidden [N_HID][N_IN+1],
  output fix_t        w_out [N_HID+1],
  output logic [31:0] hid_hold_cycles [N_HID],
  output logic [31:0] hid_iterations [N_HID],
  output logic [31:0] out_hold_cycles,
  output logic [31:0] out_iterations,
  output logic [31:0] run_cycles
);

  // backward components: output neuron -> hidden neuron i
  logic           bwd_empty [N_HID];
  logic           bwd_full  [N_HID];
  logic           bwd_we    [N_HID];
  logic           bwd_post  [N_HID];
  logic           bwd_take  [N_HID];
  fix_t           bwd_wdata [N_HID];
  fix_t           bwd_rdata [N_HID];
  logic [AWB-1:0] bwd_waddr;
  logic [AWB-1:0] bwd_raddr [N_HID];
  // forward components: hidden neuron i -> output neuron
  logic           fwd_empty [N_HID];
  logic           fwd_full  [N_HID];
  logic           fwd_we    [N_HID];
  logic           fwd_post  [N_HID];
  logic           fwd_take  [N_HID];
  fix_t           fwd_wdata [N_HID];
  fix_t           fwd_rdata [N_HID];
  logic [0:0]     fwd_waddr [N_HID];
  logic [0:0]     fwd_raddr;

  output_neuron #(
    .N_IN(N_IN), .N_HID(N_HID), .N_PAT(N_PAT), .ETA(ETA),
    .W_INIT(W_OUT_INIT), .X_SET(X_SET), .D_SET(D_SET)
  ) u_out (
    .clk, .rst_n, .start, .cfg_max_epochs, .cfg_mse_stop,
    .bwd_empty, .bwd_we, .bwd_addr(bwd_waddr), .bwd_wdata, .bwd_post,
    .fwd_full, .fwd_addr(fwd_raddr), .fwd_rdata, .fwd_take,
    .done, .converged, .epoch_valid, .epoch_count, .epoch_mse,
    .w(w_out), .hold_cycles(out_hold_cycles), .iterations(out_iterations)
  );

  for (genvar i = 0; i < N_HID; i++) begin : g_hid
    shared_mem #(.NWORDS(N_IN + 1)) u_bwd (
      .clk, .rst_n, .clr(start),
      .wr_en(bwd_we[i]), .wr_addr(bwd_waddr), .wr_data(bwd_wdata[i]),
      .wr_post(bwd_post[i]), .wr_empty(bwd_empty[i]),
      .rd_addr(bwd_raddr[i]), .rd_data(bwd_rdata[i]),
      .rd_take(bwd_take[i]), .rd_full(bwd_full[i])
    );

    shared_mem #(.NWORDS(1)) u_fwd (
      .clk, .rst_n, .clr(start),
      .wr_en(fwd_we[i]), .wr_addr(fwd_waddr[i]), .wr_data(fwd_wdata[i]),
      .wr_post(fwd_post[i]), .wr_empty(fwd_empty[i]),
      .rd_addr(fwd_raddr), .rd_data(fwd_rdata[i]),
      .rd_take(fwd_take[i]), .rd_full(fwd_full[i])
    );

    hidden_neuron #(
      .N_IN(N_IN), .ETA(ETA), .W_INIT(W_HID_INIT[i])
    ) u_hid (
      .clk, .rst_n, .start,
      .bwd_full(bwd_full[i]), .bwd_addr(bwd_raddr[i]), .bwd_data(bwd_rdata[i]),
      .bwd_take(bwd_take[i]),
      .fwd_empty(fwd_empty[i]), .fwd_we(fwd_we[i]), .fwd_addr(fwd_waddr[i]),
      .fwd_data(fwd_wdata[i]), .fwd_post(fwd_post[i]),
      .w(w_hidden[i]), .hold_cycles(hid_hold_cycles[i]),
      .iterations(hid_iterations[i])
    );
  end

  // training time, the denominator of the degree of parallelism
  logic running;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running    <= 1'b0;
      run_cycles <= '0;
    end else if (start) begin
      running    <= 1'b1;
      run_cycles <= '0;
    end else if (running) begin
      if (done) running <= 1'b0;
      else      run_cycles <= run_cycles + 1;
    end
  end

endmodule
