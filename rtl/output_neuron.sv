// output_neuron: the task of the output neuron in pipelined on-line
// back-propagation (PBP), as a small sequential datapath with one
// multiplier-accumulator. It also holds the training set and the training
// control.
//
// After start it first posts the first sample (with zero deltas) to every
// backward shared memory, so the hidden layer can begin. Each iteration then
// runs, in parallel with the hidden layer:
//   1. Send: wait until every backward component is empty, write
//      delta_i of the previous iteration (word 0) and the next input sample
//      (words 1..N_IN) into component i, post them all.
//   2. Synchronization point: wait until every forward component is full,
//      read h_i from each and give them back.
//   3. u = sum_i w_i * h_i (plus a bias weight), y = f(u), e = d - y.
//   4. Stop conditions: at the end of an epoch (one pass over the N_PAT
//      samples) the mean square error of the epoch is published; training
//      stops when it is below cfg_mse_stop or cfg_max_epochs epochs are done.
//   5. delta_i = e * f'(u) * w_i (with the weights before the update), then
//      w_i += ETA * e * f'(u) * h_i.
// Because the hidden layer computes the next sample while this neuron runs
// steps 3 to 5, a delta reaches the hidden layer one iteration late; the
// hidden neurons account for that.
//
// The task order follows the PBP algorithm. Reading equation (1) of the
// algorithm, the derivative in delta_i is taken at the output neuron's own
// linear output u. The bias weight, the fixed-point datapath, the cyclic
// sample order, the learning rate, the initial weights and the two stop
// conditions' values (inputs, as settings loaded by a host) are this
// design's choices.
//
// Interface: start (one cycle) restarts training from W_INIT. done rises
// when training stops and stays until the next start; converged tells which
// stop condition fired. epoch_valid pulses for one cycle with epoch_mse and
// epoch_count (epochs finished so far, including this one).
// Timing: per iteration 1+N_IN (send) + 1 (receive) + N_HID+1 (MAC) + 1 +
// N_HID (deltas) + N_HID+1 (update) cycles without stalls (13 for the
// 2-2-1 network).
module output_neuron
  import pbp_pkg::*;
#(
  parameter int   N_IN                 = 2,
  parameter int   N_HID                = 2,
  parameter int   N_PAT                = 4,
  parameter fix_t ETA                  = fix_t'(2) <<< FRAC,
  // initial weights, W_INIT[i] for hidden neuron i, W_INIT[N_HID] the bias
  parameter fix_t [N_HID:0] W_INIT     = {fix_t'(3276), -fix_t'(32768), fix_t'(26214)},
  // training set, default: the XOR problem
  parameter fix_t X_SET [N_PAT][N_IN]  = '{'{fix_t'(0),     fix_t'(0)},
                                           '{fix_t'(0),     fix_t'(65536)},
                                           '{fix_t'(65536), fix_t'(0)},
                                           '{fix_t'(65536), fix_t'(65536)}},
  parameter fix_t D_SET [N_PAT]        = '{fix_t'(0), fix_t'(65536), fix_t'(65536), fix_t'(0)},
  localparam int  AWB                  = $clog2(N_IN + 1),
  localparam int  KW                   = $clog2(((N_IN > N_HID) ? N_IN : N_HID) + 1),
  localparam int  PW                   = (N_PAT > 1) ? $clog2(N_PAT) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [31:0]    cfg_max_epochs,
  input  fix_t           cfg_mse_stop,
  // backward shared memories, writer side (one per hidden neuron)
  input  logic           bwd_empty [N_HID],
  output logic           bwd_we    [N_HID],
  output logic [AWB-1:0] bwd_addr,
  output fix_t           bwd_wdata [N_HID],
  output logic           bwd_post  [N_HID],
  // forward shared memories, reader side (one per hidden neuron)
  input  logic           fwd_full  [N_HID],
  output logic [0:0]     fwd_addr,
  input  fix_t           fwd_rdata [N_HID],
  output logic           fwd_take  [N_HID],
  // training status and results
  output logic           done,
  output logic           converged,
  output logic           epoch_valid,
  output logic [31:0]    epoch_count,
  output fix_t           epoch_mse,
  output fix_t           w [N_HID+1],
  output logic [31:0]    hold_cycles,
  output logic [31:0]    iterations
);

  typedef enum logic [2:0] {
    O_IDLE, O_SEND, O_RECV, O_MAC, O_ACT, O_DELTA, O_UPD, O_DONE
  } ostate_t;

  ostate_t       state;
  logic [KW-1:0] k;
  logic          primed;              // first sample already posted
  logic [PW-1:0] send_pat, recv_pat;  // next sample to send / sample in work
  fix_t          hv [N_HID];          // h_i of this iteration
  fix_t          delta_out [N_HID];   // delta_i to send next
  fix_t          acc, ef, g, sse;
  fix_t          act_y, act_dy;
  fix_t          e_now, sse_now, mse_now;
  logic          all_bwd_empty, all_fwd_full;

  pbp_act u_act (.u(acc), .y(act_y), .dy(act_dy));

  function automatic fix_t h_at(input fix_t hs [N_HID], input logic [KW-1:0] idx);
    fix_t r;
    r = FIX_ONE;
    for (int j = 0; j < N_HID; j++) if (int'(idx) == j) r = hs[j];
    return r;
  endfunction

  function automatic logic [PW-1:0] next_pat(input logic [PW-1:0] p);
    return (int'(p) == N_PAT - 1) ? '0 : p + 1'b1;
  endfunction

  always_comb begin
    all_bwd_empty = 1'b1;
    all_fwd_full  = 1'b1;
    for (int i = 0; i < N_HID; i++) begin
      all_bwd_empty &= bwd_empty[i];
      all_fwd_full  &= fwd_full[i];
    end
    e_now   = D_SET[recv_pat] - act_y;
    sse_now = sse + fmul(e_now, e_now);
    mse_now = sse_now / fix_t'(N_PAT);
  end

  always_ff @(posedge clk) begin
    epoch_valid <= 1'b0;
    if (!rst_n) begin
      state       <= O_IDLE;
      k           <= '0;
      primed      <= 1'b0;
      send_pat    <= '0;
      recv_pat    <= '0;
      hv          <= '{default: '0};
      delta_out   <= '{default: '0};
      acc         <= '0;
      ef          <= '0;
      g           <= '0;
      sse         <= '0;
      for (int j = 0; j <= N_HID; j++) w[j] <= W_INIT[j];
      done        <= 1'b0;
      converged   <= 1'b0;
      epoch_count <= '0;
      epoch_mse   <= '0;
      hold_cycles <= '0;
      iterations  <= '0;
    end else if (start) begin
      state       <= O_SEND;
      k           <= '0;
      primed      <= 1'b0;
      send_pat    <= '0;
      recv_pat    <= '0;
      delta_out   <= '{default: '0};
      sse         <= '0;
      for (int j = 0; j <= N_HID; j++) w[j] <= W_INIT[j];
      done        <= 1'b0;
      converged   <= 1'b0;
      epoch_count <= '0;
      epoch_mse   <= '0;
      hold_cycles <= '0;
      iterations  <= '0;
    end else begin
      unique case (state)
        O_IDLE, O_DONE: ;
        O_SEND: begin
          if (all_bwd_empty) begin
            if (int'(k) == N_IN) begin
              send_pat <= next_pat(send_pat);
              k        <= '0;
              if (!primed) primed <= 1'b1;
              else         state  <= O_RECV;
            end else begin
              k <= k + 1'b1;
            end
          end else begin
            hold_cycles <= hold_cycles + 1;
          end
        end
        O_RECV: begin
          if (all_fwd_full) begin
            for (int i = 0; i < N_HID; i++) hv[i] <= fwd_rdata[i];
            k     <= '0;
            acc   <= '0;
            state <= O_MAC;
          end else begin
            hold_cycles <= hold_cycles + 1;
          end
        end
        O_MAC: begin
          acc <= acc + fmul(w[k], h_at(hv, k));
          if (int'(k) == N_HID) state <= O_ACT;
          else                  k <= k + 1'b1;
        end
        O_ACT: begin
          ef         <= fmul(e_now, act_dy);
          k          <= '0;
          iterations <= iterations + 1;
          recv_pat   <= next_pat(recv_pat);
          state      <= O_DELTA;
          if (int'(recv_pat) == N_PAT - 1) begin
            sse         <= '0;
            epoch_mse   <= mse_now;
            epoch_count <= epoch_count + 1;
            epoch_valid <= 1'b1;
            if (mse_now < cfg_mse_stop) begin
              converged <= 1'b1;
              done      <= 1'b1;
              state     <= O_DONE;
            end else if (epoch_count + 1 >= cfg_max_epochs) begin
              done  <= 1'b1;
              state <= O_DONE;
            end
          end else begin
            sse <= sse_now;
          end
        end
        O_DELTA: begin
          for (int j = 0; j < N_HID; j++)
            if (int'(k) == j) delta_out[j] <= fmul(ef, w[j]);
          g            <= fmul(ef, ETA);
          if (int'(k) == N_HID - 1) begin
            k     <= '0;
            state <= O_UPD;
          end else begin
            k <= k + 1'b1;
          end
        end
        O_UPD: begin
          w[k] <= w[k] + fmul(g, h_at(hv, k));
          if (int'(k) == N_HID) begin
            k     <= '0;
            state <= O_SEND;
          end else begin
            k <= k + 1'b1;
          end
        end
        default: state <= O_IDLE;
      endcase
    end
  end

  always_comb begin
    bwd_addr = AWB'(k);
    fwd_addr = 1'b0;
    for (int i = 0; i < N_HID; i++) begin
      bwd_we[i]    = (state == O_SEND) && all_bwd_empty;
      bwd_wdata[i] = (k == 0) ? delta_out[i] : X_SET[send_pat][int'(k) - 1];
      bwd_post[i]  = (state == O_SEND) && all_bwd_empty && (int'(k) == N_IN);
      fwd_take[i]  = (state == O_RECV) && all_fwd_full;
    end
  end

endmodule
