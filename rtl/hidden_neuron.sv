// hidden_neuron: the task of one hidden-layer neuron in pipelined on-line
// back-propagation (PBP), as a small sequential datapath with one
// multiplier-accumulator.
//
// Each iteration starts at the synchronization point with the output
// neuron, and then runs in parallel with it:
//   1. Wait until the backward shared memory is full, then read its words
//      (word 0 = delta_i for the sample of two iterations ago, words 1..N_IN
//      = the next input sample x_k) and give the component back.
//   2. Weight update, one iteration late (delayed update of PBP):
//        w_ik += ETA * f'(u_i[old]) * delta_i[old] * x_k[old]
//      where "old" is the sample whose delta just arrived; this neuron keeps
//      its own x_k and f'(u_i) of the last two samples for this.
//   3. u_i = sum_k w_ik * x_k (plus a bias weight on a constant 1 input),
//      h_i = f(u_i), and f'(u_i) is kept for the update two iterations on.
//   4. Wait until the forward shared memory is empty, write h_i and post it.
// While it waits in step 1 or 4 the neuron is "on hold"; hold_cycles counts
// those cycles, from which the degree of parallelism
// Pd = 100 * (1 - hold/total) follows.
//
// The task order and the delayed update follow the PBP algorithm. The bias
// weight, the fixed-point datapath, the one-MAC-per-cycle schedule, the
// learning rate and the initial weights are this design's choices (the
// algorithm is normally run as software on a soft-core CPU per neuron).
//
// Interface: start restarts training (weights reloaded from W_INIT, history
// cleared); before the first start the neuron is idle. bwd_* is the reader
// port of the backward component, fwd_* the writer port of the forward one.
// Timing: 1 + (N_IN+1) + 1 + (N_IN+1) + (N_IN+1) + 1 + 1 cycles per
// iteration when neither wait stalls (13 cycles for N_IN = 2).
module hidden_neuron
  import pbp_pkg::*;
#(
  parameter int   N_IN           = 2,
  parameter fix_t ETA            = fix_t'(2) <<< FRAC,
  // initial weights, W_INIT[k] for input k, W_INIT[N_IN] the bias weight
  parameter fix_t [N_IN:0] W_INIT = {fix_t'(6553), -fix_t'(26214), fix_t'(32768)},
  localparam int  AWB            = $clog2(N_IN + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  // backward shared memory, reader side
  input  logic           bwd_full,
  output logic [AWB-1:0] bwd_addr,
  input  fix_t           bwd_data,
  output logic           bwd_take,
  // forward shared memory, writer side
  input  logic           fwd_empty,
  output logic           fwd_we,
  output logic [0:0]     fwd_addr,
  output fix_t           fwd_data,
  output logic           fwd_post,
  // observation
  output fix_t           w [N_IN+1],
  output logic [31:0]    hold_cycles,
  output logic [31:0]    iterations
);

  typedef enum logic [2:0] {
    H_IDLE, H_WAIT_B, H_READ, H_GRAD, H_UPD, H_MAC, H_ACT, H_SEND
  } hstate_t;

  hstate_t      state;
  logic [AWB-1:0] k;            // word / weight index
  fix_t         delta;         // delta_i received this iteration
  fix_t         x_cur [N_IN];  // sample of this iteration
  fix_t         x_h1  [N_IN];  // sample of the previous iteration
  fix_t         x_h2  [N_IN];  // sample of two iterations ago
  fix_t         fp_h1, fp_h2;  // f'(u_i) of those two samples
  fix_t         g;             // ETA * f'(u_i[old]) * delta_i[old]
  fix_t         acc;           // u_i being accumulated
  fix_t         h;             // h_i = f(u_i)
  fix_t         act_y, act_dy;

  pbp_act u_act (.u(acc), .y(act_y), .dy(act_dy));

  // input k of the current / oldest sample, index N_IN being the bias input
  function automatic fix_t x_at(input fix_t xs [N_IN], input logic [AWB-1:0] idx);
    fix_t r;
    r = FIX_ONE;
    for (int j = 0; j < N_IN; j++) if (int'(idx) == j) r = xs[j];
    return r;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= H_IDLE;
      k           <= '0;
      delta       <= '0;
      g           <= '0;
      acc         <= '0;
      h           <= '0;
      fp_h1       <= '0;
      fp_h2       <= '0;
      x_cur       <= '{default: '0};
      x_h1        <= '{default: '0};
      x_h2        <= '{default: '0};
      for (int j = 0; j <= N_IN; j++) w[j] <= W_INIT[j];
      hold_cycles <= '0;
      iterations  <= '0;
    end else if (start) begin
      state       <= H_WAIT_B;
      k           <= '0;
      fp_h1       <= '0;
      fp_h2       <= '0;
      x_h1        <= '{default: '0};
      x_h2        <= '{default: '0};
      for (int j = 0; j <= N_IN; j++) w[j] <= W_INIT[j];
      hold_cycles <= '0;
      iterations  <= '0;
    end else begin
      unique case (state)
        H_IDLE: ;
        H_WAIT_B: begin
          k <= '0;
          if (bwd_full) state <= H_READ;
          else          hold_cycles <= hold_cycles + 1;
        end
        H_READ: begin
          if (k == 0) delta <= bwd_data;
          else        x_cur[k-1] <= bwd_data;
          if (int'(k) == N_IN) state <= H_GRAD;
          else                 k <= k + 1;
        end
        H_GRAD: begin
          g     <= fmul(fmul(fp_h2, delta), ETA);
          k     <= '0;
          state <= H_UPD;
        end
        H_UPD: begin
          w[k] <= w[k] + fmul(g, x_at(x_h2, k));
          if (int'(k) == N_IN) begin
            k     <= '0;
            acc   <= '0;
            state <= H_MAC;
          end else begin
            k <= k + 1;
          end
        end
        H_MAC: begin
          acc <= acc + fmul(w[k], x_at(x_cur, k));
          if (int'(k) == N_IN) state <= H_ACT;
          else                 k <= k + 1;
        end
        H_ACT: begin
          h     <= act_y;
          fp_h2 <= fp_h1;
          fp_h1 <= act_dy;
          x_h2  <= x_h1;
          x_h1  <= x_cur;
          state <= H_SEND;
        end
        H_SEND: begin
          if (fwd_empty) begin
            iterations <= iterations + 1;
            state      <= H_WAIT_B;
          end else begin
            hold_cycles <= hold_cycles + 1;
          end
        end
        default: state <= H_IDLE;
      endcase
    end
  end

  always_comb begin
    bwd_addr = AWB'(k);
    bwd_take = (state == H_READ) && (int'(k) == N_IN);
    fwd_addr = 1'b0;
    fwd_data = h;
    fwd_we   = (state == H_SEND) && fwd_empty;
    fwd_post = fwd_we;
  end

endmodule
