// shared_mem: shared memory component between two neuron processors.
//
// A small register file of NWORDS words guarded by a one-bit semaphore.
// Exactly one side writes it and exactly one side reads it: a hidden neuron
// writes a forward component and the output neuron reads it; the output
// neuron writes a backward component and a hidden neuron reads it. The
// semaphore gives the two sides mutual exclusion on the contents:
//   empty (full = 0): the writer owns the words. It stores them with wr_en
//                     and hands them over with wr_post, which sets full.
//   full  (full = 1): the reader owns the words. It reads them and gives
//                     them back with rd_take, which clears full.
// A write or a post while the component is full would corrupt data the
// reader has not yet consumed, so the component ignores them and the
// assertion below flags them; likewise a take while empty.
// The one-writer/one-reader split and the use of a semaphore follow the
// architecture; the word count, the flag protocol and the reset state
// (empty, synchronous reset) are this design's choices.
//
// Interface:
//   clr               synchronous clear of the semaphore (restart of training)
//   wr_* / wr_empty   writer port, wr_empty = 1 when the writer may write
//   rd_* / rd_full    reader port, rd_data is a combinational read of rd_addr
// Timing: a write or post takes effect at the next clock edge; a post is
// visible to the reader (rd_full) one cycle after it is issued.
module shared_mem
  import pbp_pkg::*;
#(
  parameter int NWORDS = 1,
  localparam int AW    = (NWORDS > 1) ? $clog2(NWORDS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  // writer side
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  fix_t          wr_data,
  input  logic          wr_post,
  output logic          wr_empty,
  // reader side
  input  logic [AW-1:0] rd_addr,
  output fix_t          rd_data,
  input  logic          rd_take,
  output logic          rd_full
);

  fix_t mem [NWORDS];
  logic full;

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      full <= 1'b0;
    end else if (!full && wr_post) begin
      full <= 1'b1;
    end else if (full && rd_take) begin
      full <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (!full && wr_en && (int'(wr_addr) < NWORDS))
      mem[wr_addr] <= wr_data;
  end

  assign wr_empty = !full;
  assign rd_full  = full;
  assign rd_data  = (int'(rd_addr) < NWORDS) ? mem[rd_addr] : '0;

  // Semaphore rules: the writer acts only while empty, the reader only
  // while full.
  a_wr_when_empty : assert property (@(posedge clk) disable iff (!rst_n || clr)
                                     (wr_en || wr_post) |-> !full)
    else $error("shared_mem: write or post while full");
  a_take_when_full : assert property (@(posedge clk) disable iff (!rst_n || clr)
                                      rd_take |-> full)
    else $error("shared_mem: take while empty");

endmodule
