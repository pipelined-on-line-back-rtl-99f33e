// tb_shared_mem: checks the shared memory component's semaphore protocol
// and data path: reset to empty, writes land only while empty, a post hands
// the words to the reader one cycle later, the contents stay stable while
// full, a take returns the component to the writer, clr empties it, and a
// random stream of messages arrives intact and in order.
`timescale 1ns/1ps
module tb_shared_mem;
  import pbp_pkg::*;

  localparam int NW = 3;
  localparam int AW = 2;

  logic clk = 0, rst_n = 0, clr = 0;
  logic wr_en = 0, wr_post = 0, rd_take = 0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  fix_t wr_data = '0, rd_data;
  logic wr_empty, rd_full;
  int checks = 0, failures = 0;

  shared_mem #(.NWORDS(NW)) dut (.*);

  always #5 clk = ~clk;

  task automatic expect_eq(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // writer: store NW words and post them
  task automatic send(input fix_t msg [NW]);
    #1;
    while (!wr_empty) begin @(posedge clk); #1; end
    for (int i = 0; i < NW; i++) begin
      wr_en <= 1; wr_addr <= AW'(i); wr_data <= msg[i];
      wr_post <= (i == NW - 1);
      @(posedge clk);
    end
    wr_en <= 0; wr_post <= 0;
  endtask

  // reader: wait for full, read NW words, take
  task automatic receive(output fix_t msg [NW]);
    #1;
    while (!rd_full) begin @(posedge clk); #1; end
    for (int i = 0; i < NW; i++) begin
      rd_addr = AW'(i); #1;
      msg[i] = rd_data;
    end
    rd_take <= 1; @(posedge clk); rd_take <= 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fix_t m [NW], r [NW];
    fix_t stream [40][NW];
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    expect_eq("empty after reset", wr_empty, 1);
    expect_eq("not full after reset", rd_full, 0);

    // one message, then observe the flag timing
    m = '{fix_t'(11), fix_t'(-22), fix_t'(33)};
    send(m);
    #1;
    expect_eq("full after post", rd_full, 1);
    expect_eq("writer blocked while full", wr_empty, 0);
    receive(r);
    for (int i = 0; i < NW; i++) expect_eq($sformatf("word %0d", i), r[i], m[i]);
    #1;
    expect_eq("empty after take", wr_empty, 1);

    // contents stay while full, even after many cycles
    m = '{fix_t'(7), fix_t'(8), fix_t'(9)};
    send(m);
    repeat (5) @(posedge clk);
    receive(r);
    for (int i = 0; i < NW; i++) expect_eq($sformatf("held word %0d", i), r[i], m[i]);

    // clr empties a full component
    send(m);
    #1 expect_eq("full before clr", rd_full, 1);
    clr <= 1; @(posedge clk); clr <= 0; #1;
    expect_eq("empty after clr", wr_empty, 1);

    // a stream with writer and reader running concurrently
    for (int s = 0; s < 40; s++)
      for (int i = 0; i < NW; i++) stream[s][i] = fix_t'($urandom);
    fork
      for (int s = 0; s < 40; s++) begin
        send(stream[s]);
        repeat ($urandom_range(0, 3)) @(posedge clk);
      end
      for (int s = 0; s < 40; s++) begin
        fix_t got [NW];
        repeat ($urandom_range(0, 4)) @(posedge clk);
        receive(got);
        for (int i = 0; i < NW; i++)
          expect_eq($sformatf("stream %0d word %0d", s, i), got[i], stream[s][i]);
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
