// tb_hif_fifo: self-checking test of the interface FIFO at its default size
// (16 x 32). A queue model is run alongside under random push/pop traffic.
// Checks: full and empty flags and count; the registered read port (rdata
// changes only on a pop, to the popped word); pushes when full and pops when
// empty are ignored; flush empties the FIFO and clears rdata to zero.
module tb_hif_fifo;
  logic clk = 0, rst_n = 0, flush = 0, push = 0, pop = 0;
  logic [31:0] wdata = 0, rdata;
  logic full, empty;
  logic [4:0] count;
  int checks = 0, failures = 0;
  logic [31:0] model[$];
  logic [31:0] last_rd;

  always #5 clk = ~clk;

  hif_fifo dut (.clk, .rst_n, .flush, .push, .wdata, .pop, .rdata, .full, .empty, .count);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL fifo: %s (t=%0t)", what, $time);
    end
  endtask

  // One clock of traffic; the model is updated with the same rules.
  task automatic step(input bit do_push, input bit do_pop, input logic [31:0] w);
    bit m_full, m_empty;
    m_full  = (model.size() == 16);
    m_empty = (model.size() == 0);
    push = do_push; pop = do_pop; wdata = w;
    @(posedge clk);
    #1;
    if (do_pop && !m_empty) last_rd = model.pop_front();
    if (do_push && !m_full) model.push_back(w);
    push = 0; pop = 0;
    check(rdata == last_rd, "rdata");
    check(int'(count) == model.size(), "count");
    check(full == (model.size() == 16), "full");
    check(empty == (model.size() == 0), "empty");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    last_rd = 0;
    #1;
    check(empty && !full && rdata == 0, "after reset");
    // fill beyond full, then drain beyond empty
    for (int i = 0; i < 20; i++) step(1, 0, 32'hA000_0000 + i);
    check(full, "full after 20 pushes");
    for (int i = 0; i < 20; i++) step(0, 1, 0);
    check(empty, "empty after drain");
    // random traffic with simultaneous push and pop
    for (int i = 0; i < 2000; i++) step(1'($urandom_range(1)), 1'($urandom_range(1)), $urandom);
    // flush
    for (int i = 0; i < 5; i++) step(1, 0, $urandom);
    step(0, 1, 0);
    flush = 1;
    @(posedge clk);
    #1 flush = 0;
    model.delete();
    last_rd = 0;
    check(empty && count == 0 && rdata == 0, "after flush");
    step(1, 0, 32'h1234_5678);
    step(0, 1, 0);
    check(rdata == 32'h1234_5678, "word after flush");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
