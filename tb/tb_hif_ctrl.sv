// tb_hif_ctrl: self-checking test of the controller FSM on its own. The
// FIFO status inputs are driven directly and every strobe is counted.
// Checks: data write accepted (one in_push) or aborted when the input FIFO
// is full; result read returns res_q and pops once, or aborts with the
// all-ones word when the result FIFO is empty; each control command gives
// exactly its strobes (system reset also design_reset); reads of write-only
// and writes of read-only registers abort; an experiment input request pops
// once and holds in_rec until the request drops; a result request pushes
// once and holds res_rec; a PCI request wins over a simultaneous experiment
// request; a request is not served while its ready line is low; a PCI access
// completes in 3 cycles (request, service, done); a burst write or read
// moves one word per clock for as long as the host holds the request, ends
// with a disconnect when the FIFO fills or empties, aborts if there is no
// room or no data at the start, and is ignored for control writes.
module tb_hif_ctrl;
  import hif_pkg::*;
  logic clk = 0, rst_n = 0;
  logic lt_req = 0, lt_write = 0, lt_burst = 0;
  reg_addr_e lt_addr = REG_DATA_IN;
  word_t lt_wdata = 0, lt_rdata, res_q = 0;
  logic lt_done, lt_abort, lt_disc;
  logic in_push, in_pop, in_flush, in_full = 0, in_empty = 1;
  logic res_push, res_pop, res_flush, res_full = 0, res_empty = 1;
  logic in_req = 0, in_rdy, in_rec, res_req = 0, res_rdy, res_rec, design_reset;
  int checks = 0, failures = 0;
  int n_in_push, n_in_pop, n_in_flush, n_res_push, n_res_pop, n_res_flush, n_dreset;

  always #5 clk = ~clk;

  hif_ctrl dut (.*);

  always @(posedge clk) if (rst_n) begin
    n_in_push  += in_push;   n_in_pop  += in_pop;   n_in_flush  += in_flush;
    n_res_push += res_push;  n_res_pop += res_pop;  n_res_flush += res_flush;
    n_dreset   += design_reset;
  end

  task automatic clear_counts();
    n_in_push = 0; n_in_pop = 0; n_in_flush = 0;
    n_res_push = 0; n_res_pop = 0; n_res_flush = 0; n_dreset = 0;
  endtask

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL ctrl: %s (t=%0t)", what, $time); end
  endtask

  // One local-side access; returns abort flag, read data and cycles taken.
  task automatic access(input bit wr, input reg_addr_e a, input word_t d,
                        output bit aborted, output word_t rd, output int cycles);
    lt_req = 1; lt_write = wr; lt_addr = a; lt_wdata = d;
    cycles = 0;
    forever begin
      @(posedge clk);
      cycles++;
      if (lt_done || lt_abort) break;
    end
    aborted = lt_abort;
    rd = lt_rdata;
    #1 lt_req = 0;
    repeat (3) @(posedge clk);
    #1;
  endtask

  // A burst on the data (wr) or result register: stops after `want` words,
  // or when the controller disconnects or aborts. Returns the words moved
  // and the cycles from the first word to the last.
  task automatic burst(input bit wr, input int want, output int moved,
                       output bit disc, output bit ab, output int span);
    int first;
    lt_req = 1; lt_burst = 1; lt_write = wr; lt_addr = wr ? REG_DATA_IN : REG_RESULT;
    moved = 0; disc = 0; ab = 0; span = 0; first = 0;
    for (int c = 0; c < 60; c++) begin
      @(posedge clk); #1;
      if (lt_abort) begin ab = 1; break; end
      if (lt_disc)  begin disc = 1; break; end
      if (lt_done) begin
        if (!wr) check(lt_rdata == res_q, "burst read gives res_q");
        if (moved == 0) first = c;
        moved++;
        span = c - first + 1;
        if (moved == want) begin @(posedge clk); #1; break; end
      end
    end
    lt_req = 0; lt_burst = 0;
    repeat (3) @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit ab; word_t rd; int cyc;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    repeat (2) @(posedge clk);
    #1 clear_counts();

    access(1, REG_DATA_IN, 32'h55, ab, rd, cyc);
    check(!ab && n_in_push == 1, "data write accepted");
    check(cyc == 3, "PCI access takes 3 cycles");
    in_full = 1; clear_counts();
    access(1, REG_DATA_IN, 32'h66, ab, rd, cyc);
    check(ab && n_in_push == 0, "data write aborted when input FIFO full");
    in_full = 0;

    res_empty = 1; clear_counts();
    access(0, REG_RESULT, 0, ab, rd, cyc);
    check(ab && rd == NULL_WORD && n_res_pop == 0, "read aborted with null word when empty");
    res_empty = 0; res_q = 32'hDEAD_BEEF; clear_counts();
    access(0, REG_RESULT, 0, ab, rd, cyc);
    check(!ab && rd == 32'hDEAD_BEEF && n_res_pop == 1, "read returns res_q and pops");

    clear_counts();
    access(1, REG_CONTROL, word_t'(CMD_SYSTEM_RESET), ab, rd, cyc);
    check(!ab && n_in_flush == 1 && n_res_flush == 1 && n_dreset == 1 && n_res_push == 0,
          "system reset");
    clear_counts();
    access(1, REG_CONTROL, word_t'(CMD_INPUT_FLUSH), ab, rd, cyc);
    check(n_in_flush == 1 && n_res_flush == 0 && n_dreset == 0, "input flush");
    clear_counts();
    access(1, REG_CONTROL, word_t'(CMD_RESULT_FLUSH), ab, rd, cyc);
    check(n_in_flush == 0 && n_res_flush == 1 && n_dreset == 0, "result flush");
    clear_counts();
    access(1, REG_CONTROL, word_t'(CMD_FINAL_POP), ab, rd, cyc);
    check(n_res_push == 1 && n_res_flush == 0 && n_in_flush == 0, "final pop");

    clear_counts();
    access(0, REG_DATA_IN, 0, ab, rd, cyc);
    check(ab, "read of write-only register aborts");
    access(1, REG_RESULT, 0, ab, rd, cyc);
    check(ab && n_res_pop == 0, "write of read-only register aborts");

    // experiment input request, not served while input FIFO empty
    clear_counts();
    in_empty = 1; in_req = 1;
    repeat (10) @(posedge clk);
    #1 check(n_in_pop == 0 && !in_rec, "input request waits for data");
    in_empty = 0;
    repeat (4) @(posedge clk);
    #1 check(n_in_pop == 1 && in_rec, "input request served");
    repeat (5) @(posedge clk);
    #1 check(in_rec && n_in_pop == 1, "in_rec held while request high");
    in_req = 0;
    repeat (3) @(posedge clk);
    #1 check(!in_rec, "in_rec drops after request");
    in_empty = 1;

    // experiment result request, not served while result FIFO full
    clear_counts();
    res_full = 1; res_req = 1;
    repeat (10) @(posedge clk);
    #1 check(n_res_push == 0, "result request waits for room");
    res_full = 0;
    repeat (4) @(posedge clk);
    #1 check(n_res_push == 1 && res_rec, "result request served");
    res_req = 0;
    repeat (3) @(posedge clk);
    #1 check(!res_rec, "res_rec drops");

    // bursts
    begin
      int mv, span; bit disc;
      in_full = 0; in_empty = 1; clear_counts();
      burst(1, 5, mv, disc, ab, span);
      check(mv == 5 && !disc && !ab && n_in_push == 5, "burst write of 5 words");
      check(span == 5, "burst write moves one word per clock");
      clear_counts();
      fork begin wait (n_in_push == 3); in_full = 1; end join_none
      burst(1, 10, mv, disc, ab, span);
      check(mv == 3 && disc && n_in_push == 3, "burst write disconnects on full FIFO");
      clear_counts();
      burst(1, 10, mv, disc, ab, span);
      check(ab && mv == 0 && n_in_push == 0, "burst write aborts on full FIFO");
      in_full = 0;
      res_empty = 0; res_q = 32'h1234_0000; clear_counts();
      burst(0, 4, mv, disc, ab, span);
      check(mv == 4 && !disc && n_res_pop == 4 && span == 4, "burst read of 4 words");
      clear_counts();
      fork begin wait (n_res_pop == 2); res_empty = 1; end join_none
      burst(0, 10, mv, disc, ab, span);
      check(mv == 2 && disc && n_res_pop == 2, "burst read disconnects on empty FIFO");
      clear_counts();
      burst(0, 10, mv, disc, ab, span);
      check(ab && mv == 0 && n_res_pop == 0, "burst read aborts on empty FIFO");
      clear_counts();
      lt_burst = 1;
      access(1, REG_CONTROL, word_t'(CMD_FINAL_POP), ab, rd, cyc);
      lt_burst = 0;
      check(!ab && n_res_push == 1 && cyc == 3, "burst flag ignored for control writes");
    end

    // PCI priority: both requests raised in the same cycle
    clear_counts();
    in_empty = 0; res_empty = 0;
    in_req = 1; lt_req = 1; lt_write = 0; lt_addr = REG_RESULT;
    @(posedge clk); #1;
    @(posedge clk); #1;
    check(n_in_pop == 0 && !in_rec, "PCI served first");
    wait (lt_done); @(posedge clk); #1 lt_req = 0;
    repeat (4) @(posedge clk);
    #1 check(n_res_pop == 1 && n_in_pop == 1 && in_rec, "experiment served after PCI");
    in_req = 0;
    repeat (4) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
