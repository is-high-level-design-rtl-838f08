// tb_hif_core: self-checking test of the interface controller with its two
// FIFOs, seen from the host's registers. A behavioural backend in the same
// clock domain takes each input word and returns its bitwise inverse, using
// the request / received handshake; it can be paused.
// Checks: the first read after a system reset returns the padding zero and
// results then come one read late; a final-pop command releases the last
// result; reading with no result returns the all-ones word (abort); the
// 17th write into a full input FIFO aborts; input and result flushes empty
// their FIFO; the backend reset pulse appears on a system reset; a burst
// write fills the input FIFO one word per clock and is disconnected at 16
// words; a burst read empties the result FIFO (padding zero first) and is
// disconnected when nothing is left.
module tb_hif_core;
  import hif_pkg::*;
  logic clk = 0, rst_n = 0;
  logic lt_req = 0, lt_write = 0, lt_burst = 0;
  reg_addr_e lt_addr = REG_DATA_IN;
  word_t lt_wdata = 0, lt_rdata;
  logic lt_done, lt_abort, lt_disc;
  logic exp_in_rdy, exp_in_rec, exp_in_req, exp_res_rdy, exp_res_rec, exp_res_req;
  word_t exp_in_data, exp_res_data;
  logic design_reset, in_full, in_empty, res_full, res_empty;
  int checks = 0, failures = 0, n_dreset = 0;
  bit pause = 1;

  always #15 clk = ~clk;

  hif_core dut (.*);

  always @(posedge clk) if (rst_n && design_reset) n_dreset++;

  // behavioural backend: y = ~x
  initial begin
    exp_in_req = 0; exp_res_req = 0; exp_res_data = 0;
    forever begin
      word_t w;
      @(posedge clk);
      if (!pause && exp_in_rdy) begin
        exp_in_req <= 1;
        do @(posedge clk); while (!exp_in_rec);
        w = exp_in_data;
        exp_in_req <= 0;
        do @(posedge clk); while (exp_in_rec);
        while (!exp_res_rdy) @(posedge clk);
        exp_res_data <= ~w;
        exp_res_req  <= 1;
        do @(posedge clk); while (!exp_res_rec);
        exp_res_req <= 0;
        do @(posedge clk); while (exp_res_rec);
      end
    end
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL core: %s (t=%0t)", what, $time); end
  endtask

  task automatic access(input bit wr, input reg_addr_e a, input word_t d,
                        output bit aborted, output word_t rd);
    lt_req <= 1; lt_write <= wr; lt_addr <= a; lt_wdata <= d;
    do @(posedge clk); while (!(lt_done || lt_abort));
    aborted = lt_abort;
    rd = lt_rdata;
    lt_req <= 0;
    @(posedge clk);
  endtask

  task automatic host_write(input reg_addr_e a, input word_t d, output bit aborted);
    word_t rd;
    access(1, a, d, aborted, rd);
  endtask

  task automatic host_read(output word_t rd, output bit aborted);
    access(0, REG_RESULT, 0, aborted, rd);
  endtask

  // Burst on the data (wr, words from `wq`) or result register, ended by the
  // host after `want` words or by a disconnect or abort.
  task automatic burst(input bit wr, input word_t wq[$], input int want,
                       output word_t got[$], output bit disc, output bit ab);
    int moved = 0;
    got.delete(); disc = 0; ab = 0;
    @(posedge clk); #1;
    lt_req = 1; lt_burst = 1; lt_write = wr; lt_addr = wr ? REG_DATA_IN : REG_RESULT;
    lt_wdata = wr ? wq[0] : '0;
    for (int c = 0; c < 100; c++) begin
      #1;
      if (lt_abort) begin ab = 1; break; end
      if (lt_disc)  begin disc = 1; break; end
      if (lt_done) begin
        if (!wr) got.push_back(lt_rdata);
        moved++;
      end
      @(posedge clk); #1;
      if (moved == want) break;
      if (wr) lt_wdata = wq[moved];
    end
    lt_req = 0; lt_burst = 0;
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit ab; word_t rd;
    word_t vals[$];
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);
    host_write(REG_CONTROL, word_t'(CMD_SYSTEM_RESET), ab);
    check(!ab && n_dreset >= 1, "system reset accepted, backend reset pulsed");

    // empty result FIFO: abort and null word
    host_read(rd, ab);
    check(ab && rd == NULL_WORD, "read with no result gives the null word");

    // backend paused: 16 writes fit, the 17th aborts
    for (int i = 0; i < 16; i++) begin
      vals.push_back($urandom);
      host_write(REG_DATA_IN, vals[i], ab);
      check(!ab, "write into non-full input FIFO");
    end
    check(in_full, "input FIFO full after 16 writes");
    host_write(REG_DATA_IN, 32'h1717_1717, ab);
    check(ab, "17th write aborts");

    // run the backend: 16 results, read with the one-read offset
    pause = 0;
    wait (in_empty);
    repeat (20) @(posedge clk);
    check(res_full, "result FIFO holds 16 results");
    host_read(rd, ab);
    check(!ab && rd == 0, "first read is the padding zero");
    for (int i = 0; i < 15; i++) begin
      host_read(rd, ab);
      check(!ab && rd == ~vals[i], "result in order");
    end
    host_read(rd, ab);
    check(ab, "last result held back until final pop");
    host_write(REG_CONTROL, word_t'(CMD_FINAL_POP), ab);
    host_read(rd, ab);
    check(!ab && rd == ~vals[15], "final pop releases the last result");

    // flushes
    pause = 1;
    repeat (4) @(posedge clk);
    for (int i = 0; i < 3; i++) host_write(REG_DATA_IN, i, ab);
    host_write(REG_CONTROL, word_t'(CMD_INPUT_FLUSH), ab);
    check(in_empty, "input flush empties input FIFO");
    host_write(REG_CONTROL, word_t'(CMD_FINAL_POP), ab);
    host_write(REG_CONTROL, word_t'(CMD_FINAL_POP), ab);
    check(!res_empty, "final pops filled result FIFO");
    host_write(REG_CONTROL, word_t'(CMD_RESULT_FLUSH), ab);
    check(res_empty, "result flush empties result FIFO");
    host_read(rd, ab);
    check(ab && rd == NULL_WORD, "nothing to read after flush");

    // bursts: 20 words offered, 16 taken; 16 read back (pad + 15 results)
    begin
      word_t bq[$], got[$]; bit disc;
      host_write(REG_CONTROL, word_t'(CMD_SYSTEM_RESET), ab);
      for (int i = 0; i < 20; i++) bq.push_back($urandom);
      burst(1, bq, 20, got, disc, ab);
      check(disc && !ab && in_full, "burst write disconnected when input FIFO full");
      burst(1, bq[16:$], 4, got, disc, ab);
      check(ab, "burst write into full FIFO aborts");
      pause = 0;
      wait (in_empty);
      repeat (20) @(posedge clk);
      burst(0, bq, 20, got, disc, ab);
      check(disc && got.size() == 16, "burst read disconnected when result FIFO empty");
      check(got.size() > 0 && got[0] == 0, "burst read starts with the padding zero");
      for (int i = 1; i < got.size(); i++)
        check(got[i] == ~bq[i-1], "burst read result in order");
      host_write(REG_CONTROL, word_t'(CMD_FINAL_POP), ab);
      burst(0, bq, 1, got, disc, ab);
      check(!disc && !ab && got.size() == 1 && got[0] == ~bq[15], "last result after final pop");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
