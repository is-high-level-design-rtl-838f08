// tb_hif_top: end-to-end test of the whole platform at its default sizes.
// The testbench plays the host: it writes operands to the data register,
// polls the result register (an abort / all-ones word means "nothing yet"),
// drops the padding zero that follows a system reset, and issues the
// final-pop command before reading the last result, exactly as host
// software for this interface must. The PCI side runs at 33 MHz and the
// backends on an unrelated 45 MHz clock.
// Jobs, each preceded by selecting the backend and a system reset:
//   averager : 40 random pairs (more inputs and results than a FIFO holds),
//              then 24 more pairs moved with burst writes and burst reads
//   TEA      : three word pairs, then decrypted again
//   DCT      : the sixteen 4x4 blocks of a 16x16 image of random shapes, one
//              of them moved with bursts
//   CORDIC   : cos/sin of every whole angle from 0 to 90 degrees
// Results are compared with independent software models. The mechanisms of
// the interface are counted and each must occur at least once: write
// aborted on a full input FIFO, read aborted on an empty result FIFO, the
// padding zero, final pop, system reset (backend reset), input flush,
// result flush, a backend stalled on a full result FIFO, PCI priority over
// a pending backend request, a switch between backends, burst writes and
// reads of several words, and a disconnect ending a burst write (input FIFO
// full) and a burst read (result FIFO empty).
module tb_hif_top;
  import hif_pkg::*;
  logic pci_clk = 0, exp_clk = 0, rst_n = 0;
  logic lt_req = 0, lt_write = 0, lt_burst = 0;
  logic [1:0] lt_addr = 0, exp_sel = 0;
  logic [31:0] lt_wdata = 0, lt_rdata;
  logic lt_done, lt_abort, lt_disc, in_full, in_empty, res_full, res_empty, exp_busy;
  int checks = 0, failures = 0;

  always #15 pci_clk = ~pci_clk;
  always #11 exp_clk = ~exp_clk;

  hif_top dut (.*);

  // ---------------------------------------------------------------- counters
  int n_wr_abort = 0, n_rd_abort = 0, n_pad = 0, n_final_pop = 0, n_sys_reset = 0;
  int n_in_flush = 0, n_res_flush = 0, n_res_stall = 0, n_priority = 0, n_switch = 0;
  int n_burst_wr = 0, n_burst_rd = 0, n_wr_disc = 0, n_rd_disc = 0;

  // PCI request arriving while a backend request is also waiting.
  always @(posedge pci_clk)
    if (rst_n && lt_req && !lt_done && !lt_abort &&
        dut.u_core.u_ctrl.state == dut.u_core.u_ctrl.S_READY &&
        dut.u_core.in_req_s && !in_empty)
      n_priority++;
  // backend holding a result while the result FIFO is full
  always @(posedge exp_clk) if (rst_n && res_full && dut.res_req) n_res_stall++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL top: %s (t=%0t)", what, $time); end
  endtask

  // ---------------------------------------------------------------- host side
  task automatic access(input bit wr, input reg_addr_e a, input word_t d,
                        output bit aborted, output word_t rd);
    lt_req <= 1; lt_write <= wr; lt_addr <= a; lt_wdata <= d;
    do @(posedge pci_clk); while (!(lt_done || lt_abort));
    aborted = lt_abort;
    rd = lt_rdata;
    lt_req <= 0;
    @(posedge pci_clk);
  endtask

  task automatic command(input ctrl_cmd_e c);
    bit ab; word_t rd;
    access(1, REG_CONTROL, word_t'(c), ab, rd);
    case (c)
      CMD_SYSTEM_RESET: n_sys_reset++;
      CMD_INPUT_FLUSH:  n_in_flush++;
      CMD_RESULT_FLUSH: n_res_flush++;
      CMD_FINAL_POP:    n_final_pop++;
      default: ;
    endcase
  endtask

  // Runs one job: sends `ins`, collects `nres` results in `outs`. Writes that
  // abort are retried after an attempt to read, so long jobs never lock up.
  // With patient set, aborted writes are retried for a while before any
  // read, which lets both FIFOs fill up.
  task automatic run_job(input exp_sel_e sel, input word_t ins[$], input int nres,
                         output word_t outs[$], input bit patient = 0);
    bit ab; word_t rd;
    int wi = 0, reads = 0, polls = 0, retries = 0;
    bit popped = 0;
    if (exp_sel != sel) n_switch++;
    exp_sel = sel;
    command(CMD_SYSTEM_RESET);
    outs.delete();
    while (reads < nres) begin
      if (wi < ins.size()) begin
        access(1, REG_DATA_IN, ins[wi], ab, rd);
        if (ab) n_wr_abort++;
        else wi++;
        if (!ab && wi < ins.size()) continue;
        if (ab && patient && retries < 100) begin
          retries++;
          repeat (8) @(posedge pci_clk);
          continue;
        end
      end
      // One poll of the result register.
      // Once the padding zero has been read and all but one result taken,
      // the last result already sits in the FIFO's read register; one
      // final pop lets it out.
      if (n_pad_seen && reads == nres - 1 && !popped) begin
        command(CMD_FINAL_POP);
        popped = 1;
      end
      access(0, REG_RESULT, 0, ab, rd);
      polls++;
      if (ab) begin
        n_rd_abort++;
        check(rd == NULL_WORD, "aborted read returns the null word");
        repeat (4) @(posedge pci_clk);
      end else if (reads == 0 && outs.size() == 0 && !n_pad_seen) begin
        n_pad_seen = 1;
        n_pad++;
        check(rd == 0, "first read after reset is the padding zero");
      end else begin
        outs.push_back(rd);
        reads++;
      end
      if (polls > 20000) begin
        check(0, "job did not finish");
        break;
      end
    end
    n_pad_seen = 0;
  endtask
  bit n_pad_seen = 0;

  // One burst on the data (wr, words from `wq`) or result register. Inputs
  // change just after a falling edge; a word moves at each rising edge
  // with lt_done high. Ends after `want` words, or on a disconnect / abort.
  task automatic burst(input bit wr, input word_t wq[$], input int want,
                       output word_t got[$], output int moved,
                       output bit disc, output bit ab);
    moved = 0;
    got.delete(); disc = 0; ab = 0;
    @(negedge pci_clk);
    lt_req = 1; lt_burst = 1; lt_write = wr; lt_addr = wr ? REG_DATA_IN : REG_RESULT;
    lt_wdata = wr ? wq[0] : '0;
    for (int c = 0; c < 200; c++) begin
      #1;
      if (lt_abort) begin ab = 1; break; end
      if (lt_disc)  begin disc = 1; break; end
      if (lt_done) begin
        if (!wr) got.push_back(lt_rdata);
        moved++;
      end
      @(negedge pci_clk);
      if (moved == want) break;
      if (wr) lt_wdata = wq[moved];
    end
    lt_req = 0; lt_burst = 0;
    if (moved > 1) begin if (wr) n_burst_wr++; else n_burst_rd++; end
    if (disc) begin if (wr) n_wr_disc++; else n_rd_disc++; end
    if (ab) begin if (wr) n_wr_abort++; else n_rd_abort++; end
    @(negedge pci_clk);
  endtask

  // Same job as run_job, with every data write and result read a burst.
  task automatic run_burst_job(input exp_sel_e sel, input word_t ins[$], input int nres,
                               output word_t outs[$]);
    word_t got[$];
    bit disc, ab, pad = 0, popped = 0;
    int wi = 0, rounds = 0, mv;
    if (exp_sel != sel) n_switch++;
    exp_sel = sel;
    command(CMD_SYSTEM_RESET);
    outs.delete();
    while (outs.size() < nres) begin
      if (wi < ins.size()) begin
        burst(1, ins[wi:$], ins.size() - wi, got, mv, disc, ab);
        wi += mv;
      end
      if (pad && outs.size() == nres - 1 && !popped) begin
        command(CMD_FINAL_POP);
        popped = 1;
      end
      // give the backend time to produce several results between polls
      repeat (64) @(posedge pci_clk);
      burst(0, ins, nres - outs.size() + (pad ? 0 : 1), got, mv, disc, ab);
      foreach (got[i]) begin
        if (!pad) begin
          pad = 1; n_pad++;
          check(got[i] == 0, "first burst word after reset is the padding zero");
        end else outs.push_back(got[i]);
      end
      if (ab) repeat (4) @(posedge pci_clk);
      if (++rounds > 2000) begin
        check(0, "burst job did not finish");
        break;
      end
    end
  endtask

  // ---------------------------------------------------------------- models
  localparam logic [127:0] KEY = 128'h11112222_33334444_55556666_77778888;

  function automatic void tea_enc(inout logic [31:0] y, inout logic [31:0] z);
    logic [31:0] sum = 0;
    for (int n = 0; n < 32; n++) begin
      sum += 32'h9E3779B9;
      y += ((z << 4) + KEY[127:96]) ^ (z + sum) ^ ((z >> 5) + KEY[95:64]);
      z += ((y << 4) + KEY[63:32])  ^ (y + sum) ^ ((y >> 5) + KEY[31:0]);
    end
  endfunction

  function automatic void tea_dec(inout logic [31:0] y, inout logic [31:0] z);
    logic [31:0] sum = 32'h9E3779B9 << 5;
    for (int n = 0; n < 32; n++) begin
      z -= ((y << 4) + KEY[63:32])  ^ (y + sum) ^ ((y >> 5) + KEY[31:0]);
      y -= ((z << 4) + KEY[127:96]) ^ (z + sum) ^ ((z >> 5) + KEY[95:64]);
      sum -= 32'h9E3779B9;
    end
  endfunction

  function automatic int rnd(input int n);
    return (n >>> 8) + ((n >> 7) & 1);
  endfunction

  function automatic int cosfx(input int u, input int x);
    int t [4][4] = '{'{256, 256, 256, 256}, '{236, 98, -98, -236},
                     '{181, -181, -181, 181}, '{98, -236, 236, -98}};
    return t[u][x];
  endfunction

  // fixed-point 2-D DCT of one 4x4 block given in row order
  function automatic void dct_model(input int m_in[16], output int m_out[16]);
    int m [4][4];
    int t [4];
    int sum;
    for (int i = 0; i < 16; i++) m[i/4][i%4] = m_in[i];
    for (int pass = 0; pass < 2; pass++) begin
      for (int r = 0; r < 4; r++) begin
        for (int u = 0; u < 4; u++) begin
          sum = 0;
          for (int x = 0; x < 4; x++) sum += rnd(m[r][x] * cosfx(u, x));
          t[u] = rnd(rnd(sum * ((u == 0) ? 181 : 256)) * 181);
        end
        for (int u = 0; u < 4; u++) m[r][u] = t[u];
      end
      for (int r = 0; r < 4; r++)
        for (int c = r + 1; c < 4; c++) begin
          sum = m[r][c]; m[r][c] = m[c][r]; m[c][r] = sum;
        end
    end
    for (int i = 0; i < 16; i++) m_out[i] = rnd(m[i/4][i%4]);
  endfunction

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic int atan_fx(input int i);
    return int'($floor($atan(2.0 ** (-i)) * 180.0 / 3.14159265358979 * 4096.0));
  endfunction

  function automatic void cordic_model(inout int x, inout int y, inout int z);
    int xt;
    for (int i = 0; i < 16; i++) begin
      xt = x;
      if (z >= 0) begin x = x - (y >>> i); y = y + (xt >>> i); z = z - atan_fx(i); end
      else        begin x = x + (y >>> i); y = y - (xt >>> i); z = z + atan_fx(i); end
    end
  endfunction

  // ---------------------------------------------------------------- watchdog
  initial begin
    repeat (400000) @(posedge pci_clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- stimulus
  initial begin
    word_t ins[$], outs[$];
    bit ab; word_t rd;
    repeat (4) @(posedge pci_clk);
    rst_n <= 1;
    repeat (4) @(posedge pci_clk);

    // Averager: 40 pairs = 80 inputs, 40 results.
    begin
      word_t exp_q[$];
      logic [32:0] s;
      ins.delete();
      for (int i = 0; i < 40; i++) begin
        word_t a, b;
        a = $urandom; b = $urandom;
        ins.push_back(a); ins.push_back(b);
        s = {1'b0, a} + {1'b0, b};
        exp_q.push_back(s[32:1]);
      end
      // Fill both FIFOs before reading, so the backend must stall on a
      // full result FIFO and further writes abort.
      exp_sel = EXP_AVG;
      run_job(EXP_AVG, ins, 40, outs, 1);
      check(outs.size() == 40, "averager result count");
      for (int i = 0; i < outs.size(); i++)
        check(outs[i] == exp_q[i], $sformatf("averager result %0d", i));
    end

    // Averager again, with burst transfers: 48 words offered at once.
    begin
      word_t exp_q[$];
      logic [32:0] s;
      ins.delete();
      for (int i = 0; i < 24; i++) begin
        word_t a, b;
        a = $urandom; b = $urandom;
        ins.push_back(a); ins.push_back(b);
        s = {1'b0, a} + {1'b0, b};
        exp_q.push_back(s[32:1]);
      end
      run_burst_job(EXP_AVG, ins, 24, outs);
      check(outs.size() == 24, "averager burst result count");
      for (int i = 0; i < outs.size(); i++)
        check(outs[i] == exp_q[i], $sformatf("averager burst result %0d", i));
    end

    // TEA: three word pairs, as the original test program used.
    begin
      logic [31:0] y, z, p [6];
      p = '{32'h0000_0001, 32'h0000_0002, 32'h1234_5678, 32'h9ABC_DEF0,
            32'hFFFF_FFFF, 32'h0000_0000};
      for (int k = 0; k < 3; k++) begin
        ins.delete();
        ins.push_back(p[2*k]); ins.push_back(p[2*k+1]);
        run_job(EXP_TEA, ins, 2, outs);
        y = p[2*k]; z = p[2*k+1];
        tea_enc(y, z);
        check(outs.size() == 2 && outs[0] == y && outs[1] == z, $sformatf("TEA pair %0d", k));
        y = outs[0]; z = outs[1];
        tea_dec(y, z);
        check(y == p[2*k] && z == p[2*k+1], $sformatf("TEA pair %0d decrypts", k));
      end
    end

    // DCT: a 16x16 greyscale image of random discs and rectangles on a
    // shaded ground, sixteen blocks.
    begin
      int img [16][16];
      int blk [16], ref_out [16];
      for (int r = 0; r < 16; r++)
        for (int c = 0; c < 16; c++)
          img[r][c] = 10 + 7 * r + 3 * c;
      for (int k = 0; k < 6; k++) begin
        int cr, cc, sz, lv;
        cr = $urandom_range(15); cc = $urandom_range(15);
        sz = $urandom_range(2, 5); lv = $urandom_range(255);
        for (int r = 0; r < 16; r++)
          for (int c = 0; c < 16; c++)
            if (k % 2 == 0 ? (r - cr) * (r - cr) + (c - cc) * (c - cc) <= sz * sz
                           : (r >= cr && r < cr + sz && c >= cc && c < cc + 2 * sz))
              img[r][c] = lv;
      end
      for (int br = 0; br < 16; br += 4)
        for (int bc = 0; bc < 16; bc += 4) begin
          ins.delete();
          for (int i = 0; i < 16; i++) begin
            blk[i] = (img[br + i/4][bc + i%4] - 128) * 256;
            ins.push_back(blk[i]);
          end
          if (br == 4 && bc == 4) run_burst_job(EXP_DCT, ins, 16, outs);
          else run_job(EXP_DCT, ins, 16, outs);
          dct_model(blk, ref_out);
          check(outs.size() == 16, "DCT result count");
          for (int i = 0; i < 16 && i < outs.size(); i++)
            check($signed(outs[i]) == ref_out[i],
                  $sformatf("DCT block (%0d,%0d) coefficient %0d", br, bc, i));
        end
    end

    // CORDIC: sine and cosine of every whole angle from 0 to 90 degrees.
    for (int deg = 0; deg <= 90; deg++) begin
      int x, y, z;
      real a;
      x = int'(0.6073 * 4096.0); y = 0; z = deg * 4096;
      ins.delete();
      ins.push_back(x); ins.push_back(y); ins.push_back(z);
      run_job(EXP_CORDIC, ins, 3, outs);
      cordic_model(x, y, z);
      check(outs.size() == 3 && $signed(outs[0]) == x && $signed(outs[1]) == y &&
            $signed(outs[2]) == z, $sformatf("CORDIC %0d deg", deg));
      a = deg * 3.14159265358979 / 180.0;
      check(rabs($signed(outs[0]) / 4096.0 - $cos(a)) < 0.002 &&
            rabs($signed(outs[1]) / 4096.0 - $sin(a)) < 0.002,
            $sformatf("CORDIC %0d deg accuracy", deg));
    end

    // Flushes, with the averager: stale inputs and results are dropped.
    exp_sel = EXP_AVG; n_switch++;
    command(CMD_SYSTEM_RESET);
    access(1, REG_DATA_IN, 32'd1, ab, rd);
    command(CMD_INPUT_FLUSH);
    check(in_empty, "input flush");
    command(CMD_FINAL_POP);
    command(CMD_RESULT_FLUSH);
    check(res_empty, "result flush");
    begin
      word_t o[$];
      ins.delete(); ins.push_back(32'd6); ins.push_back(32'd10);
      run_job(EXP_AVG, ins, 1, o);
      check(o.size() == 1 && o[0] == 32'd8, "averager after flushes");
    end

    // Every mechanism must have happened.
    $display("bursts: write=%0d read=%0d write-disconnect=%0d read-disconnect=%0d",
             n_burst_wr, n_burst_rd, n_wr_disc, n_rd_disc);
    check(n_burst_wr > 0, "burst write of several words happened");
    check(n_burst_rd > 0, "burst read of several words happened");
    check(n_wr_disc > 0,  "burst write ended by disconnect happened");
    check(n_rd_disc > 0,  "burst read ended by disconnect happened");
    $display("mechanisms: write-abort=%0d read-abort=%0d pad=%0d final-pop=%0d sys-reset=%0d in-flush=%0d res-flush=%0d result-stall=%0d pci-priority=%0d backend-switch=%0d",
             n_wr_abort, n_rd_abort, n_pad, n_final_pop, n_sys_reset, n_in_flush,
             n_res_flush, n_res_stall, n_priority, n_switch);
    check(n_wr_abort > 0,  "write abort on full input FIFO happened");
    check(n_rd_abort > 0,  "read abort on empty result FIFO happened");
    check(n_pad > 0,       "padding zero happened");
    check(n_final_pop > 0, "final pop happened");
    check(n_sys_reset > 0, "system reset happened");
    check(n_in_flush > 0,  "input flush happened");
    check(n_res_flush > 0, "result flush happened");
    check(n_res_stall > 0, "backend stall on full result FIFO happened");
    check(n_priority > 0,  "PCI priority over a waiting backend happened");
    check(n_switch >= 4,   "all backends selected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
