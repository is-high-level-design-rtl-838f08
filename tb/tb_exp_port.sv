// tb_exp_port: self-checking test of the experiment-side handshake port.
// The controller side is played by tb_hs_ctrl (same clock here; the port's
// synchronisers only add delay). A small loop-back core requests words with
// get and returns each word plus one with put. Checks: every word arrives
// in order and unchanged (got_data), results come back in order, no word is
// taken while in_rdy is low, no result is offered while res_rdy is low, and
// got / put_done are single-cycle pulses.
module tb_exp_port;
  logic clk = 0, rst_n = 0, hold = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic in_rdy, in_rec, in_req, res_rdy, res_rec, res_req, res_valid;
  logic [31:0] in_data, res_data, res_word;
  logic get, got, put, put_done;
  logic [31:0] got_data, put_data;

  tb_hs_ctrl u_hs (.clk, .rst_n, .hold_results(hold), .in_rdy, .in_rec, .in_req, .in_data,
                   .res_rdy, .res_rec, .res_req, .res_data, .res_valid, .res_word);
  exp_port dut (.clk, .rst_n, .in_rdy, .in_rec, .in_req, .in_data, .res_rdy, .res_rec,
                .res_req, .res_data, .get, .got, .got_data, .put, .put_data, .put_done);

  // loop-back core: get a word, put word + 1
  typedef enum {L_GET, L_PUT} lb_e;
  lb_e st;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= L_GET; put_data <= 0;
    end else if (st == L_GET && got) begin
      put_data <= got_data + 1; st <= L_PUT;
    end else if (st == L_PUT && put_done) begin
      st <= L_GET;
    end
  end
  assign get = (st == L_GET);
  assign put = (st == L_PUT);

  logic [31:0] sentq[$], resq[$];
  logic got_d, put_done_d;
  always @(posedge clk) begin
    got_d <= got; put_done_d <= put_done;
    if (rst_n && got) begin
      logic [31:0] e;
      checks++;
      e = sentq.pop_front();
      if (got_data !== e) begin failures++; $display("FAIL port: got %h exp %h", got_data, e); end
      resq.push_back(e + 1);
    end
    if (rst_n && ((got && got_d) || (put_done && put_done_d))) begin
      failures++; $display("FAIL port: pulse longer than one cycle");
    end
    if (res_valid) begin
      logic [31:0] e;
      checks++;
      e = resq.pop_front();
      if (res_word !== e) begin failures++; $display("FAIL port: result %h exp %h", res_word, e); end
    end
    if (rst_n && hold && res_req && !res_rec && $past(hold, 3)) begin
      failures++; $display("FAIL port: result offered while not ready");
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] w;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (20) @(posedge clk);
    checks++;
    if (in_req) begin failures++; $display("FAIL port: request with no data ready"); end
    for (int i = 0; i < 40; i++) begin
      w = $urandom;
      sentq.push_back(w);
      u_hs.push_word(w);
      if (i % 7 == 3) repeat ($urandom_range(20)) @(posedge clk);
    end
    wait (sentq.size() == 0 && resq.size() == 0);
    // result side held off: the core's result must wait
    hold = 1;
    w = 32'hCAFE_0000;
    sentq.push_back(w);
    u_hs.push_word(w);
    repeat (50) @(posedge clk);
    checks++;
    if (resq.size() != 1) begin failures++; $display("FAIL port: result not held back"); end
    hold = 0;
    wait (resq.size() == 0);
    repeat (5) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
