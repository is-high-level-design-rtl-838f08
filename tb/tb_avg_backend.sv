// tb_avg_backend: self-checking test of the averaging backend. Random pairs
// (including values near 2^32, where the carry matters) are fed through a
// behavioural controller model; every result must equal (a+b)/2 computed in
// 33 bits. Also checks that the backend waits while the result side is not
// ready.
module tb_avg_backend;
  logic clk = 0, rst_n = 0, hold = 0;
  logic in_rdy, in_rec, in_req, res_rdy, res_rec, res_req, res_valid;
  logic [31:0] in_data, res_data, res_word;
  int checks = 0, failures = 0;
  logic [31:0] expq[$];

  always #5 clk = ~clk;

  tb_hs_ctrl u_hs (.clk, .rst_n, .hold_results(hold), .in_rdy, .in_rec, .in_req, .in_data,
                   .res_rdy, .res_rec, .res_req, .res_data, .res_valid, .res_word);
  avg_backend dut (.clk, .rst_n, .in_rdy, .in_rec, .in_req, .in_data,
                   .res_rdy, .res_rec, .res_req, .res_data);

  always @(posedge clk) if (res_valid) begin
    logic [31:0] e;
    checks++;
    e = expq.pop_front();
    if (res_word !== e) begin
      failures++;
      $display("FAIL avg: got %h expected %h", res_word, e);
    end
  end

  task automatic pair(input logic [31:0] a, input logic [31:0] b);
    logic [32:0] s;
    s = {1'b0, a} + {1'b0, b};
    expq.push_back(s[32:1]);
    u_hs.push_word(a);
    u_hs.push_word(b);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    pair(32'd10, 32'd20);
    pair(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    pair(32'hFFFF_FFFF, 32'd1);
    pair(32'd7, 32'd0);
    for (int i = 0; i < 30; i++) pair($urandom, $urandom);
    wait (expq.size() == 0);
    // Result side not ready: no result may come out.
    hold = 1;
    pair(32'd100, 32'd300);
    repeat (60) @(posedge clk);
    checks++;
    if (expq.size() != 1 || res_req) begin
      failures++;
      $display("FAIL avg: result escaped while result side not ready");
    end
    hold = 0;
    wait (expq.size() == 0);
    repeat (10) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
