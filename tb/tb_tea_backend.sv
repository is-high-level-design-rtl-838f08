// tb_tea_backend: self-checking test of the TEA encoder backend.
// dut   : the default hard-wired key; random blocks are compared with a
//         software model of TEA, and each encryption must take exactly 64
//         busy cycles (32 rounds, two half rounds per clock). A
//         decryption model must give back the plaintext.
// dut0  : key of all zeros, checked against the published answer for a
//         zero block (41ea3a0a 94baa940).
module tb_tea_backend;
  logic clk = 0, rst_n = 0, hold = 0;
  int checks = 0, failures = 0;
  localparam logic [127:0] KEY = 128'h11112222_33334444_55556666_77778888;

  always #5 clk = ~clk;

  logic in_rdy, in_rec, in_req, res_rdy, res_rec, res_req, res_valid, busy;
  logic [31:0] in_data, res_data, res_word;
  tb_hs_ctrl u_hs (.clk, .rst_n, .hold_results(hold), .in_rdy, .in_rec, .in_req, .in_data,
                   .res_rdy, .res_rec, .res_req, .res_data, .res_valid, .res_word);
  tea_backend dut (.clk, .rst_n, .in_rdy, .in_rec, .in_req, .in_data,
                   .res_rdy, .res_rec, .res_req, .res_data, .busy);

  logic in_rdy0, in_rec0, in_req0, res_rdy0, res_rec0, res_req0, res_valid0, busy0;
  logic [31:0] in_data0, res_data0, res_word0;
  tb_hs_ctrl u_hs0 (.clk, .rst_n, .hold_results(hold), .in_rdy(in_rdy0), .in_rec(in_rec0),
                    .in_req(in_req0), .in_data(in_data0), .res_rdy(res_rdy0), .res_rec(res_rec0),
                    .res_req(res_req0), .res_data(res_data0), .res_valid(res_valid0),
                    .res_word(res_word0));
  tea_backend #(.KEY('0)) dut0 (.clk, .rst_n, .in_rdy(in_rdy0), .in_rec(in_rec0),
                    .in_req(in_req0), .in_data(in_data0), .res_rdy(res_rdy0), .res_rec(res_rec0),
                    .res_req(res_req0), .res_data(res_data0), .busy(busy0));

  function automatic void tea_enc(input logic [127:0] k, inout logic [31:0] y, inout logic [31:0] z);
    logic [31:0] sum = 0;
    for (int n = 0; n < 32; n++) begin
      sum += 32'h9E3779B9;
      y += ((z << 4) + k[127:96]) ^ (z + sum) ^ ((z >> 5) + k[95:64]);
      z += ((y << 4) + k[63:32])  ^ (y + sum) ^ ((y >> 5) + k[31:0]);
    end
  endfunction

  function automatic void tea_dec(input logic [127:0] k, inout logic [31:0] y, inout logic [31:0] z);
    logic [31:0] sum = 32'h9E3779B9 << 5;
    for (int n = 0; n < 32; n++) begin
      z -= ((y << 4) + k[63:32])  ^ (y + sum) ^ ((y >> 5) + k[31:0]);
      y -= ((z << 4) + k[127:96]) ^ (z + sum) ^ ((z >> 5) + k[95:64]);
      sum -= 32'h9E3779B9;
    end
  endfunction

  logic [31:0] expq[$], plainq[$], gotq[$];
  int busy_cycles = 0;
  always @(posedge clk) if (rst_n && busy) busy_cycles++;

  always @(posedge clk) if (res_valid) begin
    logic [31:0] e;
    checks++;
    e = expq.pop_front();
    gotq.push_back(res_word);
    if (res_word !== e) begin
      failures++;
      $display("FAIL tea: got %h expected %h", res_word, e);
    end
  end

  logic [31:0] kat[$];
  always @(posedge clk) if (res_valid0) kat.push_back(res_word0);

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] y, z;
    repeat (3) @(posedge clk);
    rst_n = 1;
    u_hs0.push_word(0);
    u_hs0.push_word(0);
    for (int i = 0; i < 12; i++) begin
      y = (i == 0) ? 32'h0123_4567 : $urandom;
      z = (i == 0) ? 32'h89AB_CDEF : $urandom;
      plainq.push_back(y); plainq.push_back(z);
      u_hs.push_word(y);
      u_hs.push_word(z);
      tea_enc(KEY, y, z);
      expq.push_back(y);
      expq.push_back(z);
    end
    wait (expq.size() == 0 && kat.size() == 2);
    repeat (5) @(posedge clk);
    // Known answer for the all-zero key and block.
    checks++;
    if (kat[0] !== 32'h41EA3A0A || kat[1] !== 32'h94BAA940) begin
      failures++;
      $display("FAIL tea KAT: %h %h", kat[0], kat[1]);
    end
    // Decryption of the hardware output gives the plaintext back.
    for (int i = 0; i < 12; i++) begin
      y = gotq[2*i]; z = gotq[2*i+1];
      tea_dec(KEY, y, z);
      checks++;
      if (y !== plainq[2*i] || z !== plainq[2*i+1]) begin
        failures++;
        $display("FAIL tea decrypt block %0d", i);
      end
    end
    // 32 rounds at two cycles per round.
    checks++;
    if (busy_cycles != 12 * 64) begin
      failures++;
      $display("FAIL tea: %0d busy cycles, expected %0d", busy_cycles, 12 * 64);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
