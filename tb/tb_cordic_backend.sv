// tb_cordic_backend: self-checking test of the CORDIC backend.
// For angles 0..90 degrees (x = 0.6073, y = 0, z = angle, all times 4096)
// the three results are compared bit-exactly with an integer model of the
// iteration, and cos/sin are compared with the real values (within 0.002).
// A few random vectors with negative and positive z are also run. Every
// operation must iterate for exactly 16 cycles.
module tb_cordic_backend;
  logic clk = 0, rst_n = 0, hold = 0;
  int checks = 0, failures = 0, ops = 0;

  always #5 clk = ~clk;

  logic in_rdy, in_rec, in_req, res_rdy, res_rec, res_req, res_valid, busy;
  logic [31:0] in_data, res_data, res_word;
  tb_hs_ctrl u_hs (.clk, .rst_n, .hold_results(hold), .in_rdy, .in_rec, .in_req, .in_data,
                   .res_rdy, .res_rec, .res_req, .res_data, .res_valid, .res_word);
  cordic_backend dut (.clk, .rst_n, .in_rdy, .in_rec, .in_req, .in_data,
                      .res_rdy, .res_rec, .res_req, .res_data, .busy);

  // Table rebuilt from the arctangent itself, independent of the ROM.
  function automatic int atan_fx(input int i);
    return int'($floor($atan(2.0 ** (-i)) * 180.0 / 3.14159265358979 * 4096.0));
  endfunction

  function automatic void model(inout int x, inout int y, inout int z);
    int xt;
    for (int i = 0; i < 16; i++) begin
      xt = x;
      if (z >= 0) begin x = x - (y >>> i); y = y + (xt >>> i); z = z - atan_fx(i); end
      else        begin x = x + (y >>> i); y = y - (xt >>> i); z = z + atan_fx(i); end
    end
  endfunction

  logic [31:0] expq[$];
  real ang_q[$];
  logic [31:0] got3[$];
  int busy_cycles = 0;
  always @(posedge clk) if (rst_n && busy) busy_cycles++;

  always @(posedge clk) if (res_valid) begin
    logic [31:0] e;
    checks++;
    e = expq.pop_front();
    got3.push_back(res_word);
    if (res_word !== e) begin
      failures++;
      $display("FAIL cordic: got %h expected %h", res_word, e);
    end
  end

  task automatic run(input int x, input int y, input int z);
    u_hs.push_word(x); u_hs.push_word(y); u_hs.push_word(z);
    model(x, y, z);
    expq.push_back(x); expq.push_back(y); expq.push_back(z);
    ops++;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real c, s, a;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int deg = 0; deg <= 90; deg += 5) begin
      run(int'(0.6073 * 4096.0), 0, deg * 4096);
      wait (expq.size() == 0);
      a = deg * 3.14159265358979 / 180.0;
      c = $signed(got3[0]) / 4096.0;
      s = $signed(got3[1]) / 4096.0;
      got3.delete();
      checks++;
      if ((c - $cos(a)) > 0.002 || ($cos(a) - c) > 0.002 ||
          (s - $sin(a)) > 0.002 || ($sin(a) - s) > 0.002) begin
        failures++;
        $display("FAIL cordic accuracy at %0d deg: cos %f sin %f", deg, c, s);
      end
    end
    for (int i = 0; i < 10; i++)
      run($signed($urandom_range(8191)) - 4096, $signed($urandom_range(8191)) - 4096,
          ($signed($urandom_range(180)) - 90) * 4096);
    wait (expq.size() == 0);
    repeat (5) @(posedge clk);
    checks++;
    if (busy_cycles != ops * 16) begin
      failures++;
      $display("FAIL cordic: %0d busy cycles for %0d operations", busy_cycles, ops);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
