// tb_dct_backend: self-checking test of the 4x4 DCT backend.
// Blocks of pixels (flat, ramps, random) are sent as (pixel - 128) * 256 in
// row order. The 16 results are compared bit-exactly with a fixed-point
// model that is organised differently from the hardware (row transform,
// transpose, row transform, transpose) and, loosely (within 2), with a
// floating-point orthonormal 2-D DCT. Each block must keep the backend busy
// for exactly 200 cycles (2 passes x 4 lines x (4 x 6 + 1)).
module tb_dct_backend;
  logic clk = 0, rst_n = 0, hold = 0;
  int checks = 0, failures = 0, blocks = 0;

  always #5 clk = ~clk;

  logic in_rdy, in_rec, in_req, res_rdy, res_rec, res_req, res_valid, busy;
  logic [31:0] in_data, res_data, res_word;
  tb_hs_ctrl u_hs (.clk, .rst_n, .hold_results(hold), .in_rdy, .in_rec, .in_req, .in_data,
                   .res_rdy, .res_rec, .res_req, .res_data, .res_valid, .res_word);
  dct_backend dut (.clk, .rst_n, .in_rdy, .in_rec, .in_req, .in_data,
                   .res_rdy, .res_rec, .res_req, .res_data, .busy);

  function automatic int rnd(input int n);
    return (n >>> 8) + ((n >> 7) & 1);
  endfunction

  // The cosine table as the original experiment specified it, in 8-bit fixed
  // point: 256, 236 (cos pi/8), 181 (cos pi/4), 98 (cos 3pi/8). Note that
  // 236 is 256*cos(pi/8) = 236.5 truncated, so the table is given here by
  // value rather than by a rounding formula.
  function automatic int cosfx(input int u, input int x);
    int t [4][4] = '{'{256, 256, 256, 256}, '{236, 98, -98, -236},
                     '{181, -181, -181, 181}, '{98, -236, 236, -98}};
    return t[u][x];
  endfunction

  typedef int mat_t [4][4];

  function automatic void row_dct(ref mat_t m);
    int t[4];
    int cu, sum, mid;
    for (int r = 0; r < 4; r++) begin
      for (int u = 0; u < 4; u++) begin
        sum = 0;
        for (int x = 0; x < 4; x++) sum += rnd(m[r][x] * cosfx(u, x));
        cu  = (u == 0) ? 181 : 256;
        mid = rnd(sum * cu);
        t[u] = rnd(mid * 181);
      end
      for (int u = 0; u < 4; u++) m[r][u] = t[u];
    end
  endfunction

  function automatic void transpose(ref mat_t m);
    int t;
    for (int r = 0; r < 4; r++)
      for (int c = r + 1; c < 4; c++) begin
        t = m[r][c]; m[r][c] = m[c][r]; m[c][r] = t;
      end
  endfunction

  int expq[$];
  real refq[$];
  int busy_cycles = 0;
  always @(posedge clk) if (rst_n && busy) busy_cycles++;

  always @(posedge clk) if (res_valid) begin
    int e;
    real f;
    checks++;
    e = expq.pop_front();
    f = refq.pop_front();
    if ($signed(res_word) != e) begin
      failures++;
      $display("FAIL dct: got %0d expected %0d", $signed(res_word), e);
    end
    if ($signed(res_word) - f > 2.0 || f - $signed(res_word) > 2.0) begin
      failures++;
      $display("FAIL dct accuracy: got %0d real %f", $signed(res_word), f);
    end
  end

  task automatic run_block(input int pix [4][4]);
    mat_t m;
    real s, cu, cv;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        m[r][c] = (pix[r][c] - 128) * 256;
        u_hs.push_word(m[r][c]);
      end
    row_dct(m); transpose(m); row_dct(m); transpose(m);
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        expq.push_back(rnd(m[r][c]));
        // floating-point reference, orthonormal 4-point DCT in both directions
        s = 0.0;
        for (int x = 0; x < 4; x++)
          for (int y = 0; y < 4; y++)
            s += (pix[x][y] - 128) * $cos((2.0*x+1.0)*r*3.14159265358979/8.0)
                                   * $cos((2.0*y+1.0)*c*3.14159265358979/8.0);
        cu = (r == 0) ? 0.5 : 0.70710678;
        cv = (c == 0) ? 0.5 : 0.70710678;
        refq.push_back(s * cu * cv);
      end
    blocks++;
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pix [4][4];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 8; b++) begin
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++)
          case (b)
            0: pix[r][c] = 128;
            1: pix[r][c] = 255;
            2: pix[r][c] = 0;
            3: pix[r][c] = 40 * c + 10;
            4: pix[r][c] = 60 * r;
            default: pix[r][c] = $urandom_range(255);
          endcase
      run_block(pix);
      wait (expq.size() == 0);
    end
    repeat (5) @(posedge clk);
    checks++;
    if (busy_cycles != blocks * 200) begin
      failures++;
      $display("FAIL dct: %0d busy cycles for %0d blocks", busy_cycles, blocks);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
