// dct_backend: 4x4 two-dimensional DCT for the JPEG experiment.
//
// Takes 16 signed 32-bit words in row order (pixel - 128, times 256: 8
// fractional bits), applies the 1-D DCT to each row and then to each column,
// and returns the 16 coefficients in row order, rounded to signed integers.
// The 1-D transform of a line v is, for u = 0..3,
//     s      = sum_x Rnd(v[x] * COS[u][x])
//     t[u]   = Rnd(Rnd(s * C[u]) * SCALE)
// where COS[u][x] = round(256*cos((2x+1)*u*pi/8)), C = {181, 256, 256, 256},
// SCALE = 181 (181/256 ~ sqrt(2)/2), products keep their low 32 bits, and
// Rnd(n) = (n >>> 8) + n[7] removes 8 fractional bits rounding half up.
// The output word is Rnd of the final coefficient.
// The matrix lives in a 16-word register array and one multiplier is shared
// by all steps: four multiply-accumulate cycles and two scaling cycles per
// coefficient, one write-back cycle per line, about 200 cycles per block.
// The 4x4 block size, 8-bit fixed point, the constant tables, the rounding
// and the row/column order follow the original experiment; the schedule is
// this design's own.
module dct_backend
  import hif_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_rdy,
  input  logic  in_rec,
  output logic  in_req,
  input  word_t in_data,
  input  logic  res_rdy,
  input  logic  res_rec,
  output logic  res_req,
  output word_t res_data,
  output logic  busy      // high while transforming
);
  typedef enum logic [2:0] {D_LOAD, D_MAC, D_MID, D_SCALE, D_WB, D_OUT} dct_state_e;

  localparam logic signed [31:0] COS [4][4] = '{
    '{ 32'sd256,  32'sd256,  32'sd256,  32'sd256},
    '{ 32'sd236,  32'sd98,  -32'sd98,  -32'sd236},
    '{ 32'sd181, -32'sd181, -32'sd181,  32'sd181},
    '{ 32'sd98,  -32'sd236,  32'sd236, -32'sd98 }
  };
  localparam logic signed [31:0] C [4] = '{32'sd181, 32'sd256, 32'sd256, 32'sd256};
  localparam logic signed [31:0] SCALE = 32'sd181;

  function automatic logic signed [31:0] rnd(input logic signed [31:0] n);
    return (n >>> 8) + $signed({31'b0, n[7]});
  endfunction

  dct_state_e st;
  logic signed [31:0] a   [16];
  logic signed [31:0] tmp [4];
  logic signed [31:0] acc, mid;
  logic signed [31:0] mul_a, mul_b, prod;
  logic        pass;            // 0: rows, 1: columns
  logic [1:0]  line, u, x;
  logic [3:0]  idx;             // load / output element index
  logic [3:0]  elem;            // element addressed by (line, x)
  logic  get, got, put, put_done;
  word_t got_data, put_data;

  exp_port u_port (
    .clk(clk), .rst_n(rst_n),
    .in_rdy(in_rdy), .in_rec(in_rec), .in_req(in_req), .in_data(in_data),
    .res_rdy(res_rdy), .res_rec(res_rec), .res_req(res_req), .res_data(res_data),
    .get(get), .got(got), .got_data(got_data),
    .put(put), .put_data(put_data), .put_done(put_done)
  );

  assign get      = (st == D_LOAD);
  assign put      = (st == D_OUT);
  assign put_data = rnd(a[idx]);
  assign busy     = (st == D_MAC) || (st == D_MID) || (st == D_SCALE) || (st == D_WB);
  assign elem     = pass ? {x, line} : {line, x};

  // The one shared multiplier; only the low 32 bits of a product are kept.
  always_comb begin
    unique case (st)
      D_MID:   begin mul_a = acc; mul_b = C[u];     end
      D_SCALE: begin mul_a = mid; mul_b = SCALE;    end
      default: begin mul_a = a[elem]; mul_b = COS[u][x]; end
    endcase
    prod = mul_a * mul_b;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= D_LOAD;
      acc  <= '0;
      mid  <= '0;
      pass <= 1'b0;
      line <= '0;
      u    <= '0;
      x    <= '0;
      idx  <= '0;
      for (int i = 0; i < 16; i++) a[i] <= '0;
      for (int i = 0; i < 4; i++) tmp[i] <= '0;
    end else begin
      unique case (st)
        D_LOAD: if (got) begin
          a[idx] <= got_data;
          idx    <= idx + 1'b1;
          if (idx == 4'd15) begin
            pass <= 1'b0;
            line <= '0;
            u    <= '0;
            x    <= '0;
            acc  <= '0;
            st   <= D_MAC;
          end
        end
        D_MAC: begin
          acc <= acc + rnd(prod);
          x   <= x + 1'b1;
          if (x == 2'd3) st <= D_MID;
        end
        D_MID: begin
          mid <= rnd(prod);
          st  <= D_SCALE;
        end
        D_SCALE: begin
          tmp[u] <= rnd(prod);
          acc    <= '0;
          u      <= u + 1'b1;
          st     <= (u == 2'd3) ? D_WB : D_MAC;
        end
        D_WB: begin
          for (int k = 0; k < 4; k++) begin
            if (pass) a[{2'(k), line}] <= tmp[k];
            else      a[{line, 2'(k)}] <= tmp[k];
          end
          line <= line + 1'b1;
          st   <= D_MAC;
          if (line == 2'd3) begin
            if (pass) begin
              idx <= '0;
              st  <= D_OUT;
            end else begin
              pass <= 1'b1;
            end
          end
        end
        D_OUT: if (put_done) begin
          idx <= idx + 1'b1;
          if (idx == 4'd15) st <= D_LOAD;
        end
        default: st <= D_LOAD;
      endcase
    end
  end
endmodule
