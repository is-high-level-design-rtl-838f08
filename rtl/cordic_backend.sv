// cordic_backend: iterative CORDIC in rotation mode.
//
// Takes x, y and z (in that order) as signed 32-bit fixed-point words with
// 12 fractional bits (value * 4096), z being an angle in degrees. It then runs
// ITERATIONS steps, one per clock:
//     d = +1 if z >= 0, else -1
//     x' = x - d * (y >>> i)
//     y' = y + d * (x >>> i)
//     z' = z - d * atan(2^-i)
// with arithmetic right shifts, and returns x, y and z in that order.
// Starting from x = K = 0.6073 (the CORDIC gain), y = 0, z = angle, x and y
// end as cos and sin of the angle. The arctangents come from a 16-entry ROM
// holding floor(atan(2^-i) * 180/pi * 4096). Rotation mode only, 16
// iterations, degrees, the 12-bit fraction and the ROM follow the original
// experiment; the one-iteration-per-clock schedule is this design's.
module cordic_backend
  import hif_pkg::*;
#(
  parameter int unsigned ITERATIONS = 16   // at most 16 (ROM size)
) (
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
  output logic  busy      // high while iterating
);
  typedef enum logic [2:0] {C_GET_X, C_GET_Y, C_GET_Z, C_ITER, C_PUT_X, C_PUT_Y, C_PUT_Z} cordic_state_e;

  // floor(atan(2^-i) in degrees * 4096), i = 0..15
  localparam logic signed [31:0] ATAN_ROM [16] = '{
    32'sh0002D000, 32'sh0001A90A, 32'sh0000E094, 32'sh00007200,
    32'sh00003938, 32'sh00001CA3, 32'sh00000E52, 32'sh00000729,
    32'sh00000394, 32'sh000001CA, 32'sh000000E5, 32'sh00000072,
    32'sh00000039, 32'sh0000001C, 32'sh0000000E, 32'sh00000007
  };

  cordic_state_e st;
  logic signed [31:0] x, y, z, xs, ys, atan_i;
  logic [3:0]  iter;
  logic  get, got, put, put_done;
  word_t got_data, put_data;

  exp_port u_port (
    .clk(clk), .rst_n(rst_n),
    .in_rdy(in_rdy), .in_rec(in_rec), .in_req(in_req), .in_data(in_data),
    .res_rdy(res_rdy), .res_rec(res_rec), .res_req(res_req), .res_data(res_data),
    .get(get), .got(got), .got_data(got_data),
    .put(put), .put_data(put_data), .put_done(put_done)
  );

  assign get    = (st == C_GET_X) || (st == C_GET_Y) || (st == C_GET_Z);
  assign put    = (st == C_PUT_X) || (st == C_PUT_Y) || (st == C_PUT_Z);
  assign busy   = (st == C_ITER);
  assign xs     = x >>> iter;
  assign ys     = y >>> iter;
  assign atan_i = ATAN_ROM[iter];

  always_comb begin
    unique case (st)
      C_PUT_X: put_data = x;
      C_PUT_Y: put_data = y;
      default: put_data = z;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= C_GET_X;
      x    <= '0;
      y    <= '0;
      z    <= '0;
      iter <= '0;
    end else begin
      unique case (st)
        C_GET_X: if (got) begin x <= got_data; st <= C_GET_Y; end
        C_GET_Y: if (got) begin y <= got_data; st <= C_GET_Z; end
        C_GET_Z: if (got) begin
          z    <= got_data;
          iter <= '0;
          st   <= C_ITER;
        end
        C_ITER: begin
          if (!z[31]) begin
            x <= x - ys;
            y <= y + xs;
            z <= z - atan_i;
          end else begin
            x <= x + ys;
            y <= y - xs;
            z <= z + atan_i;
          end
          iter <= iter + 1'b1;
          if (iter == 4'(ITERATIONS - 1)) st <= C_PUT_X;
        end
        C_PUT_X: if (put_done) st <= C_PUT_Y;
        C_PUT_Y: if (put_done) st <= C_PUT_Z;
        C_PUT_Z: if (put_done) st <= C_GET_X;
        default: st <= C_GET_X;
      endcase
    end
  end
endmodule
