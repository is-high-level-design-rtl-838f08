// tea_backend: Tiny Encryption Algorithm encoder backend.
//
// Takes two 32-bit words (y then z) from the input channel, runs ROUNDS TEA
// rounds with a 128-bit key fixed in hardware, and returns the encoded y
// and then the encoded z. Each round is
//     sum += DELTA
//     y   += ((z << 4) + k0) ^ (z + sum) ^ ((z >> 5) + k1)
//     z   += ((y << 4) + k2) ^ (y + sum) ^ ((y >> 5) + k3)
// with unsigned 32-bit arithmetic and logical shifts. The datapath does one
// half round per clock (y in one cycle, z in the next), so the encryption
// itself takes 2*ROUNDS = 64 cycles; sum restarts at zero for every block.
// The algorithm, the 32 rounds, DELTA (derived from (sqrt(5)-1)*2^31) and
// the hard-wired key follow the original experiment; the half-round-per-clock
// schedule is this design's own.
module tea_backend
  import hif_pkg::*;
#(
  parameter int unsigned  ROUNDS = 32,
  parameter logic [31:0]  DELTA  = 32'h9E37_79B9,
  parameter logic [127:0] KEY    = 128'h11112222_33334444_55556666_77778888
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
  output logic  busy      // high while rounds are being computed
);
  typedef enum logic [2:0] {T_GET_Y, T_GET_Z, T_HALF_Y, T_HALF_Z, T_PUT_Y, T_PUT_Z} tea_state_e;

  localparam logic [31:0] K0 = KEY[127:96];
  localparam logic [31:0] K1 = KEY[95:64];
  localparam logic [31:0] K2 = KEY[63:32];
  localparam logic [31:0] K3 = KEY[31:0];

  tea_state_e st;
  logic [31:0] y, z, sum, sum_next;
  logic [$clog2(ROUNDS+1)-1:0] round;
  logic  get, got, put, put_done;
  word_t got_data, put_data;

  exp_port u_port (
    .clk(clk), .rst_n(rst_n),
    .in_rdy(in_rdy), .in_rec(in_rec), .in_req(in_req), .in_data(in_data),
    .res_rdy(res_rdy), .res_rec(res_rec), .res_req(res_req), .res_data(res_data),
    .get(get), .got(got), .got_data(got_data),
    .put(put), .put_data(put_data), .put_done(put_done)
  );

  function automatic logic [31:0] mix(input logic [31:0] v, input logic [31:0] s,
                                      input logic [31:0] ka, input logic [31:0] kb);
    return ((v << 4) + ka) ^ (v + s) ^ ((v >> 5) + kb);
  endfunction

  assign get      = (st == T_GET_Y) || (st == T_GET_Z);
  assign put      = (st == T_PUT_Y) || (st == T_PUT_Z);
  assign put_data = (st == T_PUT_Y) ? y : z;
  assign busy     = (st == T_HALF_Y) || (st == T_HALF_Z);
  assign sum_next = sum + DELTA;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= T_GET_Y;
      y     <= '0;
      z     <= '0;
      sum   <= '0;
      round <= '0;
    end else begin
      unique case (st)
        T_GET_Y: if (got) begin
          y  <= got_data;
          st <= T_GET_Z;
        end
        T_GET_Z: if (got) begin
          z     <= got_data;
          sum   <= '0;
          round <= '0;
          st    <= T_HALF_Y;
        end
        T_HALF_Y: begin
          sum <= sum_next;
          y   <= y + mix(z, sum_next, K0, K1);
          st  <= T_HALF_Z;
        end
        T_HALF_Z: begin
          z     <= z + mix(y, sum, K2, K3);
          round <= round + 1'b1;
          st    <= (round == ($bits(round))'(ROUNDS - 1)) ? T_PUT_Y : T_HALF_Y;
        end
        T_PUT_Y: if (put_done) st <= T_PUT_Z;
        T_PUT_Z: if (put_done) st <= T_GET_Y;
        default: st <= T_GET_Y;
      endcase
    end
  end
endmodule
