// avg_backend: the averaging test backend used to prove the host interface.
//
// It takes two 32-bit words from the input channel, adds them and returns
// the sum shifted right by one bit as a single result: two inputs per
// output, which exercises the host software's handling of mismatched
// input/output counts. The sum is formed in 33 bits so the carry is kept and
// the average never overflows; the operands are treated as unsigned (this
// design's choice). One result is sent per pair, then it waits for the next
// pair. All handshaking is done by exp_port.
module avg_backend
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
  output word_t res_data
);
  typedef enum logic [1:0] {A_GET0, A_GET1, A_PUT} avg_state_e;

  avg_state_e st;
  word_t      op_a, result;
  logic       get, got, put, put_done;
  word_t      got_data;

  exp_port u_port (
    .clk(clk), .rst_n(rst_n),
    .in_rdy(in_rdy), .in_rec(in_rec), .in_req(in_req), .in_data(in_data),
    .res_rdy(res_rdy), .res_rec(res_rec), .res_req(res_req), .res_data(res_data),
    .get(get), .got(got), .got_data(got_data),
    .put(put), .put_data(result), .put_done(put_done)
  );

  assign get = (st == A_GET0) || (st == A_GET1);
  assign put = (st == A_PUT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= A_GET0;
      op_a   <= '0;
      result <= '0;
    end else begin
      unique case (st)
        A_GET0: if (got) begin
          op_a <= got_data;
          st   <= A_GET1;
        end
        A_GET1: if (got) begin
          result <= word_t'(({1'b0, op_a} + {1'b0, got_data}) >> 1);
          st     <= A_PUT;
        end
        A_PUT: if (put_done) st <= A_GET0;
        default: st <= A_GET0;
      endcase
    end
  end
endmodule
