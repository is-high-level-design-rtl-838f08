// exp_port: the standard experiment interface, i.e. the backend's end of the
// ready / request / received handshake, for both directions.
//
// Input direction: while the core holds get high, the port waits for
// in_rdy (the input FIFO has data), raises in_req, waits for in_rec, then
// captures in_data, drops in_req and pulses got for one cycle with the word
// on got_data. It does not start another transfer until in_rec has fallen.
// Result direction: while the core holds put high (with put_data stable),
// the port waits for res_rdy (room in the result FIFO), drives res_data and
// raises res_req, waits for res_rec, drops res_req, waits for res_rec to
// fall, and pulses put_done. res_data keeps the last word sent.
// The controller's ready and received lines come from the PCI clock domain
// and pass two flip-flops here. The protocol itself follows the original
// platform (the same three-wire handshake in both directions, the
// controller driving ready and received); the get/put core interface is
// this design's own.
module exp_port
  import hif_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  // handshake with the interface controller
  input  logic  in_rdy,
  input  logic  in_rec,
  output logic  in_req,
  input  word_t in_data,
  input  logic  res_rdy,
  input  logic  res_rec,
  output logic  res_req,
  output word_t res_data,
  // algorithm core side
  input  logic  get,
  output logic  got,
  output word_t got_data,
  input  logic  put,
  input  word_t put_data,
  output logic  put_done
);
  typedef enum logic [1:0] {P_IDLE, P_REQ, P_DROP} port_state_e;

  port_state_e in_st, res_st;
  logic in_rdy_s, in_rec_s, res_rdy_s, res_rec_s;

  hif_sync #(.WIDTH(4)) u_sync (
    .clk(clk), .rst_n(rst_n),
    .d({in_rdy, in_rec, res_rdy, res_rec}),
    .q({in_rdy_s, in_rec_s, res_rdy_s, res_rec_s})
  );

  // Input direction.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_st    <= P_IDLE;
      in_req   <= 1'b0;
      got      <= 1'b0;
      got_data <= '0;
    end else begin
      got <= 1'b0;
      unique case (in_st)
        P_IDLE: if (get && in_rdy_s && !in_rec_s) begin
          in_req <= 1'b1;
          in_st  <= P_REQ;
        end
        P_REQ: if (in_rec_s) begin
          got_data <= in_data;
          got      <= 1'b1;
          in_req   <= 1'b0;
          in_st    <= P_DROP;
        end
        P_DROP: if (!in_rec_s) in_st <= P_IDLE;
        default: in_st <= P_IDLE;
      endcase
    end
  end

  // Result direction.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_st   <= P_IDLE;
      res_req  <= 1'b0;
      res_data <= '0;
      put_done <= 1'b0;
    end else begin
      put_done <= 1'b0;
      unique case (res_st)
        P_IDLE: if (put && res_rdy_s && !res_rec_s && !put_done) begin
          res_data <= put_data;
          res_req  <= 1'b1;
          res_st   <= P_REQ;
        end
        P_REQ: if (res_rec_s) begin
          res_req <= 1'b0;
          res_st  <= P_DROP;
        end
        P_DROP: if (!res_rec_s) begin
          put_done <= 1'b1;
          res_st   <= P_IDLE;
        end
        default: res_st <= P_IDLE;
      endcase
    end
  end

  // The backend holds a request until it is received.
  a_in_req_hold:  assert property (@(posedge clk) disable iff (!rst_n)
                                   (in_req && !in_rec_s) |=> in_req);
  a_res_req_hold: assert property (@(posedge clk) disable iff (!rst_n)
                                   (res_req && !res_rec_s) |=> res_req);
endmodule
