// tb_hs_ctrl: behavioural model of the interface controller's experiment
// side, for testing a backend on its own. It holds an unbounded queue of
// input words (filled with push_word) and answers the backend's handshake
// exactly like the controller: in_rdy while the queue is non-empty, in_rec
// with the word on in_data until in_req falls; res_rdy unless `hold_results`
// is set, res_rec until res_req falls. Each received result is reported on
// res_valid / res_word for one cycle. All in the clock domain of clk.
module tb_hs_ctrl (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        hold_results,
  output logic        in_rdy,
  output logic        in_rec,
  input  logic        in_req,
  output logic [31:0] in_data,
  output logic        res_rdy,
  output logic        res_rec,
  input  logic        res_req,
  input  logic [31:0] res_data,
  output logic        res_valid,
  output logic [31:0] res_word
);
  logic [31:0] q[$];

  task automatic push_word(input logic [31:0] w);
    q.push_back(w);
  endtask

  function automatic int pending();
    return q.size();
  endfunction

  assign in_rdy  = (q.size() != 0);
  assign res_rdy = !hold_results;

  initial begin
    in_rec = 0; res_rec = 0; in_data = 0; res_valid = 0; res_word = 0;
  end

  always @(posedge clk) begin
    res_valid <= 1'b0;
    if (!rst_n) begin
      in_rec  <= 1'b0;
      res_rec <= 1'b0;
    end else begin
      if (!in_rec && in_req && q.size() != 0) begin
        in_data <= q.pop_front();
        in_rec  <= 1'b1;
      end else if (in_rec && !in_req) begin
        in_rec <= 1'b0;
      end
      if (!res_rec && res_req && !hold_results) begin
        res_word  <= res_data;
        res_valid <= 1'b1;
        res_rec   <= 1'b1;
      end else if (res_rec && !res_req) begin
        res_rec <= 1'b0;
      end
    end
  end
endmodule
