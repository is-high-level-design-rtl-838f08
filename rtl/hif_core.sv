// hif_core: the FPGA-side hardware interface between the PCI target core and
// one experiment backend.
//
// It joins the controller FSM (hif_ctrl) with a 16-word input FIFO (host ->
// backend) and a 16-word result FIFO (backend -> host), and synchronises the
// backend's two request lines into the PCI clock domain. Everything here
// runs on the PCI clock. The backend side uses the three-wire handshake per
// direction (ready and received driven here, request driven by the backend)
// plus a 32-bit data bus per direction. exp_in_data is the input FIFO's read
// register and is stable whenever exp_in_rec is high; exp_res_data must be
// held by the backend while exp_res_req is high. Because the backend may run
// on another clock, its request lines pass two flip-flops here, and the
// ready/received lines are synchronised on the backend's side.
//
// The split into two FIFOs and a controller, the handshake and the reset
// options follow the original platform; the synchronisers are this design's
// way of making the two-clock-domain use safe.
module hif_core
  import hif_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  // local side of the PCI target core
  input  logic      lt_req,
  input  logic      lt_write,
  input  logic      lt_burst,
  input  reg_addr_e lt_addr,
  input  word_t     lt_wdata,
  output word_t     lt_rdata,
  output logic      lt_done,
  output logic      lt_abort,
  output logic      lt_disc,
  // experiment input channel
  output logic      exp_in_rdy,
  output logic      exp_in_rec,
  input  logic      exp_in_req,
  output word_t     exp_in_data,
  // experiment result channel
  output logic      exp_res_rdy,
  output logic      exp_res_rec,
  input  logic      exp_res_req,
  input  word_t     exp_res_data,
  // backend reset (one PCI clock, registered)
  output logic      design_reset,
  // status, for observation
  output logic      in_full,
  output logic      in_empty,
  output logic      res_full,
  output logic      res_empty
);
  logic  in_push, in_pop, in_flush;
  logic  res_push, res_pop, res_flush;
  word_t res_q;
  logic  in_req_s, res_req_s;
  logic [$clog2(FIFO_DEPTH+1)-1:0] in_count, res_count;

  hif_sync #(.WIDTH(2)) u_req_sync (
    .clk(clk), .rst_n(rst_n),
    .d({exp_in_req, exp_res_req}),
    .q({in_req_s, res_req_s})
  );

  hif_fifo u_in_fifo (
    .clk(clk), .rst_n(rst_n), .flush(in_flush),
    .push(in_push), .wdata(lt_wdata),
    .pop(in_pop), .rdata(exp_in_data),
    .full(in_full), .empty(in_empty), .count(in_count)
  );

  hif_fifo u_res_fifo (
    .clk(clk), .rst_n(rst_n), .flush(res_flush),
    .push(res_push), .wdata(exp_res_data),
    .pop(res_pop), .rdata(res_q),
    .full(res_full), .empty(res_empty), .count(res_count)
  );

  hif_ctrl u_ctrl (
    .clk(clk), .rst_n(rst_n),
    .lt_req(lt_req), .lt_write(lt_write), .lt_burst(lt_burst), .lt_addr(lt_addr),
    .lt_wdata(lt_wdata), .lt_rdata(lt_rdata),
    .lt_done(lt_done), .lt_abort(lt_abort), .lt_disc(lt_disc),
    .in_push(in_push), .in_pop(in_pop), .in_flush(in_flush),
    .in_full(in_full), .in_empty(in_empty),
    .res_push(res_push), .res_pop(res_pop), .res_flush(res_flush),
    .res_full(res_full), .res_empty(res_empty), .res_q(res_q),
    .in_req(in_req_s), .in_rdy(exp_in_rdy), .in_rec(exp_in_rec),
    .res_req(res_req_s), .res_rdy(exp_res_rdy), .res_rec(exp_res_rec),
    .design_reset(design_reset)
  );
endmodule
