// hif_top: FPGA side of the host-to-experiment test platform.
//
// A host computer writes operands and reads results through three 32-bit
// registers behind a PCI target core. This top holds everything behind that
// core's local side: the interface controller with its input and result
// FIFOs (hif_core, on the PCI clock) and the four experiment backends
// (averager, TEA encoder, 4x4 DCT, CORDIC) on a separate experiment clock.
// exp_sel chooses which backend is connected to the FIFO handshake; it
// stands in for loading a different FPGA configuration, should only change
// while the platform is idle, and should be followed by a system-reset
// command. The backends' reset is the power-on reset or the controller's
// system-reset pulse, asserted asynchronously and released in step with
// exp_clk. The PCI target core itself is not part of this design; its local
// side is brought out as the lt_* ports: hold lt_req (with lt_write,
// lt_addr, lt_wdata) until a one-cycle lt_done or lt_abort; lt_rdata is
// valid with lt_done of a read. With lt_burst also held, a data write or
// result read moves one word per clock with lt_done until lt_req drops or
// the FIFO boundary ends it with lt_disc (see hif_ctrl).
module hif_top
  import hif_pkg::*;
(
  input  logic        pci_clk,
  input  logic        exp_clk,
  input  logic        rst_n,
  input  logic        lt_req,
  input  logic        lt_write,
  input  logic        lt_burst,
  input  logic [1:0]  lt_addr,
  input  logic [31:0] lt_wdata,
  output logic [31:0] lt_rdata,
  output logic        lt_done,
  output logic        lt_abort,
  output logic        lt_disc,
  input  logic [1:0]  exp_sel,
  // status, for observation
  output logic        in_full,
  output logic        in_empty,
  output logic        res_full,
  output logic        res_empty,
  output logic        exp_busy
);
  localparam int NEXP = 4;

  logic  in_rdy, in_rec, in_req, res_rdy, res_rec, res_req;
  word_t in_data, res_data;
  logic  design_reset, exp_rst_n;

  logic  b_in_req  [NEXP];
  logic  b_res_req [NEXP];
  word_t b_res_data[NEXP];
  logic  b_busy    [NEXP];

  hif_core u_core (
    .clk(pci_clk), .rst_n(rst_n),
    .lt_req(lt_req), .lt_write(lt_write), .lt_burst(lt_burst), .lt_addr(reg_addr_e'(lt_addr)),
    .lt_wdata(lt_wdata), .lt_rdata(lt_rdata),
    .lt_done(lt_done), .lt_abort(lt_abort), .lt_disc(lt_disc),
    .exp_in_rdy(in_rdy), .exp_in_rec(in_rec), .exp_in_req(in_req), .exp_in_data(in_data),
    .exp_res_rdy(res_rdy), .exp_res_rec(res_rec), .exp_res_req(res_req),
    .exp_res_data(res_data),
    .design_reset(design_reset),
    .in_full(in_full), .in_empty(in_empty), .res_full(res_full), .res_empty(res_empty)
  );

  hif_rst_sync u_exp_rst (
    .clk(exp_clk), .arst_n(rst_n && !design_reset), .rst_n(exp_rst_n)
  );

  // Only the selected backend sees ready / received.
  function automatic logic sel_gate(input logic s, input int k, input logic [1:0] sel);
    return s && (sel == 2'(k));
  endfunction

  avg_backend u_avg (
    .clk(exp_clk), .rst_n(exp_rst_n),
    .in_rdy(sel_gate(in_rdy, 0, exp_sel)), .in_rec(sel_gate(in_rec, 0, exp_sel)),
    .in_req(b_in_req[0]), .in_data(in_data),
    .res_rdy(sel_gate(res_rdy, 0, exp_sel)), .res_rec(sel_gate(res_rec, 0, exp_sel)),
    .res_req(b_res_req[0]), .res_data(b_res_data[0])
  );
  assign b_busy[0] = 1'b0;

  tea_backend u_tea (
    .clk(exp_clk), .rst_n(exp_rst_n),
    .in_rdy(sel_gate(in_rdy, 1, exp_sel)), .in_rec(sel_gate(in_rec, 1, exp_sel)),
    .in_req(b_in_req[1]), .in_data(in_data),
    .res_rdy(sel_gate(res_rdy, 1, exp_sel)), .res_rec(sel_gate(res_rec, 1, exp_sel)),
    .res_req(b_res_req[1]), .res_data(b_res_data[1]), .busy(b_busy[1])
  );

  dct_backend u_dct (
    .clk(exp_clk), .rst_n(exp_rst_n),
    .in_rdy(sel_gate(in_rdy, 2, exp_sel)), .in_rec(sel_gate(in_rec, 2, exp_sel)),
    .in_req(b_in_req[2]), .in_data(in_data),
    .res_rdy(sel_gate(res_rdy, 2, exp_sel)), .res_rec(sel_gate(res_rec, 2, exp_sel)),
    .res_req(b_res_req[2]), .res_data(b_res_data[2]), .busy(b_busy[2])
  );

  cordic_backend u_cordic (
    .clk(exp_clk), .rst_n(exp_rst_n),
    .in_rdy(sel_gate(in_rdy, 3, exp_sel)), .in_rec(sel_gate(in_rec, 3, exp_sel)),
    .in_req(b_in_req[3]), .in_data(in_data),
    .res_rdy(sel_gate(res_rdy, 3, exp_sel)), .res_rec(sel_gate(res_rec, 3, exp_sel)),
    .res_req(b_res_req[3]), .res_data(b_res_data[3]), .busy(b_busy[3])
  );

  assign in_req   = b_in_req[exp_sel];
  assign res_req  = b_res_req[exp_sel];
  assign res_data = b_res_data[exp_sel];
  assign exp_busy = b_busy[exp_sel];
endmodule
