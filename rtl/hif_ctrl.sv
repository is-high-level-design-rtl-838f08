// hif_ctrl: the simplified communications controller of the host interface.
//
// It serves two kinds of request, one at a time, from a central Ready state:
//   * a register access from the PCI target core's local side (lt_*), and
//   * a handshake request from the experiment backend (input word wanted, or
//     result word offered).
// PCI requests win when both are pending. Each request goes through a
// "request" state, where it is checked, and a "service" state, where the
// FIFO strobes and handshake lines are driven; a one-cycle wait state then
// returns to Ready. A data write or result read may also be a burst
// (lt_burst held with lt_req): the controller then stays in a burst state
// and moves one word on every clock in which lt_done is high, until the host
// drops lt_req (normal end) or the FIFO fills or empties, which ends the
// burst with a one-cycle lt_disc (target disconnect).
// This state structure (Ready, PCI Request, Experiment Request, Service
// Request), the PCI priority, the abort rules and the four control commands follow the original controller, as do burst transfers
// with a disconnect at a FIFO boundary; the local-side signal set is a
// simplified one of this design's own (level request held until a
// one-cycle lt_done or lt_abort, lt_burst standing for the PCI core's
// burst-transaction status bit, lt_disc for its disconnect request).
//
// PCI side
//   write REG_DATA_IN : aborted if the input FIFO is full, else pushed.
//   read  REG_RESULT  : aborted with NULL_WORD if the result FIFO is empty,
//                       else returns the FIFO's read register and pops, so
//                       each read returns the word popped by the read before
//                       it (a zero after reset); CMD_FINAL_POP pushes a
//                       padding word so the last real result can be read.
//   write REG_CONTROL : CMD_* in bits [1:0]; CMD_SYSTEM_RESET also raises
//                       design_reset for one cycle.
//   anything else     : aborted.
//   burst of data writes or result reads: checked as above for the first
//   word; then, while lt_req stays high, one word per clock with lt_done
//   (a write takes lt_wdata, a read gives lt_rdata and pops), and lt_disc
//   instead when the input FIFO is full or the result FIFO is empty.
//   lt_burst is ignored for control writes.
// Experiment side (signals already synchronised into this clock domain)
//   in_rdy  = input FIFO not empty;   res_rdy = result FIFO not full.
//   in_req  seen with in_rdy : pop, then hold in_rec until in_req drops.
//   res_req seen with res_rdy: push res bus, then hold res_rec until res_req
//   drops. The received line rises in the cycle the input word appears on
//   the FIFO's read port, so data is valid whenever in_rec is high.
// design_reset is registered (glitch free) because it resets another clock
// domain asynchronously.
module hif_ctrl
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
  // input FIFO
  output logic      in_push,
  output logic      in_pop,
  output logic      in_flush,
  input  logic      in_full,
  input  logic      in_empty,
  // result FIFO
  output logic      res_push,
  output logic      res_pop,
  output logic      res_flush,
  input  logic      res_full,
  input  logic      res_empty,
  input  word_t     res_q,
  // experiment handshake (requests synchronised)
  input  logic      in_req,
  output logic      in_rdy,
  output logic      in_rec,
  input  logic      res_req,
  output logic      res_rdy,
  output logic      res_rec,
  output logic      design_reset
);

  typedef enum logic [2:0] {
    S_READY,
    S_PCI_REQ,
    S_PCI_SVC,
    S_PCI_BURST,
    S_EXP_REQ,
    S_EXP_SVC,
    S_WAIT
  } state_e;

  state_e    state;
  logic      exp_is_input;   // experiment request being served is an input one
  logic      pci_ok;         // PCI request passed its checks
  logic      is_burst;       // data write or result read asked as a burst
  logic      burst_room;     // the burst may move a word this cycle
  ctrl_cmd_e cmd;

  assign cmd     = ctrl_cmd_e'(lt_wdata[1:0]);
  assign in_rdy  = !in_empty;
  assign res_rdy = !res_full;

  assign is_burst   = lt_burst && lt_addr != REG_CONTROL;
  assign burst_room = lt_write ? !in_full : !res_empty;

  // Checks done in the PCI Request state.
  always_comb begin
    pci_ok = 1'b0;
    if (lt_write && lt_addr == REG_DATA_IN)   pci_ok = !in_full;
    else if (lt_write && lt_addr == REG_CONTROL) pci_ok = 1'b1;
    else if (!lt_write && lt_addr == REG_RESULT) pci_ok = !res_empty;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_READY;
      exp_is_input <= 1'b0;
      design_reset <= 1'b1;
    end else begin
      design_reset <= 1'b0;
      unique case (state)
        S_READY: begin
          if (lt_req) begin
            state <= S_PCI_REQ;
          end else if (in_rdy && in_req) begin
            state        <= S_EXP_REQ;
            exp_is_input <= 1'b1;
          end else if (res_rdy && res_req) begin
            state        <= S_EXP_REQ;
            exp_is_input <= 1'b0;
          end
        end
        S_PCI_REQ: state <= !pci_ok ? S_WAIT : is_burst ? S_PCI_BURST : S_PCI_SVC;
        S_PCI_BURST: if (!lt_req || !burst_room) state <= S_WAIT;
        S_PCI_SVC: begin
          state <= S_WAIT;
          if (lt_write && lt_addr == REG_CONTROL && cmd == CMD_SYSTEM_RESET)
            design_reset <= 1'b1;
        end
        S_EXP_REQ: state <= S_EXP_SVC;
        S_EXP_SVC: begin
          if (exp_is_input ? !in_req : !res_req) state <= S_WAIT;
        end
        S_WAIT:  state <= S_READY;
        default: state <= S_READY;
      endcase
    end
  end

  // Strobes, decoded from the state.
  always_comb begin
    in_push   = 1'b0;
    in_pop    = 1'b0;
    in_flush  = 1'b0;
    res_push  = 1'b0;
    res_pop   = 1'b0;
    res_flush = 1'b0;
    lt_done   = 1'b0;
    lt_abort  = 1'b0;
    lt_disc   = 1'b0;
    lt_rdata  = NULL_WORD;
    unique case (state)
      S_PCI_REQ: lt_abort = !pci_ok;
      S_PCI_SVC: begin
        lt_done = 1'b1;
        if (lt_write && lt_addr == REG_DATA_IN) begin
          in_push = 1'b1;
        end else if (lt_write && lt_addr == REG_CONTROL) begin
          unique case (cmd)
            CMD_FINAL_POP:    res_push  = 1'b1;
            CMD_RESULT_FLUSH: res_flush = 1'b1;
            CMD_INPUT_FLUSH:  in_flush  = 1'b1;
            CMD_SYSTEM_RESET: begin
              in_flush  = 1'b1;
              res_flush = 1'b1;
            end
          endcase
        end else begin
          lt_rdata = res_q;
          res_pop  = 1'b1;
        end
      end
      S_PCI_BURST: begin
        if (lt_req && !burst_room) begin
          lt_disc = 1'b1;
        end else if (lt_req) begin
          lt_done = 1'b1;
          if (lt_write) begin
            in_push = 1'b1;
          end else begin
            lt_rdata = res_q;
            res_pop  = 1'b1;
          end
        end
      end
      S_EXP_REQ: begin
        in_pop   = exp_is_input;
        res_push = !exp_is_input;
      end
      default: ;
    endcase
  end

  assign in_rec  = (state == S_EXP_SVC) &&  exp_is_input;
  assign res_rec = (state == S_EXP_SVC) && !exp_is_input;

  // A request line may only be served while its ready line is high.
  a_pop_ok:  assert property (@(posedge clk) disable iff (!rst_n) in_pop |-> !in_empty);
  a_push_ok: assert property (@(posedge clk) disable iff (!rst_n)
                              (res_push && state == S_EXP_REQ) |-> !res_full);
endmodule
