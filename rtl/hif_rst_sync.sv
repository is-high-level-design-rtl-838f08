// hif_rst_sync: reset bridge for the experiment clock domain. The reset is
// asserted asynchronously as soon as arst_n goes low (power-on reset or the
// controller's one-cycle backend reset pulse) and released synchronously,
// STAGES edges of clk after arst_n returns high.
module hif_rst_sync #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic arst_n,
  output logic rst_n
);
  logic [STAGES-1:0] chain;

  always_ff @(posedge clk or negedge arst_n) begin
    if (!arst_n) chain <= '0;
    else         chain <= {chain[STAGES-2:0], 1'b1};
  end

  assign rst_n = chain[STAGES-1];
endmodule
