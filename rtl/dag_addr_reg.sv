// dag_addr_reg: enabled D flip-flop register that holds the output address.
//
// On a rising clk_i edge with enable_i high the register takes d_i; with
// enable_i low it keeps its value whatever the other inputs do.  This is the
// D flip-flop that enables the generator in the low-power design.  The
// asynchronous active-low reset to address 0 is this design's addition: the
// generator as described has no reset input.
//
// Interface:  clk_i, rst_ni, enable_i, d_i (ADDR_W), q_o (ADDR_W)
// Timing:     q_o changes one clock edge after enable_i is seen high.
//             An assertion checks that q_o holds while enable_i is low.
module dag_addr_reg #(
  parameter int unsigned ADDR_W = 32
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  input  logic              enable_i,
  input  logic [ADDR_W-1:0] d_i,
  output logic [ADDR_W-1:0] q_o
);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      q_o <= '0;
    end else if (enable_i) begin
      q_o <= d_i;
    end
  end

  // While the generator is disabled the address must not move.
  a_hold_when_disabled: assert property (
    @(posedge clk_i) disable iff (!rst_ni) !enable_i |=> $stable(q_o)
  ) else $error("dag_addr_reg: q_o changed while enable_i was low");

endmodule
