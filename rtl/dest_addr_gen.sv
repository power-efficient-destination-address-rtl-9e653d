// dest_addr_gen: low-power destination address generator of a DMA controller.
//
// Each clock edge on which enable_i is high produces the next destination
// address:
//     addr_o <= (setaddr_i ? addr_i : addr_o) + STEP[step_i],  STEP = {1,2,4,8}
// setaddr_i high starts a new run at addr_i (the first address out is then
// addr_i plus the step); setaddr_i low continues from the last address.  With
// enable_i low addr_o holds.  There is no word counter: the controller's FSM
// decides when a transfer ends.
//
// Structure, as in the low-power design: a 4:1 mux turns the 2-bit step code
// into the step size, a 2:1 mux picks the base address, a reduced adder adds
// them, and an enabled D flip-flop register holds addr_o.  The inner
// structure of the adder (full adders on the step bits, half adders above)
// and the asynchronous reset rst_ni are this design's choices.
//
// Interface:  clk_i, rst_ni (async, active low, clears addr_o)
//             step_i    2-bit step code   enable_i   generator enable
//             setaddr_i base select       addr_i     ADDR_W-bit start address
//             addr_o    ADDR_W-bit registered destination address
// Timing:     one cycle: inputs sampled at a rising edge, addr_o valid after it.
module dest_addr_gen
  import dag_pkg::*;
#(
  parameter int unsigned ADDR_W = ADDR_W_DEFAULT
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  input  step_code_e        step_i,
  input  logic              enable_i,
  input  logic              setaddr_i,
  input  logic [ADDR_W-1:0] addr_i,
  output logic [ADDR_W-1:0] addr_o
);

  logic [STEP_W-1:0] step_size_w;
  logic [ADDR_W-1:0] base_w;
  logic [ADDR_W-1:0] next_w;

  dag_step_mux u_step_mux (
    .step_i (step_i),
    .step_o (step_size_w)
  );

  dag_addr_mux #(.ADDR_W(ADDR_W)) u_addr_mux (
    .setaddr_i  (setaddr_i),
    .addr_i     (addr_i),
    .cur_addr_i (addr_o),
    .base_o     (base_w)
  );

  dag_step_adder #(.ADDR_W(ADDR_W), .STEP_W(STEP_W)) u_adder (
    .base_i (base_w),
    .step_i (step_size_w),
    .sum_o  (next_w)
  );

  dag_addr_reg #(.ADDR_W(ADDR_W)) u_addr_reg (
    .clk_i    (clk_i),
    .rst_ni   (rst_ni),
    .enable_i (enable_i),
    .d_i      (next_w),
    .q_o      (addr_o)
  );

endmodule
