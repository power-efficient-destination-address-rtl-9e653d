// dag_step_adder: reduced adder that adds a short step size to a wide address.
//
// The low-power generator replaces a general ADDR_W + ADDR_W adder by a
// dedicated addition routine; how that routine is built is not described, so
// this design uses the structure that the operands allow.  The step operand
// is only STEP_W bits wide, so:
//   * bits [STEP_W-1:0] use a ripple chain of full adders (base bit, step bit,
//     carry);
//   * bits [ADDR_W-1:STEP_W] have no second operand and use a chain of half
//     adders that only propagate the carry out of the low part (an
//     incrementer).
// That is STEP_W full adders and ADDR_W-STEP_W half adders instead of ADDR_W
// full adders.  The sum wraps modulo 2**ADDR_W; no carry out is produced,
// as the generator has none.  Purely combinational.
//
// Interface:  base_i  ADDR_W-bit base address
//             step_i  STEP_W-bit step size
//             sum_o   base_i + step_i, ADDR_W bits
module dag_step_adder #(
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned STEP_W = 4
) (
  input  logic [ADDR_W-1:0] base_i,
  input  logic [STEP_W-1:0] step_i,
  output logic [ADDR_W-1:0] sum_o
);

  // carry[i] is the carry into bit i.
  logic [ADDR_W:0] carry;

  assign carry[0] = 1'b0;

  for (genvar i = 0; i < ADDR_W; i++) begin : g_bit
    if (i < STEP_W) begin : g_full
      assign sum_o[i]     = base_i[i] ^ step_i[i] ^ carry[i];
      assign carry[i + 1] = (base_i[i] & step_i[i]) | (carry[i] & (base_i[i] ^ step_i[i]));
    end else begin : g_half
      assign sum_o[i]     = base_i[i] ^ carry[i];
      assign carry[i + 1] = base_i[i] & carry[i];
    end
  end

  // The final carry out is dropped: the address wraps.
  logic unused_carry;
  assign unused_carry = carry[ADDR_W];

  initial begin
    assert (ADDR_W > STEP_W)
      else $error("dag_step_adder: ADDR_W (%0d) must exceed STEP_W (%0d)", ADDR_W, STEP_W);
  end

endmodule
