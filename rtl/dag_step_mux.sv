// dag_step_mux: 4:1 multiplexer that turns the 2-bit step code into a step size.
//
// The four data inputs are the constants 1, 2, 4 and 8; step_i is the select
// line.  Using the narrow code as a mux select, rather than passing a full
// 32-bit step word to the adder, is the central saving of the low-power
// generator.  Purely combinational; step_o follows step_i in the same cycle.
//
// Interface:  step_i  2-bit code, 00=1 01=2 10=4 11=8
//             step_o  4-bit step size (width chosen here: smallest that holds 8)
module dag_step_mux
  import dag_pkg::*;
(
  input  step_code_e        step_i,
  output logic [STEP_W-1:0] step_o
);

  // The four mux inputs, indexed by the select code.
  localparam logic [STEP_W-1:0] STEP_TABLE [4] = '{4'd1, 4'd2, 4'd4, 4'd8};

  always_comb begin
    step_o = STEP_TABLE[step_i];
  end

endmodule
