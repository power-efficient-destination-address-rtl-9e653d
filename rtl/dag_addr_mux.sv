// dag_addr_mux: 2:1 multiplexer choosing the base address for the adder.
//
// With setaddr_i high the generator starts from the externally supplied
// address addr_i; with setaddr_i low it continues from its own current output
// addr_o, fed back as cur_addr_i.  This select-and-add structure follows the
// description of the generator.  Purely combinational.
//
// Interface:  setaddr_i   select: 1 -> addr_i, 0 -> cur_addr_i
//             addr_i      start address, ADDR_W bits
//             cur_addr_i  current output address, ADDR_W bits
//             base_o      selected base address, ADDR_W bits
module dag_addr_mux #(
  parameter int unsigned ADDR_W = 32
) (
  input  logic              setaddr_i,
  input  logic [ADDR_W-1:0] addr_i,
  input  logic [ADDR_W-1:0] cur_addr_i,
  output logic [ADDR_W-1:0] base_o
);

  always_comb begin
    base_o = setaddr_i ? addr_i : cur_addr_i;
  end

endmodule
