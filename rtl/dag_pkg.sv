// dag_pkg: types and constants shared by the destination address generator.
//
// The generator advances a DMA destination address by one of four fixed step
// sizes, chosen by a 2-bit code (00 -> 1, 01 -> 2, 10 -> 4, 11 -> 8).  The
// code-to-size mapping follows the description of the low-power generator;
// the 32-bit address width is the width of its address ports.  The enum names
// and the 4-bit step width are this design's own choices: 4 bits is the
// narrowest width that holds the largest step, 8.
package dag_pkg;

  localparam int unsigned ADDR_W_DEFAULT = 32;
  localparam int unsigned STEP_W         = 4;

  typedef enum logic [1:0] {
    STEP_1 = 2'b00,
    STEP_2 = 2'b01,
    STEP_4 = 2'b10,
    STEP_8 = 2'b11
  } step_code_e;

endpackage
