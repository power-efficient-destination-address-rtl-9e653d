// tb_dest_addr_gen_widths: runs the generator at the 8-, 16- and 32-bit
// address widths compared in the synthesis results, side by side on the same
// random control stream.  Each instance is checked every cycle against its
// own reference model, (setaddr ? addr_i : addr_o) + 2**step modulo 2**W, so
// the wrap at the top of each narrower address space is exercised.  Wraps are
// counted per width, and a width that never wraps counts as a failure.
module tb_dest_addr_gen_widths;
  import dag_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b1;
  step_code_e  step = STEP_1;
  logic        en = 1'b0, setaddr = 1'b0;
  logic [31:0] addr_in = '0;

  logic [7:0]  out8,  model8  = '0;
  logic [15:0] out16, model16 = '0;
  logic [31:0] out32, model32 = '0;

  int checks = 0, failures = 0;
  int wraps8 = 0, wraps16 = 0, wraps32 = 0;

  dest_addr_gen #(.ADDR_W(8)) dut8 (
    .clk_i(clk), .rst_ni(rst_n), .step_i(step), .enable_i(en),
    .setaddr_i(setaddr), .addr_i(addr_in[7:0]), .addr_o(out8));
  dest_addr_gen #(.ADDR_W(16)) dut16 (
    .clk_i(clk), .rst_ni(rst_n), .step_i(step), .enable_i(en),
    .setaddr_i(setaddr), .addr_i(addr_in[15:0]), .addr_o(out16));
  dest_addr_gen #(.ADDR_W(32)) dut32 (
    .clk_i(clk), .rst_ni(rst_n), .step_i(step), .enable_i(en),
    .setaddr_i(setaddr), .addr_i(addr_in), .addr_o(out32));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [32:0] b8, b16, b32;
    #1 rst_n = 1'b0;
    #1 rst_n = 1'b1;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      en      = ($urandom_range(0, 5) != 0);
      setaddr = ($urandom_range(0, 49) == 0);
      step    = step_code_e'($urandom_range(0, 3));
      addr_in = ($urandom_range(0, 3) == 0) ? 32'hFFFF_FFF0 | 32'($urandom_range(0, 15)) : $urandom;
      if (en) begin
        b8  = 33'(setaddr ? addr_in[7:0]  : model8)  + 33'(1 << step);
        b16 = 33'(setaddr ? addr_in[15:0] : model16) + 33'(1 << step);
        b32 = 33'(setaddr ? addr_in       : model32) + 33'(1 << step);
        if (b8[8])   wraps8++;
        if (b16[16]) wraps16++;
        if (b32[32]) wraps32++;
        model8  = b8[7:0];
        model16 = b16[15:0];
        model32 = b32[31:0];
      end
      @(posedge clk); #1;
      checks += 3;
      if (out8 !== model8)   begin failures++; $display("FAIL 8-bit  %h expected %h", out8, model8); end
      if (out16 !== model16) begin failures++; $display("FAIL 16-bit %h expected %h", out16, model16); end
      if (out32 !== model32) begin failures++; $display("FAIL 32-bit %h expected %h", out32, model32); end
    end
    $display("wraps: 8-bit=%0d 16-bit=%0d 32-bit=%0d", wraps8, wraps16, wraps32);
    checks++;
    if (wraps8 == 0 || wraps16 == 0 || wraps32 == 0) begin
      failures++;
      $display("FAIL a width never wrapped");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
