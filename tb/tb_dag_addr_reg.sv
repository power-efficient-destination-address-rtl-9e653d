// tb_dag_addr_reg: checks the enabled address register.
// Checks reset to 0, a load one clock edge after enable is seen high, and
// hold while enable is low, against a model register kept here.
module tb_dag_addr_reg;
  localparam int unsigned W = 32;

  logic         clk = 1'b0, rst_n = 1'b1, en = 1'b0;
  logic [W-1:0] d = '0, q, model;
  int checks = 0, failures = 0, loads = 0, holds = 0;

  dag_addr_reg #(.ADDR_W(W)) dut (.clk_i(clk), .rst_ni(rst_n), .enable_i(en), .d_i(d), .q_o(q));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 32'hDEAD_BEEF;
    #1 rst_n = 1'b0;
    #1;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset q=%h", q); end
    model = '0;
    @(negedge clk); rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      en = ($urandom_range(0, 2) != 0);
      d  = $urandom;
      if (en) begin model = d; loads++; end else holds++;
      @(posedge clk); #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL en=%0b d=%h q=%h expected=%h", en, d, q, model);
      end
    end
    checks++;
    if (loads == 0 || holds == 0) begin failures++; $display("FAIL no load or no hold"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
