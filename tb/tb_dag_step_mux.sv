// tb_dag_step_mux: exhaustive check of the step-code multiplexer.
// Each of the four codes must give 1, 2, 4 or 8 (2**code), computed here by a
// shift.  The mux is combinational, so each check follows a 1 ns settle delay.
module tb_dag_step_mux;
  import dag_pkg::*;

  step_code_e        step;
  logic [STEP_W-1:0] step_size;
  int checks = 0, failures = 0;

  dag_step_mux dut (.step_i(step), .step_o(step_size));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int code = 0; code < 4; code++) begin
      step = step_code_e'(code);
      #1;
      checks++;
      if (step_size !== STEP_W'(1 << code)) begin
        failures++;
        $display("FAIL code=%0d step=%0d expected=%0d", code, step_size, 1 << code);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
