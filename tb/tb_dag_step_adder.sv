// tb_dag_step_adder: checks the reduced adder against the + operator.
// Directed cases cover carries through the full-adder part into the
// half-adder chain and the wrap at 2**32; random cases cover the rest.
module tb_dag_step_adder;
  localparam int unsigned W = 32;
  localparam int unsigned S = 4;

  logic [W-1:0] base, sum;
  logic [S-1:0] step;
  int checks = 0, failures = 0;

  dag_step_adder #(.ADDR_W(W), .STEP_W(S)) dut (.base_i(base), .step_i(step), .sum_o(sum));

  task automatic check(input logic [W-1:0] b, input logic [S-1:0] s);
    logic [W-1:0] expected;
    base = b;
    step = s;
    #1;
    expected = b + W'(s);
    checks++;
    if (sum !== expected) begin
      failures++;
      $display("FAIL %h + %0d = %h, expected %h", b, s, sum, expected);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'd9, 4'd1);
    check(32'h0000_000F, 4'd1);
    check(32'h0000_000F, 4'd8);
    check(32'h7FFF_FFFF, 4'd1);
    check(32'hFFFF_FFFF, 4'd1);
    check(32'hFFFF_FFF8, 4'd8);
    check(32'hFFFF_FFFE, 4'd4);
    check(32'd1522275410, 4'd1);
    for (int s = 0; s < 16; s++) check(32'hFFFF_FFF0 | 32'($urandom_range(0, 15)), S'(s));
    for (int n = 0; n < 500; n++) check($urandom, S'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
