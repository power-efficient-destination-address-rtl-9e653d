// tb_dest_addr_gen: end-to-end test of the destination address generator,
// with every parameter at its default (32-bit addresses).
//
// Part 1 replays the reference waveform: load 9 with step 1 -> 10, continue
// 11, 12, 13, 14, enable low holds 14 while the other inputs change, load
// 1522275410 with step 1 -> 1522275411, then continue with step code 11 (+8).
// Part 2 drives random controls against a reference model that computes
// (setaddr ? addr_i : addr_o) + 2**step with the + operator.  Every check is
// taken one time unit after the rising edge that samples the inputs, so it
// also checks the one-cycle latency.  The test counts how often each
// mechanism occurred (load, continue, hold, each step size, address wrap)
// and fails if one never did.
module tb_dest_addr_gen;
  import dag_pkg::*;

  localparam int unsigned W = ADDR_W_DEFAULT;

  logic         clk = 1'b0, rst_n = 1'b1;
  step_code_e   step = STEP_1;
  logic         en = 1'b0, setaddr = 1'b0;
  logic [W-1:0] addr_in = '0, addr_out, model = '0;

  int checks = 0, failures = 0;
  int n_load = 0, n_cont = 0, n_hold = 0, n_wrap = 0;
  int n_step [4] = '{0, 0, 0, 0};

  dest_addr_gen dut (
    .clk_i(clk), .rst_ni(rst_n), .step_i(step), .enable_i(en),
    .setaddr_i(setaddr), .addr_i(addr_in), .addr_o(addr_out)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply one cycle of inputs, update the model, check the output after the edge.
  task automatic cycle(input logic e, input logic s, input step_code_e st,
                       input logic [W-1:0] a, input logic [W-1:0] expect_doc,
                       input bit use_doc);
    logic [W-1:0] base;
    @(negedge clk);
    en = e; setaddr = s; step = st; addr_in = a;
    if (e) begin
      base = s ? a : model;
      if (s) n_load++; else n_cont++;
      n_step[st]++;
      if ({1'b0, base} + (W + 1)'(1 << st) > {1'b0, {W{1'b1}}}) n_wrap++;
      model = base + W'(1 << st);
    end else begin
      n_hold++;
    end
    @(posedge clk); #1;
    checks++;
    if (addr_out !== model || (use_doc && addr_out !== expect_doc)) begin
      failures++;
      $display("FAIL en=%0b set=%0b step=%0d addr_i=%0d addr_o=%0d model=%0d doc=%0d",
               e, s, st, a, addr_out, model, expect_doc);
    end
  endtask

  initial begin
    // reset
    #1 rst_n = 1'b0;
    #1;
    checks++;
    if (addr_out !== '0) begin failures++; $display("FAIL reset addr_o=%0d", addr_out); end
    @(negedge clk); rst_n = 1'b1;

    // Part 1: reference waveform
    cycle(1, 1, STEP_1, 9, 10, 1);
    cycle(1, 0, STEP_1, 9, 11, 1);
    cycle(1, 0, STEP_1, 9, 12, 1);
    cycle(1, 0, STEP_1, 9, 13, 1);
    cycle(1, 0, STEP_1, 9, 14, 1);
    cycle(0, 1, STEP_8, 1522275410, 14, 1);
    cycle(0, 0, STEP_4, 77, 14, 1);
    cycle(1, 1, STEP_1, 1522275410, 1522275411, 1);
    cycle(1, 0, STEP_8, 1522275410, 1522275419, 1);

    // wrap at the top of the address space
    cycle(1, 1, STEP_8, 32'hFFFF_FFFC, 32'h0000_0004, 1);
    cycle(1, 1, STEP_1, 32'hFFFF_FFFE, 32'hFFFF_FFFF, 1);
    cycle(1, 0, STEP_2, 0, 32'h0000_0001, 1);

    // Part 2: random traffic, biased towards runs of continues
    for (int n = 0; n < 5000; n++) begin
      logic [W-1:0] a;
      a = ($urandom_range(0, 7) == 0) ? (32'hFFFF_FFFF - 32'($urandom_range(0, 20))) : $urandom;
      cycle($urandom_range(0, 4) != 0, $urandom_range(0, 9) == 0,
            step_code_e'($urandom_range(0, 3)), a, '0, 0);
    end

    // reset in the middle of a run
    @(negedge clk); en = 1'b0; rst_n = 1'b0; model = '0; #1;
    checks++;
    if (addr_out !== '0) begin failures++; $display("FAIL async reset addr_o=%0d", addr_out); end
    @(negedge clk); rst_n = 1'b1;
    cycle(1, 0, STEP_4, 123, 4, 1);

    $display("mechanisms: load=%0d continue=%0d hold=%0d wrap=%0d step1=%0d step2=%0d step4=%0d step8=%0d",
             n_load, n_cont, n_hold, n_wrap, n_step[0], n_step[1], n_step[2], n_step[3]);
    checks++;
    if (n_load == 0 || n_cont == 0 || n_hold == 0 || n_wrap == 0 ||
        n_step[0] == 0 || n_step[1] == 0 || n_step[2] == 0 || n_step[3] == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
