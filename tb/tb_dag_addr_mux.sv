// tb_dag_addr_mux: random check of the base-address multiplexer at 32 bits.
// For random addresses and select values, base_o must equal addr_i when
// setaddr_i is high and cur_addr_i when it is low.
module tb_dag_addr_mux;
  localparam int unsigned W = 32;

  logic         sel;
  logic [W-1:0] a, c, base;
  int checks = 0, failures = 0;

  dag_addr_mux #(.ADDR_W(W)) dut (.setaddr_i(sel), .addr_i(a), .cur_addr_i(c), .base_o(base));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      a   = $urandom;
      c   = $urandom;
      sel = n[0] ^ $urandom_range(0, 1);
      #1;
      checks++;
      if (base !== (sel ? a : c)) begin
        failures++;
        $display("FAIL sel=%0b a=%h c=%h base=%h", sel, a, c, base);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
