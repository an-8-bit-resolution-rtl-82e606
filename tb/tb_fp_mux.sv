// Test of the score multiplexer: random score sets, every select value checked, and an
// out-of-range select (if the select is wider than needed) must give 0.
module tb_fp_mux;
  localparam int unsigned N = fuzzy_pkg::N_DEF;
  localparam int unsigned K = fuzzy_pkg::K_DEF;
  localparam int unsigned KW = $clog2(K);
  logic [N-1:0] din [K];
  logic [KW-1:0] sel = '0;
  logic [N-1:0] dout;

  fp_mux dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int t = 0; t < 50; t++) begin
      for (int k = 0; k < K; k++) din[k] = N'($urandom);
      for (int k = 0; k < 2**KW; k++) begin
        sel = KW'(k);
        #1;
        checks++;
        if (dout != ((k < K) ? din[k] : '0)) begin
          failures++;
          $display("FAIL sel %0d: %0d", k, dout);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
