// Test of the membership-function memory: every word is written with a distinct random
// value and read back through the asynchronous port, in a shuffled order.
module tb_fp_mfm;
  localparam int unsigned N = fuzzy_pkg::N_DEF;
  localparam int unsigned M = fuzzy_pkg::M_DEF;
  localparam int unsigned J = fuzzy_pkg::J_DEF;
  localparam int unsigned AW = $clog2(J) + $clog2(M);
  localparam int unsigned DW = 2 * N + $clog2(N);
  logic clk = 1'b0, we = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [DW-1:0] wdata = '0, rdata;

  fp_mfm dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [DW-1:0] model [2**AW];

  initial begin
    for (int r = 0; r < 2; r++) begin
      for (int k = 0; k < 2**AW; k++) begin
        model[k] = DW'($urandom);
        @(negedge clk);
        we = 1'b1; waddr = AW'(k); wdata = model[k];
      end
      @(negedge clk) we = 1'b0;
      for (int t = 0; t < 2 * 2**AW; t++) begin
        int unsigned k;
        k = $urandom_range(0, 2**AW - 1);
        raddr = AW'(k);
        #1;
        checks++;
        if (rdata != model[k]) begin
          failures++;
          $display("FAIL addr %0d: %h expected %h", k, rdata, model[k]);
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
