// Test of the output register: reset to 0, capture on load only, hold otherwise, and a
// one-cycle q_valid after each load.
module tb_fp_output_reg;
  localparam int unsigned N = fuzzy_pkg::N_DEF;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic [N-1:0] d = '0, q;
  logic q_valid;

  fp_output_reg dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [N-1:0] model = '0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      bit l;
      l = ($urandom_range(0, 2) == 0);
      load = l; d = N'($urandom);
      @(negedge clk);
      if (l) model = d;
      checks++;
      if (q != model || q_valid != l) begin
        failures++;
        $display("FAIL t=%0d q=%0d expected %0d valid=%0b", t, q, model, q_valid);
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
