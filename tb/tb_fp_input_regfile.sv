// Test of the input register file: reset value, writes to every register, read-back in
// random order, and that a write changes only its own register.
module tb_fp_input_regfile;
  localparam int unsigned N = fuzzy_pkg::N_DEF;
  localparam int unsigned J = fuzzy_pkg::J_DEF;
  localparam int unsigned JW = $clog2(J);
  logic clk = 1'b0, rst_n = 1'b0, we = 1'b0;
  logic [JW-1:0] waddr = '0, raddr = '0;
  logic [N-1:0] wdata = '0, rdata;

  fp_input_regfile dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [N-1:0] model [J];

  task automatic check_all();
    for (int j = 0; j < J; j++) begin
      raddr = JW'(j);
      #1;
      checks++;
      if (rdata != model[j]) begin
        failures++;
        $display("FAIL reg %0d: %0d expected %0d", j, rdata, model[j]);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int j = 0; j < J; j++) model[j] = '0;
    check_all();
    for (int t = 0; t < 200; t++) begin
      int unsigned j;
      j = $urandom_range(0, J - 1);
      @(negedge clk);
      we = 1'b1; waddr = JW'(j); wdata = N'($urandom); model[j] = wdata;
      @(negedge clk);
      we = 1'b0; wdata = N'($urandom);
      check_all();
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
