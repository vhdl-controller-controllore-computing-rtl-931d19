// Self-checking testbench for cycle_counter: cicli4 must rise on exactly the
// fourth enabled cycle after a clear and every fourth one after that, under
// random enable and clear patterns.
module tb_cycle_counter;
  logic clk = 1'b0, rst, clr, en, cicli4;
  int checks = 0, failures = 0;
  int enabled;   // enabled cycles since the last clear

  cycle_counter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; clr = 1'b0; en = 1'b0;
    @(posedge clk); enabled = 0; #1;
    // Directed: four enabled cycles after a clear.
    rst = 1'b0; en = 1'b1;
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (cicli4 !== (k % 4 == 3)) begin
        failures++;
        $display("directed: cycle %0d cicli4=%b", k, cicli4);
      end
      @(posedge clk); enabled++; #1;
    end
    clr = 1'b1; @(posedge clk); enabled = 0; #1;
    for (int i = 0; i < 2000; i++) begin
      rst = ($urandom_range(0, 63) == 0);
      clr = ($urandom_range(0, 9) == 0);
      en  = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (rst || clr) enabled = 0;
      else if (en)    enabled++;
      #1;
      checks++;
      if (cicli4 !== (enabled % 4 == 3)) begin
        failures++;
        $display("random %0d: enabled=%0d cicli4=%b", i, enabled, cicli4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
