// Self-checking testbench for data_counter: random sample strobes, clears and
// counts; the count must equal the strobes seen since the last clear, modulo
// 32, and all_data must flag equality with num_dati (0 after 32 strobes).
module tb_data_counter;
  logic clk = 1'b0, rst, clr, campiona, all_data;
  logic [4:0] num_dati, count;
  int checks = 0, failures = 0;
  int seen;

  data_counter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (count !== 5'(seen % 32) || all_data !== (5'(seen % 32) == num_dati)) begin
      failures++;
      $display("%s: seen=%0d count=%0d num=%0d all_data=%b", what, seen, count, num_dati,
               all_data);
    end
  endtask

  initial begin
    rst = 1'b1; clr = 1'b0; campiona = 1'b0; num_dati = '0;
    @(posedge clk); seen = 0; #1;
    rst = 1'b0;
    // Directed: 32 strobes with num_dati = 0 end on all_data.
    for (int k = 0; k < 32; k++) begin
      campiona = 1'b1; @(posedge clk); seen++; #1; check("wrap");
    end
    campiona = 1'b0;
    for (int i = 0; i < 4000; i++) begin
      rst      = ($urandom_range(0, 99) == 0);
      clr      = ($urandom_range(0, 39) == 0);
      campiona = 1'($urandom_range(0, 1));
      if ($urandom_range(0, 15) == 0) num_dati = 5'($urandom);
      @(posedge clk);
      if (rst || clr)    seen = 0;
      else if (campiona) seen++;
      #1;
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
