// Self-checking testbench for result_register: for every op/count pair and
// random sums and products, the loaded value must be sum / count (integer
// division) for an average with count 2..32 a power of two, else the product;
// RESULT must hold while result_en is low.
module tb_result_register;
  logic clk = 1'b0, rst, result_en, op;
  logic [4:0] num_dati;
  logic [15:0] acc, prodotto, result;
  int checks = 0, failures = 0;
  int expv, n;

  result_register dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; result_en = 1'b0; op = 1'b0; num_dati = '0; acc = '0; prodotto = '0;
    @(posedge clk); expv = 0; #1;
    rst = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      op        = (i % 64) >= 32;
      num_dati  = 5'(i % 32);
      acc       = 16'($urandom_range(0, 8160));
      prodotto  = 16'($urandom);
      result_en = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (result_en) begin
        n = (num_dati == 0) ? 32 : int'(num_dati);
        if (!op && n inside {2, 4, 8, 16, 32}) expv = int'(acc) / n;
        else                                   expv = int'(prodotto);
      end
      #1;
      checks++;
      if (result !== 16'(expv)) begin
        failures++;
        $display("op=%b num=%0d acc=%0d prod=%0d en=%b: got %0d exp %0d", op, num_dati, acc,
                 prodotto, result_en, result, expv);
      end
    end
    rst = 1'b1; @(posedge clk); #1;
    checks++;
    if (result !== '0) begin failures++; $display("reset: got %0d", result); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
