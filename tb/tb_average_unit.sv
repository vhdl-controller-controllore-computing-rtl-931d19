// Self-checking testbench for average_unit: the sum must track the data
// present at the sample strobes, and clear on reset, on result_en and while
// op is high; includes 32 samples of 255, the largest sum the design needs.
module tb_average_unit;
  logic clk = 1'b0, rst, op, result_en, campiona;
  logic [7:0] data_in;
  logic [15:0] acc;
  int checks = 0, failures = 0;
  int sum;

  average_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (acc !== 16'(sum)) begin
      failures++;
      $display("%s: got %0d exp %0d", what, acc, sum);
    end
  endtask

  initial begin
    rst = 1'b1; op = 1'b0; result_en = 1'b0; campiona = 1'b0; data_in = '0;
    @(posedge clk); sum = 0; #1;
    rst = 1'b0;
    campiona = 1'b1; data_in = 8'd255;
    repeat (32) begin @(posedge clk); sum += 255; #1; check("full scale"); end
    campiona = 1'b0;
    for (int i = 0; i < 4000; i++) begin
      rst       = ($urandom_range(0, 199) == 0);
      op        = ($urandom_range(0, 9) == 0);
      result_en = ($urandom_range(0, 29) == 0);
      campiona  = 1'($urandom_range(0, 1));
      data_in   = 8'($urandom);
      @(posedge clk);
      if (rst || op || result_en) sum = 0;
      else if (campiona)          sum = (sum + int'(data_in)) % 65536;
      #1;
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
