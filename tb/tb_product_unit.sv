// Self-checking testbench for product_unit: the product must be that of the
// data present at the sample strobes with count 0 and count 1, and 0 while
// op is low, under random strobes, counts and op changes.
module tb_product_unit;
  logic clk = 1'b0, rst, op, campiona;
  logic [4:0] count;
  logic [7:0] data_in;
  logic [15:0] prodotto;
  int checks = 0, failures = 0;
  int a, b;

  product_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; op = 1'b0; campiona = 1'b0; count = '0; data_in = '0;
    @(posedge clk); a = 0; b = 0; #1;
    rst = 1'b0;
    for (int i = 0; i < 4000; i++) begin
      rst      = ($urandom_range(0, 199) == 0);
      if ($urandom_range(0, 19) == 0) op = ~op;
      campiona = 1'($urandom_range(0, 1));
      count    = ($urandom_range(0, 3) == 0) ? 5'($urandom) : 5'($urandom_range(0, 1));
      data_in  = 8'($urandom);
      @(posedge clk);
      if (rst || !op) begin a = 0; b = 0; end
      else if (campiona && count == 0) a = int'(data_in);
      else if (campiona && count == 1) b = int'(data_in);
      #1;
      checks++;
      if (prodotto !== 16'(a * b)) begin
        failures++;
        $display("cycle %0d: got %0d exp %0d*%0d", i, prodotto, a, b);
      end
    end
    // Largest operands.
    op = 1'b1; campiona = 1'b1; data_in = 8'hff;
    count = 0; @(posedge clk); #1; count = 1; @(posedge clk); #1;
    campiona = 1'b0;
    checks++;
    if (prodotto !== 16'hfe01) begin
      failures++;
      $display("255*255: got %h", prodotto);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
