// Self-checking testbench for code_register: random load/clear/reset
// sequences against a reference register kept in the testbench, and a check
// that the struct fields are the word's bits 7, 6:5 and 4:0.
module tb_code_register;
  import controllore_pkg::*;

  logic clk = 1'b0, rst, clr, en;
  logic [7:0] code_in;
  code_t code;
  int checks = 0, failures = 0;
  logic [7:0] ref_q;

  code_register dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; clr = 1'b0; en = 1'b0; code_in = '0;
    @(posedge clk); ref_q = '0; #1;
    for (int i = 0; i < 2000; i++) begin
      rst     = ($urandom_range(0, 49) == 0);
      clr     = ($urandom_range(0, 7) == 0);
      en      = 1'($urandom_range(0, 1));
      code_in = 8'($urandom);
      @(posedge clk);
      if (rst || clr) ref_q = '0;
      else if (en)    ref_q = code_in;
      #1;
      checks++;
      if (code !== ref_q || code.op !== ref_q[7] || code.cid !== ref_q[6:5] ||
          code.num_dati !== ref_q[4:0]) begin
        failures++;
        $display("mismatch at %0d: got %h exp %h", i, code, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
