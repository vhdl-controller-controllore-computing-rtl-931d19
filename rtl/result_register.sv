// Result selection and output register.
//
// For an average command (op = 0) whose data count is a power of two from 2
// to 32, the sum is divided by the count with a right shift (truncating);
// otherwise the product is taken (it is 0 during an average command, so an
// average of 1 or of a count that is not a power of two returns 0). The
// selected value is loaded into RESULT on `result_en` and held until the
// next load; `rst` clears it.
// The selection follows the original design. A count of 32 does not fit the
// 5-bit field; the data counter reads 32 data when the field is 0, so this
// design takes num_dati = 0 as 32 and divides by 32.
module result_register
  import controllore_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic                result_en,
  input  logic                op,
  input  logic [NUM_W-1:0]    num_dati,
  input  logic [RESULT_W-1:0] acc,
  input  logic [RESULT_W-1:0] prodotto,
  output logic [RESULT_W-1:0] result
);

  logic [RESULT_W-1:0] result_tmp;

  always_comb begin
    result_tmp = prodotto;
    if (!op) begin
      unique case (num_dati)
        5'd2:    result_tmp = acc >> 1;
        5'd4:    result_tmp = acc >> 2;
        5'd8:    result_tmp = acc >> 3;
        5'd16:   result_tmp = acc >> 4;
        5'd0:    result_tmp = acc >> 5;   // 32 data
        default: result_tmp = prodotto;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst)            result <= '0;
    else if (result_en) result <= result_tmp;
  end

endmodule
