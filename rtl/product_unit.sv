// Product unit.
//
// Two 8-bit operand registers and a combinational 8x8 -> 16-bit multiplier.
// The first operand is loaded on the `campiona` strobe of the first datum
// (data count 0), the second on that of the second datum (count 1). Both
// registers are held at zero on `rst` and whenever `op` is 0 (an average
// command, or no command, since the command register is clear while idle),
// so the product is 0 outside a product command. `prodotto` follows the
// registers combinationally. Follows the original design.
module product_unit
  import controllore_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic                op,
  input  logic                campiona,
  input  logic [NUM_W-1:0]    count,
  input  logic [DATA_W-1:0]   data_in,
  output logic [RESULT_W-1:0] prodotto
);

  logic [DATA_W-1:0] dato_1, dato_2;

  always_ff @(posedge clk) begin
    if (rst || !op)                    dato_1 <= '0;
    else if (campiona && count == 'd0) dato_1 <= data_in;
  end

  always_ff @(posedge clk) begin
    if (rst || !op)                    dato_2 <= '0;
    else if (campiona && count == 'd1) dato_2 <= data_in;
  end

  assign prodotto = RESULT_W'(dato_1) * RESULT_W'(dato_2);

endmodule
