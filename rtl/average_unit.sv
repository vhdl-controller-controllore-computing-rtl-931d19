// Accumulator for the average.
//
// A 16-bit register that adds DATA_IN on every `campiona` strobe. It is
// cleared on `rst`, while `op` is 1 (a product command) and on `result_en`,
// the cycle the result register takes the sum, so it starts from zero for
// the next command. 32 data of at most 255 sum to at most 8160, so 16 bits
// never overflow. Follows the original design.
module average_unit
  import controllore_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic                op,
  input  logic                result_en,
  input  logic                campiona,
  input  logic [DATA_W-1:0]   data_in,
  output logic [RESULT_W-1:0] acc
);

  always_ff @(posedge clk) begin
    if (rst || op || result_en) acc <= '0;
    else if (campiona)          acc <= acc + RESULT_W'(data_in);
  end

endmodule
