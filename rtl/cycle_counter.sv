// Pacing counter: counts four cycles.
//
// A 2-bit counter that advances while `en` is high and clears on `rst` or
// `clr` (clear wins). `cicli4` is high while the count is 3, that is on the
// fourth enabled cycle after a clear. Because the count wraps from 3 to 0 by
// itself, a second four-cycle wait can follow the first without a clear.
// Follows the original design.
module cycle_counter
  import controllore_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic clr,
  input  logic en,
  output logic cicli4
);

  logic [WAIT_W-1:0] count;

  always_ff @(posedge clk) begin
    if (rst || clr) count <= '0;
    else if (en)    count <= count + 1'b1;
  end

  assign cicli4 = (count == '1);

endmodule
