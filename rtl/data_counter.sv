// Counter of the data read.
//
// A 5-bit counter that advances on every `campiona` strobe (one per datum
// sampled) and clears on `rst` or `clr` (clear wins). `all_data` is high
// while the count equals the command's num_dati. The count is 5 bits and
// wraps, so num_dati = 0 is reached only after 32 data: that is how a
// 32-datum command is expressed. `count` also tells the product unit which
// datum is being sampled. Follows the original design.
module data_counter
  import controllore_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             clr,
  input  logic             campiona,
  input  logic [NUM_W-1:0] num_dati,
  output logic [NUM_W-1:0] count,
  output logic             all_data
);

  always_ff @(posedge clk) begin
    if (rst || clr)    count <= '0;
    else if (campiona) count <= count + 1'b1;
  end

  assign all_data = (count == num_dati);

endmodule
