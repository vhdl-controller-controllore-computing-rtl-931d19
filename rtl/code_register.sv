// Command register.
//
// Holds the command word CODE. It loads CODE on every cycle that `en` is high
// (the FSM keeps it high from the cycle after REQ rises through the first
// cycle REQ is low again, so the value present when REQ falls is kept) and clears to all zeros on `rst` or `clr`;
// the clear wins over the load. The registered word is presented as a code_t
// struct: op, cid and num_dati. Output changes one clock edge after the load.
// Behaviour follows the original design; the struct output is this design's
// own packaging.
module code_register
  import controllore_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              clr,
  input  logic              en,
  input  logic [CODE_W-1:0] code_in,
  output code_t             code
);

  always_ff @(posedge clk) begin
    if (rst || clr)  code <= '0;
    else if (en)     code <= code_t'(code_in);
  end

endmodule
