// Product / average controller, top level.
//
// Protocol: while BUSY is low the host raises REQ and presents the command
// word on CODE {op, cid[1:0], num_dati[4:0]}. The command register loads
// CODE on every cycle after the one REQ is first seen high, up to and
// including the first cycle REQ is low again; that last value is kept, so
// CODE must be valid in the cycle REQ falls. Then the controller reads
// num_dati data from DATA_IN (0 means 32), one every nine cycles. Calling b
// the first cycle with REQ low, datum i is taken at the end of cycle
// b+5+9i (four waiting cycles, then the sampling cycle; between two data,
// four cycles after one and four before the next). RESULT is updated and
// BUSY falls at the end of cycle b+7+9(N-1), two cycles after the last
// sample. op = 1 returns the 16-bit product of the first two data;
// op = 0 returns the truncated average for a count of 2, 4, 8, 16 or 32
// (0 for other counts). CID shows the command's id from the cycle after REQ
// falls through the first cycle with BUSY low, so it accompanies the new
// RESULT; it is cleared one cycle later. RESULT holds until the next command ends.
// RESET is synchronous and active high.
//
// Inside: a command register, a 4-cycle pacing counter, a data counter and
// the FSM form the control part; an operand pair with a multiplier, an
// accumulator and the output register form the datapath. The structure,
// the timing and the encoding of CODE follow the original design. The FSM's
// state output is left unused here (a lint warning) and serves only for
// waveform viewing.
module controllore
  import controllore_pkg::*;
(
  input  logic                clk,
  input  logic                reset,
  input  logic                req,
  input  logic [CODE_W-1:0]   code,
  input  logic [DATA_W-1:0]   data_in,
  output logic [RESULT_W-1:0] result,
  output logic                busy,
  output logic [CID_W-1:0]    cid
);

  ctrl_t               ctrl;
  state_t              state;     // FSM state, kept for waveform viewing only
  code_t               code_q;
  logic                cicli4, all_data;
  logic [NUM_W-1:0]    cdata;
  logic [RESULT_W-1:0] prodotto, acc;

  code_register u_code (
    .clk, .rst(reset), .clr(ctrl.code_reset), .en(ctrl.code_en),
    .code_in(code), .code(code_q)
  );

  cycle_counter u_c4 (
    .clk, .rst(reset), .clr(ctrl.c4_reset), .en(ctrl.c4_en), .cicli4
  );

  data_counter u_cdata (
    .clk, .rst(reset), .clr(ctrl.cdata_reset), .campiona(ctrl.campiona),
    .num_dati(code_q.num_dati), .count(cdata), .all_data
  );

  controllore_fsm u_fsm (
    .clk, .rst(reset), .req, .cicli4, .all_data, .ctrl, .state
  );

  product_unit u_prod (
    .clk, .rst(reset), .op(code_q.op), .campiona(ctrl.campiona),
    .count(cdata), .data_in, .prodotto
  );

  average_unit u_avg (
    .clk, .rst(reset), .op(code_q.op), .result_en(ctrl.result_en),
    .campiona(ctrl.campiona), .data_in, .acc
  );

  result_register u_res (
    .clk, .rst(reset), .result_en(ctrl.result_en), .op(code_q.op),
    .num_dati(code_q.num_dati), .acc, .prodotto, .result
  );

  assign busy = ctrl.busy;
  assign cid  = code_q.cid;

endmodule
