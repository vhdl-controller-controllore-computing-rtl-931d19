// Controller FSM.
//
// Six states, Moore outputs except for the next-state choice:
//   S_IDLE      BUSY low; command register and data counter held clear.
//               REQ high -> S_READ_CODE.
//   S_READ_CODE command register loads CODE every cycle; REQ low -> S_WAIT4.
//   S_WAIT4     pacing counter runs; when it reads 3 (4th cycle) -> S_READ_DATO.
//   S_READ_DATO `campiona` high for one cycle: DATA_IN is sampled at the end
//               of it; the pacing counter is cleared.      -> S_WAIT4_BIS.
//   S_WAIT4_BIS pacing counter runs; if all data are read -> S_FINE (first
//               cycle), else on its 4th cycle -> S_WAIT4 (the 2-bit counter
//               wraps to 0 by itself, so no clear is needed).
//   S_FINE      `result_en` high: RESULT is loaded.       -> S_IDLE.
// The pacing counter is cleared in every state where it does not run. With N
// data a command therefore takes, after REQ falls: 9 cycles per datum but the
// last, then 4 + 1 + 1 + 1 cycles (wait, sample, one wait4_bis cycle, fine).
// The states, transitions and strobes follow the original design; the state
// encoding and the assertions are this design's own.
module controllore_fsm
  import controllore_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   req,
  input  logic   cicli4,
  input  logic   all_data,
  output ctrl_t  ctrl,
  output state_t state
);

  state_t ns;

  always_ff @(posedge clk) begin
    if (rst) state <= S_IDLE;
    else     state <= ns;
  end

  always_comb begin
    ctrl          = '0;
    ctrl.busy     = 1'b1;
    ctrl.c4_reset = 1'b1;
    ns            = state;

    unique case (state)
      S_IDLE: begin
        ctrl.code_reset  = 1'b1;
        ctrl.cdata_reset = 1'b1;
        ctrl.busy        = 1'b0;
        if (req) ns = S_READ_CODE;
      end
      S_READ_CODE: begin
        ctrl.code_en = 1'b1;
        if (!req) ns = S_WAIT4;
      end
      S_WAIT4: begin
        ctrl.c4_en    = 1'b1;
        ctrl.c4_reset = 1'b0;
        if (cicli4) ns = S_READ_DATO;
      end
      S_READ_DATO: begin
        ctrl.campiona = 1'b1;
        ns            = S_WAIT4_BIS;
      end
      S_WAIT4_BIS: begin
        ctrl.c4_en    = 1'b1;
        ctrl.c4_reset = 1'b0;
        if (all_data)    ns = S_FINE;
        else if (cicli4) ns = S_WAIT4;
      end
      S_FINE: begin
        ctrl.result_en = 1'b1;
        ns             = S_IDLE;
      end
      default: ns = S_IDLE;
    endcase
  end

  // Rules of the sequence.
  a_legal_state: assert property (@(posedge clk) disable iff (rst)
    state inside {S_IDLE, S_READ_CODE, S_WAIT4, S_READ_DATO, S_WAIT4_BIS, S_FINE});
  a_one_sample: assert property (@(posedge clk) disable iff (rst)
    ctrl.campiona |=> !ctrl.campiona);
  a_fine_to_idle: assert property (@(posedge clk) disable iff (rst)
    ctrl.result_en |=> state == S_IDLE);

endmodule
