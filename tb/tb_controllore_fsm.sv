// Self-checking testbench for controllore_fsm: random REQ, cicli4 and
// all_data drive the FSM; every cycle the state and all eight strobes are
// compared with a reference transition table and output table kept here.
// Each state and each transition out of S_WAIT4_BIS is counted and must occur.
module tb_controllore_fsm;
  import controllore_pkg::*;

  logic clk = 1'b0, rst, req, cicli4, all_data;
  ctrl_t ctrl;
  state_t state;
  int checks = 0, failures = 0;
  state_t ref_s;
  int visits[6];
  int bis_to_fine = 0, bis_to_wait = 0;

  controllore_fsm dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected strobes, in ctrl_t order:
  // busy code_en code_reset c4_en c4_reset campiona cdata_reset result_en
  function automatic logic [7:0] exp_ctrl(state_t s);
    case (s)
      S_IDLE:      return 8'b0010_1010;
      S_READ_CODE: return 8'b1100_1000;
      S_WAIT4:     return 8'b1001_0000;
      S_READ_DATO: return 8'b1000_1100;
      S_WAIT4_BIS: return 8'b1001_0000;
      S_FINE:      return 8'b1000_1001;
      default:     return 8'hxx;
    endcase
  endfunction

  function automatic state_t next_of(state_t s, logic r, logic c4, logic ad);
    case (s)
      S_IDLE:      return r ? S_READ_CODE : S_IDLE;
      S_READ_CODE: return r ? S_READ_CODE : S_WAIT4;
      S_WAIT4:     return c4 ? S_READ_DATO : S_WAIT4;
      S_READ_DATO: return S_WAIT4_BIS;
      S_WAIT4_BIS: return ad ? S_FINE : (c4 ? S_WAIT4 : S_WAIT4_BIS);
      default:     return S_IDLE;
    endcase
  endfunction

  initial begin
    rst = 1'b1; req = 1'b0; cicli4 = 1'b0; all_data = 1'b0;
    @(posedge clk); ref_s = S_IDLE; #1;
    rst = 1'b0;
    for (int i = 0; i < 6000; i++) begin
      checks++;
      if (state !== ref_s || ctrl !== exp_ctrl(ref_s)) begin
        failures++;
        $display("cycle %0d: state %s (exp %s) ctrl %b (exp %b)", i, state.name(),
                 ref_s.name(), ctrl, exp_ctrl(ref_s));
      end
      visits[int'(ref_s)]++;
      rst      = ($urandom_range(0, 299) == 0);
      req      = 1'($urandom_range(0, 1));
      cicli4   = ($urandom_range(0, 3) == 0);
      all_data = ($urandom_range(0, 2) == 0);
      @(posedge clk);
      if (!rst && ref_s == S_WAIT4_BIS) begin
        if (all_data)    bis_to_fine++;
        else if (cicli4) bis_to_wait++;
      end
      ref_s = rst ? S_IDLE : next_of(ref_s, req, cicli4, all_data);
      #1;
    end
    for (int s = 0; s < 6; s++) begin
      checks++;
      if (visits[s] == 0) begin failures++; $display("state %0d never visited", s); end
    end
    checks += 2;
    if (bis_to_fine == 0) begin failures++; $display("wait4_bis -> fine never taken"); end
    if (bis_to_wait == 0) begin failures++; $display("wait4_bis -> wait4 never taken"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
