// End-to-end testbench for the controller at its default sizes.
//
// Each command is issued by raising REQ for 1 to 4 cycles; CODE carries
// random values except in the cycle REQ is first low, where the real command
// is placed (the register keeps the last value loaded). DATA_IN takes a new
// random value every cycle, so a datum is only right if it is sampled in
// exactly the cycle the timing rule gives: with b the first REQ-low cycle,
// datum i is taken in cycle b+5+9i, RESULT changes and BUSY falls at cycle
// b+8+9(N-1). The expected RESULT (product of the first two data, or the sum
// divided by N for N = 2..32 a power of two, else 0) is worked out here.
// BUSY, CID and the hold of RESULT are checked every cycle; CID must still
// show the command's id in the cycle RESULT is new. A directed list
// covers every mechanism (both operations, every average size, the 32-datum
// code 0, counts that are not powers of two, products of 1 and 3 data, a long
// REQ, a reset in the middle of a command, back-to-back commands); each is
// counted and one that never occurs is a failure. Random commands follow.
module tb_controllore;
  import controllore_pkg::*;

  logic        clk = 1'b0, reset, req;
  logic [7:0]  code, data_in;
  logic [15:0] result;
  logic        busy;
  logic [1:0]  cid;
  int checks = 0, failures = 0;
  logic [15:0] last_result;

  // Mechanism counters.
  int n_prod = 0, n_prod_odd = 0, n_avg[6], n_avg_other = 0, n_long_req = 0;
  int n_mid_reset = 0, n_back_to_back = 0, n_wait_loops = 0;

  controllore dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%0t %s: got %0d exp %0d", $time, what, got, exp);
    end
  endtask

  // Run one command; abort_at >= 0 pulses RESET in that cycle after b.
  task automatic run_cmd(bit op, logic [1:0] id, logic [4:0] num, int req_len,
                         int abort_at = -1);
    int n, t_last, sum, d0, d1, expv;
    n = (num == 0) ? 32 : int'(num);
    t_last = 8 + 9 * (n - 1);
    sum = 0; d0 = 0; d1 = 0;
    // REQ high for req_len cycles, garbage on CODE.
    expect_eq("busy before command", int'(busy), 0);
    for (int k = 0; k < req_len; k++) begin
      req = 1'b1; code = 8'($urandom); data_in = 8'($urandom);
      @(negedge clk);
    end
    // Cycle b: REQ low, the command on CODE.
    for (int t = 0; t <= t_last; t++) begin
      req     = 1'b0;
      code    = (t == 0) ? {op, id, num} : 8'($urandom);
      data_in = 8'($urandom);
      reset   = (t == abort_at);
      if (t >= 5 && (t - 5) % 9 == 0 && (t - 5) / 9 < n) begin
        if ((t - 5) / 9 == 0) d0 = int'(data_in);
        if ((t - 5) / 9 == 1) d1 = int'(data_in);
        sum += int'(data_in);
      end
      #1;
      if (t == abort_at) begin
        @(negedge clk);
        reset = 1'b0;
        #1;
        expect_eq("busy after reset", int'(busy), 0);
        expect_eq("result after reset", int'(result), 0);
        expect_eq("cid after reset", int'(cid), 0);
        last_result = '0;
        n_mid_reset++;
        return;
      end
      if (t < t_last) begin
        expect_eq($sformatf("busy t=%0d", t), int'(busy), 1);
        expect_eq($sformatf("result held t=%0d", t), int'(result), int'(last_result));
        if (t >= 1) expect_eq($sformatf("cid t=%0d", t), int'(cid), int'(id));
      end else begin
        if (op) expv = (d0 * d1) % 65536;
        else if (n inside {2, 4, 8, 16, 32}) expv = sum / n;
        else expv = 0;
        expect_eq("busy at end", int'(busy), 0);
        expect_eq($sformatf("result op=%0d n=%0d", op, n), int'(result), expv);
        expect_eq("cid with result", int'(cid), int'(id));
        last_result = result;
        if (op && n == 2) n_prod++;
        else if (op) n_prod_odd++;
        else if (n inside {2, 4, 8, 16, 32}) n_avg[$clog2(n)]++;
        else n_avg_other++;
        if (req_len > 1) n_long_req++;
        // Passes from one datum to the next (wait4_bis back to wait4), shown
        // by a correct result from more than one datum.
        if (int'(result) == expv && n > 1) n_wait_loops += n - 1;
      end
      @(negedge clk);
    end
  endtask

  initial begin
    reset = 1'b1; req = 1'b0; code = '0; data_in = '0;
    repeat (2) @(negedge clk);
    reset = 1'b0;
    last_result = '0;
    @(negedge clk);
    // Directed list.
    run_cmd(1'b1, 2'd1, 5'd2, 1);
    run_cmd(1'b0, 2'd2, 5'd2, 1);   // back to back with the previous one
    n_back_to_back++;
    run_cmd(1'b0, 2'd3, 5'd4, 3);
    run_cmd(1'b0, 2'd0, 5'd8, 1);
    run_cmd(1'b0, 2'd1, 5'd16, 2);
    run_cmd(1'b0, 2'd2, 5'd0, 1);   // 32 data
    run_cmd(1'b0, 2'd3, 5'd3, 1);   // not a power of two
    run_cmd(1'b0, 2'd0, 5'd1, 1);
    run_cmd(1'b1, 2'd1, 5'd1, 1);   // product of one datum
    run_cmd(1'b1, 2'd2, 5'd3, 4);   // product of the first two of three
    run_cmd(1'b1, 2'd3, 5'd2, 1);
    run_cmd(1'b0, 2'd1, 5'd8, 1, 30);   // reset in the middle
    run_cmd(1'b1, 2'd2, 5'd2, 2);   // runs cleanly after the reset
    // Random commands, with random idle gaps.
    for (int c = 0; c < 60; c++) begin
      logic [4:0] num;
      bit op;
      op  = $urandom_range(0, 2) == 0;
      num = op ? 5'd2 : 5'(1 << $urandom_range(1, 5));
      if ($urandom_range(0, 7) == 0) num = 5'($urandom);
      repeat ($urandom_range(0, 3)) begin
        req = 1'b0; code = 8'($urandom); data_in = 8'($urandom);
        @(negedge clk);
      end
      run_cmd(op, 2'($urandom), num, $urandom_range(1, 4));
    end
    // Every mechanism must have happened.
    checks += 11;
    if (n_prod == 0)         begin failures++; $display("no product command"); end
    if (n_prod_odd == 0)     begin failures++; $display("no product with N != 2"); end
    for (int s = 1; s <= 5; s++)
      if (n_avg[s] == 0)     begin failures++; $display("no average of %0d", 1 << s); end
    if (n_avg_other == 0)    begin failures++; $display("no average of other N"); end
    if (n_long_req == 0)     begin failures++; $display("no long REQ"); end
    if (n_mid_reset == 0)    begin failures++; $display("no reset mid-command"); end
    if (n_wait_loops == 0)   begin failures++; $display("no wait loop"); end
    if (n_back_to_back == 0) begin failures++; $display("no back-to-back"); end
    $display("mechanisms: prod=%0d prod_other=%0d avg2=%0d avg4=%0d avg8=%0d avg16=%0d avg32=%0d avg_other=%0d long_req=%0d mid_reset=%0d wait_loops=%0d",
             n_prod, n_prod_odd, n_avg[1], n_avg[2], n_avg[3], n_avg[4], n_avg[5], n_avg_other,
             n_long_req, n_mid_reset, n_wait_loops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
