// tb_hwrtos_scheduler: self-checking test of the round-robin scheduler.
// Random wait port lists (including "no port" and out-of-range entries), random
// frozen vectors and every caller are applied; the expected choice is worked
// out by walking the wheel forward from the caller in the testbench. Also runs
// a configuration with 5 tasks so the wheel wraps at a non-power-of-two size.
module tb_hwrtos_scheduler;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---- default configuration: 3 tasks, 16 ports
  localparam int NT = 3, NP = 16, TW = 2, PW = 5;
  logic [TW-1:0] call_task;
  logic [PW-1:0] wait_list [NT];
  logic [NP-1:0] frozen;
  logic found;
  logic [TW-1:0] next_task;
  logic [NT-1:0] ready;

  hwrtos_scheduler #(.NUM_TASKS(NT), .NUM_PORTS(NP)) dut (.*);

  // ---- 5 tasks, 4 ports
  localparam int NT5 = 5, NP5 = 4, TW5 = 3, PW5 = 3;
  logic [TW5-1:0] call5;
  logic [PW5-1:0] wl5 [NT5];
  logic [NP5-1:0] fr5;
  logic found5;
  logic [TW5-1:0] next5;
  logic [NT5-1:0] ready5;

  hwrtos_scheduler #(.NUM_TASKS(NT5), .NUM_PORTS(NP5)) dut5 (
    .call_task(call5), .wait_list(wl5), .frozen(fr5),
    .found(found5), .next_task(next5), .ready(ready5));

  int n_miss = 0, n_self = 0, n_skip = 0;

  initial begin
    for (int it = 0; it < 4000; it++) begin
      int exp_task; bit exp_found; bit rdy [NT];
      call_task = TW'($urandom_range(0, NT - 1));
      frozen    = NP'($urandom);
      for (int t = 0; t < NT; t++) begin
        int r;
        r = $urandom_range(0, 9);
        wait_list[t] = (r == 0) ? '0 : (r == 1) ? PW'(NP + 1 + $urandom_range(0, 13)) : PW'($urandom_range(1, NP));
      end
      #1;
      for (int t = 0; t < NT; t++)
        rdy[t] = (wait_list[t] == 0) || (wait_list[t] <= NP && frozen[wait_list[t] - 1]);
      exp_found = 0; exp_task = 0;
      for (int k = 1; k <= NT; k++) begin
        int c;
        c = int'(call_task) + k;
        if (c >= NT) c -= NT;
        if (!exp_found && rdy[c]) begin exp_found = 1; exp_task = c; end
      end
      check(found == exp_found, "found");
      if (exp_found) check(int'(next_task) == exp_task, "next_task");
      for (int t = 0; t < NT; t++) check(ready[t] == rdy[t], "ready");
      if (!exp_found) n_miss++;
      else if (exp_task == int'(call_task)) n_self++;
      else if (exp_task != (int'(call_task) + 1) % NT) n_skip++;
    end
    for (int it = 0; it < 4000; it++) begin
      int exp_task; bit exp_found; bit rdy [NT5];
      call5 = TW5'($urandom_range(0, NT5 - 1));
      fr5   = NP5'($urandom);
      for (int t = 0; t < NT5; t++) wl5[t] = PW5'($urandom_range(0, 7));
      #1;
      for (int t = 0; t < NT5; t++)
        rdy[t] = (wl5[t] == 0) || (wl5[t] <= NP5 && fr5[wl5[t] - 1]);
      exp_found = 0; exp_task = 0;
      for (int k = 1; k <= NT5; k++) begin
        int c;
        c = (int'(call5) + k) % NT5;
        if (!exp_found && rdy[c]) begin exp_found = 1; exp_task = c; end
      end
      check(found5 == exp_found, "found5");
      if (exp_found) check(int'(next5) == exp_task, "next5");
    end
    // directed: only the caller itself is ready -> it is chosen
    call_task = 2'd1; frozen = '0; frozen[6] = 1'b1;
    wait_list[0] = 5'd3; wait_list[1] = 5'd7; wait_list[2] = 5'd9;
    #1 check(found && next_task == 2'd1, "caller last on the wheel");
    // directed: two ready, the nearer one after the caller wins
    frozen[2] = 1'b1;  // task 0 ready too
    #1 check(found && next_task == 2'd0, "nearest after caller");
    check(n_miss > 0 && n_self > 0 && n_skip > 0, "cases covered");
    $display("miss=%0d self=%0d skip=%0d", n_miss, n_self, n_skip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
