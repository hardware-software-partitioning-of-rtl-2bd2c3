// tb_hwrtos_controller: self-checking test of the HW-RTOS sequencer.
// The frozen-event vector is driven by the testbench. Checked: the
// initialization starts tasks 0, 1, 2 in turn, each with one irq pulse; every
// callRTOS leads to exactly one data-handling cycle (dh_go) two cycles later and
// to nextSWTask with irq four cycles after the write; the chosen task matches a
// reference wait port list and wheel kept in the testbench; a scheduled task's
// wait entry is cleared; when nothing is runnable the controller repeats the
// pass (sched_miss) until data arrives; reading nextSWTask clears next_valid.
module tb_hwrtos_controller;
  localparam int NT = 3, NP = 16, DW = 32, TW = 2, PW = 5;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge, so the asynchronous reset acts at once
  logic wait_we = 0, call_we = 0, next_rd = 0;
  logic [DW-1:0] wait_wdata = '0, call_wdata = '0;
  logic [NP-1:0] frozen = '0;
  logic dh_go, next_valid, irq, init_done, busy, sched_miss;
  logic [TW-1:0] next_task;
  logic [NT-1:0] task_ready;
  hwrtos_pkg::ctrl_state_e state;

  hwrtos_controller #(.NUM_TASKS(NT), .NUM_PORTS(NP), .DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_irq = 0, n_dh = 0, n_miss = 0;
  int m_wait [NT];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(posedge clk) begin
    if (irq) n_irq++;
    if (dh_go) n_dh++;
    if (sched_miss) n_miss++;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // wait for irq; returns the number of rising edges waited
  task automatic wait_irq(output int cycles);
    cycles = 0;
    do begin
      @(posedge clk); #1;
      cycles++;
    end while (!irq && cycles < 200);
  endtask

  // software side of a blocking receive: waitPort then callRTOS
  task automatic call_rtos(input int id, input int port);
    @(negedge clk);
    wait_we = 1; wait_wdata = DW'(port);
    @(negedge clk);
    wait_we = 0; call_we = 1; call_wdata = DW'(id);
    @(negedge clk);
    call_we = 0;
  endtask

  function automatic int model_pick(input int caller);
    for (int k = 1; k <= NT; k++) begin
      int c;
      c = (caller + k) % NT;
      if (m_wait[c] == 0 || frozen[m_wait[c] - 1]) return c;
    end
    return -1;
  endfunction

  int cyc, dh0, exp_t;

  initial begin
    for (int t = 0; t < NT; t++) m_wait[t] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // ---- initialization: tasks 0..NT-1 are started once each
    for (int i = 0; i < NT; i++) begin
      wait_irq(cyc);
      check(irq && next_valid && int'(next_task) == i, $sformatf("init issues task %0d (got %0d irq %0b cyc %0d)", i, next_task, irq, cyc));
      check(!init_done, "init_done low during init");
      @(negedge clk); next_rd = 1; @(negedge clk); next_rd = 0;
      check(!next_valid, "read clears next_valid");
      m_wait[i] = i + 1;   // task i blocks on port i+1
      if (i < NT - 1) call_rtos(i, i + 1);
    end
    // last init call enters the main loop; port 2 has data -> task 1
    frozen[1] = 1'b1;
    dh0 = n_dh;
    @(negedge clk); wait_we = 1; wait_wdata = DW'(NT);
    @(negedge clk); wait_we = 0; call_we = 1; call_wdata = DW'(NT - 1);
    @(posedge clk); #1; call_we = 0;
    wait_irq(cyc);
    check(init_done, "init_done after last task called back");
    check(cyc == 3, "nextSWTask in cycle 4 when callRTOS is written in cycle 0");
    check(n_dh == dh0 + 1, "one data-handling pass");
    exp_t = model_pick(NT - 1);
    check(int'(next_task) == exp_t && exp_t == 1, "first main-loop choice");
    m_wait[exp_t] = 0;
    check(task_ready[1], "scheduled task shows ready (wait cleared)");
    // ---- random main-loop calls, the running task blocks each time
    for (int it = 0; it < 60; it++) begin
      int cur, port;
      cur  = int'(next_task);
      port = $urandom_range(1, NP);
      frozen = NP'($urandom) | NP'(1 << (m_wait[(cur + 1) % NT] > 0 ? m_wait[(cur + 1) % NT] - 1 : 0));
      m_wait[cur] = port;
      @(negedge clk); wait_we = 1; wait_wdata = DW'(port);
      @(negedge clk); wait_we = 0; call_we = 1; call_wdata = DW'(cur);
      dh0 = n_dh;
      @(posedge clk); #1; call_we = 0;
      check(!dh_go, "no pass in record cycle");
      @(posedge clk); #1;
      check(dh_go, "data handling in cycle 2");
      wait_irq(cyc);
      check(cyc == 2, "nextSWTask valid in cycle 4");
      exp_t = model_pick(cur);
      check(int'(next_task) == exp_t, "scheduler choice");
      check(n_dh == dh0 + 1, "one pass per call");
      if (exp_t >= 0) m_wait[exp_t] = 0;
      // the running task waits on nothing: runnable whatever the events say
      frozen = '0;
      #1 check(exp_t >= 0 && task_ready[exp_t], "scheduled task's wait entry cleared");
    end
    // ---- nothing runnable: repeated passes until data arrives
    begin
      int cur, mi;
      cur = int'(next_task);
      frozen = '0;
      // every other task is blocked on a port since its last call
      if (m_wait[(cur + 1) % NT] != 0 && m_wait[(cur + 2) % NT] != 0) begin
        mi = n_miss;
        m_wait[cur] = 9;
        call_rtos(cur, 9);
        repeat (20) @(posedge clk);
        check(n_miss > mi + 3, "repeated scheduling passes while idle");
        check(!irq, "no task issued while idle");
        frozen[8] = 1'b1;   // port 9 data arrives: the caller itself resumes
        wait_irq(cyc);
        check(cyc <= 4 && int'(next_task) == cur, "resumes when data arrives");
      end else begin
        check(1'b0, "another task left runnable");
      end
    end
    check(n_irq >= NT + 60, "irq count");
    check(n_miss > 0, "idle rescan happened");
    $display("irq=%0d dh=%0d miss=%0d", n_irq, n_dh, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
