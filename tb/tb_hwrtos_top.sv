// tb_hwrtos_top: end-to-end test of the HW-RTOS with three software tasks and
// one hardware task, at the default size (3 tasks, 16 ports).
//
// The CPU is modelled at bus level: one software task runs at a time, every
// port operation is a bus access, and a blocking receive writes waitPort and
// callRTOS and hands the CPU to the dispatcher, which waits for the interrupt,
// reads nextSWTask and resumes that task (the context switch). The tasks form a
// 3x3 image filter pipeline:
//   task 0 index control : sends line, column and pixel number, waits for DONE
//   task 1 data retrieve : receives line and column, sends the nine window
//                          pixels t00..t22 and INREADY, waits for OUTREADY
//   task 2 filter        : waits for INREADY, then for a coefficient from the
//                          hardware task, reads the window without blocking,
//                          sends OUTREADY and DONE = coefficient * window sum
// The hardware task sends coefficient n+1 after a random delay once the
// previous one has been consumed, so the filter is regularly the only task
// that could run and must wait: the HW-RTOS then keeps rescanning.
// Checked: the initialization order, every result against a sum computed here,
// the 4-cycle callRTOS-to-interrupt latency, and that each mechanism (data
// handling copies, a task rescheduled after itself, idle rescans,
// non-blocking receives, the interrupt) happened.
module tb_hwrtos_top;
  localparam int NT = 3;
  localparam int W = 8, H = 8;                       // image size
  localparam int NPIX = (W - 2) * (H - 2);           // interior pixels filtered
  localparam int P_LINE = 1, P_COL = 2, P_CTRL = 3, P_INREADY = 4, P_T00 = 5,
                 P_OUTREADY = 14, P_DONE = 15, P_COEF = 16;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge, so the asynchronous reset acts at once
  hwrtos_pkg::bus_req_t bus_req;
  hwrtos_pkg::bus_rsp_t bus_rsp;
  logic irq, init_done, dh_go, sched_miss;
  logic [1:0] next_task;
  logic [15:0] ports_moved;
  hwrtos_pkg::ctrl_state_e ctrl_state;

  hwrtos_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ------------------------------------------------------------ counters
  // cyc is the index of the current cycle; the write of callRTOS happens in
  // cycle call_cyc and the interrupt must be high in cycle call_cyc + 4
  int cyc = 0, call_cyc = 0, misses_since_call = 0;
  int n_irq = 0, n_dh = 0, n_copies = 0, n_miss = 0, n_calls = 0;
  int n_self = 0, n_nblk = 0, n_lat_ok = 0, n_lat_bad = 0;
  always @(posedge clk) begin
    if (irq) begin
      n_irq++;
      if (init_done) begin
        if (misses_since_call == 0) begin
          if (cyc - call_cyc == 4) n_lat_ok++;
          else begin n_lat_bad++; if (n_lat_bad < 4) $display("lat %0d", cyc - call_cyc); end
        end
      end
    end
    if (dh_go) n_dh++;
    if (sched_miss) begin n_miss++; misses_since_call++; end
    n_copies += $countones(ports_moved);
    cyc <= cyc + 1;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ shared bus
  bit bus_busy = 0;
  task automatic bus_get();
    while (bus_busy) @(negedge clk);
    bus_busy = 1;
  endtask

  task automatic bus_wr(input logic [7:0] addr, input logic [31:0] data,
                        input bit is_call = 0);
    bus_get();
    @(negedge clk);
    bus_req = '{valid: 1'b1, write: 1'b1, addr: addr, wdata: data};
    if (is_call) begin call_cyc = cyc; misses_since_call = 0; end
    @(negedge clk);
    bus_req = '0;
    bus_busy = 0;
  endtask

  task automatic bus_rd(input logic [7:0] addr, output logic [31:0] data);
    bus_get();
    @(negedge clk);
    bus_req = '{valid: 1'b1, write: 1'b0, addr: addr, wdata: '0};
    @(negedge clk);
    bus_req = '0;
    check(bus_rsp.rvalid, "read response valid");
    data = bus_rsp.rdata;
    bus_busy = 0;
  endtask

  function automatic logic [7:0] a_send(int p); return {2'd0, 6'(p)}; endfunction
  function automatic logic [7:0] a_recv(int p); return {2'd1, 6'(p)}; endfunction
  function automatic logic [7:0] a_ctrl(logic [5:0] r); return {2'd2, r}; endfunction

  // ------------------------------------------------------------ CPU model
  int running = -1;        // software task owning the CPU, -1 during a switch
  int issue_log [$];

  // port API seen by software
  task automatic port_send(input int p, input logic [31:0] d);
    bus_wr(a_send(p), d);
  endtask

  task automatic port_recv_nblk(input int p, output logic [31:0] d);
    bus_rd(a_recv(p), d);
    n_nblk++;
  endtask

  task automatic port_recv_blk(input int me, input int p, output logic [31:0] d);
    bus_wr(a_ctrl(hwrtos_pkg::REG_WAIT_PORT), 32'(p));
    running = -1;
    n_calls++;
    bus_wr(a_ctrl(hwrtos_pkg::REG_CALL_RTOS), 32'(me), 1);
    wait (running == me);
    bus_rd(a_recv(p), d);
    bus_wr(a_recv(p), '0);           // clear the frozen event
  endtask

  // context switch: interrupt -> read nextSWTask -> resume that task
  initial begin : dispatcher
    logic [31:0] nt;
    int last;
    last = -1;
    wait (rst_n);
    forever begin
      @(posedge clk iff irq);
      bus_rd(a_ctrl(hwrtos_pkg::REG_NEXT_TASK), nt);
      check(nt[31], "nextSWTask valid on interrupt");
      check(int'(nt[1:0]) < NT, "task id in range");
      issue_log.push_back(int'(nt[1:0]));
      if (int'(nt[1:0]) == last) n_self++;
      last = int'(nt[1:0]);
      running = int'(nt[1:0]);
    end
  end

  // initialization calls arrive from each task's first blocking receive; the
  // id of the caller during init is the task that was started
  function automatic int pix(int y, int x); return (y * 7 + x * 13) % 256; endfunction

  int results_ok = 0;
  bit all_done = 0;

  // task 0: index control
  initial begin : task0
    logic [31:0] d;
    wait (running == 0);
    for (int k = 0; k < NPIX; k++) begin
      int y, x, s;
      y = 1 + k / (W - 2);
      x = 1 + k % (W - 2);
      port_send(P_LINE, 32'(y));
      port_send(P_COL, 32'(x));
      port_send(P_CTRL, 32'(k));
      port_recv_blk(0, P_DONE, d);
      s = 0;
      for (int dy = -1; dy <= 1; dy++)
        for (int dx = -1; dx <= 1; dx++) s += pix(y + dy, x + dx);
      check(d == 32'((k + 1) * s), $sformatf("filter result %0d", k));
      if (d == 32'((k + 1) * s)) results_ok++;
    end
    all_done = 1;
  end

  // task 1: data retrieve
  initial begin : task1
    logic [31:0] y, x, d;
    wait (running == 1);
    forever begin
      port_recv_blk(1, P_LINE, y);
      port_recv_blk(1, P_COL, x);
      for (int i = 0; i < 9; i++)
        port_send(P_T00 + i, 32'(pix(int'(y) - 1 + i / 3, int'(x) - 1 + i % 3)));
      port_send(P_INREADY, 32'd1);
      port_recv_blk(1, P_OUTREADY, d);
    end
  end

  // task 2: filter
  initial begin : task2
    logic [31:0] d, c, t, ctl;
    int s, expk;
    expk = 0;
    wait (running == 2);
    forever begin
      port_recv_blk(2, P_INREADY, d);
      port_recv_blk(2, P_COEF, c);
      s = 0;
      for (int i = 0; i < 9; i++) begin
        port_recv_nblk(P_T00 + i, t);
        s += int'(t);
      end
      port_recv_nblk(P_CTRL, ctl);
      check(int'(ctl) == expk, "control carries the pixel number");
      check(int'(c) == expk + 1, "coefficient sequence");
      expk++;
      port_send(P_OUTREADY, 32'd1);
      port_send(P_DONE, c * 32'(s));
    end
  end

  // hardware task: produces coefficients 1, 2, 3, ... one at a time
  initial begin : hw_task
    logic [31:0] a, f;
    wait (init_done);
    for (int n = 1; n <= NPIX; n++) begin
      repeat ($urandom_range(40, 200)) @(posedge clk);
      port_send(P_COEF, 32'(n));
      do begin
        repeat (8) @(posedge clk);
        bus_rd(a_ctrl(hwrtos_pkg::REG_ACTIVE), a);
        bus_rd(a_ctrl(hwrtos_pkg::REG_FROZEN), f);
      end while (a[P_COEF - 1] || f[P_COEF - 1]);
    end
  end

  initial begin
    bus_req = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (all_done);
    repeat (5) @(posedge clk);
    check(issue_log.size() > 3 && issue_log[0] == 0 && issue_log[1] == 1 && issue_log[2] == 2,
          "initialization starts tasks 0, 1, 2 in order");
    check(results_ok == NPIX, "all pixels filtered");
    check(n_lat_bad == 0, "callRTOS to interrupt latency is 4 cycles");
    check(n_lat_ok > 0, "latency measured");
    check(n_dh > 0, "data handling passes happened");
    check(n_copies > 0, "ports copied");
    check(n_miss > 0, "idle rescans happened");
    check(n_self > 0, "a task rescheduled right after itself");
    check(n_nblk > 0, "non-blocking receives happened");
    check(n_irq == issue_log.size() || n_irq == issue_log.size() + 1, "one read per interrupt");
    $display("pixels=%0d calls=%0d irq=%0d passes=%0d copies=%0d rescans=%0d self=%0d nblk=%0d lat_ok=%0d cycles=%0d",
             results_ok, n_calls, n_irq, n_dh, n_copies, n_miss, n_self, n_nblk, n_lat_ok, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
