// tb_hwrtos_top_wheel: end-to-end test of the round-robin order with five
// software tasks and eight ports (a non-power-of-two wheel).
//
// Task 0 broadcasts a round number to tasks 1..4 (task i waits on port i+1)
// and then blocks on port 1. Every other task takes the word, answers on port 1
// and blocks again. All four are runnable after task 0's call, so the wheel
// must hand out the CPU as 1, 2, 3, 4 and only then return to task 0, whose
// port-1 data arrived with task 1's answer. Each answer overwrites the
// previous one in port 1's receive buffer, so task 0 must read task 4's answer.
// The CPU is modelled at bus level as in tb_hwrtos_top.
module tb_hwrtos_top_wheel;
  localparam int NT = 5, NP = 8, ROUNDS = 12;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge, so the asynchronous reset acts at once
  hwrtos_pkg::bus_req_t bus_req;
  hwrtos_pkg::bus_rsp_t bus_rsp;
  logic irq, init_done, dh_go, sched_miss;
  logic [2:0] next_task;
  logic [NP-1:0] ports_moved;
  hwrtos_pkg::ctrl_state_e ctrl_state;

  hwrtos_top #(.NUM_TASKS(NT), .NUM_PORTS(NP)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
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

  task automatic bus_wr(input logic [7:0] addr, input logic [31:0] data);
    bus_get();
    @(negedge clk);
    bus_req = '{valid: 1'b1, write: 1'b1, addr: addr, wdata: data};
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
    data = bus_rsp.rdata;
    bus_busy = 0;
  endtask

  function automatic logic [7:0] a_send(int p); return {2'd0, 6'(p)}; endfunction
  function automatic logic [7:0] a_recv(int p); return {2'd1, 6'(p)}; endfunction
  function automatic logic [7:0] a_ctrl(logic [5:0] r); return {2'd2, r}; endfunction

  // ------------------------------------------------------------ CPU model
  int running = -1;
  int order [$];

  task automatic port_recv_blk(input int me, input int p, output logic [31:0] d);
    bus_wr(a_ctrl(hwrtos_pkg::REG_WAIT_PORT), 32'(p));
    running = -1;
    bus_wr(a_ctrl(hwrtos_pkg::REG_CALL_RTOS), 32'(me));
    wait (running == me);
    bus_rd(a_recv(p), d);
    bus_wr(a_recv(p), '0);
  endtask

  initial begin : dispatcher
    logic [31:0] nt;
    wait (rst_n);
    forever begin
      @(posedge clk iff irq);
      bus_rd(a_ctrl(hwrtos_pkg::REG_NEXT_TASK), nt);
      check(nt[31], "nextSWTask valid");
      order.push_back(int'(nt[2:0]));
      running = int'(nt[2:0]);
    end
  end

  bit all_done = 0;

  initial begin : task0
    logic [31:0] d;
    wait (running == 0);
    for (int r = 1; r <= ROUNDS; r++) begin
      for (int i = 1; i < NT; i++) bus_wr(a_send(i + 1), 32'(r * 100 + i));
      port_recv_blk(0, 1, d);
      check(d == 32'(r * 1000 + NT - 1), "port 1 holds the last answer");
    end
    all_done = 1;
  end

  for (genvar gi = 1; gi < NT; gi++) begin : g_task
    initial begin
      logic [31:0] d;
      int r;
      r = 0;
      wait (running == gi);
      forever begin
        port_recv_blk(gi, gi + 1, d);
        r++;
        check(d == 32'(r * 100 + gi), "broadcast word");
        bus_wr(a_send(1), 32'(r * 1000 + gi));
      end
    end
  end

  initial begin
    bus_req = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (all_done);
    repeat (5) @(posedge clk);
    // start-up 0..4, then per round 1, 2, 3, 4, 0
    check(order.size() >= NT + ROUNDS * NT, "number of dispatches");
    for (int i = 0; i < NT; i++) check(order[i] == i, "start-up order");
    for (int r = 0; r < ROUNDS; r++)
      for (int k = 0; k < NT; k++)
        check(order[NT + r * NT + k] == (k + 1) % NT, $sformatf("round %0d slot %0d", r, k));
    $display("dispatches=%0d", order.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
