// hwrtos_controller: the sequencer of the HW-RTOS and owner of the wait port list.
//
// It runs the kernel's two parts. Initialization starts every software task once:
// for i = 0..NUM_TASKS-1 it presents nextSWTask = i with an interrupt and waits
// until the task calls back (callRTOS), recording in the wait port list the port
// that task now blocks on (waitPort). The main loop then repeats, once per
// callRTOS: record the caller's wait port, run one data-handling pass, run the
// scheduler; when it finds a task, that task's wait port entry is cleared to 0
// and its identifier is presented as nextSWTask with an interrupt.
//
// Software writes waitPort first and then callRTOS; the callRTOS write starts the
// work (wait_we/call_we, one cycle each, data on *_wdata). The pair is captured at
// the callRTOS write. nextSWTask is held on next_task with next_valid high until
// software reads it (next_rd); irq pulses for one cycle whenever a new value is
// presented; task_ready shows which tasks the scheduler sees as runnable. Timing: with the write in cycle 0, cycle 1 records the wait port,
// cycle 2 is the data-handling pass (dh_go), cycle 3 schedules, and next_task,
// next_valid and irq are valid from cycle 4 on.
//
// Where the original loop finds no schedulable task it waits for the next
// callRTOS. Here the controller instead repeats data handling and scheduling
// every three cycles until a task becomes ready (data from a hardware task can
// arrive over the bus meanwhile) or a new callRTOS comes in; sched_miss pulses
// on each pass that found nothing. That and the cycle counts are this design's
// choices; the sequence of phases is the original's.
module hwrtos_controller #(
  parameter int unsigned NUM_TASKS = 3,
  parameter int unsigned NUM_PORTS = 16,
  parameter int unsigned DATA_W    = 32,
  localparam int unsigned TASK_W   = (NUM_TASKS > 1) ? $clog2(NUM_TASKS) : 1,
  localparam int unsigned PORT_W   = $clog2(NUM_PORTS + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // software -> hardware, through the bus
  input  logic                 wait_we,
  input  logic [DATA_W-1:0]    wait_wdata,
  input  logic                 call_we,
  input  logic [DATA_W-1:0]    call_wdata,
  input  logic                 next_rd,
  // data handling
  input  logic [NUM_PORTS-1:0] frozen,
  output logic                 dh_go,
  // hardware -> software
  output logic [TASK_W-1:0]    next_task,
  output logic                 next_valid,
  output logic                 irq,
  // status
  output logic                 init_done,
  output logic                 busy,
  output logic                 sched_miss,
  output logic [NUM_TASKS-1:0] task_ready,
  output hwrtos_pkg::ctrl_state_e state
);

  logic [PORT_W-1:0] wait_list [NUM_TASKS];
  logic [PORT_W-1:0] wait_reg;     // last waitPort written
  logic              call_pend;
  logic [TASK_W-1:0] call_id;      // callRTOS waiting to be taken
  logic [PORT_W-1:0] call_wait;    // waitPort captured with it
  logic [TASK_W-1:0] cur_call;     // callRTOS of the running pass
  logic [TASK_W-1:0] init_idx;
  logic              searching;

  logic              sch_found;
  logic [TASK_W-1:0] sch_task;

  hwrtos_scheduler #(
    .NUM_TASKS(NUM_TASKS),
    .NUM_PORTS(NUM_PORTS)
  ) u_sched (
    .call_task(cur_call),
    .wait_list(wait_list),
    .frozen   (frozen),
    .found    (sch_found),
    .next_task(sch_task),
    .ready    (task_ready)
  );

  assign dh_go = (state == hwrtos_pkg::ST_DATA);
  assign busy  = (state == hwrtos_pkg::ST_DATA) || (state == hwrtos_pkg::ST_SCHED) || call_pend;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= hwrtos_pkg::ST_INIT_ISSUE;
      wait_reg   <= '0;
      call_pend  <= 1'b0;
      call_id    <= '0;
      call_wait  <= '0;
      cur_call   <= '0;
      init_idx   <= '0;
      searching  <= 1'b0;
      next_task  <= '0;
      next_valid <= 1'b0;
      irq        <= 1'b0;
      init_done  <= 1'b0;
      sched_miss <= 1'b0;
      for (int t = 0; t < NUM_TASKS; t++) wait_list[t] <= '0;
    end else begin
      irq        <= 1'b0;
      sched_miss <= 1'b0;
      if (next_rd) next_valid <= 1'b0;

      if (wait_we) wait_reg <= PORT_W'(wait_wdata);
      if (call_we) begin
        call_pend <= 1'b1;
        call_id   <= TASK_W'(call_wdata);
        call_wait <= wait_we ? PORT_W'(wait_wdata) : wait_reg;
      end

      unique case (state)
        hwrtos_pkg::ST_INIT_ISSUE: begin
          next_task  <= init_idx;
          next_valid <= 1'b1;
          irq        <= 1'b1;
          state      <= hwrtos_pkg::ST_INIT_WAIT;
        end
        hwrtos_pkg::ST_INIT_WAIT: begin
          if (call_pend) begin
            call_pend          <= call_we;
            wait_list[call_id] <= call_wait;
            cur_call           <= call_id;
            if (int'(init_idx) == NUM_TASKS - 1) begin
              init_done <= 1'b1;
              state     <= hwrtos_pkg::ST_DATA;
            end else begin
              init_idx <= init_idx + 1'b1;
              state    <= hwrtos_pkg::ST_INIT_ISSUE;
            end
          end
        end
        hwrtos_pkg::ST_IDLE: begin
          if (call_pend) begin
            call_pend          <= call_we;
            wait_list[call_id] <= call_wait;
            cur_call           <= call_id;
            state              <= hwrtos_pkg::ST_DATA;
          end else if (searching) begin
            state <= hwrtos_pkg::ST_DATA;
          end
        end
        hwrtos_pkg::ST_DATA: state <= hwrtos_pkg::ST_SCHED;
        hwrtos_pkg::ST_SCHED: begin
          if (sch_found) begin
            wait_list[sch_task] <= '0;
            next_task           <= sch_task;
            next_valid          <= 1'b1;
            irq                 <= 1'b1;
            searching           <= 1'b0;
          end else begin
            searching  <= 1'b1;
            sched_miss <= 1'b1;
          end
          state <= hwrtos_pkg::ST_IDLE;
        end
        default: state <= hwrtos_pkg::ST_IDLE;
      endcase
    end
  end

  // one CPU: a task calls the RTOS only after it has been scheduled, so a second
  // callRTOS never arrives while one is still waiting to be taken
  a_one_call: assert property (@(posedge clk) disable iff (!rst_n)
                               call_we |-> !call_pend)
    else $error("callRTOS written while the previous call is still pending");

endmodule
