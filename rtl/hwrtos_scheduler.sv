// hwrtos_scheduler: round-robin hardware scheduler of the HW-RTOS.
//
// The software tasks sit on a wheel. Starting from the task that just called the
// RTOS (call_task), the wheel is read at offsets +1, +2, ... +(NUM_TASKS-1) and,
// last, +NUM_TASKS, which is the calling task itself. A task is schedulable when
// its entry in the wait port list is 0 (it waits on no port) or when the frozen
// input event of the port it waits on is set, meaning data has arrived for it.
// A priority encoder returns the first schedulable task in wheel order; found is
// low when no task can run (the original kernel's return value -1).
//
// The wheel, the wait port list, the frozen events and the priority encoder
// follow the original design. Putting the caller last on the wheel, so that a
// task whose own data has already arrived can resume when no other task is
// ready, and treating an out-of-range wait port as never ready, are this
// design's choices.
//
// Timing: purely combinational; the controller registers next_task.
module hwrtos_scheduler #(
  parameter int unsigned NUM_TASKS = 3,
  parameter int unsigned NUM_PORTS = 16,
  localparam int unsigned TASK_W   = (NUM_TASKS > 1) ? $clog2(NUM_TASKS) : 1,
  localparam int unsigned PORT_W   = $clog2(NUM_PORTS + 1)
) (
  input  logic [TASK_W-1:0]    call_task,
  input  logic [PORT_W-1:0]    wait_list [NUM_TASKS],
  input  logic [NUM_PORTS-1:0] frozen,
  output logic                 found,
  output logic [TASK_W-1:0]    next_task,
  output logic [NUM_TASKS-1:0] ready
);

  // schedulable condition per task
  always_comb begin
    for (int t = 0; t < NUM_TASKS; t++) begin
      if (wait_list[t] == '0)
        ready[t] = 1'b1;
      else if (int'(wait_list[t]) <= NUM_PORTS)
        ready[t] = frozen[int'(wait_list[t]) - 1];
      else
        ready[t] = 1'b0;
    end
  end

  // wheel walk + priority encoder: the smallest offset wins
  always_comb begin
    logic [TASK_W-1:0] cand;
    found     = 1'b0;
    next_task = '0;
    for (int off = NUM_TASKS; off >= 1; off--) begin
      cand = TASK_W'((int'(call_task) + off) % NUM_TASKS);
      if (ready[cand]) begin
        found     = 1'b1;
        next_task = cand;
      end
    end
  end

endmodule
