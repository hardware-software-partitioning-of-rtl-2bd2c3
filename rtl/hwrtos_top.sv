// hwrtos_top: the hardware half of a hardware/software partitioned RTOS.
//
// Tasks communicate through ports. Instead of a software kernel guarding each
// port with mutexes and condition variables, a small hardware block keeps every
// port's buffers and event flags, moves data from senders to receivers
// (data handling) and decides which software task runs next (scheduling). The
// CPU keeps only the context switch: when a software task blocks on a port it
// tells the hardware which task it is (callRTOS) and which port it waits on
// (waitPort); the hardware answers with nextSWTask on an interrupt line and the
// interrupt routine restores that task.
//
// Structure: hwrtos_bus_if decodes the bus window, hwrtos_data_handling holds
// the port buffers and event flags, hwrtos_controller sequences initialization
// and the main loop and contains the round-robin hwrtos_scheduler. The partition
// and the phases follow the original design; the bus protocol, the register map
// and the cycle-level timing (nextSWTask 4 cycles after a callRTOS write) are
// this design's own.
//
// Interface: one bus slave (bus_req in, bus_rsp out one cycle later), the
// interrupt irq with next_task, and status outputs that show the controller's
// work: dh_go (a data-handling pass this cycle), sched_miss (a scheduling pass
// found no runnable task), ports_moved (the ports the previous pass copied),
// ctrl_state and init_done. Defaults: 3 software tasks, as in the
// image-filter case study, and 16 ports.
module hwrtos_top #(
  parameter int unsigned NUM_TASKS = 3,
  parameter int unsigned NUM_PORTS = 16,
  localparam int unsigned TASK_W   = (NUM_TASKS > 1) ? $clog2(NUM_TASKS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  hwrtos_pkg::bus_req_t bus_req,
  output hwrtos_pkg::bus_rsp_t bus_rsp,
  output logic                 irq,
  output logic [TASK_W-1:0]    next_task,
  output logic                 init_done,
  output logic                 dh_go,
  output logic                 sched_miss,
  output logic [NUM_PORTS-1:0] ports_moved,
  output hwrtos_pkg::ctrl_state_e ctrl_state
);

  localparam int unsigned DW     = hwrtos_pkg::DATA_W;
  localparam int unsigned PORT_W = $clog2(NUM_PORTS + 1);

  logic                 send_we, frz_clr;
  logic [PORT_W-1:0]    send_port, frz_clr_port, rd_port;
  logic [DW-1:0]        send_data, send_rdata, recv_rdata;
  logic [NUM_PORTS-1:0] active, frozen;
  logic                 wait_we, call_we, next_rd, next_valid, busy;
  logic [DW-1:0]        wait_wdata, call_wdata;
  logic [NUM_TASKS-1:0] task_ready;

  hwrtos_bus_if #(
    .NUM_TASKS(NUM_TASKS),
    .NUM_PORTS(NUM_PORTS)
  ) u_bus (
    .clk, .rst_n,
    .req(bus_req), .rsp(bus_rsp),
    .send_we, .send_port, .send_data, .frz_clr, .frz_clr_port, .rd_port,
    .send_rdata, .recv_rdata, .active, .frozen,
    .wait_we, .wait_wdata, .call_we, .call_wdata, .next_rd,
    .next_task, .next_valid, .init_done, .busy, .task_ready
  );

  hwrtos_data_handling #(
    .NUM_PORTS(NUM_PORTS),
    .DATA_W   (DW)
  ) u_dh (
    .clk, .rst_n,
    .send_we, .send_port, .send_data, .frz_clr, .frz_clr_port,
    .dh_go, .rd_port, .send_rdata, .recv_rdata,
    .active, .frozen, .dh_copied(ports_moved)
  );

  hwrtos_controller #(
    .NUM_TASKS(NUM_TASKS),
    .NUM_PORTS(NUM_PORTS),
    .DATA_W   (DW)
  ) u_ctrl (
    .clk, .rst_n,
    .wait_we, .wait_wdata, .call_we, .call_wdata, .next_rd,
    .frozen, .dh_go,
    .next_task, .next_valid, .irq,
    .init_done, .busy, .sched_miss, .task_ready, .state(ctrl_state)
  );

endmodule
