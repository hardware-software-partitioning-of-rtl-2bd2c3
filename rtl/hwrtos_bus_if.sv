// hwrtos_bus_if: memory-mapped bus slave of the HW-RTOS.
//
// Software tasks, hardware tasks and the context-switch routine reach the
// HW-RTOS only through this register window (map in hwrtos_pkg). A write to
// PORT_SEND+p is port_send(p, data): it fills the send buffer and raises the
// port's active event. A read of PORT_RECV+p returns the receive buffer, which
// is all a non-blocking port_receive needs; after a blocking port_receive the
// software writes PORT_RECV+p to clear the port's frozen event. A blocking
// receive first writes WAIT_PORT with the port and then CALL_RTOS with the
// task's identifier. The context switch reads NEXT_TASK: bit 31 is the valid
// flag, the low bits the task to run, and the read clears the flag.
//
// Every request is accepted in the cycle it is presented (no wait states); read
// data is registered and returned one cycle later with rvalid. Reads of
// unmapped addresses return 0 and writes to them are ignored. The bus protocol,
// the address map and the read latency are this design's choices; the original
// work states only that callRTOS and waitPort reach the hardware over the bus
// and that the HW-RTOS can sit on any bus.
module hwrtos_bus_if
  import hwrtos_pkg::ADDR_W, hwrtos_pkg::bus_req_t, hwrtos_pkg::bus_rsp_t;
#(
  parameter int unsigned NUM_TASKS = 3,
  parameter int unsigned NUM_PORTS = 16,
  localparam int unsigned DW       = hwrtos_pkg::DATA_W,
  localparam int unsigned TASK_W   = (NUM_TASKS > 1) ? $clog2(NUM_TASKS) : 1,
  localparam int unsigned PORT_W   = $clog2(NUM_PORTS + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  bus_req_t             req,
  output bus_rsp_t             rsp,
  // data handling side
  output logic                 send_we,
  output logic [PORT_W-1:0]    send_port,
  output logic [DW-1:0]        send_data,
  output logic                 frz_clr,
  output logic [PORT_W-1:0]    frz_clr_port,
  output logic [PORT_W-1:0]    rd_port,
  input  logic [DW-1:0]        send_rdata,
  input  logic [DW-1:0]        recv_rdata,
  input  logic [NUM_PORTS-1:0] active,
  input  logic [NUM_PORTS-1:0] frozen,
  // controller side
  output logic                 wait_we,
  output logic [DW-1:0]        wait_wdata,
  output logic                 call_we,
  output logic [DW-1:0]        call_wdata,
  output logic                 next_rd,
  input  logic [TASK_W-1:0]    next_task,
  input  logic                 next_valid,
  input  logic                 init_done,
  input  logic                 busy,
  input  logic [NUM_TASKS-1:0] task_ready
);

  hwrtos_pkg::region_e region;
  logic [5:0]          offset;
  logic                port_ok;
  logic                wr, rd;
  logic [DW-1:0]       rdata_d;

  assign region  = hwrtos_pkg::region_e'(req.addr[ADDR_W-1 -: 2]);
  assign offset  = req.addr[5:0];
  assign port_ok = (offset != '0) && (int'(offset) <= NUM_PORTS);
  assign wr      = req.valid && req.write;
  assign rd      = req.valid && !req.write;

  assign rd_port      = port_ok ? PORT_W'(offset) : '0;
  assign send_we      = wr && region == hwrtos_pkg::REGION_SEND && port_ok;
  assign send_port    = PORT_W'(offset);
  assign send_data    = req.wdata;
  assign frz_clr      = wr && region == hwrtos_pkg::REGION_RECV && port_ok;
  assign frz_clr_port = PORT_W'(offset);

  assign wait_we    = wr && region == hwrtos_pkg::REGION_CTRL && offset == hwrtos_pkg::REG_WAIT_PORT;
  assign wait_wdata = req.wdata;
  assign call_we    = wr && region == hwrtos_pkg::REGION_CTRL && offset == hwrtos_pkg::REG_CALL_RTOS;
  assign call_wdata = req.wdata;
  assign next_rd    = rd && region == hwrtos_pkg::REGION_CTRL && offset == hwrtos_pkg::REG_NEXT_TASK;

  always_comb begin
    rdata_d = '0;
    unique case (region)
      hwrtos_pkg::REGION_SEND: if (port_ok) rdata_d = send_rdata;
      hwrtos_pkg::REGION_RECV: if (port_ok) rdata_d = recv_rdata;
      hwrtos_pkg::REGION_CTRL: begin
        unique case (offset)
          hwrtos_pkg::REG_NEXT_TASK: begin
            rdata_d = DW'(next_task);
            rdata_d[hwrtos_pkg::NEXT_VALID_BIT] = next_valid;
          end
          hwrtos_pkg::REG_ACTIVE: rdata_d = DW'(active);
          hwrtos_pkg::REG_FROZEN: rdata_d = DW'(frozen);
          hwrtos_pkg::REG_STATUS: rdata_d = DW'({task_ready, init_done, busy});
          default:                rdata_d = '0;
        endcase
      end
      default: rdata_d = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsp <= '0;
    end else begin
      rsp.rvalid <= rd;
      rsp.rdata  <= rd ? rdata_d : '0;
    end
  end

  // a response is returned exactly one cycle after each read and never otherwise
  a_rsp_follows_read: assert property (@(posedge clk) disable iff (!rst_n)
                                       rd |=> rsp.rvalid)
    else $error("read without a response");
  a_no_spurious_rsp: assert property (@(posedge clk) disable iff (!rst_n)
                                      !rd |=> !rsp.rvalid)
    else $error("response without a read");

endmodule
