// hwrtos_pkg: types and constants shared by the HW-RTOS blocks.
//
// The HW-RTOS is the hardware half of a partitioned real-time kernel: software
// tasks on a CPU talk to it through a memory-mapped register window, and it
// answers with the identifier of the next software task to run, raised as an
// interrupt. This package holds the bus request/response structs, the register
// map of that window and the controller's state encoding.
//
// Register map (word addresses, ADDR_W = 8 bits): the two top address bits pick
// a region, the low six bits pick a port or a register.
//   region 0 PORT_SEND  : write = port_send(port, data); read = send buffer
//   region 1 PORT_RECV  : read  = receive buffer; write = clear frozen event
//   region 2 CONTROL    : WAIT_PORT, CALL_RTOS, NEXT_TASK, ACTIVE, FROZEN
// Port identifiers are 1..NUM_PORTS; the value 0 means "no port". The register
// map, the widths and the bus handshake are this design's own choices: the
// original work only says that callRTOS and waitPort travel over the bus.
package hwrtos_pkg;

  localparam int unsigned ADDR_W = 8;
  localparam int unsigned DATA_W = 32;   // shared mem(0:32) words

  typedef enum logic [1:0] {
    REGION_SEND = 2'd0,
    REGION_RECV = 2'd1,
    REGION_CTRL = 2'd2
  } region_e;

  // control-region register offsets
  localparam logic [5:0] REG_WAIT_PORT = 6'd0;  // W: port the caller blocks on
  localparam logic [5:0] REG_CALL_RTOS = 6'd1;  // W: id of the task that called
  localparam logic [5:0] REG_NEXT_TASK = 6'd2;  // R: {valid, id}; read clears valid
  localparam logic [5:0] REG_ACTIVE    = 6'd3;  // R: active_input_events vector
  localparam logic [5:0] REG_FROZEN    = 6'd4;  // R: frozen_input_events vector
  localparam logic [5:0] REG_STATUS    = 6'd5;  // R: {init_done, busy}

  // bit 31 of a NEXT_TASK read is the valid flag
  localparam int unsigned NEXT_VALID_BIT = 31;

  // one bus transfer, accepted in the cycle it is presented
  typedef struct packed {
    logic              valid;
    logic              write;
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] wdata;
  } bus_req_t;

  // read data arrives one cycle after the request
  typedef struct packed {
    logic              rvalid;
    logic [DATA_W-1:0] rdata;
  } bus_rsp_t;

  typedef enum logic [2:0] {
    ST_INIT_ISSUE = 3'd0,  // initialization: start task i
    ST_INIT_WAIT  = 3'd1,  // initialization: wait for task i to call back
    ST_IDLE       = 3'd2,  // main loop: wait for callRTOS
    ST_DATA       = 3'd3,  // data handling pass
    ST_SCHED      = 3'd4   // scheduling pass
  } ctrl_state_e;

endpackage
