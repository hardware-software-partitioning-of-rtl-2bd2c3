// hwrtos_data_handling: port buffers, event flags and the data-handling pass.
//
// Each communication port p (identifiers 1..NUM_PORTS) has four pieces of state:
// a send buffer and an "active" event flag written by the sender, and a receive
// buffer and a "frozen" event flag read by the receiver. port_send stores the
// word in the send buffer and sets the active flag. When the controller runs a
// data-handling pass (dh_go high for one cycle), every port whose active flag is
// set has its send buffer copied into its receive buffer, its frozen flag set and
// its active flag cleared, so a sender can post the next word while the receiver
// still reads the previous one. A blocking port_receive clears the frozen flag
// after reading (frz_clr). That is the behaviour of the original kernel.
//
// This design's own choices: all ports are copied in the same clock cycle (one
// cycle per pass); when a port_send and a pass touch the same port in one cycle,
// the pass copies the old word and the new word stays pending with its active
// flag set; when a frozen clear and a pass meet, the new frozen flag wins. A
// pass overwrites an unread receive buffer, as the original loop does.
//
// Interface: send_we/send_port/send_data (port_send), frz_clr/frz_clr_port,
// dh_go, rd_port with combinational send_rdata/recv_rdata, the active and
// frozen vectors (bit p-1 for port p), and dh_copied, the ports moved by the
// pass of the previous cycle. Port identifier 0 addresses nothing.
module hwrtos_data_handling #(
  parameter int unsigned NUM_PORTS = 16,
  parameter int unsigned DATA_W    = 32,
  localparam int unsigned PORT_W   = $clog2(NUM_PORTS + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // port_send from the bus
  input  logic                 send_we,
  input  logic [PORT_W-1:0]    send_port,
  input  logic [DATA_W-1:0]    send_data,
  // blocking port_receive done: clear the frozen event
  input  logic                 frz_clr,
  input  logic [PORT_W-1:0]    frz_clr_port,
  // run one data-handling pass
  input  logic                 dh_go,
  // buffer read
  input  logic [PORT_W-1:0]    rd_port,
  output logic [DATA_W-1:0]    send_rdata,
  output logic [DATA_W-1:0]    recv_rdata,
  // event vectors
  output logic [NUM_PORTS-1:0] active,
  output logic [NUM_PORTS-1:0] frozen,
  output logic [NUM_PORTS-1:0] dh_copied
);

  logic [DATA_W-1:0] send_buf [NUM_PORTS];
  logic [DATA_W-1:0] recv_buf [NUM_PORTS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active    <= '0;
      frozen    <= '0;
      dh_copied <= '0;
      for (int p = 0; p < NUM_PORTS; p++) begin
        send_buf[p] <= '0;
        recv_buf[p] <= '0;
      end
    end else begin
      for (int p = 0; p < NUM_PORTS; p++) begin
        // data-handling pass: copy, freeze, clear
        if (dh_go && active[p]) begin
          recv_buf[p] <= send_buf[p];
          active[p]   <= 1'b0;
        end
        if (frz_clr && frz_clr_port == PORT_W'(p + 1))
          frozen[p] <= 1'b0;
        if (dh_go && active[p])
          frozen[p] <= 1'b1;
        // port_send: a new word stays pending even during a pass
        if (send_we && send_port == PORT_W'(p + 1)) begin
          send_buf[p] <= send_data;
          active[p]   <= 1'b1;
        end
      end
      dh_copied <= dh_go ? active : '0;
    end
  end

  always_comb begin
    send_rdata = '0;
    recv_rdata = '0;
    for (int p = 0; p < NUM_PORTS; p++) begin
      if (rd_port == PORT_W'(p + 1)) begin
        send_rdata = send_buf[p];
        recv_rdata = recv_buf[p];
      end
    end
  end

endmodule
