// tb_hwrtos_data_handling: self-checking test of the port buffers and the
// data-handling pass. A reference model kept in plain arrays applies the same
// random port_send, frozen-clear and pass operations (including all three on
// the same port in one cycle) and every cycle the active, frozen and copied
// vectors and the buffer read of a random port are compared with it. A pass
// must complete in the cycle it is requested.
module tb_hwrtos_data_handling;
  localparam int unsigned NP = 16;
  localparam int unsigned DW = 32;
  localparam int unsigned PW = $clog2(NP + 1);

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge, so the asynchronous reset acts at once
  logic send_we, frz_clr, dh_go;
  logic [PW-1:0] send_port, frz_clr_port, rd_port;
  logic [DW-1:0] send_data, send_rdata, recv_rdata;
  logic [NP-1:0] active, frozen, dh_copied;

  int checks = 0, failures = 0;
  int n_pass_copies = 0, n_collide = 0;

  // reference model
  logic [DW-1:0] m_send [NP];
  logic [DW-1:0] m_recv [NP];
  logic [NP-1:0] m_active, m_frozen, m_copied;

  hwrtos_data_handling #(.NUM_PORTS(NP), .DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    send_we = 0; frz_clr = 0; dh_go = 0;
    send_port = '0; frz_clr_port = '0; rd_port = '0; send_data = '0;
    m_active = '0; m_frozen = '0; m_copied = '0;
    for (int p = 0; p < NP; p++) begin m_send[p] = '0; m_recv[p] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      // compare state with the model
      check(active == m_active, "active");
      check(frozen == m_frozen, "frozen");
      check(dh_copied == m_copied, "copied");
      rd_port = PW'($urandom_range(0, NP + 1));
      #1;
      if (rd_port >= 1 && int'(rd_port) <= NP) begin
        check(send_rdata == m_send[rd_port-1], "send_rdata");
        check(recv_rdata == m_recv[rd_port-1], "recv_rdata");
      end else begin
        check(send_rdata == '0 && recv_rdata == '0, "out-of-range read");
      end
      // random stimulus for the next edge
      send_we      = ($urandom_range(0, 2) == 0);
      send_port    = PW'($urandom_range(0, NP));
      send_data    = $urandom;
      frz_clr      = ($urandom_range(0, 3) == 0);
      frz_clr_port = ($urandom_range(0, 1) == 0) ? send_port : PW'($urandom_range(0, NP));
      dh_go        = ($urandom_range(0, 4) == 0);
      // model of the coming edge
      m_copied = dh_go ? m_active : '0;
      for (int p = 0; p < NP; p++) begin
        logic cp;
        cp = dh_go && m_active[p];
        if (cp) begin
          m_recv[p] = m_send[p];
          n_pass_copies++;
        end
        if (frz_clr && frz_clr_port == PW'(p + 1)) m_frozen[p] = 1'b0;
        if (cp) m_frozen[p] = 1'b1;
        if (cp) m_active[p] = 1'b0;
        if (send_we && send_port == PW'(p + 1)) begin
          if (cp) n_collide++;
          m_send[p]   = send_data;
          m_active[p] = 1'b1;
        end
      end
    end
    check(n_pass_copies > 100, "passes copied data");
    check(n_collide > 0, "send during a pass on the same port happened");
    $display("copies=%0d send-during-pass=%0d", n_pass_copies, n_collide);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
