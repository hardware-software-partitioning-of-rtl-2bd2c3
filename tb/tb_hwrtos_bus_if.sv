// tb_hwrtos_bus_if: self-checking test of the register window decoder.
// Random bus requests over all regions and offsets (valid ports, port 0, ports
// past the last one, unmapped control registers) are applied. For each one the
// strobes towards the data handling and the controller are compared with an
// independent decode, and read data, returned one cycle later with rvalid, is
// compared with the value expected from the random status inputs.
module tb_hwrtos_bus_if;
  localparam int NT = 3, NP = 16, DW = 32, TW = 2, PW = 5;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge, so the asynchronous reset acts at once
  hwrtos_pkg::bus_req_t req;
  hwrtos_pkg::bus_rsp_t rsp;
  logic send_we, frz_clr, wait_we, call_we, next_rd;
  logic [PW-1:0] send_port, frz_clr_port, rd_port;
  logic [DW-1:0] send_data, wait_wdata, call_wdata;
  logic [DW-1:0] send_rdata, recv_rdata;
  logic [NP-1:0] active, frozen;
  logic [TW-1:0] next_task;
  logic next_valid, init_done, busy;
  logic [NT-1:0] task_ready;

  hwrtos_bus_if #(.NUM_TASKS(NT), .NUM_PORTS(NP)) dut (.*);

  always #5 clk = ~clk;

  // read data sources: a function of the port read
  assign send_rdata = 32'hA000_0000 | DW'(rd_port);
  assign recv_rdata = 32'hB000_0000 | DW'(rd_port);

  int checks = 0, failures = 0;
  int n_kind [8];

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

  logic [DW-1:0] exp_rdata;
  logic          exp_rvalid;

  initial begin
    req = '0;
    active = '0; frozen = '0; next_task = '0; next_valid = 0;
    init_done = 0; busy = 0; task_ready = '0;
    foreach (n_kind[k]) n_kind[k] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    exp_rvalid = 0; exp_rdata = '0;
    for (int it = 0; it < 4000; it++) begin
      int reg_sel, off;
      bit is_port;
      @(negedge clk);
      // response of the previous request
      check(rsp.rvalid == exp_rvalid, "rvalid");
      if (exp_rvalid) check(rsp.rdata == exp_rdata, "rdata");
      // new request and status
      reg_sel = $urandom_range(0, 3);
      off     = (reg_sel == 2) ? $urandom_range(0, 7) : $urandom_range(0, NP + 2);
      req.valid = ($urandom_range(0, 5) != 0);
      req.write = $urandom_range(0, 1);
      req.addr  = {2'(reg_sel), 6'(off)};
      req.wdata = $urandom;
      active = NP'($urandom); frozen = NP'($urandom);
      next_task = TW'($urandom_range(0, NT - 1)); next_valid = $urandom_range(0, 1);
      init_done = $urandom_range(0, 1); busy = $urandom_range(0, 1);
      task_ready = NT'($urandom);
      #1;
      is_port = off >= 1 && off <= NP;
      check(send_we == (req.valid && req.write && reg_sel == 0 && is_port), "send_we");
      check(frz_clr == (req.valid && req.write && reg_sel == 1 && is_port), "frz_clr");
      check(wait_we == (req.valid && req.write && reg_sel == 2 && off == 0), "wait_we");
      check(call_we == (req.valid && req.write && reg_sel == 2 && off == 1), "call_we");
      check(next_rd == (req.valid && !req.write && reg_sel == 2 && off == 2), "next_rd");
      if (send_we) check(int'(send_port) == off && send_data == req.wdata, "send port/data");
      if (frz_clr) check(int'(frz_clr_port) == off, "frz port");
      if (wait_we) check(wait_wdata == req.wdata, "wait data");
      if (call_we) check(call_wdata == req.wdata, "call data");
      // expected read
      exp_rvalid = req.valid && !req.write;
      exp_rdata  = '0;
      if (exp_rvalid) begin
        if (reg_sel == 0 && is_port) begin exp_rdata = 32'hA000_0000 | off; n_kind[0]++; end
        if (reg_sel == 1 && is_port) begin exp_rdata = 32'hB000_0000 | off; n_kind[1]++; end
        if (reg_sel == 2) begin
          case (off)
            2: begin exp_rdata = {next_valid, 29'd0, next_task}; n_kind[2]++; end
            3: begin exp_rdata = {16'd0, active}; n_kind[3]++; end
            4: begin exp_rdata = {16'd0, frozen}; n_kind[4]++; end
            5: begin exp_rdata = {27'd0, task_ready, init_done, busy}; n_kind[5]++; end
            default: n_kind[6]++;
          endcase
        end
      end
    end
    foreach (n_kind[k]) if (k < 7) check(n_kind[k] > 0, "read kind covered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
