// tb_io_interface: decodes every host command against scripted controller
// and tile signals: register writes and start only while the controller is
// idle, eDRAM writes/reads and weight writes steered to the addressed tile
// and held off by its ready, read data returned on the response port, and
// the status word with its done flag.
module tb_io_interface;
  import rfsm_pkg::*;
  localparam int NT = 4;
  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready, rsp_valid;
  host_cmd_t cmd = '0;
  logic [63:0] rsp_data, reg_data;
  logic reg_we, start, ctrl_busy = 0, ctrl_done = 0, ctrl_error = 0;
  logic [3:0] reg_addr;
  logic [NT-1:0] w_we, h_wr_valid, h_wr_ready = '1, h_rd_valid, h_rd_ready = '1, h_rd_rvalid = '0;
  bus_t h_rd_data [NT];

  io_interface #(.NT(NT)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : main
    for (int t = 0; t < NT; t++) h_rd_data[t] = 64'(t) * 64'h0101010101010101;
    #12 rst_n = 1;
    @(negedge clk);
    cmd_valid = 1;
    cmd.op = OP_WR_REG; cmd.addr = 16'd3; cmd.data = 64'h1234;
    #1 check(reg_we && reg_addr == 3 && reg_data == 64'h1234 && cmd_ready, "register write");
    ctrl_busy = 1;
    #1 check(!reg_we && !cmd_ready, "register write waits while busy");
    cmd.op = OP_START;
    #1 check(!start && !cmd_ready, "start waits while busy");
    ctrl_busy = 0;
    #1 check(start && cmd_ready, "start");
    for (int t = 0; t < NT; t++) begin
      cmd.op = OP_WR_EDRAM; cmd.tile = 4'(t);
      #1 check(h_wr_valid == NT'(1 << t) && cmd_ready, $sformatf("eDRAM write to tile %0d", t));
      h_wr_ready[t] = 0;
      #1 check(!cmd_ready, "eDRAM write held off");
      h_wr_ready[t] = 1;
      cmd.op = OP_WR_WEIGHT;
      #1 check(w_we == NT'(1 << t) && h_wr_valid == 0, "weight write");
      cmd.op = OP_RD_EDRAM;
      h_rd_ready[t] = 0;
      #1 check(h_rd_valid == NT'(1 << t) && !cmd_ready, "eDRAM read held off");
      h_rd_ready[t] = 1;
    end
    cmd.op = OP_WR_EDRAM; cmd.tile = 4'd9;
    #1 check(h_wr_valid == 0, "no tile 9");
    // read answer
    cmd_valid = 0;
    @(negedge clk);
    h_rd_rvalid[2] = 1;
    @(negedge clk);
    h_rd_rvalid[2] = 0;
    check(rsp_valid && rsp_data == 64'h0202020202020202, "read answer from tile 2");
    // status
    ctrl_done = 1;
    @(negedge clk);
    ctrl_done = 0; ctrl_error = 1; ctrl_busy = 1;
    cmd_valid = 1; cmd.op = OP_RD_STATUS;
    @(negedge clk);
    cmd_valid = 0;
    check(rsp_valid && rsp_data[2:0] == 3'b111, $sformatf("status %b", rsp_data[2:0]));
    ctrl_busy = 0;
    cmd_valid = 1; cmd.op = OP_START;
    @(negedge clk);
    cmd.op = OP_RD_STATUS;
    @(negedge clk);
    cmd_valid = 0;
    check(rsp_data[1] == 1'b0, "done flag cleared by start");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
