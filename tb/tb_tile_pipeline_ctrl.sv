// tb_tile_pipeline_ctrl: runs six receptive fields (3 rows of 9 bytes from
// a 24-byte-wide input, 27 DAC lanes, 11 output bytes) through the pipeline
// controller with random back-pressure on the Oe port, and checks: the eDRAM
// addresses fetched for every field, that consecutive fields alternate
// between IB0/IB1, that each D-C-A lasts one cycle and follows the cycle
// that loads the last DAC lane, that DD loads 27 lanes in ceil(27/8) = 4
// consecutive cycles, the Oe addresses and sizes in job order, and the
// lane, multi-cycle and stall counters.
module tb_tile_pipeline_ctrl;
  import rfsm_pkg::*;
  logic clk = 0, rst_n = 0;
  tile_xfer_t xfer;
  logic job_valid = 0, job_ready;
  job_t job = '0;
  logic er_en, dd_sel, dac_ld, dca, adr_we, ob_we, oe_valid, oe_ready = 1, idle;
  logic [ADDR_W-1:0] er_addr, ib_wr_off, dar_rd_off, dac_off, adc_rd_off, adr_off, adr_rd_off, ob_off, ob_rd_off, oe_addr;
  logic [1:0] ib_we, dar_we;
  logic [1:0][ADDR_W-1:0] ib_rd_off, dar_wr_off;
  bus_n_t ib_wr_n, dar_wr_n, dac_n, adr_n, ob_n, oe_n;
  logic [31:0] n_dca, n_stall, n_lane1, n_multi;

  tile_pipeline_ctrl dut (.*);
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

  localparam int NJ = 6;
  int in_addr [NJ], exp_rd[$], got_rd[$], exp_oe[$], got_oe[$], ib_lane[$];
  int dd_run = 0, prev_dd_last = 0, dcas = 0;

  always @(posedge clk) if (rst_n) begin
    if (er_en) got_rd.push_back(int'(er_addr));
    if (ib_we != 0) ib_lane.push_back(ib_we[1] ? 1 : 0);
    if (oe_valid && oe_ready) got_oe.push_back(int'(oe_addr) * 16 + int'(oe_n));
    if (dca) begin
      dcas++;
      check(!dac_ld, "no DAC load during D-C-A");
      check(prev_dd_last == 1, "D-C-A right after the last DAC load");
    end
    if (dac_ld) dd_run++;
    else if (dd_run != 0) begin
      check(dd_run == 4, $sformatf("DD took %0d cycles", dd_run));
      dd_run = 0;
    end
    prev_dd_last = (dac_ld && int'(dac_off) + int'(dac_n) == 27);
  end

  always @(negedge clk) oe_ready <= ($urandom_range(0, 3) != 0);

  initial begin : main
    xfer = '{rows: 8'd3, row_len: 16'd9, row_stride: 16'd24, in_len: 16'd27, out_len: 16'd11};
    for (int j = 0; j < NJ; j++) begin
      in_addr[j] = $urandom_range(0, 500);
      for (int r = 0; r < 3; r++) begin
        exp_rd.push_back(in_addr[j] + r*24);
        exp_rd.push_back(in_addr[j] + r*24 + 8);
      end
      exp_oe.push_back((1000 + 100*j) * 16 + 8);
      exp_oe.push_back((1000 + 100*j + 8) * 16 + 3);
    end
    #12 rst_n = 1;
    for (int j = 0; j < NJ; j++) begin
      @(negedge clk);
      job_valid = 1;
      job.in_addr = 16'(in_addr[j]);
      job.out_addr = 16'(1000 + 100*j);
      @(posedge clk);
      while (!job_ready) @(posedge clk);
      @(negedge clk) job_valid = 0;
    end
    @(posedge clk);
    while (!idle) @(posedge clk);
    check(got_rd == exp_rd, "eDRAM fetch addresses");
    check(got_oe == exp_oe, "Oe addresses and sizes");
    check(ib_lane.size() == NJ * 6, "IB write count");
    for (int i = 0; i < ib_lane.size(); i++) check(ib_lane[i] == (i / 6) % 2, $sformatf("IB lane of write %0d", i));
    check(dcas == NJ && n_dca == NJ, "one D-C-A per field");
    check(n_lane1 == NJ / 2, "half of the fields through lane 1");
    check(n_multi == NJ, "multi-cycle transfers counted");
    check(n_stall > 0, "stalls happened");
    $display("stalls %0d", n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
