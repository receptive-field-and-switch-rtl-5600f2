// tb_rfsm_controller: the chip controller against a scripted tile. It
// checks the receptive-field geometry (size, stride, centre) and transfer
// sizes it derives for two groups, that it starts the switch-matrix set-up
// once and waits for it, that it issues one job per output in raster order
// with the right input and output addresses under random job back-pressure,
// that it waits for the tile to drain, and that it reports an error for a
// group larger than the input and for a refused switch-matrix set-up.
// It also reruns a group with the keep-status bit set and checks that no
// set-up is started while the jobs are issued as before.
module tb_rfsm_controller;
  import rfsm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic reg_we = 0, start = 0, busy, done, error;
  logic [3:0] reg_addr = '0;
  logic [63:0] reg_data = '0;
  logic [7:0] rf_size, rf_stride, rf_center;
  group_cfg_t cfg;
  tile_xfer_t xfer;
  logic [3:0] tile_sel;
  logic sm_start, sm_done = 0, sm_error = 0, job_valid, job_ready = 0, tile_idle = 1;
  job_t job;

  rfsm_controller dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // scripted tile
  int sm_starts = 0, busy_left = 0;
  bit refuse = 0;
  job_t jobs[$];
  always @(posedge clk) begin
    if (sm_start) sm_starts++;
    if (job_valid && job_ready) begin jobs.push_back(job); busy_left = 15; end
    else if (busy_left > 0) busy_left--;
  end
  always @(negedge clk) begin
    job_ready <= ($urandom_range(0, 2) == 0);
    tile_idle <= (busy_left == 0) && !job_valid;
  end
  initial forever begin
    @(posedge clk);
    if (sm_start) begin
      repeat (7) @(negedge clk);
      sm_done = 1; sm_error = refuse;
      @(negedge clk);
      sm_done = 0; sm_error = 0;
    end
  end

  task automatic wr(logic [3:0] a, logic [63:0] d);
    @(negedge clk);
    reg_we = 1; reg_addr = a; reg_data = d;
    @(negedge clk);
    reg_we = 0;
  endtask

  task automatic run_group(group_cfg_t g, int tile, int ib, int ob, int h, int w);
    wr(REG_GROUP, g[63:0]);
    wr(REG_GROUP_HI, 64'(g[$bits(group_cfg_t)-1:64]));
    wr(REG_TILE, 64'(tile));
    wr(REG_IN_BASE, 64'(ib));
    wr(REG_OUT_BASE, 64'(ob));
    wr(REG_IN_H, 64'(h));
    wr(REG_IN_W, 64'(w));
    jobs = {};
    sm_starts = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!done) @(negedge clk);
  endtask

  initial begin : main
    group_cfg_t g;
    g = '0;
    g.nlayers = 2; g.pool = 1; g.cin = 3;
    g.layer[0] = '{k: 4'd3, s: 3'd1, cout: 10'd4};
    g.layer[1] = '{k: 4'd3, s: 3'd1, cout: 10'd16};
    #12 rst_n = 1;
    // 12x10x3 input: rf 6, stride 2 -> 4 x 3 outputs
    run_group(g, 5, 40, 7, 12, 10);
    check(!error, "group A ok");
    check(tile_sel == 5 && cfg == g, "group and tile forwarded");
    check(rf_size == 6 && rf_stride == 2 && rf_center == 2, "receptive field 6, stride 2, centre 2");
    check(xfer.rows == 6 && xfer.row_len == 18 && xfer.row_stride == 30 && xfer.in_len == 108 && xfer.out_len == 16,
          "transfer sizes");
    check(sm_starts == 1, "one switch-matrix set-up");
    check(jobs.size() == 12, $sformatf("%0d jobs", jobs.size()));
    for (int i = 0; i < jobs.size() && i < 12; i++) begin
      automatic int y = i / 3, x = i % 3;
      check(int'(jobs[i].in_addr) == 40 + ((2*y)*10 + 2*x)*3 && int'(jobs[i].out_addr) == 7 + i*16,
            $sformatf("job %0d: %0d %0d", i, jobs[i].in_addr, jobs[i].out_addr));
    end
    check(tile_idle, "done only after the tile drained");
    // run again on the configured tile, switch-matrix status kept
    wr(REG_CTRL, 64'd1);
    run_group(g, 5, 40, 7, 12, 10);
    check(!error && sm_starts == 0, "kept status: no set-up");
    check(jobs.size() == 12 && int'(jobs[11].in_addr) == 40 + (6*10 + 4)*3 && int'(jobs[11].out_addr) == 7 + 11*16,
          "kept status: same jobs");
    wr(REG_CTRL, 64'd0);

    // stride-2 single layer: rf 3, stride 2 on 7x7x5 -> 3 x 3
    g = '0;
    g.nlayers = 1; g.cin = 5;
    g.layer[0] = '{k: 4'd3, s: 3'd2, cout: 10'd9};
    run_group(g, 1, 0, 0, 7, 7);
    check(!error && rf_size == 3 && rf_stride == 2 && rf_center == 1, "group B geometry");
    check(jobs.size() == 9 && int'(jobs[8].in_addr) == ((4*7) + 4)*5 && int'(jobs[8].out_addr) == 8*9, "group B last job");

    // group larger than its input
    run_group(g, 1, 0, 0, 2, 7);
    check(error && sm_starts == 0 && jobs.size() == 0, "input too small flagged");
    // switch-matrix controller refuses
    refuse = 1;
    run_group(g, 1, 0, 0, 7, 7);
    check(error && jobs.size() == 0, "refused set-up flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
