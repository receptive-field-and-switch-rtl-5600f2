// tb_workload_vgg_conv5: one receptive field of a VGG conv5 block on a
// full-size 2880-crossbar tile.
//
// The group is two 3x3 convolutions 512->512 followed by 2x2 max pooling
// (the conv5 block of VGG-11/13/16/19 without its third/fourth conv). One
// pooled output needs a 6x6x512 receptive field: 18432 bytes, exactly the
// tile's 18432 DAC lanes. Layer 1 needs 16 logical 4608x512 crossbars and
// layer 2 four, each built from 36 x 4 physical 128x128 crossbars:
// (16 + 4) * 144 = 2880, the tile's whole crossbar array set. The test places
// the weights in the crossbar cells, configures the switch matrices, runs one
// receptive field through the tile pipeline and compares the 512 output
// bytes with a direct convolution, ReLU/shift, pooling and clipping.
//
// A second, full-size tile 0 (20 crossbars, 108 DACs, 64 ADCs) runs the
// first VGG-11 block (3x3 conv 3->64 with 2x2 pooling) on a 16x16 crop of
// an RGB image: g = 2, 4, so each 4x4x3 patch (48 DAC lanes) gives one
// pooled 64-channel pixel, 4 crossbars are used and the 7x7 output comes
// from 49 jobs issued in raster order with a 2-pixel step. Its weights go
// through the tile's weight port. Both results are compared byte for byte.
// VGG channel counts and kernel sizes are the network's published shape;
// the crop size, random weights and clipper gains are the test's own.
module tb_workload_vgg_conv5;
  import rfsm_pkg::*;
  import rfsm_ref_pkg::*;
  localparam int NXB = 2880, N_DAC = 18432, N_ADC = 4096;

  logic clk = 0, rst_n = 0;
  group_cfg_t cfg = '0;
  tile_xfer_t xfer = '0;
  logic sm_start = 0, sm_busy, sm_done, sm_error;
  logic job_valid = 0, job_ready;
  job_t job = '0;
  logic w_we = 0;
  logic [XB_IDX_W-1:0] w_xbar = '0;
  logic [6:0] w_row = '0, w_col = '0;
  bus_n_t w_n = '0;
  bus_t w_data = '0;
  logic h_wr_valid = 0, h_wr_ready, h_rd_valid = 0, h_rd_ready, h_rd_rvalid;
  logic [ADDR_W-1:0] h_wr_addr = '0, h_rd_addr = '0;
  bus_n_t h_wr_n = '0;
  bus_t h_wr_data = '0, h_rd_data;
  logic in_wr_valid = 0;
  logic [ADDR_W-1:0] in_wr_addr = '0;
  bus_n_t in_wr_n = '0;
  bus_t in_wr_data = '0;
  logic oe_valid, oe_ready = 1, idle;
  logic [ADDR_W-1:0] oe_addr;
  bus_n_t oe_n;
  bus_t oe_data;
  logic [31:0] n_dca, n_stall, n_lane1, n_multi, n_clip;

  rfsm_tile #(.NXB(NXB), .N_DAC(N_DAC), .N_ADC(N_ADC)) dut (.*);
  always #5 clk = ~clk;

  // tile 0 type, for the first VGG block
  group_cfg_t a_cfg = '0;
  tile_xfer_t a_xfer = '0;
  logic a_sm_start = 0, a_sm_busy, a_sm_done, a_sm_error;
  logic a_job_valid = 0, a_job_ready;
  job_t a_job = '0;
  logic a_w_we = 0;
  logic [XB_IDX_W-1:0] a_w_xbar = '0;
  logic [6:0] a_w_row = '0, a_w_col = '0;
  bus_n_t a_w_n = '0;
  bus_t a_w_data = '0;
  logic a_h_wr_valid = 0, a_h_wr_ready, a_h_rd_ready, a_h_rd_rvalid;
  logic [ADDR_W-1:0] a_h_wr_addr = '0;
  bus_n_t a_h_wr_n = '0;
  bus_t a_h_wr_data = '0, a_h_rd_data;
  logic a_oe_valid, a_idle;
  logic [ADDR_W-1:0] a_oe_addr;
  bus_n_t a_oe_n;
  bus_t a_oe_data;
  logic [31:0] a_n_dca, a_n_stall, a_n_lane1, a_n_multi, a_n_clip;

  rfsm_tile #(.NXB(20), .N_DAC(108), .N_ADC(64)) dut0 (
    .clk, .rst_n, .cfg(a_cfg), .xfer(a_xfer),
    .sm_start(a_sm_start), .sm_busy(a_sm_busy), .sm_done(a_sm_done), .sm_error(a_sm_error),
    .job_valid(a_job_valid), .job_ready(a_job_ready), .job(a_job),
    .w_we(a_w_we), .w_xbar(a_w_xbar), .w_row(a_w_row), .w_col(a_w_col), .w_n(a_w_n), .w_data(a_w_data),
    .h_wr_valid(a_h_wr_valid), .h_wr_ready(a_h_wr_ready), .h_wr_addr(a_h_wr_addr),
    .h_wr_n(a_h_wr_n), .h_wr_data(a_h_wr_data),
    .h_rd_valid(1'b0), .h_rd_ready(a_h_rd_ready), .h_rd_addr('0), .h_rd_rvalid(a_h_rd_rvalid), .h_rd_data(a_h_rd_data),
    .in_wr_valid(1'b0), .in_wr_addr('0), .in_wr_n('0), .in_wr_data('0),
    .oe_valid(a_oe_valid), .oe_ready(1'b1), .oe_addr(a_oe_addr), .oe_n(a_oe_n), .oe_data(a_oe_data),
    .idle(a_idle), .n_dca(a_n_dca), .n_stall(a_n_stall), .n_lane1(a_n_lane1), .n_multi(a_n_multi), .n_clip(a_n_clip));

  int a_out [int];
  always @(posedge clk) if (a_oe_valid)
    for (int i = 0; i < int'(a_oe_n); i++) a_out[int'(a_oe_addr) + i] = int'(a_oe_data[i]);

  int checks = 0, failures = 0, cycles = 0;
  always @(posedge clk) cycles++;
  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int out_mem [int];
  always @(posedge clk) if (oe_valid && oe_ready)
    for (int i = 0; i < int'(oe_n); i++) out_mem[int'(oe_addr) + i] = int'(oe_data[i]);

  function automatic q_t rand_q(int n, int lo, int hi);
    q_t q;
    for (int i = 0; i < n; i++) q.push_back(lo + int'($urandom_range(0, hi - lo)));
    return q;
  endfunction

  // VGG-11 block 1 on a 16x16x3 crop, on the tile 0 type
  task automatic vgg_block1();
    group_cfg_t g;
    group_geom_t geo;
    q_t img, w1, cur, exp_q;
    int oh, ow, ph, pw, n;
    g = '0;
    g.nlayers = 1; g.pool = 1; g.cin = 3; g.shift = 4;
    g.layer[0] = '{k: 4'd3, s: 3'd1, cout: 10'd64};
    geo = group_geom(g);
    check(geo.g[0] == 4 && geo.jump == 2, "block 1: 4x4 field, step 2");
    img = rand_q(16*16*3, 0, 255);
    w1  = rand_q(3*3*3*64, -4, 4);
    cur = conv_layer(img, 16, 16, 3, 3, 1, 64, w1, g.shift, oh, ow);
    exp_q = pool_clip(cur, oh, ow, 64, 1, ph, pw);
    check(ph == 7 && pw == 7, "block 1: 7x7 pooled output");
    for (int i = 0; i < img.size(); i += BUS) begin
      @(negedge clk);
      a_h_wr_valid = 1; a_h_wr_addr = 16'(i); a_h_wr_n = bus_n_t'(BUS);
      for (int j = 0; j < BUS; j++) a_h_wr_data[j] = 8'(img[i + j]);
    end
    @(negedge clk) a_h_wr_valid = 0;
    for (int p = 0; p < 4; p++)
      for (int ky = 0; ky < 3; ky++)
        for (int kx = 0; kx < 3; kx++)
          for (int c = 0; c < 3; c++)
            for (int o = 0; o < 64; o += BUS) begin
              int xb, row, col;
              weight_loc(g, 1, p, ky, kx, c, o, xb, row, col);
              @(negedge clk);
              a_w_we = 1; a_w_xbar = XB_IDX_W'(xb); a_w_row = 7'(row); a_w_col = 7'(col); a_w_n = bus_n_t'(BUS);
              for (int j = 0; j < BUS; j++) a_w_data[j] = 8'(w1[((ky*3 + kx)*3 + c)*64 + o + j]);
            end
    @(negedge clk) a_w_we = 0;
    a_cfg = g;
    a_xfer = '{rows: 8'd4, row_len: 16'd12, row_stride: 16'd48, in_len: 16'd48, out_len: 16'd64};
    a_sm_start = 1;
    @(negedge clk) a_sm_start = 0;
    while (!a_sm_done) @(negedge clk);
    check(!a_sm_error, "block 1 group accepted by tile 0");
    for (int oy = 0; oy < 7; oy++)
      for (int ox = 0; ox < 7; ox++) begin
        a_job_valid = 1;
        a_job.in_addr  = 16'(((oy*2)*16 + ox*2) * 3);
        a_job.out_addr = 16'(1000 + (oy*7 + ox) * 64);
        @(posedge clk);
        while (!a_job_ready) @(posedge clk);
        @(negedge clk) a_job_valid = 0;
      end
    @(posedge clk);
    while (!a_idle) @(posedge clk);
    n = 0;
    for (int i = 0; i < 49*64; i++)
      if (!a_out.exists(1000 + i) || a_out[1000 + i] != exp_q[i]) n++;
    for (int i = 0; i < 49*64; i++) checks++;
    failures += n;
    if (n != 0) $display("FAIL: block 1: %0d of %0d output bytes differ", n, 49*64);
    check(a_n_dca == 49, "block 1: 49 D-C-A operations");
    check(a_n_lane1 > 0, "block 1: both IB/DAR lanes used");
  endtask

  initial begin : main
    group_cfg_t g;
    group_geom_t geo;
    q_t img, w [MAX_LAYERS], cur, exp_q;
    int oh, ow, ph, pw, t0, t_dca;
    g = '0;
    g.nlayers = 2; g.pool = 1; g.cin = 512; g.shift = 9;
    g.layer[0] = '{k: 4'd3, s: 3'd1, cout: 10'd512};
    g.layer[1] = '{k: 4'd3, s: 3'd1, cout: 10'd512};
    geo = group_geom(g);
    check(geo.g[0] == 6, "receptive field 6x6");
    img  = rand_q(6*6*512, 0, 255);
    w[0] = rand_q(3*3*512*512, -3, 3);
    w[1] = rand_q(3*3*512*512, -3, 3);
    cur = conv_layer(img, 6, 6, 512, 3, 1, 512, w[0], g.shift, oh, ow);
    cur = conv_layer(cur, oh, ow, 512, 3, 1, 512, w[1], g.shift, oh, ow);
    exp_q = pool_clip(cur, oh, ow, 512, 1, ph, pw);
    check(ph == 1 && pw == 1, "one pooled output");

    #12 rst_n = 1;
    // input: 6x6x512 = 18432 bytes at address 0 of the eDRAM
    for (int i = 0; i < img.size(); i += BUS) begin
      @(negedge clk);
      h_wr_valid = 1; h_wr_addr = 16'(i); h_wr_n = bus_n_t'(BUS);
      for (int j = 0; j < BUS; j++) h_wr_data[j] = 8'(img[i + j]);
    end
    @(negedge clk) h_wr_valid = 0;
    // weights: 4.7M cells written straight into the crossbar cells at the
    // places the mapping assigns (the write port itself is exercised by the
    // tile and top-level tests; through it this load would take 5.9M cycles)
    for (int l = 1; l <= 2; l++)
      for (int p = 0; p < geo.g[l] * geo.g[l]; p++)
        for (int ky = 0; ky < 3; ky++)
          for (int kx = 0; kx < 3; kx++)
            for (int c = 0; c < 512; c++)
              for (int o = 0; o < 512; o += BUS) begin
                int xb, row, col;
                weight_loc(g, l, p, ky, kx, c, o, xb, row, col);
                for (int j = 0; j < BUS; j++)
                  dut.u_cas.wmem[(xb * XB_ROWS + row) * XB_COLS + col + j] =
                    8'(w[l-1][((ky*3 + kx)*512 + c)*512 + o + j]);
              end

    cfg = g;
    xfer = '{rows: 8'd6, row_len: 16'd3072, row_stride: 16'd3072, in_len: 16'd18432, out_len: 16'd512};
    sm_start = 1;
    @(negedge clk) sm_start = 0;
    while (!sm_done) @(negedge clk);
    check(!sm_error, "2880-crossbar group accepted");

    t0 = cycles;
    job_valid = 1; job.in_addr = 16'd0; job.out_addr = 16'd20000;
    @(posedge clk);
    while (!job_ready) @(posedge clk);
    @(negedge clk) job_valid = 0;
    fork
      begin
        @(posedge clk);
        while (n_dca == 0) @(posedge clk);
        t_dca = cycles - t0;
      end
    join_none
    @(posedge clk);
    while (!idle) @(posedge clk);
    $display("receptive field: %0d cycles to D-C-A, %0d cycles in all", t_dca, cycles - t0);
    // eI 6 rows x 384 chunks, ID 2304, DD 2304 transfer cycles at 8 bytes/cycle
    check(t_dca >= 3 * 2304, "transfer of 18432 bytes takes at least 3 x 2304 cycles");
    for (int i = 0; i < 512; i++)
      check(out_mem.exists(20000 + i) && out_mem[20000 + i] == exp_q[i],
            $sformatf("output channel %0d: %0d vs %0d", i, out_mem.exists(20000 + i) ? out_mem[20000 + i] : -1, exp_q[i]));
    check(n_dca == 1, "one D-C-A");
    vgg_block1();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
