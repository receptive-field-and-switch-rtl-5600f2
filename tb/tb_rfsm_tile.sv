// tb_rfsm_tile: one input-type tile (20 crossbars, 108 DACs, 64 ADCs) runs
// a fused group (conv 3x3 3->4, conv 3x3 4->8, 2x2 pooling) over a 10x8x3
// input stored in its eDRAM: six receptive fields of 6x6x3. The outputs
// leaving on the Oe port are compared with a reference convolution. While
// the tile works, the testbench also plays the previous tile writing into
// this eDRAM at the same time as the host, and checks the host write waits
// and both land; finally it reads bytes back through the host port.
module tb_rfsm_tile;
  import rfsm_pkg::*;
  import rfsm_ref_pkg::*;

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

  rfsm_tile dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
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

  task automatic host_write(int addr, q_t d);
    for (int i = 0; i < d.size(); i += BUS) begin
      @(negedge clk);
      h_wr_valid = 1; h_wr_addr = 16'(addr + i);
      h_wr_n = bus_n_t'((d.size() - i > BUS) ? BUS : d.size() - i);
      for (int j = 0; j < BUS; j++) h_wr_data[j] = (i + j < d.size()) ? 8'(d[i + j]) : 8'h00;
      @(posedge clk);
      while (!h_wr_ready) @(posedge clk);
    end
    @(negedge clk) h_wr_valid = 0;
  endtask

  task automatic host_read(int addr, output bus_t d);
    @(negedge clk);
    h_rd_valid = 1; h_rd_addr = 16'(addr);
    @(posedge clk);
    while (!h_rd_ready) @(posedge clk);
    @(negedge clk) h_rd_valid = 0;
    while (!h_rd_rvalid) @(negedge clk);
    d = h_rd_data;
  endtask

  initial begin : main
    group_cfg_t g;
    group_geom_t geo;
    q_t img, w [MAX_LAYERS], cur, exp_q;
    int oh, ow, ph, pw, hh, ww, ch;
    bus_t d;
    g = '0;
    g.nlayers = 2; g.pool = 1; g.cin = 3; g.shift = 5;
    g.layer[0] = '{k: 4'd3, s: 3'd1, cout: 10'd4};
    g.layer[1] = '{k: 4'd3, s: 3'd1, cout: 10'd8};
    geo = group_geom(g);
    img  = rand_q(10*8*3, 0, 255);
    w[0] = rand_q(3*3*3*4, -6, 8);
    w[1] = rand_q(3*3*4*8, -6, 8);
    // reference: whole output map, then pooled
    cur = img; hh = 10; ww = 8; ch = 3;
    for (int l = 0; l < 2; l++) begin
      cur = conv_layer(cur, hh, ww, ch, g.layer[l].k, g.layer[l].s, g.layer[l].cout, w[l], g.shift, oh, ow);
      hh = oh; ww = ow; ch = g.layer[l].cout;
    end
    exp_q = pool_clip(cur, hh, ww, ch, 1, ph, pw);
    check(ph == 3 && pw == 2, "reference output is 3x2");

    #12 rst_n = 1;
    host_write(0, img);
    // weights through the programming port
    for (int l = 1; l <= 2; l++) begin
      automatic int k = g.layer[l-1].k, ci = geo.ch[l-1], co = geo.ch[l];
      for (int p = 0; p < geo.g[l] * geo.g[l]; p++)
        for (int ky = 0; ky < k; ky++)
          for (int kx = 0; kx < k; kx++)
            for (int c = 0; c < ci; c++)
              for (int o = 0; o < co; o++) begin
                int xb, row, col;
                weight_loc(g, l, p, ky, kx, c, o, xb, row, col);
                @(negedge clk);
                w_we = 1; w_xbar = XB_IDX_W'(xb); w_row = 7'(row); w_col = 7'(col); w_n = 1;
                w_data[0] = 8'(w[l-1][((ky*k + kx)*ci + c)*co + o]);
              end
    end
    @(negedge clk) w_we = 0;
    cfg = g;
    xfer = '{rows: 8'd6, row_len: 16'd18, row_stride: 16'd24, in_len: 16'd108, out_len: 16'd8};
    sm_start = 1;
    @(negedge clk) sm_start = 0;
    while (!sm_done) @(negedge clk);
    check(!sm_error, "group configured");

    fork
      begin
        for (int y = 0; y < 3; y++)
          for (int x = 0; x < 2; x++) begin
            @(negedge clk);
            job_valid = 1;
            job.in_addr  = 16'((2*y*8 + 2*x) * 3);
            job.out_addr = 16'(500 + (y*2 + x) * 8);
            @(posedge clk);
            while (!job_ready) @(posedge clk);
            @(negedge clk) job_valid = 0;
          end
      end
      begin
        // previous tile and host write the eDRAM in the same cycles
        repeat (30) @(negedge clk);
        in_wr_valid = 1; in_wr_addr = 16'd1000; in_wr_n = 4; in_wr_data = 64'h00000000_44332211;
        h_wr_valid = 1; h_wr_addr = 16'd1004; h_wr_n = 4; h_wr_data = 64'h00000000_88776655;
        #1;
        check(!h_wr_ready, "host write waits for the previous tile");
        @(negedge clk);
        in_wr_valid = 0;
        #1;
        check(h_wr_ready, "host write proceeds");
        @(negedge clk);
        h_wr_valid = 0;
      end
    join
    @(posedge clk);
    while (!idle) @(posedge clk);
    for (int i = 0; i < 3*2*8; i++)
      check(out_mem.exists(500 + i) && out_mem[500 + i] == exp_q[i], $sformatf("output byte %0d", i));
    check(n_dca == 6, "six D-C-A operations");
    host_read(1000, d);
    check(d == 64'h88776655_44332211, $sformatf("both writes landed: %h", d));
    host_read(3, d);
    check(d[0] == 8'(img[3]) && d[7] == 8'(img[10]), "host read of the input");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
