// tb_rfsm_top_all2880: the chip variant in which every tile has 2880
// crossbars, 18432 DACs and 4096 ADCs, built with two such tiles.
//
// In the default chip tile 0 has only 20 crossbars, so the first VGG block
// (3x3 conv 3->64, 3x3 conv 64->64, 2x2 pooling) cannot be fused there: it
// needs 16 x 1 + 4 x 5 = 36 crossbars. With ALL_2880 tile 0 runs it as one
// layer group. The test programs the weights through the host port, runs a
// 10x10x3 crop (receptive field 6x6x3, step 2, 3x3 pooled outputs, 9
// receptive fields), reads the 576-byte result back from tile 1's eDRAM and
// compares it with a direct convolution, ReLU/shift, pooling and clipping.
// It also checks one D-C-A per receptive field. The channel counts are
// VGG's; crop size, random data and the clipper gain are the test's own.
module tb_rfsm_top_all2880;
  import rfsm_pkg::*;
  import rfsm_ref_pkg::*;

  localparam int NT = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cmd_valid = 1'b0, cmd_ready, rsp_valid, busy, done, error;
  host_cmd_t cmd = '0;
  logic [63:0] rsp_data;
  logic [7:0] rf_size, rf_stride, rf_center;
  logic [31:0] n_dca [NT], n_stall [NT], n_lane1 [NT], n_multi [NT], n_clip [NT];

  rfsm_top #(.NT(NT), .ALL_2880(1'b1)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycles = 0;
  always @(posedge clk) cycles++;

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic send(host_cmd_t c);
    @(negedge clk);
    cmd = c;
    cmd_valid = 1'b1;
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    @(negedge clk);
    cmd_valid = 1'b0;
    cmd.op = OP_NOP;
  endtask

  task automatic wr_reg(logic [3:0] a, logic [63:0] d);
    host_cmd_t c = '0;
    c.op = OP_WR_REG; c.addr = 16'(a); c.data = d;
    send(c);
  endtask

  task automatic wr_bytes(int tile, int addr, q_t d);
    for (int i = 0; i < d.size(); i += BUS) begin
      host_cmd_t c = '0;
      c.op = OP_WR_EDRAM; c.tile = 4'(tile); c.addr = 16'(addr + i);
      c.n = bus_n_t'((d.size() - i > BUS) ? BUS : d.size() - i);
      for (int j = 0; j < BUS; j++) if (i + j < d.size()) c.data[j] = 8'(d[i + j]);
      send(c);
    end
  endtask

  task automatic rd_bytes(int tile, int addr, int n, ref q_t d);
    d = {};
    for (int i = 0; i < n; i += BUS) begin
      host_cmd_t c = '0;
      c.op = OP_RD_EDRAM; c.tile = 4'(tile); c.addr = 16'(addr + i);
      send(c);
      while (!rsp_valid) @(posedge clk);
      for (int j = 0; j < BUS; j++) if (i + j < n) d.push_back(int'(rsp_data[8*j +: 8]));
    end
  endtask

  // program weights wt[l-1] of every position of the group
  task automatic load_weights(int tile, group_cfg_t g, q_t wt [MAX_LAYERS]);
    group_geom_t geo = group_geom(g);
    for (int l = 1; l <= int'(g.nlayers); l++) begin
      int k = g.layer[l-1].k, ci = geo.ch[l-1], co = geo.ch[l];
      for (int p = 0; p < geo.g[l] * geo.g[l]; p++)
        for (int ky = 0; ky < k; ky++)
          for (int kx = 0; kx < k; kx++)
            for (int c = 0; c < ci; c++) begin
              host_cmd_t cm = '0;
              int xb, row, col;
              cm.op = OP_WR_WEIGHT; cm.tile = 4'(tile);
              for (int o = 0; o < co; o++) begin
                weight_loc(g, l, p, ky, kx, c, o, xb, row, col);
                if (cm.n != 0 && (int'(cm.xbar) != xb || int'(cm.row) != row ||
                                  int'(cm.col) + int'(cm.n) != col || cm.n == BUS)) begin
                  send(cm);
                  cm.n = 0;
                end
                if (cm.n == 0) begin
                  cm.xbar = XB_IDX_W'(xb); cm.row = 7'(row); cm.col = 7'(col); cm.data = '0;
                end
                cm.data[cm.n] = 8'(wt[l-1][((ky*k + kx)*ci + c)*co + o]);
                cm.n++;
              end
              send(cm);
            end
    end
  endtask

  task automatic run_group(int tile, group_cfg_t g, int in_base, int out_base, int h, int w);
    wr_reg(REG_GROUP, g[63:0]);
    wr_reg(REG_GROUP_HI, 64'(g[$bits(group_cfg_t)-1:64]));
    wr_reg(REG_TILE, 64'(tile));
    wr_reg(REG_IN_BASE, 64'(in_base));
    wr_reg(REG_OUT_BASE, 64'(out_base));
    wr_reg(REG_IN_H, 64'(h));
    wr_reg(REG_IN_W, 64'(w));
    begin
      host_cmd_t c = '0;
      c.op = OP_START;
      send(c);
    end
    @(posedge clk);
    while (busy) @(posedge clk);
    check(!error, "group ran without error");
  endtask

  // reference of a group on an h x w input
  function automatic q_t ref_group(q_t in, int h, int w, group_cfg_t g, q_t wt [MAX_LAYERS],
                                   output int oh, output int ow, output int n_zero, output int n_sat);
    q_t cur = in;
    int ch = g.cin, hh = h, ww = w;
    n_zero = 0; n_sat = 0;
    for (int l = 0; l < int'(g.nlayers); l++) begin
      int nh, nw;
      cur = conv_layer(cur, hh, ww, ch, g.layer[l].k, g.layer[l].s, g.layer[l].cout, wt[l], g.shift, nh, nw);
      hh = nh; ww = nw; ch = g.layer[l].cout;
      foreach (cur[i]) if (cur[i] == 0) n_zero++;
    end
    foreach (cur[i]) if (cur[i] > 255) n_sat++;
    return pool_clip(cur, hh, ww, ch, g.pool, oh, ow);
  endfunction

  function automatic q_t rand_q(int n, int lo, int hi);
    q_t q;
    for (int i = 0; i < n; i++) q.push_back(lo + int'($urandom_range(0, hi - lo)));
    return q;
  endfunction

  initial begin : main
    group_cfg_t g;
    q_t w [MAX_LAYERS], img, cur, exp_q, got;
    int oh, ow, ph, pw;
    g = '0;
    g.nlayers = 2; g.pool = 1'b1; g.cin = 3; g.shift = 6;
    g.layer[0] = '{k: 4'd3, s: 3'd1, cout: 10'd64};
    g.layer[1] = '{k: 4'd3, s: 3'd1, cout: 10'd64};
    img  = rand_q(10*10*3, 0, 255);
    w[0] = rand_q(3*3*3*64, -4, 5);
    w[1] = rand_q(3*3*64*64, -3, 3);
    cur = conv_layer(img, 10, 10, 3, 3, 1, 64, w[0], g.shift, oh, ow);
    cur = conv_layer(cur, oh, ow, 64, 3, 1, 64, w[1], g.shift, oh, ow);
    exp_q = pool_clip(cur, oh, ow, 64, 1, ph, pw);
    check(ph == 3 && pw == 3, "reference: 3x3 pooled output");

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    wr_bytes(0, 0, img);
    load_weights(0, g, w);
    run_group(0, g, 0, 0, 10, 10);
    check(rf_size == 6 && rf_stride == 2 && rf_center == 2, "receptive field 6x6, step 2");
    check(n_dca[0] == 9, $sformatf("one D-C-A per receptive field (%0d)", n_dca[0]));
    rd_bytes(1, 0, 9*64, got);
    for (int i = 0; i < 9*64; i++)
      check(got[i] == exp_q[i], $sformatf("byte %0d: %0d vs %0d", i, got[i], exp_q[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
