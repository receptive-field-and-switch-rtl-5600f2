// tb_rfsm_top: end-to-end test of the full RFSM chip at its default sizes.
//
// Runs a two-group network through the host port:
//   group A on tile 0 (20 crossbars, 108 DACs): 8x8x3 input, conv 3x3 3->4,
//     conv 3x3 4->36, 2x2 max pooling; receptive field 6x6x3 = 108 DAC
//     lanes, 16 + 4 crossbars, 4 receptive fields; the 2x2x36 result goes
//     from tile 0's output buffer into tile 1's eDRAM.
//   group B on tile 1: conv 2x2 36->130 (144 rows, 130 columns: every
//     logical crossbar spans 2x2 physical ones); the 130-byte result goes
//     into tile 2's eDRAM and is read back by the host.
// Weights and inputs are random; the expected bytes come from rfsm_ref_pkg.
// Mechanisms that must occur at least once: analog chaining of two layers,
// max pooling, row- and column-spanning crossbars, reverse-clipper cut-off,
// bidirectional-clipper saturation, the second IB/DAR lane, multi-cycle
// transfers, pipeline stalls, and one D-C-A per receptive field.
// Group A is then run again on a second image with the keep-status bit
// (REG_CTRL bit 0): tile 0 reuses its switch matrices, which must save at
// least the 20 x 128 set-up cycles and still give the exact result.
module tb_rfsm_top;
  import rfsm_pkg::*;
  import rfsm_ref_pkg::*;

  localparam int NT = NUM_TILES;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cmd_valid = 1'b0, cmd_ready, rsp_valid, busy, done, error;
  host_cmd_t cmd = '0;
  logic [63:0] rsp_data;
  logic [7:0] rf_size, rf_stride, rf_center;
  logic [31:0] n_dca [NT], n_stall [NT], n_lane1 [NT], n_multi [NT], n_clip [NT];

  rfsm_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycles = 0;
  always @(posedge clk) cycles++;

  initial begin
    #20_000_000;
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
    group_cfg_t ga, gb;
    q_t wa [MAX_LAYERS], wb [MAX_LAYERS];
    q_t img, exp_a, exp_b, got;
    int oh, ow, oh2, ow2, za, sa, zb, sb, t0, t1, t2;

    ga = '0;
    ga.nlayers = 2; ga.pool = 1'b1; ga.cin = 3; ga.shift = 5;
    ga.layer[0] = '{k: 4'd3, s: 3'd1, cout: 10'd4};
    ga.layer[1] = '{k: 4'd3, s: 3'd1, cout: 10'd36};
    gb = '0;
    gb.nlayers = 1; gb.pool = 1'b0; gb.cin = 36; gb.shift = 6;
    gb.layer[0] = '{k: 4'd2, s: 3'd1, cout: 10'd130};

    img   = rand_q(8*8*3, 0, 255);
    wa[0] = rand_q(3*3*3*4, -6, 8);
    wa[1] = rand_q(3*3*4*36, -6, 8);
    wb[0] = rand_q(2*2*36*130, -7, 8);

    exp_a = ref_group(img, 8, 8, ga, wa, oh, ow, za, sa);
    exp_b = ref_group(exp_a, oh, ow, gb, wb, oh2, ow2, zb, sb);
    check(oh == 2 && ow == 2 && oh2 == 1 && ow2 == 1, "reference shapes");

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    wr_bytes(0, 0, img);
    load_weights(0, ga, wa);
    load_weights(1, gb, wb);

    t0 = cycles;
    run_group(0, ga, 0, 0, 8, 8);
    t1 = cycles;
    $display("group A: %0d cycles, rf size %0d stride %0d centre %0d", t1 - t0, rf_size, rf_stride, rf_center);
    check(rf_size == 6 && rf_stride == 2 && rf_center == 2, "receptive field of group A is 6x6, stride 2");
    rd_bytes(1, 0, 2*2*36, got);
    for (int i = 0; i < 2*2*36; i++) check(got[i] == exp_a[i], $sformatf("group A byte %0d: %0d vs %0d", i, got[i], exp_a[i]));

    run_group(1, gb, 0, 100, 2, 2);
    rd_bytes(2, 100, 130, got);
    for (int i = 0; i < 130; i++) check(got[i] == exp_b[i], $sformatf("group B byte %0d: %0d vs %0d", i, got[i], exp_b[i]));

    // mechanisms
    $display("dca %0d/%0d stall %0d lane1 %0d multi %0d clip %0d/%0d ref zero %0d/%0d sat %0d/%0d",
             n_dca[0], n_dca[1], n_stall[0], n_lane1[0], n_multi[0], n_clip[0], n_clip[1], za, zb, sa, sb);
    check(n_dca[0] == 4, "one D-C-A per receptive field in group A");
    check(n_dca[1] == 1, "one D-C-A in group B");
    check(n_lane1[0] > 0, "second IB/DAR lane used");
    check(n_multi[0] > 0, "multi-cycle transfers");
    check(n_stall[0] > 0, "pipeline stalls happened");
    check(n_clip[0] > 0 && n_clip[1] > 0, "reverse clippers cut off negative currents");
    check(sa + sb > 0, "bidirectional clipper saturated an output");

    // second image through the configured tile 0, switch matrices kept
    begin
      q_t img2, exp2;
      int z2, s2;
      img2 = rand_q(8*8*3, 0, 255);
      exp2 = ref_group(img2, 8, 8, ga, wa, oh, ow, z2, s2);
      wr_bytes(0, 400, img2);
      wr_reg(REG_CTRL, 64'd1);
      t2 = cycles;
      run_group(0, ga, 400, 200, 8, 8);
      t2 = cycles - t2;
      wr_reg(REG_CTRL, 64'd0);
      $display("group A again with kept switch status: %0d cycles (first run %0d)", t2, t1 - t0);
      check(t2 + 20 * XB_ROWS <= t1 - t0, "kept status saves the switch-matrix set-up");
      check(n_dca[0] == 8, "four more D-C-A operations");
      rd_bytes(1, 200, 2*2*36, got);
      for (int i = 0; i < 2*2*36; i++) check(got[i] == exp2[i], $sformatf("rerun byte %0d: %0d vs %0d", i, got[i], exp2[i]));
    end

    // an oversized group is refused by the switch-matrix controller
    begin
      group_cfg_t gx = ga;
      gx.layer[1].cout = 10'd200;     // needs 20 + 4 crossbars and 200 ADC lanes on tile 0
      wr_reg(REG_GROUP, gx[63:0]);
      wr_reg(REG_TILE, 64'd0);
      begin
        host_cmd_t c = '0;
        c.op = OP_START;
        send(c);
      end
      @(posedge clk);
      while (busy) @(posedge clk);
      check(error, "oversized group flagged");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
