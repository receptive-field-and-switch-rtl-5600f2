// tb_crossbar_array_set: the crossbar array set on 8x8 crossbars.
// Group 1 fuses three layers (conv 2x2 3->10, conv 2x2 10->5, conv 1x1
// 5->6) with 2x2 pooling; its layers need column-split and row-stacked
// crossbars. Group 2 is a single 3x3 conv without pooling. For each, the
// switch matrices are configured through the internal controller, weights
// are written through the programming port, random DAC levels are applied
// and one D-C-A is performed; every output lane is compared with a direct
// convolution -> ReLU/shift -> max-pool -> clip reference.
module tb_crossbar_array_set;
  import rfsm_pkg::*;
  import rfsm_ref_pkg::*;
  localparam int NXB = 64, R = 8, C = 8, N_DAC = 48, N_ADC = 8;

  logic clk = 0, rst_n = 0;
  logic w_we = 0;
  logic [XB_IDX_W-1:0] w_xbar = '0;
  logic [6:0] w_row = '0, w_col = '0;
  bus_n_t w_n = '0;
  bus_t w_data = '0;
  group_cfg_t cfg = '0;
  logic sm_start = 0, sm_busy, sm_done, sm_error, dca = 0;
  analog_t dac_level [N_DAC];
  analog_t out_level [N_ADC];
  logic [31:0] rc_clip_count;

  crossbar_array_set #(.NXB(NXB), .N_DAC(N_DAC), .N_ADC(N_ADC), .MAX_NODES(256), .ROWS(R), .COLS(C)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic q_t rand_q(int n, int lo, int hi);
    q_t q;
    for (int i = 0; i < n; i++) q.push_back(lo + int'($urandom_range(0, hi - lo)));
    return q;
  endfunction

  task automatic configure(group_cfg_t g);
    @(negedge clk);
    cfg = g; sm_start = 1;
    @(negedge clk);
    sm_start = 0;
    while (!sm_done) @(negedge clk);
    checks++;
    if (sm_error) begin failures++; $display("FAIL: group refused"); end
  endtask

  task automatic load(group_cfg_t g, q_t wt [MAX_LAYERS]);
    group_geom_t geo = group_geom(g);
    for (int l = 1; l <= int'(g.nlayers); l++) begin
      automatic int k = g.layer[l-1].k, ci = geo.ch[l-1], co = geo.ch[l];
      for (int p = 0; p < geo.g[l] * geo.g[l]; p++)
        for (int ky = 0; ky < k; ky++)
          for (int kx = 0; kx < k; kx++)
            for (int c = 0; c < ci; c++)
              for (int o = 0; o < co; o++) begin
                int xb, row, col;
                weight_loc(g, l, p, ky, kx, c, o, xb, row, col, R, C);
                @(negedge clk);
                w_we = 1; w_xbar = XB_IDX_W'(xb); w_row = 7'(row); w_col = 7'(col); w_n = 1;
                w_data[0] = 8'(wt[l-1][((ky*k + kx)*ci + c)*co + o]);
              end
    end
    @(negedge clk) w_we = 0;
  endtask

  task automatic trial(group_cfg_t g, q_t wt [MAX_LAYERS]);
    group_geom_t geo = group_geom(g);
    int g0 = geo.g[0], oh, ow, oh2, ow2, cl;
    q_t in, cur, exp_q;
    int hh, ww, ch;
    in = rand_q(g0 * g0 * g.cin, 0, 255);
    cur = in; hh = g0; ww = g0; ch = g.cin;
    for (int l = 0; l < int'(g.nlayers); l++) begin
      cur = conv_layer(cur, hh, ww, ch, g.layer[l].k, g.layer[l].s, g.layer[l].cout, wt[l], g.shift, oh, ow);
      hh = oh; ww = ow; ch = g.layer[l].cout;
    end
    exp_q = pool_clip(cur, hh, ww, ch, g.pool, oh2, ow2);
    cl = ch;
    @(negedge clk);
    for (int i = 0; i < N_DAC; i++) dac_level[i] = (i < in.size()) ? in[i] : 0;
    dca = 1;
    @(negedge clk);
    dca = 0;
    for (int j = 0; j < N_ADC; j++) begin
      checks++;
      if (out_level[j] != ((j < cl) ? exp_q[j] : 0)) begin
        failures++;
        $display("FAIL lane %0d: %0d vs %0d", j, out_level[j], (j < cl) ? exp_q[j] : 0);
      end
    end
  endtask

  initial begin : main
    group_cfg_t g1, g2;
    q_t w1 [MAX_LAYERS], w2 [MAX_LAYERS];
    int clips0;
    for (int i = 0; i < N_DAC; i++) dac_level[i] = 0;
    g1 = '0;
    g1.nlayers = 3; g1.pool = 1; g1.cin = 3; g1.shift = 4;
    g1.layer[0] = '{k: 4'd2, s: 3'd1, cout: 10'd10};
    g1.layer[1] = '{k: 4'd2, s: 3'd1, cout: 10'd5};
    g1.layer[2] = '{k: 4'd1, s: 3'd1, cout: 10'd6};
    w1[0] = rand_q(2*2*3*10, -5, 8);
    w1[1] = rand_q(2*2*10*5, -5, 8);
    w1[2] = rand_q(1*1*5*6, -5, 8);
    g2 = '0;
    g2.nlayers = 1; g2.pool = 0; g2.cin = 4; g2.shift = 3;
    g2.layer[0] = '{k: 4'd3, s: 3'd2, cout: 10'd7};
    w2[0] = rand_q(3*3*4*7, -6, 6);

    #12 rst_n = 1;
    configure(g1);
    load(g1, w1);
    clips0 = rc_clip_count;
    for (int t = 0; t < 6; t++) trial(g1, w1);
    checks++;
    if (rc_clip_count == clips0) begin failures++; $display("FAIL: no reverse clipping seen"); end

    configure(g2);
    load(g2, w2);
    for (int t = 0; t < 6; t++) trial(g2, w2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
