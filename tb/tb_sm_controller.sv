// tb_sm_controller: configures a two-layer group on 8x8 crossbars whose
// layers need row-stacked and column-split crossbars, records every switch
// status the controller writes, and checks each word line against the
// connection worked out from the convolution (which input pixel/channel or
// which previous-layer output it must see), each crossbar's role, unused
// word lines, the cycle count (X*ROWS + 3 from start to done) and the
// refusal of a group that does not fit.
module tb_sm_controller;
  import rfsm_pkg::*;
  import rfsm_ref_pkg::*;
  localparam int NXB = 24, R = 8, C = 8, N_DAC = 32, N_ADC = 16;
  localparam int XW = $clog2(NXB), RW = $clog2(NXB * R);

  logic clk = 0, rst_n = 0, start = 0;
  group_cfg_t cfg = '0;
  logic clear, xcfg_we, route_we, busy, done, error;
  logic [XW-1:0] xcfg_idx;
  xbar_cfg_t xcfg_data;
  logic [RW-1:0] route_idx;
  route_t route_data;

  sm_controller #(.NXB(NXB), .N_DAC(N_DAC), .N_ADC(N_ADC), .MAX_NODES(256), .ROWS(R), .COLS(C)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  route_t    rt [NXB * R];
  xbar_cfg_t xc [NXB];
  bit        rt_w [NXB * R];
  int cyc = 0, t_start = 0, t_done = 0;
  always @(posedge clk) begin
    cyc++;
    if (clear) for (int x = 0; x < NXB; x++) xc[x] = '0;
    if (route_we) begin rt[route_idx] = route_data; rt_w[route_idx] = 1; end
    if (xcfg_we) xc[xcfg_idx] = xcfg_data;
  end

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

  task automatic run(group_cfg_t g);
    @(negedge clk);
    cfg = g; start = 1;
    t_start = cyc + 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    t_done = cyc;
  endtask

  initial begin : main
    group_cfg_t g;
    group_geom_t geo;
    int used [NXB * R];
    g = '0;
    g.nlayers = 2; g.cin = 3; g.pool = 0;
    g.layer[0] = '{k: 4'd2, s: 3'd1, cout: 10'd10};   // 12 rows, 10 cols: 2x2 crossbars
    g.layer[1] = '{k: 4'd2, s: 3'd1, cout: 10'd4};    // 40 rows: 5 stacked crossbars
    geo = group_geom(g);
    #12 rst_n = 1;
    run(g);
    check(!error, "group fits");
    check(t_done - t_start == 21 * R + 3, $sformatf("cycles %0d", t_done - t_start));
    foreach (used[i]) used[i] = 0;
    for (int l = 1; l <= 2; l++) begin
      automatic int k = g.layer[l-1].k, s = g.layer[l-1].s, ci = geo.ch[l-1], co = geo.ch[l];
      automatic int gl = geo.g[l], gp = geo.g[l-1];
      for (int py = 0; py < gl; py++)
        for (int px = 0; px < gl; px++)
          for (int ky = 0; ky < k; ky++)
            for (int kx = 0; kx < k; kx++)
              for (int c = 0; c < ci; c++)
                for (int o = 0; o < co; o += C) begin
                  int xb, row, col, src;
                  weight_loc(g, l, py*gl + px, ky, kx, c, o, xb, row, col, R, C);
                  src = ((py*s + ky)*gp + (px*s + kx))*ci + c;
                  used[xb*R + row] = 1;
                  check(rt[xb*R + row].kind == (l == 1 ? SRC_DAC : SRC_NODE) && int'(rt[xb*R + row].idx) == src,
                        $sformatf("layer %0d pos %0d,%0d row (%0d,%0d,%0d) xb %0d row %0d", l, py, px, ky, kx, c, xb, row));
                  check(xc[xb].valid && int'(xc[xb].layer) == l && int'(xc[xb].pos) == py*gl + px &&
                        int'(xc[xb].hblk) == o / C && int'(xc[xb].ncols) == ((co - o > C) ? C : co - o),
                        $sformatf("role of crossbar %0d", xb));
                end
    end
    for (int i = 0; i < 21 * R; i++) if (!used[i]) check(rt_w[i] && rt[i].kind == SRC_NONE, $sformatf("idle row %0d", i));
    for (int x = 21; x < NXB; x++) check(!xc[x].valid, "unused crossbar released");

    // a group needing more than NXB crossbars is refused
    g.layer[1].cout = 10'd20;       // now 16 + 5*3 = 31 crossbars
    run(g);
    check(error, "oversized group refused");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
