// sm_controller: switch-matrix controller of a crossbar array set.
//
// Given a layer group (up to three fused conv layers, optional 2x2 pooling)
// it decides which physical crossbars work for which layer and sets the
// switch matrices so that every working word line is driven either by a DAC
// lane (first layer) or by an analog output node of the previous layer.
// This is done once per group, before any receptive field is processed.
//
// Mapping. Layer l needs a g_l x g_l grid of outputs (g_L = 2 with pooling,
// else 1; g_{l-1} = (g_l-1)*s_l + k_l, so g_0 is the receptive-field side).
// Each grid position is one logical crossbar with k_l*k_l*C_{l-1} rows and
// C_l columns, made of V x H physical XB_ROWS x XB_COLS crossbars: V blocks
// stacked on joined bit lines (their column currents add) and H column
// blocks side by side. Logical row (ky,kx,c) of position (py,px) connects to
// node ((py*s+ky)*g_{l-1} + (px*s+kx))*C_{l-1} + c of the previous layer
// (for l = 1 that node number is the DAC lane). Physical crossbars are
// handed out in order: layer, py, px, column block, row block.
//
// Interface/timing. A `start` pulse samples cfg. One cycle checks that the
// group fits (crossbars <= NXB, DAC lanes <= N_DAC, output channels <=
// N_ADC, nodes <= MAX_NODES); a misfit ends at once with `error`. Otherwise
// `clear` pulses for one cycle (all crossbars released), then one word-line
// entry is written per cycle (route_we), with the crossbar's role written
// together with its row 0 (xcfg_we); `done` pulses after the last entry,
// X*ROWS + 3 cycles after the start pulse for a group of X crossbars. The document gives the
// controller's job (rows from the input size, columns from the output size,
// connection from the receptive-field relation); the mapping formulas,
// allocation order and write protocol are this implementation's.
module sm_controller
  import rfsm_pkg::*;
#(
  parameter int unsigned NXB       = 20,
  parameter int unsigned N_DAC     = 108,
  parameter int unsigned N_ADC     = 64,
  parameter int unsigned MAX_NODES = 8192,
  parameter int unsigned ROWS      = XB_ROWS,
  parameter int unsigned COLS      = XB_COLS,
  localparam int unsigned XW = (NXB > 1) ? $clog2(NXB) : 1,
  localparam int unsigned RW = $clog2(NXB * ROWS)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  group_cfg_t  cfg,
  output logic        clear,
  output logic        xcfg_we,
  output logic [XW-1:0] xcfg_idx,
  output xbar_cfg_t   xcfg_data,
  output logic        route_we,
  output logic [RW-1:0] route_idx,
  output route_t      route_data,
  output logic        busy,
  output logic        done,
  output logic        error
);
  typedef enum logic [2:0] {S_IDLE, S_CHECK, S_CLEAR, S_RUN, S_DONE} state_e;
  state_e state_q;

  group_cfg_t  cfg_q;
  group_geom_t geo;
  assign geo = group_geom(cfg_q);

  // loop counters
  logic [1:0]  l_q;
  logic [7:0]  py_q, px_q;
  logic [3:0]  h_q;
  logic [7:0]  v_q;
  logic [7:0]  r_q;
  logic [XW:0] x_q;
  logic [15:0] lr_q;                 // logical row within the column block
  logic [CH_W-1:0] c_q;
  logic [3:0]  kx_q, ky_q;

  // current layer parameters
  int unsigned k, s, cin, cout, gprev, g, nrows, nv, nh;
  always_comb begin
    k     = cfg_q.layer[l_q - 2'd1].k;
    s     = cfg_q.layer[l_q - 2'd1].s;
    cin   = geo.ch[l_q - 2'd1];
    cout  = geo.ch[l_q];
    gprev = geo.g[l_q - 2'd1];
    g     = geo.g[l_q];
    nrows = k * k * cin;
    nv    = ceil_div(nrows, ROWS);
    nh    = ceil_div(cout, COLS);
  end

  // resource check for the whole group
  logic fits;
  always_comb begin
    int unsigned tot, gl, cl, kl;
    tot  = 0;
    gl   = 0;
    cl   = 0;
    kl   = 0;
    fits = (cfg_q.nlayers != 0);
    for (int l = 1; l <= MAX_LAYERS; l++) begin
      if (l <= int'(cfg_q.nlayers)) begin
        gl = geo.g[l];
        cl = geo.ch[l];
        kl = cfg_q.layer[l-1].k;
        tot = tot + gl * gl * ceil_div(kl * kl * geo.ch[l-1], ROWS) * ceil_div(cl, COLS);
        if (cl == 0 || kl == 0 || cfg_q.layer[l-1].s == 0) fits = 1'b0;
        if (gl * gl * cl > MAX_NODES || gl * gl > 256 || ceil_div(cl, COLS) > 15) fits = 1'b0;
      end
    end
    if (tot > NXB) fits = 1'b0;
    if (32'(geo.g[0]) * 32'(geo.g[0]) * 32'(cfg_q.cin) > N_DAC || cfg_q.cin == 0) fits = 1'b0;
    if (32'(geo.ch[cfg_q.nlayers]) > N_ADC) fits = 1'b0;
  end

  // entry being written this cycle
  always_comb begin
    int unsigned node;
    node = ((32'(py_q) * s + 32'(ky_q)) * gprev + (32'(px_q) * s + 32'(kx_q))) * cin + 32'(c_q);
    route_we   = (state_q == S_RUN);
    route_idx  = RW'(32'(x_q) * ROWS + 32'(r_q));
    route_data = '0;
    if (32'(lr_q) < nrows) begin
      route_data.kind = (l_q == 2'd1) ? SRC_DAC : SRC_NODE;
      route_data.idx  = NODE_W'(node);
    end else begin
      route_data.kind = SRC_NONE;
    end
    xcfg_we   = (state_q == S_RUN) && (r_q == 0);
    xcfg_idx  = XW'(x_q);
    xcfg_data.valid = 1'b1;
    xcfg_data.layer = l_q;
    xcfg_data.pos   = 8'(32'(py_q) * g + 32'(px_q));
    xcfg_data.hblk  = h_q;
    xcfg_data.ncols = 8'((cout - 32'(h_q) * COLS > COLS) ? COLS : cout - 32'(h_q) * COLS);
  end

  assign clear = (state_q == S_CLEAR);
  assign busy  = (state_q != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      cfg_q   <= '0;
      {l_q, py_q, px_q, h_q, v_q, r_q, x_q, lr_q, c_q, kx_q, ky_q} <= '0;
      done    <= 1'b0;
      error   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          cfg_q   <= cfg;
          error   <= 1'b0;
          state_q <= S_CHECK;
        end
        S_CHECK: begin
          {py_q, px_q, h_q, v_q, r_q, x_q, lr_q, c_q, kx_q, ky_q} <= '0;
          l_q <= 2'd1;
          if (fits) state_q <= S_CLEAR;
          else begin
            error   <= 1'b1;
            state_q <= S_DONE;
          end
        end
        S_CLEAR: state_q <= S_RUN;
        S_RUN: begin
          // walk the logical row decomposition (c fastest, then kx, ky)
          if (32'(lr_q) < nrows) begin
            if (32'(c_q) + 1 == cin) begin
              c_q <= '0;
              if (32'(kx_q) + 1 == k) begin
                kx_q <= '0;
                ky_q <= ky_q + 4'd1;
              end else kx_q <= kx_q + 4'd1;
            end else c_q <= c_q + 1'b1;
          end
          lr_q <= lr_q + 16'd1;
          if (32'(r_q) + 1 == ROWS) begin
            r_q <= '0;
            x_q <= x_q + 1'b1;
            if (32'(v_q) + 1 == nv) begin
              v_q <= '0;
              lr_q <= '0; c_q <= '0; kx_q <= '0; ky_q <= '0;
              if (32'(h_q) + 1 == nh) begin
                h_q <= '0;
                if (32'(px_q) + 1 == g) begin
                  px_q <= '0;
                  if (32'(py_q) + 1 == g) begin
                    py_q <= '0;
                    if (l_q == cfg_q.nlayers) state_q <= S_DONE;
                    else l_q <= l_q + 2'd1;
                  end else py_q <= py_q + 8'd1;
                end else px_q <= px_q + 8'd1;
              end else h_q <= h_q + 4'd1;
            end else v_q <= v_q + 8'd1;
          end else r_q <= r_q + 8'd1;
        end
        S_DONE: begin
          done    <= 1'b1;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end
endmodule
