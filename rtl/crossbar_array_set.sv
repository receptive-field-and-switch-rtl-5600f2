// crossbar_array_set: behavioural model of a tile's crossbar array set:
// NXB ReRAM crossbars of ROWS x COLS 8-bit cells, the switch matrices that
// join them, the reverse clippers (RC) behind every crossbar column, and the
// output stage of analog max-pooling circuits (AMC) and bidirectional
// clippers (BC) that drives the ADCs. The switch-matrix controller
// (sm_controller, synthesizable) sits inside and sets the switches.
//
// This is not synthesizable hardware: crossbars, switches and clippers are
// analog. The model keeps their digital state (cell weights, switch status)
// as memories and computes what the analog network would settle to:
//   for each fused layer l = 1..L:
//     I[node] = sum over working crossbars of layer l and their connected
//               rows of V(row) * W(cell)   (bit lines of stacked crossbars
//               add, as currents do on a joined bit line)
//     V_l[node] = RC(I) = max(I, 0) >>> shift    (ReLU + current-to-voltage)
//   where V(row) is a DAC level (l = 1) or a node of layer l-1 (l > 1).
// Lane j of the output stage then gets AMC(max of the 2x2 window's four
// nodes of channel j, or node j without pooling) and BC (limit to the ADC
// range). Cell weights are signed 8-bit; a real array would realise the
// sign with paired columns, which this model does not show.
//
// Timing: the array settles in the first half of a D-C-A cycle (evaluation
// at the falling edge while `dca` is high), so the ADCs can sample out_level
// at the rising edge that ends that cycle. Weights are written BUS cells of
// one row per cycle (w_we). sm_start/sm_done/sm_error belong to the switch-
// matrix controller. What follows the design: the parts and their order
// (crossbars, switch matrices, RC, AMC with four inputs, BC), analog
// transfer between fused layers, one reconfiguration per group. This
// model's choices: integer arithmetic for analog levels, the RC gain as a
// shift, node numbering, and evaluation at the falling edge.
module crossbar_array_set
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
  input  logic                clk,
  input  logic                rst_n,
  // weight programming
  input  logic                w_we,
  input  logic [XB_IDX_W-1:0] w_xbar,
  input  logic [6:0]          w_row,
  input  logic [6:0]          w_col,
  input  bus_n_t              w_n,
  input  bus_t                w_data,
  // reconfiguration
  input  group_cfg_t          cfg,
  input  logic                sm_start,
  output logic                sm_busy,
  output logic                sm_done,
  output logic                sm_error,
  // analog path
  input  logic                dca,
  input  analog_t             dac_level [N_DAC],
  output analog_t             out_level [N_ADC],
  output logic [31:0]         rc_clip_count
);
  // --------------------------------------------------------- state
  logic signed [7:0] wmem  [NXB * ROWS * COLS];
  route_t            route [NXB * ROWS];
  xbar_cfg_t         xcfg  [NXB];

  // --------------------------------------------------------- switch-matrix controller
  logic            clear, xcfg_we, route_we;
  logic [XW-1:0]   xcfg_idx;
  xbar_cfg_t       xcfg_data;
  logic [RW-1:0]   route_idx;
  route_t          route_data;

  sm_controller #(
    .NXB(NXB), .N_DAC(N_DAC), .N_ADC(N_ADC), .MAX_NODES(MAX_NODES), .ROWS(ROWS), .COLS(COLS)
  ) u_smc (
    .clk, .rst_n, .start(sm_start), .cfg,
    .clear, .xcfg_we, .xcfg_idx, .xcfg_data, .route_we, .route_idx, .route_data,
    .busy(sm_busy), .done(sm_done), .error(sm_error)
  );

  // group in force (latched at sm_start, as the controller latches it)
  group_cfg_t act_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) act_q <= '0;
    else if (sm_start && !sm_busy) act_q <= cfg;
  end

  always_ff @(posedge clk) begin
    if (w_we) begin
      for (int i = 0; i < BUS; i++) begin
        if (i < int'(w_n) && int'(w_col) + i < COLS && int'(w_xbar) < NXB && int'(w_row) < ROWS)
          wmem[(int'(w_xbar) * ROWS + int'(w_row)) * COLS + int'(w_col) + i] <= w_data[i];
      end
    end
    if (route_we) route[route_idx] <= route_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int x = 0; x < NXB; x++) xcfg[x] <= '0;
    end else if (clear) begin
      for (int x = 0; x < NXB; x++) xcfg[x] <= '0;
    end else if (xcfg_we) begin
      xcfg[xcfg_idx] <= xcfg_data;
    end
  end

  // --------------------------------------------------------- analog settling
  analog_t acc   [MAX_NODES];
  analog_t nodes [MAX_NODES];
  analog_t fin_q [MAX_NODES];
  logic [CH_W-1:0] cl_q;
  logic            pool_q;

  always @(negedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < MAX_NODES; n++) fin_q[n] <= 0;
      cl_q          <= '0;
      pool_q        <= 1'b0;
      rc_clip_count <= '0;
    end else if (dca) begin
      automatic group_geom_t geo = group_geom(act_q);
      automatic int unsigned clips = 0;
      for (int n = 0; n < MAX_NODES; n++) nodes[n] = 0;
      for (int l = 1; l <= MAX_LAYERS; l++) begin
        if (l <= int'(act_q.nlayers)) begin
          for (int n = 0; n < MAX_NODES; n++) acc[n] = 0;
          for (int x = 0; x < NXB; x++) begin
            if (xcfg[x].valid && int'(xcfg[x].layer) == l) begin
              automatic int unsigned base = int'(xcfg[x].pos) * int'(geo.ch[l]) + int'(xcfg[x].hblk) * COLS;
              for (int r = 0; r < ROWS; r++) begin
                automatic route_t  rt  = route[x * ROWS + r];
                automatic analog_t vin = 0;
                if (rt.kind == SRC_DAC && int'(rt.idx) < N_DAC) vin = dac_level[rt.idx];
                else if (rt.kind == SRC_NODE && int'(rt.idx) < MAX_NODES) vin = nodes[rt.idx];
                if (vin != 0) begin
                  for (int c = 0; c < COLS; c++) begin
                    if (c < int'(xcfg[x].ncols) && base + c < MAX_NODES)
                      acc[base + c] += vin * analog_t'(wmem[(x * ROWS + r) * COLS + c]);
                  end
                end
              end
            end
          end
          // reverse clippers: negative currents cut off, current-to-voltage gain
          for (int n = 0; n < MAX_NODES; n++) begin
            if (acc[n] < 0) begin
              nodes[n] = 0;
              clips++;
            end else nodes[n] = acc[n] >>> act_q.shift;
          end
        end
      end
      for (int n = 0; n < MAX_NODES; n++) fin_q[n] <= nodes[n];
      cl_q          <= geo.ch[act_q.nlayers];
      pool_q        <= act_q.pool;
      rc_clip_count <= rc_clip_count + clips;
    end
  end

  // --------------------------------------------------------- output stage
  analog_t amc_in  [N_ADC][4];
  analog_t amc_out [N_ADC];
  analog_t bc_in   [N_ADC];

  always_comb begin
    for (int j = 0; j < N_ADC; j++) begin
      for (int p = 0; p < 4; p++) begin
        automatic int unsigned n = p * int'(cl_q) + j;
        amc_in[j][p] = (j < int'(cl_q) && n < MAX_NODES) ? fin_q[n] : 0;
      end
    end
  end

  analog_maxpool #(.LANES(N_ADC)) u_amc (.bypass(!pool_q), .in(amc_in), .out(amc_out));

  always_comb begin
    for (int j = 0; j < N_ADC; j++) bc_in[j] = amc_out[j];
  end

  bidirectional_clipper #(.LANES(N_ADC)) u_bc (.in(bc_in), .out(out_level));
endmodule
