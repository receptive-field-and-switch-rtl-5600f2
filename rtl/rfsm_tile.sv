// rfsm_tile: one RFSM computation tile.
//
// A tile holds an eDRAM buffer, two input buffers (IB0, IB1), two DA
// registers (DAR0, DAR1), a bank of DACs, the crossbar array set, a bank of
// ADCs, an AD register (ADR) and an output buffer (OB). tile_pipeline_ctrl
// moves each receptive field of the current layer group from the eDRAM
// through IB, DAR and the DACs into the crossbar array set, where all fused
// layers are computed in the analog domain in one D-C-A cycle, and moves the
// converted result through ADR and OB into the eDRAM buffer of the next
// tile (port oe_*). Data arriving from the previous tile (port in_wr_*) is
// always accepted; host writes to the eDRAM (h_wr_*) wait while it arrives,
// and host reads (h_rd_*) wait while the pipeline fetches. A host read
// returns data in the cycle after it is accepted (h_rd_rvalid).
//
// Before a group's jobs the controller pulses sm_start with the group
// configuration; the switch-matrix controller then sets up the crossbar
// array set and pulses sm_done. Tile composition follows the design's
// tile drawing; the port arbitration and priorities are this
// implementation's choices.
module rfsm_tile
  import rfsm_pkg::*;
#(
  parameter int unsigned NXB       = 20,
  parameter int unsigned N_DAC     = 108,
  parameter int unsigned N_ADC     = 64,
  parameter int unsigned MAX_NODES = 8192,
  parameter int unsigned EBYTES    = EDRAM_BYTES
) (
  input  logic                clk,
  input  logic                rst_n,
  // group configuration
  input  group_cfg_t          cfg,
  input  tile_xfer_t          xfer,
  input  logic                sm_start,
  output logic                sm_busy,
  output logic                sm_done,
  output logic                sm_error,
  // jobs
  input  logic                job_valid,
  input  job_t                job,
  output logic                job_ready,
  // weight programming
  input  logic                w_we,
  input  logic [XB_IDX_W-1:0] w_xbar,
  input  logic [6:0]          w_row,
  input  logic [6:0]          w_col,
  input  bus_n_t              w_n,
  input  bus_t                w_data,
  // host access to the eDRAM buffer
  input  logic                h_wr_valid,
  input  logic [ADDR_W-1:0]   h_wr_addr,
  input  bus_n_t              h_wr_n,
  input  bus_t                h_wr_data,
  output logic                h_wr_ready,
  input  logic                h_rd_valid,
  input  logic [ADDR_W-1:0]   h_rd_addr,
  output logic                h_rd_ready,
  output logic                h_rd_rvalid,
  output bus_t                h_rd_data,
  // from the previous tile's output buffer
  input  logic                in_wr_valid,
  input  logic [ADDR_W-1:0]   in_wr_addr,
  input  bus_n_t              in_wr_n,
  input  bus_t                in_wr_data,
  // to the next tile's eDRAM buffer
  output logic                oe_valid,
  output logic [ADDR_W-1:0]   oe_addr,
  output bus_n_t              oe_n,
  output bus_t                oe_data,
  input  logic                oe_ready,
  // status
  output logic                idle,
  output logic [31:0]         n_dca,
  output logic [31:0]         n_stall,
  output logic [31:0]         n_lane1,
  output logic [31:0]         n_multi,
  output logic [31:0]         n_clip
);
  localparam int unsigned IAW = $clog2(N_DAC + BUS);
  localparam int unsigned OAW = $clog2(N_ADC + BUS);

  // ------------------------------------------------------------ pipeline control
  logic              er_en;
  logic [ADDR_W-1:0] er_addr, ib_wr_off, dar_rd_off, dac_off, adc_rd_off, adr_off, adr_rd_off, ob_off, ob_rd_off;
  logic [1:0]        ib_we, dar_we;
  logic [1:0][ADDR_W-1:0] ib_rd_off, dar_wr_off;
  bus_n_t            ib_wr_n, dar_wr_n, dac_n, adr_n, ob_n;
  logic              dd_sel, dac_ld, dca, adr_we, ob_we;

  tile_pipeline_ctrl u_ctrl (
    .clk, .rst_n, .xfer, .job_valid, .job, .job_ready,
    .er_en, .er_addr, .ib_we, .ib_wr_off, .ib_wr_n,
    .ib_rd_off, .dar_we, .dar_wr_off, .dar_wr_n,
    .dar_rd_off, .dd_sel, .dac_ld, .dac_off, .dac_n,
    .dca,
    .adc_rd_off, .adr_we, .adr_off, .adr_n,
    .adr_rd_off, .ob_we, .ob_off, .ob_n,
    .ob_rd_off, .oe_valid, .oe_addr, .oe_n, .oe_ready,
    .idle, .n_dca, .n_stall, .n_lane1, .n_multi
  );

  // ------------------------------------------------------------ eDRAM buffer
  logic              e_wr_en, e_rd_en;
  logic [ADDR_W-1:0] e_wr_addr, e_rd_addr;
  bus_n_t            e_wr_n;
  bus_t              e_wr_data, e_rd_data;

  always_comb begin
    h_wr_ready = !in_wr_valid;
    e_wr_en    = in_wr_valid || h_wr_valid;
    e_wr_addr  = in_wr_valid ? in_wr_addr : h_wr_addr;
    e_wr_n     = in_wr_valid ? in_wr_n    : h_wr_n;
    e_wr_data  = in_wr_valid ? in_wr_data : h_wr_data;
    h_rd_ready = !er_en;
    e_rd_en    = er_en || h_rd_valid;
    e_rd_addr  = er_en ? er_addr : h_rd_addr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) h_rd_rvalid <= 1'b0;
    else        h_rd_rvalid <= h_rd_valid && !er_en;
  end
  assign h_rd_data = e_rd_data;

  edram_buffer #(.BYTES(EBYTES)) u_edram (
    .clk, .wr_en(e_wr_en), .wr_addr(e_wr_addr), .wr_n(e_wr_n), .wr_data(e_wr_data),
    .rd_en(e_rd_en), .rd_addr(e_rd_addr), .rd_data(e_rd_data)
  );

  // ------------------------------------------------------------ IB0/IB1 and DAR0/DAR1
  bus_t ib_rd_data  [2];
  bus_t dar_rd_data [2];
  for (genvar k = 0; k < 2; k++) begin : g_lane
    lane_buffer #(.DEPTH(N_DAC)) u_ib (
      .clk, .wr_en(ib_we[k]), .wr_off(IAW'(ib_wr_off)), .wr_n(ib_wr_n), .wr_data(e_rd_data),
      .rd_off(IAW'(ib_rd_off[k])), .rd_data(ib_rd_data[k])
    );
    lane_buffer #(.DEPTH(N_DAC)) u_dar (
      .clk, .wr_en(dar_we[k]), .wr_off(IAW'(dar_wr_off[k])), .wr_n(dar_wr_n), .wr_data(ib_rd_data[k]),
      .rd_off(IAW'(dar_rd_off)), .rd_data(dar_rd_data[k])
    );
  end

  // ------------------------------------------------------------ DACs, crossbar array set, ADCs
  analog_t dac_level [N_DAC];
  analog_t cas_out   [N_ADC];

  dac_bank #(.N(N_DAC)) u_dac (
    .clk, .rst_n, .ld_en(dac_ld), .ld_off(IAW'(dac_off)), .ld_n(dac_n),
    .ld_data(dar_rd_data[dd_sel]), .level(dac_level)
  );

  crossbar_array_set #(.NXB(NXB), .N_DAC(N_DAC), .N_ADC(N_ADC), .MAX_NODES(MAX_NODES)) u_cas (
    .clk, .rst_n, .w_we, .w_xbar, .w_row, .w_col, .w_n, .w_data,
    .cfg, .sm_start, .sm_busy, .sm_done, .sm_error,
    .dca, .dac_level, .out_level(cas_out), .rc_clip_count(n_clip)
  );

  bus_t adc_rd_data, adr_rd_data, ob_rd_data;
  adc_bank #(.N(N_ADC)) u_adc (
    .clk, .rst_n, .sample(dca), .ain(cas_out), .rd_off(OAW'(adc_rd_off)), .rd_data(adc_rd_data)
  );

  // ------------------------------------------------------------ ADR and OB
  lane_buffer #(.DEPTH(N_ADC)) u_adr (
    .clk, .wr_en(adr_we), .wr_off(OAW'(adr_off)), .wr_n(adr_n), .wr_data(adc_rd_data),
    .rd_off(OAW'(adr_rd_off)), .rd_data(adr_rd_data)
  );
  lane_buffer #(.DEPTH(N_ADC)) u_ob (
    .clk, .wr_en(ob_we), .wr_off(OAW'(ob_off)), .wr_n(ob_n), .wr_data(adr_rd_data),
    .rd_off(OAW'(ob_rd_off)), .rd_data(ob_rd_data)
  );
  assign oe_data = ob_rd_data;
endmodule
