// tile_pipeline_ctrl: the tile-level pipeline of RFSM.
//
// A receptive field (job) moves through the tile in these stages:
//   eI  eDRAM buffer  -> input buffer IB0 or IB1   (one eDRAM port, lanes alternate)
//   ID  IBk           -> DA register DARk          (lane k = 0 or 1, both may run)
//   DD  DARk          -> DAC input latches         (shared DACs, jobs kept in order)
//   DCA DACs -> crossbar array set -> ADCs         (exactly one cycle)
//   AA  ADC latches   -> AD register ADR
//   AO  ADR           -> output buffer OB
//   Oe  OB            -> eDRAM buffer of the next tile
// Two IB/DAR lanes avoid the structural hazard of a single buffer: while one
// job is converted, the next is already fetched into the other lane. eI, ID,
// DD, AA, AO and Oe move BUS bytes per cycle, so they take ceil(bytes/BUS)
// cycles; DCA starts in the cycle after the last DAC latch is loaded. Every
// buffer has a full flag and carries its job's output address as a tag; a
// stage starts only when its source is full and its destination is empty,
// so the pipeline is non-linear: short stages wait for long ones (a stall).
//
// Interface: `xfer` gives the transfer sizes of the current layer group.
// A job is accepted when job_valid && job_ready. The controller issues
// buffer addresses and enables; the tile wires the data paths (IB write
// data = eDRAM read data one cycle after er_en; DAR write data = IBk read
// data; DAC load data = DAR[dd_sel] read data; ADR write data = ADC read
// data; OB write data = ADR read data; Oe data = OB read data). oe_valid
// offers oe_n bytes at oe_addr and the chunk advances when oe_ready is high.
// Counters: DCA operations, stall cycles, jobs through lane 1 and transfers
// that took more than one cycle. The stage names, two lanes, stage order and
// one-cycle DCA follow the design; flag/tag handshaking, the byte-lane width
// and in-order lane alternation are this implementation's choices.
module tile_pipeline_ctrl
  import rfsm_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  tile_xfer_t        xfer,
  // jobs
  input  logic              job_valid,
  input  job_t              job,
  output logic              job_ready,
  // eI: eDRAM read, IB write (one cycle later)
  output logic              er_en,
  output logic [ADDR_W-1:0] er_addr,
  output logic [1:0]        ib_we,
  output logic [ADDR_W-1:0] ib_wr_off,
  output bus_n_t            ib_wr_n,
  // ID: IBk read, DARk write
  output logic [1:0][ADDR_W-1:0] ib_rd_off,
  output logic [1:0]        dar_we,
  output logic [1:0][ADDR_W-1:0] dar_wr_off,
  output bus_n_t            dar_wr_n,
  // DD: DAR read, DAC latch load
  output logic [ADDR_W-1:0] dar_rd_off,
  output logic              dd_sel,
  output logic              dac_ld,
  output logic [ADDR_W-1:0] dac_off,
  output bus_n_t            dac_n,
  // DCA
  output logic              dca,
  // AA: ADC read, ADR write
  output logic [ADDR_W-1:0] adc_rd_off,
  output logic              adr_we,
  output logic [ADDR_W-1:0] adr_off,
  output bus_n_t            adr_n,
  // AO: ADR read, OB write
  output logic [ADDR_W-1:0] adr_rd_off,
  output logic              ob_we,
  output logic [ADDR_W-1:0] ob_off,
  output bus_n_t            ob_n,
  // Oe: OB read, write into the next tile
  output logic [ADDR_W-1:0] ob_rd_off,
  output logic              oe_valid,
  output logic [ADDR_W-1:0] oe_addr,
  output bus_n_t            oe_n,
  input  logic              oe_ready,
  // status
  output logic              idle,
  output logic [31:0]       n_dca,
  output logic [31:0]       n_stall,
  output logic [31:0]       n_lane1,
  output logic [31:0]       n_multi
);
  typedef logic [ADDR_W-1:0] addr_t;

  function automatic bus_n_t chunk(addr_t len, addr_t done_b);
    return (32'(len) - 32'(done_b) > BUS) ? bus_n_t'(BUS) : bus_n_t'(len - done_b);
  endfunction

  // ---------------------------------------------------------------- flags
  logic [1:0] ib_full, dar_full;
  logic       dacl_full, adcl_full, adr_full, ob_full;
  addr_t      ib_tag [2];
  addr_t      dar_tag [2];
  addr_t      dacl_tag, adcl_tag, adr_tag, ob_tag;

  // ---------------------------------------------------------------- eI
  logic       ei_busy, ei_lane;
  addr_t      ei_row_addr, ei_col, ei_ib_off;
  logic [7:0] ei_row;
  logic       pend_v, pend_last, pend_lane;
  addr_t      pend_off;
  bus_n_t     pend_n;
  bus_n_t     ei_n;
  logic       ei_last;

  assign job_ready = !ei_busy && !pend_v && !ib_full[ei_lane];
  always_comb begin
    ei_n    = chunk(xfer.row_len, ei_col);
    ei_last = (32'(ei_col) + 32'(ei_n) >= 32'(xfer.row_len)) && (32'(ei_row) + 1 >= 32'(xfer.rows));
    er_en   = ei_busy;
    er_addr = ei_row_addr + ei_col;
    ib_we   = pend_v ? (pend_lane ? 2'b10 : 2'b01) : 2'b00;
    ib_wr_off = pend_off;
    ib_wr_n   = pend_n;
  end

  // ---------------------------------------------------------------- ID
  logic [1:0] id_busy;
  addr_t      id_off [2];
  logic [1:0] id_last;
  bus_n_t     id_n [2];
  always_comb begin
    for (int k = 0; k < 2; k++) begin
      id_n[k]       = chunk(xfer.in_len, id_off[k]);
      id_last[k]    = 32'(id_off[k]) + 32'(id_n[k]) >= 32'(xfer.in_len);
      ib_rd_off[k]  = id_off[k];
      dar_wr_off[k] = id_off[k];
    end
    dar_we   = id_busy;
    dar_wr_n = bus_n_t'(BUS);   // tail lanes beyond in_len are never read
  end

  // ---------------------------------------------------------------- DD
  logic   dd_busy, dd_lane, dd_last;
  addr_t  dd_off;
  always_comb begin
    dac_n      = chunk(xfer.in_len, dd_off);
    dd_last    = 32'(dd_off) + 32'(dac_n) >= 32'(xfer.in_len);
    dac_ld     = dd_busy;
    dac_off    = dd_off;
    dar_rd_off = dd_off;
    dd_sel     = dd_lane;
  end

  // ---------------------------------------------------------------- AA / AO / Oe
  logic   aa_busy, ao_busy, aa_last, ao_last, oe_last;
  addr_t  aa_off, ao_off, oe_off;
  always_comb begin
    adr_n      = chunk(xfer.out_len, aa_off);
    aa_last    = 32'(aa_off) + 32'(adr_n) >= 32'(xfer.out_len);
    adc_rd_off = aa_off;
    adr_we     = aa_busy;
    adr_off    = aa_off;
    ob_n       = chunk(xfer.out_len, ao_off);
    ao_last    = 32'(ao_off) + 32'(ob_n) >= 32'(xfer.out_len);
    adr_rd_off = ao_off;
    ob_we      = ao_busy;
    ob_off     = ao_off;
    oe_n       = chunk(xfer.out_len, oe_off);
    oe_last    = 32'(oe_off) + 32'(oe_n) >= 32'(xfer.out_len);
    ob_rd_off  = oe_off;
    oe_valid   = ob_full;
    oe_addr    = ob_tag + oe_off;
  end

  assign dca  = dacl_full && !adcl_full && !dd_busy;
  assign idle = !ei_busy && !pend_v && (ib_full == 2'b00) && (dar_full == 2'b00) && !dacl_full &&
                !adcl_full && !adr_full && !ob_full && (id_busy == 2'b00) && !dd_busy && !aa_busy && !ao_busy;

  // a stage holding data while its destination is still occupied
  logic stall_now;
  always_comb begin
    stall_now = 1'b0;
    for (int k = 0; k < 2; k++) if (ib_full[k] && dar_full[k] && !id_busy[k]) stall_now = 1'b1;
    if (dar_full[dd_lane] && dacl_full && !dd_busy) stall_now = 1'b1;
    if (dacl_full && adcl_full) stall_now = 1'b1;
    if (adcl_full && adr_full && !aa_busy) stall_now = 1'b1;
    if (adr_full && ob_full && !ao_busy) stall_now = 1'b1;
    if (job_valid && !job_ready) stall_now = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ib_full <= '0; dar_full <= '0;
      dacl_full <= 1'b0; adcl_full <= 1'b0; adr_full <= 1'b0; ob_full <= 1'b0;
      ib_tag  <= '{default: '0}; dar_tag <= '{default: '0};
      dacl_tag <= '0; adcl_tag <= '0; adr_tag <= '0; ob_tag <= '0;
      ei_busy <= 1'b0; ei_lane <= 1'b0; ei_row_addr <= '0; ei_col <= '0; ei_ib_off <= '0; ei_row <= '0;
      pend_v <= 1'b0; pend_last <= 1'b0; pend_lane <= 1'b0; pend_off <= '0; pend_n <= '0;
      id_busy <= '0; id_off <= '{default: '0};
      dd_busy <= 1'b0; dd_lane <= 1'b0; dd_off <= '0;
      aa_busy <= 1'b0; aa_off <= '0; ao_busy <= 1'b0; ao_off <= '0; oe_off <= '0;
      n_dca <= '0; n_stall <= '0; n_lane1 <= '0; n_multi <= '0;
    end else begin
      if (stall_now) n_stall <= n_stall + 1;

      // ---- eI: accept a job, fetch its receptive field row by row
      if (job_valid && job_ready) begin
        ei_busy     <= 1'b1;
        ei_row_addr <= job.in_addr;
        ei_col      <= '0;
        ei_row      <= '0;
        ei_ib_off   <= '0;
        ib_tag[ei_lane] <= job.out_addr;
        if (ei_lane) n_lane1 <= n_lane1 + 1;
        if (32'(xfer.in_len) > BUS) n_multi <= n_multi + 1;
      end else if (ei_busy) begin
        ei_ib_off <= ei_ib_off + addr_t'(ei_n);
        if (32'(ei_col) + 32'(ei_n) >= 32'(xfer.row_len)) begin
          ei_col      <= '0;
          ei_row      <= ei_row + 8'd1;
          ei_row_addr <= ei_row_addr + xfer.row_stride;
        end else ei_col <= ei_col + addr_t'(ei_n);
        if (ei_last) ei_busy <= 1'b0;
      end
      pend_v    <= ei_busy;
      pend_last <= ei_busy && ei_last;
      pend_lane <= ei_lane;
      pend_off  <= ei_ib_off;
      pend_n    <= ei_n;
      if (pend_v && pend_last) begin
        ib_full[pend_lane] <= 1'b1;
        ei_lane <= !ei_lane;
      end

      // ---- ID, per lane
      for (int k = 0; k < 2; k++) begin
        if (id_busy[k]) begin
          id_off[k] <= id_off[k] + addr_t'(BUS);
          if (id_last[k]) begin
            id_busy[k]  <= 1'b0;
            ib_full[k]  <= 1'b0;
            dar_full[k] <= 1'b1;
            dar_tag[k]  <= ib_tag[k];
          end
        end else if (ib_full[k] && !dar_full[k]) begin
          id_busy[k] <= 1'b1;
          id_off[k]  <= '0;
        end
      end

      // ---- DD, lanes in turn
      if (dd_busy) begin
        dd_off <= dd_off + addr_t'(BUS);
        if (dd_last) begin
          dd_busy   <= 1'b0;
          dar_full[dd_lane] <= 1'b0;
          dacl_full <= 1'b1;
          dacl_tag  <= dar_tag[dd_lane];
          dd_lane   <= !dd_lane;
        end
      end else if (dar_full[dd_lane] && !dacl_full) begin
        dd_busy <= 1'b1;
        dd_off  <= '0;
      end

      // ---- DCA, one cycle
      if (dca) begin
        dacl_full <= 1'b0;
        adcl_full <= 1'b1;
        adcl_tag  <= dacl_tag;
        n_dca     <= n_dca + 1;
      end

      // ---- AA
      if (aa_busy) begin
        aa_off <= aa_off + addr_t'(BUS);
        if (aa_last) begin
          aa_busy   <= 1'b0;
          adcl_full <= 1'b0;
          adr_full  <= 1'b1;
          adr_tag   <= adcl_tag;
        end
      end else if (adcl_full && !adr_full) begin
        aa_busy <= 1'b1;
        aa_off  <= '0;
      end

      // ---- AO
      if (ao_busy) begin
        ao_off <= ao_off + addr_t'(BUS);
        if (ao_last) begin
          ao_busy  <= 1'b0;
          adr_full <= 1'b0;
          ob_full  <= 1'b1;
          ob_tag   <= adr_tag;
        end
      end else if (adr_full && !ob_full) begin
        ao_busy <= 1'b1;
        ao_off  <= '0;
      end

      // ---- Oe
      if (ob_full && oe_ready) begin
        if (oe_last) begin
          ob_full <= 1'b0;
          oe_off  <= '0;
        end else oe_off <= oe_off + addr_t'(BUS);
      end
    end
  end

  // a DCA never starts while the DAC latches are being loaded
  assert property (@(posedge clk) disable iff (!rst_n) dca |-> !dac_ld);
  // stages never overwrite a full buffer
  assert property (@(posedge clk) disable iff (!rst_n) (dac_ld && dd_off == 0) |-> !dacl_full);
endmodule
