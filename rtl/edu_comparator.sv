// edu_comparator: breakpoint registers and comparator of one EDU.
// It watches the core's memory access signals and raises int_bkpt_en
// (combinationally, in the cycle of the access) when
//   - an instruction fetch address matches ADDR_VAL under ADDR_MASK
//     (address breakpoint, CTRL bit 0), or
//   - a load/store (CTRL bits 2/3) carries a value matching DATA_VAL under
//     DATA_MASK and, when CTRL bit 4 is set, its address matches ADDR_VAL
//     under ADDR_MASK (data value breakpoint, CTRL bit 1).
// A mask bit of 1 excludes that bit from the comparison. Clearing the enable
// bits disables int_bkpt_en.
// The registers are reached through a 36-bit JTAG data register
// {rw[35], addr[34:32], data[31:0]}, shifted LSB first: Update-DR with rw=1
// writes data to register addr; Update-DR also remembers addr, and the next
// Capture-DR loads that register into the data field (read-back).
// Registers: 0 ADDR_VAL, 1 ADDR_MASK, 2 DATA_VAL, 3 DATA_MASK, 4 CTRL,
// 5 STATUS (read only: {smc state, cause, stop_mode_en}), 6 CMD (writing
// bit 0 = 1 ends debugging: it flips debug_end_tgl, which the SMC turns
// into its debug_end event; writing bit 1 = 1 asks a running core to stop:
// it flips halt_req_tgl, which the SMC treats like an external stop).
// The register kinds (address, data, control, status, mask) and masking are
// the document's; their layout, the JTAG access format (modelled on the
// register access of ARM EmbeddedICE) and the CMD commands are this
// design's own. Registers are in the TCK domain and are meant to be
// programmed while the breakpoint is disabled or the core is stopped; the
// status inputs come from the core clock domain through two-flop
// synchronisers.
module edu_comparator
  import mocd_pkg::*;
(
  input  logic        tck,
  input  logic        trst_n,
  input  logic        tdi,
  input  dr_ctrl_t    dr,
  input  logic        sel,
  output logic        tdo,
  // core memory access signals
  input  mem_bus_t    bus,
  // SMC status for the STATUS register
  input  logic        stop_mode_en,
  input  bkpt_cause_e cause,
  input  smc_state_e  smc_state,
  // outputs
  output logic        int_bkpt_en,
  output logic        addr_hit,
  output logic        data_hit,
  output logic        debug_end_tgl,
  output logic        halt_req_tgl
);

  logic [DATA_W-1:0] addr_val, addr_mask, data_val, data_mask;
  logic [7:0]        ctrl;
  logic [2:0]        rd_addr;
  logic [BREG_CHAIN_LEN-1:0] chain;
  logic [5:0]        status_s1, status_s2;
  logic [DATA_W-1:0] rd_value;

  // ---- comparator -------------------------------------------------------
  logic              dmatch_en;
  logic [DATA_W-1:0] dvalue;

  assign addr_hit  = ctrl[CTRL_ADDR_EN] && bus.fetch &&
                     (((bus.fetch_addr ^ addr_val) & ~addr_mask) == '0);
  assign dmatch_en = (bus.rd && ctrl[CTRL_MATCH_RD]) || (bus.wr && ctrl[CTRL_MATCH_WR]);
  assign dvalue    = bus.wr ? bus.wdata : bus.rdata;
  assign data_hit  = ctrl[CTRL_DATA_EN] && dmatch_en &&
                     (((dvalue ^ data_val) & ~data_mask) == '0) &&
                     (!ctrl[CTRL_DADDR] || (((bus.daddr ^ addr_val) & ~addr_mask) == '0));
  assign int_bkpt_en = addr_hit || data_hit;

  // ---- status synchroniser (core clock -> TCK) ---------------------------
  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      status_s1 <= '0;
      status_s2 <= '0;
    end else begin
      status_s1 <= {smc_state, cause, stop_mode_en};
      status_s2 <= status_s1;
    end
  end

  always_comb begin
    unique case (rd_addr)
      BREG_ADDR_VAL:  rd_value = addr_val;
      BREG_ADDR_MASK: rd_value = addr_mask;
      BREG_DATA_VAL:  rd_value = data_val;
      BREG_DATA_MASK: rd_value = data_mask;
      BREG_CTRL:      rd_value = DATA_W'(ctrl);
      BREG_STATUS:    rd_value = DATA_W'(status_s2);
      default:        rd_value = '0;
    endcase
  end

  // ---- JTAG data register ------------------------------------------------
  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n)                chain <= '0;
    else if (sel && dr.capture) chain <= {1'b0, rd_addr, rd_value};
    else if (sel && dr.shift)   chain <= {tdi, chain[BREG_CHAIN_LEN-1:1]};
  end

  assign tdo = chain[0];

  logic              upd_rw;
  logic [2:0]        upd_addr;
  logic [DATA_W-1:0] upd_data;
  assign {upd_rw, upd_addr, upd_data} = chain;

  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n) begin
      addr_val      <= '0;
      addr_mask     <= '0;
      data_val      <= '0;
      data_mask     <= '0;
      ctrl          <= '0;
      rd_addr       <= '0;
      debug_end_tgl <= 1'b0;
      halt_req_tgl  <= 1'b0;
    end else if (sel && dr.update) begin
      rd_addr <= upd_addr;
      if (upd_rw) begin
        unique case (upd_addr)
          BREG_ADDR_VAL:  addr_val  <= upd_data;
          BREG_ADDR_MASK: addr_mask <= upd_data;
          BREG_DATA_VAL:  data_val  <= upd_data;
          BREG_DATA_MASK: data_mask <= upd_data;
          BREG_CTRL:      ctrl      <= upd_data[7:0];
          BREG_CMD: begin
            if (upd_data[0]) debug_end_tgl <= ~debug_end_tgl;
            if (upd_data[1]) halt_req_tgl  <= ~halt_req_tgl;
          end
          default: ;
        endcase
      end
    end
  end

endmodule
