// edu_smc: switch mode controller of one EDU. It moves its core between run
// mode and stop mode so that the instruction before the breakpoint completes
// and the breakpoint instruction and those after it are cancelled.
// States and the order RUN_MODE -> RECOG_BKPT -> ANALYZE_CORE ->
// DEBUG_CONTROL -> WAIT -> STOP_MODE -> RUN_MODE follow the document:
//   RUN_MODE      waits for int_bkpt_en (or a rising ext_bkpt_en, or a
//                 debugger halt request); latches
//                 the fetch address as the breakpoint address.
//   RECOG_BKPT    records the cause (address, data value or external).
//   ANALYZE_CORE  reads the status info; if a conditional branch ahead of
//                 an address breakpoint was taken, the breakpoint
//                 instruction never executes and the SMC returns to
//                 RUN_MODE (this exit is this design's own rendering of the
//                 rule that the switch happens only when the condition is
//                 false).
//   DEBUG_CONTROL drives debug_ctrl.flush for one cycle: the core cancels
//                 the breakpoint instruction and the younger ones (from
//                 flush_pc on when precise, else every stage before MEMORY).
//   WAIT          holds fetch until stop_point (status pipe_empty).
//   STOP_MODE     asserts stop_mode_en until debug_end.
// Clock: the core's external clock. ext_bkpt_en (from other cores' domains),
// debug_end_tgl and halt_req_tgl (TCK domain) pass through two-flop
// synchronisers; ext_bkpt_en acts on its rising edge, debug_end and the halt
// request on a toggle. A halt request that arrives outside RUN_MODE is
// dropped.
module edu_smc
  import mocd_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              int_bkpt_en,
  input  logic              addr_hit,
  input  logic [ADDR_W-1:0] fetch_addr,
  input  logic              ext_bkpt_en,
  input  status_info_t      status,
  input  logic              debug_end_tgl,
  input  logic              halt_req_tgl,
  output logic              stop_mode_en,
  output debug_ctrl_t       debug_ctrl,
  output bkpt_cause_e       cause,
  output smc_state_e        state
);

  logic [2:0] ext_sync;
  logic [2:0] end_sync;
  logic [2:0] halt_sync;
  logic       ext_evt, debug_end, halt_req, taken_seen, precise;
  logic [ADDR_W-1:0] bkpt_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ext_sync  <= '0;
      end_sync  <= '0;
      halt_sync <= '0;
    end else begin
      ext_sync  <= {ext_sync[1:0], ext_bkpt_en};
      end_sync  <= {end_sync[1:0], debug_end_tgl};
      halt_sync <= {halt_sync[1:0], halt_req_tgl};
    end
  end

  assign ext_evt   = ext_sync[1] && !ext_sync[2];
  assign debug_end = end_sync[1] ^ end_sync[2];
  assign halt_req  = halt_sync[1] ^ halt_sync[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= SMC_RUN_MODE;
      cause      <= CAUSE_NONE;
      precise    <= 1'b0;
      taken_seen <= 1'b0;
      bkpt_addr  <= '0;
    end else begin
      unique case (state)
        SMC_RUN_MODE: begin
          taken_seen <= 1'b0;
          if (int_bkpt_en) begin
            state     <= SMC_RECOG_BKPT;
            precise   <= addr_hit;
            bkpt_addr <= fetch_addr;
            cause     <= addr_hit ? CAUSE_ADDR : CAUSE_DATA;
          end else if (ext_evt || halt_req) begin
            state   <= SMC_RECOG_BKPT;
            precise <= 1'b0;
            cause   <= CAUSE_EXT;
          end
        end
        SMC_RECOG_BKPT: begin
          taken_seen <= taken_seen || status.branch_taken;
          state      <= SMC_ANALYZE_CORE;
        end
        SMC_ANALYZE_CORE: begin
          if (precise && (taken_seen || status.branch_taken)) begin
            state <= SMC_RUN_MODE;
            cause <= CAUSE_NONE;
          end else begin
            state <= SMC_DEBUG_CONTROL;
          end
        end
        SMC_DEBUG_CONTROL: state <= SMC_WAIT;
        SMC_WAIT:          if (status.pipe_empty) state <= SMC_STOP_MODE;
        SMC_STOP_MODE:     if (debug_end) state <= SMC_RUN_MODE;
        default:           state <= SMC_RUN_MODE;
      endcase
    end
  end

  assign stop_mode_en        = (state == SMC_STOP_MODE);
  assign debug_ctrl.flush    = (state == SMC_DEBUG_CONTROL);
  assign debug_ctrl.hold     = (state == SMC_DEBUG_CONTROL) || (state == SMC_WAIT);
  assign debug_ctrl.precise  = precise;
  assign debug_ctrl.flush_pc = bkpt_addr;

endmodule
