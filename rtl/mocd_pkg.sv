// mocd_pkg: types and constants shared by the multicore on-chip debug (MOCD)
// blocks. It fixes the 32-bit address/data/instruction width of the target
// RISC cores, the switch-mode-controller and TAP state encodings, the
// core-side debug interface bundles (memory access signals, status info,
// debug control), the JTAG instruction codes and the scan chain numbering.
// The 32-bit width follows the prototype processor; the encodings, the
// instruction codes and the chain numbering are this design's own choice.
package mocd_pkg;

  localparam int unsigned ADDR_W = 32;
  localparam int unsigned DATA_W = 32;
  localparam int unsigned INSN_W = 32;

  // Memory access signals of one core, as seen by the EDU comparator.
  typedef struct packed {
    logic              fetch;       // instruction fetch this cycle
    logic [ADDR_W-1:0] fetch_addr;  // program memory address
    logic              rd;          // data load this cycle
    logic              wr;          // data store this cycle
    logic [ADDR_W-1:0] daddr;       // data memory address
    logic [DATA_W-1:0] wdata;       // store data
    logic [DATA_W-1:0] rdata;       // load data
  } mem_bus_t;

  // Status information from the core decoder/pipeline to the SMC.
  typedef struct packed {
    logic branch_taken;  // a conditional branch resolved taken this cycle
    logic pipe_empty;    // every instruction still in the pipeline has completed
  } status_info_t;

  // Debug control from the SMC to the core pipeline-flush logic.
  typedef struct packed {
    logic              flush;     // one-cycle cancel request
    logic              precise;   // cancel from flush_pc on (address breakpoint)
    logic              hold;      // no new fetch while the core drains
    logic [ADDR_W-1:0] flush_pc;  // breakpoint address
  } debug_ctrl_t;

  typedef enum logic [2:0] {
    SMC_RUN_MODE      = 3'd0,
    SMC_RECOG_BKPT    = 3'd1,
    SMC_ANALYZE_CORE  = 3'd2,
    SMC_DEBUG_CONTROL = 3'd3,
    SMC_WAIT          = 3'd4,
    SMC_STOP_MODE     = 3'd5
  } smc_state_e;

  typedef enum logic [1:0] {
    CAUSE_NONE = 2'd0,
    CAUSE_ADDR = 2'd1,
    CAUSE_DATA = 2'd2,
    CAUSE_EXT  = 2'd3
  } bkpt_cause_e;

  // IEEE 1149.1 TAP controller states.
  typedef enum logic [3:0] {
    TAP_TLR        = 4'h0,
    TAP_RTI        = 4'h1,
    TAP_SEL_DR     = 4'h2,
    TAP_CAPTURE_DR = 4'h3,
    TAP_SHIFT_DR   = 4'h4,
    TAP_EXIT1_DR   = 4'h5,
    TAP_PAUSE_DR   = 4'h6,
    TAP_EXIT2_DR   = 4'h7,
    TAP_UPDATE_DR  = 4'h8,
    TAP_SEL_IR     = 4'h9,
    TAP_CAPTURE_IR = 4'hA,
    TAP_SHIFT_IR   = 4'hB,
    TAP_EXIT1_IR   = 4'hC,
    TAP_PAUSE_IR   = 4'hD,
    TAP_EXIT2_IR   = 4'hE,
    TAP_UPDATE_IR  = 4'hF
  } tap_state_e;

  // Data-register control seen by every scan chain.
  typedef struct packed {
    logic capture;  // Capture-DR: parallel load on rising TCK
    logic shift;    // Shift-DR: shift towards TDO on rising TCK
    logic update;   // Update-DR: parallel output on falling TCK
  } dr_ctrl_t;

  // JTAG instructions (4-bit instruction register).
  localparam int unsigned IR_W = 4;
  localparam logic [IR_W-1:0] INSTR_SEL_SCAN_CHAIN = 4'b0010;
  localparam logic [IR_W-1:0] INSTR_SEL_JTAG       = 4'b0011;
  localparam logic [IR_W-1:0] INSTR_SCAN_ACCESS    = 4'b1100;
  localparam logic [IR_W-1:0] INSTR_IDCODE         = 4'b1110;
  localparam logic [IR_W-1:0] INSTR_BYPASS         = 4'b1111;

  // Comparator (breakpoint) register addresses.
  localparam logic [2:0] BREG_ADDR_VAL  = 3'd0;
  localparam logic [2:0] BREG_ADDR_MASK = 3'd1;
  localparam logic [2:0] BREG_DATA_VAL  = 3'd2;
  localparam logic [2:0] BREG_DATA_MASK = 3'd3;
  localparam logic [2:0] BREG_CTRL      = 3'd4;
  localparam logic [2:0] BREG_STATUS    = 3'd5;
  localparam logic [2:0] BREG_CMD       = 3'd6;

  // Control register bits.
  localparam int unsigned CTRL_ADDR_EN  = 0;  // address (fetch) breakpoint enable
  localparam int unsigned CTRL_DATA_EN  = 1;  // data value breakpoint enable
  localparam int unsigned CTRL_MATCH_RD = 2;  // data breakpoint on loads
  localparam int unsigned CTRL_MATCH_WR = 3;  // data breakpoint on stores
  localparam int unsigned CTRL_DADDR    = 4;  // data breakpoint also compares the address

  // Scan chain lengths.
  localparam int unsigned BUS_CHAIN_LEN  = INSN_W + DATA_W;  // {instruction, data}
  localparam int unsigned BREG_CHAIN_LEN = DATA_W + 3 + 1;   // {rw, addr, data}

endpackage
