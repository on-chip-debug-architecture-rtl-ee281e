// edu_scan_chain: the EDU scan chain that sits in parallel with a core's
// memory access bus (instruction side into IR, data side into the LSU).
// The chain is BUS_CHAIN_LEN = 64 cells, {instruction[63:32], data[31:0]},
// shifted LSB first from TDI towards TDO while Shift-DR and selected.
//   Capture-DR (rising TCK): the chain loads the core's current IR contents
//   and the value the LSU is storing (the result of an inserted STR).
//   Update-DR (falling TCK): the chain's contents are copied into the
//   parallel insert registers ir_insert and lsu_insert; while the core is in
//   stop mode its IR and LSU multiplexers take these values in place of the
//   program and data memories.
// The behaviour follows the document's description of the chain; the 64-bit
// layout, the LSB-first order and the reset values are this design's choice.
module edu_scan_chain
  import mocd_pkg::*;
(
  input  logic              tck,
  input  logic              trst_n,
  input  logic              tdi,
  input  dr_ctrl_t          dr,
  input  logic              sel,         // chain routed to the TAP
  output logic              tdo,
  // core side
  input  logic [INSN_W-1:0] cap_ir,      // current IR contents
  input  logic [DATA_W-1:0] cap_lsu,     // LSU store data
  output logic [INSN_W-1:0] ir_insert,   // instruction for the IR
  output logic [DATA_W-1:0] lsu_insert   // data for the LSU
);

  logic [BUS_CHAIN_LEN-1:0] chain;

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n)                chain <= '0;
    else if (sel && dr.capture) chain <= {cap_ir, cap_lsu};
    else if (sel && dr.shift)   chain <= {tdi, chain[BUS_CHAIN_LEN-1:1]};
  end

  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n) begin
      ir_insert  <= '0;
      lsu_insert <= '0;
    end else if (sel && dr.update) begin
      ir_insert  <= chain[BUS_CHAIN_LEN-1:DATA_W];
      lsu_insert <= chain[DATA_W-1:0];
    end
  end

  assign tdo = chain[0];

endmodule
