// mini_core: behavioural model of a target processor core, for testbenches
// only. It is a five-stage in-order pipeline (FE, DC, EX, ME, WB) with the
// debug extensions the MOCD architecture asks of a core:
//  - status info: branch_taken (a BNEZ resolves taken in EX this cycle) and
//    pipe_empty (no valid instruction left in any stage = stop point);
//  - debug control into the pipeline flush logic: on flush, a precise
//    request cancels the oldest stage holding flush_pc and every younger
//    stage, otherwise FE, DC and EX are cancelled; fetch restarts at the PC
//    of the oldest cancelled instruction; hold stops new fetches;
//  - IR and LSU multiplexers: in stop mode FE takes ir_insert instead of
//    program memory, a load takes lsu_insert and a store is captured into
//    lsu_capture instead of reaching data memory.
// Instructions: [31:28] op, [27:24] register, [15:0] immediate/address.
// 0 NOP; 1 ADDI r,imm (r += sign-extended imm, in EX); 2 LDR r,[a] (in ME);
// 3 STR r,[a] (in ME); 4 BNEZ r,target (in EX, cancels FE and DC);
// 5 LDM r,n,[a] ([23:16] = n >= 1: loads r..r+n-1 from n consecutive words,
// one per cycle in ME; the younger stages stall until the last word), a
// multi-cycle instruction that makes the stop point come later.
// Byte addresses, 4 bytes per instruction; program and data memories are
// 256 words each, preloaded through the tasks load_insn / write_data.
module mini_core
  import mocd_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              stop_mode_en,
  input  debug_ctrl_t       debug_ctrl,
  input  logic [INSN_W-1:0] ir_insert,
  input  logic [DATA_W-1:0] lsu_insert,
  output mem_bus_t          bus,
  output status_info_t      status,
  output logic [INSN_W-1:0] cap_ir,
  output logic [DATA_W-1:0] cap_lsu
);

  typedef struct packed {
    logic        valid;
    logic [31:0] pc;
    logic [31:0] insn;
    logic [31:0] sdata;
  } stage_t;

  localparam logic [3:0] OP_NOP = 4'd0, OP_ADDI = 4'd1, OP_LDR = 4'd2,
                         OP_STR = 4'd3, OP_BNEZ = 4'd4,
                         OP_LDM = 4'd5;

  logic [31:0] imem [256];
  logic [31:0] dmem [256];
  logic [31:0] regs [16];
  logic [31:0] pc;
  logic [31:0] lsu_capture;
  stage_t fe, dc, ex, me, wb;
  int unsigned retired;
  logic [7:0] mcnt;  // words of the LDM in ME already loaded

  task automatic load_insn(input int unsigned a, input logic [31:0] w);
    imem[a[9:2]] = w;
  endtask
  task automatic write_data(input int unsigned a, input logic [31:0] w);
    dmem[a[9:2]] = w;
  endtask

  function automatic logic [3:0] op(input stage_t s);
    return s.valid ? s.insn[31:28] : OP_NOP;
  endfunction

  // a multi-cycle LDM in ME holds the younger stages
  logic stall;
  assign stall = (op(me) == OP_LDM) && (mcnt != me.insn[23:16] - 8'd1);

  logic ex_taken;
  assign ex_taken = !stall && (op(ex) == OP_BNEZ) && (regs[ex.insn[27:24]] != 0);

  // memory access signals seen by the EDU comparator
  logic run_fetch;
  assign run_fetch      = !stop_mode_en && !debug_ctrl.hold && !debug_ctrl.flush;
  logic [31:0] maddr;
  assign maddr          = {16'h0, me.insn[15:0]} + ((op(me) == OP_LDM) ? {22'h0, mcnt, 2'b00} : 32'h0);
  assign bus.fetch      = run_fetch && !stall;
  assign bus.fetch_addr = pc;
  assign bus.rd         = !stop_mode_en && (op(me) == OP_LDR || op(me) == OP_LDM);
  assign bus.wr         = !stop_mode_en && (op(me) == OP_STR);
  assign bus.daddr      = maddr;
  assign bus.wdata      = me.sdata;
  assign bus.rdata      = dmem[maddr[9:2]];

  assign status.branch_taken = ex_taken;
  assign status.pipe_empty   = !(fe.valid || dc.valid || ex.valid || me.valid || wb.valid);
  assign cap_ir  = fe.insn;
  assign cap_lsu = lsu_capture;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc <= '0;
      fe <= '0; dc <= '0; ex <= '0; me <= '0; wb <= '0;
      lsu_capture <= '0;
      retired <= 0;
      mcnt <= '0;
      for (int r = 0; r < 16; r++) regs[r] <= '0;
    end else begin
      stage_t f, d, e, m;
      logic [31:0] next_pc;
      logic cancel_any;
      f = fe; d = dc; e = ex; m = me;
      next_pc = pc;
      cancel_any = 1'b0;
      // pipeline flush requested by the EDU
      if (debug_ctrl.flush) begin
        logic [3:0] kill;  // {me, ex, dc, fe}
        kill = '0;
        if (debug_ctrl.precise) begin
          if (m.valid && m.pc == debug_ctrl.flush_pc)      kill = 4'b1111;
          else if (e.valid && e.pc == debug_ctrl.flush_pc) kill = 4'b0111;
          else if (d.valid && d.pc == debug_ctrl.flush_pc) kill = 4'b0011;
          else if (f.valid && f.pc == debug_ctrl.flush_pc) kill = 4'b0001;
        end else begin
          kill = 4'b0111;
        end
        // restart at the oldest cancelled instruction, or the next fetch
        if (kill[0] && f.valid) next_pc = f.pc;
        if (kill[1] && d.valid) next_pc = d.pc;
        if (kill[2] && e.valid) next_pc = e.pc;
        if (kill[3] && m.valid) next_pc = m.pc;
        if (kill[0]) f.valid = 1'b0;
        if (kill[1]) d.valid = 1'b0;
        if (kill[2]) e.valid = 1'b0;
        if (kill[3]) m.valid = 1'b0;
        cancel_any = 1'b1;
      end
      // ME: load/store (through the LSU insert/capture path in stop mode)
      if (op(m) == OP_LDR) regs[m.insn[27:24]] <= stop_mode_en ? lsu_insert : dmem[m.insn[9:2]];
      if (op(m) == OP_STR) begin
        if (stop_mode_en) lsu_capture <= m.sdata;
        else              dmem[m.insn[9:2]] <= m.sdata;
      end
      if (op(m) == OP_LDM)
        regs[m.insn[27:24] + mcnt[3:0]] <= stop_mode_en ? lsu_insert : dmem[maddr[9:2]];
      if (op(m) == OP_LDM && mcnt != m.insn[23:16] - 8'd1) begin
        // not the last word: ME repeats, the younger stages wait
        mcnt <= mcnt + 8'd1;
        if (wb.valid) retired <= retired + 1;
        wb <= '0;
        me <= m;
        ex <= e;
        dc <= d;
        fe <= f;
        pc <= next_pc;
      end else begin
        mcnt <= '0;
        // EX: ALU and branch
        if (op(e) == OP_ADDI)
          regs[e.insn[27:24]] <= regs[e.insn[27:24]] + {{16{e.insn[15]}}, e.insn[15:0]};
        if (op(e) == OP_STR) e.sdata = regs[e.insn[27:24]];
        if (op(e) == OP_BNEZ && regs[e.insn[27:24]] != 0) begin
          f.valid = 1'b0;
          d.valid = 1'b0;
          next_pc = {16'h0, e.insn[15:0]};
          cancel_any = 1'b1;
        end
        if (wb.valid) retired <= retired + 1;
        wb <= m;
        me <= e;
        ex <= d;
        dc <= f;
        // FE: program memory in run mode, the inserted instruction in stop mode
        if (stop_mode_en) begin
          fe <= '{valid: 1'b1, pc: pc, insn: ir_insert, sdata: '0};
        end else if (run_fetch && !cancel_any) begin
          fe <= '{valid: 1'b1, pc: pc, insn: imem[pc[9:2]], sdata: '0};
          next_pc = pc + 4;
        end else begin
          fe <= '0;
        end
        pc <= next_pc;
      end
    end
  end

endmodule
