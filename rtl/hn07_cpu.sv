// hn07_cpu: the 5-stage pipelined HN-07 core.
//
// Stages, one clock each, as the document lays them out:
//   IF  instruction fetch: prgaddr = PC, prgdata is latched into the
//       address-decode register at the end of the cycle (program memory is
//       read combinationally, outside the core).
//   AD  address decode: the 10-bit data address is formed from the STATUS
//       bank bits and the 7-bit address field ({STATUS[7:5], f} for direct,
//       {STATUS[7:6], FSR} for f = 0 / INDF). Jumps, calls and returns act here,
//       so a taken branch costs one fetched instruction: two cycles.
//   RD  ALU decode (hn07_decoder) and RAM/REG read: the address goes to the
//       dual-port RAM (synchronous read) and to the SFR bus.
//   EX  ALU (hn07_alu) on W and the operand; conditional skips resolve here
//       and annul the next instruction, so a taken skip also costs one slot.
//   WB  write back to RAM/SFR, W, STATUS flags; SLEEP and writes to PCL
//       redirect the fetch from here and annul the three younger instructions.
//
// Hazards, all this design's choices: the operand read in RD is bypassed in
// EX from the instruction in WB and from the one that retired a cycle
// earlier, W and STATUS are forwarded from WB, so back-to-back dependent
// instructions need no stall. A jump/call/return waiting in AD is held one
// cycle while a skip (which might annul it) or a PCL write / SLEEP is still
// ahead of it; RETFIE is also held while an older SFR write (which may
// rewrite INTCON) is in flight, so that its GIE set is not overwritten.
// Bank bits, FSR and PCLATH are used in AD as they stand in the register;
// a program changing them must leave three instructions before the
// first access that depends on them (the document leaves instruction
// ordering to its compiler).
//
// Interrupts are taken in AD: the instruction there is replaced by a call to
// 0x0004 and its own address is pushed, GIE is cleared through irq_ack. An
// interrupt is not taken while an older skip, PCL write, SLEEP or SFR write
// is still in the pipeline, so a flag cleared just before RETFIE, or GIE
// cleared by software, is seen before the next interrupt decision.
// SLEEP stops fetching until `wake`; the `sleep` output is high meanwhile.
// The return stack is 8 deep and wraps. Reset is synchronous-deassert, active
// low, and starts fetching at 0x0000.
module hn07_cpu
  import hn07_pkg::*;
#(
  parameter int unsigned PC_W        = 16,
  parameter int unsigned STACK_DEPTH = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  // program memory
  output logic [PC_W-1:0] prgaddr,
  input  logic [13:0]     prgdata,
  // dual-port data RAM
  output raddr_t          ram_raddr,
  input  logic [7:0]      ram_rdata,
  output logic            ram_we,
  output raddr_t          ram_waddr,
  output logic [7:0]      ram_wdata,
  // SFR bus: read address in stage 3 (data combinational back), write and
  // read-retire strobes in stage 5
  output daddr_t          sfr_raddr,
  input  logic [7:0]      sfr_rdata,
  output daddr_t          sfr_waddr,
  output logic [7:0]      sfr_wdata,
  output logic            sfr_we,
  output logic            sfr_re,
  // interrupt controller
  input  logic            irq,
  input  logic            wake,
  output logic            irq_ack,
  output logic            retfie,
  // watchdog / power
  output logic            clrwdt,
  output logic            sleep
);
  localparam int unsigned SP_W = $clog2(STACK_DEPTH);

  // ---------------- architectural state ----------------
  logic [PC_W-1:0] pc;
  logic [7:0]      w, status, fsr, pclath;
  logic [PC_W-1:0] stack [STACK_DEPTH];
  logic [SP_W-1:0] sp;
  logic            sleeping;

  // ---------------- pipeline registers ----------------
  logic            ad_v;  logic [13:0] ad_ir; logic [PC_W-1:0] ad_pc;
  logic            rd_v;  logic [13:0] rd_ir; logic [PC_W-1:0] rd_pc; daddr_t rd_addr;
  logic            ex_v;  ctrl_t ex_c; logic [7:0] ex_lit; logic [2:0] ex_bit;
  daddr_t          ex_addr; logic [PC_W-1:0] ex_pc; logic ex_redir; logic [7:0] ex_ext;
  logic            wb_v;  ctrl_t wb_c; logic [7:0] wb_y; logic wb_z, wb_dc, wb_cy;
  daddr_t          wb_addr; logic [PC_W-1:0] wb_pc;
  logic            lr_v;  daddr_t lr_addr; logic [7:0] lr_data;   // last retired write

  // ---------------- AD: address decode and control transfers -------------
  logic   is_goto, is_call, is_ret, is_retfie, is_retlw, ad_cti;
  daddr_t ad_raw, ad_addr;
  logic [PC_W-1:0] ad_target, stack_top;

  assign is_goto   = ad_ir[13:11] == 3'b101;
  assign is_call   = ad_ir[13:11] == 3'b100;
  assign is_ret    = ad_ir == 14'h0008;
  assign is_retfie = ad_ir == 14'h0009;
  assign is_retlw  = ad_ir[13:10] == 4'b1101;
  assign ad_cti    = is_goto || is_call || is_ret || is_retfie || is_retlw;
  assign stack_top = stack[sp - SP_W'(1)];

  always_comb begin
    ad_raw  = (ad_ir[6:0] == 7'h00) ? {status[7:6], fsr} : {status[7:5], ad_ir[6:0]};
    ad_addr = is_common(ad_raw[6:0]) ? {3'b000, ad_raw[6:0]} : ad_raw;
    if (is_goto || is_call)
      ad_target = PC_W'({pclath[7:3], ad_ir[10:0]});
    else
      ad_target = stack_top;
  end

  // ---------------- RD: ALU decode, operand read ----------------
  ctrl_t rd_c;
  logic  rd_redir, rd_skip;
  hn07_decoder u_dec (.ir(rd_ir), .ctrl(rd_c));

  assign rd_redir  = (rd_c.we_f && rd_addr == A_PCL) || rd_c.sleep;
  assign rd_skip   = rd_v && rd_c.skip != SKIP_NONE;
  assign ram_raddr = ram_index(rd_addr);
  assign sfr_raddr = rd_addr;

  // ---------------- WB: next STATUS, redirects ----------------
  logic [7:0] status_nx;
  logic       wb_pcl, wb_sleep, flush_all;

  assign wb_pcl    = wb_v && wb_c.we_f && wb_addr == A_PCL;
  assign wb_sleep  = wb_v && wb_c.sleep;
  assign flush_all = wb_pcl || wb_sleep;

  always_comb begin
    status_nx = status;
    if (wb_v) begin
      if (wb_c.we_f && wb_addr == A_STATUS)
        status_nx = {wb_y[7:5], status[4:3], wb_y[2:0]};
      if (wb_c.upd_z)  status_nx[S_Z]  = wb_z;
      if (wb_c.upd_dc) status_nx[S_DC] = wb_dc;
      if (wb_c.upd_c)  status_nx[S_C]  = wb_cy;
      if (wb_c.sleep)  begin status_nx[S_PD] = 1'b0; status_nx[S_TO] = 1'b1; end
      if (wb_c.clrwdt) begin status_nx[S_PD] = 1'b1; status_nx[S_TO] = 1'b1; end
    end
  end

  // ---------------- EX: operand bypass, ALU, skip ----------------
  logic       ex_core, fwd_wb, fwd_lr;
  logic [7:0] core_val, base, opnd, w_fwd, alu_b, alu_y;
  logic       alu_z, alu_dc, alu_c, skip_taken;

  always_comb begin
    ex_core  = ex_addr == A_PCL || ex_addr == A_STATUS || ex_addr == A_FSR ||
               ex_addr == A_PCLATH || ex_addr == A_INDF;
    unique case (ex_addr)
      A_PCL:    core_val = 8'(ex_pc + PC_W'(1));   // PC of the next instruction
      A_STATUS: core_val = status_nx;
      A_FSR:    core_val = fsr;
      A_PCLATH: core_val = pclath;
      default:  core_val = 8'h00;      // INDF through FSR = 0
    endcase
    if (is_sfr(ex_addr)) base = ex_core ? core_val : ex_ext;
    else                 base = ram_rdata;
    fwd_wb = wb_v && wb_c.we_f && wb_addr == ex_addr && ex_addr != A_STATUS;
    fwd_lr = lr_v && lr_addr == ex_addr && !ex_core;
    if (fwd_wb)      opnd = wb_y;
    else if (fwd_lr) opnd = lr_data;
    else             opnd = base;
    w_fwd = (wb_v && wb_c.we_w) ? wb_y : w;
    alu_b = ex_c.use_lit ? ex_lit : opnd;
  end

  hn07_alu u_alu (
    .op(ex_c.op), .w(w_fwd), .b(alu_b), .bitsel(ex_bit), .cin(status_nx[S_C]),
    .y(alu_y), .z(alu_z), .dc(alu_dc), .c(alu_c)
  );

  assign skip_taken = ex_v && ((ex_c.skip == SKIP_IF_ZERO && alu_z) ||
                               (ex_c.skip == SKIP_IF_NZ   && !alu_z));

  // ---------------- hazard control ----------------
  logic kill_rd, kill_ad, stall_ad, ad_act, irq_take, cti_take, sfr_wr_ahead;

  assign kill_rd  = flush_all || (skip_taken && rd_v);
  assign kill_ad  = flush_all || (skip_taken && !rd_v);
  assign stall_ad = ad_v && ad_cti &&
                    (rd_skip || (rd_v && rd_redir) || (ex_v && ex_redir) ||
                     (wb_v && (wb_c.sleep || (wb_c.we_f && wb_addr == A_PCL))) ||
                     (is_retfie && sfr_wr_ahead));
  assign ad_act   = ad_v && !kill_ad && !stall_ad;
  // An SFR write still in flight may change GIE or clear the pending flag.
  assign sfr_wr_ahead = (rd_v && rd_c.we_f && is_sfr(rd_addr)) ||
                        (ex_v && ex_c.we_f && is_sfr(ex_addr)) ||
                        (wb_v && wb_c.we_f && is_sfr(wb_addr));
  assign irq_take = irq && ad_act && !sleeping && !rd_skip &&
                    !(ex_v && ex_c.skip != SKIP_NONE) && !sfr_wr_ahead &&
                    !(rd_v && rd_redir) && !(ex_v && ex_redir);
  assign cti_take = ad_act && ad_cti && !irq_take;

  // ---------------- outputs ----------------
  assign prgaddr   = pc;
  assign ram_we    = wb_v && wb_c.we_f && !is_sfr(wb_addr);
  assign ram_waddr = ram_index(wb_addr);
  assign ram_wdata = wb_y;
  assign sfr_waddr = wb_addr;
  assign sfr_wdata = wb_y;
  assign sfr_we    = wb_v && wb_c.we_f && is_sfr(wb_addr);
  assign sfr_re    = wb_v && wb_c.rd_f && is_sfr(wb_addr);
  assign irq_ack   = irq_take;
  assign retfie    = cti_take && is_retfie;
  assign clrwdt    = wb_v && (wb_c.clrwdt || wb_c.sleep);
  assign sleep     = sleeping;

  // ---------------- sequential ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc       <= PC_W'(RESET_VEC);
      sp       <= '0;
      sleeping <= 1'b0;
      ad_v     <= 1'b0; ad_ir <= '0; ad_pc <= '0;
      rd_v     <= 1'b0; rd_ir <= '0; rd_pc <= '0; rd_addr <= '0;
      ex_v     <= 1'b0; ex_c  <= '0; ex_lit <= '0; ex_bit <= '0; ex_addr <= '0;
      ex_pc    <= '0;   ex_redir <= 1'b0; ex_ext <= '0;
      wb_v     <= 1'b0; wb_c  <= '0; wb_y <= '0; wb_z <= 1'b0; wb_dc <= 1'b0;
      wb_cy    <= 1'b0; wb_addr <= '0; wb_pc <= '0;
      lr_v     <= 1'b0; lr_addr <= '0; lr_data <= '0;
      w        <= '0;
      status   <= 8'h18;               // TO = PD = 1
      fsr      <= '0;
      pclath   <= '0;
    end else begin
      // ---- IF / AD ----
      if (flush_all) begin
        pc   <= wb_pcl ? PC_W'({pclath, wb_y}) : wb_pc + PC_W'(1);
        ad_v <= 1'b0;
      end else if (irq_take) begin
        pc        <= PC_W'(INT_VEC);
        stack[sp] <= ad_pc;
        sp        <= sp + SP_W'(1);
        ad_v      <= 1'b0;
      end else if (cti_take) begin
        pc   <= ad_target;
        ad_v <= 1'b0;
        if (is_call) begin
          stack[sp] <= ad_pc + PC_W'(1);
          sp        <= sp + SP_W'(1);
        end else if (!is_goto) begin
          sp <= sp - SP_W'(1);
        end
      end else if (stall_ad) begin
        // hold PC and the instruction in AD
      end else if (sleeping) begin
        ad_v <= 1'b0;
      end else begin
        pc    <= pc + PC_W'(1);
        ad_v  <= 1'b1;
        ad_ir <= prgdata;
        ad_pc <= pc;
      end

      // ---- sleep state ----
      if (wb_sleep)      sleeping <= !wake;
      else if (wake)     sleeping <= 1'b0;

      // ---- AD -> RD ----
      rd_v    <= ad_act && !irq_take;
      rd_ir   <= ad_ir;
      rd_pc   <= ad_pc;
      rd_addr <= ad_addr;

      // ---- RD -> EX ----
      ex_v     <= rd_v && !kill_rd;
      ex_c     <= rd_c;
      ex_lit   <= rd_ir[7:0];
      ex_bit   <= rd_ir[9:7];
      ex_addr  <= rd_addr;
      ex_pc    <= rd_pc;
      ex_redir <= rd_redir;
      ex_ext   <= sfr_rdata;

      // ---- EX -> WB ----
      wb_v    <= ex_v && !flush_all;
      wb_c    <= ex_c;
      wb_y    <= alu_y;
      wb_z    <= alu_z;
      wb_dc   <= alu_dc;
      wb_cy   <= alu_c;
      wb_addr <= ex_addr;
      wb_pc   <= ex_pc;

      // ---- WB: architectural writes ----
      lr_v    <= wb_v && wb_c.we_f;
      lr_addr <= wb_addr;
      lr_data <= wb_y;
      status  <= status_nx;
      if (wb_v && wb_c.we_w) w <= wb_y;
      if (wb_v && wb_c.we_f && wb_addr == A_FSR)    fsr    <= wb_y;
      if (wb_v && wb_c.we_f && wb_addr == A_PCLATH) pclath <= wb_y;
    end
  end

  // A held jump must still be in AD on the next cycle.
  always_ff @(posedge clk) begin
    if (rst_n && stall_ad) assert (ad_v) else $error("stall without an instruction in AD");
  end
endmodule
