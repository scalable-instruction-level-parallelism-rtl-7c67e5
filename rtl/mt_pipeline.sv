// mt_pipeline: in-order issue pipeline of one processor with explicit
// context switching between microthreads.
//
// Three stages. Fetch (IF) runs the current thread, or takes the next ready
// one from the LCQ in the same cycle, reads its instruction and increments
// its pc; after fetching swch, kill, bsync or finish it stops fetching that
// thread, so the next fetch comes from another thread and the pipeline
// interleaves threads without flushing. Register read (RR) maps the 5-bit
// specifiers to physical registers with the thread state carried down the
// pipeline: specifiers 0..15 are $G (registers 0..15), 16..31 are the
// thread's window at `base` ($L, then $S, then $D from offset L+S); the main
// thread uses all 32 specifiers as $G registers 0..31. If an operand register
// is not full, the instruction is dropped and the thread suspends on that
// register (its continuation is stored there); for a $D register the LRF also
// asks the producer's processor for the value, at the producer's window base
// plus the offset less S. Execute (EX) computes, writes back (writes to $G also
// go to the global write bus), sends loads and stores to memory (a load empties
// its destination, which the memory reply fills later), sends cre to the GCQ
// and reports swch / kill / bsync / finish to the LCQ.
//
// The explicit switch at fetch, suspension at register read, the register
// mapping and the thread state carried to the read stage follow the design
// description, which calls this a conventional in-order pipeline and gives no
// more. The three-stage split, the forwarding path from EX to RR, the
// instruction encoding (see mt_pkg) and dropping the one younger instruction of
// a suspending thread that may already have been fetched are this design's
// choices. brk is decoded but executes as a no-op.
//
// A stall (memory port busy, global-write buffer full, create bus not
// granted) freezes all three stages.
module mt_pipeline
  import mt_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // LCQ
  input  logic              sched_valid,
  input  tctx_t             sched_ctx,
  output logic              sched_take,
  output logic              ev_swch,
  output logic              ev_susp,
  output logic              ev_kill,
  output logic              ev_sync,
  output logic [SLOTW-1:0]  ev_slot_x,
  output logic [PCW-1:0]    ev_pc_x,
  output logic [SLOTW-1:0]  ev_slot_r,
  // instruction memory
  output logic [PCW-1:0]    imem_addr,
  input  logic [31:0]       imem_rdata,
  // LRF
  output logic [RAW-1:0]    rd_addr [2],
  input  logic [XLEN-1:0]   rd_data [2],
  input  logic [1:0]        rd_full,
  output logic              wb_valid,
  output logic [RAW-1:0]    wb_addr,
  output logic [XLEN-1:0]   wb_data,
  output logic              inv_valid,
  output logic [RAW-1:0]    inv_addr,
  output logic              susp_valid,
  output logic [RAW-1:0]    susp_addr,
  output cont_t             susp_cont,
  output logic              susp_remote,
  output logic [PROCW-1:0]  susp_tproc,
  output logic [RAW-1:0]    susp_taddr,
  // global write bus buffer
  output logic              gw_push,
  output logic [RAW-1:0]    gw_addr,
  output logic [XLEN-1:0]   gw_data,
  input  logic              gw_full,
  // data memory
  output logic              dm_req_valid,
  output logic              dm_req_we,
  output logic [XLEN-1:0]   dm_req_addr,
  output logic [XLEN-1:0]   dm_req_wdata,
  output logic [RAW-1:0]    dm_req_tag,
  input  logic              dm_req_ready,
  // create bus
  output logic              cre_valid,
  output logic [XLEN-1:0]   cre_addr,
  input  logic              cre_grant,
  // status
  output logic              halted
);
  // ------------------------------------------------------------ pipeline registers
  logic   cur_valid;
  tctx_t  cur;

  logic   rr_valid;
  instr_t rr_instr;
  tctx_t  rr_ctx;

  typedef struct packed {
    op_e              op;
    logic [XLEN-1:0]  a;
    logic [XLEN-1:0]  b;
    logic [XLEN-1:0]  imm;
    logic [RAW-1:0]   waddr;
    logic [SLOTW-1:0] slot;
    logic [PCW-1:0]   pc;
  } ex_t;
  logic ex_valid;
  ex_t  ex;

  logic stall;

  // ------------------------------------------------------------ helpers
  function automatic logic [RAW-1:0] phys(tctx_t c, logic [SPECW-1:0] s);
    if (c.is_main)  return RAW'(s);
    else if (s[4])  return c.base + RAW'(s[3:0]);
    else            return RAW'(s[3:0]);
  endfunction

  function automatic logic is_dreg(tctx_t c, logic [SPECW-1:0] s);
    return !c.is_main && s[4] && (WINW'(s[3:0]) >= c.nl + c.ns);
  endfunction

  function automatic logic writes_reg(op_e o);
    return o inside {OP_ADD, OP_SUB, OP_MUL, OP_MV, OP_ADDI};
  endfunction

  // ------------------------------------------------------------ IF
  logic   f_valid, f_from_sched, f_ends, f_drop;
  tctx_t  f_ctx;
  instr_t f_instr;

  assign f_from_sched = !cur_valid && sched_valid;
  assign f_valid      = cur_valid || sched_valid;
  assign f_ctx        = cur_valid ? cur : sched_ctx;
  assign imem_addr    = f_ctx.pc;
  assign f_instr      = instr_t'(imem_rdata);
  assign f_ends       = f_instr.op inside {OP_SWCH, OP_KILL, OP_BSYNC, OP_FINISH};

  // ------------------------------------------------------------ RR
  op_e              r_op;
  logic [SPECW-1:0] r_s1, r_s2;
  logic [RAW-1:0]   r_p1, r_p2;
  logic             r_need1, r_need2, r_av1, r_av2, r_fw1, r_fw2;
  logic [XLEN-1:0]  r_v1, r_v2;
  logic             r_susp;
  logic [SPECW-1:0] r_ss;      // specifier suspended on
  logic [RAW-1:0]   r_sp;

  always_comb begin
    r_op    = rr_instr.op;
    r_s1    = rr_instr.ra;
    r_s2    = (r_op == OP_SW) ? rr_instr.rd : rb_of(rr_instr);
    r_p1    = phys(rr_ctx, r_s1);
    r_p2    = phys(rr_ctx, r_s2);
    r_need1 = r_op inside {OP_ADD, OP_SUB, OP_MUL, OP_MV, OP_ADDI, OP_LW, OP_SW, OP_CRE};
    r_need2 = r_op inside {OP_ADD, OP_SUB, OP_MUL, OP_SW};
    // forwarding from EX; a load in EX empties its destination
    r_fw1   = ex_valid && writes_reg(ex.op) && ex.waddr == r_p1;
    r_fw2   = ex_valid && writes_reg(ex.op) && ex.waddr == r_p2;
    r_av1   = r_fw1 || (rd_full[0] && !(ex_valid && ex.op == OP_LW && ex.waddr == r_p1));
    r_av2   = r_fw2 || (rd_full[1] && !(ex_valid && ex.op == OP_LW && ex.waddr == r_p2));
    r_v1    = r_fw1 ? wb_data : rd_data[0];
    r_v2    = r_fw2 ? wb_data : rd_data[1];
    r_susp  = rr_valid && ((r_need1 && !r_av1) || (r_need2 && !r_av2));
    r_ss    = (r_need1 && !r_av1) ? r_s1 : r_s2;
    r_sp    = (r_need1 && !r_av1) ? r_p1 : r_p2;
  end

  assign rd_addr[0] = r_p1;
  assign rd_addr[1] = r_p2;

  assign susp_valid  = r_susp && !stall;
  assign susp_addr   = r_sp;
  assign susp_cont   = '{slot: rr_ctx.slot, pc: rr_ctx.pc};
  assign susp_remote = is_dreg(rr_ctx, r_ss);
  assign susp_tproc  = rr_ctx.prod_proc;
  assign susp_taddr  = rr_ctx.prod_base + RAW'(r_ss[3:0]) - RAW'(rr_ctx.ns);
  assign ev_susp     = susp_valid;
  assign ev_slot_r   = rr_ctx.slot;

  assign f_drop      = susp_valid && f_valid && f_ctx.slot == rr_ctx.slot && !f_from_sched;
  assign sched_take  = !stall && f_from_sched;

  // ------------------------------------------------------------ EX
  logic [XLEN-1:0] x_res;
  logic            x_mem, x_alu, x_gw;
  always_comb begin
    unique case (ex.op)
      OP_ADD:  x_res = ex.a + ex.b;
      OP_SUB:  x_res = ex.a - ex.b;
      OP_MUL:  x_res = ex.a * ex.b;
      OP_MV:   x_res = ex.a;
      OP_ADDI: x_res = ex.a + ex.imm;
      default: x_res = ex.a + ex.imm;      // effective address / create block address
    endcase
    x_mem = ex_valid && ex.op inside {OP_LW, OP_SW};
    x_alu = ex_valid && writes_reg(ex.op);
    x_gw  = x_alu && (int'(ex.waddr) < NGLOBAL);
    stall = (x_mem && !dm_req_ready) || (x_gw && gw_full) ||
            (ex_valid && ex.op == OP_CRE && !cre_grant);
  end

  assign wb_valid     = x_alu && !stall;
  assign wb_addr      = ex.waddr;
  assign wb_data      = x_res;
  assign gw_push      = x_gw && !stall;
  assign gw_addr      = ex.waddr;
  assign gw_data      = x_res;
  assign inv_valid    = ex_valid && ex.op == OP_LW && !stall;
  assign inv_addr     = ex.waddr;
  assign dm_req_valid = x_mem;
  assign dm_req_we    = ex.op == OP_SW;
  assign dm_req_addr  = x_res;
  assign dm_req_wdata = ex.b;
  assign dm_req_tag   = ex.waddr;
  assign cre_valid    = ex_valid && ex.op == OP_CRE;
  assign cre_addr     = x_res;

  assign ev_swch   = ex_valid && !stall && ex.op == OP_SWCH;
  assign ev_kill   = ex_valid && !stall && ex.op inside {OP_KILL, OP_FINISH};
  assign ev_sync   = ex_valid && !stall && ex.op == OP_BSYNC;
  assign ev_slot_x = ex.slot;
  assign ev_pc_x   = ex.pc + 1'b1;

  // ------------------------------------------------------------ registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_valid <= 1'b0;
      cur       <= '0;
      rr_valid  <= 1'b0;
      rr_instr  <= '0;
      rr_ctx    <= '0;
      ex_valid  <= 1'b0;
      ex        <= '0;
      halted    <= 1'b0;
    end else if (!stall) begin
      // IF -> RR
      if (f_valid && !f_drop) begin
        rr_valid  <= 1'b1;
        rr_instr  <= f_instr;
        rr_ctx    <= f_ctx;
        cur_valid <= !f_ends;
        cur       <= f_ctx;
        cur.pc    <= f_ctx.pc + 1'b1;
      end else begin
        rr_valid <= 1'b0;
        if (f_drop) cur_valid <= 1'b0;
      end
      // RR -> EX
      ex_valid <= rr_valid && !r_susp;
      ex.op    <= r_op;
      ex.a     <= r_v1;
      ex.b     <= r_v2;
      ex.imm   <= XLEN'(signed'(rr_instr.imm));
      ex.waddr <= phys(rr_ctx, rr_instr.rd);
      ex.slot  <= rr_ctx.slot;
      ex.pc    <= rr_ctx.pc;
      // EX
      if (ex_valid && ex.op == OP_FINISH) halted <= 1'b1;
    end
  end
endmodule
