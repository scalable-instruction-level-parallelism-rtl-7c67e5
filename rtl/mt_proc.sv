// mt_proc: one processor of the microthreaded chip multiprocessor.
//
// Joins the blocks that the design replicates per processor: the in-order
// pipeline, the local continuation queue (thread state and scheduling), the
// register allocation unit and the local register file. Towards the rest of
// the chip it has the create bus (cre requests up, thread creates down), the
// global write bus (buffer push up, broadcast down), one port on each switch
// and the instruction and data memory ports that the per-processor caches
// would serve. Read requests arriving on the read-request switch go to the
// LRF; window-release notices (the same switch) go to the LCQ, and the LCQ's
// own notices share the switch port with the LRF's requests, the LRF first.
//
// A new thread is accepted (`can_accept`) when the LCQ has a free slot and the
// RAU has a window of the family's size; the create then allocates the window,
// initialises it in the LRF and fills the slot in the same clock edge.
module mt_proc
  import mt_pkg::*;
#(
  parameter int  NREG     = 128,
  parameter int  NSLOT    = 8,
  parameter bit  HAS_MAIN = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [PROCW-1:0]  my_id,
  // create bus
  output logic              cre_valid,
  output logic [XLEN-1:0]   cre_addr,
  input  logic              cre_grant,
  input  logic              cr_valid,
  input  create_t           cr,
  input  logic [WINW-1:0]   fam_size,
  output logic              can_accept,
  output logic [RAW-1:0]    alloc_base,
  output logic              thread_done,
  input  logic              family_idle,
  // global write bus
  output logic              gw_push,
  output logic [RAW-1:0]    gw_addr,
  output logic [XLEN-1:0]   gw_data,
  input  logic              gw_full,
  input  logic              gw_bc_valid,
  input  gw_msg_t           gw_bc,
  // read-request switch
  output logic              rq_out_valid,
  output rq_msg_t           rq_out,
  input  logic              rq_out_ready,
  input  logic              rq_in_valid,
  input  rq_msg_t           rq_in,
  // data switch
  output logic              dt_out_valid,
  output dt_msg_t           dt_out,
  input  logic              dt_out_ready,
  input  logic              dt_in_valid,
  input  dt_msg_t           dt_in,
  // instruction memory
  output logic [PCW-1:0]    imem_addr,
  input  logic [31:0]       imem_rdata,
  // data memory
  output logic              dm_req_valid,
  output logic              dm_req_we,
  output logic [XLEN-1:0]   dm_req_addr,
  output logic [XLEN-1:0]   dm_req_wdata,
  output logic [RAW-1:0]    dm_req_tag,
  input  logic              dm_req_ready,
  input  logic              dm_resp_valid,
  input  logic [RAW-1:0]    dm_resp_tag,
  input  logic [XLEN-1:0]   dm_resp_data,
  output logic              halted
);
  // pipeline <-> LCQ
  logic             sched_valid, sched_take;
  tctx_t            sched_ctx;
  logic             ev_swch, ev_susp, ev_kill, ev_sync;
  logic [SLOTW-1:0] ev_slot_x, ev_slot_r;
  logic [PCW-1:0]   ev_pc_x;
  // pipeline <-> LRF
  logic [RAW-1:0]   rd_addr [2];
  logic [XLEN-1:0]  rd_data [2];
  logic [1:0]       rd_full;
  logic             wb_valid, inv_valid, susp_valid, susp_remote;
  logic [RAW-1:0]   wb_addr, inv_addr, susp_addr, susp_taddr;
  logic [XLEN-1:0]  wb_data;
  cont_t            susp_cont;
  logic [PROCW-1:0] susp_tproc;
  wake_t            wake [5];
  // LRF / LCQ -> request switch
  logic             lrf_rq_valid, lrf_rq_ready, rel_valid, rel_ready;
  rq_msg_t          lrf_rq, rel_msg;
  // RAU
  logic             fit, has_free;
  logic [1:0]       rau_rel_valid;
  logic [RAW-1:0]   rau_rel_base [2];
  logic [WINW-1:0]  rau_rel_size [2];
  logic [RAW:0]     free_count;
  logic [SLOTW:0]   busy_count;

  logic [3:0]       wr_valid;
  logic [RAW-1:0]   wr_addr [4];
  logic [XLEN-1:0]  wr_data [4];

  assign can_accept = has_free && fit;
  wire   do_create  = cr_valid && can_accept;

  mt_pipeline u_pipe (
    .clk, .rst_n,
    .sched_valid, .sched_ctx, .sched_take,
    .ev_swch, .ev_susp, .ev_kill, .ev_sync, .ev_slot_x, .ev_pc_x, .ev_slot_r,
    .imem_addr, .imem_rdata,
    .rd_addr, .rd_data, .rd_full,
    .wb_valid, .wb_addr, .wb_data, .inv_valid, .inv_addr,
    .susp_valid, .susp_addr, .susp_cont, .susp_remote, .susp_tproc, .susp_taddr,
    .gw_push, .gw_addr, .gw_data, .gw_full,
    .dm_req_valid, .dm_req_we, .dm_req_addr, .dm_req_wdata, .dm_req_tag, .dm_req_ready,
    .cre_valid, .cre_addr, .cre_grant,
    .halted
  );

  lcq #(.NSLOT(NSLOT), .HAS_MAIN(HAS_MAIN)) u_lcq (
    .clk, .rst_n,
    .cr_valid(do_create), .cr, .cr_base(alloc_base), .has_free,
    .sched_valid, .sched_ctx, .sched_take,
    .ev_swch, .ev_susp, .ev_kill, .ev_sync, .ev_slot_x, .ev_pc_x, .ev_slot_r,
    .wake, .family_idle,
    .rel_in_valid(rq_in_valid && rq_in.kind == RQ_RELEASE), .rel_in_base(rq_in.paddr),
    .relmsg_valid(rel_valid), .relmsg(rel_msg), .relmsg_ready(rel_ready), .my_id,
    .rau_rel_valid, .rau_rel_base, .rau_rel_size,
    .thread_done, .busy_count
  );

  rau #(.NREG(NREG)) u_rau (
    .clk, .rst_n,
    .size(fam_size), .fit, .base(alloc_base), .alloc(do_create),
    .rel_valid(rau_rel_valid), .rel_base(rau_rel_base), .rel_size(rau_rel_size),
    .free_count
  );

  always_comb begin
    wr_valid   = {gw_bc_valid && gw_bc.src != my_id, dt_in_valid, dm_resp_valid, wb_valid};
    wr_addr[0] = wb_addr;      wr_data[0] = wb_data;
    wr_addr[1] = dm_resp_tag;  wr_data[1] = dm_resp_data;
    wr_addr[2] = dt_in.caddr;  wr_data[2] = dt_in.data;
    wr_addr[3] = gw_bc.addr;   wr_data[3] = gw_bc.data;
  end

  lrf #(.NREG(NREG)) u_lrf (
    .clk, .rst_n, .my_id,
    .rd_addr, .rd_data, .rd_full,
    .wr_valid, .wr_addr, .wr_data,
    .inv_valid, .inv_addr,
    .susp_valid, .susp_addr, .susp_cont, .susp_remote, .susp_tproc, .susp_taddr,
    .alloc_valid(do_create), .alloc_base, .alloc_size(fam_size), .alloc_index(cr.index),
    .rq_in_valid(rq_in_valid && rq_in.kind == RQ_READ), .rq_in,
    .rq_out_valid(lrf_rq_valid), .rq_out(lrf_rq), .rq_out_ready(lrf_rq_ready),
    .dt_out_valid, .dt_out, .dt_out_ready,
    .wake
  );

  // the LRF's read requests go first on the shared switch port
  assign rq_out_valid = lrf_rq_valid || rel_valid;
  assign rq_out       = lrf_rq_valid ? lrf_rq : rel_msg;
  assign lrf_rq_ready = rq_out_ready && lrf_rq_valid;
  assign rel_ready    = rq_out_ready && !lrf_rq_valid;
endmodule
