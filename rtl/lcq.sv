// lcq: local continuation queue of one processor.
//
// Holds the state of every thread allocated to this processor and picks the
// next ready thread for the pipeline. The design description places thread
// state here and lists what the pipeline needs from it (window base, producer
// base, producer processor); the slot states, the round-robin choice among
// ready threads and the window-release protocol below are this design's.
//
// Slot states: FREE; READY (may be fetched); RUNNING (the pipeline owns it);
// WAITING (suspended on an empty register, which holds its continuation);
// SYNC (main thread in bsync, waiting for the family to end); ZOMBIE
// (terminated, window not yet released).
//
// Window release: a consumer thread reads its producer's $S registers after
// the producer may have terminated, so a producer's window is kept until its
// consumer has terminated too. When a thread whose producer is a created
// thread terminates, it sends a release notice to the producer's processor
// (`relmsg_*`, over the read-request switch); the producer's slot is freed and
// its window returned to the RAU once it has terminated and received that
// notice (or has no consumer). Threads whose producer is the creating thread
// send nothing.
//
// Timing: a create (`cr_valid`) fills the lowest free slot on the clock edge.
// The scheduled thread (`sched_*`) is combinational; `sched_take` marks it
// RUNNING. Events from the pipeline and wakes from the LRF act on the edge;
// a wake in the same cycle as the suspension it ends wins.
module lcq
  import mt_pkg::*;
#(
  parameter int  NSLOT    = 8,
  parameter bit  HAS_MAIN = 1'b0,   // this processor starts the main thread in slot 0
  parameter logic [PCW-1:0] MAIN_PC = '0
) (
  input  logic              clk,
  input  logic              rst_n,
  // create from the GCQ
  input  logic              cr_valid,
  input  create_t           cr,
  input  logic [RAW-1:0]    cr_base,
  output logic              has_free,
  // schedule to the pipeline
  output logic              sched_valid,
  output tctx_t             sched_ctx,
  input  logic              sched_take,
  // pipeline events
  input  logic              ev_swch,
  input  logic              ev_susp,
  input  logic              ev_kill,
  input  logic              ev_sync,
  input  logic [SLOTW-1:0]  ev_slot_x,     // slot of swch / kill / sync (execute stage)
  input  logic [PCW-1:0]    ev_pc_x,       // pc to resume at after swch / sync
  input  logic [SLOTW-1:0]  ev_slot_r,     // slot of a suspension (read stage)
  input  wake_t             wake [5],
  input  logic              family_idle,
  // window release
  input  logic              rel_in_valid,
  input  logic [RAW-1:0]    rel_in_base,
  output logic              relmsg_valid,
  output rq_msg_t           relmsg,
  input  logic              relmsg_ready,
  input  logic [PROCW-1:0]  my_id,
  output logic [1:0]        rau_rel_valid,
  output logic [RAW-1:0]    rau_rel_base [2],
  output logic [WINW-1:0]   rau_rel_size [2],
  // to the GCQ
  output logic              thread_done,
  output logic [SLOTW:0]    busy_count
);
  typedef enum logic [2:0] {
    SL_FREE, SL_READY, SL_RUNNING, SL_WAITING, SL_SYNC, SL_ZOMBIE
  } slot_e;

  typedef struct packed {
    slot_e            st;
    tctx_t            ctx;
    logic             has_consumer;
    logic             prod_is_thread;
    logic             cons_done;
    logic             relmsg_pend;
  } slot_t;

  localparam int IW = $clog2(NSLOT);

  slot_t sl [NSLOT];

  // ------------------------------------------------------------ free slot
  logic [IW-1:0] free_idx;
  always_comb begin
    has_free = 1'b0;
    free_idx = '0;
    for (int i = NSLOT - 1; i >= 0; i--)
      if (sl[i].st == SL_FREE) begin has_free = 1'b1; free_idx = IW'(i); end
  end

  // ------------------------------------------------------------ scheduling
  logic [NSLOT-1:0] ready_vec;
  logic [NSLOT-1:0] sgnt;
  logic [IW-1:0]    sidx;
  always_comb
    for (int i = 0; i < NSLOT; i++) ready_vec[i] = (sl[i].st == SL_READY);

  rr_arbiter #(.N(NSLOT)) u_sched (
    .clk, .rst_n, .req(ready_vec), .advance(sched_take),
    .grant(sgnt), .grant_idx(sidx), .any(sched_valid)
  );
  assign sched_ctx = sl[sidx].ctx;

  // ------------------------------------------------------------ release bookkeeping
  logic [NSLOT-1:0] can_free;
  logic [NSLOT-1:0] msg_vec;
  logic [IW-1:0]    f0, f1, midx;
  logic             f0v, f1v;
  always_comb begin
    for (int i = 0; i < NSLOT; i++) begin
      can_free[i] = (sl[i].st == SL_ZOMBIE) && (sl[i].cons_done || !sl[i].has_consumer)
                    && !sl[i].relmsg_pend;
      msg_vec[i]  = (sl[i].st == SL_ZOMBIE) && sl[i].relmsg_pend;
    end
    f0v = 1'b0; f0 = '0; f1v = 1'b0; f1 = '0; relmsg_valid = 1'b0; midx = '0;
    for (int i = NSLOT - 1; i >= 0; i--) begin
      if (can_free[i]) begin f0v = 1'b1; f0 = IW'(i); end
      if (msg_vec[i])  begin relmsg_valid = 1'b1; midx = IW'(i); end
    end
    for (int i = 0; i < NSLOT; i++)
      if (can_free[i]) begin f1v = 1'b1; f1 = IW'(i); end
    if (f1 == f0) f1v = 1'b0;
    relmsg = '{kind: RQ_RELEASE, dst: sl[midx].ctx.prod_proc, src: my_id,
               paddr: sl[midx].ctx.prod_base, caddr: '0};
    rau_rel_valid   = {f1v, f0v};
    rau_rel_base[0] = sl[f0].ctx.base;
    rau_rel_size[0] = sl[f0].ctx.nl + 2 * sl[f0].ctx.ns;
    rau_rel_base[1] = sl[f1].ctx.base;
    rau_rel_size[1] = sl[f1].ctx.nl + 2 * sl[f1].ctx.ns;
  end

  assign thread_done = ev_kill && !sl[ev_slot_x].ctx.is_main;

  always_comb begin
    busy_count = '0;
    for (int i = 0; i < NSLOT; i++) busy_count += (SLOTW+1)'(sl[i].st != SL_FREE);
  end

  // ------------------------------------------------------------ state update
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NSLOT; i++) begin
        sl[i] <= '0;
        sl[i].st <= SL_FREE;
      end
      if (HAS_MAIN) begin
        sl[0].st          <= SL_READY;
        sl[0].ctx.is_main <= 1'b1;
        sl[0].ctx.pc      <= MAIN_PC;
      end
    end else begin
      // frees and notices
      if (f0v) sl[f0].st <= SL_FREE;
      if (f1v) sl[f1].st <= SL_FREE;
      if (relmsg_valid && relmsg_ready) sl[midx].relmsg_pend <= 1'b0;

      if (rel_in_valid)
        for (int i = 0; i < NSLOT; i++)
          if (sl[i].st != SL_FREE && !sl[i].ctx.is_main && sl[i].ctx.base == rel_in_base)
            sl[i].cons_done <= 1'b1;

      // create
      if (cr_valid && has_free) begin
        sl[free_idx].st                 <= SL_READY;
        sl[free_idx].ctx.slot           <= SLOTW'(free_idx);
        sl[free_idx].ctx.pc             <= cr.pc;
        sl[free_idx].ctx.base           <= cr_base;
        sl[free_idx].ctx.prod_base      <= cr.prod_base;
        sl[free_idx].ctx.prod_proc      <= cr.prod_proc;
        sl[free_idx].ctx.nl             <= cr.nl;
        sl[free_idx].ctx.ns             <= cr.ns;
        sl[free_idx].ctx.is_main        <= 1'b0;
        sl[free_idx].has_consumer       <= cr.has_consumer;
        sl[free_idx].prod_is_thread     <= cr.prod_is_thread;
        sl[free_idx].cons_done          <= 1'b0;
        sl[free_idx].relmsg_pend        <= 1'b0;
      end

      // scheduling
      if (sched_take && sched_valid) sl[sidx].st <= SL_RUNNING;

      // pipeline events
      if (ev_susp) sl[ev_slot_r].st <= SL_WAITING;
      if (ev_swch) begin
        sl[ev_slot_x].st     <= SL_READY;
        sl[ev_slot_x].ctx.pc <= ev_pc_x;
      end
      if (ev_sync) begin
        sl[ev_slot_x].st     <= SL_SYNC;
        sl[ev_slot_x].ctx.pc <= ev_pc_x;
      end
      if (ev_kill) begin
        if (sl[ev_slot_x].ctx.is_main) sl[ev_slot_x].st <= SL_FREE;
        else begin
          sl[ev_slot_x].st          <= SL_ZOMBIE;
          sl[ev_slot_x].relmsg_pend <= sl[ev_slot_x].prod_is_thread;
        end
      end

      for (int i = 0; i < NSLOT; i++)
        if (sl[i].st == SL_SYNC && family_idle) sl[i].st <= SL_READY;

      // wakes last: a wake overrides a suspension made in the same cycle
      for (int w = 0; w < 5; w++)
        if (wake[w].valid) begin
          sl[wake[w].slot].st     <= SL_READY;
          sl[wake[w].slot].ctx.pc <= wake[w].pc;
        end
    end
  end

  initial assert (NSLOT <= (1 << SLOTW)) else $error("lcq: NSLOT too large");
endmodule
