// tb_lcq: directed self-checking test of the local continuation queue.
//
// Checks the main thread at reset, a create filling a slot with the thread
// state the pipeline needs, scheduling and round robin between ready threads,
// context switch, suspension and wake, termination (done pulse, release
// notice to the producer, window kept until the consumer's notice arrives,
// then returned to the RAU), bsync waiting for the family, and `has_free`
// falling when every slot is taken.
module tb_lcq;
  import mt_pkg::*;
  localparam int NSLOT = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             cr_valid, has_free, sched_valid, sched_take;
  create_t          cr;
  logic [RAW-1:0]   cr_base;
  tctx_t            sched_ctx;
  logic             ev_swch, ev_susp, ev_kill, ev_sync, family_idle;
  logic [SLOTW-1:0] ev_slot_x, ev_slot_r;
  logic [PCW-1:0]   ev_pc_x;
  wake_t            wake [5];
  logic             rel_in_valid, relmsg_valid, relmsg_ready, thread_done;
  logic [RAW-1:0]   rel_in_base;
  rq_msg_t          relmsg;
  logic [PROCW-1:0] my_id = 4'd2;
  logic [1:0]       rau_rel_valid;
  logic [RAW-1:0]   rau_rel_base [2];
  logic [WINW-1:0]  rau_rel_size [2];
  logic [SLOTW:0]   busy_count;

  lcq #(.NSLOT(NSLOT), .HAS_MAIN(1'b1)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  task automatic idle();
    cr_valid = 0; sched_take = 0; ev_swch = 0; ev_susp = 0; ev_kill = 0; ev_sync = 0;
    rel_in_valid = 0; relmsg_ready = 0;
    for (int w = 0; w < 5; w++) wake[w] = '0;
  endtask
  task automatic step();
    @(posedge clk); @(negedge clk); idle();
  endtask

  initial begin
    repeat (300) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int first;
    idle();
    cr = '0; cr_base = '0; ev_slot_x = '0; ev_slot_r = '0; ev_pc_x = '0; rel_in_base = '0;
    family_idle = 1;
    repeat (2) @(posedge clk);
    rst_n = 1; @(negedge clk);

    chk("main ready", sched_valid, 1);
    chk("main slot", sched_ctx.slot, 0);
    chk("main flag", sched_ctx.is_main, 1);
    chk("main pc", sched_ctx.pc, 0);
    sched_take = 1; step();
    chk("nothing else ready", sched_valid, 0);

    // create a thread
    cr_valid = 1;
    cr = '{target: 2, index: 9, pc: 50, nl: 3, ns: 1, prod_proc: 3, prod_base: 60,
           prod_is_thread: 1, has_consumer: 1};
    cr_base = 40;
    step();
    chk("created ready", sched_valid, 1);
    chk("created slot", sched_ctx.slot, 1);
    chk("created pc", sched_ctx.pc, 50);
    chk("created base", sched_ctx.base, 40);
    chk("created prod base", sched_ctx.prod_base, 60);
    chk("created prod proc", sched_ctx.prod_proc, 3);
    chk("created L", sched_ctx.nl, 3);
    chk("created S", sched_ctx.ns, 1);
    sched_take = 1; step();

    // context switch
    ev_swch = 1; ev_slot_x = 1; ev_pc_x = 53; step();
    chk("ready after swch", sched_valid, 1);
    chk("pc after swch", sched_ctx.pc, 53);
    sched_take = 1; step();

    // suspend and wake
    ev_susp = 1; ev_slot_r = 1; step();
    chk("suspended: not ready", sched_valid, 0);
    wake[2] = '{valid: 1, slot: 1, pc: 54}; step();
    chk("woken ready", sched_valid, 1);
    chk("woken pc", sched_ctx.pc, 54);
    sched_take = 1; step();

    // terminate: done pulse, release notice, window held
    ev_kill = 1; ev_slot_x = 1;
    #1 chk("done pulse", thread_done, 1);
    step();
    chk("release notice", relmsg_valid, 1);
    chk("notice kind", relmsg.kind, RQ_RELEASE);
    chk("notice dst", relmsg.dst, 3);
    chk("notice base", relmsg.paddr, 60);
    chk("window held", rau_rel_valid, 0);
    relmsg_ready = 1; step();
    chk("notice sent once", relmsg_valid, 0);
    chk("window still held (no consumer notice)", rau_rel_valid, 0);
    rel_in_valid = 1; rel_in_base = 40; step();
    chk("window released", rau_rel_valid[0], 1);
    chk("released base", rau_rel_base[0], 40);
    chk("released size", rau_rel_size[0], 5);
    step();
    chk("slot free again", busy_count, 1);

    // bsync of the main thread
    family_idle = 0;
    ev_sync = 1; ev_slot_x = 0; ev_pc_x = 3; step();
    step();
    chk("main waits in bsync", sched_valid, 0);
    family_idle = 1; step();
    chk("main released by bsync", sched_valid, 1);
    chk("main pc after bsync", sched_ctx.pc, 3);
    sched_take = 1; step();

    // fill all slots; round robin between two ready threads
    for (int i = 0; i < NSLOT - 1; i++) begin
      cr_valid = 1;
      cr = '{target: 2, index: i, pc: 16'(100 + i), nl: 1, ns: 0, prod_proc: 0, prod_base: 0,
             prod_is_thread: 0, has_consumer: 0};
      cr_base = RAW'(32 + i);
      step();
    end
    chk("no free slot", has_free, 0);
    chk("all busy", busy_count, NSLOT);
    first = sched_ctx.slot;
    sched_take = 1; step();
    chk("next thread differs", sched_ctx.slot != first, 1);
    ev_swch = 1; ev_slot_x = SLOTW'(first); ev_pc_x = 0; step();
    chk("round robin does not return at once", sched_ctx.slot != first, 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
