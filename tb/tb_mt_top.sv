// tb_mt_top: end-to-end test of the microthreaded multiprocessor at its
// default size (4 processors, 128 registers and 8 thread slots each).
//
// The main thread runs two families. The first is the loop
//   Q = 0; DO k = 1, M: Q = Q + Z(k) * X(k)
// written as microthreads with dependency distance 1: every thread loads
// Z(k) and X(k), multiplies, context-switches, then adds the product to the
// $D value it receives from the previous thread and passes the sum on in its
// $S register; the last thread stores Q. The second family is independent
// (distance 0): Y(k) = Z(k) + X(k). The third runs the loop body again with
// distance 2, which splits the sum into two chains, odd and even k. The main
// thread seeds them with different values in $G16 and $G17, its $S windows
// for the first and second thread, and the last thread stores the even chain
// as Q2 = 1000 + sum of Z(k) * X(k) over even k. With M = 64 threads and 32
// thread slots in all, the GCQ must wait for slots to free up.
//
// The memory model answers loads after a random 1..12 cycles (in order per
// processor) and sometimes refuses a request for a cycle. The test checks Q and
// every Y(k) against values computed here, and counts the mechanisms the
// design relies on: context switches, suspensions on empty registers, wakes,
// remote $D reads, replies to readers that had to wait at the producer,
// global-bus broadcasts, GCQ waits for resources, window-release notices,
// bsync waits and memory back-pressure. Each must occur at least once.
module tb_mt_top;
  import mt_pkg::*;

  localparam int NPROC = 4;
  localparam int M     = 64;
  localparam int ZB = 100, XB = 200, QA = 300, YB = 400, CCB1 = 20, CCB2 = 30, CCB3 = 40;
  localparam int MEMW = 1024;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [PCW-1:0]   imem_addr [NPROC];
  logic [31:0]      imem_rdata [NPROC];
  logic [NPROC-1:0] dm_req_valid, dm_req_we, dm_req_ready, dm_resp_valid;
  logic [XLEN-1:0]  dm_req_addr [NPROC], dm_req_wdata [NPROC], dm_resp_data [NPROC];
  logic [RAW-1:0]   dm_req_tag [NPROC], dm_resp_tag [NPROC];
  logic             gcq_mem_req_valid, gcq_mem_req_ready, gcq_mem_resp_valid;
  logic [XLEN-1:0]  gcq_mem_req_addr, gcq_mem_resp_data;
  logic             halted, family_idle;

  mt_top dut (.*);

  int checks = 0, failures = 0;
  longint cycles = 0;

  // ------------------------------------------------------------ assembler
  function automatic logic [31:0] R(op_e op, int rd, int ra, int rb);
    return {op, 5'(rd), 5'(ra), 5'(rb), 11'd0};
  endfunction
  function automatic logic [31:0] I(op_e op, int rd, int ra, int imm);
    return {op, 5'(rd), 5'(ra), 16'(imm)};
  endfunction

  // thread specifiers: $G i = i, window at 16: $L0..$L2 = 16..18, $S0 = 19, $D0 = 20
  localparam int L0 = 16, L1 = 17, L2 = 18, S0 = 19, D0 = 20;
  localparam int BODY1 = 12, LAST1 = 18, BODY2 = 26, LAST3 = 32;

  logic [31:0] prog [64];
  initial begin
    for (int i = 0; i < 64; i++) prog[i] = R(OP_NOP, 0, 0, 0);
    // main thread: its $S0 is $G16
    prog[0]  = R(OP_MV, 16, 0, 0);          // Q = 0 for the first thread
    prog[1]  = I(OP_CRE, 0, 0, CCB1);
    prog[2]  = R(OP_BSYNC, 0, 0, 0);
    prog[3]  = I(OP_CRE, 0, 0, CCB2);
    prog[4]  = R(OP_BSYNC, 0, 0, 0);
    prog[5]  = I(OP_ADDI, 16, 0, 7);        // seed of the odd chain
    prog[6]  = I(OP_ADDI, 17, 0, 1000);     // seed of the even chain
    prog[7]  = I(OP_CRE, 0, 0, CCB3);
    prog[8]  = R(OP_BSYNC, 0, 0, 0);
    prog[9]  = R(OP_FINISH, 0, 0, 0);
    // family 1 body
    prog[BODY1+0] = I(OP_LW, L1, L0, ZB);
    prog[BODY1+1] = I(OP_LW, L2, L0, XB);
    prog[BODY1+2] = R(OP_MUL, L1, L1, L2);
    prog[BODY1+3] = R(OP_SWCH, 0, 0, 0);
    prog[BODY1+4] = R(OP_ADD, S0, D0, L1);
    prog[BODY1+5] = R(OP_KILL, 0, 0, 0);
    // family 1 last thread
    prog[LAST1+0] = I(OP_LW, L1, L0, ZB);
    prog[LAST1+1] = I(OP_LW, L2, L0, XB);
    prog[LAST1+2] = R(OP_MUL, L1, L1, L2);
    prog[LAST1+3] = R(OP_SWCH, 0, 0, 0);
    prog[LAST1+4] = R(OP_ADD, S0, D0, L1);
    prog[LAST1+5] = R(OP_SWCH, 0, 0, 0);
    prog[LAST1+6] = I(OP_SW, S0, 0, QA);
    prog[LAST1+7] = R(OP_KILL, 0, 0, 0);
    // family 2 body (independent threads, L = 3, S = 0)
    prog[BODY2+0] = I(OP_LW, L1, L0, ZB);
    prog[BODY2+1] = I(OP_LW, L2, L0, XB);
    prog[BODY2+2] = R(OP_ADD, L1, L1, L2);
    prog[BODY2+3] = R(OP_SWCH, 0, 0, 0);
    prog[BODY2+4] = I(OP_SW, L1, L0, YB);
    prog[BODY2+5] = R(OP_KILL, 0, 0, 0);
    // family 3 last thread: as family 1, stores to Q2
    for (int i = 0; i < 8; i++) prog[LAST3+i] = prog[LAST1+i];
    prog[LAST3+6] = I(OP_SW, S0, 0, QA + 1);
  end
  for (genvar p = 0; p < NPROC; p++) begin : g_imem
    assign imem_rdata[p] = prog[imem_addr[p][5:0]];
  end

  // ------------------------------------------------------------ data memory
  logic [XLEN-1:0] mem [MEMW];
  logic [XLEN-1:0] zv [M+1], xv [M+1];
  initial begin
    for (int i = 0; i < MEMW; i++) mem[i] = '0;
    for (int k = 1; k <= M; k++) begin
      zv[k] = XLEN'($urandom_range(1, 1000));
      xv[k] = XLEN'($urandom_range(1, 1000));
      mem[ZB + k] = zv[k];
      mem[XB + k] = xv[k];
    end
    mem[QA] = 32'hdead_beef;
    mem[QA + 1] = 32'hdead_beef;
    // create control blocks: start, last, step, distance, L, S, body, last-thread code
    mem[CCB1+0] = 1; mem[CCB1+1] = M; mem[CCB1+2] = 1; mem[CCB1+3] = 1;
    mem[CCB1+4] = 3; mem[CCB1+5] = 1; mem[CCB1+6] = BODY1; mem[CCB1+7] = LAST1;
    mem[CCB2+0] = 1; mem[CCB2+1] = M; mem[CCB2+2] = 1; mem[CCB2+3] = 0;
    mem[CCB2+4] = 3; mem[CCB2+5] = 0; mem[CCB2+6] = BODY2; mem[CCB2+7] = 0;
    mem[CCB3+0] = 1; mem[CCB3+1] = M; mem[CCB3+2] = 1; mem[CCB3+3] = 2;
    mem[CCB3+4] = 3; mem[CCB3+5] = 1; mem[CCB3+6] = BODY1; mem[CCB3+7] = LAST3;
  end

  // per processor: loads answered in order after a random delay
  typedef struct packed {
    longint          due;
    logic [RAW-1:0]  tag;
    logic [XLEN-1:0] data;
  } pend_t;
  pend_t q [NPROC][$];
  int    refusals = 0;

  always_ff @(negedge clk) begin
    for (int p = 0; p < NPROC; p++) dm_req_ready[p] <= ($urandom_range(0, 7) != 0);
  end

  always @(posedge clk) begin
    if (rst_n) begin
      for (int p = 0; p < NPROC; p++) begin
        if (dm_req_valid[p] && !dm_req_ready[p]) refusals++;
        if (dm_req_valid[p] && dm_req_ready[p]) begin
          if (dm_req_we[p]) mem[dm_req_addr[p] % MEMW] = dm_req_wdata[p];
          else begin
            longint due;
            due = cycles + longint'($urandom_range(1, 12));
            if (q[p].size() > 0 && q[p][$].due >= due) due = q[p][$].due + 1;
            q[p].push_back('{due: due, tag: dm_req_tag[p], data: mem[dm_req_addr[p] % MEMW]});
          end
        end
      end
    end
  end

  always_comb begin
    for (int p = 0; p < NPROC; p++) begin
      dm_resp_valid[p] = 1'b0;
      dm_resp_tag[p]   = '0;
      dm_resp_data[p]  = '0;
      if (q[p].size() > 0 && q[p][0].due <= cycles) begin
        dm_resp_valid[p] = 1'b1;
        dm_resp_tag[p]   = q[p][0].tag;
        dm_resp_data[p]  = q[p][0].data;
      end
    end
  end
  always @(posedge clk)
    for (int p = 0; p < NPROC; p++)
      if (dm_resp_valid[p]) void'(q[p].pop_front());

  // GCQ reads: two cycles
  logic [XLEN-1:0] g_addr;
  logic [1:0]      g_cnt;
  assign gcq_mem_req_ready  = (g_cnt == 0);
  assign gcq_mem_resp_valid = (g_cnt == 1);
  assign gcq_mem_resp_data  = mem[g_addr % MEMW];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin g_cnt <= 0; g_addr <= '0; end
    else if (gcq_mem_req_valid && gcq_mem_req_ready) begin g_cnt <= 2; g_addr <= gcq_mem_req_addr; end
    else if (g_cnt != 0) g_cnt <= g_cnt - 1;
  end

  // ------------------------------------------------------------ mechanism counters
  int n_swch [NPROC], n_susp [NPROC], n_wake [NPROC], n_remote_rd [NPROC];
  int n_rel [NPROC], n_create [NPROC];
  int n_bcast = 0, n_gcq_wait = 0, n_sync_wait = 0, n_remote_wait = 0;
  for (genvar p = 0; p < NPROC; p++) begin : g_mon
    initial begin
      n_swch[p] = 0; n_susp[p] = 0; n_wake[p] = 0; n_remote_rd[p] = 0;
      n_rel[p] = 0; n_create[p] = 0;
    end
    always @(posedge clk) if (rst_n) begin
      if (dut.g_proc[p].u_proc.ev_swch) n_swch[p]++;
      if (dut.g_proc[p].u_proc.ev_susp) n_susp[p]++;
      for (int w = 0; w < 5; w++) if (dut.g_proc[p].u_proc.wake[w].valid) n_wake[p]++;
      if (dut.g_proc[p].u_proc.ev_susp && dut.g_proc[p].u_proc.susp_remote) n_remote_rd[p]++;
      if (dut.g_proc[p].u_proc.rel_valid && dut.g_proc[p].u_proc.rel_ready) n_rel[p]++;
      if (dut.g_proc[p].u_proc.do_create) n_create[p]++;
    end
  end
  always @(posedge clk) if (rst_n) begin
    if (dut.gw_bc_valid) n_bcast++;
    if (dut.waiting_resources) n_gcq_wait++;
    if (dut.g_proc[0].u_proc.ev_sync) n_sync_wait++;
  end
  // a request that found its $S register empty and had to wait there
  for (genvar p = 0; p < NPROC; p++) begin : g_rw
    always @(posedge clk)
      if (rst_n && dut.g_proc[p].u_proc.rq_in_valid && dut.g_proc[p].u_proc.rq_in.kind == RQ_READ
          && dut.g_proc[p].u_proc.u_lrf.st[dut.g_proc[p].u_proc.rq_in.paddr[6:0]] == RS_EMPTY)
        n_remote_wait++;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic happened(string what, int n);
    checks++;
    $display("  %-34s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  function automatic int sum(int a [NPROC]);
    int s = 0;
    foreach (a[i]) s += a[i];
    return s;
  endfunction

  always @(posedge clk) cycles <= cycles + 1;

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: main thread did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ main
  initial begin
    logic [XLEN-1:0] qexp;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (halted);
    repeat (5) @(posedge clk);

    qexp = '0;
    for (int k = 1; k <= M; k++) qexp += zv[k] * xv[k];
    check("Q", mem[QA], qexp);
    qexp = 1000;
    for (int k = 2; k <= M; k += 2) qexp += zv[k] * xv[k];
    check("Q2 (distance 2, even chain)", mem[QA + 1], qexp);
    for (int k = 1; k <= M; k++) check($sformatf("Y(%0d)", k), mem[YB + k], zv[k] + xv[k]);
    check("threads created", sum(n_create), 3 * M);
    check("family idle at end", family_idle, 1);

    $display("run took %0d cycles; mechanisms:", cycles);
    happened("context switches (swch)", sum(n_swch));
    happened("suspensions on empty registers", sum(n_susp));
    happened("wakes of suspended threads", sum(n_wake));
    happened("remote $D reads", sum(n_remote_rd));
    happened("$S reads that waited at producer", n_remote_wait);
    happened("global write bus broadcasts", n_bcast);
    happened("GCQ waits for slots/registers", n_gcq_wait);
    happened("window release notices", sum(n_rel));
    happened("bsync waits", n_sync_wait);
    happened("memory refusals (stall)", refusals);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
