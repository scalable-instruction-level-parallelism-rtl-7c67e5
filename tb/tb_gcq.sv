// tb_gcq: self-checking test of the global continuation queue.
//
// A cre names a control block for indices 3, 5, ..., 11 (last index 12, step 2),
// dependency distance 2, L = 2, S = 1, a body and a separate last-thread
// entry. The test checks that the GCQ waits for the global write bus to drain,
// reads the block, and creates the five threads in order on processors
// 0,1,2,3,0 with the right index and code pointer; that the first two threads
// take the creator's $S window (upper $G) as producer and later ones the
// thread two before them, with the processor and base that thread was given;
// that consumer flags are right; that iteration waits while a target refuses;
// and that the family ends only when all five threads have terminated.
module tb_gcq;
  import mt_pkg::*;
  localparam int NPROC = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             cre_valid, cre_ready, gw_idle;
  logic [XLEN-1:0]  cre_addr;
  logic [PROCW-1:0] cre_proc;
  logic             mem_req_valid, mem_req_ready, mem_resp_valid;
  logic [XLEN-1:0]  mem_req_addr, mem_resp_data;
  logic             cr_valid, family_idle, waiting_resources;
  create_t          cr;
  logic [WINW-1:0]  fam_size;
  logic [NPROC-1:0] can_accept, thread_done;
  logic [RAW-1:0]   alloc_base [NPROC];

  gcq #(.NPROC(NPROC)) dut (.*);

  int checks = 0, failures = 0, waits = 0, made = 0;
  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  logic [XLEN-1:0] mem [64];
  logic [1:0]      mcnt;
  logic [XLEN-1:0] maddr;
  assign mem_req_ready  = (mcnt == 0);
  assign mem_resp_valid = (mcnt == 1);
  assign mem_resp_data  = mem[maddr[5:0]];
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin mcnt <= 0; maddr <= '0; end
    else if (mem_req_valid && mem_req_ready) begin mcnt <= 3; maddr <= mem_req_addr; end
    else if (mcnt != 0) mcnt <= mcnt - 1;

  always_comb for (int p = 0; p < NPROC; p++) alloc_base[p] = RAW'(40 + 20 * p + made);

  // record every create
  int   c_tgt [8], c_idx [8], c_pc [8], c_pp [8], c_pb [8], c_pt [8], c_hc [8], c_base [8];
  always @(posedge clk) if (rst_n) begin
    if (waiting_resources) waits++;
    if (cr_valid) begin
      c_tgt[made]  = cr.target;  c_idx[made] = cr.index;  c_pc[made] = cr.pc;
      c_pp[made]   = cr.prod_proc; c_pb[made] = cr.prod_base;
      c_pt[made]   = cr.prod_is_thread; c_hc[made] = cr.has_consumer;
      c_base[made] = alloc_base[cr.target];
      made++;
    end
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) mem[i] = '0;
    mem[8] = 3; mem[9] = 12; mem[10] = 2; mem[11] = 2;
    mem[12] = 2; mem[13] = 1; mem[14] = 40; mem[15] = 60;
    cre_valid = 0; cre_addr = 8; cre_proc = 1; gw_idle = 0;
    can_accept = 4'b1011; thread_done = '0;
    repeat (2) @(posedge clk);
    rst_n = 1; @(negedge clk);
    chk("idle after reset", family_idle, 1);
    cre_valid = 1;
    repeat (3) @(negedge clk);
    chk("waits for the global write bus", cre_ready, 0);
    gw_idle = 1;
    #1 chk("accepts when bus idle", cre_ready, 1);
    @(negedge clk);
    cre_valid = 0;
    chk("busy with a family", family_idle, 0);
    wait (made == 2);
    repeat (10) @(negedge clk);
    chk("held by refusing processor 2", made, 2);
    chk("family size L+2S", fam_size, 4);
    can_accept = 4'b1111;
    wait (made == 5);
    repeat (5) @(negedge clk);
    chk("exactly five threads", made, 5);
    for (int c = 0; c < 5; c++) begin
      chk($sformatf("thread %0d target", c), c_tgt[c], c % NPROC);
      chk($sformatf("thread %0d index", c), c_idx[c], 3 + 2 * c);
      chk($sformatf("thread %0d code", c), c_pc[c], (c == 4) ? 60 : 40);
      chk($sformatf("thread %0d producer is thread", c), c_pt[c], c >= 2);
      chk($sformatf("thread %0d has consumer", c), c_hc[c], c + 2 < 5);
      if (c < 2) begin
        chk($sformatf("thread %0d producer proc (creator)", c), c_pp[c], 1);
        chk($sformatf("thread %0d producer base (upper G)", c), c_pb[c], 16 - 2 + c);
      end else begin
        chk($sformatf("thread %0d producer proc", c), c_pp[c], c_tgt[c - 2]);
        chk($sformatf("thread %0d producer base", c), c_pb[c], c_base[c - 2]);
      end
    end
    // terminations
    thread_done = 4'b0111; @(negedge clk); thread_done = '0;
    repeat (3) @(negedge clk);
    chk("still busy with two threads left", family_idle, 0);
    thread_done = 4'b1001; @(negedge clk); thread_done = '0;
    @(negedge clk);
    chk("idle after all terminated", family_idle, 1);
    chk("waited for resources", waits > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
