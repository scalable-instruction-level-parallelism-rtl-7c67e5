// tb_mt_pipeline: self-checking test of the pipeline inside one processor
// tile (with its LCQ, RAU and register file, as the pipeline cannot run
// without them).
//
// The main thread runs a straight-line program: back-to-back dependent ALU
// instructions (forwarding), sub, mul, mv, a load followed by an instruction
// that uses it (the thread suspends on the empty register and is woken by the
// memory reply), a store, a cre (the pipeline stalls until the create bus
// grants it), bsync (the thread waits until the family is over) and finish.
// While the main thread waits, two threads are created on the tile; each adds
// 100 to its index and stores it at 80 + index, exercising window mapping of
// $L registers and the explicit switch between threads. Checked: register
// values, memory contents, one global-bus push per $G write, the stall on cre,
// at least one suspension, two terminations and `halted`.
module tb_mt_pipeline;
  import mt_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              cre_valid, cre_grant, cr_valid, can_accept, thread_done, family_idle;
  logic [XLEN-1:0]   cre_addr;
  create_t           cr;
  logic [WINW-1:0]   fam_size;
  logic [RAW-1:0]    alloc_base;
  logic              gw_push, gw_full, gw_bc_valid;
  logic [RAW-1:0]    gw_addr;
  logic [XLEN-1:0]   gw_data;
  gw_msg_t           gw_bc;
  logic              rq_out_valid, rq_out_ready, rq_in_valid;
  rq_msg_t           rq_out, rq_in;
  logic              dt_out_valid, dt_out_ready, dt_in_valid;
  dt_msg_t           dt_out, dt_in;
  logic [PCW-1:0]    imem_addr;
  logic [31:0]       imem_rdata;
  logic              dm_req_valid, dm_req_we, dm_req_ready, dm_resp_valid, halted;
  logic [XLEN-1:0]   dm_req_addr, dm_req_wdata, dm_resp_data;
  logic [RAW-1:0]    dm_req_tag, dm_resp_tag;
  logic [PROCW-1:0]  my_id = '0;

  mt_proc #(.NREG(128), .NSLOT(8), .HAS_MAIN(1'b1)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  function automatic logic [31:0] R(op_e op, int rd, int ra, int rb);
    return {op, 5'(rd), 5'(ra), 5'(rb), 11'd0};
  endfunction
  function automatic logic [31:0] I(op_e op, int rd, int ra, int imm);
    return {op, 5'(rd), 5'(ra), 16'(imm)};
  endfunction

  logic [31:0] prog [32];
  initial begin
    for (int i = 0; i < 32; i++) prog[i] = R(OP_NOP, 0, 0, 0);
    prog[0]  = I(OP_ADDI, 1, 0, 5);
    prog[1]  = I(OP_ADDI, 2, 1, 7);
    prog[2]  = R(OP_ADD, 3, 1, 2);
    prog[3]  = R(OP_SUB, 4, 3, 1);
    prog[4]  = R(OP_MUL, 5, 3, 4);
    prog[5]  = R(OP_MV, 6, 5, 0);
    prog[6]  = I(OP_LW, 7, 0, 50);
    prog[7]  = R(OP_ADD, 8, 7, 1);
    prog[8]  = I(OP_SW, 8, 0, 60);
    prog[9]  = I(OP_CRE, 0, 0, 70);
    prog[10] = R(OP_BSYNC, 0, 0, 0);
    prog[11] = R(OP_FINISH, 0, 0, 0);
    prog[20] = I(OP_ADDI, 17, 16, 100);   // $L1 = $L0 + 100
    prog[21] = R(OP_SWCH, 0, 0, 0);
    prog[22] = I(OP_SW, 17, 16, 80);      // mem[80 + $L0] = $L1
    prog[23] = R(OP_KILL, 0, 0, 0);
  end
  assign imem_rdata = prog[imem_addr[4:0]];

  // memory: loads answered after 6 cycles
  logic [XLEN-1:0] mem [128];
  int   lat;
  logic [RAW-1:0]  ltag;
  logic [XLEN-1:0] ldata;
  assign dm_req_ready  = 1'b1;
  assign dm_resp_valid = (lat == 1);
  assign dm_resp_tag   = ltag;
  assign dm_resp_data  = ldata;
  always @(posedge clk) begin
    if (lat > 0) lat <= lat - 1;
    if (rst_n && dm_req_valid) begin
      if (dm_req_we) mem[dm_req_addr[6:0]] = dm_req_wdata;
      else begin lat <= 6; ltag <= dm_req_tag; ldata <= mem[dm_req_addr[6:0]]; end
    end
  end

  int pushes = 0, susp = 0, done = 0, cre_stall = 0;
  always @(posedge clk) if (rst_n) begin
    if (gw_push) pushes++;
    if (dut.ev_susp) susp++;
    if (thread_done) done++;
    if (cre_valid && !cre_grant) cre_stall++;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 128; i++) mem[i] = '0;
    mem[50] = 1000;
    lat = 0; ltag = '0; ldata = '0;
    cre_grant = 0; cr_valid = 0; cr = '0; fam_size = 2; family_idle = 1;
    gw_full = 0; gw_bc_valid = 0; gw_bc = '0;
    rq_out_ready = 1; rq_in_valid = 0; rq_in = '0; dt_out_ready = 1; dt_in_valid = 0; dt_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (cre_valid);
    repeat (3) @(negedge clk);
    chk("cre address", cre_addr, 70);
    cre_grant = 1; family_idle = 0;
    @(negedge clk);
    cre_grant = 0;
    // the GCQ would now create two threads here
    for (int k = 4; k <= 5; k++) begin
      cr_valid = 1;
      cr = '{target: 0, index: k, pc: 20, nl: 2, ns: 0, prod_proc: 0, prod_base: 0,
             prod_is_thread: 0, has_consumer: 0};
      #1 chk("tile accepts a thread", can_accept, 1);
      @(negedge clk);
    end
    cr_valid = 0;
    wait (done == 2);
    repeat (3) @(negedge clk);
    chk("main still in bsync", halted, 0);
    family_idle = 1;
    wait (halted);
    repeat (3) @(negedge clk);

    chk("G1", dut.u_lrf.data[1], 5);
    chk("G2 (forwarded)", dut.u_lrf.data[2], 12);
    chk("G3", dut.u_lrf.data[3], 17);
    chk("G4", dut.u_lrf.data[4], 12);
    chk("G5", dut.u_lrf.data[5], 204);
    chk("G6", dut.u_lrf.data[6], 204);
    chk("G7 (load)", dut.u_lrf.data[7], 1000);
    chk("G8", dut.u_lrf.data[8], 1005);
    chk("store", mem[60], 1005);
    chk("thread 4 store", mem[84], 104);
    chk("thread 5 store", mem[85], 105);
    chk("global pushes", pushes, 7);
    chk("suspended at least once", susp > 0, 1);
    chk("stalled on cre", cre_stall >= 2, 1);
    chk("threads terminated", done, 2);
    chk("windows returned", dut.free_count, 96);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
