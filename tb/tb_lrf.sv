// tb_lrf: directed self-checking test of the i-structure register file.
//
// Walks through every register transition: reset state of $G and pool
// registers; window allocation (index in $L0, the rest empty); a thread
// suspending on an empty register and being woken by a memory return; a
// suspension on a $D register sending a read request and being woken by the
// data switch; a remote read that waits at an empty $S register and is answered
// when the register is written; a remote read of a full register answered at
// once; a suspension meeting a write in the same cycle; load invalidation; a
// global-bus write; a suspension meeting a load invalidation in the same cycle.
module tb_lrf;
  import mt_pkg::*;
  localparam int NREG = 128;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [PROCW-1:0] my_id = 4'd1;
  logic [RAW-1:0]   rd_addr [2];
  logic [XLEN-1:0]  rd_data [2];
  logic [1:0]       rd_full;
  logic [3:0]       wr_valid;
  logic [RAW-1:0]   wr_addr [4];
  logic [XLEN-1:0]  wr_data [4];
  logic             inv_valid, susp_valid, susp_remote, alloc_valid, rq_in_valid;
  logic [RAW-1:0]   inv_addr, susp_addr, susp_taddr, alloc_base;
  cont_t            susp_cont;
  logic [PROCW-1:0] susp_tproc;
  logic [WINW-1:0]  alloc_size;
  logic [XLEN-1:0]  alloc_index;
  rq_msg_t          rq_in, rq_out;
  logic             rq_out_valid, rq_out_ready, dt_out_valid, dt_out_ready;
  dt_msg_t          dt_out;
  wake_t            wake [5];

  lrf #(.NREG(NREG)) dut (.*);

  int checks = 0, failures = 0;

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic idle();
    wr_valid = '0; inv_valid = 0; susp_valid = 0; susp_remote = 0; alloc_valid = 0;
    rq_in_valid = 0; rq_out_ready = 0; dt_out_ready = 0;
  endtask

  task automatic read(int a, output logic [XLEN-1:0] d, output logic f);
    rd_addr[0] = RAW'(a);
    #1;
    d = rd_data[0];
    f = rd_full[0];
  endtask

  task automatic step();
    @(posedge clk);
    @(negedge clk);
    idle();
  endtask

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [XLEN-1:0] d;
    logic f;
    for (int i = 0; i < 4; i++) begin wr_addr[i] = '0; wr_data[i] = '0; end
    rd_addr[0] = '0; rd_addr[1] = '0;
    inv_addr = '0; susp_addr = '0; susp_taddr = '0; alloc_base = '0; susp_cont = '0;
    susp_tproc = '0; alloc_size = '0; alloc_index = '0; rq_in = '0;
    idle();
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // reset state
    read(5, d, f);  chk("G5 full after reset", f, 1); chk("G5 zero", d, 0);
    read(40, d, f); chk("pool register empty after reset", f, 0);

    // allocation: window 40..44, index 77
    alloc_valid = 1; alloc_base = 40; alloc_size = 5; alloc_index = 77;
    step();
    read(40, d, f); chk("L0 full", f, 1); chk("L0 = index", d, 77);
    read(41, d, f); chk("L1 empty", f, 0);

    // local suspension, woken by a memory return
    susp_valid = 1; susp_addr = 41; susp_cont = '{slot: 3, pc: 100};
    step();
    chk("state waiting-local", dut.st[41], RS_WAIT_LOC);
    wr_valid[1] = 1; wr_addr[1] = 41; wr_data[1] = 55;
    #1;
    chk("wake on memory return", wake[1].valid, 1);
    chk("woken slot", wake[1].slot, 3);
    chk("woken pc", wake[1].pc, 100);
    step();
    read(41, d, f); chk("L1 full", f, 1); chk("L1 value", d, 55);

    // $D suspension: request to the producer
    susp_valid = 1; susp_addr = 44; susp_cont = '{slot: 2, pc: 7};
    susp_remote = 1; susp_tproc = 2; susp_taddr = 90;
    step();
    chk("request offered", rq_out_valid, 1);
    chk("request dst", rq_out.dst, 2);
    chk("request src", rq_out.src, 1);
    chk("request producer address", rq_out.paddr, 90);
    chk("request consumer address", rq_out.caddr, 44);
    chk("request kind", rq_out.kind, RQ_READ);
    rq_out_ready = 1;
    step();
    chk("request sent once", rq_out_valid, 0);
    wr_valid[2] = 1; wr_addr[2] = 44; wr_data[2] = 1234;
    #1;
    chk("wake on data switch", wake[2].valid, 1);
    chk("woken slot (D)", wake[2].slot, 2);
    step();
    read(44, d, f); chk("D full", f, 1); chk("D value", d, 1234);

    // remote read of an empty $S register: waits, answered on write
    rq_in_valid = 1; rq_in = '{kind: RQ_READ, dst: 1, src: 3, paddr: 42, caddr: 70};
    step();
    chk("waiting-remote", dut.st[42], RS_WAIT_REM);
    chk("no reply yet", dt_out_valid, 0);
    wr_valid[0] = 1; wr_addr[0] = 42; wr_data[0] = 99;
    step();
    chk("reply offered", dt_out_valid, 1);
    chk("reply dst", dt_out.dst, 3);
    chk("reply caddr", dt_out.caddr, 70);
    chk("reply data", dt_out.data, 99);
    dt_out_ready = 1;
    step();
    chk("reply sent once", dt_out_valid, 0);

    // remote read of a full register: answered at once
    rq_in_valid = 1; rq_in = '{kind: RQ_READ, dst: 1, src: 0, paddr: 40, caddr: 33};
    step();
    chk("immediate reply", dt_out_valid, 1);
    chk("immediate reply data", dt_out.data, 77);
    chk("immediate reply dst", dt_out.dst, 0);
    dt_out_ready = 1;
    step();

    // suspension meeting a write in the same cycle
    susp_valid = 1; susp_addr = 43; susp_cont = '{slot: 5, pc: 9};
    wr_valid[1] = 1; wr_addr[1] = 43; wr_data[1] = 11;
    #1;
    chk("same-cycle wake", wake[4].valid, 1);
    chk("same-cycle slot", wake[4].slot, 5);
    step();
    read(43, d, f); chk("register full", f, 1); chk("register value", d, 11);

    // load issue empties the destination
    inv_valid = 1; inv_addr = 40;
    step();
    read(40, d, f); chk("invalidated", f, 0);

    // global bus write
    wr_valid[3] = 1; wr_addr[3] = 7; wr_data[3] = 4242;
    step();
    read(7, d, f); chk("G7 value", d, 4242);

    // suspension on the destination of a load issued in the same cycle
    inv_valid = 1; inv_addr = 41; susp_valid = 1; susp_addr = 41; susp_cont = '{slot: 1, pc: 3};
    step();
    chk("suspend wins over invalidate", dut.st[41], RS_WAIT_LOC);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
