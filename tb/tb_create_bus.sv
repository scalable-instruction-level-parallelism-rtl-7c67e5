// tb_create_bus: self-checking test of the create bus.
//
// Several processors ask to create at once; the test checks that exactly one
// is granted per cycle and only while the GCQ is ready, that the granted
// address and processor number reach the GCQ, that grants rotate so every
// requester is served, and that a create reaches only the processor it names
// while the processors' answers reach the GCQ unchanged, first with fixed
// values and then with 200 cycles of random payloads and requests.
module tb_create_bus;
  import mt_pkg::*;
  localparam int NPROC = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NPROC-1:0] req_valid, req_grant, proc_cr_valid, proc_can_accept, gcq_can_accept;
  logic [XLEN-1:0]  req_addr [NPROC];
  logic             gcq_cre_valid, gcq_cre_ready, gcq_cr_valid;
  logic [XLEN-1:0]  gcq_cre_addr;
  logic [PROCW-1:0] gcq_cre_proc;
  create_t          gcq_cr, proc_cr;
  logic [RAW-1:0]   proc_base [NPROC], gcq_base [NPROC];

  create_bus #(.NPROC(NPROC)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NPROC-1:0] served;
    for (int p = 0; p < NPROC; p++) begin req_addr[p] = XLEN'(100 + p); proc_base[p] = RAW'(50 + p); end
    req_valid = '0; gcq_cre_ready = 0; gcq_cr_valid = 0; gcq_cr = '0; proc_can_accept = 4'b0101;
    repeat (2) @(posedge clk);
    rst_n = 1; @(negedge clk);

    req_valid = 4'b1101;
    #1;
    chk("no grant while GCQ busy", req_grant, 0);
    chk("request visible to GCQ", gcq_cre_valid, 1);
    gcq_cre_ready = 1;
    served = '0;
    for (int k = 0; k < 3; k++) begin
      #1;
      chk("one grant", $countones(req_grant), 1);
      chk("granted one asks", (req_grant & req_valid) != 0, 1);
      chk("address of granted", gcq_cre_addr, 100 + gcq_cre_proc);
      chk("grant matches processor", req_grant[gcq_cre_proc], 1);
      served |= req_grant;
      @(negedge clk);
      req_valid &= ~served;
    end
    chk("all requesters served", served, 4'b1101);

    for (int p = 0; p < NPROC; p++) begin
      gcq_cr_valid = 1; gcq_cr = '0; gcq_cr.target = PROCW'(p); gcq_cr.index = 32'(7 * p);
      #1;
      chk($sformatf("create to %0d only", p), proc_cr_valid, 1 << p);
      chk("create payload", proc_cr.index, 7 * p);
      @(negedge clk);
    end
    gcq_cr_valid = 0; #1;
    chk("no create", proc_cr_valid, 0);
    chk("answers", gcq_can_accept, 4'b0101);
    chk("base of 3", gcq_base[3], 53);

    // random payloads: every field of a create and every answer passes unchanged
    gcq_cre_ready = 1;
    for (int t = 0; t < 200; t++) begin
      logic [$bits(create_t)-1:0] rnd;
      for (int w = 0; w < ($bits(create_t) + 31) / 32; w++)
        rnd[w*32 +: 32] = $urandom;
      gcq_cr       = create_t'(rnd);
      gcq_cr_valid = $urandom_range(0, 1);
      for (int p = 0; p < NPROC; p++) begin
        req_addr[p]  = $urandom;
        proc_base[p] = RAW'($urandom);
      end
      proc_can_accept = NPROC'($urandom);
      req_valid       = NPROC'($urandom);
      #1;
      chk("random payload (all fields)", proc_cr == gcq_cr, 1);
      chk("random create target", proc_cr_valid,
          (gcq_cr_valid && int'(gcq_cr.target) < NPROC) ? (1 << gcq_cr.target) : 0);
      chk("random answers", gcq_can_accept, proc_can_accept);
      for (int p = 0; p < NPROC; p++) chk("random base", gcq_base[p], proc_base[p]);
      if (req_valid != 0) begin
        chk("random grant", req_grant, 1 << gcq_cre_proc);
        chk("random address", gcq_cre_addr, req_addr[gcq_cre_proc]);
      end else chk("random no grant", req_grant, 0);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
