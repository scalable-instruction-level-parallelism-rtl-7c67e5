// tb_gwbus: self-checking test of the global write bus.
//
// Four processors push random $G writes in bursts, respecting `full`. The test
// checks that every write is broadcast exactly once, tagged with its source,
// in the order that source pushed it, that a full buffer was seen (so a
// writer would have stalled), that two sources competed in one cycle, and
// that `idle` is high once everything has gone out.
module tb_gwbus;
  import mt_pkg::*;
  localparam int NPROC = 4, PER = 100;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NPROC-1:0] push, full;
  logic [RAW-1:0]   push_addr [NPROC];
  logic [XLEN-1:0]  push_data [NPROC];
  logic             bc_valid, idle;
  gw_msg_t          bc_msg;

  gwbus #(.NPROC(NPROC), .DEPTH(4)) dut (.*);

  int checks = 0, failures = 0, saw_full = 0, competed = 0;
  int sent [NPROC], got [NPROC];

  always_ff @(negedge clk) begin
    for (int p = 0; p < NPROC; p++) begin
      push[p] <= 1'b0;
      if (rst_n && !full[p] && sent[p] < PER && $urandom_range(0, 1) == 0) begin
        push[p]      <= 1'b1;
        push_addr[p] <= RAW'($urandom_range(0, 31));
        push_data[p] <= {8'(p), 24'(sent[p])};
        sent[p]      <= sent[p] + 1;
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (|full) saw_full++;
    if ($countones(~{dut.empty}) > 1) competed++;
    if (bc_valid) begin
      int s;
      s = int'(bc_msg.src);
      checks++;
      if (bc_msg.data != {8'(s), 24'(got[s])}) begin
        failures++;
        $display("FAIL broadcast from %0d: data %h, expected sequence %0d", s, bc_msg.data, got[s]);
      end
      got[s]++;
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < NPROC; p++) begin sent[p] = 0; got[p] = 0; push_addr[p] = '0; push_data[p] = '0; end
    push = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    checks++;
    if (!idle) begin failures++; $display("FAIL not idle after reset"); end
    wait (got[0] == PER && got[1] == PER && got[2] == PER && got[3] == PER);
    repeat (2) @(posedge clk);
    checks += 3;
    if (!idle)          begin failures++; $display("FAIL not idle at end"); end
    if (saw_full == 0)  begin failures++; $display("FAIL buffer never full"); end
    if (competed == 0)  begin failures++; $display("FAIL no competition"); end
    $display("full seen %0d cycles, competition %0d cycles", saw_full, competed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
