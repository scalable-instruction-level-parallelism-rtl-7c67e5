// tb_rau: self-checking test of the register allocation unit.
//
// Random allocations (window sizes 1..16) and releases against a reference
// bitmap kept here. Every cycle the offered base must be the lowest address
// with `size` consecutive free registers, `fit` must say whether one exists,
// and an allocated window must never overlap a live one. The pool is driven
// to exhaustion so that `fit` goes low.
module tb_rau;
  import mt_pkg::*;
  localparam int NREG = 128, NDYN = NREG - NGLOBAL;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [WINW-1:0] size;
  logic            fit, alloc;
  logic [RAW-1:0]  base;
  logic [1:0]      rel_valid;
  logic [RAW-1:0]  rel_base [2];
  logic [WINW-1:0] rel_size [2];
  logic [RAW:0]    free_count;

  rau #(.NREG(NREG)) dut (.*);

  int checks = 0, failures = 0, nofit = 0;
  logic [NDYN-1:0] ref_busy;
  int   live_base [$], live_size [$];


  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_busy = '0;
    size = 5'd1; alloc = 0; rel_valid = '0;
    rel_base[0] = '0; rel_base[1] = '0; rel_size[0] = '0; rel_size[1] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int step = 0; step < 3000; step++) begin
      int e;
      @(negedge clk);
      size      = WINW'($urandom_range(1, 16));
      rel_valid = '0;
      alloc     = 1'b0;
      // releases: more likely late in each phase so the pool fills up first
      for (int r = 0; r < 2; r++)
        if (live_base.size() > r && $urandom_range(0, 99) < ((step % 400) < 200 ? 10 : 60)) begin
          int j;
          j = $urandom_range(0, live_base.size() - 1);
          rel_valid[r] = 1'b1;
          rel_base[r]  = RAW'(live_base[j]);
          rel_size[r]  = WINW'(live_size[j]);
          for (int k = 0; k < live_size[j]; k++) ref_busy[live_base[j] - NGLOBAL + k] = 1'b0;
          live_base.delete(j);
          live_size.delete(j);
        end
      #1;
      // the offer is made from the state prev_busy this cycle's releases
      e = -1;
      begin
        logic [NDYN-1:0] prev_busy;
        prev_busy = ref_busy;
        for (int r = 0; r < 2; r++)
          if (rel_valid[r]) for (int k = 0; k < int'(rel_size[r]); k++)
            prev_busy[int'(rel_base[r]) - NGLOBAL + k] = 1'b1;
        for (int s = 0; s + int'(size) <= NDYN && e < 0; s++) begin
          bit ok;
          ok = 1;
          for (int k = 0; k < int'(size); k++) if (prev_busy[s + k]) ok = 0;
          if (ok) e = s;
        end
      end
      checks++;
      if (fit != (e >= 0) || (e >= 0 && int'(base) != NGLOBAL + e)) begin
        failures++;
        $display("FAIL size %0d: fit %0d base %0d, expected %0d", size, fit, base, e + NGLOBAL);
      end
      if (!fit) nofit++;
      if (fit && $urandom_range(0, 99) < 80) begin
        alloc = 1'b1;
        for (int k = 0; k < int'(size); k++) ref_busy[int'(base) - NGLOBAL + k] = 1'b1;
        live_base.push_back(int'(base));
        live_size.push_back(int'(size));
      end
    end
    @(negedge clk);
    alloc = 0; rel_valid = '0;
    @(negedge clk);
    checks++;
    if (int'(free_count) != NDYN - $countones(ref_busy)) begin
      failures++;
      $display("FAIL free_count %0d expected %0d", free_count, NDYN - $countones(ref_busy));
    end
    checks++;
    if (nofit == 0) begin failures++; $display("FAIL pool never exhausted"); end
    $display("no-fit cycles: %0d", nofit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
