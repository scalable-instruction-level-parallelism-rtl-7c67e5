// tb_xbar: self-checking test of the n x n switch.
//
// Four inputs send random traffic (random destinations, random gaps). Each
// message carries its source and a sequence number. The test checks that
// every message reaches the output it named, exactly once, in the order it was
// sent per source-destination pair, one cycle after the switch took it, and
// that contention (two inputs wanting one output in a cycle) happened.
module tb_xbar;
  localparam int N = 4, W = 16, PER = 200;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0]         in_valid, in_ready, out_valid;
  logic [$clog2(N)-1:0] in_dst [N];
  logic [W-1:0]         in_data [N], out_data [N];

  xbar #(.N(N), .W(W)) dut (.*);

  int checks = 0, failures = 0, contention = 0;
  int sent [N], got [N][N], nexts [N][N];
  logic [W-1:0] taken [N];
  logic [N-1:0] taken_v;
  logic [$clog2(N)-1:0] taken_dst [N];

  // payload: src[15:14], dst[13:12], seq[11:0]
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_valid <= '0;
      for (int i = 0; i < N; i++) begin sent[i] <= 0; in_dst[i] <= '0; in_data[i] <= '0; end
    end else begin
      for (int i = 0; i < N; i++) begin
        if (!in_valid[i] || in_ready[i]) begin
          if (in_valid[i]) sent[i] <= sent[i] + 1;
          if ((sent[i] + int'(in_valid[i])) < PER && $urandom_range(0, 3) != 0) begin
            logic [1:0] d;
            d = 2'($urandom_range(0, N - 1));
            in_valid[i] <= 1'b1;
            in_dst[i]   <= d;
            in_data[i]  <= {2'(i), d, 12'(nexts[i][d])};
            nexts[i][d] <= nexts[i][d] + 1;
          end else in_valid[i] <= 1'b0;
        end
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    int c;
    c = 0;
    for (int o = 0; o < N; o++) begin
      c = 0;
      for (int i = 0; i < N; i++) if (in_valid[i] && int'(in_dst[i]) == o) c++;
      if (c > 1) contention++;
    end
    // what was accepted last cycle must show now
    for (int o = 0; o < N; o++) begin
      logic exp_v;
      exp_v = 1'b0;
      for (int i = 0; i < N; i++)
        if (taken_v[i] && int'(taken_dst[i]) == o) begin
          exp_v = 1'b1;
          checks++;
          if (!out_valid[o] || out_data[o] != taken[i]) begin
            failures++;
            $display("FAIL output %0d: expected %h", o, taken[i]);
          end
        end
      if (out_valid[o] && !exp_v) begin
        failures++; checks++;
        $display("FAIL output %0d: unexpected %h", o, out_data[o]);
      end
      if (out_valid[o]) begin
        int s, sq;
        s  = int'(out_data[o][15:14]);
        sq = int'(out_data[o][11:0]);
        checks++;
        if (int'(out_data[o][13:12]) != o || sq != got[s][o]) begin
          failures++;
          $display("FAIL output %0d: message %h out of order (want seq %0d)", o, out_data[o], got[s][o]);
        end
        got[s][o]++;
      end
    end
    for (int i = 0; i < N; i++) begin
      taken_v[i]   = in_valid[i] && in_ready[i];
      taken[i]     = in_data[i];
      taken_dst[i] = in_dst[i];
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total;
    taken_v = '0;
    for (int i = 0; i < N; i++) for (int o = 0; o < N; o++) begin got[i][o] = 0; nexts[i][o] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    wait (sent[0] == PER && sent[1] == PER && sent[2] == PER && sent[3] == PER);
    repeat (4) @(posedge clk);
    total = 0;
    for (int i = 0; i < N; i++) for (int o = 0; o < N; o++) total += got[i][o];
    checks++;
    if (total != N * PER) begin failures++; $display("FAIL delivered %0d of %0d", total, N * PER); end
    checks++;
    if (contention == 0) begin failures++; $display("FAIL no contention exercised"); end
    $display("delivered %0d messages, %0d contended cycles", total, contention);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
