// xbar: n x n switch between the processors' register files.
//
// The design uses two of these: the read-request switch, which carries a
// consumer's read of a $D register (and, in this design, a window-release
// notice) to the producer's processor, and the data switch, which carries the
// producer's $S value back to the consumer's $D register. The description names
// both switches and says they connect the register files asynchronously; their
// insides are this design's choice: a crossbar with one round-robin arbiter per
// output and a register on every output.
//
// Interface: input i offers `in_data[i]` for output `in_dst[i]` while
// `in_valid[i]` is high; the message is taken on a clock edge where
// `in_ready[i]` is high. Output o presents one message per cycle on
// `out_valid[o]`/`out_data[o]`, one cycle after it was taken; the receiver
// must accept it in that cycle. A request to a busy output waits; an input is
// never blocked by traffic to another output.
module xbar #(
  parameter int N = 4,
  parameter int W = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         in_valid,
  input  logic [$clog2(N)-1:0] in_dst   [N],
  input  logic [W-1:0]         in_data  [N],
  output logic [N-1:0]         in_ready,
  output logic [N-1:0]         out_valid,
  output logic [W-1:0]         out_data [N]
);
  localparam int IW = $clog2(N);

  logic [N-1:0]  req   [N];   // req[o][i]: input i wants output o
  logic [N-1:0]  gnt   [N];
  logic [IW-1:0] gidx  [N];
  logic [N-1:0]  gany;

  always_comb begin
    for (int o = 0; o < N; o++)
      for (int i = 0; i < N; i++)
        req[o][i] = in_valid[i] && (int'(in_dst[i]) == o);
  end

  for (genvar o = 0; o < N; o++) begin : g_out
    rr_arbiter #(.N(N)) u_arb (
      .clk, .rst_n, .req(req[o]), .advance(1'b1),
      .grant(gnt[o]), .grant_idx(gidx[o]), .any(gany[o])
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) out_valid[o] <= 1'b0;
      else        out_valid[o] <= gany[o];
    end
    always_ff @(posedge clk) if (gany[o]) out_data[o] <= in_data[gidx[o]];
  end

  always_comb begin
    in_ready = '0;
    for (int o = 0; o < N; o++) in_ready = in_ready | gnt[o];
  end
endmodule
