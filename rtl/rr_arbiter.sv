// rr_arbiter: round-robin arbiter.
//
// Grants one of N requesters per cycle. The search starts one place after the
// last requester that was granted and accepted, so every requester that keeps
// asking is served within N grants. `grant` is combinational from `req`; the
// priority pointer moves on a clock edge where `advance` is high and some
// request was granted. Used by the switches, the global write bus and the
// create bus, which the design description says arbitrate but does not say how;
// round robin is this design's choice.
module rr_arbiter #(
  parameter int N = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic                 advance,
  output logic [N-1:0]         grant,
  output logic [$clog2(N)-1:0] grant_idx,
  output logic                 any
);
  localparam int IW = $clog2(N);
  logic [IW-1:0] ptr;   // highest priority requester

  always_comb begin
    grant     = '0;
    grant_idx = '0;
    any       = 1'b0;
    for (int k = 0; k < N; k++) begin
      if (!any && req[(int'(ptr) + k) % N]) begin
        any                          = 1'b1;
        grant[(int'(ptr) + k) % N]   = 1'b1;
        grant_idx                    = IW'((int'(ptr) + k) % N);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              ptr <= '0;
    else if (advance && any) ptr <= (int'(grant_idx) == N-1) ? '0 : grant_idx + 1'b1;
  end
endmodule
