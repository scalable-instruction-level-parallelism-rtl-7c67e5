// sync_fifo: small synchronous first-in first-out buffer.
//
// DEPTH entries of W bits. `push` writes `wdata` when not full, `pop` drops
// the head when not empty; both may happen in one cycle. `rdata` is the head
// and is valid while `empty` is low. Used as the local buffer in front of the
// global write bus, which the design description asks for to absorb bursts of
// global writes; depth and organisation are this design's choice.
module sync_fifo #(
  parameter int W     = 8,
  parameter int DEPTH = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] wdata,
  input  logic         pop,
  output logic [W-1:0] rdata,
  output logic         empty,
  output logic         full
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rp, wp;
  logic [AW:0]   cnt;

  assign empty = (cnt == 0);
  assign full  = (cnt == (AW+1)'(DEPTH));
  assign rdata = mem[rp];

  wire do_push = push && !full;
  wire do_pop  = pop && !empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp  <= '0;
      wp  <= '0;
      cnt <= '0;
    end else begin
      if (do_push) wp <= (int'(wp) == DEPTH-1) ? '0 : wp + 1'b1;
      if (do_pop)  rp <= (int'(rp) == DEPTH-1) ? '0 : rp + 1'b1;
      cnt <= cnt + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  always_ff @(posedge clk) if (do_push) mem[wp] <= wdata;
endmodule
