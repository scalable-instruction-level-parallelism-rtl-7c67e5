// gwbus: global write bus.
//
// Every processor keeps its own copy of the $G register window. A write to
// $G is made in the writer's register file at once and is also pushed into
// that processor's local buffer here; the bus grants one buffer per cycle
// (round robin) and broadcasts its head to all processors, which write it
// into their copies unless they are the source. So reads of $G stay local and
// writes are reflected elsewhere some cycles later. The single arbitrated bus
// and the local buffer follow the design description; the buffer depth, the
// round-robin order and the one-cycle broadcast register are this design's
// choices.
//
// Interface: `push[p]` with `push_addr/push_data[p]` enqueues a write from
// processor p; `full[p]` says the buffer cannot take one (the processor then
// stalls). `bc_valid/bc_msg` is the broadcast, valid for one cycle per write.
// `idle` is high when every buffer is empty and nothing is being broadcast;
// the GCQ waits for it before creating threads so they see the creator's
// $G writes.
module gwbus
  import mt_pkg::*;
#(
  parameter int NPROC = 4,
  parameter int DEPTH = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NPROC-1:0]     push,
  input  logic [RAW-1:0]       push_addr [NPROC],
  input  logic [XLEN-1:0]      push_data [NPROC],
  output logic [NPROC-1:0]     full,
  output logic                 bc_valid,
  output gw_msg_t              bc_msg,
  output logic                 idle
);
  localparam int IW = (NPROC > 1) ? $clog2(NPROC) : 1;
  typedef struct packed {
    logic [RAW-1:0]  addr;
    logic [XLEN-1:0] data;
  } ent_t;

  ent_t             head  [NPROC];
  logic [NPROC-1:0] empty;
  logic [NPROC-1:0] gnt;
  logic [IW-1:0]    gidx;
  logic             gany;

  for (genvar p = 0; p < NPROC; p++) begin : g_buf
    sync_fifo #(.W($bits(ent_t)), .DEPTH(DEPTH)) u_fifo (
      .clk, .rst_n,
      .push (push[p]),
      .wdata({push_addr[p], push_data[p]}),
      .pop  (gnt[p]),
      .rdata(head[p]),
      .empty(empty[p]),
      .full (full[p])
    );
  end

  rr_arbiter #(.N(NPROC)) u_arb (
    .clk, .rst_n, .req(~empty), .advance(1'b1),
    .grant(gnt), .grant_idx(gidx), .any(gany)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bc_valid <= 1'b0;
    else        bc_valid <= gany;
  end
  always_ff @(posedge clk)
    if (gany) bc_msg <= '{src: PROCW'(gidx), addr: head[gidx].addr, data: head[gidx].data};

  assign idle = (&empty) && !bc_valid;

  initial assert (NPROC <= (1 << PROCW)) else $error("gwbus: NPROC too large");
endmodule
