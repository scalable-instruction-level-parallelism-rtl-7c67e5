// create_bus: the single bus between the processors and the GCQ.
//
// Upward, it carries `cre` requests: any processor may ask, one is granted
// per cycle (round robin) and only when the GCQ can take a new family; the
// granted processor's pipeline stalls until then. Downward, it carries the
// GCQ's thread creates to the one processor each is addressed to, and the
// answer of every processor (free slot and registers, and the window base its
// RAU chose) back to the GCQ. A single shared bus follows the design
// description, which argues that thread creation is rare enough for it;
// the round-robin grant is this design's choice.
//
// Timing: `req_grant[p]` is combinational and the request is taken on that
// clock edge; a create is delivered in the cycle the GCQ drives it.
module create_bus
  import mt_pkg::*;
#(
  parameter int NPROC = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // processors -> GCQ
  input  logic [NPROC-1:0]  req_valid,
  input  logic [XLEN-1:0]   req_addr [NPROC],
  output logic [NPROC-1:0]  req_grant,
  output logic              gcq_cre_valid,
  output logic [XLEN-1:0]   gcq_cre_addr,
  output logic [PROCW-1:0]  gcq_cre_proc,
  input  logic              gcq_cre_ready,
  // GCQ -> processors
  input  logic              gcq_cr_valid,
  input  create_t           gcq_cr,
  output logic [NPROC-1:0]  proc_cr_valid,
  output create_t           proc_cr,
  // processors -> GCQ (answers)
  input  logic [NPROC-1:0]  proc_can_accept,
  input  logic [RAW-1:0]    proc_base [NPROC],
  output logic [NPROC-1:0]  gcq_can_accept,
  output logic [RAW-1:0]    gcq_base [NPROC]
);
  localparam int IW = $clog2(NPROC);
  logic [NPROC-1:0] gnt;
  logic [IW-1:0]    gidx;
  logic             gany;

  rr_arbiter #(.N(NPROC)) u_arb (
    .clk, .rst_n, .req(req_valid), .advance(gcq_cre_ready),
    .grant(gnt), .grant_idx(gidx), .any(gany)
  );

  assign gcq_cre_valid = gany;
  assign gcq_cre_addr  = req_addr[gidx];
  assign gcq_cre_proc  = PROCW'(gidx);
  assign req_grant     = gcq_cre_ready ? gnt : '0;

  always_comb
    for (int p = 0; p < NPROC; p++)
      proc_cr_valid[p] = gcq_cr_valid && (int'(gcq_cr.target) == p);
  assign proc_cr        = gcq_cr;
  assign gcq_can_accept = proc_can_accept;
  assign gcq_base       = proc_base;
endmodule
