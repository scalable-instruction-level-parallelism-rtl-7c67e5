// mt_top: distributed microthreaded chip multiprocessor.
//
// NPROC processors, each an in-order pipeline with its own local register
// file (LRF), local continuation queue (LCQ) and register allocation unit
// (RAU), share three global structures: the create bus to the global
// continuation queue (GCQ), which spreads the threads of a family over the
// processors; the global write bus, which copies every $G write into all
// register files; and two n x n switches, one carrying read requests for
// $D registers to the producer thread's processor and one carrying the $S
// values back. Every register file has a fixed number of ports whatever
// NPROC is; only the switches grow with it. This arrangement is the one the
// design description draws; the sizes (4 processors, 128 registers and 8
// thread slots per processor) are this design's choices, as the description
// gives none.
//
// Processor 0 starts the main thread at instruction address 0 after reset;
// `halted` rises when it executes `finish`. The instruction and data caches
// are not part of this RTL: each processor has an instruction port (address
// out, instruction back in the same cycle) and a data port (request with a
// valid/ready handshake; load data returns later, tagged with the
// destination register, in any order), and the GCQ has a read port for
// create control blocks (one outstanding read, reply any cycles later).
module mt_top
  import mt_pkg::*;
#(
  parameter int NPROC    = 4,
  parameter int NREG     = 128,
  parameter int NSLOT    = 8,
  parameter int GW_DEPTH = 4,
  parameter int DMAX     = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // instruction ports
  output logic [PCW-1:0]    imem_addr    [NPROC],
  input  logic [31:0]       imem_rdata   [NPROC],
  // data ports
  output logic [NPROC-1:0]  dm_req_valid,
  output logic [NPROC-1:0]  dm_req_we,
  output logic [XLEN-1:0]   dm_req_addr  [NPROC],
  output logic [XLEN-1:0]   dm_req_wdata [NPROC],
  output logic [RAW-1:0]    dm_req_tag   [NPROC],
  input  logic [NPROC-1:0]  dm_req_ready,
  input  logic [NPROC-1:0]  dm_resp_valid,
  input  logic [RAW-1:0]    dm_resp_tag  [NPROC],
  input  logic [XLEN-1:0]   dm_resp_data [NPROC],
  // GCQ control-block reads
  output logic              gcq_mem_req_valid,
  output logic [XLEN-1:0]   gcq_mem_req_addr,
  input  logic              gcq_mem_req_ready,
  input  logic              gcq_mem_resp_valid,
  input  logic [XLEN-1:0]   gcq_mem_resp_data,
  // status
  output logic              halted,
  output logic              family_idle
);
  localparam int IW = $clog2(NPROC);

  // create bus
  logic [NPROC-1:0] cre_valid, cre_grant, can_accept, can_accept_g, thread_done, p_cr_valid;
  logic [XLEN-1:0]  cre_addr [NPROC];
  logic [RAW-1:0]   alloc_base [NPROC], alloc_base_g [NPROC];
  logic             g_cre_valid, g_cre_ready, g_cr_valid;
  logic [XLEN-1:0]  g_cre_addr;
  logic [PROCW-1:0] g_cre_proc;
  create_t          g_cr, p_cr;
  logic [WINW-1:0]  fam_size;
  logic             waiting_resources;
  // global write bus
  logic [NPROC-1:0] gw_push, gw_full;
  logic [RAW-1:0]   gw_addr [NPROC];
  logic [XLEN-1:0]  gw_data [NPROC];
  logic             gw_bc_valid, gw_idle;
  gw_msg_t          gw_bc;
  // switches
  logic [NPROC-1:0] rq_out_valid, rq_out_ready, rq_in_valid;
  logic [NPROC-1:0] dt_out_valid, dt_out_ready, dt_in_valid;
  rq_msg_t          rq_out [NPROC], rq_in [NPROC];
  dt_msg_t          dt_out [NPROC], dt_in [NPROC];
  logic [$bits(rq_msg_t)-1:0] rq_out_w [NPROC], rq_in_w [NPROC];
  logic [$bits(dt_msg_t)-1:0] dt_out_w [NPROC], dt_in_w [NPROC];
  logic [IW-1:0]    rq_dst [NPROC], dt_dst [NPROC];
  logic [NPROC-1:0] p_halted;

  for (genvar p = 0; p < NPROC; p++) begin : g_proc
    mt_proc #(.NREG(NREG), .NSLOT(NSLOT), .HAS_MAIN(p == 0)) u_proc (
      .clk, .rst_n, .my_id(PROCW'(p)),
      .cre_valid(cre_valid[p]), .cre_addr(cre_addr[p]), .cre_grant(cre_grant[p]),
      .cr_valid(p_cr_valid[p]), .cr(p_cr), .fam_size,
      .can_accept(can_accept[p]), .alloc_base(alloc_base[p]),
      .thread_done(thread_done[p]), .family_idle,
      .gw_push(gw_push[p]), .gw_addr(gw_addr[p]), .gw_data(gw_data[p]), .gw_full(gw_full[p]),
      .gw_bc_valid, .gw_bc,
      .rq_out_valid(rq_out_valid[p]), .rq_out(rq_out[p]), .rq_out_ready(rq_out_ready[p]),
      .rq_in_valid(rq_in_valid[p]), .rq_in(rq_in[p]),
      .dt_out_valid(dt_out_valid[p]), .dt_out(dt_out[p]), .dt_out_ready(dt_out_ready[p]),
      .dt_in_valid(dt_in_valid[p]), .dt_in(dt_in[p]),
      .imem_addr(imem_addr[p]), .imem_rdata(imem_rdata[p]),
      .dm_req_valid(dm_req_valid[p]), .dm_req_we(dm_req_we[p]), .dm_req_addr(dm_req_addr[p]),
      .dm_req_wdata(dm_req_wdata[p]), .dm_req_tag(dm_req_tag[p]), .dm_req_ready(dm_req_ready[p]),
      .dm_resp_valid(dm_resp_valid[p]), .dm_resp_tag(dm_resp_tag[p]),
      .dm_resp_data(dm_resp_data[p]),
      .halted(p_halted[p])
    );
    assign rq_out_w[p] = rq_out[p];
    assign rq_in[p]    = rq_msg_t'(rq_in_w[p]);
    assign rq_dst[p]   = IW'(rq_out[p].dst);
    assign dt_out_w[p] = dt_out[p];
    assign dt_in[p]    = dt_msg_t'(dt_in_w[p]);
    assign dt_dst[p]   = IW'(dt_out[p].dst);
  end
  assign halted = p_halted[0];

  create_bus #(.NPROC(NPROC)) u_cbus (
    .clk, .rst_n,
    .req_valid(cre_valid), .req_addr(cre_addr), .req_grant(cre_grant),
    .gcq_cre_valid(g_cre_valid), .gcq_cre_addr(g_cre_addr), .gcq_cre_proc(g_cre_proc),
    .gcq_cre_ready(g_cre_ready),
    .gcq_cr_valid(g_cr_valid), .gcq_cr(g_cr),
    .proc_cr_valid(p_cr_valid), .proc_cr(p_cr),
    .proc_can_accept(can_accept), .proc_base(alloc_base),
    .gcq_can_accept(can_accept_g), .gcq_base(alloc_base_g)
  );

  gcq #(.NPROC(NPROC), .DMAX(DMAX)) u_gcq (
    .clk, .rst_n,
    .cre_valid(g_cre_valid), .cre_addr(g_cre_addr), .cre_proc(g_cre_proc),
    .cre_ready(g_cre_ready), .gw_idle,
    .mem_req_valid(gcq_mem_req_valid), .mem_req_addr(gcq_mem_req_addr),
    .mem_req_ready(gcq_mem_req_ready),
    .mem_resp_valid(gcq_mem_resp_valid), .mem_resp_data(gcq_mem_resp_data),
    .cr_valid(g_cr_valid), .cr(g_cr), .fam_size,
    .can_accept(can_accept_g), .alloc_base(alloc_base_g),
    .thread_done, .family_idle, .waiting_resources
  );

  gwbus #(.NPROC(NPROC), .DEPTH(GW_DEPTH)) u_gwbus (
    .clk, .rst_n,
    .push(gw_push), .push_addr(gw_addr), .push_data(gw_data), .full(gw_full),
    .bc_valid(gw_bc_valid), .bc_msg(gw_bc), .idle(gw_idle)
  );

  xbar #(.N(NPROC), .W($bits(rq_msg_t))) u_rq_switch (
    .clk, .rst_n,
    .in_valid(rq_out_valid), .in_dst(rq_dst), .in_data(rq_out_w), .in_ready(rq_out_ready),
    .out_valid(rq_in_valid), .out_data(rq_in_w)
  );

  xbar #(.N(NPROC), .W($bits(dt_msg_t))) u_dt_switch (
    .clk, .rst_n,
    .in_valid(dt_out_valid), .in_dst(dt_dst), .in_data(dt_out_w), .in_ready(dt_out_ready),
    .out_valid(dt_in_valid), .out_data(dt_in_w)
  );
endmodule
