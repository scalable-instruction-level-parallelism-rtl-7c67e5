// gcq: global continuation queue.
//
// Executes a `cre` instruction. It reads the eight-word create control block
// (start index, last index, step between indices, dependency distance, number
// of $L registers, number of $S registers, code pointer, optional code pointer
// for the last thread) through its own data-memory port, then iterates the
// family: thread c gets index start + c*step and goes to processor c mod NPROC
// over the create bus, so no processor holds more than ceil(m/NPROC) of the m
// threads. Iteration waits while the target processor has no free LCQ slot or
// no window of L+2S registers. All of this follows the design description.
//
// The GCQ also binds the dependency chain. With distance d > 0, thread c reads
// its $D window from the $S window of thread c-d; the GCQ remembers where the
// last DMAX threads were placed (processor and window base) and passes the
// producer's processor and base with every create. The first d threads take
// their $D values from the creating thread, whose $S windows the compiler maps
// onto the upper $G registers: thread c < d reads $G(16 + c*S) onwards, so no
// two of them read the same register. Their producer base is set so that the
// producer address computed in the read stage lands there. With
// d = 0 the threads are independent. A family ends (`family_idle`, which
// releases bsync) when every created thread has terminated. These last points
// are this design's choices, as are: one family at a time, waiting for the
// global write bus to drain before the first create so that created threads
// see the creator's $G writes, and DMAX = 8 as the largest distance.
//
// Timing: one create per cycle at most; the control block read takes one
// memory round trip per word.
module gcq
  import mt_pkg::*;
#(
  parameter int NPROC = 4,
  parameter int DMAX  = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // cre from the create bus
  input  logic              cre_valid,
  input  logic [XLEN-1:0]   cre_addr,
  input  logic [PROCW-1:0]  cre_proc,
  output logic              cre_ready,
  input  logic              gw_idle,
  // control block reads (the GCQ's data cache)
  output logic              mem_req_valid,
  output logic [XLEN-1:0]   mem_req_addr,
  input  logic              mem_req_ready,
  input  logic              mem_resp_valid,
  input  logic [XLEN-1:0]   mem_resp_data,
  // create bus
  output logic              cr_valid,
  output create_t           cr,
  output logic [WINW-1:0]   fam_size,
  input  logic [NPROC-1:0]  can_accept,
  input  logic [RAW-1:0]    alloc_base [NPROC],
  // thread termination
  input  logic [NPROC-1:0]  thread_done,
  output logic              family_idle,
  output logic              waiting_resources
);
  localparam int DW = $clog2(DMAX);

  typedef enum logic [1:0] {G_IDLE, G_FETCH, G_ITER, G_DRAIN} gstate_e;
  gstate_e st;

  logic [XLEN-1:0] ccb [CCB_WORDS];
  logic [XLEN-1:0] ccb_addr;
  logic [PROCW-1:0] creator;
  logic [3:0]      req_k, resp_k;
  logic            outstanding;

  logic [XLEN-1:0] idx;
  logic [XLEN-1:0] cnt;           // threads created so far
  logic [XLEN-1:0] done_cnt;
  logic [PROCW-1:0] tgt;

  typedef struct packed {
    logic [PROCW-1:0] proc;
    logic [RAW-1:0]   base;
  } place_t;
  place_t hist [DMAX];

  wire [XLEN-1:0] f_start = ccb[0];
  wire [XLEN-1:0] f_last  = ccb[1];
  wire [XLEN-1:0] f_step  = ccb[2];
  wire [XLEN-1:0] f_dist  = ccb[3];
  wire [WINW-1:0] f_nl    = WINW'(ccb[4]);
  wire [WINW-1:0] f_ns    = WINW'(ccb[5]);
  wire [PCW-1:0]  f_body  = PCW'(ccb[6]);
  wire [PCW-1:0]  f_lastp = PCW'(ccb[7]);

  assign fam_size    = f_nl + 2 * f_ns;
  assign cre_ready   = (st == G_IDLE) && gw_idle;
  assign family_idle = (st == G_IDLE);

  // ------------------------------------------------------------ control block fetch
  assign mem_req_valid = (st == G_FETCH) && !outstanding && (int'(req_k) < CCB_WORDS);
  assign mem_req_addr  = ccb_addr + XLEN'(req_k);

  // ------------------------------------------------------------ iteration
  logic            is_last;
  logic            prod_thread;
  logic [32:0]     next_cons;
  place_t          prod;
  always_comb begin
    is_last     = (idx == f_last) || ({1'b0, idx} + {1'b0, f_step} > {1'b0, f_last});
    prod_thread = (f_dist != 0) && (cnt >= f_dist);
    next_cons   = {1'b0, idx} + 33'(f_dist * f_step);
    prod        = hist[DW'(cnt - f_dist)];

    cr = '0;
    cr.target         = tgt;
    cr.index          = idx;
    cr.pc             = (is_last && f_lastp != '0) ? f_lastp : f_body;
    cr.nl             = f_nl;
    cr.ns             = f_ns;
    cr.prod_is_thread = prod_thread;
    cr.has_consumer   = (f_dist != 0) && (next_cons <= {1'b0, f_last});
    if (prod_thread) begin
      cr.prod_proc = prod.proc;
      cr.prod_base = prod.base;
    end else begin
      cr.prod_proc = creator;
      cr.prod_base = RAW'(NGLOBAL / 2) - RAW'(f_nl) + RAW'(cnt) * RAW'(f_ns);
    end
  end

  assign cr_valid          = (st == G_ITER) && can_accept[tgt];
  assign waiting_resources = (st == G_ITER) && !can_accept[tgt];

  logic [PROCW:0] ndone;
  always_comb begin
    ndone = '0;
    for (int p = 0; p < NPROC; p++) ndone += (PROCW+1)'(thread_done[p]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= G_IDLE;
      ccb_addr    <= '0;
      creator     <= '0;
      req_k       <= '0;
      resp_k      <= '0;
      outstanding <= 1'b0;
      idx         <= '0;
      cnt         <= '0;
      done_cnt    <= '0;
      tgt         <= '0;
      for (int k = 0; k < CCB_WORDS; k++) ccb[k] <= '0;
      for (int k = 0; k < DMAX; k++) hist[k] <= '0;
    end else begin
      done_cnt <= done_cnt + XLEN'(ndone);
      unique case (st)
        G_IDLE: if (cre_valid && cre_ready) begin
          st          <= G_FETCH;
          ccb_addr    <= cre_addr;
          creator     <= cre_proc;
          req_k       <= '0;
          resp_k      <= '0;
          outstanding <= 1'b0;
          cnt         <= '0;
          done_cnt    <= '0;
          tgt         <= '0;
        end
        G_FETCH: begin
          if (mem_req_valid && mem_req_ready) begin
            outstanding <= 1'b1;
            req_k       <= req_k + 1'b1;
          end
          if (mem_resp_valid && outstanding) begin
            outstanding  <= 1'b0;
            ccb[resp_k[2:0]] <= mem_resp_data;
            resp_k       <= resp_k + 1'b1;
            if (int'(resp_k) == CCB_WORDS - 1) begin
              idx <= ccb[0];
              st  <= (ccb[0] > ccb[1]) ? G_DRAIN : G_ITER;
            end
          end
        end
        G_ITER: if (cr_valid) begin
          hist[DW'(cnt)] <= '{proc: tgt, base: alloc_base[tgt]};
          cnt <= cnt + 1'b1;
          idx <= idx + f_step;
          tgt <= (int'(tgt) == NPROC - 1) ? '0 : tgt + 1'b1;
          if (is_last) st <= G_DRAIN;
        end
        G_DRAIN: if (done_cnt + XLEN'(ndone) == cnt) st <= G_IDLE;
        default: st <= G_IDLE;
      endcase
    end
  end

  // The dependency history holds DMAX placements.
  always_ff @(posedge clk)
    if (rst_n && st == G_ITER && cr_valid)
      assert (f_dist <= XLEN'(DMAX)) else $error("gcq: dependency distance above DMAX");

  initial assert (NPROC <= (1 << PROCW) && (1 << DW) == DMAX)
    else $error("gcq: parameter out of range");
endmodule
