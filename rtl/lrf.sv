// lrf: local register file of one processor, built from i-structures.
//
// Every register has a two-bit state: EMPTY, FULL, or one of two WAITING
// states in which the data field holds a continuation instead of data. A
// write (i-store) makes the register FULL; if a local thread was waiting
// there it is handed back to the LCQ (`wake`), and if a remote consumer was
// waiting the value is sent to it over the data switch. A read (i-read) of a
// register that is not FULL suspends the reading thread: its continuation
// {slot, pc} is stored in the register (WAITING-local). The i-structures,
// the two-bit state, storing the continuation in the empty register and
// reactivating it on a write follow the design description.
//
// Registers 0..31 are the $G window (full and zero after reset); the rest
// are handed out in windows by the RAU and set EMPTY on allocation, with the
// thread's index written to the first ($L0) register. When a thread suspends
// on an empty $D register, the register also records the producer's processor
// and register address and a read request is sent over the read-request switch.
// A read request arriving for one of this processor's $S (or $G) registers is
// answered at once if the register is FULL, otherwise the requester is stored
// as a WAITING-remote continuation and answered when the register is written.
// Outgoing requests and replies are kept as one pending bit per register and
// sent one per cycle each, lowest register first; this queueing is our own.
//
// Ports and timing: two combinational read ports (`rd_*`); four write ports
// acting on the clock edge, [0] pipeline write-back, [1] memory return,
// [2] data switch, [3] global write bus, lowest index winning if two name the
// same register; `inv_*` empties the destination of an issued load; `susp_*`
// suspends a thread on a register; `alloc_*` initialises a new window.
// `wake[0..3]` report threads woken by write port 0..3 and `wake[4]` a
// suspension that met a write in the same cycle (the thread goes on at once).
// All of this is registered: effects are visible in the next cycle.
module lrf
  import mt_pkg::*;
#(
  parameter int NREG = 128
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [PROCW-1:0]    my_id,
  // pipeline reads
  input  logic [RAW-1:0]      rd_addr [2],
  output logic [XLEN-1:0]     rd_data [2],
  output logic [1:0]          rd_full,
  // writes (i-store)
  input  logic [3:0]          wr_valid,
  input  logic [RAW-1:0]      wr_addr [4],
  input  logic [XLEN-1:0]     wr_data [4],
  // load issue: destination becomes empty
  input  logic                inv_valid,
  input  logic [RAW-1:0]      inv_addr,
  // suspend a thread on an empty register
  input  logic                susp_valid,
  input  logic [RAW-1:0]      susp_addr,
  input  cont_t               susp_cont,
  input  logic                susp_remote,   // $D register: fetch from producer
  input  logic [PROCW-1:0]    susp_tproc,
  input  logic [RAW-1:0]      susp_taddr,
  // window allocation
  input  logic                alloc_valid,
  input  logic [RAW-1:0]      alloc_base,
  input  logic [WINW-1:0]     alloc_size,
  input  logic [XLEN-1:0]     alloc_index,
  // read requests from the read-request switch (kind RQ_READ)
  input  logic                rq_in_valid,
  input  rq_msg_t             rq_in,
  // read requests to the read-request switch
  output logic                rq_out_valid,
  output rq_msg_t             rq_out,
  input  logic                rq_out_ready,
  // replies to the data switch
  output logic                dt_out_valid,
  output dt_msg_t             dt_out,
  input  logic                dt_out_ready,
  // threads to reactivate
  output wake_t               wake [5]
);
  rstate_e          st      [NREG];
  logic [XLEN-1:0]  data    [NREG];
  logic [NREG-1:0]  rq_pend;            // read request to send (on a $D register)
  logic [NREG-1:0]  rp_pend;            // reply to send (on a $S / $G register)
  logic [PROCW-1:0] tproc   [NREG];     // remote processor of the request / reply
  logic [RAW-1:0]   taddr   [NREG];     // remote register of the request / reply

  // ------------------------------------------------------------ reads
  always_comb begin
    for (int r = 0; r < 2; r++) begin
      rd_data[r] = '0;
      rd_full[r] = 1'b0;
      if (int'(rd_addr[r]) < NREG) begin
        rd_data[r] = data[rd_addr[r]];
        rd_full[r] = (st[rd_addr[r]] == RS_FULL);
      end
    end
  end

  // ------------------------------------------------------------ outgoing scanners
  logic [RAW-1:0] rq_sel, rp_sel;
  always_comb begin
    rq_out_valid = 1'b0;
    rp_sel       = '0;
    rq_sel       = '0;
    dt_out_valid = 1'b0;
    for (int i = NREG - 1; i >= 0; i--) begin
      if (rq_pend[i]) begin rq_out_valid = 1'b1; rq_sel = RAW'(i); end
      if (rp_pend[i]) begin dt_out_valid = 1'b1; rp_sel = RAW'(i); end
    end
    rq_out = '{kind: RQ_READ, dst: tproc[rq_sel], src: my_id,
               paddr: taddr[rq_sel], caddr: rq_sel};
    dt_out = '{dst: tproc[rp_sel], caddr: taddr[rp_sel], data: data[rp_sel]};
  end

  // ------------------------------------------------------------ wakes
  logic  shadowed;
  cont_t c;
  always_comb begin
    shadowed = 1'b0;
    c        = '0;
    for (int p = 0; p < 5; p++) wake[p] = '0;
    for (int p = 0; p < 4; p++) begin
      shadowed = 1'b0;
      for (int q = 0; q < 4; q++)
        if (q < p && wr_valid[q] && wr_addr[q] == wr_addr[p]) shadowed = 1'b1;
      if (wr_valid[p] && !shadowed && int'(wr_addr[p]) < NREG &&
          st[wr_addr[p]] == RS_WAIT_LOC) begin
        c = cont_t'(data[wr_addr[p]][$bits(cont_t)-1:0]);
        wake[p] = '{valid: 1'b1, slot: c.slot, pc: c.pc};
      end
    end
    if (susp_valid)
      for (int p = 0; p < 4; p++)
        if (wr_valid[p] && wr_addr[p] == susp_addr)
          wake[4] = '{valid: 1'b1, slot: susp_cont.slot, pc: susp_cont.pc};
  end

  // ------------------------------------------------------------ per-register events
  logic [NREG-1:0] w_hit;      // some write port names register i
  logic [XLEN-1:0] w_val [NREG];
  logic [NREG-1:0] in_alloc;   // register i belongs to the window being allocated
  always_comb begin
    for (int i = 0; i < NREG; i++) begin
      w_hit[i] = 1'b0;
      w_val[i] = '0;
      for (int p = 3; p >= 0; p--)
        if (wr_valid[p] && int'(wr_addr[p]) == i) begin
          w_hit[i] = 1'b1;
          w_val[i] = wr_data[p];
        end
      in_alloc[i] = alloc_valid && i >= int'(alloc_base) &&
                    i < int'(alloc_base) + int'(alloc_size);
    end
  end

  // ------------------------------------------------------------ state update
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREG; i++) begin
        st[i]    <= (i < NGLOBAL) ? RS_FULL : RS_EMPTY;
        data[i]  <= '0;
        tproc[i] <= '0;
        taddr[i] <= '0;
      end
      rq_pend <= '0;
      rp_pend <= '0;
    end else begin
      if (rq_out_valid && rq_out_ready) rq_pend[rq_sel] <= 1'b0;
      if (dt_out_valid && dt_out_ready) rp_pend[rp_sel] <= 1'b0;

      for (int i = 0; i < NREG; i++) begin
        if (in_alloc[i]) begin
          st[i]      <= (i == int'(alloc_base)) ? RS_FULL : RS_EMPTY;
          data[i]    <= (i == int'(alloc_base)) ? alloc_index : '0;
          rq_pend[i] <= 1'b0;
          rp_pend[i] <= 1'b0;
        end else if (w_hit[i]) begin
          st[i]   <= RS_FULL;
          data[i] <= w_val[i];
          if (st[i] == RS_WAIT_REM) rp_pend[i] <= 1'b1;   // requester already in tproc/taddr
          if (rq_in_valid && rq_in.kind == RQ_READ && int'(rq_in.paddr) == i) begin
            rp_pend[i] <= 1'b1;
            tproc[i]   <= rq_in.src;
            taddr[i]   <= rq_in.caddr;
          end
        end else if (susp_valid && int'(susp_addr) == i) begin
          // also covers a read of the destination of a load issued this cycle
          st[i]   <= RS_WAIT_LOC;
          data[i] <= XLEN'(susp_cont);
          if (susp_remote) begin
            rq_pend[i] <= 1'b1;
            tproc[i]   <= susp_tproc;
            taddr[i]   <= susp_taddr;
          end
        end else if (inv_valid && int'(inv_addr) == i) begin
          st[i] <= RS_EMPTY;
        end else if (rq_in_valid && rq_in.kind == RQ_READ && int'(rq_in.paddr) == i) begin
          tproc[i] <= rq_in.src;
          taddr[i] <= rq_in.caddr;
          if (st[i] == RS_FULL) rp_pend[i] <= 1'b1;
          else                  st[i]      <= RS_WAIT_REM;
        end
      end
    end
  end

  // ------------------------------------------------------------ rules
  // An i-structure holds one continuation: a second reader may not arrive
  // while one is waiting (the compiler must prevent it).
  always_ff @(posedge clk)
    if (rst_n && susp_valid && int'(susp_addr) < NREG)
      assert (st[susp_addr] != RS_WAIT_LOC && st[susp_addr] != RS_WAIT_REM)
        else $error("lrf: second continuation on register %0d", susp_addr);

  initial assert (NREG <= (1 << RAW) && $bits(cont_t) <= XLEN)
    else $error("lrf: size out of range");
endmodule
