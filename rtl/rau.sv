// rau: register allocation unit of one processor.
//
// Registers 0..NGLOBAL-1 of the local register file are the $G window; the
// rest form a pool from which every created thread receives one contiguous
// window of L+2S registers (its $L, $S and $D registers), as the design
// description lays out. The description gives the RAU's job, not its
// insides: here the pool is a bitmap of free registers and the window goes
// to the lowest address where `size` consecutive registers are free (first
// fit). The search is combinational, so the GCQ can see `fit` for the
// family's window size in the same cycle, and a create is served in one cycle.
//
// Interface: `size` is the window size asked for; `fit` and `base` (an
// absolute register address) answer it. `alloc` takes that window on the
// clock edge. Two release ports free windows (`rel_valid`, `rel_base`,
// `rel_size`), since a thread's own termination and a consumer's release
// notice can arrive in the same cycle. `free_count` is for observation.
module rau
  import mt_pkg::*;
#(
  parameter int NREG = 128
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [WINW-1:0]    size,
  output logic               fit,
  output logic [RAW-1:0]     base,
  input  logic               alloc,
  input  logic [1:0]         rel_valid,
  input  logic [RAW-1:0]     rel_base [2],
  input  logic [WINW-1:0]    rel_size [2],
  output logic [RAW:0]       free_count
);
  localparam int NDYN = NREG - NGLOBAL;

  logic [NDYN-1:0] busy;

  logic ok;
  always_comb begin
    ok   = 1'b0;
    fit  = 1'b0;
    base = RAW'(NGLOBAL);
    for (int s = NDYN - 1; s >= 0; s--) begin
      ok = (s + int'(size) <= NDYN);
      for (int k = 0; k < WINMAX; k++)
        if (k < int'(size) && s + k < NDYN && busy[s + k]) ok = 1'b0;
      if (ok) begin
        fit  = 1'b1;
        base = RAW'(NGLOBAL + s);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) busy <= '0;
    else begin
      for (int r = 0; r < 2; r++)
        if (rel_valid[r])
          for (int k = 0; k < WINMAX; k++)
            if (k < int'(rel_size[r]) && int'(rel_base[r]) - NGLOBAL + k < NDYN)
              busy[int'(rel_base[r]) - NGLOBAL + k] <= 1'b0;
      if (alloc && fit)
        for (int k = 0; k < WINMAX; k++)
          if (k < int'(size) && int'(base) - NGLOBAL + k < NDYN)
            busy[int'(base) - NGLOBAL + k] <= 1'b1;
    end
  end

  always_comb begin
    free_count = '0;
    for (int i = 0; i < NDYN; i++) free_count += (RAW+1)'(!busy[i]);
  end

  initial assert (NREG <= (1 << RAW) && NREG > NGLOBAL + WINMAX)
    else $error("rau: NREG out of range");
endmodule
