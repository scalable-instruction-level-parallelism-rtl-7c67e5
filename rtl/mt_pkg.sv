// mt_pkg: types and constants shared by the microthreaded chip multiprocessor.
//
// The machine is a set of in-order processors that run "microthreads": short
// threads created in families by a global continuation queue (GCQ). Every
// processor holds its threads' registers in a local register file (LRF) whose
// entries are i-structures (empty / full / waiting). This package holds the
// sizes, the instruction set encoding, the register states and the message
// formats that the blocks exchange.
//
// Taken from the design description: a 5-bit register specifier split into a
// 16-entry $G window (lower half) and a 16-entry window for $L/$S/$D (upper
// half, L+2S <= 16); a 32-entry $G window for the main thread; a two-bit state
// per register; the eight-word create control block; the five concurrency
// instructions cre, swch, kill, bsync, brk; and the ordinary instructions used
// in the example loop (mv, lw, sw, add, mul). Our own choices: the binary
// instruction encoding, the word width of 32, the number of processors,
// registers and thread slots, and the message formats.
package mt_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int XLEN      = 32;   // data word
  localparam int PCW       = 16;   // instruction address width (word addressed)
  localparam int SPECW     = 5;    // register specifier width
  localparam int NGLOBAL   = 32;   // physical $G registers (main thread sees all 32)
  localparam int WINMAX    = 16;   // max L+2S per thread
  localparam int CCB_WORDS = 8;    // words in a create control block


  // Field widths wide enough for every supported size (NPROC <= 16,
  // NREG <= 256, NSLOT <= 16); modules check their parameters against them.
  localparam int PROCW = 4;
  localparam int RAW   = 8;   // physical register address
  localparam int SLOTW = 4;   // LCQ slot number
  localparam int WINW  = 5;   // holds 0..16

  // ---------------------------------------------------------------- thread state
  // What the pipeline carries with every instruction to the register read
  // stage: the thread's window base, its producer's window base and processor.
  typedef struct packed {
    logic [SLOTW-1:0] slot;
    logic [PCW-1:0]   pc;
    logic [RAW-1:0]   base;
    logic [RAW-1:0]   prod_base;
    logic [PROCW-1:0] prod_proc;
    logic [WINW-1:0]  nl;       // L
    logic [WINW-1:0]  ns;       // S
    logic             is_main;
  } tctx_t;

  // ---------------------------------------------------------------- create bus
  typedef struct packed {
    logic [PROCW-1:0] target;
    logic [XLEN-1:0]  index;
    logic [PCW-1:0]   pc;
    logic [WINW-1:0]  nl;
    logic [WINW-1:0]  ns;
    logic [PROCW-1:0] prod_proc;
    logic [RAW-1:0]   prod_base;
    logic             prod_is_thread; // producer is a created thread (not the creator)
    logic             has_consumer;   // some later thread reads this one's $S window
  } create_t;

  // ---------------------------------------------------------------- networks
  typedef enum logic {
    RQ_READ    = 1'b0,   // read producer register paddr, reply to caddr on src
    RQ_RELEASE = 1'b1    // consumer finished: producer window at paddr may be freed
  } rq_kind_e;

  typedef struct packed {
    rq_kind_e         kind;
    logic [PROCW-1:0] dst;
    logic [PROCW-1:0] src;
    logic [RAW-1:0]   paddr;
    logic [RAW-1:0]   caddr;
  } rq_msg_t;

  typedef struct packed {
    logic [PROCW-1:0] dst;
    logic [RAW-1:0]   caddr;
    logic [XLEN-1:0]  data;
  } dt_msg_t;

  typedef struct packed {
    logic [PROCW-1:0] src;
    logic [RAW-1:0]   addr;
    logic [XLEN-1:0]  data;
  } gw_msg_t;

  // A suspended local thread, kept in the data field of the empty register.
  typedef struct packed {
    logic [SLOTW-1:0] slot;
    logic [PCW-1:0]   pc;
  } cont_t;

  typedef struct packed {
    logic             valid;
    logic [SLOTW-1:0] slot;
    logic [PCW-1:0]   pc;
  } wake_t;

  // ---------------------------------------------------------------- ISA
  // Instruction word: op[31:26] rd[25:21] ra[20:16] rb[15:11], imm[15:0]
  // (imm overlaps rb; I-type instructions use imm, R-type use rb).
  typedef enum logic [5:0] {
    OP_NOP    = 6'd0,
    OP_ADD    = 6'd1,   // rd = ra + rb
    OP_SUB    = 6'd2,   // rd = ra - rb
    OP_MUL    = 6'd3,   // rd = ra * rb
    OP_MV     = 6'd4,   // rd = ra
    OP_ADDI   = 6'd5,   // rd = ra + sext(imm)
    OP_LW     = 6'd6,   // rd = mem[ra + sext(imm)]   (asynchronous completion)
    OP_SW     = 6'd7,   // mem[ra + sext(imm)] = rd
    OP_CRE    = 6'd8,   // create family, control block at ra + sext(imm)
    OP_SWCH   = 6'd9,   // context switch
    OP_KILL   = 6'd10,  // terminate this thread
    OP_BSYNC  = 6'd11,  // wait until the family has terminated
    OP_BRK    = 6'd12,  // terminate all other threads of the family
    OP_FINISH = 6'd13   // main thread done: halt
  } op_e;

  typedef struct packed {
    op_e              op;
    logic [SPECW-1:0] rd;
    logic [SPECW-1:0] ra;
    logic [15:0]      imm;   // imm[15:11] is rb
  } instr_t;

  function automatic logic [SPECW-1:0] rb_of(instr_t i);
    return i.imm[15:11];
  endfunction

  // ---------------------------------------------------------------- i-structure state
  typedef enum logic [1:0] {
    RS_EMPTY    = 2'd0,   // no data, nobody waiting
    RS_FULL     = 2'd1,   // holds data
    RS_WAIT_LOC = 2'd2,   // holds a local thread continuation {slot, pc}
    RS_WAIT_REM = 2'd3    // holds a remote continuation {proc, consumer address}
  } rstate_e;

endpackage
