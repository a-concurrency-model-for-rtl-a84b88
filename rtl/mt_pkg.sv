// mt_pkg: sizes, types and helper functions shared by the microthreaded chip
// multiprocessor.
//
// The register name space of a thread is split into four windows: $G (global,
// replicated in every processor's register file), $L (local), $S (shared, written
// by the producer thread) and $D (dependent, the consumer's view of its producer's
// $S window). Every processor keeps NGLOB global registers followed by NSLOT
// thread frames of FRAME registers; a frame holds a thread's $L, $S and $D
// windows in that order. The four window classes and the 8-word family control
// block come from the model; all sizes below are this design's own choices.
package mt_pkg;

  localparam int unsigned NPROC   = 4;   // processors (power of two)
  localparam int unsigned PID_W   = $clog2(NPROC);
  localparam int unsigned DATA_W  = 32;
  localparam int unsigned NGLOB   = 8;   // $G window size
  localparam int unsigned NSLOT   = 8;   // thread slots per processor
  localparam int unsigned SLOT_W  = $clog2(NSLOT);
  localparam int unsigned FRAME   = 8;   // registers per thread frame
  localparam int unsigned NREGS   = NGLOB + NSLOT * FRAME;
  localparam int unsigned RADDR_W = $clog2(NREGS);
  localparam int unsigned IDX_W   = 3;   // register index within a window
  localparam int unsigned WIN_W   = 4;   // window size field (0..FRAME)
  localparam int unsigned NFAM    = 4;   // families held by the GCQ
  localparam int unsigned FAM_W   = $clog2(NFAM);
  localparam int unsigned ORD_W   = 16;  // thread ordinal within a family

  typedef logic [DATA_W-1:0]  word_t;
  typedef logic [RADDR_W-1:0] raddr_t;
  typedef logic [PID_W-1:0]   pid_t;
  typedef logic [SLOT_W-1:0]  slot_t;
  typedef logic [FAM_W-1:0]   fam_t;
  typedef logic [ORD_W-1:0]   ord_t;
  typedef logic [WIN_W-1:0]   win_t;

  // Register class of a specifier ($G, $L, $S, $D).
  typedef enum logic [1:0] {RC_G = 2'd0, RC_L = 2'd1, RC_S = 2'd2, RC_D = 2'd3} rclass_e;

  typedef struct packed {
    rclass_e           cls;
    logic [IDX_W-1:0]  idx;
  } rspec_t;

  // Continuation parked in an empty register: a local thread slot, or a remote
  // read request (requesting processor and the $D register to fill there).
  typedef struct packed {
    logic   remote;
    pid_t   pid;
    raddr_t addr;    // remote: $D register; local: slot in the low bits
  } cont_t;

  // The 8-word family control block named by a Cre instruction.
  typedef struct packed {
    word_t start;
    word_t limit;
    word_t step;
    word_t dep_dist;  // dependency distance
    word_t nlocal;
    word_t nshared;
    word_t code;      // code address of every thread
    word_t last_code; // optional code address of the last thread (0: none)
  } tcb_t;

  // Identity of a thread in the whole machine.
  typedef struct packed {
    fam_t fam;
    ord_t ord;
  } tid_t;

  // One thread creation on the GCQ create bus.
  typedef struct packed {
    tid_t  tid;
    word_t index;
    word_t pc;
    win_t  nlocal;
    win_t  nshared;
    logic  has_d;     // thread reads a $D window
    pid_t  d_pid;     // processor holding the producer
    tid_t  d_tid;     // producer thread
    logic  has_cons;  // a later thread of the family reads this one's $S
  } create_t;

  // Per-slot context kept by the LCQ and used for register translation.
  typedef struct packed {
    tid_t  tid;
    win_t  nlocal;
    win_t  nshared;
    logic  has_d;
    pid_t  d_pid;
    tid_t  d_tid;
    logic  has_cons;
  } slot_info_t;

  // Remote read request: read $S[s_idx] of thread tid, reply to dst on the
  // requesting processor (which the switch reports with the request).
  typedef struct packed {
    raddr_t           dst;
    tid_t             tid;
    logic [IDX_W-1:0] s_idx;
  } rreq_t;

  // Remote data returned to a $D register.
  typedef struct packed {
    raddr_t dst;
    word_t  data;
  } rdat_t;

  // Write to the $G window carried by the global write bus.
  typedef struct packed {
    logic [IDX_W-1:0] gidx;
    word_t            data;
  } gwr_t;

  // Control operation issued by the pipeline for thread pin.slot.
  typedef enum logic [2:0] {
    OP_NONE  = 3'd0,
    OP_SWCH  = 3'd1,  // context switch: thread goes back to ready
    OP_KILL  = 3'd2,  // thread terminates
    OP_CRE   = 3'd3,  // create a family (tcb)
    OP_BSYNC = 3'd4,  // wait until every other thread has completed
    OP_BRK   = 3'd5   // kill every other thread
  } ctl_op_e;

  // Pipeline side of one processor tile (the in-order pipeline itself is
  // outside this design).
  typedef struct packed {
    logic              thr_req;   // pipeline asks for the next thread
    slot_t             slot;      // thread of this cycle's operations
    word_t             pc;        // pc to resume at (suspend, swch, bsync)
    logic [1:0]        rd_en;
    rspec_t [1:0]      rd_spec;
    logic              wr_en;
    logic              wr_empty;  // load issue: mark the target empty
    rspec_t            wr_spec;
    word_t             wr_data;
    logic              mem_en;    // decoupled load completion
    slot_t             mem_slot;
    rspec_t            mem_spec;
    word_t             mem_data;
    ctl_op_e           op;
    tcb_t              tcb;       // for OP_CRE
  } pipe_in_t;

  typedef struct packed {
    logic              thr_valid; // a ready thread was handed over this cycle
    slot_t             thr_slot;
    word_t             thr_pc;
    logic              rd_ok;     // all enabled reads found full registers
    logic              rd_retry;  // not suspended: request queue full, retry
    word_t [1:0]       rd_data;
    logic              gw_ready;  // a $G write can be accepted
    logic              cre_ready; // an OP_CRE can be accepted
    logic              busy;      // some thread slot is in use
    logic              flush;     // Brk elsewhere: drop the running thread
  } pipe_out_t;

  // Physical register of a window specifier for a thread in slot s.
  function automatic raddr_t phys_addr(slot_t s, win_t nlocal, win_t nshared, rspec_t sp);
    int unsigned base;
    base = NGLOB + int'(s) * FRAME;
    case (sp.cls)
      RC_G:    return raddr_t'(sp.idx);
      RC_L:    return raddr_t'(base + int'(sp.idx));
      RC_S:    return raddr_t'(base + int'(nlocal) + int'(sp.idx));
      default: return raddr_t'(base + int'(nlocal) + int'(nshared) + int'(sp.idx));
    endcase
  endfunction

endpackage
