// lcq: local continuation queue of one processor.
//
// Holds NSLOT thread slots. Each slot has a state and the thread's context
// (family and ordinal, window sizes, where its $D window is fed from, and the
// pc to resume at). The pipeline asks for a thread with thr_req; the queue hands
// over one ready thread per cycle, chosen round-robin, and marks it running.
// The running thread leaves that state by a context switch (back to ready), a
// failed register read (suspended, its slot parked in the empty register), a
// Bsync (waits until the GCQ reports that no other thread is live), or a kill.
// A wake from the register file makes a suspended thread ready again.
//
// A killed thread keeps its slot, and so its registers, for as long as another
// thread may still fetch from its $S window: until the GCQ reports that its
// consumer in the family (ordinal + distance) has been killed (cd_en; threads
// with no such consumer skip this), and until every dependent family it created
// has finished with it (a hold count, raised by hold_en when its Cre is
// accepted and lowered by un_en from the GCQ). A Brk frees every slot except
// the issuer's at once.
//
// Timing: all requests take effect at the next rising edge; thr_valid,
// thr_slot and thr_pc are combinational from the state; events are applied in
// the order alloc, hand-over, switch/suspend/bsync/kill, wake, bsync release,
// free, brk, so a wake arriving in the cycle its thread suspends is not
// lost. The slot-table organisation is this design's choice: the model names
// the queue and its continuation slots but not their insides; the release rule
// follows the model's statement that a thread's resources are kept until its
// dependent threads have completed.
module lcq
  import mt_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // allocation from the RAU
  input  logic                alloc_en,
  input  slot_t               alloc_slot,
  input  slot_info_t          alloc_info,
  input  word_t               alloc_pc,
  output logic [NSLOT-1:0]    free_vec,      // slots the RAU may allocate
  // hand-over to the pipeline
  input  logic                thr_req,
  output logic                thr_valid,
  output slot_t               thr_slot,
  output word_t               thr_pc,
  // state changes of the running thread
  input  ctl_op_e             op,
  input  slot_t               op_slot,
  input  word_t               op_pc,
  input  logic                susp_en,
  input  slot_t               susp_slot,
  input  word_t               susp_pc,
  // reactivation from the register file
  input  logic [3:0]          wake_en,
  input  slot_t [3:0]         wake_slot,
  // from the GCQ
  input  logic                bsync_ok,
  input  logic                cd_en,         // consumer of thread cd_tid killed
  input  tid_t                cd_tid,
  input  logic                un_en,         // a family created by un_tid is done with it
  input  tid_t                un_tid,
  // a dependent family created by the thread in hold_slot was accepted
  input  logic                hold_en,
  input  slot_t               hold_slot,
  input  logic                brk_en,
  input  logic                brk_keep_en,   // issuer lives on this processor
  input  slot_t               brk_keep,
  // context of every slot, and lookup of a thread by identity
  output slot_info_t          info [NSLOT],
  input  tid_t                lk_tid,
  output logic                lk_hit,
  output slot_t               lk_slot,
  output logic                busy
);

  typedef enum logic [2:0] {
    S_FREE, S_READY, S_RUN, S_SUSP, S_BSYNC, S_DEAD
  } st_e;

  st_e   st   [NSLOT];
  st_e   st_n [NSLOT];
  word_t pc   [NSLOT];
  slot_t rr_ptr;
  logic  cons_wait [NSLOT];          // consumer in the family not yet killed
  logic [3:0] hold [NSLOT];          // dependent child families not yet done
  logic  cons_wait_n [NSLOT];
  logic [3:0] hold_n [NSLOT];

  // round-robin choice of a ready thread, starting after the last one handed over
  always_comb begin
    thr_valid = 1'b0;
    thr_slot  = '0;
    for (int i = NSLOT; i >= 1; i--) begin
      automatic slot_t s = slot_t'(int'(rr_ptr) + i);
      if (st[s] == S_READY) begin
        thr_valid = 1'b1;
        thr_slot  = s;
      end
    end
    thr_valid = thr_valid && thr_req;
    thr_pc    = pc[thr_slot];
  end

  always_comb begin
    busy      = 1'b0;
    lk_hit    = 1'b0;
    lk_slot   = '0;
    for (int i = NSLOT - 1; i >= 0; i--) begin
      free_vec[i] = st[i] == S_FREE;
      if (st[i] != S_FREE) busy = 1'b1;
      if (st[i] != S_FREE && info[i].tid == lk_tid) begin
        lk_hit  = 1'b1;
        lk_slot = slot_t'(i);
      end
    end
  end

  always_comb begin
    for (int i = 0; i < NSLOT; i++) st_n[i] = st[i];
    if (alloc_en) st_n[alloc_slot] = S_READY;
    if (thr_valid) st_n[thr_slot] = S_RUN;
    if (susp_en) st_n[susp_slot] = S_SUSP;
    case (op)
      OP_SWCH:  if (st_n[op_slot] == S_RUN) st_n[op_slot] = S_READY;
      OP_KILL:  st_n[op_slot] = S_DEAD;
      OP_BSYNC: if (st_n[op_slot] == S_RUN) st_n[op_slot] = S_BSYNC;
      default: ;
    endcase
    for (int w = 0; w < 4; w++) begin
      if (wake_en[w] && st_n[wake_slot[w]] == S_SUSP) st_n[wake_slot[w]] = S_READY;
    end
    for (int i = 0; i < NSLOT; i++) begin
      cons_wait_n[i] = cons_wait[i];
      hold_n[i]      = hold[i];
      if (st[i] != S_FREE && cd_en && info[i].tid == cd_tid) cons_wait_n[i] = 1'b0;
      if (st[i] != S_FREE && un_en && info[i].tid == un_tid && hold[i] != '0)
        hold_n[i] = hold_n[i] - 1'b1;
      if (hold_en && hold_slot == slot_t'(i)) hold_n[i] = hold_n[i] + 1'b1;
      if (alloc_en && alloc_slot == slot_t'(i)) begin
        cons_wait_n[i] = alloc_info.has_cons;
        hold_n[i]      = '0;
      end
      if (bsync_ok && st[i] == S_BSYNC) st_n[i] = S_READY;
      if (st_n[i] == S_DEAD && !cons_wait_n[i] && hold_n[i] == '0) st_n[i] = S_FREE;
      if (brk_en && !(brk_keep_en && slot_t'(i) == brk_keep)) st_n[i] = S_FREE;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NSLOT; i++) begin
        st[i]        <= S_FREE;
        cons_wait[i] <= 1'b0;
        hold[i]      <= '0;
      end
      rr_ptr <= slot_t'(NSLOT - 1);
    end else begin
      for (int i = 0; i < NSLOT; i++) begin
        st[i]        <= st_n[i];
        cons_wait[i] <= cons_wait_n[i];
        hold[i]      <= hold_n[i];
      end
      if (thr_valid) rr_ptr <= thr_slot;
    end
  end

  always_ff @(posedge clk) begin
    if (alloc_en) begin
      info[alloc_slot] <= alloc_info;
      pc[alloc_slot]   <= alloc_pc;
    end
    if (op == OP_SWCH || op == OP_BSYNC) pc[op_slot] <= op_pc;
    if (susp_en) pc[susp_slot] <= susp_pc;
  end

endmodule
