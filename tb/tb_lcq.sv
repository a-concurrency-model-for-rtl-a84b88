// tb_lcq: self-checking testbench for the local continuation queue.
//
// Allocates threads and checks: round-robin hand-over of ready threads with
// their resume pc; a switched thread comes back; a suspended thread is not
// handed over until woken; a wake in the cycle of the suspension is kept;
// Bsync waits for bsync_ok; a killed thread keeps its slot until its consumer
// is reported killed, and a creator until its dependent family lets it go,
// while a thread with no consumer is freed at once; lookup by thread identity;
// Brk frees all but the issuer.
module tb_lcq;
  import mt_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        alloc_en, free_any, thr_req, thr_valid, susp_en, bsync_ok, cd_en, un_en, hold_en;
  logic        brk_en, brk_keep_en, lk_hit, busy;
  slot_t       alloc_slot, free_slot, thr_slot, op_slot, susp_slot, brk_keep, lk_slot;
  slot_info_t  alloc_info;
  slot_info_t  info [NSLOT];
  word_t       alloc_pc, thr_pc, op_pc, susp_pc;
  ctl_op_e     op;
  logic [3:0]  wake_en;
  slot_t [3:0] wake_slot;
  slot_t       hold_slot;
  tid_t        lk_tid, cd_tid, un_tid;

  logic [NSLOT-1:0] free_vec;

  lcq dut (.*);

  // lowest free slot, as the RAU would pick it
  always_comb begin
    free_any  = 1'b0;
    free_slot = '0;
    for (int i = NSLOT - 1; i >= 0; i--) begin
      if (free_vec[i]) begin free_any = 1'b1; free_slot = slot_t'(i); end
    end
  end

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
    alloc_en = 0; thr_req = 0; susp_en = 0; bsync_ok = 0; brk_en = 0;
    cd_en = 0; cd_tid = '0; un_en = 0; un_tid = '0; hold_en = 0; hold_slot = '0;
    brk_keep_en = 0; op = OP_NONE; wake_en = '0;
    alloc_slot = '0; alloc_info = '0; alloc_pc = '0; op_slot = '0; op_pc = '0;
    susp_slot = '0; susp_pc = '0; wake_slot = '0; brk_keep = '0; lk_tid = '0;
  endtask

  // allocate a thread of family f, ordinal o, into the free slot; returns slot
  task automatic alloc(input int f, input int o, input int pc, output slot_t s,
                       input logic cons = 1'b1);
    alloc_en = 1;
    alloc_slot = free_slot;
    s = free_slot;
    alloc_info = '0;
    alloc_info.tid = '{fam: fam_t'(f), ord: ord_t'(o)};
    alloc_info.nlocal = 2;
    alloc_info.has_cons = cons;
    alloc_pc = word_t'(pc);
    @(negedge clk); idle();
  endtask

  // ask for a thread; returns slot (or -1)
  task automatic take(output int s, output int pc);
    thr_req = 1;
    #1;
    s = thr_valid ? int'(thr_slot) : -1;
    pc = int'(thr_pc);
    @(negedge clk); idle();
  endtask

  task automatic swch(input int s, input int pc);
    op = OP_SWCH; op_slot = slot_t'(s); op_pc = word_t'(pc);
    @(negedge clk); idle();
  endtask

  initial begin
    slot_t s0, s1, s2;
    int t, pc;
    idle();
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    #1 check(free_any && free_slot == 0 && !busy, "all free after reset");
    thr_req = 1;
    #1 check(!thr_valid, "nothing to hand over");
    @(negedge clk); idle();

    alloc(1, 0, 100, s0);
    alloc(1, 1, 101, s1);
    alloc(1, 2, 102, s2);
    check(s0 == 0 && s1 == 1 && s2 == 2 && busy, "slots allocated in order");

    // round robin
    take(t, pc); check(t == 0 && pc == 100, "first hand-over slot 0");
    swch(0, 200);
    take(t, pc); check(t == 1 && pc == 101, "then slot 1");
    swch(1, 201);
    take(t, pc); check(t == 2 && pc == 102, "then slot 2");
    swch(2, 202);
    take(t, pc); check(t == 0 && pc == 200, "slot 0 again with switch pc");

    // suspend slot 0 (running), then only 1 and 2 are handed over
    susp_en = 1; susp_slot = 0; susp_pc = 300;
    @(negedge clk); idle();
    take(t, pc); check(t == 1, "after suspension slot 1");
    swch(1, 201);
    take(t, pc); check(t == 2, "then slot 2");
    swch(2, 202);
    take(t, pc); check(t == 1, "suspended slot 0 skipped");
    swch(1, 201);
    wake_en = 4'b0100; wake_slot[2] = 0;
    @(negedge clk); idle();
    take(t, pc); check(t == 2, "round robin continues");
    swch(2, 202);
    take(t, pc); check(t == 0 && pc == 300, "woken thread resumes at failed instruction");

    // suspension and wake in the same cycle
    susp_en = 1; susp_slot = 0; susp_pc = 301; wake_en = 4'b0001; wake_slot[0] = 0;
    @(negedge clk); idle();
    take(t, pc); swch(t, 200 + t);
    take(t, pc); swch(t, 200 + t);
    take(t, pc);
    check(t == 0 && pc == 301, "same-cycle wake not lost");

    // bsync: slot 0 waits
    op = OP_BSYNC; op_slot = 0; op_pc = 400;
    @(negedge clk); idle();
    take(t, pc); check(t == 1 || t == 2, "bsync thread not ready");
    op = OP_KILL; op_slot = slot_t'(t);
    @(negedge clk); idle();
    take(t, pc); check(t == 1 || t == 2, "other thread");
    op = OP_KILL; op_slot = slot_t'(t);
    @(negedge clk); idle();
    take(t, pc); check(t == -1, "no ready thread while bsync waits");
    #1 check(free_slot == 3, "killed threads keep their slots");
    bsync_ok = 1;
    @(negedge clk); idle();
    take(t, pc); check(t == 0 && pc == 400, "bsync released");

    // lookup by identity
    lk_tid = '{fam: 1, ord: 2};
    #1 check(lk_hit && lk_slot == 2, "lookup of killed producer still works");
    @(negedge clk); idle();
    // consumers of (1,1) and (1,2) killed: dead slots 1 and 2 free, slot 0 stays
    cd_en = 1; cd_tid = '{fam: 1, ord: 2};
    @(negedge clk); idle();
    #1 check(free_slot == 2, "slot freed when its consumer is done");
    cd_en = 1; cd_tid = '{fam: 1, ord: 1};
    @(negedge clk); idle();
    #1 check(free_slot == 1, "second slot freed");
    lk_tid = '{fam: 1, ord: 2};
    #1 check(!lk_hit, "freed thread gone");
    @(negedge clk); idle();

    // consumer done before the kill: freed on the kill; no consumer: freed on kill
    alloc(3, 0, 600, s1);
    alloc(3, 1, 601, s2, 1'b0);
    check(s1 == 1 && s2 == 2, "slots 1 and 2 reused");
    cd_en = 1; cd_tid = '{fam: 3, ord: 0};
    @(negedge clk); idle();
    #1 check(free_slot == 3, "live thread not freed by its consumer's end");
    op = OP_KILL; op_slot = 2;
    @(negedge clk); idle();
    #1 check(free_slot == 2, "thread without consumer freed at kill");
    // slot 1 also creates a dependent family: held until let go
    hold_en = 1; hold_slot = 1;
    @(negedge clk); idle();
    op = OP_KILL; op_slot = 1;
    @(negedge clk); idle();
    #1 check(free_slot == 2, "creator held by its dependent family");
    un_en = 1; un_tid = '{fam: 3, ord: 0};
    @(negedge clk); idle();
    #1 check(free_slot == 1, "creator freed when let go");

    // brk from slot 4 frees everything else
    alloc(2, 0, 500, s1);
    alloc(2, 1, 501, s1);
    alloc(2, 2, 502, s1);
    alloc(2, 3, 503, s1);
    check(s1 == 4, "slot 4 allocated");
    brk_en = 1; brk_keep_en = 1; brk_keep = 4;
    @(negedge clk); idle();
    take(t, pc); check(t == 4 && pc == 503, "only brk issuer left");
    #1 check(free_slot == 0, "others freed by brk");
    take(t, pc); check(t == -1, "nothing else to run");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
