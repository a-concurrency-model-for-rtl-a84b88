// tb_gcq: self-checking testbench for the global continuation queue.
//
// Boots one thread, then lets processor 0 create a 10-thread family with
// dependency distance 1 and checks every thread on the create bus: processor
// j mod NPROC, index, pc (last-thread address for the last), producer
// identity, and the rate of NPROC threads per cycle. Then checks
// back-pressure, live counting from kill reports, the consumer-killed lanes
// (thread j's kill names thread j-1 on its processor), the has_cons flag, the
// creator being let go once the family's first thread is killed, release
// order, one creation per cycle when two processors ask together, and Brk.
module tb_gcq;
  import mt_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NPROC:0]       cre_req, cre_gnt;
  tcb_t [NPROC:0]       cre_tcb;
  tid_t [NPROC:0]       cre_creator;
  logic [NPROC-1:0]     cr_valid, cr_ready, kill_v, brk_v;
  create_t [NPROC-1:0]  cr;
  tid_t [NPROC-1:0]     kill_tid, cd_tid;
  logic [NPROC-1:0]     cd_en;
  logic                 un_en;
  tid_t                 un_tid;
  tid_t [NPROC-1:0]     brk_tid;
  logic                 brk_en, rel_en, bsync_ok;
  pid_t                 brk_pid;
  fam_t                 rel_fam;
  logic [ORD_W:0]       live_total;

  gcq dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
    cre_req = '0; cre_tcb = '0; cre_creator = '0; kill_v = '0; kill_tid = '0;
    brk_v = '0; brk_tid = '0;
  endtask

  function automatic tcb_t mk(int start, int limit, int step, int dd, int code, int last);
    tcb_t t;
    t = '0;
    t.start = start; t.limit = limit; t.step = step; t.dep_dist = dd;
    t.nlocal = 2; t.nshared = 1; t.code = code; t.last_code = last;
    return t;
  endfunction

  // threads seen on the create bus
  create_t seen [$];
  int      seen_pid [$];
  always @(posedge clk) begin
    if (rst_n) for (int p = 0; p < NPROC; p++) begin
      if (cr_valid[p] && cr_ready[p]) begin
        seen.push_back(cr[p]);
        seen_pid.push_back(p);
      end
    end
  end

  initial begin
    fam_t boot_f, f1;
    int   c0;
    idle();
    cr_ready = '1;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // boot: one thread
    cre_req[NPROC] = 1; cre_tcb[NPROC] = mk(0, 0, 1, 0, 'h40, 0);
    #1 check(cre_gnt[NPROC], "boot granted");
    @(negedge clk); idle();
    @(negedge clk);
    check(seen.size() == 1 && seen_pid[0] == 0 && seen[0].pc == 'h40 && !seen[0].has_d,
          "boot thread on processor 0");
    boot_f = seen[0].tid.fam;
    check(live_total == 1, "one live thread");
    #1 check(bsync_ok, "bsync_ok with a single thread");
    seen.delete(); seen_pid.delete();

    // family of 10 threads, distance 1, created by the boot thread on processor 0
    cre_req[0] = 1; cre_tcb[0] = mk(1, 10, 1, 1, 'h100, 'h200);
    cre_creator[0] = seen.size() == 0 ? '{fam: boot_f, ord: 0} : '0;
    #1 check(cre_gnt[0] && !bsync_ok, "create granted; bsync waits");
    @(negedge clk); idle();
    c0 = 0;
    while (seen.size() < 10 && c0 < 20) begin @(negedge clk); c0++; end
    check(c0 == 3, $sformatf("10 threads in 3 cycles (took %0d)", c0));
    f1 = seen[0].tid.fam;
    for (int j = 0; j < seen.size(); j++) begin
      check(seen_pid[j] == j % NPROC, "thread j on processor j mod NPROC");
      check(seen[j].tid.ord == ord_t'(j) && seen[j].index == word_t'(1 + j), "ordinal and index");
      check(seen[j].pc == ((j == 9) ? 'h200 : 'h100), "code address, last thread's own");
      check(seen[j].has_d, "dependent");
      check(seen[j].has_cons == (j < 9), "has_cons except the last");
      if (j == 0) check(seen[j].d_pid == 0 && seen[j].d_tid == '{fam: boot_f, ord: 0},
                        "first thread reads the creator");
      else check(seen[j].d_pid == pid_t'(j - 1) && seen[j].d_tid == '{fam: f1, ord: ord_t'(j - 1)},
                 "producer is the previous thread");
    end
    check(live_total == 11, "live count after creation");

    // kills: family 1 released only when all its threads are dead;
    // the boot family is kept while family 1 depends on it
    for (int j = 0; j < 10; j++) begin
      kill_v[j % NPROC] = 1; kill_tid[j % NPROC] = '{fam: f1, ord: ord_t'(j)};
      if (j % NPROC == NPROC - 1 || j == 9) begin
        #1 check(!rel_en, "no release while threads live");
        for (int k = j - j % NPROC; k <= j; k++) begin
          if (k == 0) check(!cd_en[NPROC - 1], "first thread's producer is the creator");
          else check(cd_en[(k - 1) % NPROC] && cd_tid[(k - 1) % NPROC] == '{fam: f1, ord: ord_t'(k - 1)},
                     "consumer kill names its producer");
        end
        @(negedge clk); idle();
        #1 check(un_en == (j == 3) && (!un_en || un_tid == '{fam: boot_f, ord: 0}),
                 "creator let go after first thread");
      end
    end
    check(live_total == 1, "live count after kills");
    #1 check(rel_en && rel_fam == f1, "family released");
    check(bsync_ok, "bsync_ok after family done");
    @(negedge clk);
    #1 check(!rel_en, "boot family not released while its thread lives");
    seen.delete(); seen_pid.delete();
    @(negedge clk);

    // back-pressure: processor 2 full
    cr_ready = 4'b1011;
    cre_req[1] = 1; cre_tcb[1] = mk(0, 7, 2, 0, 'h300, 0); cre_creator[1] = '{fam: boot_f, ord: 0};
    cre_req[3] = 1; cre_tcb[3] = mk(0, 3, 1, 0, 'h400, 0); cre_creator[3] = '{fam: boot_f, ord: 0};
    #1 check($countones(cre_gnt) == 1, "one family creation per cycle");
    @(negedge clk);
    cre_req = cre_req & ~cre_gnt;
    #1 check($countones(cre_gnt) == 1, "second creation next cycle");
    @(negedge clk); idle();
    repeat (4) @(negedge clk);
    for (int j = 0; j < seen.size(); j++) check(seen_pid[j] != 2, "no thread to a full processor");
    check(seen.size() == 4, $sformatf("issue stops before the full processor (%0d)", seen.size()));
    cr_ready = '1;
    repeat (4) @(negedge clk);
    check(seen.size() == 8, $sformatf("all 8 threads (4 + 4) created (%0d)", seen.size()));
    check(live_total == 9, "live count");

    // brk from the boot thread: everything else gone, one thread left
    brk_v[0] = 1; brk_tid[0] = '{fam: boot_f, ord: 0};
    #1 check(brk_en && brk_pid == 0, "brk broadcast");
    @(negedge clk); idle();
    check(live_total == 1, "only the brk issuer lives");
    #1 check(bsync_ok, "bsync_ok after brk");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
