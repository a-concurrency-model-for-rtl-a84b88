// tb_mt_cmp: end-to-end testbench of the whole chip multiprocessor, at its
// default sizes.
//
// Each tile's pipeline is played by pipe_model running a fixed program. The
// boot thread starts the chain $S0 = 0 and creates a family of NTHR threads
// with dependency distance 1: ten per processor, more than a processor has
// slots, so it only completes if slots are freed thread by thread. Thread i loads
// mem[i] = 3i+1, adds the partial sum read from its $D0 (the $S0 of thread
// i-1, usually on another processor) and passes it on in its own $S0; the last
// thread writes the total to $G1. The boot thread waits in Bsync, reads $G1
// from its own register file and reports it. It then creates 16 independent
// threads that spin with context switches until thread 13 issues Brk, which
// must leave it alone; it reports its index and ends.
//
// Checked: both reported values, no error flag, no live thread at the end, and
// that every mechanism happened: thread creation, decoupled load suspending a
// thread and waking it, $D read sent to a remote tile, a request parked in an
// empty $S register and answered on write, an immediate answer, global write
// broadcast, context switch, Bsync completion, a consumer's kill freeing its
// producer, a creator let go by its family, family release, Brk, and a
// pipeline left without a ready thread.
module tb_mt_cmp;
  import mt_pkg::*;

  localparam int NTHR = 10 * NPROC;   // more threads than thread slots

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  pipe_in_t [NPROC-1:0]  pin;
  pipe_out_t [NPROC-1:0] pout;
  logic                  boot_v, boot_ready;
  tcb_t                  boot_tcb;
  logic [NPROC-1:0]      err;
  logic [ORD_W:0]        live_total;
  logic                  rel_en;
  fam_t                  rel_fam;

  mt_cmp dut (.*);

  logic [NPROC-1:0] out_v;
  word_t [NPROC-1:0] out_val;
  int n_exec [NPROC];
  int n_idle [NPROC];

  for (genvar p = 0; p < NPROC; p++) begin : g_pipe
    pipe_model #(.NTHR(NTHR), .LAT(3 + p)) u_pipe (
      .clk, .rst_n, .pout(pout[p]), .pin(pin[p]),
      .out_v(out_v[p]), .out_val(out_val[p]), .n_exec(n_exec[p]), .n_idle(n_idle[p])
    );
  end

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // mechanism counters
  int c_create, c_susp, c_wake, c_dreq, c_park, c_imm, c_defer, c_gbc, c_swch;
  int c_bsync, c_rel, c_brk, c_idle, c_err, c_cd, c_un;
  int outs [$];
  int out_pid [$];

  always @(posedge clk) begin
    if (rst_n) begin
      c_create += $countones(dut.u_gcq.cr_valid & dut.u_gcq.cr_ready);
      c_rel    += int'(rel_en);
      c_brk    += int'(dut.brk_en);
      c_gbc    += int'(dut.bc_valid);
      c_cd     += $countones(dut.cd_en);
      c_un     += int'(dut.un_en);
      for (int p = 0; p < NPROC; p++) begin
        if (out_v[p]) begin outs.push_back(int'(out_val[p])); out_pid.push_back(p); end
        if (pin[p].op == OP_SWCH) c_swch++;
        if (pin[p].thr_req && !pout[p].thr_valid && pout[p].busy) c_idle++;
        c_err += int'(err[p]);
      end
    end
  end

  for (genvar p = 0; p < NPROC; p++) begin : g_mon
    always @(posedge clk) begin
      if (rst_n) begin
        c_susp  += int'(dut.g_tile[p].u_tile.susp_en);
        c_wake  += $countones(dut.g_tile[p].u_tile.wake_en);
        c_dreq  += int'(dut.g_tile[p].u_tile.rq_push);
        c_park  += int'(dut.g_tile[p].u_tile.rr_en && !dut.g_tile[p].u_tile.rr_full);
        c_imm   += int'(dut.g_tile[p].u_tile.rp_push[0]);
        c_defer += int'(dut.g_tile[p].u_tile.rp_push[1]) + int'(dut.g_tile[p].u_tile.rp_push[2]);
        c_bsync += int'(dut.bsync_ok && dut.g_tile[p].u_tile.u_lcq.st[0] == 3'd4);
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expect_sum, t0, t;
    c_create = 0; c_susp = 0; c_wake = 0; c_dreq = 0; c_park = 0; c_imm = 0; c_defer = 0;
    c_gbc = 0; c_swch = 0; c_bsync = 0; c_rel = 0; c_brk = 0; c_idle = 0; c_err = 0;
    c_cd = 0; c_un = 0;
    expect_sum = 0;
    for (int i = 1; i <= NTHR; i++) expect_sum += 3 * i + 1;

    boot_v = 1'b0;
    boot_tcb = '0;
    boot_tcb.start = 0; boot_tcb.limit = 0; boot_tcb.step = 1;
    boot_tcb.nlocal = 2; boot_tcb.nshared = 1; boot_tcb.code = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    boot_v = 1'b1;
    t0 = 0;
    #1;
    while (!boot_ready) begin @(negedge clk); #1; t0++; end
    @(posedge clk);
    #1 boot_v = 1'b0;

    t = 0;
    while (outs.size() < 2 && t < 10000) begin @(negedge clk); t++; end
    repeat (20) @(negedge clk);

    check(outs.size() == 2, $sformatf("two values reported (%0d)", outs.size()));
    if (outs.size() == 2) begin
      check(outs[0] == expect_sum && out_pid[0] == 0,
            $sformatf("chained sum %0d (expected %0d) on processor 0", outs[0], expect_sum));
      check(outs[1] == 13 && out_pid[1] == 13 % NPROC, "brk issuer survives and reports");
    end
    check(live_total == 0, "no live thread left");
    check(c_err == 0, "no error flag");
    $display("cycles=%0d created=%0d suspensions=%0d wakes=%0d dreq=%0d parked=%0d immediate=%0d deferred=%0d gbc=%0d swch=%0d bsync=%0d release=%0d brk=%0d idle=%0d cons_done=%0d let_go=%0d",
             t, c_create, c_susp, c_wake, c_dreq, c_park, c_imm, c_defer, c_gbc, c_swch,
             c_bsync, c_rel, c_brk, c_idle, c_cd, c_un);
    check(c_create == 1 + NTHR + 16 || (c_create > 1 + NTHR && c_brk == 1), "threads created");
    check(c_susp > 0,  "mechanism: blocking read suspends a thread");
    check(c_wake > 0,  "mechanism: write wakes a suspended thread");
    check(c_dreq > 0,  "mechanism: remote $D request");
    check(c_park > 0,  "mechanism: request parked in an empty $S register");
    check(c_defer > 0, "mechanism: parked request answered on write");
    check(c_imm > 0,   "mechanism: request answered at once");
    check(c_gbc > 0,   "mechanism: global write broadcast");
    check(c_swch > 0,  "mechanism: context switch");
    check(c_bsync > 0, "mechanism: bsync completion");
    check(c_rel > 0,   "mechanism: family release");
    check(c_cd >= NTHR - 1, "mechanism: consumer kill frees its producer");
    check(c_un == 1,   "mechanism: creator let go by its family");
    check(c_brk == 1,  "mechanism: brk");
    check(c_idle > 0,  "mechanism: pipeline without a ready thread");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
