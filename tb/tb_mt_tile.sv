// tb_mt_tile: self-checking testbench for one processor tile.
//
// The testbench plays the GCQ, both switches (looped back to this tile) and
// the global write bus, and drives the pipeline side directly. Thread A
// (producer) and thread B (its consumer, $D0 mapped onto A's $S0) are created
// on the create bus. Checked: $L0 holds the index; B's $D0 read suspends B
// and sends one request; the request finds A's $S0 empty and is parked; A's
// write answers it, the answer fills B's $D0 and wakes B, which then reads
// the value; a load issue empties a register and the memory write wakes the
// waiting thread; a $G write is written locally and offered to the bus, a
// broadcast from another tile is written and one from itself is skipped;
// kill is reported with the thread's identity, a thread without a consumer
// frees its slot at once and one with a consumer only when told that the
// consumer is gone; Cre is held until granted.
module tb_mt_tile;
  import mt_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  pipe_in_t  pin;
  pipe_out_t pout;
  logic      cr_valid, cr_ready, cre_req, cre_gnt, kill_v, brk_v, brk_en, cd_en, un_en, bsync_ok;
  create_t   cr;
  tcb_t      cre_tcb;
  tid_t      cre_creator, brk_tid, kill_tid, cd_tid, un_tid;
  pid_t      brk_pid, bc_src, rq_dst, dt_dst;
  logic      gw_req, gw_gnt, bc_valid;
  gwr_t      gw_wr, bc_wr;
  logic      rq_valid, rq_ready, rqi_valid, rqi_ready;
  rreq_t     rq, rqi;
  pid_t      rqi_src;
  logic      dt_valid, dt_ready, dti_valid, dti_ready;
  rdat_t     dt, dti;
  logic      err;

  mt_tile #(.PID(0)) dut (.*);

  // switches looped back with one register stage
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rqi_valid <= 1'b0;
      dti_valid <= 1'b0;
    end else begin
      if (rq_valid && rq_ready) begin rqi_valid <= 1'b1; rqi <= rq; end
      else if (rqi_ready)       rqi_valid <= 1'b0;
      dti_valid <= dt_valid;
      dti       <= dt;
    end
  end
  assign rq_ready = !rqi_valid || rqi_ready;
  assign rqi_src  = '0;   // looped back: requests come from this tile
  assign dt_ready = 1'b1;

  function automatic int low_free(logic [NSLOT-1:0] v);
    for (int i = 0; i < NSLOT; i++) if (v[i]) return i;
    return -1;
  endfunction

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  int n_req, n_rep;
  always @(posedge clk) begin
    if (rst_n) begin
      n_req += int'(rq_valid && rq_ready);
      n_rep += int'(dt_valid);
      if (err) begin failures++; $display("FAIL err flag at %0t", $time); end
    end
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
    pin = '0; pin.op = OP_NONE;
    cr_valid = 0; cr = '0; cre_gnt = 0; brk_en = 0; brk_pid = '0;
    cd_en = 0; cd_tid = '0; un_en = 0; un_tid = '0;
    bsync_ok = 0; gw_gnt = 0; bc_valid = 0; bc_src = '0; bc_wr = '0;
  endtask

  localparam rspec_t L0 = '{cls: RC_L, idx: 0};
  localparam rspec_t L1 = '{cls: RC_L, idx: 1};
  localparam rspec_t S0 = '{cls: RC_S, idx: 0};
  localparam rspec_t D0 = '{cls: RC_D, idx: 0};
  localparam rspec_t G2 = '{cls: RC_G, idx: 2};

  task automatic create(input int ord, input int index, input logic has_d);
    cr_valid = 1;
    cr = '0;
    cr.tid = '{fam: 1, ord: ord_t'(ord)};
    cr.index = word_t'(index);
    cr.pc = word_t'(100 + ord);
    cr.nlocal = 2; cr.nshared = 1;
    cr.has_d = has_d; cr.d_pid = 0; cr.d_tid = '{fam: 1, ord: 0};
    cr.has_cons = ord == 0;
    #1 check(cr_ready, "slot free");
    @(negedge clk); idle();
  endtask

  // read two specifiers as thread s; returns ok
  task automatic rd(input int s, input rspec_t a, input rspec_t b, input int pc,
                    output logic ok, output word_t va, output word_t vb);
    pin.slot = slot_t'(s); pin.rd_en = 2'b11; pin.rd_spec[0] = a; pin.rd_spec[1] = b;
    pin.pc = word_t'(pc);
    #1 ok = pout.rd_ok; va = pout.rd_data[0]; vb = pout.rd_data[1];
    @(negedge clk); idle();
  endtask

  task automatic take(output int s, output int pc);
    pin.thr_req = 1;
    #1 s = pout.thr_valid ? int'(pout.thr_slot) : -1;
    pc = int'(pout.thr_pc);
    @(negedge clk); idle();
  endtask

  initial begin
    logic ok;
    word_t va, vb;
    int s, pc, t;
    n_req = 0; n_rep = 0;
    idle();
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    create(0, 7, 1'b0);   // A in slot 0
    create(1, 8, 1'b1);   // B in slot 1
    take(s, pc); check(s == 0 && pc == 100, "A handed over");
    rd(0, L0, L0, 100, ok, va, vb);
    check(ok && va == 7, "A's $L0 holds its index");
    pin.slot = 0; pin.op = OP_SWCH; pin.pc = 101;
    @(negedge clk); idle();
    take(s, pc); check(s == 1 && pc == 101, "B handed over");
    // B reads $D0: empty, suspended, one request sent
    rd(1, L0, D0, 105, ok, va, vb);
    check(!ok, "B's $D0 read fails");
    repeat (4) @(negedge clk);
    check(n_req == 1, "one remote request");
    check(n_rep == 0, "A's $S0 empty: request parked, no answer");
    take(s, pc); check(s == 0 && pc == 101, "B suspended, A runs");
    // A writes $S0: the parked request is answered and B woken
    pin.slot = 0; pin.wr_en = 1; pin.wr_spec = S0; pin.wr_data = 55;
    @(negedge clk); idle();
    t = 0;
    while (n_rep == 0 && t < 10) begin @(negedge clk); t++; end
    check(n_rep == 1, "answer sent on write");
    repeat (2) @(negedge clk);
    pin.slot = 0; pin.op = OP_SWCH; pin.pc = 102;
    @(negedge clk); idle();
    take(s, pc); check(s == 1 && pc == 105, "B woken, resumes at the failed read");
    rd(1, L0, D0, 105, ok, va, vb);
    check(ok && va == 8 && vb == 55, "B reads 55 from $D0");
    // a second read of $D0 is local: no new request
    rd(1, D0, D0, 106, ok, va, vb);
    repeat (3) @(negedge clk);
    check(ok && n_req == 1, "later $D0 reads are local");

    // decoupled load into B's $L1
    pin.slot = 1; pin.wr_en = 1; pin.wr_empty = 1; pin.wr_spec = L1;
    @(negedge clk); idle();
    rd(1, L1, L0, 107, ok, va, vb);
    check(!ok, "read of loading register suspends");
    take(s, pc); check(s == 0, "A runs meanwhile");
    pin.mem_en = 1; pin.mem_slot = 1; pin.mem_spec = L1; pin.mem_data = 99;
    @(negedge clk); idle();
    pin.slot = 0; pin.op = OP_SWCH; pin.pc = 103;
    @(negedge clk); idle();
    take(s, pc); check(s == 1 && pc == 107, "load completion wakes B");
    rd(1, L1, L0, 107, ok, va, vb);
    check(ok && va == 99, "loaded value");

    // $G write: local at once, offered to the bus until granted
    pin.slot = 1; pin.wr_en = 1; pin.wr_spec = G2; pin.wr_data = 1234;
    @(negedge clk); idle();
    #1 check(gw_req && gw_wr.gidx == 2 && gw_wr.data == 1234 && !pout.gw_ready, "global write offered");
    rd(1, G2, G2, 108, ok, va, vb);
    check(ok && va == 1234, "global write local at once");
    gw_gnt = 1;
    @(negedge clk); idle();
    #1 check(!gw_req && pout.gw_ready, "granted");
    // broadcast from tile 2 is written, own broadcast skipped
    bc_valid = 1; bc_src = 2; bc_wr = '{gidx: 3, data: 77};
    @(negedge clk); idle();
    bc_valid = 1; bc_src = 0; bc_wr = '{gidx: 2, data: 5};
    @(negedge clk); idle();
    rd(1, '{cls: RC_G, idx: 3}, G2, 109, ok, va, vb);
    check(ok && va == 77 && vb == 1234, "remote broadcast written, own skipped");

    // cre held until granted, with creator identity
    pin.slot = 1; pin.op = OP_CRE; pin.tcb = '0; pin.tcb.limit = 9;
    @(negedge clk); idle();
    #1 check(cre_req && cre_tcb.limit == 9 && cre_creator == '{fam: 1, ord: 1} && !pout.cre_ready,
             "create request held");
    @(negedge clk);
    cre_gnt = 1;
    @(negedge clk); idle();
    #1 check(!cre_req, "create granted");

    // kill reported with the thread; B has no consumer and is freed at once
    pin.slot = 1; pin.op = OP_KILL;
    #1 check(kill_v && kill_tid == '{fam: 1, ord: 1}, "kill reported");
    @(negedge clk); idle();
    #1 check(low_free(dut.free_vec) == 1, "thread without consumer freed");
    // A is kept after its kill until its consumer is reported gone
    take(s, pc);
    pin.slot = 0; pin.op = OP_KILL;
    @(negedge clk); idle();
    #1 check(low_free(dut.free_vec) == 1, "producer kept after kill");
    cd_en = 1; cd_tid = '{fam: 1, ord: 0};
    @(negedge clk); idle();
    #1 check(low_free(dut.free_vec) == 0, "producer freed when its consumer is gone");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
