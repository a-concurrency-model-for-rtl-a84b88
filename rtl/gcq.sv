// gcq: global continuation queue, the one shared controller of the chip.
//
// Family creation. A Cre instruction on any processor, or the external boot
// request, offers the family's 8-word control block. The create bus takes one
// such request per cycle (round-robin over the processors, boot last in the
// ring) and stores the family in a free entry of an NFAM-entry table.
//
// Thread distribution. Every cycle the queue picks one family that still has
// threads to create (round-robin) and issues up to NPROC consecutive threads of
// it, at most one per processor: thread ordinal j goes to processor j mod NPROC
// and carries index start + j*step, starting at the family's code address (or
// at the optional last-thread address for the last thread when that is
// non-zero). Issue stops at the first thread whose processor cannot take it,
// and the family is complete when the next index would pass the limit
// (inclusive). Because the placement is fixed, a thread's producer for the
// $D window, ordinal j - distance, is known to live on processor
// (j - distance) mod NPROC; threads with j < distance read from the creating
// thread instead. A distance of zero gives independent threads.
//
// Accounting. The table counts live threads per family from the issues and the
// kill reports of every processor. A kill report names the thread, so the
// queue can tell the producer's processor that its consumer is gone (cd_en on
// lane (j - distance) mod NPROC; kills on different processors name producers
// on different processors, so one lane per processor is enough). Each thread
// is told at creation whether a later thread of its family will read it
// (has_cons: index + distance*step within the limit). A family with a non-zero
// distance created by a thread depends on that creator until all of its first
// `distance` threads are created and killed; then un_en names the creator once
// so that its processor can free it. A family's table entry is released
// (rel_en) once all its threads are created and killed, it is done with its
// creator, and no family created by one of its threads still depends on that
// thread (that dependant names its creator by family number). bsync_ok tells waiting Bsync threads that nothing is being created and
// exactly one thread is live. A Brk (lowest processor wins) stops all creation,
// drops every other family and leaves the issuer's family with one live thread.
//
// Timing: grants and create-bus lanes are combinational; table updates at the
// rising edge. Placement, inclusive limit, table size and release rule are
// this design's choices; one creation per cycle over the create bus, the
// control block fields and the dependency rule follow the model.
module gcq
  import mt_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // family creation requests: [NPROC] is the external boot request
  input  logic [NPROC:0]       cre_req,
  input  tcb_t [NPROC:0]       cre_tcb,
  input  tid_t [NPROC:0]       cre_creator,   // ignored for boot
  output logic [NPROC:0]       cre_gnt,
  // create bus, one lane per processor
  output logic [NPROC-1:0]     cr_valid,
  output create_t [NPROC-1:0]  cr,
  input  logic [NPROC-1:0]     cr_ready,
  // kill reports
  input  logic [NPROC-1:0]     kill_v,
  input  tid_t [NPROC-1:0]     kill_tid,
  // consumer killed: lane p names a producer on processor p
  output logic [NPROC-1:0]     cd_en,
  output tid_t [NPROC-1:0]     cd_tid,
  // a family is done with the thread that created it
  output logic                 un_en,
  output tid_t                 un_tid,
  // break
  input  logic [NPROC-1:0]     brk_v,
  input  tid_t [NPROC-1:0]     brk_tid,
  output logic                 brk_en,
  output pid_t                 brk_pid,
  // release and barrier
  output logic                 rel_en,
  output fam_t                 rel_fam,
  output logic                 bsync_ok,
  output logic [ORD_W:0]       live_total
);

  typedef struct packed {
    logic       valid;
    logic       creating;
    word_t      next_index;
    ord_t       next_ord;
    word_t      limit;
    word_t      step;
    word_t      dep_dist;
    logic [DATA_W:0] span;       // distance * step, saturated
    win_t       nlocal;
    win_t       nshared;
    word_t      code;
    word_t      last_code;
    logic [ORD_W:0] live;
    logic       has_creator;
    pid_t       creator_pid;
    tid_t       creator_tid;
    logic       creator_dep;     // still depends on its creator
    logic [ORD_W:0] crd_live;    // live threads that read the creator
  } fam_e;

  fam_e ft [NFAM];

  // distance * step, saturated to DATA_W+1 bits
  function automatic logic [DATA_W:0] span_of(word_t d, word_t st);
    logic [2*DATA_W-1:0] m;
    m = {{DATA_W{1'b0}}, d} * {{DATA_W{1'b0}}, st};
    return (m[2*DATA_W-1:DATA_W] != '0) ? '1 : {1'b0, m[DATA_W-1:0]};
  endfunction

  // ---------------------------------------------------------------- break
  always_comb begin
    brk_en  = 1'b0;
    brk_pid = '0;
    for (int p = NPROC - 1; p >= 0; p--) begin
      if (brk_v[p]) begin
        brk_en  = 1'b1;
        brk_pid = pid_t'(p);
      end
    end
  end

  // ---------------------------------------------------------------- creation
  logic          free_any;
  fam_t          free_f;
  logic [NPROC:0] cg;
  logic [$clog2(NPROC+1)-1:0] cg_idx;

  always_comb begin
    free_any = 1'b0;
    free_f   = '0;
    for (int f = NFAM - 1; f >= 0; f--) begin
      if (!ft[f].valid) begin
        free_any = 1'b1;
        free_f   = fam_t'(f);
      end
    end
  end

  rr_arb #(.N(NPROC + 1)) u_cre_arb (
    .clk, .rst_n, .req(cre_req & {(NPROC+1){free_any && !brk_en}}), .adv(1'b1),
    .gnt(cg), .gnt_idx(cg_idx)
  );
  assign cre_gnt = cg;

  // ---------------------------------------------------------------- distribution
  logic [NFAM-1:0] dreq;
  logic [NFAM-1:0] dg;
  fam_t            df;
  always_comb begin
    for (int f = 0; f < NFAM; f++) dreq[f] = ft[f].valid && ft[f].creating && !brk_en;
  end

  rr_arb #(.N(NFAM)) u_dist_arb (
    .clk, .rst_n, .req(dreq), .adv(1'b1), .gnt(dg), .gnt_idx(df)
  );

  logic [ORD_W:0]    n_iss;
  logic [ORD_W:0]    n_crd;      // of them, threads that read the creator
  logic              fin;        // the family's last thread was issued
  word_t             idx_k;
  ord_t              ord_k;
  pid_t              pid_k;
  logic [DATA_W:0]   nxt_k;

  always_comb begin
    logic go;
    go       = |dg;
    n_iss    = '0;
    n_crd    = '0;
    fin      = 1'b0;
    cr_valid = '0;
    cr       = '0;
    for (int k = 0; k < NPROC; k++) begin
      idx_k = ft[df].next_index + word_t'(k) * ft[df].step;
      ord_k = ft[df].next_ord + ord_t'(k);
      pid_k = pid_t'(ord_k);
      nxt_k = {1'b0, idx_k} + {1'b0, ft[df].step};
      if (go && !fin && idx_k <= ft[df].limit && cr_ready[pid_k]) begin
        n_iss              = n_iss + 1'b1;
        fin                = nxt_k > {1'b0, ft[df].limit} || ft[df].step == '0;
        cr_valid[pid_k]    = 1'b1;
        cr[pid_k].tid      = '{fam: df, ord: ord_k};
        cr[pid_k].index    = idx_k;
        cr[pid_k].pc       = (fin && ft[df].last_code != '0) ? ft[df].last_code : ft[df].code;
        cr[pid_k].nlocal   = ft[df].nlocal;
        cr[pid_k].nshared  = ft[df].nshared;
        cr[pid_k].has_cons = ft[df].dep_dist != '0 && {1'b0, idx_k} + ft[df].span <= {1'b0, ft[df].limit};
        if (ft[df].dep_dist == '0) begin
          cr[pid_k].has_d  = 1'b0;
        end else if (word_t'(ord_k) >= ft[df].dep_dist) begin
          cr[pid_k].has_d  = 1'b1;
          cr[pid_k].d_pid  = pid_t'(ord_k - ord_t'(ft[df].dep_dist));
          cr[pid_k].d_tid  = '{fam: df, ord: ord_k - ord_t'(ft[df].dep_dist)};
        end else begin
          cr[pid_k].has_d  = ft[df].has_creator;
          cr[pid_k].d_pid  = ft[df].creator_pid;
          cr[pid_k].d_tid  = ft[df].creator_tid;
          if (ft[df].has_creator) n_crd = n_crd + 1'b1;
        end
      end else begin
        go = 1'b0;   // in-order issue: stop at the first thread not taken
      end
    end
  end

  // ---------------------------------------------------------------- consumers done
  always_comb begin
    cd_en  = '0;
    cd_tid = '0;
    for (int p = 0; p < NPROC; p++) begin
      automatic ord_t  j  = kill_tid[p].ord;
      automatic word_t dd = ft[kill_tid[p].fam].dep_dist;
      if (kill_v[p] && dd != '0 && {1'b0, word_t'(j)} >= {1'b0, dd}) begin
        cd_en[pid_t'(j - ord_t'(dd))]  = !brk_en;
        cd_tid[pid_t'(j - ord_t'(dd))] = '{fam: kill_tid[p].fam, ord: j - ord_t'(dd)};
      end
    end
  end

  // ---------------------------------------------------------------- release
  logic [NFAM-1:0] has_child;
  fam_t            un_f;
  always_comb begin
    has_child = '0;
    for (int g = 0; g < NFAM; g++) begin
      if (ft[g].valid && ft[g].creator_dep) begin
        has_child[ft[g].creator_tid.fam] = 1'b1;
      end
    end
    un_en  = 1'b0;
    un_tid = '0;
    un_f   = '0;
    for (int f = NFAM - 1; f >= 0; f--) begin
      if (ft[f].valid && ft[f].creator_dep && ft[f].crd_live == '0 && !brk_en &&
          (!ft[f].creating || {1'b0, word_t'(ft[f].next_ord)} >= {1'b0, ft[f].dep_dist})) begin
        un_en  = 1'b1;
        un_tid = ft[f].creator_tid;
        un_f   = fam_t'(f);
      end
    end
    rel_en  = 1'b0;
    rel_fam = '0;
    for (int f = NFAM - 1; f >= 0; f--) begin
      if (ft[f].valid && !ft[f].creating && ft[f].live == '0 && !has_child[f] &&
          !ft[f].creator_dep && !brk_en) begin
        rel_en  = 1'b1;
        rel_fam = fam_t'(f);
      end
    end
  end

  // ---------------------------------------------------------------- barrier
  always_comb begin
    logic creating;
    live_total = '0;
    creating   = |cre_req;
    for (int f = 0; f < NFAM; f++) begin
      if (ft[f].valid) begin
        live_total = live_total + ft[f].live;
        creating   = creating || ft[f].creating;
      end
    end
    bsync_ok = !creating && live_total == 1;
  end

  // ---------------------------------------------------------------- table update
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int f = 0; f < NFAM; f++) begin
        ft[f].valid    <= 1'b0;
        ft[f].creating <= 1'b0;
        ft[f].live     <= '0;
      end
    end else if (brk_en) begin
      for (int f = 0; f < NFAM; f++) begin
        ft[f].creating <= 1'b0;
        if (fam_t'(f) == brk_tid[brk_pid].fam) begin
          ft[f].live        <= 1;
          ft[f].creator_dep <= 1'b0;
        end else begin
          ft[f].valid <= 1'b0;
        end
      end
    end else begin
      for (int f = 0; f < NFAM; f++) begin
        automatic logic [ORD_W:0] l = ft[f].live;
        automatic logic [ORD_W:0] c = ft[f].crd_live;
        if (|dreq && df == fam_t'(f)) begin
          l = l + n_iss;
          c = c + n_crd;
          ft[f].next_ord   <= ft[f].next_ord + ord_t'(n_iss);
          ft[f].next_index <= ft[f].next_index + word_t'(n_iss) * ft[f].step;
          if (fin) ft[f].creating <= 1'b0;
        end
        for (int p = 0; p < NPROC; p++) begin
          if (kill_v[p] && kill_tid[p].fam == fam_t'(f)) begin
            l = l - 1'b1;
            if (ft[f].creator_dep && {1'b0, word_t'(kill_tid[p].ord)} < {1'b0, ft[f].dep_dist})
              c = c - 1'b1;
          end
        end
        ft[f].live     <= l;
        ft[f].crd_live <= c;
        if (un_en && un_f == fam_t'(f)) ft[f].creator_dep <= 1'b0;
        if (rel_en && rel_fam == fam_t'(f)) ft[f].valid <= 1'b0;
      end
      if (|cg) begin
        automatic tcb_t t = cre_tcb[cg_idx];
        ft[free_f].valid       <= 1'b1;
        ft[free_f].creating    <= t.start <= t.limit;
        ft[free_f].next_index  <= t.start;
        ft[free_f].next_ord    <= '0;
        ft[free_f].limit       <= t.limit;
        ft[free_f].step        <= t.step;
        ft[free_f].dep_dist    <= t.dep_dist;
        ft[free_f].span        <= span_of(t.dep_dist, t.step);
        ft[free_f].creator_dep <= int'(cg_idx) < NPROC && t.dep_dist != '0;
        ft[free_f].crd_live    <= '0;
        ft[free_f].nlocal      <= win_t'(t.nlocal);
        ft[free_f].nshared     <= win_t'(t.nshared);
        ft[free_f].code        <= t.code;
        ft[free_f].last_code   <= t.last_code;
        ft[free_f].live        <= '0;
        ft[free_f].has_creator <= int'(cg_idx) < NPROC;
        ft[free_f].creator_pid <= pid_t'(cg_idx);
        ft[free_f].creator_tid <= cre_creator[cg_idx];
      end
    end
  end

  // checks run from the first cycle after reset (a flag keeps rst_n purely
  // asynchronous)
  logic chk_on;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) chk_on <= 1'b0;
    else        chk_on <= 1'b1;
  end

  // the live count of a family never goes below zero
  a_live: assert property (@(posedge clk) disable iff (!chk_on)
    !(kill_v[0] && ft[kill_tid[0].fam].live == '0 && !brk_en));

endmodule
