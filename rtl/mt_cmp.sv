// mt_cmp: microthreaded chip multiprocessor with a distributed register file.
//
// NPROC processor tiles (mt_tile), each with its own local register file,
// continuation queue and register allocation unit, are joined by four shared
// structures, as in the model's chip organisation:
//  * the GCQ and its create bus: one family creation per cycle, threads
//    handed to the tiles one per tile per cycle;
//  * the global write bus: keeps the replicated $G windows consistent;
//  * the n x n read-request switch: a $D read that finds its register empty
//    asks the producer's tile for the matching $S register;
//  * the n x n data switch: carries the answers back into the $D registers.
// The in-order issue pipelines, instruction caches and data caches are not
// part of this design: each tile's pipeline side is brought out as pin[p] /
// pout[p] (see mt_pkg::pipe_in_t), including the decoupled load-completion
// write. The first thread is started by boot_v with a control block; boot_ready
// is its grant. err[p] collects tile p's should-never-happen conditions;
// live_total is the number of live threads in the machine; rel_en/rel_fam
// pulse when a family has finished and its GCQ entry is freed.
//
// All tiles and shared structures share one clock and an active-low
// asynchronous reset. Sizes are the constants of mt_pkg.
module mt_cmp
  import mt_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  pipe_in_t [NPROC-1:0] pin,
  output pipe_out_t [NPROC-1:0] pout,
  input  logic                 boot_v,
  input  tcb_t                 boot_tcb,
  output logic                 boot_ready,
  output logic [NPROC-1:0]     err,
  output logic [ORD_W:0]       live_total,
  output logic                 rel_en,
  output fam_t                 rel_fam
);

  // GCQ side
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
  logic                 brk_en, bsync_ok;
  pid_t                 brk_pid;

  // global write bus
  logic [NPROC-1:0]     gw_req, gw_gnt;
  gwr_t [NPROC-1:0]     gw_wr;
  logic                 bc_valid;
  pid_t                 bc_src;
  gwr_t                 bc_wr;

  // switches
  logic [NPROC-1:0]     rq_valid, rq_ready, rqi_valid, rqi_ready;
  pid_t [NPROC-1:0]     rq_dst, rqi_src;
  rreq_t [NPROC-1:0]    rq, rqi;
  logic [NPROC-1:0]     dt_valid, dt_ready, dti_valid, dti_ready;
  pid_t [NPROC-1:0]     dt_dst;
  rdat_t [NPROC-1:0]    dt, dti;

  for (genvar p = 0; p < NPROC; p++) begin : g_tile
    mt_tile #(.PID(p)) u_tile (
      .clk, .rst_n,
      .pin(pin[p]), .pout(pout[p]),
      .cr_valid(cr_valid[p]), .cr(cr[p]), .cr_ready(cr_ready[p]),
      .cre_req(cre_req[p]), .cre_tcb(cre_tcb[p]), .cre_creator(cre_creator[p]),
      .cre_gnt(cre_gnt[p]),
      .kill_v(kill_v[p]), .kill_tid(kill_tid[p]),
      .brk_v(brk_v[p]), .brk_tid(brk_tid[p]), .brk_en, .brk_pid,
      .cd_en(cd_en[p]), .cd_tid(cd_tid[p]), .un_en, .un_tid, .bsync_ok,
      .gw_req(gw_req[p]), .gw_wr(gw_wr[p]), .gw_gnt(gw_gnt[p]),
      .bc_valid, .bc_src, .bc_wr,
      .rq_valid(rq_valid[p]), .rq_dst(rq_dst[p]), .rq(rq[p]), .rq_ready(rq_ready[p]),
      .rqi_valid(rqi_valid[p]), .rqi(rqi[p]), .rqi_src(rqi_src[p]), .rqi_ready(rqi_ready[p]),
      .dt_valid(dt_valid[p]), .dt_dst(dt_dst[p]), .dt(dt[p]), .dt_ready(dt_ready[p]),
      .dti_valid(dti_valid[p]), .dti(dti[p]), .dti_ready(dti_ready[p]),
      .err(err[p])
    );
  end

  assign cre_req[NPROC]     = boot_v;
  assign cre_tcb[NPROC]     = boot_tcb;
  assign cre_creator[NPROC] = '0;
  assign boot_ready         = cre_gnt[NPROC];

  gcq u_gcq (
    .clk, .rst_n,
    .cre_req, .cre_tcb, .cre_creator, .cre_gnt,
    .cr_valid, .cr, .cr_ready,
    .kill_v, .kill_tid, .cd_en, .cd_tid, .un_en, .un_tid,
    .brk_v, .brk_tid, .brk_en, .brk_pid,
    .rel_en, .rel_fam, .bsync_ok, .live_total
  );

  gwbus u_gwbus (
    .clk, .rst_n, .req(gw_req), .wr(gw_wr), .gnt(gw_gnt),
    .bc_valid, .bc_src, .bc_wr
  );

  rr_switch #(.N(NPROC), .W($bits(rreq_t))) u_req_sw (
    .clk, .rst_n,
    .in_valid(rq_valid), .in_dst(rq_dst), .in_data(rq), .in_ready(rq_ready),
    .out_valid(rqi_valid), .out_src(rqi_src), .out_data(rqi), .out_ready(rqi_ready)
  );

  rr_switch #(.N(NPROC), .W($bits(rdat_t))) u_data_sw (
    .clk, .rst_n,
    .in_valid(dt_valid), .in_dst(dt_dst), .in_data(dt), .in_ready(dt_ready),
    .out_valid(dti_valid), .out_src(), .out_data(dti), .out_ready(dti_ready)
  );

endmodule
