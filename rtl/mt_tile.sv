// mt_tile: one processor of the microthreaded chip multiprocessor, less its
// in-order pipeline.
//
// The tile joins the local register file (lrf), the local continuation queue
// (lcq) and the register allocation unit (rau), and adds the glue that makes
// the register windows distributed:
//  * window translation: a specifier ($G, $L, $S or $D and an index) of the
//    thread in slot s is mapped to a physical register of this tile;
//  * blocking reads: if an enabled pipeline read finds an empty register the
//    thread is suspended, its slot parked in the first empty register, and
//    rd_ok is low; the pipeline must drop the instruction and ask for another
//    thread. A write to that register later makes the thread ready again;
//  * $D fetch: when the parked-on register is in the $D window, one read
//    request for the producer's $S register goes to the read-request switch.
//    If the request queue is full the thread is not suspended and rd_retry
//    asks the pipeline to try the instruction again;
//  * $S service: a request arriving from the switch is looked up by thread
//    identity. A full $S register is answered at once; an empty one keeps the
//    request as its continuation and is answered when the producer writes it.
//    The reply goes to the processor the switch names as the request's source.
//    Answers go out through a reply queue to the data switch and fill the $D
//    register on the requesting tile through its remote write port;
//  * $G writes are made locally at once and offered to the global write bus
//    (one outstanding write, gw_ready); broadcasts from other tiles are
//    written through the global write port;
//  * control operations: swch, kill (reported to the GCQ with the thread's
//    identity), bsync, cre (one outstanding request to the GCQ create bus,
//    cre_ready; if the new family depends on its creator, the creator's slot
//    is held until the GCQ says the family is done with it) and brk. When a
//    Brk is broadcast, flush tells this tile's pipeline to drop its running
//    thread (unless that thread issued the Brk) and any load in flight.
//
// Timing: pipeline reads, rd_ok, rd_retry and the thread hand-over are
// combinational within a cycle; all state changes at the rising edge. err
// flags conditions a correct program never causes (window overflow, a request
// for a thread that is not here, a full reply queue). Queue depths and the
// single outstanding $G write and Cre are this design's choices.
module mt_tile
  import mt_pkg::*;
#(
  parameter int unsigned PID = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  // pipeline
  input  pipe_in_t    pin,
  output pipe_out_t   pout,
  // GCQ create bus lane
  input  logic        cr_valid,
  input  create_t     cr,
  output logic        cr_ready,
  // family creation request
  output logic        cre_req,
  output tcb_t        cre_tcb,
  output tid_t        cre_creator,
  input  logic        cre_gnt,
  // kill report, break, release, barrier
  output logic        kill_v,
  output tid_t        kill_tid,
  output logic        brk_v,
  output tid_t        brk_tid,
  input  logic        brk_en,
  input  pid_t        brk_pid,
  input  logic        cd_en,
  input  tid_t        cd_tid,
  input  logic        un_en,
  input  tid_t        un_tid,
  input  logic        bsync_ok,
  // global write bus
  output logic        gw_req,
  output gwr_t        gw_wr,
  input  logic        gw_gnt,
  input  logic        bc_valid,
  input  pid_t        bc_src,
  input  gwr_t        bc_wr,
  // read-request switch
  output logic        rq_valid,
  output pid_t        rq_dst,
  output rreq_t       rq,
  input  logic        rq_ready,
  input  logic        rqi_valid,
  input  rreq_t       rqi,
  input  pid_t        rqi_src,       // requesting processor, from the switch
  output logic        rqi_ready,
  // data switch
  output logic        dt_valid,
  output pid_t        dt_dst,
  output rdat_t       dt,
  input  logic        dt_ready,
  input  logic        dti_valid,
  input  rdat_t       dti,
  output logic        dti_ready,
  // status
  output logic        err
);

  localparam pid_t MY_PID = pid_t'(PID);
  localparam int unsigned RQ_DEPTH = 4;
  localparam int unsigned RP_DEPTH = 16;

  // ------------------------------------------------------------ sub-blocks
  slot_info_t info [NSLOT];
  // fields of the running (pipeline), loading (memory) and looked-up slots
  win_t       cur_nl, cur_ns, m_nl, m_ns, s_nl, s_ns;
  tid_t       cur_tid, cur_dtid;
  pid_t       cur_dpid;

  logic         alloc_en, rau_err;
  logic [NSLOT-1:0] free_vec;
  slot_t        alloc_slot;
  slot_info_t   alloc_info;
  word_t        alloc_pc;
  logic         ra_en;
  slot_t        ra_slot;
  word_t        ra_data;
  logic         lk_hit;
  slot_t        lk_slot;

  logic [1:0]   rd_susp, rd_full;
  raddr_t [1:0] rd_addr;
  word_t [1:0]  rd_data;
  cont_t        rd_cont;
  raddr_t       pw_addr, mw_addr, rr_addr, gw_addr;
  logic         rr_en, rr_full;
  word_t        rr_data;
  cont_t        rr_tag;
  logic [3:0]   wk_valid;
  cont_t [3:0]  wk_cont;
  logic [3:0]   wake_en;
  slot_t [3:0]  wake_slot;
  logic         gw_in_en;

  logic         susp_en;
  logic         busy;
  logic         cre_pend;      // Cre waiting for the create bus
  tid_t         cre_who;
  slot_t        cre_slot;

  rau u_rau (
    .cr_valid, .cr, .cr_ready, .cr_err(rau_err),
    .free_vec, .alloc_en, .alloc_slot, .alloc_info, .alloc_pc,
    .ra_en, .ra_slot, .ra_data
  );

  lcq u_lcq (
    .clk, .rst_n,
    .alloc_en, .alloc_slot, .alloc_info, .alloc_pc, .free_vec,
    .thr_req(pin.thr_req), .thr_valid(pout.thr_valid), .thr_slot(pout.thr_slot),
    .thr_pc(pout.thr_pc),
    .op(pin.op), .op_slot(pin.slot), .op_pc(pin.pc),
    .susp_en, .susp_slot(pin.slot), .susp_pc(pin.pc),
    .wake_en, .wake_slot,
    .bsync_ok, .cd_en, .cd_tid, .un_en, .un_tid,
    .hold_en(cre_gnt && cre_tcb.dep_dist != '0), .hold_slot(cre_slot),
    .brk_en, .brk_keep_en(brk_pid == MY_PID), .brk_keep(pin.slot),
    .info, .lk_tid(rqi.tid), .lk_hit, .lk_slot, .busy
  );

  lrf u_lrf (
    .clk, .rst_n,
    .rd_en(pin.rd_en), .rd_addr, .rd_susp, .rd_cont, .rd_data, .rd_full,
    .pw_en(pin.wr_en), .pw_empty(pin.wr_empty), .pw_addr, .pw_data(pin.wr_data),
    .mw_en(pin.mem_en), .mw_addr, .mw_data(pin.mem_data),
    .ra_en, .ra_slot, .ra_data,
    .rr_en, .rr_addr, .rr_tag, .rr_data, .rr_full,
    .rw_en(dti_valid), .rw_addr(dti.dst), .rw_data(dti.data),
    .gw_en(gw_in_en), .gw_addr, .gw_data(bc_wr.data),
    .wk_valid, .wk_cont
  );

  // ------------------------------------------------------------ translation
  always_comb begin
    cur_nl   = info[pin.slot].nlocal;
    cur_ns   = info[pin.slot].nshared;
    cur_tid  = info[pin.slot].tid;
    cur_dtid = info[pin.slot].d_tid;
    cur_dpid = info[pin.slot].d_pid;
    m_nl     = info[pin.mem_slot].nlocal;
    m_ns     = info[pin.mem_slot].nshared;
    s_nl     = info[lk_slot].nlocal;
    s_ns     = info[lk_slot].nshared;
    for (int k = 0; k < 2; k++) begin
      rd_addr[k] = phys_addr(pin.slot, cur_nl, cur_ns, pin.rd_spec[k]);
    end
    pw_addr = phys_addr(pin.slot, cur_nl, cur_ns, pin.wr_spec);
    mw_addr = phys_addr(pin.mem_slot, m_nl, m_ns, pin.mem_spec);
    rr_addr = phys_addr(lk_slot, s_nl, s_ns, '{cls: RC_S, idx: rqi.s_idx});
    gw_addr = raddr_t'(bc_wr.gidx);
  end

  // ------------------------------------------------------------ blocking reads
  logic [1:0] miss;
  logic       k0;            // port whose register holds the continuation
  logic       d_miss;
  logic       rq_push;
  logic [$clog2(RQ_DEPTH+1)-1:0] rq_space;

  always_comb begin
    miss     = pin.rd_en & ~rd_full;
    k0       = !miss[0];
    d_miss   = |miss && pin.rd_spec[k0].cls == RC_D;
    pout.rd_retry = d_miss && rq_space == '0;
    pout.rd_ok    = !(|miss);
    pout.rd_data  = rd_data;
    susp_en  = |miss && !pout.rd_retry;
    rd_susp  = susp_en ? (k0 ? 2'b10 : 2'b01) : 2'b00;
    rd_cont  = '{remote: 1'b0, pid: MY_PID, addr: raddr_t'(pin.slot)};
    rq_push  = susp_en && d_miss;
  end

  // ------------------------------------------------------------ $D requests out
  logic                 rq_ovf;
  logic [$bits(rreq_t)+PID_W-1:0] rq_head;
  rreq_t                rq_new;

  assign rq_new = '{dst: rd_addr[k0], tid: cur_dtid,
                    s_idx: pin.rd_spec[k0].idx};

  mpfifo #(.W($bits(rreq_t) + PID_W), .DEPTH(RQ_DEPTH), .NPUSH(1)) u_rq_q (
    .clk, .rst_n, .in_valid(rq_push), .in_data({cur_dpid, rq_new}),
    .space(rq_space), .ovf(rq_ovf),
    .out_valid(rq_valid), .out_data(rq_head), .out_ready(rq_ready)
  );
  assign {rq_dst, rq} = rq_head;

  // ------------------------------------------------------------ $S service and replies
  localparam int unsigned RPW = $bits(rdat_t) + PID_W;
  logic [2:0]          rp_push;
  logic [2:0][RPW-1:0] rp_data;
  logic [RPW-1:0]      rp_head;
  logic [$clog2(RP_DEPTH+1)-1:0] rp_space;
  logic                rp_ovf;

  always_comb begin
    rqi_ready = rp_space >= 3;
    rr_en     = rqi_valid && rqi_ready && lk_hit;
    rr_tag    = '{remote: 1'b1, pid: rqi_src, addr: rqi.dst};
    rp_push[0] = rr_en && rr_full;
    rp_data[0] = {rqi_src, rdat_t'{dst: rqi.dst, data: rr_data}};
    rp_push[1] = wk_valid[0] && wk_cont[0].remote;
    rp_data[1] = {wk_cont[0].pid, rdat_t'{dst: wk_cont[0].addr, data: pin.wr_data}};
    rp_push[2] = wk_valid[1] && wk_cont[1].remote;
    rp_data[2] = {wk_cont[1].pid, rdat_t'{dst: wk_cont[1].addr, data: pin.mem_data}};
    for (int w = 0; w < 4; w++) begin
      wake_en[w]   = wk_valid[w] && !wk_cont[w].remote;
      wake_slot[w] = slot_t'(wk_cont[w].addr);
    end
  end

  mpfifo #(.W(RPW), .DEPTH(RP_DEPTH), .NPUSH(3)) u_rp_q (
    .clk, .rst_n, .in_valid(rp_push), .in_data(rp_data),
    .space(rp_space), .ovf(rp_ovf),
    .out_valid(dt_valid), .out_data(rp_head), .out_ready(dt_ready)
  );
  assign {dt_dst, dt} = rp_head;
  assign dti_ready = 1'b1;

  // ------------------------------------------------------------ global writes
  logic gw_pend;
  gwr_t gw_buf;

  assign gw_in_en  = bc_valid && bc_src != MY_PID;
  assign gw_req    = gw_pend;
  assign gw_wr     = gw_buf;
  assign pout.gw_ready = !gw_pend;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gw_pend <= 1'b0;
    end else if (pin.wr_en && !pin.wr_empty && pin.wr_spec.cls == RC_G) begin
      gw_pend <= 1'b1;
    end else if (gw_gnt) begin
      gw_pend <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (pin.wr_en && pin.wr_spec.cls == RC_G) begin
      gw_buf <= '{gidx: pin.wr_spec.idx, data: pin.wr_data};
    end
  end

  // ------------------------------------------------------------ control operations

  assign kill_v      = pin.op == OP_KILL;
  assign kill_tid    = cur_tid;
  assign brk_v       = pin.op == OP_BRK;
  assign brk_tid     = cur_tid;
  assign cre_req     = cre_pend;
  assign cre_creator = cre_who;
  assign pout.cre_ready = !cre_pend;
  assign pout.busy   = busy;
  assign pout.flush  = brk_en && !(brk_pid == MY_PID && pin.op == OP_BRK);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cre_pend <= 1'b0;
    end else if (brk_en || cre_gnt) begin
      cre_pend <= 1'b0;
    end else if (pin.op == OP_CRE) begin
      cre_pend <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (pin.op == OP_CRE && !cre_pend) begin
      cre_tcb <= pin.tcb;
      cre_who <= cur_tid;
      cre_slot <= pin.slot;
    end
  end

  assign err = rau_err || rq_ovf || rp_ovf || (rqi_valid && rqi_ready && !lk_hit) ||
               (wk_valid[2] && wk_cont[2].remote) || (wk_valid[3] && wk_cont[3].remote);

endmodule
