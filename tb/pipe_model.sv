// pipe_model: behavioural stand-in for one tile's in-order issue pipeline,
// used only by the testbenches (the pipeline and its instruction set are not
// part of the design).
//
// It runs a small fixed test program, one instruction per cycle, on whatever
// thread the continuation queue hands it. Register operands are read through
// the tile's blocking-read ports: if a read fails the instruction is dropped
// (the tile has suspended the thread) and a new thread is requested. Every
// instruction may carry a tag: swch hands the thread back to the queue, kill
// ends it. Loads are decoupled: issue marks the target register empty and the
// value arrives LAT cycles later through the memory write port; memory holds
// mem[a] = 3*a + 1.
//
// Two programs, chosen by PROG. Program 0 (the thread index is in $L0):
//   0  movi $S0, 0               boot thread: start of the chain
//   1  cre  fam1                 fam1: start 1, limit NTHR, step 1, distance 1
//   2  bsync
//   3  mv   $L1, $G1
//   4  out  $L1                  report the sum
//   5  cre  fam2                 fam2: start 0, limit 15, independent threads
//   6  bsync                     (never completes: a fam2 thread breaks)
//  10  lw   $L1, ($L0)           body of fam1
//  11  add  $L1, $L1, $D0        partial sum from the previous thread
//  12  mv   $S0, $L1    [kill]
//  20  lw   $L1, ($L0)           last thread of fam1
//  21  add  $L1, $L1, $D0
//  22  mv   $G1, $L1    [kill]   result to every processor's $G1
//  30  bne  $L0, 13, 33          fam2: thread 13 breaks, others spin
//  31  brk
//  32  out  $L0         [kill]
//  33  jmp  33          [swch]
//
// Program 1 searches a linked list of NLIST boxes for the one holding the point
// (MX, MY), as a chain of families: each family has 5*NPROC threads with
// distance 1, thread i takes the list node passed on by thread i-1 and passes
// on the next node, and the last thread of a family creates the next family
// while the list goes on. Node k sits at address 8(k+1) with words next,
// x1 = 10k, x2 = 10k+5, y1 = 10k, y2 = 10k+5; address 0 reads as 0 (end).
// The thread that finds the box writes $G6, issues Brk (ending every other
// thread, the waiting boot thread included) and reports the node address; if
// no box matches, the boot thread's Bsync completes and it reports $G6 = 0.
//   0  movi $G1, MX      1  movi $G2, MY      2  movi $G6, 0
//   3  movi $S0, 8       4  cre  fam3         5  bsync
//   6  mv   $L1, $G6     7  out  $L1  [kill]
//  40  mv   $L2, $D0          node address from the previous thread
//  41  lw   $L3, 0($L2)       next node
//  42  beq  $L3, 0, 60        end of list
//  43  mv   $S0, $L3          pass it on
//  44  lw   $L1, 1($L2)  45  blt $G1, $L1, 59     x below x1: fail
//  46  lw   $L1, 3($L2)  47  blt $G2, $L1, 59     y below y1
//  48  lw   $L1, 2($L2)  49  blt $L1, $G1, 59     x above x2
//  50  lw   $L1, 4($L2)  51  blt $L1, $G2, 59     y above y2
//  52  mv   $G6, $L2     53  brk             54  out $L2  [kill]
//  59  nop        [kill]      fail
//  60  movi $S0, 0 [kill]     end of list: pass the end on
//  70  mv   $L2, $D0     71  lw $L3, 0($L2)  72  beq $L3, 0, 59
//  73  mv   $S0, $L3     74  cre  fam3       75  jmp 44      last thread
module pipe_model
  import mt_pkg::*;
#(
  parameter int NTHR  = 20,
  parameter int LAT   = 3,
  parameter int PROG  = 0,
  parameter int NLIST = 50,
  parameter int MX    = 0,
  parameter int MY    = 0
) (
  input  logic      clk,
  input  logic      rst_n,
  input  pipe_out_t pout,
  output pipe_in_t  pin,
  output logic      out_v,
  output word_t     out_val,
  output int        n_exec,
  output int        n_idle
);

  typedef enum logic [3:0] {
    I_NOP, I_MOVI, I_MV, I_ADD, I_LW, I_CRE, I_BSYNC, I_BRK, I_BNE, I_JMP, I_OUT,
    I_BEQ, I_BLT
  } iop_e;
  typedef enum logic [1:0] {T_NORM, T_SWCH, T_KILL} tag_e;

  typedef struct packed {
    iop_e   op;
    tag_e   tag;
    rspec_t d, a, b;
    word_t  imm;
    word_t  tgt;
  } ins_t;

  localparam rspec_t L0 = '{cls: RC_L, idx: 0};
  localparam rspec_t L1 = '{cls: RC_L, idx: 1};
  localparam rspec_t S0 = '{cls: RC_S, idx: 0};
  localparam rspec_t D0 = '{cls: RC_D, idx: 0};
  localparam rspec_t G1 = '{cls: RC_G, idx: 1};
  localparam rspec_t G2 = '{cls: RC_G, idx: 2};
  localparam rspec_t G6 = '{cls: RC_G, idx: 6};
  localparam rspec_t L2 = '{cls: RC_L, idx: 2};
  localparam rspec_t L3 = '{cls: RC_L, idx: 3};

  function automatic ins_t I(iop_e op, tag_e tag, rspec_t d, rspec_t a, rspec_t b,
                             int imm, int tgt);
    return '{op: op, tag: tag, d: d, a: a, b: b, imm: word_t'(imm), tgt: word_t'(tgt)};
  endfunction

  function automatic ins_t fetch1(word_t pc);
    case (pc)
      0:  return I(I_MOVI, T_NORM, G1, L0, L0, MX, 0);
      1:  return I(I_MOVI, T_NORM, G2, L0, L0, MY, 0);
      2:  return I(I_MOVI, T_NORM, G6, L0, L0, 0, 0);
      3:  return I(I_MOVI, T_NORM, S0, L0, L0, 8, 0);
      4:  return I(I_CRE,  T_NORM, L0, L0, L0, 3, 0);
      5:  return I(I_BSYNC, T_NORM, L0, L0, L0, 0, 0);
      6:  return I(I_MV,   T_NORM, L1, G6, L0, 0, 0);
      7:  return I(I_OUT,  T_KILL, L0, L1, L0, 0, 0);
      40: return I(I_MV,   T_NORM, L2, D0, L0, 0, 0);
      41: return I(I_LW,   T_NORM, L3, L2, L0, 0, 0);
      42: return I(I_BEQ,  T_NORM, L0, L3, L0, 0, 60);
      43: return I(I_MV,   T_NORM, S0, L3, L0, 0, 0);
      44: return I(I_LW,   T_NORM, L1, L2, L0, 1, 0);
      45: return I(I_BLT,  T_NORM, L0, G1, L1, 0, 59);
      46: return I(I_LW,   T_NORM, L1, L2, L0, 3, 0);
      47: return I(I_BLT,  T_NORM, L0, G2, L1, 0, 59);
      48: return I(I_LW,   T_NORM, L1, L2, L0, 2, 0);
      49: return I(I_BLT,  T_NORM, L0, L1, G1, 0, 59);
      50: return I(I_LW,   T_NORM, L1, L2, L0, 4, 0);
      51: return I(I_BLT,  T_NORM, L0, L1, G2, 0, 59);
      52: return I(I_MV,   T_NORM, G6, L2, L0, 0, 0);
      53: return I(I_BRK,  T_NORM, L0, L0, L0, 0, 0);
      54: return I(I_OUT,  T_KILL, L0, L2, L0, 0, 0);
      59: return I(I_NOP,  T_KILL, L0, L0, L0, 0, 0);
      60: return I(I_MOVI, T_KILL, S0, L0, L0, 0, 0);
      70: return I(I_MV,   T_NORM, L2, D0, L0, 0, 0);
      71: return I(I_LW,   T_NORM, L3, L2, L0, 0, 0);
      72: return I(I_BEQ,  T_NORM, L0, L3, L0, 0, 59);
      73: return I(I_MV,   T_NORM, S0, L3, L0, 0, 0);
      74: return I(I_CRE,  T_NORM, L0, L0, L0, 3, 0);
      75: return I(I_JMP,  T_NORM, L0, L0, L0, 0, 44);
      default: return I(I_NOP, T_KILL, L0, L0, L0, 0, 0);
    endcase
  endfunction

  // memory contents seen by loads
  function automatic word_t memval(word_t a);
    int k, f;
    if (PROG == 0) return 3 * a + 1;
    k = int'(a / 8) - 1;
    f = int'(a % 8);
    if (k < 0 || k >= NLIST) return '0;
    case (f)
      0:       return (k + 1 < NLIST) ? word_t'(8 * (k + 2)) : '0;
      1, 3:    return word_t'(10 * k);
      2, 4:    return word_t'(10 * k + 5);
      default: return '0;
    endcase
  endfunction

  function automatic ins_t fetch(word_t pc);
    if (PROG == 1) return fetch1(pc);
    case (pc)
      0:  return I(I_MOVI, T_NORM, S0, L0, L0, 0, 0);
      1:  return I(I_CRE,  T_NORM, L0, L0, L0, 1, 0);
      2:  return I(I_BSYNC, T_NORM, L0, L0, L0, 0, 0);
      3:  return I(I_MV,   T_NORM, L1, G1, L0, 0, 0);
      4:  return I(I_OUT,  T_NORM, L0, L1, L0, 0, 0);
      5:  return I(I_CRE,  T_NORM, L0, L0, L0, 2, 0);
      6:  return I(I_BSYNC, T_NORM, L0, L0, L0, 0, 0);
      10: return I(I_LW,   T_NORM, L1, L0, L0, 0, 0);
      11: return I(I_ADD,  T_NORM, L1, L1, D0, 0, 0);
      12: return I(I_MV,   T_KILL, S0, L1, L0, 0, 0);
      20: return I(I_LW,   T_NORM, L1, L0, L0, 0, 0);
      21: return I(I_ADD,  T_NORM, L1, L1, D0, 0, 0);
      22: return I(I_MV,   T_KILL, G1, L1, L0, 0, 0);
      30: return I(I_BNE,  T_NORM, L0, L0, L0, 13, 33);
      31: return I(I_BRK,  T_NORM, L0, L0, L0, 0, 0);
      32: return I(I_OUT,  T_KILL, L0, L0, L0, 0, 0);
      33: return I(I_JMP,  T_SWCH, L0, L0, L0, 0, 33);
      default: return I(I_NOP, T_KILL, L0, L0, L0, 0, 0);
    endcase
  endfunction

  function automatic tcb_t fam_tcb(int n);
    tcb_t t;
    t = '0;
    t.step = 1; t.nlocal = 2; t.nshared = 1;
    if (n == 1) begin
      t.start = 1; t.limit = word_t'(NTHR); t.dep_dist = 1; t.code = 10; t.last_code = 20;
    end else if (n == 3) begin
      t.start = 1; t.limit = word_t'(5 * NPROC); t.dep_dist = 1; t.nlocal = 4;
      t.code = 40; t.last_code = 70;
    end else begin
      t.start = 0; t.limit = 15; t.dep_dist = 0; t.code = 30;
    end
    return t;
  endfunction

  // thread being executed
  logic  have;
  slot_t slot;
  word_t pc;

  // decoupled loads in flight
  typedef struct packed {
    int    due;
    slot_t slot;
    rspec_t spec;
    word_t data;
  } ld_t;
  localparam int LDQ = 16;
  ld_t ldq [LDQ];
  int  ld_head, ld_tail;
  int  cyc;

  ins_t  ins;
  logic  stall, done_ok, leave;
  word_t a, b, res, nxt;

  always_comb begin
    pin     = '0;
    pin.op  = OP_NONE;
    ins     = fetch(pc);
    stall   = 1'b0;
    done_ok = 1'b0;
    leave   = 1'b0;
    a = pout.rd_data[0];
    b = pout.rd_data[1];
    res = '0;
    nxt = pc + 1;
    if (!have) begin
      pin.thr_req = 1'b1;
    end else begin
      pin.slot = slot;
      stall = (ins.d.cls == RC_G && (ins.op == I_MV || ins.op == I_MOVI) && !pout.gw_ready) ||
              (ins.op == I_CRE && !pout.cre_ready);
      if (!stall) begin
        case (ins.op)
          I_MV, I_LW, I_OUT, I_BNE, I_BEQ: begin pin.rd_en = 2'b01; end
          I_ADD, I_BLT:                    begin pin.rd_en = 2'b11; end
          default: ;
        endcase
        pin.rd_spec[0] = ins.a;
        pin.rd_spec[1] = ins.b;
        pin.pc = pc;
        if (pout.rd_ok) begin
          done_ok = 1'b1;
          case (ins.op)
            I_MOVI:  begin pin.wr_en = 1; pin.wr_spec = ins.d; pin.wr_data = ins.imm; end
            I_MV:    begin pin.wr_en = 1; pin.wr_spec = ins.d; pin.wr_data = a; end
            I_ADD:   begin pin.wr_en = 1; pin.wr_spec = ins.d; pin.wr_data = a + b; end
            I_LW:    begin pin.wr_en = 1; pin.wr_empty = 1; pin.wr_spec = ins.d; end
            I_CRE:   begin pin.op = OP_CRE; pin.tcb = fam_tcb(int'(ins.imm)); end
            I_BSYNC: begin pin.op = OP_BSYNC; leave = 1; end
            I_BRK:   begin pin.op = OP_BRK; end
            I_BNE:   if (a != ins.imm) nxt = ins.tgt;
            I_BEQ:   if (a == ins.imm) nxt = ins.tgt;
            I_BLT:   if (a < b) nxt = ins.tgt;
            I_JMP:   nxt = ins.tgt;
            default: ;
          endcase
          if (ins.tag == T_SWCH) begin pin.op = OP_SWCH; leave = 1; end
          if (ins.tag == T_KILL) begin pin.op = OP_KILL; leave = 1; end
          if (pin.op == OP_SWCH || pin.op == OP_BSYNC) pin.pc = nxt;
        end
      end
    end
    if (ld_head != ld_tail && ldq[ld_head % LDQ].due <= cyc) begin
      pin.mem_en   = 1'b1;
      pin.mem_slot = ldq[ld_head % LDQ].slot;
      pin.mem_spec = ldq[ld_head % LDQ].spec;
      pin.mem_data = ldq[ld_head % LDQ].data;
    end
  end

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have   <= 1'b0;
      slot   <= '0;
      pc     <= '0;
      cyc    <= 0;
      n_exec <= 0;
      n_idle <= 0;
      out_v  <= 1'b0;
      out_val <= '0;
      ld_head <= 0;
      ld_tail <= 0;
    end else begin
      cyc   <= cyc + 1;
      out_v <= 1'b0;
      if (pin.mem_en) ld_head <= ld_head + 1;
      if (pout.flush) begin
        have <= 1'b0;
        ld_head <= ld_tail;
      end else if (!have) begin
        n_idle <= n_idle + 1;
        if (pout.thr_valid) begin
          have <= 1'b1;
          slot <= pout.thr_slot;
          pc   <= pout.thr_pc;
        end
      end else if (!stall) begin
        if (done_ok) begin
          n_exec <= n_exec + 1;
          pc <= nxt;
          if (leave) have <= 1'b0;
          if (ins.op == I_LW) begin
            ldq[ld_tail % LDQ] <= '{due: cyc + LAT, slot: slot, spec: ins.d, data: memval(a + ins.imm)};
            ld_tail <= ld_tail + 1;
          end
          if (ins.op == I_OUT) begin
            out_v   <= 1'b1;
            out_val <= a;
          end
        end else if (!pout.rd_retry) begin
          have <= 1'b0;   // suspended by the register file
        end
      end
    end
  end

endmodule
