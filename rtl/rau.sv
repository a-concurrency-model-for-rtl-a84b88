// rau: register allocation unit of one processor.
//
// Takes threads from this processor's lane of the GCQ create bus. A thread is
// accepted (cr_ready) while the LCQ reports any free slot (free_vec); the unit
// then, in the same cycle, picks the lowest-numbered free slot, claims it,
// initialises its register frame through the register file's RAU port (all of
// $L, $S and $D empty, $L0 written with the thread's index) and hands the
// thread's context and start pc to the LCQ. One thread per cycle, purely
// combinational: the LCQ and register file act on it at the next edge.
//
// Each slot owns a fixed frame of FRAME registers holding the $L, $S and $D
// windows back to back; a thread whose windows do not fit (locals + 2 * shared >
// FRAME, or no locals to receive the index) is still started but cr_err
// flags the overflow. Writing the index into the first local register is
// the model's; the fixed-frame allocation is this design's choice.
module rau
  import mt_pkg::*;
(
  input  logic        cr_valid,
  input  create_t     cr,
  output logic        cr_ready,
  output logic        cr_err,
  // from / to the LCQ
  input  logic [NSLOT-1:0] free_vec,
  output logic        alloc_en,
  output slot_t       alloc_slot,
  output slot_info_t  alloc_info,
  output word_t       alloc_pc,
  // register file RAU port
  output logic        ra_en,
  output slot_t       ra_slot,
  output word_t       ra_data
);

  logic  free_any;
  slot_t free_slot;

  // lowest free slot
  always_comb begin
    free_any  = 1'b0;
    free_slot = '0;
    for (int i = NSLOT - 1; i >= 0; i--) begin
      if (free_vec[i]) begin
        free_any  = 1'b1;
        free_slot = slot_t'(i);
      end
    end
  end

  always_comb begin
    cr_ready   = free_any;
    alloc_en   = cr_valid && free_any;
    alloc_slot = free_slot;
    alloc_info = '{tid: cr.tid, nlocal: cr.nlocal, nshared: cr.nshared,
                   has_d: cr.has_d, d_pid: cr.d_pid, d_tid: cr.d_tid,
                   has_cons: cr.has_cons};
    alloc_pc   = cr.pc;
    ra_en      = alloc_en;
    ra_slot    = free_slot;
    ra_data    = cr.index;
    cr_err     = alloc_en &&
                 ((int'(cr.nlocal) + 2 * int'(cr.nshared) > FRAME) || cr.nlocal == '0);
  end

endmodule
