// tb_rau: self-checking testbench for the register allocation unit.
//
// Random thread creations with random slot availability. Checks that a thread
// is taken only when a slot is free, that the lowest free slot is claimed, that
// the slot, context, start pc and the
// $L0 index write match the creation, and that window overflow is flagged.
module tb_rau;
  import mt_pkg::*;

  logic       cr_valid, cr_ready, cr_err, free_any, alloc_en, ra_en;
  logic [NSLOT-1:0] free_vec;
  create_t    cr;
  slot_t      free_slot, alloc_slot, ra_slot;
  slot_info_t alloc_info;
  word_t      alloc_pc, ra_data;

  rau dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nerr;
    nerr = 0;
    for (int i = 0; i < 2000; i++) begin
      cr_valid  = $urandom_range(3) != 0;
      free_vec  = ($urandom_range(3) != 0) ? NSLOT'($urandom) : '0;
      free_any  = free_vec != '0;
      free_slot = '0;
      for (int k = NSLOT - 1; k >= 0; k--) if (free_vec[k]) free_slot = slot_t'(k);
      cr        = '0;
      cr.tid    = '{fam: fam_t'($urandom), ord: ord_t'($urandom)};
      cr.index  = $urandom;
      cr.pc     = $urandom;
      cr.nlocal = win_t'($urandom_range(FRAME));
      cr.nshared = win_t'($urandom_range(FRAME / 2));
      cr.has_d  = 1'(($urandom));
      cr.d_pid  = pid_t'($urandom);
      cr.d_tid  = '{fam: fam_t'($urandom), ord: ord_t'($urandom)};
      cr.has_cons = 1'(($urandom));
      #1;
      check(cr_ready == free_any, "ready follows slot availability");
      check(alloc_en == (cr_valid && free_any) && ra_en == alloc_en, "allocate only when taken");
      if (alloc_en) begin
        check(alloc_slot == free_slot && ra_slot == free_slot, "free slot claimed");
        check(ra_data == cr.index, "index goes to $L0");
        check(alloc_pc == cr.pc, "start pc");
        check(alloc_info.tid == cr.tid && alloc_info.nlocal == cr.nlocal &&
              alloc_info.nshared == cr.nshared && alloc_info.has_d == cr.has_d &&
              alloc_info.d_pid == cr.d_pid && alloc_info.d_tid == cr.d_tid &&
              alloc_info.has_cons == cr.has_cons, "context");
        check(cr_err == (int'(cr.nlocal) + 2 * int'(cr.nshared) > FRAME || cr.nlocal == 0),
              "window overflow flag");
        if (cr_err) nerr++;
      end else begin
        check(!cr_err, "no error when idle");
      end
      #9;
    end
    check(nerr > 0, "overflow case exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
