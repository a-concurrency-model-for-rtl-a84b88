// tb_lrf: self-checking testbench for the local register file.
//
// Directed checks of the i-structure behaviour (reset state, frame
// initialisation, blocking read that parks a continuation and the wake on the
// next write through each write port, a write in the same cycle as the
// suspending read, load issue marking a register empty), then a random run in
// which a reference model of tags and data is compared with the register file
// every cycle.
module tb_lrf;
  import mt_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [1:0]   rd_en, rd_susp, rd_full;
  raddr_t [1:0] rd_addr;
  word_t [1:0]  rd_data;
  cont_t        rd_cont, rr_tag;
  logic         pw_en, pw_empty, mw_en, ra_en, rr_en, rr_full, rw_en, gw_en;
  raddr_t       pw_addr, mw_addr, rr_addr, rw_addr, gw_addr;
  word_t        pw_data, mw_data, ra_data, rr_data, rw_data, gw_data;
  slot_t        ra_slot;
  logic [3:0]   wk_valid;
  cont_t [3:0]  wk_cont;

  lrf dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic idle();
    rd_en = '0; rd_susp = '0; pw_en = 0; pw_empty = 0; mw_en = 0; ra_en = 0;
    rr_en = 0; rw_en = 0; gw_en = 0;
    rd_addr = '0; rd_cont = '0; rr_tag = '0; pw_addr = '0; mw_addr = '0;
    rr_addr = '0; rw_addr = '0; gw_addr = '0; pw_data = '0; mw_data = '0;
    ra_data = '0; rw_data = '0; gw_data = '0; ra_slot = '0;
  endtask

  function automatic raddr_t fr(int s, int i);
    return raddr_t'(NGLOB + s * FRAME + i);
  endfunction

  // reference model
  logic  m_full [NREGS];
  word_t m_data [NREGS];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    idle();
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // reset: everything empty
    for (int r = 0; r < NREGS; r += 2) begin
      rd_addr[0] = raddr_t'(r); rd_addr[1] = raddr_t'(r + 1);
      #1 check(rd_full == 2'b00, "empty after reset");
    end

    @(negedge clk);
    // frame initialisation of slot 2 with index 42
    ra_en = 1; ra_slot = 2; ra_data = 42;
    @(negedge clk); idle();
    rd_addr[0] = fr(2, 0); rd_addr[1] = fr(2, 1);
    #1 check(rd_full == 2'b01 && rd_data[0] == 42, "L0 holds index, rest empty");

    // blocking read parks slot 5 in register fr(2,1); memory write wakes it
    rd_en = 2'b01; rd_susp = 2'b01; rd_addr[0] = fr(2, 1);
    rd_cont = '{remote: 0, pid: 0, addr: 5};
    @(negedge clk); idle();
    mw_en = 1; mw_addr = fr(2, 1); mw_data = 77;
    #1 check(wk_valid == 4'b0010 && wk_cont[1].addr == 5 && !wk_cont[1].remote,
             "memory write wakes parked thread");
    @(negedge clk); idle();
    rd_addr[1] = fr(2, 1);
    #1 check(rd_full[1] && rd_data[1] == 77, "loaded value readable");
    // a second write releases nothing
    pw_en = 1; pw_addr = fr(2, 1); pw_data = 78;
    #1 check(wk_valid == 4'b0000, "no continuation left");
    @(negedge clk); idle();

    // remote read of an empty register keeps the request; pipeline write answers it
    rr_en = 1; rr_addr = fr(2, 3); rr_tag = '{remote: 1, pid: 3, addr: 9};
    #1 check(!rr_full, "remote read sees empty");
    @(negedge clk); idle();
    pw_en = 1; pw_addr = fr(2, 3); pw_data = 123;
    #1 check(wk_valid[0] && wk_cont[0].remote && wk_cont[0].pid == 3 && wk_cont[0].addr == 9,
             "write answers parked remote request");
    @(negedge clk); idle();
    rr_en = 1; rr_addr = fr(2, 3);
    #1 check(rr_full && rr_data == 123, "remote read of full register");
    @(negedge clk); idle();

    // suspension and write in the same cycle: released at once
    rd_en = 2'b10; rd_susp = 2'b10; rd_addr[1] = fr(2, 4); rd_cont = '{remote: 0, pid: 0, addr: 6};
    rw_en = 1; rw_addr = fr(2, 4); rw_data = 5;
    #1 check(wk_valid == 4'b0100 && wk_cont[2].addr == 6, "same-cycle write releases suspension");
    @(negedge clk); idle();

    // global write port and load issue
    gw_en = 1; gw_addr = 3; gw_data = 99;
    @(negedge clk); idle();
    pw_en = 1; pw_empty = 1; pw_addr = fr(2, 0);
    @(negedge clk); idle();
    rd_addr[0] = 3; rd_addr[1] = fr(2, 0);
    #1 check(rd_full == 2'b01 && rd_data[0] == 99, "global write and load-issue empty");
    @(negedge clk); idle();

    // random run against the reference model
    for (int r = 0; r < NREGS; r++) begin
      rd_addr[0] = raddr_t'(r);
      #1 m_full[r] = rd_full[0];
      m_data[r] = rd_data[0];
    end
    @(negedge clk);
    for (int c = 0; c < 3000; c++) begin
      idle();
      if ($urandom_range(3) == 0) begin
        pw_en = 1; pw_addr = raddr_t'($urandom_range(NREGS - 1)); pw_data = $urandom;
        pw_empty = $urandom_range(4) == 0;
      end
      if ($urandom_range(3) == 0) begin
        mw_en = 1; mw_addr = raddr_t'($urandom_range(NREGS - 1)); mw_data = $urandom;
      end
      if ($urandom_range(3) == 0) begin
        rw_en = 1; rw_addr = raddr_t'($urandom_range(NREGS - 1)); rw_data = $urandom;
      end
      if ($urandom_range(3) == 0) begin
        gw_en = 1; gw_addr = raddr_t'($urandom_range(NGLOB - 1)); gw_data = $urandom;
      end
      if ($urandom_range(15) == 0) begin
        ra_en = 1; ra_slot = slot_t'($urandom_range(NSLOT - 1)); ra_data = $urandom;
      end
      rd_addr[0] = raddr_t'($urandom_range(NREGS - 1));
      rd_addr[1] = raddr_t'($urandom_range(NREGS - 1));
      #1;
      for (int k = 0; k < 2; k++) begin
        check(rd_full[k] == m_full[rd_addr[k]], "random: full tag");
        if (m_full[rd_addr[k]]) check(rd_data[k] == m_data[rd_addr[k]], "random: data");
      end
      // model update in port priority order
      if (ra_en) begin
        for (int i = 0; i < FRAME; i++) m_full[fr(ra_slot, i)] = (i == 0);
        m_data[fr(ra_slot, 0)] = ra_data;
      end
      if (pw_en) begin m_full[pw_addr] = !pw_empty; if (!pw_empty) m_data[pw_addr] = pw_data; end
      if (mw_en) begin m_full[mw_addr] = 1; m_data[mw_addr] = mw_data; end
      if (rw_en) begin m_full[rw_addr] = 1; m_data[rw_addr] = rw_data; end
      if (gw_en) begin m_full[gw_addr] = 1; m_data[gw_addr] = gw_data; end
      @(negedge clk);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
