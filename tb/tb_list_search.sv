// tb_list_search: the linked-list search of the microthreaded model run on two
// copies of the whole chip at default sizes.
//
// Each tile's pipeline is a pipe_model running its list-search program
// (PROG 1): a boot thread writes the search point to $G1/$G2, starts the list
// in its $S0 and creates a family of 5*NPROC threads with distance 1; each
// thread fetches its node address through $D0, passes the next node on
// through $S0 and tests its box; the last thread of every family creates the
// next family while the list goes on. The list has NLIST = 50 nodes, so the
// search runs through a chain of three families.
//
// Chip 0 searches for a point inside node 45's box: the thread that finds it
// issues Brk and reports the node's address 8*(45+1). Chip 1 searches for a
// point in no box: every thread fails, the end of the list is passed down the
// chain, the boot thread's Bsync completes and it reports 0.
//
// Checked per chip: exactly one reported value, and the right one; at least
// three families created; every family's creator let go; Brk only on chip 0;
// no error flag; no live thread at the end.
module tb_list_search;
  import mt_pkg::*;

  localparam int NLIST = 50;
  localparam int HIT   = 45;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [1:0] boot_v, boot_ready;
  tcb_t       boot_tcb;
  int         n_out [2];
  word_t      last_out [2];
  int         n_fam [2];
  int         n_un [2];
  int         n_brk [2];
  int         n_err [2];
  logic [ORD_W:0] live [2];

  for (genvar c = 0; c < 2; c++) begin : g_chip
    pipe_in_t [NPROC-1:0]  pin;
    pipe_out_t [NPROC-1:0] pout;
    logic [NPROC-1:0]      err, out_v;
    word_t [NPROC-1:0]     out_val;
    int                    n_exec [NPROC];
    int                    n_idle [NPROC];

    mt_cmp dut (
      .clk, .rst_n, .pin, .pout, .boot_v(boot_v[c]), .boot_tcb, .boot_ready(boot_ready[c]),
      .err, .live_total(live[c]), .rel_en(), .rel_fam()
    );

    for (genvar p = 0; p < NPROC; p++) begin : g_pipe
      pipe_model #(.LAT(2 + p), .PROG(1), .NLIST(NLIST),
                   .MX(c == 0 ? 10 * HIT + 2 : 3), .MY(c == 0 ? 10 * HIT + 4 : 8)) u_pipe (
        .clk, .rst_n, .pout(pout[p]), .pin(pin[p]),
        .out_v(out_v[p]), .out_val(out_val[p]), .n_exec(n_exec[p]), .n_idle(n_idle[p])
      );
    end

    always @(posedge clk) begin
      if (rst_n) begin
        for (int p = 0; p < NPROC; p++) begin
          if (out_v[p]) begin n_out[c]++; last_out[c] = out_val[p]; end
        end
        n_fam[c] += $countones(dut.cre_gnt[NPROC-1:0]);
        n_un[c]  += int'(dut.un_en);
        n_brk[c] += int'(dut.brk_en);
        n_err[c] += $countones(err);
      end
    end
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t;
    for (int c = 0; c < 2; c++) begin
      n_out[c] = 0; n_fam[c] = 0; n_un[c] = 0; n_brk[c] = 0; n_err[c] = 0; last_out[c] = '0;
    end
    boot_v = '0;
    boot_tcb = '0;
    boot_tcb.limit = 0; boot_tcb.step = 1; boot_tcb.nlocal = 2; boot_tcb.nshared = 1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    boot_v = '1;
    @(posedge clk);
    #1 check(boot_ready == 2'b11, "both chips booted");
    boot_v = '0;

    t = 0;
    while ((n_out[0] == 0 || n_out[1] == 0) && t < 25000) begin @(negedge clk); t++; end
    repeat (50) @(negedge clk);
    $display("cycles=%0d families=%0d/%0d let_go=%0d/%0d brk=%0d/%0d",
             t, n_fam[0], n_fam[1], n_un[0], n_un[1], n_brk[0], n_brk[1]);

    check(n_out[0] == 1 && last_out[0] == word_t'(8 * (HIT + 1)),
          $sformatf("chip 0 finds node %0d (got %0d outputs, last %0d)", HIT, n_out[0], last_out[0]));
    check(n_out[1] == 1 && last_out[1] == '0,
          $sformatf("chip 1 finds nothing (got %0d outputs, last %0d)", n_out[1], last_out[1]));
    for (int c = 0; c < 2; c++) begin
      check(n_fam[c] >= 3, $sformatf("chip %0d: chain of at least three families", c));
      check(n_un[c] == n_fam[c] || (c == 0 && n_un[c] >= 2),
            $sformatf("chip %0d: creators let go (%0d of %0d)", c, n_un[c], n_fam[c]));
      check(n_err[c] == 0, $sformatf("chip %0d: no error flag", c));
      check(live[c] == 0, $sformatf("chip %0d: no live thread left", c));
    end
    check(n_brk[0] == 1 && n_brk[1] == 0, "Brk only where the search succeeds");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
