// tb_gwbus: self-checking testbench for the global write bus.
//
// Every processor offers writes at random and holds each until granted. The
// checks: at most one grant per cycle, only to a requester; the broadcast one
// cycle later carries exactly the granted write and its source; with all
// processors requesting, grants rotate so each gets one in every NPROC cycles;
// every offered write is broadcast once.
module tb_gwbus;
  import mt_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NPROC-1:0] req, gnt;
  gwr_t [NPROC-1:0] wr;
  logic             bc_valid;
  pid_t             bc_src;
  gwr_t             bc_wr;

  gwbus dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic   exp_v;
  pid_t   exp_src;
  gwr_t   exp_wr;
  int     offered, broadcast;

  initial begin
    logic [NPROC-1:0] g;
    int last;
    req = '0; wr = '0; exp_v = 0; offered = 0; broadcast = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // all requesting: strict rotation
    req = '1;
    for (int p = 0; p < NPROC; p++) wr[p] = '{gidx: IDX_W'(p), data: word_t'(100 + p)};
    last = -1;
    for (int c = 0; c < 4 * NPROC; c++) begin
      #1;
      check($onehot(gnt), "one grant when all request");
      for (int p = 0; p < NPROC; p++) if (gnt[p]) begin
        if (last >= 0) check(p == (last + 1) % NPROC, "round-robin rotation");
        last = p;
      end
      @(negedge clk);
      check(bc_valid && int'(bc_src) == last && bc_wr.data == word_t'(100 + last),
            "broadcast of granted write");
    end
    req = '0;
    @(negedge clk);

    // random offers held until granted
    for (int c = 0; c < 3000; c++) begin
      for (int p = 0; p < NPROC; p++) begin
        if (!req[p] && $urandom_range(3) == 0) begin
          req[p] = 1'b1;
          wr[p]  = '{gidx: IDX_W'($urandom_range(NGLOB - 1)), data: $urandom};
          offered++;
        end
      end
      #1;
      g = gnt;
      check((g & ~req) == '0 && $countones(g) <= 1, "grant only to a requester, one per cycle");
      check(($countones(g) == 1) == (req != '0), "bus never idle while requested");
      exp_v = 0;
      for (int p = 0; p < NPROC; p++) if (g[p]) begin
        exp_v = 1; exp_src = pid_t'(p); exp_wr = wr[p];
      end
      @(negedge clk);
      check(bc_valid == exp_v, "broadcast valid");
      if (exp_v) begin
        check(bc_src == exp_src && bc_wr == exp_wr, "broadcast content");
        broadcast++;
      end
      req = req & ~g;
    end
    while (req != '0) begin
      #1 g = gnt;
      @(negedge clk);
      if (bc_valid) broadcast++;
      req = req & ~g;
    end
    @(negedge clk);
    if (bc_valid) broadcast++;
    check(broadcast == offered, "every write broadcast once");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
