// tb_rr_switch: self-checking testbench for the n x n switch.
//
// Phase 1: a permutation (input i to output (i+1) mod N) with every output
// ready must move N packets per cycle, one cycle through the switch. Phase 2:
// random destinations and random output back-pressure; a scoreboard per
// (input, output) pair checks that every packet arrives once, in order, with
// the right source, and that each output is shared fairly.
module tb_rr_switch;

  localparam int N = 4;
  localparam int W = 16;
  localparam int IW = $clog2(N);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0]          in_valid, in_ready, out_valid, out_ready;
  logic [N-1:0][IW-1:0]  in_dst, out_src;
  logic [N-1:0][W-1:0]   in_data, out_data;

  rr_switch #(.N(N), .W(W)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // packet: {source, destination, sequence number per pair}
  int sent_seq [N][N];
  int recv_seq [N][N];
  int recv_cnt [N];
  int sent_total, recv_total;

  // receiver side
  always @(posedge clk) begin
    if (rst_n) begin
      for (int o = 0; o < N; o++) begin
        if (out_valid[o] && out_ready[o]) begin
          automatic int s = int'(out_data[o][W-1 -: IW]);
          automatic int d = int'(out_data[o][W-1-IW -: IW]);
          automatic int q = int'(out_data[o][W-1-2*IW:0]);
          check(d == o, "delivered to its destination");
          check(int'(out_src[o]) == s, "source reported");
          check(q == recv_seq[s][o], "in order, none lost");
          recv_seq[s][o] = q + 1;
          recv_cnt[o]++;
          recv_total++;
        end
      end
    end
  end

  function automatic logic [W-1:0] pkt(int s, int d, int q);
    return {IW'(s), IW'(d), (W-2*IW)'(q)};
  endfunction

  initial begin
    int cyc;
    logic [N-1:0] acc;
    in_valid = '0; in_dst = '0; in_data = '0; out_ready = '0;
    sent_total = 0; recv_total = 0;
    for (int i = 0; i < N; i++) begin
      recv_cnt[i] = 0;
      for (int j = 0; j < N; j++) begin sent_seq[i][j] = 0; recv_seq[i][j] = 0; end
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // phase 1: permutation at full rate
    out_ready = '1;
    for (int c = 0; c < 20; c++) begin
      for (int i = 0; i < N; i++) begin
        in_valid[i] = 1'b1;
        in_dst[i]   = IW'((i + 1) % N);
        in_data[i]  = pkt(i, (i + 1) % N, sent_seq[i][(i + 1) % N]);
      end
      #1 check(in_ready == '1, "permutation accepted at full rate");
      for (int i = 0; i < N; i++) if (in_ready[i]) sent_seq[i][(i + 1) % N]++;
      @(negedge clk);
    end
    in_valid = '0;
    @(negedge clk);
    check(recv_total == 20 * N, "permutation: all delivered one cycle later");
    sent_total = 20 * N;

    // phase 2: random traffic, random back-pressure
    for (int c = 0; c < 4000; c++) begin
      for (int i = 0; i < N; i++) begin
        if (!in_valid[i] && $urandom_range(2) != 0) begin
          automatic int d = $urandom_range(N - 1);
          in_valid[i] = 1'b1;
          in_dst[i]   = IW'(d);
          in_data[i]  = pkt(i, d, sent_seq[i][d]);
        end
      end
      for (int o = 0; o < N; o++) out_ready[o] = $urandom_range(3) != 0;
      #1;
      acc = in_valid & in_ready;
      for (int i = 0; i < N; i++) begin
        if (acc[i]) begin
          sent_seq[i][int'(in_dst[i])]++;
          sent_total++;
        end
      end
      @(negedge clk);
      in_valid = in_valid & ~acc;
    end
    // drain: offered packets stay until taken
    out_ready = '1;
    while (in_valid != '0) begin
      #1;
      acc = in_valid & in_ready;
      for (int i = 0; i < N; i++) begin
        if (acc[i]) begin
          sent_seq[i][int'(in_dst[i])]++;
          sent_total++;
        end
      end
      @(negedge clk);
      in_valid = in_valid & ~acc;
    end
    cyc = 0;
    while (recv_total != sent_total && cyc < 100) begin @(negedge clk); cyc++; end
    check(recv_total == sent_total, "random: every packet delivered");
    for (int o = 0; o < N; o++) check(recv_cnt[o] > 500, "random: every output used");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
