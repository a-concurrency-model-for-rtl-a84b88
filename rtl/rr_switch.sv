// rr_switch: n x n switch between processors, used for remote register read
// requests and for the data returned by them.
//
// Every input offers one packet with its destination port. Each output has a
// round-robin arbiter over the inputs that address it and a one-entry output
// register: a packet moves into the register when the register is empty or is
// being emptied in the same cycle, and the winning input sees in_ready. So a
// packet crosses the switch in one cycle, every output can take one packet per
// cycle, and different outputs work in parallel. out_src tells which input
// a packet came from. Valid/ready handshake on both sides: a packet is
// transferred in a cycle where valid and ready are both high, and an offered
// packet must be held until it is taken. The switch structure is this design's
// own; the model only asks for an n x n switching network.
module rr_switch #(
  parameter int unsigned N = 4,
  parameter int unsigned W = 8
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [N-1:0]                 in_valid,
  input  logic [N-1:0][$clog2(N)-1:0]  in_dst,
  input  logic [N-1:0][W-1:0]          in_data,
  output logic [N-1:0]                 in_ready,
  output logic [N-1:0]                 out_valid,
  output logic [N-1:0][$clog2(N)-1:0]  out_src,
  output logic [N-1:0][W-1:0]          out_data,
  input  logic [N-1:0]                 out_ready
);

  localparam int unsigned IW = $clog2(N);

  logic [N-1:0][N-1:0] req;     // [output][input]
  logic [N-1:0][N-1:0] gnt;
  logic [N-1:0][IW-1:0] gidx;
  logic [N-1:0]        load;

  always_comb begin
    for (int o = 0; o < N; o++) begin
      for (int i = 0; i < N; i++) begin
        req[o][i] = in_valid[i] && in_dst[i] == IW'(o);
      end
    end
  end

  for (genvar o = 0; o < N; o++) begin : g_out
    rr_arb #(.N(N)) u_arb (
      .clk, .rst_n, .req(req[o]), .adv(load[o]), .gnt(gnt[o]), .gnt_idx(gidx[o])
    );
    assign load[o] = (|req[o]) && (!out_valid[o] || out_ready[o]);
  end

  always_comb begin
    for (int i = 0; i < N; i++) begin
      in_ready[i] = 1'b0;
      for (int o = 0; o < N; o++) begin
        if (load[o] && gnt[o][i]) in_ready[i] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= '0;
    end else begin
      for (int o = 0; o < N; o++) begin
        if (load[o])            out_valid[o] <= 1'b1;
        else if (out_ready[o])  out_valid[o] <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int o = 0; o < N; o++) begin
      if (load[o]) begin
        out_data[o] <= in_data[gidx[o]];
        out_src[o]  <= gidx[o];
      end
    end
  end

  // an offered packet must stay until taken; checked from the first cycle
  // after reset (a flag keeps rst_n purely asynchronous)
  logic chk_on;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) chk_on <= 1'b0;
    else        chk_on <= 1'b1;
  end

  for (genvar i = 0; i < N; i++) begin : g_chk
    a_hold: assert property (@(posedge clk) disable iff (!chk_on)
      in_valid[i] && !in_ready[i] |=> in_valid[i] && $stable(in_data[i]) && $stable(in_dst[i]));
  end

endmodule
