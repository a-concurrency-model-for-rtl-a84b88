// gwbus: global write bus.
//
// Every processor keeps its own copy of the $G window. A write to it is made
// locally at once and also offered here; this bus grants one processor per
// cycle, round-robin, and one cycle later broadcasts the granted write, with
// its source, to all processors. Receivers skip their own broadcasts (their
// copy was written already). A requester holds req and wr until gnt. The
// blocking read on every register keeps readers on other processors from
// seeing a value before it arrives. Round-robin order and the one-cycle
// broadcast delay are this design's choices.
module gwbus
  import mt_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NPROC-1:0]  req,
  input  gwr_t [NPROC-1:0]  wr,
  output logic [NPROC-1:0]  gnt,
  output logic              bc_valid,
  output pid_t              bc_src,
  output gwr_t              bc_wr
);

  pid_t gidx;

  rr_arb #(.N(NPROC)) u_arb (
    .clk, .rst_n, .req, .adv(1'b1), .gnt, .gnt_idx(gidx)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bc_valid <= 1'b0;
    else        bc_valid <= |req;
  end

  always_ff @(posedge clk) begin
    if (|req) begin
      bc_src <= gidx;
      bc_wr  <= wr[gidx];
    end
  end

endmodule
