// rr_arb: round-robin arbiter over N requesters.
//
// gnt is one-hot among req (or zero when nothing is requested). The requester
// after the last one granted has the highest priority; the priority pointer
// moves only when adv is high and a grant is made, so a caller whose grant was
// not used can hold its place. Combinational grant, pointer updated at the
// rising clock edge, reset to requester 0 first.
module rr_arb #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         adv,
  output logic [N-1:0] gnt,
  output logic [$clog2(N > 1 ? N : 2)-1:0] gnt_idx
);

  localparam int unsigned IW = $clog2(N > 1 ? N : 2);
  logic [IW-1:0] last;

  always_comb begin
    gnt     = '0;
    gnt_idx = '0;
    for (int i = N; i >= 1; i--) begin
      automatic logic [IW-1:0] c = IW'((int'(last) + i) % N);
      if (req[c]) begin
        gnt     = '0;
        gnt[c]  = 1'b1;
        gnt_idx = IW'(c);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            last <= IW'(N - 1);
    else if (adv && |req)  last <= gnt_idx;
  end

endmodule
