// mpfifo: first-in first-out queue that accepts up to NPUSH entries per cycle
// and delivers one.
//
// Entries pushed in one cycle enter in port order (port 0 first). space is the
// number of free entries, so a producer can check room for all its ports
// before pushing. Pushes beyond the free room are dropped and flagged on ovf.
// The head is shown combinationally on out_valid/out_data and leaves when
// out_ready is high. Updates at the rising clock edge; reset empties the queue.
module mpfifo #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 8,
  parameter int unsigned NPUSH = 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NPUSH-1:0]       in_valid,
  input  logic [NPUSH-1:0][W-1:0] in_data,
  output logic [$clog2(DEPTH+1)-1:0] space,
  output logic                   ovf,
  output logic                   out_valid,
  output logic [W-1:0]           out_data,
  input  logic                   out_ready
);

  localparam int unsigned PW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [W-1:0]  mem [DEPTH];
  logic [PW-1:0] rd_ptr;
  logic [CW-1:0] count;

  logic          pop;
  assign pop       = out_valid && out_ready;
  assign out_valid = count != '0;
  assign out_data  = mem[rd_ptr];
  assign space     = CW'(DEPTH) - count;

  // positions of the accepted pushes
  logic [NPUSH-1:0]          acc;
  logic [NPUSH-1:0][PW-1:0]  wpos;
  logic [CW-1:0]             npush;

  always_comb begin
    logic [CW:0] n;
    n   = '0;
    ovf = 1'b0;
    for (int p = 0; p < NPUSH; p++) begin
      acc[p]  = 1'b0;
      wpos[p] = PW'((int'(rd_ptr) + int'(count) + int'(n)) % DEPTH);
      if (in_valid[p]) begin
        if (int'(count) + int'(n) < DEPTH) begin
          acc[p] = 1'b1;
          n      = n + 1'b1;
        end else begin
          ovf = 1'b1;
        end
      end
    end
    npush = CW'(n);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (pop) rd_ptr <= PW'((int'(rd_ptr) + 1) % DEPTH);
      count <= count + npush - CW'(pop);
    end
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < NPUSH; p++) begin
      if (acc[p]) mem[wpos[p]] <= in_data[p];
    end
  end

endmodule
