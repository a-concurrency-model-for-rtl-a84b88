// lrf: local register file of one processor, with a blocking read on every
// register.
//
// Each of the NREGS registers is a restricted i-structure: a data word, a
// full/empty tag and room for one suspended continuation. A read of a full
// register returns its value. A read of an empty register may park one
// continuation in it (a local thread slot, or a remote request tag); the next
// write fills the register, clears the continuation and reports it on the
// write port's wake output in the same cycle, so the owner can reactivate the
// thread or send the data to the remote processor. Only one continuation per
// register is kept: the program must not let two readers wait on one register.
//
// The eight ports follow the model's list: two pipeline reads and one pipeline
// write, a write for decoupled memory loads, a write for the register
// allocation unit, a remote read and a remote write for $D/$S traffic, and a
// write from the global write bus. The RAU port initialises a whole thread
// frame at once: every register of frame ra_slot becomes empty except the first
// ($L0), which is written with the thread index. A pipeline write with
// pw_empty set marks a register empty (a load has been issued to it).
//
// Timing: reads and the full flags are combinational; every update takes effect
// at the next rising clock edge; wake outputs are combinational from the write
// ports. If two writes hit one register in a cycle, the later port in the list
// above wins. Reset empties every register and drops every continuation; data
// words are not reset. Register count, width and reset are this design's
// choices.
module lrf
  import mt_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  // pipeline reads
  input  logic [1:0]   rd_en,
  input  raddr_t [1:0] rd_addr,
  input  logic [1:0]   rd_susp,     // park rd_cont in the (empty) register
  input  cont_t        rd_cont,
  output word_t [1:0]  rd_data,
  output logic [1:0]   rd_full,
  // pipeline write
  input  logic         pw_en,
  input  logic         pw_empty,
  input  raddr_t       pw_addr,
  input  word_t        pw_data,
  // decoupled memory write
  input  logic         mw_en,
  input  raddr_t       mw_addr,
  input  word_t        mw_data,
  // RAU frame initialisation
  input  logic         ra_en,
  input  slot_t        ra_slot,
  input  word_t        ra_data,
  // remote read (serves $D requests from other processors)
  input  logic         rr_en,
  input  raddr_t       rr_addr,
  input  cont_t        rr_tag,
  output word_t        rr_data,
  output logic         rr_full,
  // remote write (fills a local $D register)
  input  logic         rw_en,
  input  raddr_t       rw_addr,
  input  word_t        rw_data,
  // global write bus
  input  logic         gw_en,
  input  raddr_t       gw_addr,
  input  word_t        gw_data,
  // continuation released by each write port: 0 pipeline, 1 memory,
  // 2 remote write, 3 global bus
  output logic [3:0]   wk_valid,
  output cont_t [3:0]  wk_cont
);

  word_t           data   [NREGS];
  logic [NREGS-1:0] full;
  logic [NREGS-1:0] cont_v;
  cont_t           cont   [NREGS];

  // Suspensions requested this cycle.
  logic [2:0]   sp_en;
  raddr_t [2:0] sp_addr;
  cont_t [2:0]  sp_cont;

  always_comb begin
    for (int k = 0; k < 2; k++) begin
      rd_data[k] = data[rd_addr[k]];
      rd_full[k] = full[rd_addr[k]];
      sp_en[k]   = rd_en[k] && rd_susp[k] && !full[rd_addr[k]];
      sp_addr[k] = rd_addr[k];
      sp_cont[k] = rd_cont;
    end
    rr_data    = data[rr_addr];
    rr_full    = full[rr_addr];
    sp_en[2]   = rr_en && !full[rr_addr];
    sp_addr[2] = rr_addr;
    sp_cont[2] = rr_tag;
  end

  // Write ports that can release a continuation.
  logic [3:0]   w_en;
  raddr_t [3:0] w_addr;
  word_t [3:0]  w_data;
  logic [3:0]   w_fill;

  always_comb begin
    w_en   = {gw_en, rw_en, mw_en, pw_en};
    w_addr = {gw_addr, rw_addr, mw_addr, pw_addr};
    w_data = {gw_data, rw_data, mw_data, pw_data};
    w_fill = {3'b111, !pw_empty};
    for (int w = 0; w < 4; w++) begin
      wk_valid[w] = 1'b0;
      wk_cont[w]  = cont[w_addr[w]];
      if (w_en[w] && w_fill[w]) begin
        if (cont_v[w_addr[w]]) begin
          wk_valid[w] = 1'b1;
        end
        // a continuation parked in this very cycle is released at once
        for (int k = 0; k < 3; k++) begin
          if (sp_en[k] && sp_addr[k] == w_addr[w]) begin
            wk_valid[w] = 1'b1;
            wk_cont[w]  = sp_cont[k];
          end
        end
      end
    end
  end

  function automatic logic in_frame(int unsigned r, slot_t s);
    return r >= NGLOB + int'(s) * FRAME && r < NGLOB + (int'(s) + 1) * FRAME;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full   <= '0;
      cont_v <= '0;
    end else begin
      for (int k = 0; k < 3; k++) begin
        if (sp_en[k]) begin
          cont_v[sp_addr[k]] <= 1'b1;
          cont[sp_addr[k]]   <= sp_cont[k];
        end
      end
      if (ra_en) begin
        for (int unsigned r = NGLOB; r < NREGS; r++) begin
          if (in_frame(r, ra_slot)) begin
            full[r]   <= (r == NGLOB + int'(ra_slot) * FRAME);
            cont_v[r] <= 1'b0;
          end
        end
      end
      for (int w = 0; w < 4; w++) begin
        if (w_en[w]) begin
          full[w_addr[w]]   <= w_fill[w];
          cont_v[w_addr[w]] <= 1'b0;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (ra_en) begin
      data[NGLOB + int'(ra_slot) * FRAME] <= ra_data;
    end
    for (int w = 0; w < 4; w++) begin
      if (w_en[w] && w_fill[w]) begin
        data[w_addr[w]] <= w_data[w];
      end
    end
  end

endmodule
