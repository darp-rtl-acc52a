// tept: Timing Error Prediction Table.
//
// A small content-addressable table of instruction addresses that caused a
// timing error. Each entry holds a program counter tag and a mask with one
// bit per pipe stage, marking the stages in which that instruction failed.
//
// Lookup (combinational, used by the decode stage): lk_pc is compared with
// every valid tag; on a match lk_hit is raised and lk_mask gives the stages
// in which the instruction must be given a second cycle.
//
// Insert (one per clock, from error detection): when ins_valid is high at a
// rising clk edge, ins_pc and ins_stage are recorded. If the PC is already
// present only its stage bit is added. Otherwise the lowest-numbered free
// entry is used while the table is filling; once it is full the victim is
// chosen by a binary-tree pseudo-LRU, and evict pulses for that insert.
// Lookup hits and inserts both mark their entry most recently used.
//
// The table contents, the CAM organisation, insertion on every detected
// error and pseudo-LRU replacement follow the design description, as does
// the 4K-entry default size. The per-stage mask, the tree form of the
// pseudo-LRU, free-entry-first filling and the single lookup port (the
// surrounding pipeline carries one instruction per stage) are this
// implementation's choices. ENTRIES must be a power of two.
module tept
  import darp_pkg::*;
#(
  parameter int unsigned ENTRIES = 4096,
  parameter int unsigned PCW     = PC_W,
  parameter int unsigned P       = P_STAGES,
  localparam int unsigned IW     = $clog2(ENTRIES),
  localparam int unsigned SW     = $clog2(P)
) (
  input  logic           clk,
  input  logic           rst_n,
  // lookup port (decode)
  input  logic [PCW-1:0] lk_pc,
  output logic           lk_hit,
  output logic [P-1:0]   lk_mask,
  // insert port (error detection)
  input  logic           ins_valid,
  input  logic [PCW-1:0] ins_pc,
  input  logic [SW-1:0]  ins_stage,
  // status
  output logic           full,
  output logic           evict
);

  logic [ENTRIES-1:0] valid;
  logic [PCW-1:0]     tag  [ENTRIES];
  logic [P-1:0]       smask[ENTRIES];
  // Tree pseudo-LRU bits, heap order, node 1 is the root (bit 0 unused).
  // A node bit of 0 means the colder half is the left subtree.
  logic [ENTRIES-1:0] plru, plru_nxt;
  logic [IW:0]        used;

  // ---------------- lookup and insert match ----------------
  // Tags are unique, so at most one entry matches each search key.
  logic [IW-1:0] lk_idx;
  logic          ins_hit;
  logic [IW-1:0] ins_hit_idx, free_idx, victim_idx, ins_idx;
  logic          have_free;

  always_comb begin
    lk_hit      = 1'b0;
    lk_mask     = '0;
    lk_idx      = '0;
    ins_hit     = 1'b0;
    ins_hit_idx = '0;
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      if (valid[i] && tag[i] == lk_pc) begin
        lk_hit  = 1'b1;
        lk_mask = smask[i];
        lk_idx  = IW'(i);
      end
      if (valid[i] && tag[i] == ins_pc) begin
        ins_hit     = 1'b1;
        ins_hit_idx = IW'(i);
      end
    end
  end

  // Lowest-numbered free entry.
  always_comb begin
    have_free = 1'b0;
    free_idx  = '0;
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      if (!have_free && !valid[i]) begin
        have_free = 1'b1;
        free_idx  = IW'(i);
      end
    end
  end

  // Follow the node bits from the root to the coldest leaf.
  always_comb begin
    int unsigned node;
    node = 1;
    for (int unsigned lvl = 0; lvl < IW; lvl++) begin
      node = 2 * node + (plru[node] ? 1 : 0);
    end
    victim_idx = IW'(node - ENTRIES);
  end

  always_comb begin
    if (ins_hit)        ins_idx = ins_hit_idx;
    else if (have_free) ins_idx = free_idx;
    else                ins_idx = victim_idx;
  end

  // Make each node on the path to a touched leaf point away from it.
  always_comb begin
    int unsigned node;
    node     = 0;
    plru_nxt = plru;
    if (lk_hit) begin
      node = ENTRIES + int'(lk_idx);
      for (int unsigned lvl = 0; lvl < IW; lvl++) begin
        plru_nxt[node >> 1] = ~node[0];
        node = node >> 1;
      end
    end
    if (ins_valid) begin
      node = ENTRIES + int'(ins_idx);
      for (int unsigned lvl = 0; lvl < IW; lvl++) begin
        plru_nxt[node >> 1] = ~node[0];
        node = node >> 1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
      plru  <= '0;
      used  <= '0;
      evict <= 1'b0;
    end else begin
      plru  <= plru_nxt;
      evict <= ins_valid && !ins_hit && !have_free;
      if (ins_valid) begin
        valid[ins_idx] <= 1'b1;
        if (!ins_hit && have_free) used <= used + 1'b1;
      end
    end
  end

  // Table storage: one write per cycle, no reset needed because valid
  // guards every read.
  always_ff @(posedge clk) begin
    if (ins_valid) begin
      tag[ins_idx] <= ins_pc;
      if (ins_hit) smask[ins_idx] <= smask[ins_idx] | (P'(1) << ins_stage);
      else         smask[ins_idx] <= P'(1) << ins_stage;
    end
  end

  assign full = (used == (IW+1)'(ENTRIES));

  // The stage index of an insert must name a real stage.
  assert property (@(posedge clk) disable iff (!rst_n)
                   ins_valid |-> (int'(ins_stage) < P))
    else $error("tept: insert with stage index out of range");

endmodule
