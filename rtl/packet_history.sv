// packet_history: record of the data packets a switch has handled.
//
// A small fully associative table keyed by packet identity (source
// coordinates and sequence number). Each entry holds how often the switch has
// seen that packet and whether the switch has already flooded it. For the
// packet at the head of the switch (lookup inputs) it answers, without a
// clock edge:
//   - for an ordinary packet: flood_now when this encounter is the
//     THRESHOLD-th (or later) one, so the switch floods it instead of routing
//     it, which breaks loops and deadlocks of the normal rules;
//   - for a flooded copy: dup when this switch already flooded the packet, so
//     the copy is discarded; otherwise flood_now, so the copy spreads once.
// On commit the entry is updated (allocated on a miss) at the clock edge. A
// miss takes a free entry, else the entry after the last one allocated
// (round robin). The threshold of five encounters follows the description;
// the table size, the replacement order and the duplicate suppression of
// flooded copies are this design's choices (the description does not say how
// flooding ends).
module packet_history
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH     = 8,
  parameter int unsigned THRESHOLD = FLOOD_THRESHOLD_DEF
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    clear,
  input  pkt_id_t id,
  input  logic    is_flood_copy,
  output logic    flood_now,
  output logic    dup,
  input  logic    commit
);

  localparam int unsigned CW = $clog2(THRESHOLD + 1);
  localparam int unsigned IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  typedef struct packed {
    logic          valid;
    logic          flooded;
    logic [CW-1:0] count;
    pkt_id_t       id;
  } entry_t;

  entry_t        tab [DEPTH];
  logic          hit, has_free;
  logic [IW-1:0] hit_idx, free_idx, victim, wr_idx;
  logic [CW-1:0] cnt_next;

  always_comb begin
    hit      = 1'b0;
    hit_idx  = '0;
    has_free = 1'b0;
    free_idx = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (tab[i].valid && tab[i].id == id) begin
        hit     = 1'b1;
        hit_idx = IW'(i);
      end
      if (!tab[i].valid) begin
        has_free = 1'b1;
        free_idx = IW'(i);
      end
    end
    wr_idx = hit ? hit_idx : (has_free ? free_idx : victim);

    if (!hit)                                   cnt_next = CW'(1);
    else if (tab[hit_idx].count == CW'(THRESHOLD)) cnt_next = tab[hit_idx].count;
    else                                        cnt_next = tab[hit_idx].count + 1'b1;

    if (is_flood_copy) begin
      dup       = hit && tab[hit_idx].flooded;
      flood_now = !dup;
    end else begin
      dup       = 1'b0;
      flood_now = (cnt_next >= CW'(THRESHOLD));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      victim <= '0;
      for (int i = 0; i < DEPTH; i++) tab[i] <= '0;
    end else if (clear) begin
      victim <= '0;
      for (int i = 0; i < DEPTH; i++) tab[i] <= '0;
    end else if (commit) begin
      tab[wr_idx].valid   <= 1'b1;
      tab[wr_idx].id      <= id;
      tab[wr_idx].flooded <= (hit && tab[hit_idx].flooded) || flood_now;
      tab[wr_idx].count   <= is_flood_copy ? (hit ? tab[hit_idx].count : '0) : cnt_next;
      if (!hit && !has_free)
        victim <= (victim == IW'(DEPTH - 1)) ? '0 : victim + 1'b1;
    end
  end

endmodule
