// tlap_hat: High-Address Table of the 2LAP.
//
// Each of the ENTRIES entries holds the high-order HIGH_W bits of an effective
// address and a CNT_W-bit saturating link counter that estimates how many LAT
// entries point at it. The table is fully associative for insertion and is
// read by index for prediction.
//
// Ports and timing
//   * Two combinational read ports by index: pred_idx_i -> pred_high_o (the
//     prediction path) and upd_idx_i -> upd_high_o (the update path, used to
//     rebuild the address that the entry predicted).
//   * One update per clock, made of an optional decrement and an optional
//     insertion, applied in that order:
//       dec_en_i/dec_idx_i : the link counter of entry dec_idx_i drops by one
//                            (saturating at zero), when a LAT entry leaves it.
//       ins_en_i/ins_high_i: INSERT(HAT, high). The high bits are searched in
//                            all entries. On a hit the counter of the matching
//                            entry rises by one (saturating). On a miss an
//                            empty entry (counter zero, after this cycle's
//                            decrement) is reused, else a random entry other
//                            than the MRU one is evicted; the entry gets the
//                            new bits and a counter of one.
//     ins_idx_o, ins_hit_o, ins_empty_o and ins_random_o are combinational and
//     give the entry the LAT should link to; the table changes at the next
//     rising clock edge, when the inserted entry also becomes the MRU one.
//   LAT entries that point at an evicted entry are not told: the design accepts
//   such stale links because a wrong prediction is recovered anyway.
//
// The entry layout, link counters, empty-entry reuse and no-MRU replacement
// follow the design description. Fully associative search with no hash, the
// lowest index winning when several entries match, "used" meaning "linked by
// an insertion" for the MRU register, and reset clearing all entries are this
// design's choices.
module tlap_hat
  import tlap_pkg::*;
#(
  parameter int unsigned ENTRIES = 64,
  parameter int unsigned HIGH_W  = 50,
  parameter int unsigned CNT_W   = 3,
  parameter int unsigned IDX_W   = idx_w(ENTRIES)
) (
  input  logic              clk,
  input  logic              rst_n,
  // prediction read port
  input  logic [IDX_W-1:0]  pred_idx_i,
  output logic [HIGH_W-1:0] pred_high_o,
  // update read port
  input  logic [IDX_W-1:0]  upd_idx_i,
  output logic [HIGH_W-1:0] upd_high_o,
  // link-counter decrement
  input  logic              dec_en_i,
  input  logic [IDX_W-1:0]  dec_idx_i,
  // insertion
  input  logic              ins_en_i,
  input  logic [HIGH_W-1:0] ins_high_i,
  output logic [IDX_W-1:0]  ins_idx_o,
  output logic              ins_hit_o,
  output logic              ins_empty_o,
  output logic              ins_random_o,
  // state, for observation
  output logic [IDX_W-1:0]  mru_o
);

  localparam logic [CNT_W-1:0] CNT_MAX = '1;

  logic [HIGH_W-1:0] high_q  [ENTRIES];
  logic [CNT_W-1:0]  links_q [ENTRIES];
  logic [IDX_W-1:0]  mru_q;

  logic [CNT_W-1:0]  links_dec [ENTRIES];
  logic [ENTRIES-1:0] match, empty;
  logic [IDX_W-1:0]  hit_idx, victim_idx;
  logic              hit, empty_found;
  logic [15:0]       rnd;
  logic              rnd_step;

  assign pred_high_o = high_q[pred_idx_i];
  assign upd_high_o  = high_q[upd_idx_i];
  assign mru_o       = mru_q;

  // Counters after this cycle's decrement; empty entries are judged on these.
  always_comb begin
    for (int unsigned k = 0; k < ENTRIES; k++) begin
      links_dec[k] = links_q[k];
      if (dec_en_i && dec_idx_i == IDX_W'(k) && links_q[k] != '0)
        links_dec[k] = links_q[k] - CNT_W'(1);
      match[k] = high_q[k] == ins_high_i;
      empty[k] = links_dec[k] == '0;
    end
  end

  always_comb begin
    hit_idx = '0;
    for (int k = ENTRIES - 1; k >= 0; k--)
      if (match[k]) hit_idx = IDX_W'(k);
  end
  assign hit = |match;

  tlap_hat_victim #(.ENTRIES(ENTRIES), .IDX_W(IDX_W)) u_victim (
    .empty_i       (empty),
    .mru_i         (mru_q),
    .rnd_i         (rnd),
    .victim_o      (victim_idx),
    .empty_found_o (empty_found)
  );

  assign rnd_step = ins_en_i && !hit && !empty_found;

  tlap_lfsr u_lfsr (
    .clk     (clk),
    .rst_n   (rst_n),
    .step_i  (rnd_step),
    .value_o (rnd)
  );

  assign ins_idx_o    = hit ? hit_idx : victim_idx;
  assign ins_hit_o    = ins_en_i && hit;
  assign ins_empty_o  = ins_en_i && !hit && empty_found;
  assign ins_random_o = rnd_step;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned k = 0; k < ENTRIES; k++) begin
        high_q[k]  <= '0;
        links_q[k] <= '0;
      end
      mru_q <= '0;
    end else begin
      for (int unsigned k = 0; k < ENTRIES; k++) links_q[k] <= links_dec[k];
      if (ins_en_i) begin
        if (hit) begin
          if (links_dec[hit_idx] != CNT_MAX)
            links_q[hit_idx] <= links_dec[hit_idx] + CNT_W'(1);
        end else begin
          high_q[victim_idx]  <= ins_high_i;
          links_q[victim_idx] <= CNT_W'(1);
        end
        mru_q <= ins_idx_o;
      end
    end
  end

  // Exactly one outcome for every insertion.
  always_comb
    if (ins_en_i)
      assert ($onehot({ins_hit_o, ins_empty_o, ins_random_o}))
        else $error("tlap_hat: insertion outcome not unique");

  // The no-MRU rule: a random eviction never hits the MRU entry.
  always_comb
    if (ins_random_o && ENTRIES > 1)
      assert (victim_idx != mru_q) else $error("tlap_hat: evicted the MRU entry");

endmodule
