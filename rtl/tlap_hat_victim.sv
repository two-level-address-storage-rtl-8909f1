// tlap_hat_victim: chooses the HAT entry that receives new high-order bits
// after a HAT miss.
//
// First choice is an empty entry, one whose link counter is zero (no LAT entry
// points at it); the lowest-numbered empty entry is taken. When there is none,
// an entry is picked at random but never the most recently used one (no-MRU):
// r = rnd_i mod ENTRIES, and if r is the MRU entry the next entry (mod
// ENTRIES) is used instead. Both searches run in parallel and the result is
// combinational.
//
// The policy (empty first, then random but not MRU) follows the design
// description. Priority to the lowest empty index and the "MRU -> next entry"
// rule are this design's choices; the latter gives the entry after the MRU one
// twice the probability of the others. ENTRIES must be a power of two.
module tlap_hat_victim
  import tlap_pkg::*;
#(
  parameter int unsigned ENTRIES = 64,
  parameter int unsigned IDX_W   = idx_w(ENTRIES)
) (
  input  logic [ENTRIES-1:0] empty_i,   // link counter == 0, per entry
  input  logic [IDX_W-1:0]   mru_i,     // most recently used entry
  input  logic [15:0]        rnd_i,     // random bits
  output logic [IDX_W-1:0]   victim_o,
  output logic               empty_found_o
);

  logic [IDX_W-1:0] empty_idx;
  logic [IDX_W-1:0] rnd_idx;

  always_comb begin
    empty_idx = '0;
    for (int k = ENTRIES - 1; k >= 0; k--)
      if (empty_i[k]) empty_idx = IDX_W'(k);
  end

  assign empty_found_o = |empty_i;

  always_comb begin
    rnd_idx = IDX_W'(rnd_i);
    if (ENTRIES > 1 && rnd_idx == mru_i) rnd_idx = IDX_W'(rnd_idx + IDX_W'(1));
  end

  assign victim_o = empty_found_o ? empty_idx : rnd_idx;

  initial assert ((ENTRIES & (ENTRIES - 1)) == 0)
    else $error("tlap_hat_victim: ENTRIES must be a power of two");

endmodule
