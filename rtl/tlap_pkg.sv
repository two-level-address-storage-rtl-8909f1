// tlap_pkg: constants, types and small functions shared by the Two-Level
// Address Predictor (2LAP).
//
// The 2LAP predicts the effective address of a load as the last address that
// the same load computed. Addresses are split: the low-order b bits live in
// the Low-Address Table (LAT), indexed by the PC, and the high-order bits live
// in a small fully associative High-Address Table (HAT) that many LAT entries
// share through a link field.
//
// This package holds the confidence-counter type (two-bit saturating counter,
// a load is predicted when the counter is above one) and the per-update event
// record that the top level reports for statistics.
package tlap_pkg;

  // Effective and PC address width (64-bit logical addresses).
  localparam int unsigned ADDR_W = 64;

  // Two-bit saturating confidence counter.
  localparam int unsigned CONF_W = 2;
  typedef logic [CONF_W-1:0] conf_t;

  localparam conf_t CONF_MAX   = '1;
  // Counter value given to a newly allocated load (classified unpredictable).
  localparam conf_t CONF_ALLOC = conf_t'(1);
  // Lowest counter value at which a load is predicted ("greater than one").
  localparam conf_t CONF_PRED  = conf_t'(2);

  function automatic conf_t conf_inc(conf_t c);
    return (c == CONF_MAX) ? c : conf_t'(c + conf_t'(1));
  endfunction

  function automatic conf_t conf_dec(conf_t c);
    return (c == '0) ? c : conf_t'(c - conf_t'(1));
  endfunction

  // Number of non-overlapping b-bit chunks that cover an ADDR_W-bit address.
  function automatic int unsigned num_chunks(int unsigned b);
    return (ADDR_W + b - 1) / b;
  endfunction

  // Width of an index into n items, at least one bit.
  function automatic int unsigned idx_w(int unsigned n);
    return (n <= 1) ? 1 : $clog2(n);
  endfunction

  // What one update did; reported by tlap_top two cycles after the request.
  typedef struct packed {
    logic lat_miss;      // tag mismatch: entry (re)allocated, always-allocate
    logic predicted;     // the entry was in predictable state (conf > 1)
    logic correct;       // predicted and the full address matched
    logic to_unpred;     // confidence fell from 2 to 1: link broken
    logic to_pred;       // confidence rose from 1 to 2: link established
    logic chunk_moved;   // 2 -> 1 transition selected a chunk other than 0
    logic hat_insert;    // the high-order bits were searched in the HAT
    logic hat_hit;       // ... and found there
    logic hat_empty;     // ... missed, an empty HAT entry was reused
    logic hat_random;    // ... missed, a random non-MRU entry was evicted
    logic hat_dec;       // a HAT link counter was decremented
    logic bypass;        // LAT entry came from the previous update (RAW bypass)
  } upd_event_t;

endpackage
