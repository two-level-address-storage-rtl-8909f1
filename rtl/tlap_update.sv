// tlap_update: LAT and HAT management of the 2LAP for one executed load
// (combinational).
//
// Inputs are the load's PC tag and computed address, the LAT entry at the
// load's index (tag, confidence, chunk_id, low bits, link), the high bits held
// by the HAT entry that the LAT entry links to, and the HAT's answer to this
// cycle's insertion. Outputs are the new LAT entry, the HAT commands
// (decrement a link counter, insert high bits) and event flags.
//
// Behaviour, B = b low-order bits, conf = two-bit saturating counter:
//   * Tag miss (always allocate): if the old entry was predictable (conf > 1)
//     its HAT link counter is decremented. The entry takes the new tag,
//     conf = 1, chunk_id = 0 and the low B bits. No HAT entry is allocated:
//     a new load starts as unpredictable (HAT allocations are filtered).
//   * Tag hit, predictable (conf > 1): the predicted address is rebuilt as
//     {HAT high bits, LAT low bits}. Equal to the computed address: conf + 1.
//     Otherwise conf - 1, and
//       - 2 -> 1 (becomes unpredictable): the link is broken (HAT counter
//         decremented) and the entry keeps the lowest chunk in which the
//         computed and predicted addresses differ, with its chunk_id;
//       - 3 -> 2 (still predictable): the low bits are replaced; if the high
//         bits changed, the old HAT counter is decremented and the new high
//         bits are inserted and linked.
//   * Tag hit, unpredictable (conf <= 1): the chunk chunk_id of the computed
//     address is compared with the stored chunk; equal: conf + 1, else
//     conf - 1; the stored chunk becomes the new one. On 1 -> 2 the entry goes
//     back to chunk 0 (the low B bits), and the high bits are inserted into the
//     HAT and linked.
// Rebuilding the predicted address at update time (instead of carrying it
// from the prediction), refreshing the stored low bits/chunk on every update
// and the HAT insertion on a 3 -> 2 update whose high bits changed are this
// design's reading of the description's "updates the LAT like the base
// predictor" and "update due to a change in the high-order portion"; the rest
// follows the description's update procedure.
module tlap_update
  import tlap_pkg::*;
#(
  parameter int unsigned B       = 14,
  parameter int unsigned TAG_W   = 5,
  parameter int unsigned HAT_ENTRIES = 64,
  parameter int unsigned LINK_W  = idx_w(HAT_ENTRIES),
  parameter int unsigned NCH     = num_chunks(B),
  parameter int unsigned CID_W   = idx_w(NCH)
) (
  input  logic [TAG_W-1:0]    req_tag_i,
  input  logic [ADDR_W-1:0]   addr_i,
  // current LAT entry
  input  logic [TAG_W-1:0]    e_tag_i,
  input  conf_t               e_conf_i,
  input  logic [CID_W-1:0]    e_cid_i,
  input  logic [B-1:0]        e_low_i,
  input  logic [LINK_W-1:0]   e_link_i,
  // HAT entry the LAT entry links to
  input  logic [ADDR_W-B-1:0] hat_high_i,
  // HAT insertion result
  input  logic [LINK_W-1:0]   ins_idx_i,
  // new LAT entry
  output logic [TAG_W-1:0]    n_tag_o,
  output conf_t               n_conf_o,
  output logic [CID_W-1:0]    n_cid_o,
  output logic [B-1:0]        n_low_o,
  output logic [LINK_W-1:0]   n_link_o,
  // HAT commands
  output logic                dec_en_o,
  output logic [LINK_W-1:0]   dec_idx_o,
  output logic                ins_en_o,
  output logic [ADDR_W-B-1:0] ins_high_o,
  // events
  output logic                lat_miss_o,
  output logic                predicted_o,
  output logic                correct_o,
  output logic                to_unpred_o,
  output logic                to_pred_o,
  output logic                chunk_moved_o
);

  localparam int unsigned HIGH_W = ADDR_W - B;

  logic [ADDR_W-1:0] pred_addr;
  logic [B-1:0]      sel_chunk, dif_chunk;
  logic [CID_W-1:0]  dif_id;
  logic              differ;
  logic [HIGH_W-1:0] addr_high;
  logic [B-1:0]      addr_low;
  conf_t             conf_up, conf_dn;

  assign pred_addr = {hat_high_i, e_low_i};
  assign addr_high = addr_i[ADDR_W-1:B];
  assign addr_low  = addr_i[B-1:0];
  assign conf_up   = conf_inc(e_conf_i);
  assign conf_dn   = conf_dec(e_conf_i);

  tlap_chunk_unit #(.B(B), .NCH(NCH), .CID_W(CID_W)) u_chunk (
    .addr_i      (addr_i),
    .ref_i       (pred_addr),
    .sel_id_i    (e_cid_i),
    .sel_chunk_o (sel_chunk),
    .dif_id_o    (dif_id),
    .dif_chunk_o (dif_chunk),
    .differ_o    (differ)
  );

  always_comb begin
    n_tag_o       = e_tag_i;
    n_conf_o      = e_conf_i;
    n_cid_o       = e_cid_i;
    n_low_o       = e_low_i;
    n_link_o      = e_link_i;
    dec_en_o      = 1'b0;
    dec_idx_o     = e_link_i;
    ins_en_o      = 1'b0;
    ins_high_o    = addr_high;
    lat_miss_o    = 1'b0;
    predicted_o   = 1'b0;
    correct_o     = 1'b0;
    to_unpred_o   = 1'b0;
    to_pred_o     = 1'b0;
    chunk_moved_o = 1'b0;

    if (e_tag_i != req_tag_i) begin
      lat_miss_o = 1'b1;
      dec_en_o   = e_conf_i >= CONF_PRED;
      n_tag_o    = req_tag_i;
      n_conf_o   = CONF_ALLOC;
      n_cid_o    = '0;
      n_low_o    = addr_low;
    end else if (e_conf_i >= CONF_PRED) begin
      predicted_o = 1'b1;
      if (!differ) begin
        correct_o = 1'b1;
        n_conf_o  = conf_up;
      end else begin
        n_conf_o = conf_dn;
        if (conf_dn < CONF_PRED) begin
          to_unpred_o   = 1'b1;
          dec_en_o      = 1'b1;
          n_cid_o       = dif_id;
          n_low_o       = dif_chunk;
          chunk_moved_o = dif_id != '0;
        end else begin
          n_low_o = addr_low;
          if (addr_high != hat_high_i) begin
            dec_en_o = 1'b1;
            ins_en_o = 1'b1;
            n_link_o = ins_idx_i;
          end
        end
      end
    end else begin
      n_conf_o = (sel_chunk == e_low_i) ? conf_up : conf_dn;
      n_low_o  = sel_chunk;
      if (n_conf_o >= CONF_PRED) begin
        to_pred_o = 1'b1;
        n_cid_o   = '0;
        n_low_o   = addr_low;
        ins_en_o  = 1'b1;
        n_link_o  = ins_idx_i;
      end
    end
  end

endmodule
