// tlap_chunk_unit: address-chunk selection for the 2LAP classifier.
//
// An address is cut into NCH = ceil(ADDR_W/B) non-overlapping B-bit chunks;
// chunk k holds bits [k*B +: B] (the top chunk is zero-extended when B does not
// divide ADDR_W). The LAT entry of an unpredictable load keeps one chunk of its
// last address, and the chunk_id field says which one.
//
// Outputs (all combinational):
//   sel_chunk_o : chunk number sel_id_i of addr_i          (CHUNK(address, id))
//   dif_id_o    : lowest chunk number where addr_i and ref_i differ
//                 (INDEX_DIF_CHUNK); 0 when they are equal
//   dif_chunk_o : chunk number dif_id_o of addr_i
//   differ_o    : addr_i != ref_i
// The chunk layout and the "lowest differing chunk" rule follow the design
// description; returning 0 for equal addresses is this design's choice (the
// case does not arise, the function is used only after a misprediction).
module tlap_chunk_unit
  import tlap_pkg::*;
#(
  parameter int unsigned B     = 14,
  parameter int unsigned NCH   = num_chunks(B),
  parameter int unsigned CID_W = idx_w(NCH)
) (
  input  logic [ADDR_W-1:0] addr_i,
  input  logic [ADDR_W-1:0] ref_i,
  input  logic [CID_W-1:0]  sel_id_i,
  output logic [B-1:0]      sel_chunk_o,
  output logic [CID_W-1:0]  dif_id_o,
  output logic [B-1:0]      dif_chunk_o,
  output logic              differ_o
);

  localparam int unsigned EXT_W = NCH * B;

  logic [EXT_W-1:0] addr_ext, ref_ext;
  logic [B-1:0]     addr_ch [NCH];
  logic [NCH-1:0]   ch_diff;

  assign addr_ext = EXT_W'(addr_i);
  assign ref_ext  = EXT_W'(ref_i);

  always_comb begin
    for (int unsigned k = 0; k < NCH; k++) begin
      addr_ch[k] = addr_ext[k*B +: B];
      ch_diff[k] = addr_ext[k*B +: B] != ref_ext[k*B +: B];
    end
  end

  // Chunk selected by the LAT entry's chunk_id.
  always_comb begin
    sel_chunk_o = '0;
    for (int unsigned k = 0; k < NCH; k++)
      if (sel_id_i == CID_W'(k)) sel_chunk_o = addr_ch[k];
  end

  // Lowest differing chunk: scan from the top so the lowest index wins.
  always_comb begin
    dif_id_o = '0;
    for (int k = NCH - 1; k >= 0; k--)
      if (ch_diff[k]) dif_id_o = CID_W'(k);
  end

  always_comb begin
    dif_chunk_o = '0;
    for (int unsigned k = 0; k < NCH; k++)
      if (dif_id_o == CID_W'(k)) dif_chunk_o = addr_ch[k];
  end

  assign differ_o = |ch_diff;

endmodule
