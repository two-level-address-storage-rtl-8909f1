// tlap_top: Two-Level Address Predictor (2LAP), a last-address predictor for
// load effective addresses whose address storage is split in two levels.
//
// The Low-Address Table (LAT, LAT_ENTRIES entries, direct mapped by PC bits)
// keeps per load a tag, a two-bit confidence counter, a chunk_id, B low-order
// address bits and a link to the High-Address Table (HAT, HAT_ENTRIES entries,
// fully associative), which keeps the remaining 64-B high-order bits once for
// all loads that share them, plus a link counter per entry.
//
// Index and tag: index = pc[PC_LSB +: log2(LAT_ENTRIES)], tag = the TAG_W bits
// above the index. With the defaults (4096 entries, 5 tag bits) index plus tag
// is 17 bits.
//
// Prediction port (one request per cycle, two cycles of latency):
//   cycle t   : pred_req_i with pred_pc_i
//   edge t+1  : LAT word read (first level)
//   cycle t+1 : HAT entry named by the link read, tag and confidence checked
//   edge t+2  : pred_valid_o, pred_hit_o (a prediction is made) and
//               pred_addr_o = {HAT high bits, LAT low bits} are registered.
// Update port (one executed load per cycle, two cycles of latency):
//   cycle t   : upd_req_i with upd_pc_i and the computed address upd_addr_i
//   edge t+1  : LAT word read; if the previous update wrote the same word at
//               this edge, its new value is forwarded instead (bypass)
//   cycle t+1 : tlap_update decides the new entry and the HAT commands
//   edge t+2  : LAT and HAT written; upd_valid_o and upd_event_o report what
//               happened (predicted, correct, transitions, HAT outcome).
// A prediction reads the tables as they stand; an update in flight for the
// same load is not reflected. ready_o is low while the LAT is cleared after
// reset (LAT_ENTRIES cycles); requests are ignored until then.
//
// The two tables, their fields, the prediction and update rules, link
// counters, empty-entry reuse, no-MRU replacement, filtering of HAT
// allocations and dynamic chunk selection follow the design description, as
// do the default sizes (64 HAT entries, b = 14, 3-bit link counters, 4096 LAT
// entries, 17 index+tag bits). The two-stage pipelines, the ports, the
// forwarding between back-to-back updates, PC_LSB = 2 and the reset sweep are
// this design's choices.
module tlap_top
  import tlap_pkg::*;
#(
  parameter int unsigned LAT_ENTRIES = 4096,
  parameter int unsigned HAT_ENTRIES = 64,
  parameter int unsigned B           = 14,
  parameter int unsigned TAG_W       = 5,
  parameter int unsigned CNT_W       = 3,
  parameter int unsigned PC_LSB      = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              ready_o,
  // prediction
  input  logic              pred_req_i,
  input  logic [ADDR_W-1:0] pred_pc_i,
  output logic              pred_valid_o,
  output logic              pred_hit_o,
  output logic [ADDR_W-1:0] pred_addr_o,
  // update
  input  logic              upd_req_i,
  input  logic [ADDR_W-1:0] upd_pc_i,
  input  logic [ADDR_W-1:0] upd_addr_i,
  output logic              upd_valid_o,
  output upd_event_t        upd_event_o
);

  localparam int unsigned LIDX_W = idx_w(LAT_ENTRIES);
  localparam int unsigned LINK_W = idx_w(HAT_ENTRIES);
  localparam int unsigned NCH    = num_chunks(B);
  localparam int unsigned CID_W  = idx_w(NCH);
  localparam int unsigned HIGH_W = ADDR_W - B;

  typedef struct packed {
    logic [LINK_W-1:0] link;
    logic [CID_W-1:0]  cid;
    logic [B-1:0]      low;
    conf_t             conf;
    logic [TAG_W-1:0]  tag;
  } lat_entry_t;

  localparam int unsigned LAT_W = $bits(lat_entry_t);

  function automatic logic [LIDX_W-1:0] pc_index(logic [ADDR_W-1:0] pc);
    return pc[PC_LSB +: LIDX_W];
  endfunction

  function automatic logic [TAG_W-1:0] pc_tag(logic [ADDR_W-1:0] pc);
    return pc[PC_LSB + LIDX_W +: TAG_W];
  endfunction

  logic init_busy;
  assign ready_o = !init_busy;

  // ------------------------------------------------------------------ LAT
  logic              p_rd, u_rd;
  logic [LAT_W-1:0]  p_rdata, u_rdata;
  logic              lat_we;
  logic [LIDX_W-1:0] lat_widx;
  lat_entry_t        lat_wdata;

  assign p_rd = pred_req_i && ready_o;
  assign u_rd = upd_req_i && ready_o;

  tlap_lat #(.ENTRIES(LAT_ENTRIES), .W(LAT_W), .IDX_W(LIDX_W)) u_lat (
    .clk         (clk),
    .rst_n       (rst_n),
    .init_busy_o (init_busy),
    .rd0_en_i    (p_rd),
    .rd0_idx_i   (pc_index(pred_pc_i)),
    .rd0_data_o  (p_rdata),
    .rd1_en_i    (u_rd),
    .rd1_idx_i   (pc_index(upd_pc_i)),
    .rd1_data_o  (u_rdata),
    .we_i        (lat_we),
    .widx_i      (lat_widx),
    .wdata_i     (lat_wdata)
  );

  // ------------------------------------------------------------------ HAT
  logic [LINK_W-1:0] p_link, u_link;
  logic [HIGH_W-1:0] p_high, u_high;
  logic              dec_en, ins_en;
  logic [LINK_W-1:0] dec_idx, ins_idx;
  logic [HIGH_W-1:0] ins_high;
  logic              ins_hit, ins_empty, ins_random;

  tlap_hat #(.ENTRIES(HAT_ENTRIES), .HIGH_W(HIGH_W), .CNT_W(CNT_W), .IDX_W(LINK_W)) u_hat (
    .clk          (clk),
    .rst_n        (rst_n),
    .pred_idx_i   (p_link),
    .pred_high_o  (p_high),
    .upd_idx_i    (u_link),
    .upd_high_o   (u_high),
    .dec_en_i     (dec_en),
    .dec_idx_i    (dec_idx),
    .ins_en_i     (ins_en),
    .ins_high_i   (ins_high),
    .ins_idx_o    (ins_idx),
    .ins_hit_o    (ins_hit),
    .ins_empty_o  (ins_empty),
    .ins_random_o (ins_random),
    .mru_o        ()
  );

  // ------------------------------------------------------ prediction path
  logic             p1_valid_q;
  logic [TAG_W-1:0] p1_tag_q;
  lat_entry_t       p1_entry;
  logic             p_hit;
  logic [ADDR_W-1:0] p_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p1_valid_q <= 1'b0;
      p1_tag_q   <= '0;
    end else begin
      p1_valid_q <= p_rd;
      if (p_rd) p1_tag_q <= pc_tag(pred_pc_i);
    end
  end

  assign p1_entry = lat_entry_t'(p_rdata);
  assign p_link   = p1_entry.link;

  tlap_predict #(.B(B), .TAG_W(TAG_W)) u_predict (
    .req_tag_i   (p1_tag_q),
    .e_tag_i     (p1_entry.tag),
    .e_conf_i    (p1_entry.conf),
    .e_low_i     (p1_entry.low),
    .hat_high_i  (p_high),
    .predicted_o (p_hit),
    .pred_addr_o (p_addr)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pred_valid_o <= 1'b0;
      pred_hit_o   <= 1'b0;
      pred_addr_o  <= '0;
    end else begin
      pred_valid_o <= p1_valid_q;
      pred_hit_o   <= p1_valid_q && p_hit;
      if (p1_valid_q) pred_addr_o <= p_addr;
    end
  end

  // ---------------------------------------------------------- update path
  logic              u1_valid_q;
  logic [LIDX_W-1:0] u1_idx_q;
  logic [TAG_W-1:0]  u1_tag_q;
  logic [ADDR_W-1:0] u1_addr_q;
  logic              u1_byp_q;
  lat_entry_t        u1_byp_data_q;
  lat_entry_t        u1_entry;
  lat_entry_t        u1_next;
  logic              u_dec_en, u_ins_en;
  logic              ev_lat_miss, ev_pred, ev_correct, ev_to_unpred, ev_to_pred, ev_chunk;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      u1_valid_q    <= 1'b0;
      u1_idx_q      <= '0;
      u1_tag_q      <= '0;
      u1_addr_q     <= '0;
      u1_byp_q      <= 1'b0;
      u1_byp_data_q <= '0;
    end else begin
      u1_valid_q <= u_rd;
      if (u_rd) begin
        u1_idx_q      <= pc_index(upd_pc_i);
        u1_tag_q      <= pc_tag(upd_pc_i);
        u1_addr_q     <= upd_addr_i;
        // Read-after-write: the word written at this edge is forwarded.
        u1_byp_q      <= lat_we && (lat_widx == pc_index(upd_pc_i));
        u1_byp_data_q <= lat_wdata;
      end
    end
  end

  assign u1_entry = u1_byp_q ? u1_byp_data_q : lat_entry_t'(u_rdata);
  assign u_link   = u1_entry.link;

  tlap_update #(
    .B(B), .TAG_W(TAG_W), .HAT_ENTRIES(HAT_ENTRIES), .LINK_W(LINK_W), .NCH(NCH), .CID_W(CID_W)
  ) u_update (
    .req_tag_i     (u1_tag_q),
    .addr_i        (u1_addr_q),
    .e_tag_i       (u1_entry.tag),
    .e_conf_i      (u1_entry.conf),
    .e_cid_i       (u1_entry.cid),
    .e_low_i       (u1_entry.low),
    .e_link_i      (u1_entry.link),
    .hat_high_i    (u_high),
    .ins_idx_i     (ins_idx),
    .n_tag_o       (u1_next.tag),
    .n_conf_o      (u1_next.conf),
    .n_cid_o       (u1_next.cid),
    .n_low_o       (u1_next.low),
    .n_link_o      (u1_next.link),
    .dec_en_o      (u_dec_en),
    .dec_idx_o     (dec_idx),
    .ins_en_o      (u_ins_en),
    .ins_high_o    (ins_high),
    .lat_miss_o    (ev_lat_miss),
    .predicted_o   (ev_pred),
    .correct_o     (ev_correct),
    .to_unpred_o   (ev_to_unpred),
    .to_pred_o     (ev_to_pred),
    .chunk_moved_o (ev_chunk)
  );

  // tlap_update is purely combinational: its HAT commands and the LAT write
  // only take effect when an update is in stage 1.
  assign dec_en    = u1_valid_q && u_dec_en;
  assign ins_en    = u1_valid_q && u_ins_en;
  assign lat_we    = u1_valid_q;
  assign lat_widx  = u1_idx_q;
  assign lat_wdata = u1_next;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      upd_valid_o <= 1'b0;
      upd_event_o <= '0;
    end else begin
      upd_valid_o <= u1_valid_q;
      if (u1_valid_q)
        upd_event_o <= '{
          lat_miss:    ev_lat_miss,
          predicted:   ev_pred,
          correct:     ev_correct,
          to_unpred:   ev_to_unpred,
          to_pred:     ev_to_pred,
          chunk_moved: ev_chunk,
          hat_insert:  ins_en,
          hat_hit:     ins_hit,
          hat_empty:   ins_empty,
          hat_random:  ins_random,
          hat_dec:     dec_en,
          bypass:      u1_byp_q
        };
    end
  end

endmodule
