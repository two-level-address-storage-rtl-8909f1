// tlap_lat: storage array of the Low-Address Table.
//
// ENTRIES words of W bits, direct mapped, with two synchronous read ports (one
// for the prediction path, one for the update path) and one write port. Read
// data appear on the clock edge after the read request; a read and a write of
// the same word in the same cycle return the old word (the 2LAP top forwards
// the new word itself). The entry fields (tag, confidence counter, chunk_id,
// low address, link) are packed and interpreted by tlap_top.
//
// After reset the array is cleared one word per cycle; init_busy_o is high
// during those ENTRIES cycles and the write port is ignored. A cleared entry
// has a zero confidence counter, so it never predicts and owns no HAT link.
// The table and its two users follow the design description; the port
// structure and the clearing sweep are this design's choices (the description
// says nothing about reset).
module tlap_lat
  import tlap_pkg::*;
#(
  parameter int unsigned ENTRIES = 4096,
  parameter int unsigned W       = 30,
  parameter int unsigned IDX_W   = idx_w(ENTRIES)
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic             init_busy_o,
  // read port 0 (prediction)
  input  logic             rd0_en_i,
  input  logic [IDX_W-1:0] rd0_idx_i,
  output logic [W-1:0]     rd0_data_o,
  // read port 1 (update)
  input  logic             rd1_en_i,
  input  logic [IDX_W-1:0] rd1_idx_i,
  output logic [W-1:0]     rd1_data_o,
  // write port
  input  logic             we_i,
  input  logic [IDX_W-1:0] widx_i,
  input  logic [W-1:0]     wdata_i
);

  logic [W-1:0]     mem [ENTRIES];
  logic             busy_q;
  logic [IDX_W-1:0] sweep_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q  <= 1'b1;
      sweep_q <= '0;
    end else if (busy_q) begin
      sweep_q <= IDX_W'(sweep_q + IDX_W'(1));
      if (sweep_q == IDX_W'(ENTRIES - 1)) busy_q <= 1'b0;
    end
  end

  assign init_busy_o = busy_q;

  always_ff @(posedge clk) begin
    if (busy_q)    mem[sweep_q] <= '0;
    else if (we_i) mem[widx_i]  <= wdata_i;
    if (rd0_en_i) rd0_data_o <= mem[rd0_idx_i];
    if (rd1_en_i) rd1_data_o <= mem[rd1_idx_i];
  end

endmodule
