// tlap_predict: prediction decision of the 2LAP (second half of the
// prediction path, combinational).
//
// Given the LAT entry read at the load's index, the tag of the load's PC and
// the high-order bits read from the HAT entry that the LAT entry links to, it
// predicts when the tags match and the confidence counter is above one. The
// predicted address is the HAT's high bits concatenated with the LAT's low
// b bits. When no prediction is made pred_addr_o still carries that
// concatenation; it is meaningful only with predicted_o high.
// The rule follows the design description's prediction procedure.
module tlap_predict
  import tlap_pkg::*;
#(
  parameter int unsigned B     = 14,
  parameter int unsigned TAG_W = 5
) (
  input  logic [TAG_W-1:0]    req_tag_i,
  input  logic [TAG_W-1:0]    e_tag_i,
  input  conf_t               e_conf_i,
  input  logic [B-1:0]        e_low_i,
  input  logic [ADDR_W-B-1:0] hat_high_i,
  output logic                predicted_o,
  output logic [ADDR_W-1:0]   pred_addr_o
);

  assign predicted_o = (e_tag_i == req_tag_i) && (e_conf_i >= CONF_PRED);
  assign pred_addr_o = {hat_high_i, e_low_i};

endmodule
