// tlap_lfsr: pseudo-random source for the HAT no-MRU replacement.
//
// A 16-bit Galois LFSR with the maximal-length polynomial
// x^16 + x^14 + x^13 + x^11 + 1 (feedback mask 16'hB400). It advances one step
// on each cycle where step_i is high and restarts from SEED on reset. The
// design description asks only for a random choice; the LFSR, its polynomial
// and advancing it only when a random replacement is made are this design's
// choices (the last makes the sequence of victims reproducible).
module tlap_lfsr #(
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        step_i,
  output logic [15:0] value_o
);

  logic [15:0] state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      state <= SEED;
    else if (step_i) state <= state[0] ? ((state >> 1) ^ 16'hB400) : (state >> 1);
  end

  assign value_o = state;

  initial assert (SEED != '0) else $error("tlap_lfsr: SEED must be non-zero");

endmodule
