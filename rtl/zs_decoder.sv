// zs_decoder: zero-sum error correction unit (combinational).
//
// The received data field is re-encoded (a zs_encoder instance) and the
// syndrome is the received check value minus the recomputed one, a signed
// integer. A syndrome of 0 means no error. Otherwise its magnitude names the
// index weight of the bit that flipped: a non-power-of-two magnitude points at
// a data bit, a power of two at a check bit, and that bit is inverted. A
// non-zero magnitude that is no bit's weight cannot come from a single-bit
// error and is reported as uncorrectable (a detected multi-bit error), with the
// word passed on unchanged.
//
// Interface: codeword_i = {data, check} in; corrected data_o and check_o out;
// syndrome_o (signed, CHECK_W+1 bits); err_o (syndrome non-zero),
// corrected_o (one bit was inverted), uncorrectable_o (err_o and no bit
// matches). No clock. The syndrome rule and the bit inversion follow the
// zero-sum code; the uncorrectable flag for unmatched syndromes is this
// design's choice, and a double error whose syndrome magnitude happens to equal
// another bit's weight is miscorrected as the code's 1-bit-correct mode implies.
module zs_decoder
  import zs_pkg::*;
#(
  parameter int unsigned DATA_W  = DATA_W_DEFAULT,
  parameter int unsigned CHECK_W = check_width(DATA_W),
  localparam int unsigned CW_W   = DATA_W + CHECK_W
) (
  input  logic [DATA_W+CHECK_W-1:0] codeword_i,
  output logic [DATA_W-1:0]         data_o,
  output logic [CHECK_W-1:0]        check_o,
  output logic signed [CHECK_W:0]   syndrome_o,
  output logic                      err_o,
  output logic                      corrected_o,
  output logic                      uncorrectable_o
);

  logic [DATA_W-1:0]  rx_data;
  logic [CHECK_W-1:0] rx_check;
  logic [CHECK_W-1:0] recomputed;
  logic [CW_W-1:0]    recomputed_word;
  logic [CHECK_W:0]   magnitude;
  logic [DATA_W-1:0]  data_hit;
  logic [CHECK_W-1:0] check_hit;

  assign {rx_data, rx_check} = codeword_i;

  zs_encoder #(.DATA_W(DATA_W), .CHECK_W(CHECK_W)) u_recompute (
    .data_i     (rx_data),
    .check_o    (recomputed),
    .codeword_o (recomputed_word)
  );

  assign syndrome_o = signed'({1'b0, rx_check}) - signed'({1'b0, recomputed});
  assign magnitude  = syndrome_o[CHECK_W] ? -syndrome_o : syndrome_o;

  // One comparator per bit against that bit's index weight.
  for (genvar i = 0; i < DATA_W; i++) begin : g_data_hit
    localparam logic [CHECK_W:0] W = (CHECK_W+1)'(data_weight(i));
    assign data_hit[i] = (magnitude == W);
  end
  for (genvar k = 0; k < CHECK_W; k++) begin : g_check_hit
    localparam logic [CHECK_W:0] W = (CHECK_W+1)'(1) << k;
    assign check_hit[k] = (magnitude == W);
  end

  always_comb begin
    err_o           = (syndrome_o != '0);
    corrected_o     = err_o && ((|data_hit) || (|check_hit));
    uncorrectable_o = err_o && !corrected_o;
    data_o          = rx_data ^ data_hit;
    check_o         = rx_check ^ check_hit;
  end

endmodule
