// zs_encoder: zero-sum check-field generator (combinational).
//
// For every data bit a 2:1 selector passes the bit's index weight when the bit
// is 0 and passes 0 when the bit is 1; the selected values are added and the
// sum is the check field. With the default DATA_W = 4 the selectors carry the
// weights 3, 5, 6, 7 (data bits 0..3) and the check field is five bits wide,
// weights 1..16, exactly the selector-and-adder-tree encoder of the 4-bit
// zero-sum code. The sum is formed as a balanced tree of additions: pairs of
// selector outputs first, then pairs of partial sums.
//
// Interface: data_i (DATA_W bits) in, check_o (CHECK_W bits) out,
// codeword_o = {data_i, check_o}. No clock; one combinational path.
// Wider data words use the same weight rule (see zs_pkg); that generalisation
// is this design's, the published examples stop at four bits.
module zs_encoder
  import zs_pkg::*;
#(
  parameter int unsigned DATA_W  = DATA_W_DEFAULT,
  parameter int unsigned CHECK_W = check_width(DATA_W)
) (
  input  logic [DATA_W-1:0]         data_i,
  output logic [CHECK_W-1:0]        check_o,
  output logic [DATA_W+CHECK_W-1:0] codeword_o
);

  // Tree leaves padded to a power of two; unused leaves are 0.
  localparam int unsigned LEAVES = (DATA_W < 2) ? 2 : (1 << $clog2(DATA_W));

  logic [CHECK_W-1:0] node [2*LEAVES-1];

  // Selectors: weight when the data bit is 0, otherwise 0.
  for (genvar i = 0; i < LEAVES; i++) begin : g_sel
    if (i < DATA_W) begin : g_bit
      localparam logic [CHECK_W-1:0] W = CHECK_W'(data_weight(i));
      assign node[LEAVES-1+i] = data_i[i] ? '0 : W;
    end else begin : g_pad
      assign node[LEAVES-1+i] = '0;
    end
  end

  // Adder tree: node n = node 2n+1 + node 2n+2; node 0 is the root.
  for (genvar n = 0; n < LEAVES - 1; n++) begin : g_add
    assign node[n] = node[2*n+1] + node[2*n+2];
  end

  assign check_o    = node[0];
  assign codeword_o = {data_i, check_o};

endmodule
