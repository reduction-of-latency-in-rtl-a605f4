// zs_source: sender-side source register of the channel.
//
// The source takes one data word from the local, synchronous side and holds it
// steady for the whole four-phase transfer. While enable_i is 1 and no
// transfer is in flight, in_ready_o is high and a word offered with in_valid_i
// is captured; req_o then stays high, with the word on data_o, until the
// converter reports the end of the handshake (done_i), after which the next
// word may be taken. With enable_i at 0 no new word is accepted (a transfer
// already started runs to its end).
//
// Interface: enable_i, in_valid_i, in_data_i, in_ready_o (valid/ready) on the
// local side; data_o, req_o, done_i towards the encoder and the converter.
// Registered, clk rising edge, asynchronous active-low reset (no word held).
// The enable gating follows the design; the valid/ready side is this design's.
module zs_source #(
  parameter int unsigned DATA_W = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable_i,
  input  logic              in_valid_i,
  input  logic [DATA_W-1:0] in_data_i,
  output logic              in_ready_o,
  output logic [DATA_W-1:0] data_o,
  output logic              req_o,
  input  logic              done_i
);

  assign in_ready_o = enable_i && !req_o;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_o  <= 1'b0;
      data_o <= '0;
    end else if (req_o) begin
      if (done_i) req_o <= 1'b0;
    end else if (in_valid_i && in_ready_o) begin
      req_o  <= 1'b1;
      data_o <= in_data_i;
    end
  end

  a_stable_word: assert property (@(posedge clk) disable iff (!rst_n)
    (req_o && !done_i) |=> (req_o && $stable(data_o)));

endmodule
