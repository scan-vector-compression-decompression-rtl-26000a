// scan_chain_model -- behavioural model of a core's internal scan chain.
//
// Behavioural model, testbench only: the core under test is outside the
// decompressor and is treated as a black box. The model is a LEN-bit shift
// register that takes si on every clock edge where the (gated) scan clock enable
// en is high. After LEN shifts the first bit shifted in sits in q[LEN-1].
module scan_chain_model #(
  parameter int unsigned LEN = 48
) (
  input  logic           clk,
  input  logic           en,
  input  logic           si,
  output logic [LEN-1:0] q
);

  initial q = '0;

  always @(posedge clk) begin
    if (en) q <= {q[LEN-2:0], si};
  end

endmodule
