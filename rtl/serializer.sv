// serializer -- parallel-in, serial-out buffer between a decoder and a scan chain.
//
// The decoder loads a whole B-bit block in one cycle; the serializer then shifts
// it into the core's scan chain one bit per scan clock, first bit blk[B-1]. When
// it has no bits left it holds the scan clock (scan_en low) until the next block
// arrives, as the scheme requires. A load may come in the cycle in which the last
// bit of the previous block leaves, so back-to-back blocks shift with no gap.
//
// A load that arrives while more than one bit is still waiting would lose data;
// the code is chosen so that this cannot happen (minimum codeword length times
// the scan/tester clock ratio is at least B). The serializer keeps the new block,
// sets the sticky overrun flag so that a bad code choice is visible; the flag is
// this design's addition.
//
// Timing: scan_out/scan_en are registered; a block loaded at edge t appears on
// scan_out during cycles t+1 .. t+B, and the chain takes each bit at the end of
// the cycle in which scan_en is high.
module serializer #(
  parameter int unsigned B = 4   // block size in bits
) (
  input  logic         clk,       // scan (fast) clock
  input  logic         rst_n,
  input  logic         load,      // parallel load from the decoder
  input  logic [B-1:0] din,       // block, din[B-1] shifted first
  output logic         scan_out,  // serial data into the scan chain
  output logic         scan_en,   // scan clock enable: a valid bit is on scan_out
  output logic         overrun    // sticky: load came before the previous block had left
);

  localparam int unsigned CW = $clog2(B + 1);

  logic [B-1:0]  sreg_q;
  logic [CW-1:0] left_q;    // bits still to shift out

  assign scan_out = sreg_q[B-1];
  assign scan_en  = (left_q != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sreg_q  <= '0;
      left_q  <= '0;
      overrun <= 1'b0;
    end else begin
      if (load) begin
        sreg_q <= din;
        left_q <= CW'(B);
        if (left_q > CW'(1)) overrun <= 1'b1;
      end else if (scan_en) begin
        sreg_q <= {sreg_q[B-2:0], 1'b0};
        left_q <= left_q - CW'(1);
      end
    end
  end

endmodule
