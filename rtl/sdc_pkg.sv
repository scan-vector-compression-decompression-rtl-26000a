// sdc_pkg -- shared types and defaults of the statistical-code scan decompressor.
//
// The default code is the selective code built for the 60-block example test set
// (4-bit blocks): the three most frequent blocks get a '1' flag followed by a
// Huffman code of just those three, every other block is sent as '0' followed by
// its four bits unchanged.
//
//   codeword  block
//   10        0010
//   110       0100
//   111       0110
//   0xxxx     xxxx   (raw)
//
// Codewords are stored right-aligned: bit CODE_LEN-1 is the first bit sent (the
// '1' flag). Blocks are stored with bit B-1 as the first bit shifted into the
// scan chain, i.e. in the order the block is written.
package sdc_pkg;

  // Which of the two decoder implementations a chain uses.
  typedef enum logic {
    DEC_FSM = 1'b0,   // code-tree FSM (any prefix-free code for the coded blocks)
    DEC_RAM = 1'b1    // two codeword sizes: '1'+a-bit RAM address, or '0'+b raw bits
  } decoder_kind_e;

  // Default selective code for b = 4, n = 3.
  localparam int unsigned DEF_B      = 4;
  localparam int unsigned DEF_N      = 3;
  localparam int unsigned DEF_MAXLEN = 3;
  localparam logic [DEF_N-1:0][DEF_MAXLEN-1:0] DEF_CODE     = {3'b111, 3'b110, 3'b010};
  localparam logic [DEF_N-1:0][7:0]            DEF_CODE_LEN = {8'd3,   8'd3,   8'd2};
  localparam logic [DEF_N-1:0][DEF_B-1:0]      DEF_PATTERN  = {4'b0110, 4'b0100, 4'b0010};

endpackage
