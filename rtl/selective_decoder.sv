// selective_decoder -- FSM decoder for a selective statistical code.
//
// Every codeword starts with a flag bit. A '0' flag means the next B bits are the
// block itself: the FSM counts them in (one Ser strobe per bit), shifting each
// into an internal buffer, and on the last one hands the full block to the
// serializer. A '1' flag starts a walk down the prefix-free code tree of the N
// coded blocks: the state is the path taken so far, and as soon as the path
// equals one of the N codewords the matching B-bit pattern is handed over with a
// Par strobe and the FSM returns to the root. With the default code this is the
// 7-state machine (n + b states): root 'a', tree nodes 'b' (seen "1") and 'c'
// (seen "11"), and raw-bit states 'd'..'g'.
//
// The code tree follows the paper's scheme; the table is given as parameters so
// the same RTL serves any code of this form. A path that reaches MAXLEN bits
// without matching (only possible if the tree is not full) pulses code_err and
// restarts at the root: that check is this design's addition.
//
// Interface and timing: the decoder runs on the scan clock and consumes bit_in on
// cycles where bit_en is high (one per tester clock). Outputs are Mealy outputs
// of the current bit: blk_load is high, with the block on blk, in the same cycle
// as the last bit of a codeword, so the serializer captures it at that clock edge.
// blk bit B-1 is the first bit to be shifted into the scan chain.
module selective_decoder
  import sdc_pkg::*;
#(
  parameter int unsigned B      = DEF_B,       // block size in bits
  parameter int unsigned N      = DEF_N,       // number of coded blocks
  parameter int unsigned MAXLEN = DEF_MAXLEN,  // longest coded codeword, flag included
  parameter logic [N-1:0][MAXLEN-1:0] CODE     = DEF_CODE,      // right-aligned codewords
  parameter logic [N-1:0][7:0]        CODE_LEN = DEF_CODE_LEN,  // codeword lengths
  parameter logic [N-1:0][B-1:0]      PATTERN  = DEF_PATTERN    // decoded blocks
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         bit_en,    // bit_in is valid (tester clock tick)
  input  logic         bit_in,    // compressed serial data
  output logic [B-1:0] blk,       // decoded block, valid with blk_load
  output logic         blk_load,  // parallel-load strobe to the serializer
  output logic         par,       // a coded block was decoded (Par)
  output logic         ser,       // a raw bit was taken into the buffer (Ser)
  output logic         code_err   // the bit path left the code tree
);

  localparam int unsigned CW = $clog2((B > MAXLEN ? B : MAXLEN) + 1);

  typedef enum logic [1:0] {
    S_ROOT  = 2'd0,   // waiting for the flag bit
    S_CODED = 2'd1,   // inside the code tree
    S_RAW   = 2'd2    // counting raw block bits
  } mode_e;

  mode_e             mode_q, mode_d;
  logic [MAXLEN-1:0] path_q, path_d;   // bits of the codeword so far, right-aligned
  logic [CW-1:0]     cnt_q,  cnt_d;    // codeword bits so far (coded) or raw bits so far
  logic [B-1:0]      buf_q,  buf_d;    // raw-bit buffer

  // Path and length after taking the current bit in the code tree.
  logic [MAXLEN-1:0] path_next;
  logic [CW-1:0]     len_next;
  logic              hit;
  logic [B-1:0]      hit_pat;

  always_comb begin
    if (mode_q == S_ROOT) begin
      path_next = MAXLEN'(1'b1);
      len_next  = CW'(1);
    end else begin
      path_next = MAXLEN'({path_q, bit_in});
      len_next  = cnt_q + CW'(1);
    end
    hit     = 1'b0;
    hit_pat = '0;
    for (int i = 0; i < N; i++) begin
      if (!hit && CW'(CODE_LEN[i]) == len_next &&
          (path_next & ((MAXLEN'(1) << len_next) - MAXLEN'(1))) == CODE[i]) begin
        hit     = 1'b1;
        hit_pat = PATTERN[i];
      end
    end
  end

  always_comb begin
    mode_d   = mode_q;
    path_d   = path_q;
    cnt_d    = cnt_q;
    buf_d    = buf_q;
    blk      = '0;
    blk_load = 1'b0;
    par      = 1'b0;
    ser      = 1'b0;
    code_err = 1'b0;
    if (bit_en) begin
      unique case (mode_q)
        S_ROOT, S_CODED: begin
          if (mode_q == S_ROOT && !bit_in) begin
            mode_d = S_RAW;                 // '0' flag: B raw bits follow
            cnt_d  = '0;
          end else if (hit) begin
            par      = 1'b1;
            blk      = hit_pat;
            blk_load = 1'b1;
            mode_d   = S_ROOT;
          end else if (len_next >= CW'(MAXLEN)) begin
            code_err = 1'b1;
            mode_d   = S_ROOT;
          end else begin
            mode_d = S_CODED;
            path_d = path_next;
            cnt_d  = len_next;
          end
        end
        S_RAW: begin
          ser   = 1'b1;
          buf_d = {buf_q[B-2:0], bit_in};
          cnt_d = cnt_q + CW'(1);
          if (cnt_q == CW'(B - 1)) begin
            blk      = {buf_q[B-2:0], bit_in};
            blk_load = 1'b1;
            mode_d   = S_ROOT;
          end
        end
        default: mode_d = S_ROOT;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_q <= S_ROOT;
      path_q <= '0;
      cnt_q  <= '0;
      buf_q  <= '0;
    end else begin
      mode_q <= mode_d;
      path_q <= path_d;
      cnt_q  <= cnt_d;
      buf_q  <= buf_d;
    end
  end

  initial begin
    assert (B >= 2) else $fatal(1, "selective_decoder: B must be at least 2");
  end

endmodule
