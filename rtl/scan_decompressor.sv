// scan_decompressor -- on-chip decompressor for statistically coded scan vectors.
//
// The tester stores each core's scan vectors compressed with a selective
// statistical code and streams the codewords over one channel. This block sits
// at the serial input of the core scan chain(s): a decoder per chain turns each
// codeword back into a B-bit block, and a serializer shifts that block into the
// chain at the scan clock rate. Because B scan clocks fit into the time the
// tester needs for the shortest codeword, decoding never slows the tester down,
// so test data volume and test time shrink by the same factor.
//
//   tester_bit --> channel_distributor --> decoder[k] --B--> serializer[k] --> scan_out[k]
//
// Two ways to let the chain run faster than the decoder's input are supported:
//   * NUM_CHAINS = 1 (default): one decoder; the scan clock is CLK_RATIO times the
//     tester clock, so tester_en pulses once every CLK_RATIO clk cycles.
//   * NUM_CHAINS = n > 1: the scan chains run at the tester clock, tester_en is
//     high every cycle, and the channel rotates over the n decoders so that each
//     decoder gets one bit every n cycles (set CLK_RATIO = n).
// DECODER selects the decoder: DEC_FSM walks the code tree given by CODE /
// CODE_LEN / PATTERN; DEC_RAM takes '1'+A address bits and reads the block from a
// writable decode RAM (cfg_* port, cfg_we selects the chain).
//
// The whole block runs on one clock, the scan clock; the slower tester clock is
// represented by the tester_en strobe, and the scan clock of chain k is
// clk gated by scan_en[k]. This single-clock form, the error outputs and the
// elaboration check of the minimum codeword length are this design's choices;
// the decoder / serializer structure, the code and the default sizes follow the
// paper's scheme.
module scan_decompressor
  import sdc_pkg::*;
#(
  parameter int unsigned   NUM_CHAINS = 1,        // decoder/serializer/chain triples
  parameter int unsigned   B          = DEF_B,    // block size
  parameter int unsigned   CLK_RATIO  = 2,        // scan clocks per decoder input bit
  parameter decoder_kind_e DECODER    = DEC_FSM,
  // code of the FSM decoder
  parameter int unsigned   N          = DEF_N,
  parameter int unsigned   MAXLEN     = DEF_MAXLEN,
  parameter logic [N-1:0][MAXLEN-1:0] CODE     = DEF_CODE,
  parameter logic [N-1:0][7:0]        CODE_LEN = DEF_CODE_LEN,
  parameter logic [N-1:0][B-1:0]      PATTERN  = DEF_PATTERN,
  // RAM decoder
  parameter int unsigned   A          = 2,        // address bits after the '1' flag
  parameter int unsigned   RAM_AW     = 4,
  parameter int unsigned   RAM_DW     = 8
) (
  input  logic                  clk,        // scan clock
  input  logic                  rst_n,
  input  logic                  tester_en,  // tester clock tick: tester_bit is valid
  input  logic                  tester_bit, // compressed data from the tester channel
  input  logic [NUM_CHAINS-1:0] cfg_we,     // decode RAM write, per chain (DEC_RAM)
  input  logic [RAM_AW-1:0]     cfg_addr,
  input  logic [RAM_DW-1:0]     cfg_data,
  output logic [NUM_CHAINS-1:0] scan_out,   // serial data into each scan chain
  output logic [NUM_CHAINS-1:0] scan_en,    // scan clock enable of each chain
  output logic [NUM_CHAINS-1:0] par_load,   // decoder Par strobes
  output logic [NUM_CHAINS-1:0] ser_load,   // decoder Ser strobes
  output logic [NUM_CHAINS-1:0] code_err,   // input left the code tree (DEC_FSM)
  output logic [NUM_CHAINS-1:0] overrun     // sticky: serializer was not empty in time
);

  // Shortest codeword the chosen decoder can receive.
  function automatic int unsigned min_codeword();
    int unsigned m = B + 1;
    if (DECODER == DEC_RAM) return A + 1;
    for (int i = 0; i < N; i++) if (int'(CODE_LEN[i]) < int'(m)) m = 32'(CODE_LEN[i]);
    return m;
  endfunction

  localparam int unsigned MIN_SIZE = min_codeword();

  // The serializer must be empty whenever a codeword ends:
  // Min_Size(codeword) * (scan clock / decoder clock) >= B.
  initial begin
    assert (MIN_SIZE * CLK_RATIO >= B)
      else $fatal(1, "scan_decompressor: shortest codeword (%0d bits) too short for B=%0d at clock ratio %0d",
                  MIN_SIZE, B, CLK_RATIO);
  end

  logic [NUM_CHAINS-1:0] dec_en;

  channel_distributor #(.N(NUM_CHAINS)) u_dist (
    .clk       (clk),
    .rst_n     (rst_n),
    .tester_en (tester_en),
    .dec_en    (dec_en)
  );

  for (genvar k = 0; k < NUM_CHAINS; k++) begin : g_chain
    logic [B-1:0] blk;
    logic         blk_load;

    if (DECODER == DEC_FSM) begin : g_fsm
      selective_decoder #(
        .B(B), .N(N), .MAXLEN(MAXLEN), .CODE(CODE), .CODE_LEN(CODE_LEN), .PATTERN(PATTERN)
      ) u_dec (
        .clk      (clk),
        .rst_n    (rst_n),
        .bit_en   (dec_en[k]),
        .bit_in   (tester_bit),
        .blk      (blk),
        .blk_load (blk_load),
        .par      (par_load[k]),
        .ser      (ser_load[k]),
        .code_err (code_err[k])
      );
    end else begin : g_ram
      ram_decoder #(.B(B), .A(A), .RAM_AW(RAM_AW), .RAM_DW(RAM_DW)) u_dec (
        .clk      (clk),
        .rst_n    (rst_n),
        .bit_en   (dec_en[k]),
        .bit_in   (tester_bit),
        .cfg_we   (cfg_we[k]),
        .cfg_addr (cfg_addr),
        .cfg_data (cfg_data),
        .blk      (blk),
        .blk_load (blk_load),
        .par      (par_load[k]),
        .ser      (ser_load[k])
      );
      assign code_err[k] = 1'b0;   // every '1'+A-bit word is a valid codeword
    end

    serializer #(.B(B)) u_ser (
      .clk      (clk),
      .rst_n    (rst_n),
      .load     (blk_load),
      .din      (blk),
      .scan_out (scan_out[k]),
      .scan_en  (scan_en[k]),
      .overrun  (overrun[k])
    );
  end

endmodule
