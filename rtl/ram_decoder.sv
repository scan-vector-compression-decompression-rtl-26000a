// ram_decoder -- decoder for a two-size selective code, using a decode RAM.
//
// The code is restricted so that every codeword has one of two lengths. A '0'
// flag is followed by the B bits of the block itself, which are shifted into an
// internal buffer (Ser strobe per bit) and handed on when complete. A '1' flag is
// followed by an A-bit address; the block is read from the decode RAM at that
// address and handed on with a Par strobe. With B = 8 and A = 4, 16 of the 256
// possible blocks get 5-bit codewords and the rest 9-bit codewords, decoded with
// a 16 x 8 RAM. A RAM larger than needed works too: the address is padded with
// zeros at the top and only the low B data bits are used.
//
// The FSM has 1 + A + B states: root, A address-bit states, B raw-bit states.
// The RAM contents are written through the cfg_* port before decoding.
//
// Timing: bit_in is taken on cycles with bit_en high. blk_load (with blk) is a
// Mealy output, high in the same cycle as the last bit of a codeword, so the
// serializer captures the block at that clock edge. blk[B-1] is shifted first.
module ram_decoder #(
  parameter int unsigned B      = 8,   // block size in bits
  parameter int unsigned A      = 4,   // address bits in a coded codeword
  parameter int unsigned RAM_AW = 4,   // decode RAM address width (>= A)
  parameter int unsigned RAM_DW = 8    // decode RAM data width (>= B)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              bit_en,
  input  logic              bit_in,
  input  logic              cfg_we,     // decode RAM write port
  input  logic [RAM_AW-1:0] cfg_addr,
  input  logic [RAM_DW-1:0] cfg_data,
  output logic [B-1:0]      blk,
  output logic              blk_load,
  output logic              par,
  output logic              ser
);

  localparam int unsigned CW = $clog2((B > A ? B : A) + 1);

  typedef enum logic [1:0] {
    S_ROOT = 2'd0,   // waiting for the flag bit
    S_ADDR = 2'd1,   // collecting address bits
    S_RAW  = 2'd2    // collecting raw block bits
  } mode_e;

  mode_e         mode_q, mode_d;
  logic [CW-1:0] cnt_q,  cnt_d;
  logic [A-1:0]  addr_q, addr_d;
  logic [B-1:0]  buf_q,  buf_d;

  logic [A-1:0]      addr_next;
  logic [B-1:0]      buf_next;
  logic [RAM_AW-1:0] raddr;
  logic [RAM_DW-1:0] rdata;

  assign addr_next = A'({addr_q, bit_in});
  assign buf_next  = B'({buf_q, bit_in});
  assign raddr     = RAM_AW'(addr_next);   // high-order address bits padded with 0

  code_ram #(.AW(RAM_AW), .DW(RAM_DW)) u_ram (
    .clk   (clk),
    .we    (cfg_we),
    .waddr (cfg_addr),
    .wdata (cfg_data),
    .raddr (raddr),
    .rdata (rdata)
  );

  always_comb begin
    mode_d   = mode_q;
    cnt_d    = cnt_q;
    addr_d   = addr_q;
    buf_d    = buf_q;
    blk      = '0;
    blk_load = 1'b0;
    par      = 1'b0;
    ser      = 1'b0;
    if (bit_en) begin
      unique case (mode_q)
        S_ROOT: begin
          mode_d = bit_in ? S_ADDR : S_RAW;
          cnt_d  = '0;
        end
        S_ADDR: begin
          addr_d = addr_next;
          cnt_d  = cnt_q + CW'(1);
          if (cnt_q == CW'(A - 1)) begin
            blk      = rdata[B-1:0];     // low-order data bits only
            blk_load = 1'b1;
            par      = 1'b1;
            mode_d   = S_ROOT;
          end
        end
        S_RAW: begin
          ser   = 1'b1;
          buf_d = buf_next;
          cnt_d = cnt_q + CW'(1);
          if (cnt_q == CW'(B - 1)) begin
            blk      = buf_next;
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
      cnt_q  <= '0;
      addr_q <= '0;
      buf_q  <= '0;
    end else begin
      mode_q <= mode_d;
      cnt_q  <= cnt_d;
      addr_q <= addr_d;
      buf_q  <= buf_d;
    end
  end

  initial begin
    assert (A <= RAM_AW && B <= RAM_DW)
      else $fatal(1, "ram_decoder: decode RAM smaller than the code needs");
  end

endmodule
