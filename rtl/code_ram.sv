// code_ram -- decode table of the RAM-based decoder.
//
// A 2^AW x DW memory holding, at each address, the block that the codeword
// '1'+address stands for. It is written through a simple synchronous write port,
// so the same decoder can be loaded with the code of another core (or a RAM that
// the functional design already has can be borrowed for the job). The read port
// is asynchronous so that the decoder can hand the block to the serializer in
// the cycle the last address bit arrives. The 16 x 8 default size is the paper's
// example; the port style and the asynchronous read are this design's choices.
// Contents are not reset: they must be written before the decoder is used.
module code_ram #(
  parameter int unsigned AW = 4,   // address bits
  parameter int unsigned DW = 8    // data bits
) (
  input  logic          clk,
  input  logic          we,       // write enable
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata     // combinational read of raddr
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
