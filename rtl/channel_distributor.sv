// channel_distributor -- shares one tester channel among N decoders.
//
// When the scan chains cannot run faster than the tester, one tester channel
// feeds N scan chains, each with its own decoder. The tester sends one bit per
// clock to each decoder in turn: decoder k samples the channel on the tester
// cycles whose index modulo N is k, so each decoder sees an effective clock N
// times slower than its scan chain. This block is the phase counter that makes
// those per-decoder sample enables; the data line itself is shared by all.
// With N = 1 the single decoder samples every tester cycle.
//
// Timing: dec_en is combinational from tester_en and the phase count; the count
// steps on every clock edge where tester_en is high, starting at phase 0 after
// reset (the reset phase is this design's choice).
module channel_distributor #(
  parameter int unsigned N = 2   // decoders sharing the channel
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         tester_en,   // a tester bit is on the channel this cycle
  output logic [N-1:0] dec_en       // one-hot: which decoder takes it
);

  localparam int unsigned PW = (N > 1) ? $clog2(N) : 1;

  logic [PW-1:0] phase_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase_q <= '0;
    else if (tester_en) phase_q <= (phase_q == PW'(N - 1)) ? '0 : phase_q + PW'(1);
  end

  always_comb begin
    dec_en = '0;
    for (int k = 0; k < N; k++) dec_en[k] = tester_en && (phase_q == PW'(k));
  end

endmodule
