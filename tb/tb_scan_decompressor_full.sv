// tb_scan_decompressor_full -- the decompressor at its default configuration
// applying the 60-block example test set.
//
// The example test set (five 48-bit scan vectors, 4-bit blocks) is compressed by
// the testbench with its own copy of the default selective code and streamed
// into the decompressor one bit per tester clock, with the scan clock twice the
// tester clock. A 48-bit scan chain model sits on scan_out. Checks:
//   * after every 48 scan shifts the chain holds exactly the next test vector;
//   * the compressed stream is 194 bits against 240 uncompressed (the figure that
//     the code's block frequencies give: 22x2 + 13x3 + 7x3 + 18x5);
//   * the last scan bit leaves within B scan clocks of the last tester bit, so
//     decoding adds no test time and the whole load takes 194 tester clocks;
//   * the three coded blocks are the three most frequent of the set (22, 13, 7);
//   * no overrun and no illegal codeword.
module tb_scan_decompressor_full;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       tester_en, tester_bit;
  logic [0:0] scan_out, scan_en, par_load, ser_load, code_err, overrun;
  logic [47:0] chain;

  localparam logic [47:0] VEC [5] = '{48'h242602b42462, 48'h242606246220, 48'h262224462285,
                                      48'h142722774485, 48'hc447227d24f3};

  int checks = 0, failures = 0;
  int nshift = 0, nvec = 0, n_par = 0, n_ser = 0, n_tbits = 0;
  longint cyc = 0, last_tester_cyc = 0, last_scan_cyc = 0;
  logic stream_q[$];

  scan_decompressor dut (
    .clk, .rst_n, .tester_en, .tester_bit, .cfg_we(1'b0), .cfg_addr('0), .cfg_data('0),
    .scan_out, .scan_en, .par_load, .ser_load, .code_err, .overrun
  );

  scan_chain_model #(.LEN(48)) u_chain (.clk, .en(scan_en[0]), .si(scan_out[0]), .q(chain));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (par_load[0]) n_par++;
      if (ser_load[0]) n_ser++;
      if (code_err[0]) check(1'b0, "illegal codeword reported");
      if (scan_en[0]) begin
        nshift++;
        last_scan_cyc = cyc;
      end
    end
  end

  // Compare the chain once a whole vector has been shifted in.
  always @(negedge clk) begin
    if (nshift == 48 * (nvec + 1) && nvec < 5) begin
      check(chain == VEC[nvec], $sformatf("vector %0d: chain %h expected %h", nvec, chain, VEC[nvec]));
      nvec++;
    end
  end

  initial begin
    logic [3:0] b;
    tester_en = 0; tester_bit = 0;
    for (int v = 0; v < 5; v++)
      for (int k = 11; k >= 0; k--) begin
        b = VEC[v][4*k +: 4];
        case (b)
          4'b0010: begin stream_q.push_back(1); stream_q.push_back(0); end
          4'b0100: begin stream_q.push_back(1); stream_q.push_back(1); stream_q.push_back(0); end
          4'b0110: begin stream_q.push_back(1); stream_q.push_back(1); stream_q.push_back(1); end
          default: begin
            stream_q.push_back(0);
            for (int j = 3; j >= 0; j--) stream_q.push_back(b[j]);
          end
        endcase
      end
    // the three most frequent blocks of the test set must be the coded ones
    begin
      int freq [16];
      int best [3];
      for (int i = 0; i < 16; i++) freq[i] = 0;
      for (int v = 0; v < 5; v++) for (int k = 0; k < 12; k++) freq[VEC[v][4*k +: 4]]++;
      for (int r = 0; r < 3; r++) begin
        best[r] = 0;
        for (int i = 1; i < 16; i++)
          if (freq[i] > freq[best[r]] && (r == 0 || freq[i] < freq[best[r-1]])) best[r] = i;
      end
      check(best[0] == 4'b0010 && best[1] == 4'b0100 && best[2] == 4'b0110 &&
            freq[2] == 22 && freq[4] == 13 && freq[6] == 7, "coded blocks are the three most frequent");
    end
    check(stream_q.size() == 194, $sformatf("compressed size %0d bits", stream_q.size()));
    $display("compressed %0d of 240 bits: %0d.%0d%% compression", stream_q.size(),
             (240 - stream_q.size()) * 100 / 240, ((240 - stream_q.size()) * 1000 / 240) % 10);
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    while (stream_q.size() > 0) begin
      tester_en = 1'b1; tester_bit = stream_q.pop_front();
      n_tbits++;
      @(posedge clk); #1;
      last_tester_cyc = cyc;
      tester_en = 1'b0;
      @(posedge clk); #1;
    end
    repeat (10) @(posedge clk);
    #1;
    check(nvec == 5, "all five vectors applied");
    check(nshift == 240, $sformatf("scan shifts %0d", nshift));
    check(last_scan_cyc - last_tester_cyc <= 4, "decoding adds no test time");
    check(n_par == 42 && n_ser == 18 * 4, "Par/Ser strobe counts");
    check(!overrun[0], "no serializer overrun");
    check(n_tbits == 194, "tester clocks used");
    $display("tester clocks used %0d (uncompressed: 240)", n_tbits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
