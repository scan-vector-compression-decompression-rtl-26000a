// tb_scan_decompressor_wide -- the decompressor with the larger block sizes of
// the evaluation (6- and 8-bit blocks).
//
//  u_b8: B = 8 with 13 coded blocks, an FSM of n + b = 21 states. The codewords
//        after the '1' flag form a full prefix-free tree with lengths 2..5, so
//        whole codewords are 3 to 6 bits (or 9 bits raw). With a shortest
//        codeword of 3 bits the scan clock runs 3x the tester clock (3 x 3 >= 8).
//  u_b6: B = 6 with 2 coded blocks (10, 11), 8 states; 2 x 3 >= 6.
// Random skewed block streams are encoded with the testbench's own code tables
// and every bit shifted into each chain is compared with the expected blocks.
// The last scan bit must leave within B scan clocks of the last tester bit, and
// neither overrun nor code_err may be seen.
module tb_scan_decompressor_wide;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // 8-bit code: codewords (flag included) and their blocks
  localparam int N8 = 13;
  localparam logic [5:0] C8 [N8] = '{6'b000100, 6'b001010, 6'b001011, 6'b001100, 6'b011010, 6'b011011,
                                     6'b011100, 6'b111010, 6'b111011, 6'b111100, 6'b111101, 6'b111110,
                                     6'b111111};
  localparam int L8 [N8] = '{3, 4, 4, 4, 5, 5, 5, 6, 6, 6, 6, 6, 6};
  localparam logic [7:0] P8 [N8] = '{8'h00, 8'hff, 8'h0f, 8'hf0, 8'h55, 8'haa, 8'h3c, 8'hc3,
                                     8'h81, 8'h18, 8'h24, 8'h42, 8'h7e};

  logic       e8, d8;
  logic [0:0] so8, se8, par8, ser8, err8, ovr8;
  logic       exp8[$];
  longint     lt8 = 0, ls8 = 0;
  int         n_par8 = 0;

  scan_decompressor #(
    .B(8), .CLK_RATIO(3), .N(13), .MAXLEN(6),
    .CODE({6'b111111, 6'b111110, 6'b111101, 6'b111100, 6'b111011, 6'b111010, 6'b011100,
           6'b011011, 6'b011010, 6'b001100, 6'b001011, 6'b001010, 6'b000100}),
    .CODE_LEN({8'd6, 8'd6, 8'd6, 8'd6, 8'd6, 8'd6, 8'd5, 8'd5, 8'd5, 8'd4, 8'd4, 8'd4, 8'd3}),
    .PATTERN({8'h7e, 8'h42, 8'h24, 8'h18, 8'h81, 8'hc3, 8'h3c, 8'haa, 8'h55, 8'hf0, 8'h0f,
              8'hff, 8'h00})
  ) u_b8 (
    .clk, .rst_n, .tester_en(e8), .tester_bit(d8), .cfg_we(1'b0), .cfg_addr('0), .cfg_data('0),
    .scan_out(so8), .scan_en(se8), .par_load(par8), .ser_load(ser8), .code_err(err8), .overrun(ovr8)
  );

  logic       e6, d6;
  logic [0:0] so6, se6, par6, ser6, err6, ovr6;
  logic       exp6[$];
  longint     lt6 = 0, ls6 = 0;
  int         n_par6 = 0;

  scan_decompressor #(
    .B(6), .CLK_RATIO(3), .N(2), .MAXLEN(2),
    .CODE({2'b11, 2'b10}), .CODE_LEN({8'd2, 8'd2}), .PATTERN({6'b111000, 6'b000000})
  ) u_b6 (
    .clk, .rst_n, .tester_en(e6), .tester_bit(d6), .cfg_we(1'b0), .cfg_addr('0), .cfg_data('0),
    .scan_out(so6), .scan_en(se6), .par_load(par6), .ser_load(ser6), .code_err(err6), .overrun(ovr6)
  );

  always @(posedge clk) if (rst_n) begin
    if (par8[0]) n_par8++;
    if (par6[0]) n_par6++;
    if (err8[0] || err6[0]) check(1'b0, "code_err");
    if (se8[0]) begin
      ls8 = cyc;
      if (exp8.size() == 0) check(1'b0, "u_b8 unexpected bit");
      else check(so8[0] == exp8.pop_front(), "u_b8 scan bit");
    end
    if (se6[0]) begin
      ls6 = cyc;
      if (exp6.size() == 0) check(1'b0, "u_b6 unexpected bit");
      else check(so6[0] == exp6.pop_front(), "u_b6 scan bit");
    end
  end

  initial begin
    logic s8[$], s6[$];
    logic [7:0] b;
    logic [5:0] b6;
    int k;
    e8 = 0; d8 = 0; e6 = 0; d6 = 0;
    for (int i = 0; i < 500; i++) begin
      // 8-bit blocks: 3 in 4 from the coded set, the lower entries more often
      if ($urandom_range(3) != 0) begin
        k = $urandom_range(N8 - 1) % ($urandom_range(N8 - 1) + 1);
        b = P8[k];
      end else begin
        b = 8'($urandom);
      end
      k = -1;
      for (int j = 0; j < N8; j++) if (P8[j] == b) k = j;
      if (k >= 0) for (int j = L8[k] - 1; j >= 0; j--) s8.push_back(C8[k][j]);
      else begin
        s8.push_back(0);
        for (int j = 7; j >= 0; j--) s8.push_back(b[j]);
      end
      for (int j = 7; j >= 0; j--) exp8.push_back(b[j]);
      // 6-bit blocks
      case ($urandom_range(3))
        0: b6 = 6'b000000;
        1: b6 = 6'b111000;
        default: b6 = 6'($urandom);
      endcase
      if (b6 == 6'b000000) begin s6.push_back(1); s6.push_back(0); end
      else if (b6 == 6'b111000) begin s6.push_back(1); s6.push_back(1); end
      else begin
        s6.push_back(0);
        for (int j = 5; j >= 0; j--) s6.push_back(b6[j]);
      end
      for (int j = 5; j >= 0; j--) exp6.push_back(b6[j]);
    end
    $display("b=8: %0d blocks in %0d bits; b=6: %0d blocks in %0d bits", 500, s8.size(), 500, s6.size());
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    while (s8.size() > 0 || s6.size() > 0) begin
      if (s8.size() > 0) begin e8 = 1'b1; d8 = s8.pop_front(); end
      if (s6.size() > 0) begin e6 = 1'b1; d6 = s6.pop_front(); end
      @(posedge clk); #1;
      if (e8) lt8 = cyc;
      if (e6) lt6 = cyc;
      e8 = 1'b0; e6 = 1'b0;
      repeat (2) @(posedge clk);
      #1;
    end
    repeat (12) @(posedge clk);
    #1;
    check(exp8.size() == 0 && exp6.size() == 0, "all blocks shifted");
    check(ls8 - lt8 <= 8 && ls6 - lt6 <= 6, "decoding adds no test time");
    check(!ovr8[0] && !ovr6[0], "no overrun");
    check(n_par8 > 100 && n_par6 > 100, "coded blocks decoded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
