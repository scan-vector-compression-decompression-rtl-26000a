// tb_selective_decoder -- self-checking test of the selective-code FSM decoder.
//
// Random blocks, three quarters of them drawn from the three coded patterns, are
// encoded with the testbench's own copy of the code table (10 -> 0010,
// 110 -> 0100, 111 -> 0110, otherwise '0' + block) and fed bit by bit, with
// random idle cycles (bit_en low) in between. For every bit the Mealy outputs are
// checked: blk_load and par/ser must be high exactly on the bits the code says,
// and the block must equal the encoded one. A second decoder with an incomplete
// code (10, 110 only) checks that the unused path 111 raises code_err and that
// decoding resumes cleanly after it. A third decoder has a single coded block
// (codeword "1"), the smallest selective code.
module tb_selective_decoder;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       bit_en, bit_in;
  logic [3:0] blk;
  logic       blk_load, par, ser, code_err;

  logic       bit_en2, bit_in2;
  logic [3:0] blk2;
  logic       blk_load2, par2, ser2, code_err2;

  // single coded block: codeword "1" -> 0000 (n = 1, n + b = 5 states)
  logic       bit_en3, bit_in3;
  logic [3:0] blk3;
  logic       blk_load3, par3, ser3, code_err3;

  int checks = 0, failures = 0;
  int n_par = 0, n_raw = 0;

  selective_decoder dut (
    .clk, .rst_n, .bit_en, .bit_in, .blk, .blk_load, .par, .ser, .code_err
  );

  selective_decoder #(
    .B(4), .N(2), .MAXLEN(3),
    .CODE({3'b110, 3'b010}), .CODE_LEN({8'd3, 8'd2}), .PATTERN({4'b0100, 4'b0010})
  ) dut2 (
    .clk, .rst_n, .bit_en(bit_en2), .bit_in(bit_in2), .blk(blk2), .blk_load(blk_load2),
    .par(par2), .ser(ser2), .code_err(code_err2)
  );

  selective_decoder #(
    .B(4), .N(1), .MAXLEN(1), .CODE(1'b1), .CODE_LEN(8'd1), .PATTERN(4'b0000)
  ) dut3 (
    .clk, .rst_n, .bit_en(bit_en3), .bit_in(bit_in3), .blk(blk3), .blk_load(blk_load3),
    .par(par3), .ser(ser3), .code_err(code_err3)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Encoder: returns the codeword right-aligned, first bit at position len-1.
  function automatic void encode(input logic [3:0] b, output logic [4:0] cw, output int len);
    case (b)
      4'b0010: begin cw = 5'b00010; len = 2; end
      4'b0100: begin cw = 5'b00110; len = 3; end
      4'b0110: begin cw = 5'b00111; len = 3; end
      default: begin cw = {1'b0, b}; len = 5; end
    endcase
  endfunction

  // Drive one bit of dut and check its outputs before the clock edge.
  task automatic send(input logic b, input bit last, input bit coded, input bit data_bit,
                      input logic [3:0] exp_blk);
    // random idle cycles: nothing may happen
    while ($urandom_range(3) == 0) begin
      bit_en = 1'b0; bit_in = 1'($urandom);
      #1;
      check(!blk_load && !par && !ser && !code_err, "idle cycle produced output");
      @(posedge clk); #1;
    end
    bit_en = 1'b1; bit_in = b;
    #1;
    check(blk_load == last, "blk_load timing");
    check(par == (last && coded), "par strobe");
    check(ser == (!coded && data_bit), "ser strobe");
    check(!code_err, "unexpected code_err");
    if (last) check(blk == exp_blk, $sformatf("block %b expected %b", blk, exp_blk));
    @(posedge clk); #1;
    bit_en = 1'b0;
  endtask

  task automatic send2(input logic b, input bit exp_load, input bit exp_err, input logic [3:0] exp_blk);
    bit_en2 = 1'b1; bit_in2 = b;
    #1;
    check(blk_load2 == exp_load, "dut2 blk_load");
    check(code_err2 == exp_err, "dut2 code_err");
    if (exp_load) check(blk2 == exp_blk, "dut2 block");
    @(posedge clk); #1;
    bit_en2 = 1'b0;
  endtask

  task automatic send3(input logic b, input bit exp_load, input bit exp_par, input logic [3:0] exp_blk);
    bit_en3 = 1'b1; bit_in3 = b;
    #1;
    check(blk_load3 == exp_load && par3 == exp_par && !code_err3, "dut3 strobes");
    if (exp_load) check(blk3 == exp_blk, "dut3 block");
    @(posedge clk); #1;
    bit_en3 = 1'b0;
  endtask

  localparam logic [3:0] HOT [3] = '{4'b0010, 4'b0100, 4'b0110};

  initial begin
    logic [3:0] b;
    logic [4:0] cw;
    int len;
    bit_en = 0; bit_in = 0; bit_en2 = 0; bit_in2 = 0; bit_en3 = 0; bit_in3 = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    for (int i = 0; i < 400; i++) begin
      b = ($urandom_range(3) != 0) ? HOT[$urandom_range(2)] : 4'($urandom);
      encode(b, cw, len);
      if (len == 5) n_raw++; else n_par++;
      for (int j = len - 1; j >= 0; j--)
        send(cw[j], j == 0, len != 5, len == 5 && j != len - 1, b);
    end
    check(n_par > 50 && n_raw > 20, "both codeword kinds exercised");

    // incomplete code: 10 -> 0010, 0 -> 0, 111 is illegal
    send2(1'b1, 0, 0, '0); send2(1'b0, 1, 0, 4'b0010);
    send2(1'b1, 0, 0, '0); send2(1'b1, 0, 0, '0); send2(1'b1, 0, 1, '0);
    send2(1'b1, 0, 0, '0); send2(1'b1, 0, 0, '0); send2(1'b0, 1, 0, 4'b0100);
    send2(1'b0, 0, 0, '0); send2(1'b1, 0, 0, '0); send2(1'b0, 0, 0, '0);
    send2(1'b0, 0, 0, '0); send2(1'b1, 1, 0, 4'b1001);

    // one-symbol code: 1 -> 0000, 0 + 1011 raw, 1 -> 0000
    send3(1'b1, 1, 1, 4'b0000);
    send3(1'b0, 0, 0, '0); send3(1'b1, 0, 0, '0); send3(1'b0, 0, 0, '0);
    send3(1'b1, 0, 0, '0); send3(1'b1, 1, 0, 4'b1011);
    send3(1'b1, 1, 1, 4'b0000);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
