// tb_ram_decoder -- self-checking test of the RAM-based two-size decoder.
//
// The 16 x 8 decode RAM is loaded with 16 distinct random blocks. Random blocks,
// about half of them taken from that table, are encoded by the testbench
// ('1' + 4-bit address if the block is in the table, else '0' + 8 raw bits) and
// fed bit by bit with random idle cycles. For every bit, blk_load, par and ser
// must be high exactly where the code says, and the block must match. The table
// is then reloaded with new contents and the test repeated. A second decoder
// with a 32 x 10 RAM (larger than the code needs) has garbage written to its
// upper half and to its upper data bits, and must decode the same stream.
module tb_ram_decoder;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       bit_en, bit_in;
  logic       cfg_we;
  logic [3:0] cfg_addr;
  logic [7:0] cfg_data;
  logic [7:0] blk, blk2;
  logic       blk_load, par, ser, blk_load2, par2, ser2;
  logic       cfg_we2;
  logic [4:0] cfg_addr2;
  logic [9:0] cfg_data2;

  logic [7:0] table_q [16];
  int checks = 0, failures = 0;
  int n_par = 0, n_raw = 0;

  ram_decoder dut (
    .clk, .rst_n, .bit_en, .bit_in, .cfg_we, .cfg_addr, .cfg_data, .blk, .blk_load, .par, .ser
  );

  ram_decoder #(.B(8), .A(4), .RAM_AW(5), .RAM_DW(10)) dut2 (
    .clk, .rst_n, .bit_en, .bit_in, .cfg_we(cfg_we2), .cfg_addr(cfg_addr2), .cfg_data(cfg_data2),
    .blk(blk2), .blk_load(blk_load2), .par(par2), .ser(ser2)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic load_table();
    logic [7:0] v;
    bit dup;
    for (int a = 0; a < 16; a++) begin
      do begin
        v = 8'($urandom);
        dup = 0;
        for (int k = 0; k < a; k++) if (table_q[k] == v) dup = 1;
      end while (dup);
      table_q[a] = v;
      cfg_we = 1'b1; cfg_addr = 4'(a); cfg_data = v;
      cfg_we2 = 1'b1; cfg_addr2 = 5'(a); cfg_data2 = {2'($urandom), v};
      @(posedge clk); #1;
      cfg_we2 = 1'b1; cfg_addr2 = 5'(a + 16); cfg_data2 = 10'($urandom);
      cfg_we = 1'b0;
      @(posedge clk); #1;
    end
    cfg_we = 1'b0; cfg_we2 = 1'b0;
  endtask

  task automatic send(input logic b, input bit last, input bit coded, input bit data_bit,
                      input logic [7:0] exp_blk);
    while ($urandom_range(3) == 0) begin
      bit_en = 1'b0; bit_in = 1'($urandom);
      #1 check(!blk_load && !par && !ser && !blk_load2, "idle cycle produced output");
      @(posedge clk); #1;
    end
    bit_en = 1'b1; bit_in = b;
    #1;
    check(blk_load == last && blk_load2 == last, "blk_load timing");
    check(par == (last && coded) && par2 == par, "par strobe");
    check(ser == (!coded && data_bit) && ser2 == ser, "ser strobe");
    if (last) begin
      check(blk == exp_blk, $sformatf("block %h expected %h", blk, exp_blk));
      check(blk2 == exp_blk, "oversized RAM block");
    end
    @(posedge clk); #1;
    bit_en = 1'b0;
  endtask

  task automatic run_stream(input int nblocks);
    logic [7:0] b;
    int addr;
    for (int i = 0; i < nblocks; i++) begin
      b = ($urandom_range(1) == 1) ? table_q[$urandom_range(15)] : 8'($urandom);
      addr = -1;
      for (int a = 0; a < 16; a++) if (table_q[a] == b) addr = a;
      if (addr >= 0) begin
        n_par++;
        send(1'b1, 0, 1, 0, b);
        for (int j = 3; j >= 0; j--) send(addr[j], j == 0, 1, 0, b);
      end else begin
        n_raw++;
        send(1'b0, 0, 0, 0, b);
        for (int j = 7; j >= 0; j--) send(b[j], j == 0, 0, 1, b);
      end
    end
  endtask

  initial begin
    bit_en = 0; bit_in = 0; cfg_we = 0; cfg_addr = 0; cfg_data = 0;
    cfg_we2 = 0; cfg_addr2 = 0; cfg_data2 = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    load_table();
    run_stream(150);
    load_table();          // new code for another core
    run_stream(150);
    check(n_par > 60 && n_raw > 60, "both codeword kinds exercised");
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
