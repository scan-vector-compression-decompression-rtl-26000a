// tb_serializer -- self-checking test of the parallel-in serial-out serializer.
//
// Random 4-bit blocks are loaded at random spacings of 4 to 8 cycles (4 is the
// back-to-back case, where the load coincides with the last bit leaving). The
// bits seen on scan_out while scan_en is high are compared, in order, with the
// loaded blocks (most significant bit first); the first bit of each block must
// appear in the cycle after its load, the scan clock must be held between
// blocks, and no overrun may be flagged. A final load only two cycles after the
// previous one must set the sticky overrun flag.
module tb_serializer;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       load;
  logic [3:0] din;
  logic       scan_out, scan_en, overrun;

  int checks = 0, failures = 0;
  logic exp_q[$];
  int held = 0, shifted = 0, loads = 0;
  int since_load = 99;

  serializer #(.B(4)) dut (.clk, .rst_n, .load, .din, .scan_out, .scan_en, .overrun);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Monitor: the chain takes scan_out on each edge where scan_en is high.
  always @(posedge clk) if (rst_n) begin
    if (scan_en) begin
      shifted++;
      if (exp_q.size() == 0) check(1'b0, "bit shifted with nothing loaded");
      else check(scan_out == exp_q.pop_front(), "scan_out bit");
    end else begin
      held++;
      check(exp_q.size() == 0, "scan clock held while bits wait");
    end
    if (since_load == 1) check(scan_en, "first bit not in the cycle after load");
    if (load) for (int j = 3; j >= 0; j--) exp_q.push_back(din[j]);
  end

  initial begin
    int gap;
    load = 0; din = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    for (int i = 0; i < 300; i++) begin
      din  = 4'($urandom);
      load = 1'b1;
      loads++;
      @(posedge clk); since_load = 0; #1;
      load = 1'b0;
      gap = $urandom_range(8, 4);
      for (int c = 1; c < gap; c++) begin
        since_load = c;
        @(posedge clk); #1;
      end
      since_load = gap;
    end
    repeat (6) @(posedge clk);
    #1;
    check(exp_q.size() == 0, "all bits shifted out");
    check(shifted == 4 * loads, "scan clock count equals 4 per block");
    check(held > 0, "scan clock was held at least once");
    check(!overrun, "no overrun with spacing >= B");
    // too-early load
    din = 4'b1010; load = 1'b1; @(posedge clk); #1;
    load = 1'b0; @(posedge clk); #1;
    din = 4'b0101; load = 1'b1; @(posedge clk); #1;
    load = 1'b0;
    exp_q.delete();
    for (int j = 3; j >= 0; j--) exp_q.push_back(din[j]);
    #1 check(overrun, "overrun flagged on early load");
    repeat (6) @(posedge clk);
    #1 check(overrun, "overrun is sticky");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
