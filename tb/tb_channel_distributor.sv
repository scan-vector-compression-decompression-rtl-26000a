// tb_channel_distributor -- self-checking test of the tester-channel phase rotation.
//
// Three decoders share one channel. tester_en is driven high on random cycles;
// the testbench counts tester bits itself and checks that each one is given to
// exactly decoder (count mod 3), and that no decoder is enabled on cycles
// without a tester bit. A single-decoder instance must take every tester bit.
module tb_channel_distributor;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       tester_en;
  logic [2:0] dec_en;
  logic [0:0] dec_en1;

  int checks = 0, failures = 0;
  int nbits = 0;
  int per_dec [3] = '{0, 0, 0};

  channel_distributor #(.N(3)) dut (.clk, .rst_n, .tester_en, .dec_en);
  channel_distributor #(.N(1)) dut1 (.clk, .rst_n, .tester_en, .dec_en(dec_en1));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    tester_en = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      tester_en = ($urandom_range(2) != 0);
      #1;
      if (tester_en) begin
        check(dec_en == 3'(1 << (nbits % 3)), $sformatf("bit %0d to decoder %b", nbits, dec_en));
        per_dec[nbits % 3]++;
        nbits++;
      end else begin
        check(dec_en == '0, "decoder enabled without a tester bit");
      end
      check(dec_en1[0] == tester_en, "single decoder takes every bit");
      @(posedge clk); #1;
    end
    check(per_dec[0] > 50 && per_dec[1] > 50 && per_dec[2] > 50, "all phases used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
