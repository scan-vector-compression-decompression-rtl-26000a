// tb_code_ram -- self-checking test of the decode RAM.
//
// Fills all 16 words with random data, reads every address back through the
// asynchronous read port, then rewrites a random subset (as when the table is
// reloaded for another core) and checks all words against a shadow copy again.
// A read in the same cycle as a write to that address must still show the old
// word until the clock edge.
module tb_code_ram;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       we;
  logic [3:0] waddr, raddr;
  logic [7:0] wdata, rdata;
  logic [7:0] shadow [16];

  int checks = 0, failures = 0;

  code_ram dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic write(input logic [3:0] a, input logic [7:0] d);
    we = 1'b1; waddr = a; wdata = d; raddr = a;
    #1 check(rdata == shadow[a], "read during write shows the old word");
    @(posedge clk); #1;
    shadow[a] = d;
    we = 1'b0;
  endtask

  task automatic read_all();
    for (int a = 0; a < 16; a++) begin
      raddr = 4'(a);
      #1 check(rdata == shadow[a], $sformatf("word %0d", a));
    end
  endtask

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0;
    @(posedge clk); #1;
    for (int a = 0; a < 16; a++) begin
      we = 1'b1; waddr = 4'(a); wdata = 8'($urandom);
      @(posedge clk); #1;
      shadow[a] = wdata;
    end
    we = 1'b0;
    read_all();
    for (int i = 0; i < 40; i++) write(4'($urandom), 8'($urandom));
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
