// tb_scan_decompressor -- end-to-end test of the decompressor in its three forms.
//
//  u_fast : default form, one chain, scan clock = 2 x tester clock, FSM decoder.
//  u_multi: two chains sharing one tester channel, tester bit every clock, each
//           decoder taking every second bit (FSM decoder, default code).
//  u_ram  : one chain, 8-bit blocks, RAM decoder with 4-bit addresses (16 x 8
//           RAM), scan clock = 2 x tester clock; the RAM is loaded, used, then
//           reloaded with another core's table and used again.
// The testbench encodes random, skewed block streams with its own copies of the
// codes, drives the tester channel, and compares every bit that each serializer
// shifts into its chain (scan_en high) with the expected block stream. It also
// checks that the last scan bit leaves within B scan clocks of the last tester
// bit (decompression costs no test time), and counts each mechanism of the
// design: coded decode (Par), raw pass-through (Ser), scan clock held while the
// decoder is busy, back-to-back blocks with no gap, channel rotation over
// chains, RAM decode, and RAM reload. A mechanism that never happens is a failure.
module tb_scan_decompressor;
  import sdc_pkg::*;

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

  // mechanism counters
  int m_par = 0, m_ser = 0, m_hold = 0, m_b2b = 0, m_rot0 = 0, m_rot1 = 0, m_ram_par = 0, m_reload = 0;

  localparam logic [3:0] HOT [3] = '{4'b0010, 4'b0100, 4'b0110};

  function automatic logic [3:0] rand_blk4();
    return ($urandom_range(3) != 0) ? HOT[$urandom_range(2)] : 4'($urandom);
  endfunction

  // Default selective code, first bit first.
  task automatic enc4(input logic [3:0] b, ref logic q[$]);
    case (b)
      4'b0010: begin q.push_back(1); q.push_back(0); end
      4'b0100: begin q.push_back(1); q.push_back(1); q.push_back(0); end
      4'b0110: begin q.push_back(1); q.push_back(1); q.push_back(1); end
      default: begin q.push_back(0); for (int j = 3; j >= 0; j--) q.push_back(b[j]); end
    endcase
  endtask

  task automatic push_bits4(input logic [3:0] b, ref logic q[$]);
    for (int j = 3; j >= 0; j--) q.push_back(b[j]);
  endtask

  // ------------------------------------------------------------------ u_fast
  logic       f_en, f_bit;
  logic [0:0] f_so, f_se, f_par, f_ser, f_err, f_ovr;
  logic       f_exp[$];
  longint     f_last_tester = 0, f_last_scan = 0;
  int         f_run = 0;

  scan_decompressor #(.NUM_CHAINS(1), .CLK_RATIO(2)) u_fast (
    .clk, .rst_n, .tester_en(f_en), .tester_bit(f_bit), .cfg_we(1'b0), .cfg_addr('0), .cfg_data('0),
    .scan_out(f_so), .scan_en(f_se), .par_load(f_par), .ser_load(f_ser), .code_err(f_err), .overrun(f_ovr)
  );

  always @(posedge clk) if (rst_n) begin
    if (f_par[0]) m_par++;
    if (f_ser[0]) m_ser++;
    if (f_err[0]) check(1'b0, "u_fast code_err");
    if (f_se[0]) begin
      f_last_scan = cyc;
      f_run++;
      if (f_exp.size() == 0) check(1'b0, "u_fast shifted an unexpected bit");
      else check(f_so[0] == f_exp.pop_front(), "u_fast scan bit");
    end else begin
      if (f_run > 4) m_b2b++;
      f_run = 0;
      if (f_en) m_hold++;   // scan clock stopped while the tester is still sending
    end
  end

  // ------------------------------------------------------------------ u_multi
  logic       m_en, m_bit;
  logic [1:0] m_so, m_se, m_parv, m_serv, m_err, m_ovr;
  logic       m_exp0[$], m_exp1[$];

  scan_decompressor #(.NUM_CHAINS(2), .CLK_RATIO(2)) u_multi (
    .clk, .rst_n, .tester_en(m_en), .tester_bit(m_bit), .cfg_we(2'b00), .cfg_addr('0), .cfg_data('0),
    .scan_out(m_so), .scan_en(m_se), .par_load(m_parv), .ser_load(m_serv), .code_err(m_err), .overrun(m_ovr)
  );

  always @(posedge clk) if (rst_n) begin
    if (m_parv[0] || m_serv[0]) m_rot0++;
    if (m_parv[1] || m_serv[1]) m_rot1++;
    if (m_err != 0) check(1'b0, "u_multi code_err");
    if (m_se[0]) begin
      if (m_exp0.size() == 0) check(1'b0, "u_multi chain 0 unexpected bit");
      else check(m_so[0] == m_exp0.pop_front(), "u_multi chain 0 scan bit");
    end
    if (m_se[1]) begin
      if (m_exp1.size() == 0) check(1'b0, "u_multi chain 1 unexpected bit");
      else check(m_so[1] == m_exp1.pop_front(), "u_multi chain 1 scan bit");
    end
  end

  // ------------------------------------------------------------------ u_ram
  logic       r_en, r_bit, r_we;
  logic [3:0] r_addr;
  logic [7:0] r_data;
  logic [0:0] r_so, r_se, r_par, r_ser, r_err, r_ovr;
  logic       r_exp[$];
  logic [7:0] r_table [16];

  scan_decompressor #(
    .NUM_CHAINS(1), .B(8), .CLK_RATIO(2), .DECODER(DEC_RAM), .A(4), .RAM_AW(4), .RAM_DW(8),
    .PATTERN({8'h06, 8'h04, 8'h02})
  ) u_ram (
    .clk, .rst_n, .tester_en(r_en), .tester_bit(r_bit), .cfg_we(r_we), .cfg_addr(r_addr), .cfg_data(r_data),
    .scan_out(r_so), .scan_en(r_se), .par_load(r_par), .ser_load(r_ser), .code_err(r_err), .overrun(r_ovr)
  );

  always @(posedge clk) if (rst_n) begin
    if (r_par[0]) m_ram_par++;
    if (r_se[0]) begin
      if (r_exp.size() == 0) check(1'b0, "u_ram unexpected bit");
      else check(r_so[0] == r_exp.pop_front(), "u_ram scan bit");
    end
  end

  task automatic ram_load();
    logic [7:0] v;
    bit dup;
    for (int a = 0; a < 16; a++) begin
      do begin
        v = 8'($urandom);
        dup = 0;
        for (int k = 0; k < a; k++) if (r_table[k] == v) dup = 1;
      end while (dup);
      r_table[a] = v;
      r_we = 1'b1; r_addr = 4'(a); r_data = v;
      @(posedge clk); #1;
    end
    r_we = 1'b0;
  endtask

  task automatic ram_stream(input int nblocks);
    logic s[$];
    logic [7:0] b;
    int addr;
    for (int i = 0; i < nblocks; i++) begin
      b = ($urandom_range(2) != 0) ? r_table[$urandom_range(15)] : 8'($urandom);
      addr = -1;
      for (int a = 0; a < 16; a++) if (r_table[a] == b) addr = a;
      if (addr >= 0) begin
        s.push_back(1);
        for (int j = 3; j >= 0; j--) s.push_back(addr[j]);
      end else begin
        s.push_back(0);
        for (int j = 7; j >= 0; j--) s.push_back(b[j]);
      end
      for (int j = 7; j >= 0; j--) r_exp.push_back(b[j]);
    end
    while (s.size() > 0) begin
      r_en = 1'b1; r_bit = s.pop_front();
      @(posedge clk); #1;
      r_en = 1'b0;
      @(posedge clk); #1;
    end
    repeat (12) @(posedge clk);
    #1 check(r_exp.size() == 0, "u_ram all blocks shifted");
  endtask

  initial begin
    logic s[$], s0[$], s1[$];
    logic [3:0] b;
    f_en = 0; f_bit = 0; m_en = 0; m_bit = 0; r_en = 0; r_bit = 0; r_we = 0; r_addr = 0; r_data = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;

    // --- one chain, scan clock twice the tester clock
    for (int i = 0; i < 400; i++) begin
      b = rand_blk4();
      enc4(b, s);
      push_bits4(b, f_exp);
    end
    while (s.size() > 0) begin
      f_en = 1'b1; f_bit = s.pop_front();
      @(posedge clk); #1;
      f_last_tester = cyc;
      f_en = 1'b0;
      @(posedge clk); #1;
    end
    repeat (10) @(posedge clk);
    #1;
    check(f_exp.size() == 0, "u_fast all blocks shifted");
    check(f_last_scan - f_last_tester <= 4, "u_fast: decoding adds no test time");
    check(!f_ovr[0], "u_fast no overrun");

    // --- two chains on one channel, tester bit every clock
    for (int i = 0; i < 200; i++) begin
      b = rand_blk4(); enc4(b, s0); push_bits4(b, m_exp0);
      b = rand_blk4(); enc4(b, s1); push_bits4(b, m_exp1);
    end
    // pad the shorter stream with whole filler codewords (block 0010 / 0100)
    while (s0.size() != s1.size()) begin
      if (s0.size() + 1 == s1.size()) begin
        enc4(4'b0100, s0); push_bits4(4'b0100, m_exp0);
      end else if (s1.size() + 1 == s0.size()) begin
        enc4(4'b0100, s1); push_bits4(4'b0100, m_exp1);
      end else if (s0.size() < s1.size()) begin
        enc4(4'b0010, s0); push_bits4(4'b0010, m_exp0);
      end else begin
        enc4(4'b0010, s1); push_bits4(4'b0010, m_exp1);
      end
    end
    while (s0.size() > 0) begin
      m_en = 1'b1; m_bit = s0.pop_front();
      @(posedge clk); #1;
      m_bit = s1.pop_front();
      @(posedge clk); #1;
      m_en = 1'b0;
    end
    repeat (10) @(posedge clk);
    #1;
    check(m_exp0.size() == 0 && m_exp1.size() == 0, "u_multi all blocks shifted");
    check(m_ovr == 2'b00, "u_multi no overrun");

    // --- RAM decoder, then reload for another core
    ram_load();
    ram_stream(200);
    ram_load();
    m_reload++;
    ram_stream(200);
    check(!r_ovr[0] && !r_err[0], "u_ram no overrun");

    $display("mechanisms: par=%0d ser=%0d hold=%0d back_to_back=%0d chain0=%0d chain1=%0d ram_par=%0d reload=%0d",
             m_par, m_ser, m_hold, m_b2b, m_rot0, m_rot1, m_ram_par, m_reload);
    check(m_par > 0, "coded decode happened");
    check(m_ser > 0, "raw pass-through happened");
    check(m_hold > 0, "scan clock hold happened");
    check(m_b2b > 0, "back-to-back blocks happened");
    check(m_rot0 > 0 && m_rot1 > 0, "channel rotation fed both chains");
    check(m_ram_par > 0, "RAM decode happened");
    check(m_reload > 0, "RAM reload happened");
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
