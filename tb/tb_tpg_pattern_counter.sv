// tb_tpg_pattern_counter -- self-checking testbench of tpg_pattern_counter.
//
// Four instances (MAFM and XMAFM, n = 5 and n = 8) count with random adv
// and occasional load. A plain integer vector count t is kept in the
// testbench; the counters must always equal <t / mod, t % mod> with mod = n
// (MAFM) or 2n (XMAFM), TPC1 wrapping at 16 (MAFM) or 8 (XMAFM). The widths
// of TPC0 (3/4 bits for n=5 and n=8) and TPC1 (4/3) are checked too.
module tb_tpg_pattern_counter;
  import tpg_pkg::*;

  logic clk = 0, rst_n = 0, load = 0, adv = 0;
  int checks = 0, failures = 0, wraps = 0;

  always #5 clk = ~clk;

  logic [2:0] m5_0;  logic [3:0] m5_1;
  logic [3:0] x5_0;  logic [2:0] x5_1;
  logic [2:0] m8_0;  logic [3:0] m8_1;
  logic [3:0] x8_0;  logic [2:0] x8_1;

  tpg_pattern_counter #(.N(5), .SEQ(SEQ_MAFM))  d_m5 (.clk, .rst_n, .load, .adv, .tpc0(m5_0), .tpc1(m5_1));
  tpg_pattern_counter #(.N(5), .SEQ(SEQ_XMAFM)) d_x5 (.clk, .rst_n, .load, .adv, .tpc0(x5_0), .tpc1(x5_1));
  tpg_pattern_counter #(.N(8), .SEQ(SEQ_MAFM))  d_m8 (.clk, .rst_n, .load, .adv, .tpc0(m8_0), .tpc1(m8_1));
  tpg_pattern_counter #(.N(8), .SEQ(SEQ_XMAFM)) d_x8 (.clk, .rst_n, .load, .adv, .tpc0(x8_0), .tpc1(x8_1));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  task automatic expect_pair(string name, int t, int md, int hi_mod, int c1, int c0);
    int e1 = (t / md) % hi_mod;
    int e0 = t % md;
    check(c1 == e1 && c0 == e0,
          $sformatf("%s t=%0d: <%0d,%0d> expected <%0d,%0d>", name, t, c1, c0, e1, e0));
  endtask

  int t = 0;

  initial begin
    check($bits(m5_0) == 3 && $bits(x5_0) == 4 && $bits(m8_0) == 3 && $bits(x8_0) == 4,
          "TPC0 widths");
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 1200; k++) begin
      load = ($urandom_range(0, 400) == 0);
      adv  = ($urandom_range(0, 4) != 0);
      @(posedge clk);
      if (load) t = 0; else if (adv) t++;
      @(negedge clk);
      expect_pair("MAFM n=5",  t, 5,  16, int'(m5_1), int'(m5_0));
      expect_pair("XMAFM n=5", t, 10, 8,  int'(x5_1), int'(x5_0));
      expect_pair("MAFM n=8",  t, 8,  16, int'(m8_1), int'(m8_0));
      expect_pair("XMAFM n=8", t, 16, 8,  int'(x8_1), int'(x8_0));
      if (t == 16 * 5) wraps++;
    end
    check(wraps > 0, "TPC1 wrap of MAFM n=5 reached");
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
