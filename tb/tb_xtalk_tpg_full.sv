// tb_xtalk_tpg_full -- xtalk_tpg_top at its default size (8 lines, MAFM
// sequence), one complete test.
//
// After reset the bus carries functional data; the test switches to test
// mode, starts the generator and compares each of the 65 vectors with a
// reference table (two hex digits per vector, bit i = line I_i), checks the
// length (busy for exactly 8n+1 = 65 clocks), that eot marks only the last
// vector, and that every line sees Pg0, Ng1, Dr and Df as a victim.
module tb_xtalk_tpg_full;
  import xtalk_cov_pkg::*;

  localparam int N = 8;
  localparam int M = 65;
  localparam string REF =
    {"00fe00fd00fb00f700ef00df00bf007f01fe02fd04fb08f710ef20df40bf807f",
     "00ff01ff02ff04ff08ff10ff20ff40ff80fe01fd02fb04f708ef10df20bf407f80"};

  logic clk = 0, rst_n = 0;
  logic test_mode = 0, start = 0, scan_en = 0, scan_in = 0;
  logic [N-1:0] func_data = '0, bus_out;
  logic scan_out, busy, eot, en_dbg;
  int checks = 0, failures = 0, t = 0, eots = 0;

  always #5 clk = ~clk;

  xtalk_tpg_top dut (.clk, .rst_n, .test_mode, .start, .scan_en, .scan_in, .scan_out,
    .func_data, .bus_out, .busy, .eot, .en_dbg);

  xtalk_cov #(N) cov = new();

  function automatic int hexval(int c);
    return (c >= int'("a")) ? c - int'("a") + 10 : c - int'("0");
  endfunction

  function automatic logic [N-1:0] ref_vec(int k);
    return N'(hexval(int'(REF[2*k])) * 16 + hexval(int'(REF[2*k+1])));
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  always @(negedge clk) begin
    if (busy) begin
      check(bus_out == ref_vec(t), $sformatf("vector %0d: %h expected %h", t, bus_out, ref_vec(t)));
      check(eot == (t == M - 1), $sformatf("eot at vector %0d", t));
      cov.add(bus_out);
      t++; eots += int'(eot);
    end else if (!test_mode) begin
      check(bus_out == func_data, "functional data on the bus");
    end
  end

  initial begin
    check(REF.len() == 2 * M, "reference table length");
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) begin func_data = N'($urandom); @(negedge clk); end
    test_mode = 1;
    start = 1; @(negedge clk); start = 0;
    repeat (M + 10) @(negedge clk);
    check(t == M, $sformatf("sequence length %0d", t));
    check(eots == 1, "one eot");
    check(cov.missed(MAFM_FAULTS) == 0, "every line covered for Pg0, Ng1, Dr, Df");
    check(!busy && eot, "idle with eot after the sequence");
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
