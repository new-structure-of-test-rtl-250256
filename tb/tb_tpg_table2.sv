// tb_tpg_table2 -- the size sweep of the published evaluation: the generator
// for n = 8, 16, ..., 1024 lines, with both the MAFM and the XMAFM sequence
// (16 generators running in parallel), plus the MAFM generator for the bus
// widths that are not powers of two in the published length comparison
// (n = 12, 20, 24, 28) and the smallest sizes n = 2, 3, 5, 7 in both modes.
//
// For every size the sequence length must equal the published values
// (MAFM 65, 129, ..., 8193 = 8n+1; XMAFM 99, 195, ..., 12291 = 12n+3), eot
// must mark the last vector, and every line must be stimulated as a victim
// for every fault of the model.
module tb_tpg_table2;
  import tpg_pkg::*;

  localparam int NS = 8;
  localparam int unsigned SIZES [NS]   = '{8, 16, 32, 64, 128, 256, 512, 1024};
  localparam int unsigned M_MAFM [NS]  = '{65, 129, 257, 513, 1025, 2049, 4097, 8193};
  localparam int unsigned M_XMAFM [NS] = '{99, 195, 387, 771, 1539, 3075, 6147, 12291};

  logic clk = 0, rst_n = 0, start = 0;
  logic [NS-1:0] done_m, done_x;
  int chk_m [NS], fail_m [NS], chk_x [NS], fail_x [NS];

  always #5 clk = ~clk;

  // Further sizes: MAFM n = 12, 20, 24, 28 (97, 161, 193, 225 vectors) and
  // both sequences for n = 2, 3, 5, 7.
  localparam int NE = 12;
  localparam int unsigned E_N [NE]   = '{12, 20, 24, 28, 2, 3, 5, 7, 2, 3, 5, 7};
  localparam bit          E_X [NE]   = '{0, 0, 0, 0, 0, 0, 0, 0, 1, 1, 1, 1};
  localparam int unsigned E_M [NE]   = '{97, 161, 193, 225, 17, 25, 41, 57, 27, 39, 63, 87};
  logic [NE-1:0] done_e;
  int chk_e [NE], fail_e [NE];

  for (genvar g = 0; g < NE; g++) begin : g_extra
    tpg_table2_lane #(.N(E_N[g]), .SEQ(E_X[g] ? SEQ_XMAFM : SEQ_MAFM), .M_EXPECT(E_M[g])) lane (
      .clk, .rst_n, .start, .done(done_e[g]), .checks(chk_e[g]), .failures(fail_e[g]));
  end

  for (genvar g = 0; g < NS; g++) begin : g_size
    tpg_table2_lane #(.N(SIZES[g]), .SEQ(SEQ_MAFM), .M_EXPECT(M_MAFM[g])) lane_m (
      .clk, .rst_n, .start, .done(done_m[g]), .checks(chk_m[g]), .failures(fail_m[g]));
    tpg_table2_lane #(.N(SIZES[g]), .SEQ(SEQ_XMAFM), .M_EXPECT(M_XMAFM[g])) lane_x (
      .clk, .rst_n, .start, .done(done_x[g]), .checks(chk_x[g]), .failures(fail_x[g]));
  end

  initial begin
    int checks, failures;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    wait (&done_m && &done_x && &done_e);
    @(negedge clk);
    checks = 0; failures = 0;
    for (int g = 0; g < NS; g++) begin
      checks   += chk_m[g] + chk_x[g];
      failures += fail_m[g] + fail_x[g];
    end
    for (int g = 0; g < NE; g++) begin
      checks   += chk_e[g];
      failures += fail_e[g];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int failures;
    repeat (14000) @(posedge clk);
    failures = 1;
    for (int g = 0; g < NS; g++) failures += fail_m[g] + fail_x[g];
    for (int g = 0; g < NE; g++) failures += fail_e[g];
    $display("FAIL watchdog");
    $display("TB_RESULT checks=0 failures=%0d", failures);
    $finish;
  end
endmodule
