// tb_bus_test_mux -- self-checking testbench of bus_test_mux.
//
// Random functional and generator data with random test_mode; every output
// bit must come from the generator when test_mode=1 and from the functional
// data otherwise.
module tb_bus_test_mux;
  localparam int N = 12;
  logic test_mode;
  logic [N-1:0] func_data, tpg_data, bus_out;
  int checks = 0, failures = 0;

  bus_test_mux #(.N(N)) dut (.test_mode, .func_data, .tpg_data, .bus_out);

  initial begin
    for (int k = 0; k < 300; k++) begin
      test_mode = 1'($urandom);
      func_data = N'($urandom);
      tpg_data  = N'($urandom);
      #1;
      checks++;
      if (bus_out !== (test_mode ? tpg_data : func_data)) begin
        failures++;
        $display("FAIL mode=%b func=%h tpg=%h bus=%h", test_mode, func_data, tpg_data, bus_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
