// tb_input_mux: self-checking testbench of the normal/test input
// multiplexer, with random requests on both sides.
module tb_input_mux;
  import bisr_pkg::*;
  logic     test_mode;
  mem_req_t norm_req, test_req, mem_req;
  int checks = 0, failures = 0;

  input_mux dut (.test_mode, .norm_req, .test_req, .mem_req);

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      norm_req  = mem_req_t'($urandom);
      test_req  = mem_req_t'($urandom);
      test_mode = 1'($urandom);
      #1;
      checks++;
      if (mem_req != (test_mode ? test_req : norm_req)) begin
        failures++;
        $display("FAIL mode=%0b out=%h", test_mode, mem_req);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
