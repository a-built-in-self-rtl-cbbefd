// input_mux: the input multiplexer in front of the memory. In normal
// operation the user's requests reach the memory; while the self-test runs,
// the test controller switches the memory over to the BIST engine's requests.
// The read data returns to both sides unchanged.
//
// Interface: test_mode (from the test controller) selects test_req when 1 and
// norm_req when 0. Combinational. REQ_T is the request bundle
// (write/read enables, address, write data).
//
// The multiplexer and its control by the test controller follow the
// document's basic BIST structure; the request bundle is this design's own.
module input_mux #(
  parameter type REQ_T = bisr_pkg::mem_req_t
) (
  input  logic test_mode,
  input  REQ_T norm_req,
  input  REQ_T test_req,
  output REQ_T mem_req
);

  always_comb mem_req = test_mode ? test_req : norm_req;

endmodule
